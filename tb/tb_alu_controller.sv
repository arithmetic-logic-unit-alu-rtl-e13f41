// Self-checking testbench of alu_controller: the state sequence
// A -> B -> A+B -> A-B -> A+B ... on Enter presses, one step per press
// however long the button is held, the three-clock reaction time, and reset
// back to the first state.
module tb_alu_controller;
  import alu_pkg::*;
  logic      clk = 0, rst = 1, enter = 0;
  alu_fn_e   fn;
  reg_ctrl_e reg_ctrl;
  int checks = 0, failures = 0;

  alu_controller dut (.clk, .rst, .enter, .fn, .reg_ctrl);

  always #5 clk = ~clk;

  task automatic expect_out(input alu_fn_e efn, input reg_ctrl_e erc, input string what);
    checks++;
    if (fn !== efn || reg_ctrl !== erc) begin
      failures++;
      $display("FAIL %s: fn=%0d reg_ctrl=%0d, expected %0d %0d", what, fn, reg_ctrl, efn, erc);
    end
  endtask

  // Press: raise enter just after a clock edge, hold for hold_cycles, release.
  // Checks that outputs change exactly on the third edge after the rise.
  task automatic press(input int hold_cycles, input alu_fn_e efn, input reg_ctrl_e erc);
    alu_fn_e   old_fn = fn;
    reg_ctrl_e old_rc = reg_ctrl;
    enter = 1;
    repeat (2) @(posedge clk);
    #1 expect_out(old_fn, old_rc, "before third edge");
    @(posedge clk);
    #1 expect_out(efn, erc, "after third edge");
    repeat (hold_cycles) @(posedge clk);
    #1 expect_out(efn, erc, "while held");
    enter = 0;
    repeat (5) @(posedge clk);
    #1 expect_out(efn, erc, "after release");
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    expect_out(FN_PASS_A, RC_LOAD_A, "after reset");
    repeat (10) @(posedge clk);
    #1 expect_out(FN_PASS_A, RC_LOAD_A, "idle");
    press(1,  FN_PASS_B, RC_LOAD_B);
    press(20, FN_ADD,    RC_HOLD);
    press(3,  FN_SUB,    RC_HOLD);
    press(7,  FN_ADD,    RC_HOLD);
    press(1,  FN_SUB,    RC_HOLD);
    press(2,  FN_ADD,    RC_HOLD);
    rst = 1;
    @(posedge clk);
    #1 rst = 0;
    expect_out(FN_PASS_A, RC_LOAD_A, "after second reset");
    press(1, FN_PASS_B, RC_LOAD_B);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
