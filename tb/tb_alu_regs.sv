// Self-checking testbench of alu_regs: the selected register follows the
// switches one clock later, the other holds; reset clears both.
module tb_alu_regs;
  import alu_pkg::*;
  logic       clk = 0, rst = 1;
  logic [7:0] in_sw = 0, a, b;
  reg_ctrl_e  reg_ctrl = RC_LOAD_A;
  int checks = 0, failures = 0;
  logic [7:0] ma = 0, mb = 0;   // model

  alu_regs dut (.clk, .rst, .in_sw, .reg_ctrl, .a, .b);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (a !== 0 || b !== 0) failures++;
    for (int n = 0; n < 2000; n++) begin
      in_sw = 8'($urandom);
      case ($urandom % 3)
        0: reg_ctrl = RC_LOAD_A;
        1: reg_ctrl = RC_LOAD_B;
        default: reg_ctrl = RC_HOLD;
      endcase
      if (n == 1000) rst = 1;
      @(posedge clk);
      if (rst) begin ma = 0; mb = 0; end
      else if (reg_ctrl == RC_LOAD_A) ma = in_sw;
      else if (reg_ctrl == RC_LOAD_B) mb = in_sw;
      #1;
      rst = 0;
      checks++;
      if (a !== ma || b !== mb) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d a=%0d b=%0d expected %0d %0d", n, a, b, ma, mb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
