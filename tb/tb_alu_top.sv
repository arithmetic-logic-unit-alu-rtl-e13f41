// Self-checking testbench of alu_top, the whole calculator, with a short
// display refresh counter. It sets switches, presses Enter and reads the
// four multiplexed digits back as characters, following the user sequence
// show A -> show B -> A+B -> A-B -> A+B -> A-B, and checks each displayed
// string against values computed here (for example 200+100 shows "F044",
// 35-99 shows "-064").
module tb_alu_top;
  import tb_seg_pkg::*;
  localparam int RW    = 6;
  localparam int FRAME = 4 * (1 << (RW - 2));

  logic       clk = 0, rst = 1, b_enter = 0;
  logic [7:0] input_sw = 0;
  logic [3:0] anode;
  logic [6:0] seven_seg;
  int checks = 0, failures = 0;

  alu_top #(.REFRESH_W(RW)) dut (.clk, .rst, .b_enter, .input_sw, .anode, .seven_seg);

  always #10 clk = ~clk;   // 50 MHz

  // Reads one frame after letting two frames pass, returns "d3d2d1d0".
  task automatic read_display(output string s);
    byte c [4] = '{"?", "?", "?", "?"};
    repeat (2 * FRAME) @(posedge clk);
    for (int i = 0; i < FRAME; i++) begin
      @(posedge clk);
      #1;
      for (int d = 0; d < 4; d++) if (!anode[d]) c[d] = char_of(seven_seg);
    end
    s = $sformatf("%c%c%c%c", c[3], c[2], c[1], c[0]);
  endtask

  function automatic string expected(input int value, input bit neg, input bit ovf);
    return $sformatf("%s%03d", ovf ? "F" : (neg ? "-" : " "), value);
  endfunction

  task automatic expect_display(input string exp, input string what);
    string s;
    read_display(s);
    checks++;
    if (s != exp) begin
      failures++;
      $display("FAIL %s: display \"%s\", expected \"%s\"", what, s, exp);
    end
  endtask

  task automatic press();
    b_enter = 1;
    repeat (6) @(posedge clk);
    b_enter = 0;
    repeat (4) @(posedge clk);
  endtask

  // One full user sequence with operands a and b.
  task automatic session(input int a, input int b);
    rst = 1;
    repeat (2) @(posedge clk);
    rst = 0;
    input_sw = 8'(b);                        // Reg A follows the switches
    expect_display(expected(b, 0, 0), "A follows switches");
    input_sw = 8'(a);
    expect_display(expected(a, 0, 0), "A shown");
    press();
    input_sw = 8'(a ^ 32'h5a);                // Reg B follows, Reg A kept
    expect_display(expected(a ^ 32'h5a, 0, 0), "B follows switches");
    input_sw = 8'(b);
    expect_display(expected(b, 0, 0), "B shown");
    for (int k = 0; k < 2; k++) begin
      press();
      input_sw = 8'($urandom);               // switches ignored from now on
      expect_display(expected((a + b) % 256, 0, a + b > 255), "A+B");
      press();
      expect_display(expected(a >= b ? a - b : b - a, b > a, 0), "A-B");
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    session(200, 100);
    session(35, 99);
    session(148, 249);
    session(0, 0);
    session(255, 255);
    for (int n = 0; n < 5; n++) session(int'($urandom % 256), int'($urandom % 256));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
