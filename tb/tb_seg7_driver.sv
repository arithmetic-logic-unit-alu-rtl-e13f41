// Self-checking testbench of seg7_driver with a short refresh counter:
// the anodes scan AN3, AN2, AN1, AN0 with one active at a time, each for
// 2^(REFRESH_W-2) clocks, and each digit shows the expected character
// ("-" or "F" or dark on the left, then hundreds, tens, ones).
module tb_seg7_driver;
  import tb_seg_pkg::*;
  localparam int RW = 4;            // each digit lit for 4 clocks
  logic       clk = 0, rst = 1;
  logic [9:0] bcd = 0;
  logic       sign = 0, overflow = 0;
  logic [3:0] anode;
  logic [6:0] seven_seg;
  int checks = 0, failures = 0;

  seg7_driver #(.REFRESH_W(RW)) dut (.clk, .rst, .bcd, .sign, .overflow, .anode, .seven_seg);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs two full scans with the inputs held and checks every cycle.
  task automatic show(input int value, input bit s, input bit o);
    byte exp [4];
    int  run;
    logic [3:0] last_an;
    bcd = {2'(value / 100), 4'((value / 10) % 10), 4'(value % 10)};
    sign = s; overflow = o;
    exp[3] = o ? "F" : (s ? "-" : " ");
    exp[2] = byte'("0" + value / 100);
    exp[1] = byte'("0" + (value / 10) % 10);
    exp[0] = byte'("0" + value % 10);
    repeat (2) @(posedge clk);   // let the registered outputs settle
    run = 0;
    last_an = anode;
    for (int c = 0; c < 2 * 4 * (1 << (RW - 2)); c++) begin
      @(posedge clk);
      #1;
      checks++;
      if (!$onehot(~anode)) begin
        failures++;
        $display("FAIL anode %b not one-hot low", anode);
      end else begin
        for (int d = 0; d < 4; d++) begin
          if (!anode[d] && char_of(seven_seg) != exp[d]) begin
            failures++;
            $display("FAIL value %0d digit %0d shows '%c' expected '%c'", value, d,
                     char_of(seven_seg), exp[d]);
          end
        end
        // Scan order and dwell time.
        if (anode == last_an) run++;
        else begin
          checks++;
          if (anode != {last_an[0], last_an[3:1]}) begin
            failures++;
            $display("FAIL scan order %b -> %b", last_an, anode);
          end
          if (c > 4 && run != (1 << (RW - 2))) begin
            failures++;
            $display("FAIL dwell %0d cycles", run);
          end
          run = 1;
          last_an = anode;
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (anode !== 4'b1111) failures++;   // all dark in reset
    rst = 0;
    show(0,   0, 0);
    show(249, 0, 0);
    show(64,  1, 0);
    show(141, 0, 1);
    show(7,   1, 1);
    for (int n = 0; n < 40; n++) show(int'($urandom % 256), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
