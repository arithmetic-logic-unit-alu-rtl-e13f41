// Self-checking testbench of bin2bcd: all 256 inputs, compared with the
// decimal digits computed by integer division.
module tb_bin2bcd;
  logic [7:0] bin;
  logic [9:0] bcd;
  int checks = 0, failures = 0;

  bin2bcd dut (.bin, .bcd);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      bin = v[7:0];
      #1;
      checks++;
      if (bcd[9:8] != 2'(v / 100) || bcd[7:4] != 4'((v / 10) % 10) || bcd[3:0] != 4'(v % 10)) begin
        failures++;
        $display("FAIL %0d -> %b", v, bcd);
      end
    end
    // The worked example: 249 -> 10 0100 1001.
    bin = 8'b1111_1001;
    #1;
    checks++;
    if (bcd != 10'b10_0100_1001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
