// Self-checking testbench of fir_top in both structures: with registered
// input and output the direct form answers 2 clocks after a sample is
// applied and the pipelined form 3 clocks after. Both are checked every
// cycle against an integer convolution and the latencies are measured with
// an impulse.
module tb_fir_top;
  localparam int N = 16;
  localparam int H [N] = '{-1, 0, 1, -3, -9, -2, 30, 63, 63, 30, -2, -9, -3, 1, 0, -1};

  logic               clk = 0, rst = 1;
  logic signed [7:0]  x_in = 0;
  logic signed [15:0] y_d, y_p;
  int checks = 0, failures = 0;
  int hist [N+3];     // hist[j] = sample applied j cycles ago

  fir_top #(.PIPELINED(1'b0)) dut_d (.clk, .rst, .x_in, .y_out(y_d));
  fir_top #(.PIPELINED(1'b1)) dut_p (.clk, .rst, .x_in, .y_out(y_p));

  always #5 clk = ~clk;

  function automatic int conv(input int lag);
    int s = 0;
    for (int m = 0; m < N; m++) s += H[m] * hist[m + lag];
    return s;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_d, first_p;
    for (int j = 0; j < N + 3; j++) hist[j] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    first_d = -1; first_p = -1;
    for (int n = 0; n < 3000; n++) begin
      automatic int s = (n == 0) ? 1 : (n < 40 ? 0 : int'($urandom % 256) - 128);
      x_in = 8'(s);
      @(posedge clk);
      for (int j = N + 2; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = s;
      #1;
      // After this edge the input register holds hist[0]; the output
      // register shows the filter's value of one edge earlier.
      checks += 2;
      if (int'(y_d) != conv(1)) begin
        failures++;
        if (failures < 10) $display("FAIL direct n=%0d y=%0d exp %0d", n, y_d, conv(1));
      end
      if (int'(y_p) != conv(2)) begin
        failures++;
        if (failures < 10) $display("FAIL pipelined n=%0d y=%0d exp %0d", n, y_p, conv(2));
      end
      // Latency of the impulse (h[0] = -1 appears first).
      if (first_d < 0 && y_d != 0) first_d = n;
      if (first_p < 0 && y_p != 0) first_p = n;
    end
    // The impulse is applied before edge 1 (n = 0): direct output after
    // edge 2, pipelined after edge 3.
    checks += 2;
    if (first_d != 1) begin failures++; $display("FAIL direct latency %0d", first_d + 1); end
    if (first_p != 2) begin failures++; $display("FAIL pipelined latency %0d", first_p + 1); end
    $display("latency direct=%0d pipelined=%0d clocks", first_d + 1, first_p + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
