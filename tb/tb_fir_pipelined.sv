// Self-checking testbench of fir_pipelined: the output must equal the
// integer convolution of the input delayed by exactly one clock (the
// pipeline register), for an impulse, a step, the extreme inputs and random
// samples.
module tb_fir_pipelined;
  localparam int N = 16;
  localparam int H [N] = '{-1, 0, 1, -3, -9, -2, 30, 63, 63, 30, -2, -9, -3, 1, 0, -1};

  logic               clk = 0, rst = 1;
  logic signed [7:0]  x = 0;
  logic signed [15:0] y;
  int checks = 0, failures = 0;
  int last_y;          // output seen with the latest sample applied
  int hist [N+1];     // hist[m] = x[k-m]

  fir_pipelined dut (.clk, .rst, .x, .y);

  always #5 clk = ~clk;

  // Direct-form output of the previous cycle.
  function automatic int ref_y();
    int s = 0;
    for (int m = 0; m < N; m++) s += H[m] * hist[m+1];
    return s;
  endfunction

  task automatic step(input int sample);
    x = 8'(sample);
    for (int m = N; m > 0; m--) hist[m] = hist[m-1];
    hist[0] = sample;
    #1;
    last_y = int'(y);
    checks++;
    if (int'(y) != ref_y()) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d expected %0d", sample, y, ref_y());
    end
    @(posedge clk);
    #1;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m <= N; m++) hist[m] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // Impulse: one cycle of zero output, then the coefficients.
    for (int n = 0; n <= N; n++) begin
      step(n == 0 ? 1 : 0);
      checks++;
      if (last_y != (n == 0 ? 0 : H[n-1])) failures++;
    end
    for (int n = 0; n < 2 * N; n++) step(1);
    checks++;
    if (last_y != 158) failures++;
    for (int n = N - 1; n >= 0; n--) step(H[n] > 0 ? 127 : (H[n] < 0 ? -128 : 0));
    step(0);
    checks++;
    if (last_y != 27716) begin failures++; $display("FAIL max %0d", last_y); end
    for (int n = N - 1; n >= 0; n--) step(H[n] > 0 ? -128 : (H[n] < 0 ? 127 : 0));
    step(0);
    checks++;
    if (last_y != -27874) begin failures++; $display("FAIL min %0d", last_y); end
    for (int n = 0; n < 3000; n++) step(int'($urandom % 256) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
