// Self-checking testbench of fir_direct: impulse response (must equal the
// coefficients), unit-step response (must settle at their sum, 158), the two
// inputs that drive the output to its largest and smallest values (full
// precision, no wrap-around), and random samples, all compared every cycle
// with a convolution computed here in integers.
module tb_fir_direct;
  localparam int N = 16;
  localparam int H [N] = '{-1, 0, 1, -3, -9, -2, 30, 63, 63, 30, -2, -9, -3, 1, 0, -1};

  logic              clk = 0, rst = 1;
  logic signed [7:0] x = 0;
  logic signed [15:0] y;
  int checks = 0, failures = 0;
  int last_y;          // output seen with the latest sample applied
  int hist [N];       // hist[m] = x[k-m]
  int y_min = 0, y_max = 0;

  fir_direct dut (.clk, .rst, .x, .y);

  always #5 clk = ~clk;

  function automatic int ref_y();
    int s = 0;
    for (int m = 0; m < N; m++) s += H[m] * hist[m];
    return s;
  endfunction

  // Apply one sample, check the combinational output, then clock it in.
  task automatic step(input int sample);
    x = 8'(sample);
    for (int m = N - 1; m > 0; m--) hist[m] = hist[m-1];
    hist[0] = sample;
    #1;
    last_y = int'(y);
    checks++;
    if (int'(y) != ref_y()) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d expected %0d", sample, y, ref_y());
    end
    if (int'(y) > y_max) y_max = int'(y);
    if (int'(y) < y_min) y_min = int'(y);
    @(posedge clk);
    #1;
  endtask

  task automatic flush();
    for (int m = 0; m < N; m++) step(0);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < N; m++) hist[m] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // Impulse response: y[n] = h[n].
    for (int n = 0; n < N; n++) begin
      step(n == 0 ? 1 : 0);
      checks++;
      if (last_y != H[n]) failures++;
    end
    flush();
    // Step response settles at 158.
    for (int n = 0; n < 2 * N; n++) step(1);
    checks++;
    if (last_y != 158) begin failures++; $display("FAIL step final %0d", last_y); end
    flush();
    // Largest output: 127 where h > 0, -128 where h < 0 (oldest sample first).
    for (int n = N - 1; n >= 0; n--) step(H[n] > 0 ? 127 : (H[n] < 0 ? -128 : 0));
    checks++;
    if (last_y != 27716) begin failures++; $display("FAIL max %0d", last_y); end
    // Smallest output.
    for (int n = N - 1; n >= 0; n--) step(H[n] > 0 ? -128 : (H[n] < 0 ? 127 : 0));
    checks++;
    if (last_y != -27874) begin failures++; $display("FAIL min %0d", last_y); end
    // Random samples.
    for (int n = 0; n < 3000; n++) step(int'($urandom % 256) - 128);
    // Reset clears the delay line.
    rst = 1;
    @(posedge clk);
    #1 rst = 0;
    for (int m = 0; m < N; m++) hist[m] = 0;
    step(0);
    $display("output range seen: %0d .. %0d", y_min, y_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
