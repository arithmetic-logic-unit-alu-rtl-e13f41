// End-to-end testbench of lab_top with every parameter at its default.
//
// Calculator: user sessions (set A, Enter, set B, Enter, then Enter to
// toggle between A+B and A-B) with the display read back as characters over
// full refresh frames of the real 16-bit refresh counter.
// Filters: an impulse, a step, full-scale inputs and random samples go
// through both registered filters at the same time, checked against an
// integer convolution; the pipelined output must trail the direct one by
// exactly one clock.
// Each mechanism of the design is counted and must occur at least once:
// loading A, loading B, addition, subtraction, toggling back to addition,
// the overflow "F", the minus sign, reset back to the first state, scanning
// of all four digits, the filter impulse and step responses, a full-scale
// output and the pipeline's extra cycle of latency.
module tb_lab_top;
  import tb_seg_pkg::*;
  localparam int FRAME = 4 * (1 << 14);  // four digits of 2^(16-2) clocks each
  localparam int N = 16;
  localparam int H [N] = '{-1, 0, 1, -3, -9, -2, 30, 63, 63, 30, -2, -9, -3, 1, 0, -1};

  logic               clk = 0, rst = 1, b_enter = 0;
  logic [7:0]         input_sw = 0;
  logic [3:0]         anode;
  logic [6:0]         seven_seg;
  logic signed [7:0]  fir_x = 0;
  logic signed [15:0] fir_y_direct, fir_y_pipe;
  int checks = 0, failures = 0;

  typedef enum int {M_LOAD_A, M_LOAD_B, M_ADD, M_SUB, M_TOGGLE, M_OVF, M_MINUS, M_RESET,
                    M_SCAN, M_IMPULSE, M_STEP, M_FULLSCALE, M_PIPE_LAT, M_COUNT} mech_e;
  int seen [M_COUNT];
  string names [M_COUNT] = '{"load A", "load B", "A+B", "A-B", "toggle", "overflow F", "minus",
                             "reset", "scan 4 digits", "impulse", "step", "full scale",
                             "pipeline latency"};

  lab_top dut (.clk, .rst, .b_enter, .input_sw, .anode, .seven_seg,
               .fir_x, .fir_y_direct, .fir_y_pipe);

  always #10 clk = ~clk;   // 50 MHz

  // ---------------------------------------------------------------- calculator
  task automatic read_display(output string s);
    byte c [4] = '{"?", "?", "?", "?"};
    logic [3:0] lit = '0;
    repeat (FRAME + 8) @(posedge clk);
    for (int i = 0; i < FRAME; i++) begin
      @(posedge clk);
      #1;
      for (int d = 0; d < 4; d++) if (!anode[d]) begin c[d] = char_of(seven_seg); lit[d] = 1; end
    end
    if (lit == 4'hf) seen[M_SCAN]++;
    s = $sformatf("%c%c%c%c", c[3], c[2], c[1], c[0]);
  endtask

  function automatic string expected(input int value, input bit neg, input bit ovf);
    return $sformatf("%s%03d", ovf ? "F" : (neg ? "-" : " "), value);
  endfunction

  task automatic expect_display(input string exp, input string what, input mech_e m);
    string s;
    read_display(s);
    checks++;
    if (s != exp) begin
      failures++;
      $display("FAIL %s: display \"%s\", expected \"%s\"", what, s, exp);
    end else begin
      seen[m]++;
      if (exp[0] == "F") seen[M_OVF]++;
      if (exp[0] == "-") seen[M_MINUS]++;
    end
  endtask

  task automatic press();
    b_enter = 1;
    repeat (100) @(posedge clk);
    b_enter = 0;
    repeat (100) @(posedge clk);
  endtask

  task automatic session(input int a, input int b, input bit mid_reset);
    input_sw = 8'(a);
    expect_display(expected(a, 0, 0), "A", M_LOAD_A);
    press();
    input_sw = 8'(b);
    expect_display(expected(b, 0, 0), "B", M_LOAD_B);
    press();
    input_sw = 8'($urandom);
    expect_display(expected((a + b) % 256, 0, a + b > 255), "A+B", M_ADD);
    press();
    expect_display(expected(a >= b ? a - b : b - a, b > a, 0), "A-B", M_SUB);
    press();
    expect_display(expected((a + b) % 256, 0, a + b > 255), "A+B again", M_TOGGLE);
    if (mid_reset) begin
      #1 rst = 1;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      input_sw = 8'(b);
      expect_display(expected(b, 0, 0), "after reset", M_RESET);
    end
  endtask

  // ------------------------------------------------------------------- filters
  int hist [N+3];
  bit fir_done = 0;

  function automatic int conv(input int lag);
    int s = 0;
    for (int m = 0; m < N; m++) s += H[m] * hist[m + lag];
    return s;
  endfunction

  task automatic fir_sample(input int s);
    fir_x = 8'(s);
    @(posedge clk);
    for (int j = N + 2; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = s;
    #1;
    checks += 2;
    if (int'(fir_y_direct) != conv(1) || int'(fir_y_pipe) != conv(2)) begin
      failures++;
      if (failures < 10) $display("FAIL filter: direct %0d (exp %0d) pipelined %0d (exp %0d)",
                                  fir_y_direct, conv(1), fir_y_pipe, conv(2));
    end
  endtask

  initial begin : filters
    automatic int first_d = -1, first_p = -1, peak = 0;
    for (int j = 0; j < N + 3; j++) hist[j] = 0;
    wait (!rst);
    @(posedge clk);
    #1;
    // Impulse: the coefficients appear at the direct output, one clock
    // later at the pipelined output.
    for (int n = 0; n < N + 4; n++) begin
      fir_sample(n == 0 ? 1 : 0);
      if (first_d < 0 && fir_y_direct != 0) first_d = n;
      if (first_p < 0 && fir_y_pipe != 0) first_p = n;
    end
    checks++;
    if (first_d == 1 && first_p == 2) begin seen[M_IMPULSE]++; seen[M_PIPE_LAT]++; end
    else begin failures++; $display("FAIL impulse latency %0d %0d", first_d, first_p); end
    // Step response settles at the coefficient sum.
    for (int n = 0; n < 2 * N; n++) fir_sample(1);
    checks++;
    if (fir_y_direct == 158 && fir_y_pipe == 158) seen[M_STEP]++;
    else begin failures++; $display("FAIL step %0d %0d", fir_y_direct, fir_y_pipe); end
    // Full-scale input pattern, then random samples.
    for (int n = N - 1; n >= 0; n--) fir_sample(H[n] > 0 ? 127 : (H[n] < 0 ? -128 : 0));
    repeat (2) begin
      fir_sample(0);
      if (int'(fir_y_direct) > peak) peak = int'(fir_y_direct);
    end
    checks++;
    if (peak == 27716) seen[M_FULLSCALE]++;
    else begin failures++; $display("FAIL full scale %0d", peak); end
    for (int n = 0; n < 5000; n++) fir_sample(int'($urandom % 256) - 128);
    fir_done = 1;
  end

  // ---------------------------------------------------------------- sequencing
  initial begin : watchdog
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    session(200, 100, 1);     // overflow on A+B, reset at the end
    session(35, 99, 0);       // negative A-B
    wait (fir_done);
    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      $display("mechanism %-16s seen %0d times", names[m], seen[m]);
      if (seen[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
