// 16-tap FIR filter with one coarse pipeline stage between taps 7 and 8.
//
// Same filter as fir_direct, y[k] = sum_{m=0}^{15} h[m] * x[k-m], with the
// adder chain cut once by a register. The cut runs straight across the
// structure after the seventh tap (coefficient h[6]) and places one extra
// register on each line it crosses:
//   * on the partial-sum line: taps 0..CUT-1 form their sum from the current
//     delay line and store it in cut_sum;
//   * on the sample line: the samples seen by taps CUT..15 pass one extra
//     register, so that they are one cycle older, matching cut_sum.
// Taps CUT..15 then finish the sum one cycle later. The output is therefore
// the direct form's output delayed by exactly one clock: y[k] here equals
// fir_direct's y[k-1]. In exchange the longest combinational path holds
// only about half the adders (taps 0..6 or taps 7..15), so the clock can
// run faster, at the cost of one cycle of latency and the extra registers
// (one sample word and one partial-sum word).
//
// The cut position (between taps 7 and 8, counting from 1) and the
// arithmetic follow the specification; word lengths are full precision as
// in fir_direct (cut_sum is sum_width(H, 0, CUT-1) bits, 14 for the default
// coefficients). The synchronous active-high reset is this design's own.
module fir_pipelined
  import fir_pkg::*;
#(
  parameter int        W_X = fir_pkg::W_X_LAB,
  parameter coef_arr_t H   = fir_pkg::H_LAB,
  parameter int        CUT = 7,   // taps 0..CUT-1 before the register
  parameter int        W_Y = fir_pkg::sum_width(H, 0, N_TAPS - 1, W_X)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [W_X-1:0] x,
  output logic signed [W_Y-1:0] y
);

  localparam int W_CUT = sum_width(H, 0, CUT - 1, W_X);

  // line[j] is x[k-j]; line[0] is the input itself. Tap m reads line[m]
  // before the cut and line[m+1] after it.
  logic signed [W_X-1:0]   line [N_TAPS+1];
  logic signed [W_CUT-1:0] cut_sum;

  assign line[0] = x;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 1; j <= N_TAPS; j++) line[j] <= '0;
      cut_sum <= '0;
    end else begin
      for (int j = 1; j <= N_TAPS; j++) line[j] <= line[j-1];
      cut_sum <= g_tap[CUT-1].psum;
    end
  end

  for (genvar m = 0; m < N_TAPS; m++) begin : g_tap
    localparam int SRC = (m < CUT) ? m : m + 1;
    localparam int W_P = prod_width(H[m], W_X);
    localparam int W_S = sum_width(H, 0, m, W_X);
    logic signed [W_P-1:0] prod;
    logic signed [W_S-1:0] psum;
    assign prod = W_P'(line[SRC] * H[m]);
    if (m == 0) begin : g_first
      assign psum = W_S'(prod);
    end else if (m == CUT) begin : g_after_cut
      assign psum = W_S'(cut_sum) + W_S'(prod);
    end else begin : g_next
      assign psum = W_S'(g_tap[m-1].psum) + W_S'(prod);
    end
  end

  assign y = W_Y'(g_tap[N_TAPS-1].psum);

endmodule
