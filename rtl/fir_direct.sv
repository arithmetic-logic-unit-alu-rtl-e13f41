// 16-tap FIR filter in direct form: y[k] = sum_{m=0}^{15} h[m] * x[k-m].
//
// A shift register of N_TAPS-1 sample registers holds x[k-1] .. x[k-15];
// tap m multiplies its sample by the constant h[m], and a chain of adders
// running from tap 0 to tap 15 accumulates the products. The current sample
// x[k] feeds tap 0 directly, so y is a combinational function of x and the
// delay line: y[k] appears in the same cycle as x[k], and the shift register
// advances on every rising clock edge. The whole adder chain lies on one
// combinational path, which is what limits the clock rate of this form.
//
// Word lengths are full precision and grow along the chain: the running sum
// after tap m is sum_width(H, 0, m) bits wide (9 bits after tap 0, 16 at the
// output for the default coefficients), each product prod_width() bits, so
// no bit is ever dropped. Samples and coefficients are two's complement.
// The structure, tap count, word lengths of input and coefficients and the
// coefficients follow the specification; the synchronous active-high
// reset of the delay line is this design's addition.
module fir_direct
  import fir_pkg::*;
#(
  parameter int        W_X = fir_pkg::W_X_LAB,
  parameter coef_arr_t H   = fir_pkg::H_LAB,
  parameter int        W_Y = fir_pkg::sum_width(H, 0, N_TAPS - 1, W_X)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [W_X-1:0] x,
  output logic signed [W_Y-1:0] y
);

  // taps[m] is x[k-m]; taps[0] is the input itself.
  logic signed [W_X-1:0] taps [N_TAPS];

  assign taps[0] = x;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int m = 1; m < N_TAPS; m++) taps[m] <= '0;
    end else begin
      for (int m = 1; m < N_TAPS; m++) taps[m] <= taps[m-1];
    end
  end

  for (genvar m = 0; m < N_TAPS; m++) begin : g_tap
    localparam int W_P = prod_width(H[m], W_X);
    localparam int W_S = sum_width(H, 0, m, W_X);
    logic signed [W_P-1:0] prod;
    logic signed [W_S-1:0] psum;
    // The product is formed W_P bits wide; the bits it leaves out would
    // only repeat the sign bit.
    assign prod = W_P'(taps[m] * H[m]);
    if (m == 0) begin : g_first
      assign psum = W_S'(prod);
    end else begin : g_next
      assign psum = W_S'(g_tap[m-1].psum) + W_S'(prod);
    end
  end

  assign y = W_Y'(g_tap[N_TAPS-1].psum);

endmodule
