// FIR filter with registered input and output, for timing comparison.
//
// A register on the input sample and one on the filter output enclose the
// filter, so that the filter's own combinational paths lie between two
// clocked registers and its maximum clock frequency can be measured.
// PIPELINED selects the structure: 0 for the direct form (fir_direct),
// 1 for the form with one pipeline stage between taps 7 and 8
// (fir_pipelined). The wrapper with one flip-flop stage on each side follows
// the specification; selecting the structure by a parameter is this
// design's choice.
//
// Latency from x_in to y_out: 2 clocks for the direct form, 3 for the
// pipelined one. A new sample is accepted on every clock. Reset is
// synchronous and active high.
module fir_top
  import fir_pkg::*;
#(
  parameter bit        PIPELINED = 1'b0,
  parameter int        W_X       = fir_pkg::W_X_LAB,
  parameter coef_arr_t H         = fir_pkg::H_LAB,
  parameter int        W_Y       = fir_pkg::sum_width(H, 0, N_TAPS - 1, W_X)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [W_X-1:0] x_in,
  output logic signed [W_Y-1:0] y_out
);

  logic signed [W_X-1:0] x_q;
  logic signed [W_Y-1:0] y_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q   <= '0;
      y_out <= '0;
    end else begin
      x_q   <= x_in;
      y_out <= y_d;
    end
  end

  if (PIPELINED) begin : g_pipe
    fir_pipelined #(.W_X(W_X), .H(H), .W_Y(W_Y)) u_fir (
      .clk (clk), .rst (rst), .x (x_q), .y (y_d)
    );
  end else begin : g_direct
    fir_direct #(.W_X(W_X), .H(H), .W_Y(W_Y)) u_fir (
      .clk (clk), .rst (rst), .x (x_q), .y (y_d)
    );
  end

endmodule
