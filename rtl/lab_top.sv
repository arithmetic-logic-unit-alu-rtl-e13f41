// Top level: the calculator and the two FIR filter structures.
//
// The design has two independent parts that share only clock and reset:
//   * alu_top: an 8-bit add/subtract calculator that takes its operands from
//     eight switches, is stepped by an Enter button and shows its result on
//     four multiplexed 7-segment digits;
//   * two 16-tap FIR filters, each inside a wrapper with registered input
//     and output (fir_top): the direct form and the form with one pipeline
//     stage. Both are fed from the same sample input fir_x so their outputs
//     can be compared; fir_y_pipe lags fir_y_direct by one clock.
// Each part's ports are brought out unchanged. Reset is synchronous and
// active high for every part.
module lab_top
  import alu_pkg::*;
  import fir_pkg::*;
#(
  parameter int unsigned REFRESH_W = 16,
  parameter int          W_Y       = fir_pkg::sum_width(fir_pkg::H_LAB, 0, fir_pkg::N_TAPS - 1,
                                                        fir_pkg::W_X_LAB)
) (
  input  logic                      clk,
  input  logic                      rst,
  // calculator
  input  logic                      b_enter,
  input  logic [W_DATA-1:0]         input_sw,
  output logic [3:0]                anode,
  output logic [6:0]                seven_seg,
  // filters
  input  logic signed [W_X_LAB-1:0] fir_x,
  output logic signed [W_Y-1:0]     fir_y_direct,
  output logic signed [W_Y-1:0]     fir_y_pipe
);

  alu_top #(
    .REFRESH_W (REFRESH_W)
  ) u_alu_top (
    .clk       (clk),
    .rst       (rst),
    .b_enter   (b_enter),
    .input_sw  (input_sw),
    .anode     (anode),
    .seven_seg (seven_seg)
  );

  fir_top #(.PIPELINED(1'b0), .W_Y(W_Y)) u_fir_direct (
    .clk (clk), .rst (rst), .x_in (fir_x), .y_out (fir_y_direct)
  );

  fir_top #(.PIPELINED(1'b1), .W_Y(W_Y)) u_fir_pipe (
    .clk (clk), .rst (rst), .x_in (fir_x), .y_out (fir_y_pipe)
  );

endmodule
