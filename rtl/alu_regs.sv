// Operand register block of the calculator (Reg A and Reg B).
//
// The registers are split, as in a two-process design, into the
// combinational next-value logic (alu_reg_next) and the clocked registers
// here. Every rising clock edge each register takes its next value, so the
// register selected by reg_ctrl follows the switches with one cycle of
// delay and the other holds. Reset is synchronous and active high and
// clears both registers (the reset value is this design's choice).
module alu_regs
  import alu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [W_DATA-1:0] in_sw,
  input  reg_ctrl_e         reg_ctrl,
  output logic [W_DATA-1:0] a,
  output logic [W_DATA-1:0] b
);

  logic [W_DATA-1:0] next_a, next_b;

  alu_reg_next u_next (
    .reg_a      (a),
    .reg_b      (b),
    .in_sw      (in_sw),
    .reg_ctrl   (reg_ctrl),
    .next_reg_a (next_a),
    .next_reg_b (next_b)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0;
      b <= '0;
    end else begin
      a <= next_a;
      b <= next_b;
    end
  end

endmodule
