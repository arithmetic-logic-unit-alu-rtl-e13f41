// Next-value logic of the operand registers.
//
// Combinational. From the current register contents (reg_a, reg_b), the
// switch value (in_sw) and the controller's register control it computes
// what Reg A and Reg B hold after the next clock edge: the register being
// loaded takes the switches, the other keeps its value, and with RC_HOLD
// both keep theirs. Only one register ever follows the switches at a time.
// The port list is the one the specification asks for (RegA, RegB, In,
// RegCtrl in; next_RegA, next_RegB out); the encoding of the control is this
// design's own (see alu_pkg).
module alu_reg_next
  import alu_pkg::*;
(
  input  logic [W_DATA-1:0] reg_a,
  input  logic [W_DATA-1:0] reg_b,
  input  logic [W_DATA-1:0] in_sw,
  input  reg_ctrl_e         reg_ctrl,
  output logic [W_DATA-1:0] next_reg_a,
  output logic [W_DATA-1:0] next_reg_b
);

  always_comb begin
    next_reg_a = reg_a;
    next_reg_b = reg_b;
    case (reg_ctrl)
      RC_LOAD_A: next_reg_a = in_sw;
      RC_LOAD_B: next_reg_b = in_sw;
      default:   ;  // RC_HOLD and the unused code keep both registers
    endcase
  end

endmodule
