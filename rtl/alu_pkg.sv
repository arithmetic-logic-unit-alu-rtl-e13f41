// Shared types of the ALU system.
//
// alu_fn_e is the two-bit function code the controller sends to the ALU;
// its encoding is the one of the function table of the ALU (00 pass A,
// 01 pass B, 10 A+B, 11 A-B). reg_ctrl_e tells the operand register block
// which register follows the switches; its encoding is this design's own
// choice. W_DATA is the operand width, 8 bits, as set by the eight switches.
package alu_pkg;

  localparam int W_DATA = 8;

  typedef enum logic [1:0] {
    FN_PASS_A = 2'b00,
    FN_PASS_B = 2'b01,
    FN_ADD    = 2'b10,
    FN_SUB    = 2'b11
  } alu_fn_e;

  typedef enum logic [1:0] {
    RC_LOAD_A = 2'b00,  // Reg A follows the switches, Reg B holds
    RC_LOAD_B = 2'b01,  // Reg B follows the switches, Reg A holds
    RC_HOLD   = 2'b10   // both registers hold
  } reg_ctrl_e;

endpackage
