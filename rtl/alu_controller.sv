// Controller of the calculator: a Moore state machine stepped by the Enter
// push button.
//
// After reset the machine is in ST_A: the ALU passes A and Reg A follows the
// switches, so the display shows the switch value. Each press of Enter
// advances the state:
//   ST_A   (fn = pass A, Reg A loads)  -> ST_B
//   ST_B   (fn = pass B, Reg B loads)  -> ST_ADD
//   ST_ADD (fn = A+B,    both hold)    -> ST_SUB
//   ST_SUB (fn = A-B,    both hold)    -> ST_ADD
// so after the two operands are in, repeated presses toggle between A+B and
// A-B. That sequence is the one the specification gives; the state
// names and the Moore form are this design's choice.
//
// The button level is passed through a two-flip-flop synchronizer and a
// press is its rising edge, so a press advances the state exactly once
// however long the button is held. A press is acted on three clock edges
// after the button input rises. There is no debouncer: a bouncing button
// produces several presses. Reset is synchronous and active high.
module alu_controller
  import alu_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      enter,
  output alu_fn_e   fn,
  output reg_ctrl_e reg_ctrl
);

  typedef enum logic [1:0] {ST_A, ST_B, ST_ADD, ST_SUB} state_e;

  state_e state, state_next;
  logic   enter_meta, enter_sync, enter_prev;
  logic   press;

  always_ff @(posedge clk) begin
    if (rst) begin
      enter_meta <= 1'b0;
      enter_sync <= 1'b0;
      enter_prev <= 1'b0;
      state      <= ST_A;
    end else begin
      enter_meta <= enter;
      enter_sync <= enter_meta;
      enter_prev <= enter_sync;
      state      <= state_next;
    end
  end

  assign press = enter_sync & ~enter_prev;

  always_comb begin
    state_next = state;
    if (press) begin
      unique case (state)
        ST_A:   state_next = ST_B;
        ST_B:   state_next = ST_ADD;
        ST_ADD: state_next = ST_SUB;
        ST_SUB: state_next = ST_ADD;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      ST_A:   begin fn = FN_PASS_A; reg_ctrl = RC_LOAD_A; end
      ST_B:   begin fn = FN_PASS_B; reg_ctrl = RC_LOAD_B; end
      ST_ADD: begin fn = FN_ADD;    reg_ctrl = RC_HOLD;   end
      ST_SUB: begin fn = FN_SUB;    reg_ctrl = RC_HOLD;   end
    endcase
  end

endmodule
