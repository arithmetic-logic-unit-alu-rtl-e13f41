// Calculator on a 7-segment display: ALU, controller and display path.
//
// The user sets an 8-bit unsigned operand on the switches and presses Enter
// (b_enter); the controller (alu_controller) steps through
//   show A (Reg A follows the switches) -> show B (Reg B follows the
//   switches) -> A+B -> A-B -> A+B -> ...
// and drives the ALU function code and the operand register control. The
// operand registers (alu_regs) feed the ALU (alu); its 8-bit result goes
// through the binary-to-BCD converter (bin2bcd) to the multiplexed display
// driver (seg7_driver), which shows three decimal digits and uses the
// leftmost digit for "-" (negative difference) or "F" (sum over 255). The
// sign and overflow flags go straight from the ALU to the driver.
//
// Timing: a press is acted on three clocks after b_enter rises; a new switch
// value reaches the operand register one clock later; the ALU and converter
// are combinational and the display driver adds one register stage. The
// block structure and port list follow the specification; clk is the
// 50 MHz board clock, rst (button BTN3) is a synchronous active-high reset.
module alu_top
  import alu_pkg::*;
#(
  parameter int unsigned REFRESH_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              b_enter,
  input  logic [W_DATA-1:0] input_sw,
  output logic [3:0]        anode,
  output logic [6:0]        seven_seg
);

  alu_fn_e           fn;
  reg_ctrl_e         reg_ctrl;
  logic [W_DATA-1:0] a, b, result;
  logic              sign, overflow;
  logic [9:0]        bcd;

  alu_controller u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .enter    (b_enter),
    .fn       (fn),
    .reg_ctrl (reg_ctrl)
  );

  alu_regs u_regs (
    .clk      (clk),
    .rst      (rst),
    .in_sw    (input_sw),
    .reg_ctrl (reg_ctrl),
    .a        (a),
    .b        (b)
  );

  alu u_alu (
    .a        (a),
    .b        (b),
    .fn       (fn),
    .result   (result),
    .sign     (sign),
    .overflow (overflow)
  );

  // The leftmost digit has room for one symbol: the ALU never raises both
  // flags (only additions overflow, only subtractions go negative).
  a_one_flag: assert property (@(posedge clk) disable iff (rst) !(sign && overflow))
    else $error("sign and overflow both set");

  bin2bcd u_bcd (
    .bin (result),
    .bcd (bcd)
  );

  seg7_driver #(
    .REFRESH_W (REFRESH_W)
  ) u_disp (
    .clk       (clk),
    .rst       (rst),
    .bcd       (bcd),
    .sign      (sign),
    .overflow  (overflow),
    .anode     (anode),
    .seven_seg (seven_seg)
  );

endmodule
