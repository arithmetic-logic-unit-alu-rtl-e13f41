// 8-bit ALU of the calculator.
//
// Combinational. Operands a and b are unsigned (0..255). fn selects the
// result (pass A, pass B, A+B, A-B). The result is always eight bits; two
// flags qualify it:
//   * overflow: an addition whose true sum exceeds 255. The result then holds
//     the low eight bits of the sum (for example 148+249 gives 141).
//   * sign: a subtraction with b > a. The result then holds the magnitude
//     b-a (for example 35-99 gives 64 with sign set), so that the display
//     can print "-" followed by the decimal magnitude.
// A subtraction of two unsigned 8-bit values always has a magnitude that
// fits in eight bits, so it never overflows; pass A and pass B set neither
// flag. The sign-and-magnitude form of a subtraction and the carry-out form
// of the overflow follow the reference waveforms of the specification;
// the function codes follow its function table.
module alu
  import alu_pkg::*;
(
  input  logic [W_DATA-1:0] a,
  input  logic [W_DATA-1:0] b,
  input  alu_fn_e           fn,
  output logic [W_DATA-1:0] result,
  output logic              sign,
  output logic              overflow
);

  logic [W_DATA:0] sum;   // one extra bit for the carry out

  always_comb begin
    sum      = '0;
    result   = '0;
    sign     = 1'b0;
    overflow = 1'b0;
    unique case (fn)
      FN_PASS_A: result = a;
      FN_PASS_B: result = b;
      FN_ADD: begin
        sum      = {1'b0, a} + {1'b0, b};
        result   = sum[W_DATA-1:0];
        overflow = sum[W_DATA];
      end
      FN_SUB: begin
        if (b > a) begin
          result = b - a;
          sign   = 1'b1;
        end else begin
          result = a - b;
        end
      end
    endcase
  end

endmodule
