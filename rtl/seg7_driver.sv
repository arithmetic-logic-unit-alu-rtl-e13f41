// Time-multiplexed driver for four common-anode 7-segment digits.
//
// The board's four digits share their seven cathode lines, so only one
// digit is lit at a time. A free-running REFRESH_W-bit counter selects the
// digit with its two top bits; each digit is lit for 2^(REFRESH_W-2) clock
// cycles and the four are scanned from the leftmost (AN3) to the rightmost
// (AN0). With the 50 MHz board clock and REFRESH_W = 16 each digit is lit
// for 16384 cycles (about 0.33 ms), so the display is refreshed at about
// 763 Hz, well above what the eye can follow. The counter width is this
// design's choice.
//
// Digit contents:
//   AN3 (leftmost): "F" when overflow is set, "-" when sign is set (overflow
//                   wins if both are), otherwise dark
//   AN2, AN1, AN0:  hundreds, tens and ones of bcd, leading zeros included
//
// Both anode and seven_seg are active low, as the board's displays are
// common anode: a digit is selected by a 0 on its anode and a segment lit by
// a 0 on its cathode. seven_seg is ordered {g,f,e,d,c,b,a} (bit 0 is segment
// a); this order is an assumption about the board wiring. The outputs are
// registered, one clock behind the counter and the inputs. Reset is
// synchronous and active high.
module seg7_driver #(
  parameter int unsigned REFRESH_W = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] bcd,
  input  logic       sign,
  input  logic       overflow,
  output logic [3:0] anode,
  output logic [6:0] seven_seg
);

  // Active-high segment patterns, bit order {g,f,e,d,c,b,a}.
  function automatic logic [6:0] digit_pattern(input logic [3:0] d);
    case (d)
      4'd0:    return 7'b011_1111;
      4'd1:    return 7'b000_0110;
      4'd2:    return 7'b101_1011;
      4'd3:    return 7'b100_1111;
      4'd4:    return 7'b110_0110;
      4'd5:    return 7'b110_1101;
      4'd6:    return 7'b111_1101;
      4'd7:    return 7'b000_0111;
      4'd8:    return 7'b111_1111;
      4'd9:    return 7'b110_1111;
      default: return 7'b000_0000;
    endcase
  endfunction

  localparam logic [6:0] PAT_MINUS = 7'b100_0000;  // segment g
  localparam logic [6:0] PAT_F     = 7'b111_0001;  // segments a, e, f, g

  logic [REFRESH_W-1:0] refresh_cnt;
  logic [1:0]           sel;
  logic [6:0]           pattern;

  assign sel = refresh_cnt[REFRESH_W-1 -: 2];

  always_comb begin
    unique case (sel)
      2'd0:    pattern = overflow ? PAT_F : (sign ? PAT_MINUS : 7'b000_0000);
      2'd1:    pattern = digit_pattern({2'b00, bcd[9:8]});
      2'd2:    pattern = digit_pattern(bcd[7:4]);
      default: pattern = digit_pattern(bcd[3:0]);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      refresh_cnt <= '0;
      anode       <= 4'b1111;
      seven_seg   <= 7'b111_1111;
    end else begin
      refresh_cnt <= refresh_cnt + 1'b1;
      anode       <= ~(4'b1000 >> sel);   // sel 0 -> AN3 ... sel 3 -> AN0
      seven_seg   <= ~pattern;
    end
  end

  // At most one digit is ever enabled, since the digits share the cathodes.
  a_one_digit: assert property (@(posedge clk) disable iff (rst) $onehot0(~anode))
    else $error("more than one digit enabled: anode=%b", anode);

endmodule
