// Binary to BCD converter, 8 bits to three decimal digits.
//
// Combinational "shift and add 3" (double dabble): the binary value is
// shifted into a BCD register one bit at a time, most significant first,
// and before each shift every BCD digit of 5 or more has 3 added, so that
// the shift carries it correctly into the next decimal place. Eight bits
// give at most 255, so the output is 10 bits wide:
//   bcd[9:8] hundreds (0..2), bcd[7:4] tens, bcd[3:0] ones.
// Example: 249 (1111_1001) gives 10_0100_1001. The 10-bit width is the one
// of the specification; the algorithm is this design's choice.
module bin2bcd (
  input  logic [7:0] bin,
  output logic [9:0] bcd
);

  logic [11:0] acc;   // three full digits while converting

  always_comb begin
    acc = '0;
    for (int i = 7; i >= 0; i--) begin
      for (int d = 0; d < 3; d++) begin
        if (acc[4*d +: 4] >= 4'd5) acc[4*d +: 4] = acc[4*d +: 4] + 4'd3;
      end
      acc = {acc[10:0], bin[i]};
    end
    bcd = acc[9:0];
  end

endmodule
