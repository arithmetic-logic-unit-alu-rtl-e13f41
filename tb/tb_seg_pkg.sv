// Testbench helper: reads the character shown by an active-low 7-segment
// pattern ordered {g,f,e,d,c,b,a}. The reference shapes are written as the
// lists of lit segment letters, independently of the driver's tables.
package tb_seg_pkg;

  function automatic logic [6:0] lit_from_letters(input string s);
    logic [6:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[3'(s[i] - "a")] = 1'b1;
    return v;
  endfunction

  // Returns "0".."9", "-", "F", " " (dark) or "?" (anything else).
  function automatic byte char_of(input logic [6:0] seg_n);
    string shapes [12] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                           "acdefg", "abc", "abcdefg", "abcdfg", "g", "aefg"};
    byte   chars  [12] = '{"0", "1", "2", "3", "4", "5", "6", "7", "8", "9", "-", "F"};
    logic [6:0] lit = ~seg_n;
    if (lit == 7'b0) return " ";
    for (int i = 0; i < 12; i++) if (lit == lit_from_letters(shapes[i])) return chars[i];
    return "?";
  endfunction

endpackage
