// Constants, types and word-length rules of the 16-tap FIR filter.
//
// The filter has N_TAPS = 16 taps with W_H = 7-bit signed coefficients and
// takes W_X_LAB = 8-bit signed samples; H_LAB is its coefficient set, a
// symmetric (linear-phase) low-pass response whose taps add up to 158.
// These numbers are the specification's.
//
// sum_width() gives the word length that keeps a running sum of taps
// first..last exact: the largest magnitude the sum can reach is
// 2^(w_x-1) * sum(|h[i]|) (all samples at -2^(w_x-1) with the signs that
// make every product add up), and the sum needs enough bits for that plus a
// sign bit. For H_LAB this gives 9 bits after the first tap and 16 bits at
// the output (128 * 218 = 27904 < 2^15). prod_width() is the same rule for a
// single product.
package fir_pkg;

  localparam int N_TAPS = 16;
  localparam int W_H    = 7;
  localparam int W_X_LAB = 8;

  typedef logic signed [W_H-1:0] coef_t;
  typedef coef_t coef_arr_t [N_TAPS];

  localparam coef_arr_t H_LAB = '{
    -7'sd1,  7'sd0,  7'sd1, -7'sd3, -7'sd9, -7'sd2,  7'sd30, 7'sd63,
     7'sd63, 7'sd30, -7'sd2, -7'sd9, -7'sd3,  7'sd1,  7'sd0, -7'sd1
  };

  function automatic int bits_for(longint bound);
    // Signed word length that holds every value in [-bound, bound].
    int n = 1;
    while ((longint'(1) << (n - 1)) <= bound) n++;
    return n;
  endfunction

  function automatic int sum_width(coef_arr_t h, int first, int last, int w_x);
    longint acc = 0;
    for (int i = first; i <= last; i++) acc += (h[i] < 0) ? -longint'(h[i]) : longint'(h[i]);
    return bits_for(acc << (w_x - 1));
  endfunction

  function automatic int prod_width(coef_t c, int w_x);
    longint m = (c < 0) ? -longint'(c) : longint'(c);
    return bits_for(m << (w_x - 1));
  endfunction

endpackage
