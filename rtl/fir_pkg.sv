// fir_pkg: widths, default coefficients and elaboration-time helpers shared
// by the FIR filter and its multiplier block.
//
// The coefficient values h0 = 10001100000b (1120) and h1 = 00100000010b (258)
// are the two values given for the filter; the filter is made symmetric
// (h3 = h0, h2 = h1) so that it has linear phase. The 16-bit input width and
// the four taps are this design's own choices.
//
// csd_digit() recodes a non-negative constant into canonical signed-digit
// form (digits -1, 0, +1, no two adjacent non-zero digits). The multiplier
// block uses it at elaboration time to decide where it places an adder
// (+1 digit), a subtractor (-1 digit) or nothing (0 digit).
package fir_pkg;

  localparam int unsigned FIR_X_W   = 16;   // input sample width, two's complement
  localparam int unsigned FIR_C_W   = 11;   // coefficient width, unsigned
  localparam int unsigned FIR_NTAPS = 4;    // number of taps

  typedef int unsigned coef_t;

  localparam coef_t DEFAULT_COEFS [FIR_NTAPS] = '{1120, 258, 258, 1120};

  // Output width that can hold sum_k h[k]*x for any input without overflow.
  function automatic int unsigned acc_width(int unsigned xw, int unsigned cw, int unsigned n);
    return xw + cw + $clog2(n);
  endfunction

  // CSD digit of constant c at bit position pos: -1, 0 or +1.
  function automatic int csd_digit(coef_t c, int unsigned pos);
    longint r;
    longint d;
    r = longint'(c);
    d = 0;
    for (int unsigned i = 0; i <= pos; i++) begin
      if (r % 2 != 0) d = (r % 4 == 1) ? 1 : -1;
      else            d = 0;
      r = (r - d) / 2;
    end
    return int'(d);
  endfunction

  // Position of the most significant non-zero CSD digit (always +1 for c > 0).
  function automatic int csd_msb(coef_t c, int unsigned ndig);
    int m;
    m = -1;
    for (int unsigned i = 0; i < ndig; i++)
      if (csd_digit(c, i) != 0) m = int'(i);
    return m;
  endfunction

  // Odd part of a constant (0 for 0) and the power of two it is shifted by:
  // c = odd_part(c) << pow2_shift(c).
  function automatic coef_t odd_part(coef_t c);
    coef_t r;
    r = c;
    if (r == 0) return 0;
    while (r % 2 == 0) r = r / 2;
    return r;
  endfunction

  function automatic int unsigned pow2_shift(coef_t c);
    coef_t r;
    int unsigned s;
    r = c;
    s = 0;
    if (r == 0) return 0;
    while (r % 2 == 0) begin
      r = r / 2;
      s++;
    end
    return s;
  endfunction

  // Number of non-zero CSD digits: one adder or subtractor per digit but the first.
  function automatic int unsigned csd_weight(coef_t c, int unsigned ndig);
    int unsigned w;
    w = 0;
    for (int unsigned i = 0; i < ndig; i++)
      if (csd_digit(c, i) != 0) w++;
    return w;
  endfunction

endpackage
