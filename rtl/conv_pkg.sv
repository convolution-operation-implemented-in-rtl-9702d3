// conv_pkg: constants and elaboration-time helpers shared by the convolver blocks.
//
// Coefficients are passed to every convolver as one packed vector, coefficient k
// in bits [k*H_W +: H_W] (two's complement). The functions here run only during
// elaboration: they recode a coefficient into canonic signed digits (CSD) and size
// the result word. Nothing here produces logic by itself.
package conv_pkg;

  // Default configuration: 8 taps, 8-bit unsigned pixels, 8-bit signed coefficients.
  localparam int unsigned DEF_N   = 8;
  localparam int unsigned DEF_X_W = 8;
  localparam int unsigned DEF_H_W = 8;
  // Default coefficients h(0) .. h(7) = 3, -14, 25, 100, 90, 21, -9, 1 (h(0) in the low byte).
  localparam logic [DEF_N*DEF_H_W-1:0] DEF_COEFFS =
      {8'sd1, -8'sd9, 8'sd21, 8'sd90, 8'sd100, 8'sd25, -8'sd14, 8'sd3};

  // Width of a result that holds any sum of n products of an unsigned x_w-bit
  // sample and a signed h_w-bit coefficient.
  function automatic int unsigned result_width(int unsigned x_w, int unsigned h_w, int unsigned n);
    return x_w + h_w + ((n > 1) ? $clog2(n) : 0);
  endfunction

  // CSD digit of value v at bit position p: +1, -1 or 0. Standard non-adjacent-form
  // recoding from the least significant bit: an odd remainder r gives digit
  // 2 - (r mod 4), which is subtracted before the next halving.
  function automatic int csd_digit(int v, int p);
    int r;
    int d;
    r = v;
    d = 0;
    for (int i = 0; i <= p; i++) begin
      if ((r & 1) != 0) d = ((r & 3) == 1) ? 1 : -1;
      else              d = 0;
      r = (r - d) >>> 1;
    end
    return d;
  endfunction

  // Number of zero bits below the lowest set bit of v (0 for v = 0).
  function automatic int unsigned trailing_zeros(longint v);
    int unsigned n;
    n = 0;
    if (v != 0)
      while (((v >>> n) & 1) == 0) n++;
    return n;
  endfunction

endpackage
