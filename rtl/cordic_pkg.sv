// cordic_pkg: constants shared by the CORDIC modules.
//
// The processor works on signed two's-complement words of WIDTH bits with
// FRAC_BITS(WIDTH) = WIDTH-2 fraction bits, so 1.0 is 2^(WIDTH-2) and the
// representable range is [-2, 2). Angles use the same format in radians.
// This format reproduces the published 16- and 32-bit example values
// (30 degrees = 8579 at 16 bits); the published design does not state it in words.
//
// cordic_mode_e selects, per build, what steers each stage: the sign of
// the residual angle z (rotation mode) or the sign of y (vectoring mode).
//
// atan_pow2() evaluates atan(2^-i) at elaboration time with a power
// series, and atan_fixed() rounds it to the angle format. They feed the
// arctangent ROM, so no table file is needed. Double precision keeps the
// rounding exact for word widths up to about 50 bits.
package cordic_pkg;

  typedef enum logic {
    CORDIC_ROTATION  = 1'b0,  // drive z to 0: rotate (x, y) by z
    CORDIC_VECTORING = 1'b1   // drive y to 0: magnitude in x, angle in z
  } cordic_mode_e;

  // Number of fraction bits for a given word width.
  function automatic int unsigned frac_bits(int unsigned width);
    return width - 2;
  endfunction

  // atan(2^-i) in radians. atan(1) is pi/4; for i >= 1 the series
  // t - t^3/3 + t^5/5 - ... converges at least by a factor 4 per term.
  function automatic real atan_pow2(int unsigned i);
    real t, t2, term, sum;
    if (i == 0) return 0.78539816339744830962;
    t = 1.0;
    for (int unsigned k = 0; k < i; k++) t = t / 2.0;
    t2   = t * t;
    term = t;
    sum  = 0.0;
    for (int k = 0; k < 40; k++) begin
      if (k % 2 == 0) sum = sum + term / real'(2 * k + 1);
      else            sum = sum - term / real'(2 * k + 1);
      term = term * t2;
    end
    return sum;
  endfunction

  // atan(2^-i) * 2^fbits rounded to the nearest integer (a real-to-integer
  // cast rounds).
  function automatic longint atan_fixed(int unsigned i, int unsigned fbits);
    real scale;
    scale = 1.0;
    for (int unsigned k = 0; k < fbits; k++) scale = scale * 2.0;
    return longint'(atan_pow2(i) * scale);
  endfunction

endpackage
