// Shared types, formats and fixed-point helpers of the single-phase shunt
// active filter controller.
//
// Every signal sample (voltage, current, power) is a 32-bit two's-complement
// word in Q16.16: 16 integer bits including sign, 16 fraction bits, so the
// range is +/-32768 with a resolution of about 15e-6. Filter and controller
// coefficients are 32-bit words in Q2.30. The word formats are this design's
// own choice; the printed values of the hardware waveforms of the reference
// implementation resolve to 2^-10, which Q16.16 covers.
//
// Products are rounded to nearest and saturated to the 32-bit range.
package sapf_pkg;

  localparam int W     = 32;  // sample word width
  localparam int FRAC  = 16;  // fraction bits of a sample
  localparam int CFRAC = 30;  // fraction bits of a coefficient

  typedef logic signed [W-1:0] fix_t;   // Q16.16 sample
  typedef logic signed [W-1:0] coef_t;  // Q2.30 coefficient

  // One quantity in the stationary alpha-beta frame: alpha is the measured
  // signal, beta the fictitious quadrature signal.
  typedef struct packed {
    fix_t a;
    fix_t b;
  } ab_t;

  localparam fix_t FIX_MAX = fix_t'({1'b0, {(W-1){1'b1}}});
  localparam fix_t FIX_MIN = fix_t'({1'b1, {(W-1){1'b0}}});

  // Convert a whole number of units to Q16.16.
  function automatic fix_t to_fix(input int v);
    return fix_t'(v <<< FRAC);
  endfunction

  // Saturate a 66-bit signed value to a sample word.
  function automatic fix_t sat66(input logic signed [65:0] v);
    if (v > 66'(signed'(FIX_MAX))) return FIX_MAX;
    if (v < 66'(signed'(FIX_MIN))) return FIX_MIN;
    return fix_t'(v);
  endfunction

  // Sum or difference of two samples, saturated.
  function automatic fix_t add_sat(input fix_t x, input fix_t y);
    return sat66(66'(x) + 66'(y));
  endfunction

  function automatic fix_t sub_sat(input fix_t x, input fix_t y);
    return sat66(66'(x) - 66'(y));
  endfunction

  // Full-precision product of two words, 64 bits.
  function automatic logic signed [63:0] mul_full(input logic signed [W-1:0] x,
                                                  input logic signed [W-1:0] y);
    return 64'(x) * 64'(y);
  endfunction

  // Round a 64-bit product right by sh bits and saturate it to a sample.
  function automatic fix_t round_shift(input logic signed [63:0] v, input int sh);
    logic signed [65:0] t;
    t = (66'(v) + (66'sd1 <<< (sh - 1))) >>> sh;
    return sat66(t);
  endfunction

  // Sample times coefficient: Q16.16 * Q2.30 -> Q16.16.
  function automatic fix_t mul_coef(input fix_t x, input coef_t c);
    return round_shift(mul_full(x, c), CFRAC);
  endfunction

  // Sample times sample: Q16.16 * Q16.16 -> Q16.16.
  function automatic fix_t mul_fix(input fix_t x, input fix_t y);
    return round_shift(mul_full(x, y), FRAC);
  endfunction

endpackage
