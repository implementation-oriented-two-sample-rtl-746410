// pll_pkg: number format and arithmetic shared by every block of the
// two-sample (2S) phase locked loop.
//
// All signals of the loop are signed fixed-point numbers of FX_W bits with
// FX_F fractional bits (Q12.24 by default: range +/-2048, step 6e-8). The
// widest signal is the PLL frequency in rad/s (about 314 at 50 Hz, several
// hundred more during the pull-in after reset), the one
// that needs the finest step is the QSG coefficient K2 (about 0.00245 s).
// The word format is this design's choice; the source of the loop gives no
// word lengths. Constants are given to the blocks as real-valued parameters
// and turned into this format at elaboration by fx_const().
package pll_pkg;

  parameter int FX_W = 36;  // word length
  parameter int FX_F = 24;  // fractional bits

  typedef logic signed [FX_W-1:0]   fx_t;
  typedef logic signed [2*FX_W-1:0] fx2_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< FX_F;

  // Real constant to fixed point; the cast to longint rounds to nearest.
  function automatic fx_t fx_const(input real r);
    return fx_t'(longint'(r * (2.0 ** FX_F)));
  endfunction

  // Fixed-point product, rounded to nearest (ties towards +inf), result
  // truncated to FX_W bits. Callers keep operands in a range that fits.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    fx2_t p;
    p = fx2_t'(a) * fx2_t'(b);
    p = p + (fx2_t'(1) <<< (FX_F - 1));
    return fx_t'(p >>> FX_F);
  endfunction

endpackage
