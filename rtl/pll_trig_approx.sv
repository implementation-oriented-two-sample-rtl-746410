// pll_trig_approx: series approximations of the trigonometric coefficients.
//
// From the phase step per sample x = w*Ts it forms, with one cube and
// constant scalings only:
//
//   G  = x + 2*(x^3/6)    ~ tan(x)     QSG gain on alpha[k]
//   A1 = x/2 + x^3/24     ~ tan(x/2)   digital oscillator coefficient
//   A2 = x - x^3/6        ~ sin(x)     digital oscillator coefficient
//
// Every series stops at its second term, which keeps the error small at the
// low sampling rate (x = 0.39 rad at 50 Hz and 800 samples/s). The halving
// of x and the doubling of x^3/6 are arithmetic shifts; 1/6 and 1/24 are
// constant multiplications. Interface: pll_pkg format, purely combinational.
module pll_trig_approx
  import pll_pkg::*;
(
  input  fx_t x,
  output fx_t g,
  output fx_t a1,
  output fx_t a2
);

  localparam fx_t C6  = fx_const(1.0 / 6.0);
  localparam fx_t C24 = fx_const(1.0 / 24.0);

  fx_t x3, x3_6, x3_24;

  always_comb begin
    x3    = fx_mul(fx_mul(x, x), x);
    x3_6  = fx_mul(x3, C6);
    x3_24 = fx_mul(x3, C24);
    g     = x + (x3_6 <<< 1);
    a1    = (x >>> 1) + x3_24;
    a2    = x - x3_6;
  end

endmodule
