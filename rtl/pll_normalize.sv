// pll_normalize: amplitude normalization of the sampled grid voltage.
//
// The loop works on a grid voltage of unit amplitude. Instead of measuring
// the amplitude and dividing by it, the sample is multiplied by the fixed
// gain 1/(sqrt(2)*VNOM), set by the nominal RMS grid voltage VNOM; this is
// the low-cost normalization the design proposes. A grid running at its
// nominal voltage then gives alpha = sin(phase).
//
// Interface: vg is the grid voltage sample in volts, alpha the normalized
// sample, both in the pll_pkg format. Purely combinational.
// The value 230 V for VNOM is this design's choice.
module pll_normalize
  import pll_pkg::*;
#(
  parameter real VNOM = 230.0  // nominal RMS grid voltage, volts
) (
  input  fx_t vg,
  output fx_t alpha
);

  localparam fx_t KNORM = fx_const(1.0 / ($sqrt(2.0) * VNOM));

  assign alpha = fx_mul(vg, KNORM);

endmodule
