// pll_park_q: phase detector of the PLL, the q output of a Park transform.
//
// The (alpha, beta) pair is projected on the frame turned by the
// oscillator's phase of the previous sample:
//
//   q = alpha * sin(theta[k-1]) - beta * cos(theta[k-1])
//
// With alpha = sin(phi), beta = -cos(phi) this is q = cos(phi - theta[k-1]),
// which is zero, with positive slope towards the loop, when the oscillator
// leads the grid sample by a quarter period. Only the q component is
// formed; the d component is not used by the loop.
//
// Interface: all values in the pll_pkg format, purely combinational.
module pll_park_q
  import pll_pkg::*;
(
  input  fx_t alpha,
  input  fx_t beta,
  input  fx_t sin_th,  // sin(theta[k-1]) from the digital oscillator
  input  fx_t cos_th,  // cos(theta[k-1])
  output fx_t q        // phase error signal
);

  assign q = fx_mul(alpha, sin_th) - fx_mul(beta, cos_th);

endmodule
