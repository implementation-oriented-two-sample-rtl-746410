// pll_vco: frequency summation and phase accumulator ("voltage controlled
// oscillator") of the PLL.
//
//   w[k]     = w0 + dw[k]                 PLL frequency, rad/s
//   x[k]     = w[k] * Ts                  phase advance per sample, rad
//   theta[k] = theta[k-1] + x[k], wrapped into [0, 2*pi)
//
// x feeds the series approximations of pll_trig_approx; theta is the PLL
// phase output. The wrap subtracts 2*pi once the sum reaches 2*pi (and adds
// it should the sum go negative, which needs a negative frequency).
// Timing: omega and x are combinational from dw; theta is a register
// updated on en and reset to 0, the phase at which the digital oscillator
// starts (sin = 0, cos = 1).
module pll_vco
  import pll_pkg::*;
#(
  parameter real F_NOM = 50.0,
  parameter real TS    = 1.0 / 800.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  fx_t  dw,     // frequency deviation from the loop filter, rad/s
  output fx_t  omega,  // PLL frequency, rad/s
  output fx_t  x,      // omega * Ts, rad
  output fx_t  theta   // PLL phase, rad, registered
);

  localparam real PI_R   = 3.14159265358979323846;
  localparam fx_t W0     = fx_const(2.0 * PI_R * F_NOM);
  localparam fx_t TS_FX  = fx_const(TS);
  localparam fx_t TWO_PI = fx_const(2.0 * PI_R);

  fx_t sum, wrapped;

  always_comb begin
    omega = W0 + dw;
    x     = fx_mul(omega, TS_FX);
    sum   = theta + x;
    if (sum >= TWO_PI)   wrapped = sum - TWO_PI;
    else if (sum < 0)    wrapped = sum + TWO_PI;
    else                 wrapped = sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  theta <= '0;
    else if (en) theta <= wrapped;
  end

endmodule
