// pll_pi: proportional-integral loop filter of the PLL.
//
//   integ[k] = integ[k-1] + KW*(Ki*Ts) * e[k]
//   dw[k]    = KW*Kp * e[k] + integ[k]
//
// e is the phase error (q component), dw the frequency deviation in rad/s
// added to the nominal frequency. Kp = 46 and Ki = 1024 are the published
// gains. They are read as giving a frequency deviation in Hz, so KW = 2*pi
// turns it into rad/s; the factor is folded into the two constants, so it
// costs no multiplier. This reading is this design's: with it the loop
// reproduces the published transient peaks (about 16 degrees for a 45 to
// 55 Hz step, 10 degrees for 47 to 53 Hz), with KW = 1 they would be about
// 58 and 32 degrees. The integrator state is the sum including the present
// sample, as in the loop's block diagram, so dw responds in the same
// sample. Timing: dw is combinational from e; the integrator is updated on
// en. Reset clears it. No saturation: with unit-amplitude inputs the
// integrator stays within a few hundred rad/s, well inside the word.
module pll_pi
  import pll_pkg::*;
#(
  parameter real KP = 46.0,
  parameter real KI = 1024.0,
  parameter real TS = 1.0 / 800.0,
  parameter real KW = 2.0 * 3.14159265358979323846  // rad/s per controller unit
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  fx_t  e,
  output fx_t  dw
);

  localparam fx_t KP_FX   = fx_const(KW * KP);
  localparam fx_t KITS_FX = fx_const(KW * KI * TS);

  fx_t integ_q, integ_d;

  always_comb begin
    integ_d = integ_q + fx_mul(KITS_FX, e);
    dw      = fx_mul(KP_FX, e) + integ_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  integ_q <= '0;
    else if (en) integ_q <= integ_d;
  end

endmodule
