// pll_qsg: two-sample quadrature signal generator (QSG).
//
// From the normalized grid sample alpha[k] and the sample two periods
// earlier, alpha[k-2], it builds the in-quadrature component
//
//   beta[k] = (alpha[k-2] - alpha[k]) * K1 * (1 - K2*dw) + alpha[k] * G
//
// which replaces the exact form
//   beta[k] = (alpha[k-2]-alpha[k]) / sin(2*w*Ts) + alpha[k] * tan(w*Ts).
// K1 = 1/(2x0 - (4/3)x0^3) with x0 = w0*Ts is the truncated series of
// 1/sin(2x0), (1 - K2*dw) with K2 = (2 - 4x0^2)/(2w0 - (4/3)Ts^2 w0^3)
// corrects it for the frequency deviation dw, and G = x + x^3/3 (x = w*Ts)
// is the truncated series of tan(x), made by pll_trig_approx. For
// alpha = sin(phi) the result is beta = -cos(phi) with no delay.
//
// Timing: one sample per clock with en high. beta is combinational from
// alpha. dw and g are the loop's values of the current sample; they depend
// on beta, so they are stored on en and used for the next sample (the
// coefficients therefore lag one sample, this design's choice that breaks
// the combinational loop). Reset clears the sample history and dw and sets
// the stored G to its nominal value x0 + x0^3/3.
module pll_qsg
  import pll_pkg::*;
#(
  parameter real F_NOM = 50.0,        // nominal grid frequency, Hz
  parameter real TS    = 1.0 / 800.0  // sampling period, s
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,     // one sample
  input  fx_t  alpha,  // alpha[k]
  input  fx_t  dw,     // frequency deviation of this sample, rad/s
  input  fx_t  g,      // tan(w*Ts) approximation of this sample
  output fx_t  beta    // beta[k]
);

  localparam real W0 = 2.0 * 3.14159265358979323846 * F_NOM;
  localparam real X0 = W0 * TS;
  localparam fx_t K1 = fx_const(1.0 / (2.0 * X0 - (8.0 / 6.0) * X0 ** 3));
  localparam fx_t K2 = fx_const((2.0 - 4.0 * X0 ** 2) /
                                (2.0 * W0 - (8.0 / 6.0) * TS ** 2 * W0 ** 3));
  localparam fx_t G0 = fx_const(X0 + X0 ** 3 / 3.0);

  fx_t alpha_d1, alpha_d2;  // alpha[k-1], alpha[k-2]
  fx_t dw_q, g_q;           // coefficients from the previous sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha_d1 <= '0;
      alpha_d2 <= '0;
      dw_q     <= '0;
      g_q      <= G0;
    end else if (en) begin
      alpha_d1 <= alpha;
      alpha_d2 <= alpha_d1;
      dw_q     <= dw;
      g_q      <= g;
    end
  end

  fx_t diff, kdiff, corr;

  always_comb begin
    diff  = alpha_d2 - alpha;
    corr  = FX_ONE - fx_mul(K2, dw_q);
    kdiff = fx_mul(K1, corr);
    beta  = fx_mul(diff, kdiff) + fx_mul(alpha, g_q);
  end

endmodule
