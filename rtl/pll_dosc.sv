// pll_dosc: recursive digital oscillator that gives sin and cos of the PLL
// phase without a trigonometric table.
//
//   s[k] = A2*c[k-1] + (1 - A1*A2)*s[k-1]
//   c[k] = c[k-1] - A1*(s[k-1] + s[k])
//
// With A1 = tan(x/2) and A2 = sin(x) this is an exact rotation by x. For any
// A1, A2 the update matrix has determinant 1, so the amplitude does not grow
// or decay with approximate coefficients; they only change the step angle,
// to acos(1 - A1*A2). The term (1 - A1*A2) is written s - A1*(A2*s).
//
// Interface: A1, A2 from pll_trig_approx; sin_th and cos_th are registers
// updated on en, starting at sin = 0, cos = 1 after reset (phase 0). The
// values held between samples are sin(theta[k-1]) and cos(theta[k-1]) for
// the phase detector of the next sample.
module pll_dosc
  import pll_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  fx_t  a1,
  input  fx_t  a2,
  output fx_t  sin_th,
  output fx_t  cos_th
);

  fx_t s_next, c_next;

  always_comb begin
    s_next = fx_mul(a2, cos_th) + sin_th - fx_mul(a1, fx_mul(a2, sin_th));
    c_next = cos_th - fx_mul(a1, sin_th + s_next);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sin_th <= '0;
      cos_th <= FX_ONE;
    end else if (en) begin
      sin_th <= s_next;
      cos_th <= c_next;
    end
  end

endmodule
