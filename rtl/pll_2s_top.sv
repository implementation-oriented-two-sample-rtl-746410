// pll_2s_top: low-resource two-sample (2S) phase locked loop for
// single-phase grid synchronization, e.g. in a power factor corrector.
//
// Each sample of the grid voltage passes once through the whole loop:
//
//   vg -> normalization -> alpha -> QSG -> beta -> Park (q) -> PI -> dw
//   dw -> w = w0 + dw -> x = w*Ts -> series for tan/sin -> oscillator, theta
//
// The quadrature signal generator needs only the present sample and the one
// two periods back; trigonometric functions are replaced by truncated series
// and by a recursive sin/cos oscillator, divisions by a first-order
// correction, so the loop needs only additions, multiplications and shifts.
//
// Two datapaths give bit-identical results. With SEQUENTIAL = 0 (default)
// every operator is its own circuit and the whole loop is evaluated
// combinationally in the clock of sample_en: the state is updated on that
// edge and the registered outputs are valid from the next clock (latency
// one clock, ready always high). With SEQUENTIAL = 1 the loop runs as a
// 27-step program on one multiplier and one adder (pll_2s_seq): latency 28
// clocks, ready low meanwhile.
//
// Interface: present a sample vg (volts, pll_pkg format) with sample_en high
// for one clock, once per sampling period TS, while ready is high. A
// one-clock out_valid marks the update of the registered outputs. Outputs: the PLL frequency (rad/s) and its
// deviation from nominal, the phase theta in [0, 2*pi), sin/cos of the
// oscillator, the phase error q and the alpha/beta pair.
//
// At lock q = 0, the oscillator stands a quarter period plus one sampling
// step ahead of the grid sample: for vg ~ sin(phi[k]), the outputs satisfy
// cos_th ~ -sin(phi[k+1]), i.e. -cos_th predicts the next normalized
// sample. theta is the integral of the frequency and slowly drifts against
// the oscillator, whose step angle is set by the series approximations.
//
// The loop structure, series, gains (Kp = 46, Ki = 1024), 50 Hz and
// Ts = 1/800 s follow the published design; the word format, the single-
// clock evaluation, the sequential schedule, reset values, output registers
// and the 230 V nominal voltage are this design's choices.
module pll_2s_top
  import pll_pkg::*;
#(
  parameter real F_NOM = 50.0,         // nominal grid frequency, Hz
  parameter real TS    = 1.0 / 800.0,  // sampling period, s
  parameter real VNOM  = 230.0,        // nominal RMS grid voltage, V
  parameter real KP    = 46.0,         // PI proportional gain
  parameter real KI    = 1024.0,       // PI integral gain
  parameter bit  SEQUENTIAL = 1'b0     // 1: one multiplier, one adder
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_en,   // one clock per sampling period
  input  fx_t  vg,          // grid voltage sample, V
  output logic ready,       // a new sample may be presented
  output logic out_valid,   // outputs below updated for this sample
  output fx_t  omega,       // PLL frequency, rad/s
  output fx_t  dw,          // frequency deviation from nominal, rad/s
  output fx_t  theta,       // PLL phase, rad, [0, 2*pi)
  output fx_t  sin_th,      // oscillator sine
  output fx_t  cos_th,      // oscillator cosine
  output fx_t  q,           // phase error (Park q component)
  output fx_t  alpha,       // normalized grid voltage
  output fx_t  beta         // its quadrature component
);

  if (SEQUENTIAL) begin : g_seq

    pll_2s_seq #(.F_NOM(F_NOM), .TS(TS), .VNOM(VNOM), .KP(KP), .KI(KI)) u_seq (
      .clk(clk), .rst_n(rst_n), .sample_en(sample_en), .vg(vg),
      .ready(ready), .out_valid(out_valid), .omega(omega), .dw(dw),
      .theta(theta), .sin_th(sin_th), .cos_th(cos_th), .q(q),
      .alpha(alpha), .beta(beta)
    );

  end else begin : g_par

    assign ready = 1'b1;

    fx_t alpha_c, beta_c, q_c, dw_c, omega_c, x_c, g_c, a1_c, a2_c;

    pll_normalize #(.VNOM(VNOM)) u_norm (
      .vg(vg), .alpha(alpha_c)
    );

    pll_qsg #(.F_NOM(F_NOM), .TS(TS)) u_qsg (
      .clk(clk), .rst_n(rst_n), .en(sample_en),
      .alpha(alpha_c), .dw(dw_c), .g(g_c), .beta(beta_c)
    );

    pll_park_q u_park (
      .alpha(alpha_c), .beta(beta_c), .sin_th(sin_th), .cos_th(cos_th), .q(q_c)
    );

    pll_pi #(.KP(KP), .KI(KI), .TS(TS)) u_pi (
      .clk(clk), .rst_n(rst_n), .en(sample_en), .e(q_c), .dw(dw_c)
    );

    pll_vco #(.F_NOM(F_NOM), .TS(TS)) u_vco (
      .clk(clk), .rst_n(rst_n), .en(sample_en),
      .dw(dw_c), .omega(omega_c), .x(x_c), .theta(theta)
    );

    pll_trig_approx u_trig (
      .x(x_c), .g(g_c), .a1(a1_c), .a2(a2_c)
    );

    pll_dosc u_osc (
      .clk(clk), .rst_n(rst_n), .en(sample_en),
      .a1(a1_c), .a2(a2_c), .sin_th(sin_th), .cos_th(cos_th)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        omega     <= '0;
        dw        <= '0;
        q         <= '0;
        alpha     <= '0;
        beta      <= '0;
      end else begin
        out_valid <= sample_en;
        if (sample_en) begin
          omega <= omega_c;
          dw    <= dw_c;
          q     <= q_c;
          alpha <= alpha_c;
          beta  <= beta_c;
        end
      end
    end

  end

endmodule
