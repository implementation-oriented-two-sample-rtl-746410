// End-to-end test of pll_2s_top at its default parameters (50 Hz nominal,
// 800 samples/s, 230 V, Kp = 46, Ki = 1024).
//
// A 230 V RMS sine with a random starting phase is sampled once every few
// clocks (random gaps of 2 to 5 clocks) and its frequency is stepped:
//   levels 50 (from reset), 45, 55, 47, 53, 47, 55, 45, 50 Hz,
// each level held for one second (800 samples). Checks:
//   - out_valid follows each sample_en by exactly one clock and the outputs
//     hold still between samples (latency and rate);
//   - a floating-point model of the same loop equations, fed the same grid
//     samples, agrees with the frequency deviation and phase error;
//   - at the end of every level the loop is locked: mean frequency over
//     the last 100 samples within 0.05 Hz, each sample within 0.5 Hz, |q| < 0.01, beta = -cos(grid phase), -cos_th predicts the
//     next normalized sample, oscillator amplitude 1, theta in [0, 2*pi);
//   - the peak phase error after the 45 -> 55 Hz and 47 -> 53 Hz steps is
//     printed and must be in the range of the published responses (between
//     15 and 20 degrees, and 9.8 degrees measured).
// Mechanisms counted, each must occur: lock reached, upward step, downward
// step, theta wrap, QSG frequency correction with dw above and below zero.
module tb_pll_2s_top;
  import pll_pkg::*;

  localparam real PI_R = 3.14159265358979323846;
  localparam real TS   = 1.0 / 800.0;
  localparam real VPK  = 230.0 * 1.41421356237309505;
  localparam int  SEG  = 800;

  logic clk = 0, rst_n = 0, sample_en = 0, out_valid;
  fx_t vg, omega, dw, theta, sin_th, cos_th, q, alpha, beta;

  int checks = 0, failures = 0;
  int n_lock = 0, n_up = 0, n_down = 0, n_wrap = 0, n_corr_pos = 0, n_corr_neg = 0;

  pll_2s_top dut (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en), .vg(vg),
    .ready(), .out_valid(out_valid), .omega(omega), .dw(dw), .theta(theta),
    .sin_th(sin_th), .cos_th(cos_th), .q(q), .alpha(alpha), .beta(beta)
  );

  always #5 clk = ~clk;

  function automatic real to_r(input fx_t v);
    return $itor(v) / (2.0 ** FX_F);
  endfunction

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic cmp(input string what, input real got, input real expv, input real tol);
    checks++;
    if (absr(got - expv) > tol) begin
      failures++;
      if (failures < 30) $display("%0t %s: got %f expected %f", $time, what, got, expv);
    end
  endtask

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("%0t %s", $time, what);
    end
  endtask

  // rate and latency: out_valid exactly one clock after each sample_en,
  // outputs unchanged on clocks without a sample
  logic en_s;
  fx_t  omega_d, theta_d, q_d;
  always @(posedge clk) begin
    if (rst_n) begin
      en_s = sample_en;
      omega_d = omega; theta_d = theta; q_d = q;
      #1;
      expect_true("out_valid not one clock after sample_en", out_valid == en_s);
      if (!en_s)
        expect_true("outputs moved without a sample",
                    omega == omega_d && theta == theta_d && q == q_d);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // floating-point model of the loop equations
  real m_a1, m_a2, m_i, m_dw, m_g, m_s, m_c, m_q, m_k1, m_k2, m_w0;

  task automatic model_reset();
    real x0;
    m_w0 = 2.0 * PI_R * 50.0;
    x0   = m_w0 * TS;
    m_k1 = 1.0 / (2.0 * x0 - (8.0 / 6.0) * x0 ** 3);
    m_k2 = (2.0 - 4.0 * x0 ** 2) / (2.0 * m_w0 - (8.0 / 6.0) * TS ** 2 * m_w0 ** 3);
    m_a1 = 0.0; m_a2 = 0.0; m_i = 0.0; m_dw = 0.0;
    m_g  = x0 + x0 ** 3 / 3.0; m_s = 0.0; m_c = 1.0;
  endtask

  task automatic model_step(input real a);
    real b, x, A1, A2, sn, cn;
    b    = (m_a2 - a) * m_k1 * (1.0 - m_k2 * m_dw) + a * m_g;
    m_q  = a * m_s - b * m_c;
    m_i  = m_i + 2.0 * PI_R * 1024.0 * TS * m_q;
    m_dw = 2.0 * PI_R * 46.0 * m_q + m_i;
    x    = (m_w0 + m_dw) * TS;
    m_g  = x + x ** 3 / 3.0;
    A1   = x / 2.0 + x ** 3 / 24.0;
    A2   = x - x ** 3 / 6.0;
    sn   = A2 * m_c + (1.0 - A1 * A2) * m_s;
    cn   = m_c - A1 * (m_s + sn);
    m_s  = sn; m_c = cn;
    m_a2 = m_a1; m_a1 = a;
  endtask

  initial begin
    real fseq[9], f, fsum, phi, a, th_prev, peak, peaks[9], maxdev_dw, maxdev_q, pred;
    int  seg;
    fseq = '{50.0, 45.0, 55.0, 47.0, 53.0, 47.0, 55.0, 45.0, 50.0};
    vg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    model_reset();
    phi = 2.0 * PI_R * $itor($urandom_range(0, 999)) / 1000.0;
    th_prev = 0.0; maxdev_dw = 0.0; maxdev_q = 0.0; pred = 0.0;
    for (seg = 0; seg < 9; seg++) begin
      f = fseq[seg];
      if (seg > 0 && f > fseq[seg-1]) n_up++;
      if (seg > 0 && f < fseq[seg-1]) n_down++;
      peak = 0.0;
      fsum = 0.0;
      for (int n = 0; n < SEG; n++) begin
        phi += 2.0 * PI_R * f * TS;
        if (phi >= 2.0 * PI_R) phi -= 2.0 * PI_R;
        a = $sin(phi);
        vg = fx_const(VPK * a);
        @(negedge clk) sample_en = 1;
        @(negedge clk) sample_en = 0;
        model_step(to_r(vg) / VPK);
        // the previous sample's prediction of this one
        if (n >= SEG - 100) cmp("-cos_th predicts the next sample", pred, to_r(alpha), 0.03);
        pred = -to_r(cos_th);
        if (absr(to_r(dw) - m_dw) > maxdev_dw) maxdev_dw = absr(to_r(dw) - m_dw);
        if (absr(to_r(q) - m_q) > maxdev_q) maxdev_q = absr(to_r(q) - m_q);
        cmp("dw vs model", to_r(dw), m_dw, 0.5);
        cmp("q vs model", to_r(q), m_q, 0.01);
        if (to_r(theta) < th_prev) n_wrap++;
        th_prev = to_r(theta);
        expect_true("theta out of range", theta >= 0 && to_r(theta) < 2.0 * PI_R);
        if (to_r(dw) >  2.0 * PI_R * 4.0) n_corr_pos++;
        if (to_r(dw) < -2.0 * PI_R * 4.0) n_corr_neg++;
        if (n < 400 && absr(to_r(q)) < 1.0 && $asin(absr(to_r(q))) * 180.0 / PI_R > peak)
          peak = $asin(absr(to_r(q))) * 180.0 / PI_R;
        if (n >= SEG - 100) begin
          // the frequency carries a small ripple at twice the grid frequency
          cmp("frequency, Hz", to_r(omega) / (2.0 * PI_R), f, 0.5);
          fsum += to_r(omega) / (2.0 * PI_R);
          cmp("phase error q", to_r(q), 0.0, 0.01);
          cmp("beta = -cos(phi)", to_r(beta), -$cos(phi), 0.02);
          cmp("oscillator amplitude",
              $sqrt(to_r(sin_th) ** 2 + to_r(cos_th) ** 2), 1.0, 2e-3);
        end
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      peaks[seg] = peak;
      cmp("mean frequency over the last 100 samples, Hz", fsum / 100.0, f, 0.05);
      if (absr(fsum / 100.0 - f) < 0.05 && absr(to_r(q)) < 0.01) n_lock++;
      $display("level %0d: %5.1f Hz, pll mean %8.4f Hz, peak phase error %6.2f deg",
               seg, f, fsum / 100.0, peak);
    end
    // published transients: 45 -> 55 Hz peaks between 15 and 20 degrees,
    // 47 -> 53 Hz measured at 9.8 degrees
    cmp("peak error 45->55 Hz, deg", peaks[2], 17.5, 2.5);
    cmp("peak error 47->53 Hz, deg", peaks[4], 9.8, 2.0);
    $display("max |dw - model| = %f rad/s, max |q - model| = %f", maxdev_dw, maxdev_q);
    $display("mechanisms: lock %0d, step up %0d, step down %0d, theta wraps %0d, QSG correction dw>0 %0d dw<0 %0d",
             n_lock, n_up, n_down, n_wrap, n_corr_pos, n_corr_neg);
    expect_true("lock never reached", n_lock == 9);
    expect_true("no upward step", n_up > 0);
    expect_true("no downward step", n_down > 0);
    expect_true("theta never wrapped", n_wrap > 0);
    expect_true("QSG correction never positive", n_corr_pos > 0);
    expect_true("QSG correction never negative", n_corr_neg > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
