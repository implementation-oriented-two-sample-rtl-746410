// Test of the sequential datapath: pll_2s_top with SEQUENTIAL = 1 (one
// multiplier, one adder, pll_2s_seq) against pll_2s_top with the parallel
// datapath, which its own test checks against a floating-point model.
// Both receive the same 230 V grid samples, stepped 50 -> 45 -> 55 -> 47 ->
// 53 Hz (400 samples each), with gaps of 28 to 40 clocks between samples.
// Checks: every output of every sample is bit-identical; out_valid comes
// 28 clocks after sample_en (capture plus 27 steps; counted the same way
// the parallel datapath takes 1); ready is low from the clock after
// sample_en until out_valid and high otherwise; the loop is locked to the
// grid frequency at the end of each level. Mechanisms counted: theta wraps
// and frequency steps up and down.
module tb_pll_2s_seq;
  import pll_pkg::*;

  localparam real PI_R = 3.14159265358979323846;
  localparam real TS   = 1.0 / 800.0;
  localparam real VPK  = 230.0 * 1.41421356237309505;
  localparam int  SEG  = 400;
  localparam int  LAT  = 28;  // as counted here the parallel datapath has 1

  logic clk = 0, rst_n = 0, sample_en = 0;
  fx_t  vg;
  int   checks = 0, failures = 0, n_wrap = 0, n_up = 0, n_down = 0;

  logic s_ready, s_valid, p_ready, p_valid;
  fx_t  s_omega, s_dw, s_theta, s_sin, s_cos, s_q, s_alpha, s_beta;
  fx_t  p_omega, p_dw, p_theta, p_sin, p_cos, p_q, p_alpha, p_beta;

  pll_2s_top #(.SEQUENTIAL(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en), .vg(vg),
    .ready(s_ready), .out_valid(s_valid), .omega(s_omega), .dw(s_dw),
    .theta(s_theta), .sin_th(s_sin), .cos_th(s_cos), .q(s_q),
    .alpha(s_alpha), .beta(s_beta)
  );

  pll_2s_top ref_par (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en), .vg(vg),
    .ready(p_ready), .out_valid(p_valid), .omega(p_omega), .dw(p_dw),
    .theta(p_theta), .sin_th(p_sin), .cos_th(p_cos), .q(p_q),
    .alpha(p_alpha), .beta(p_beta)
  );

  always #5 clk = ~clk;

  function automatic real to_r(input fx_t v);
    return $itor(v) / (2.0 ** FX_F);
  endfunction

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real fseq[5], f, phi, fsum, th_prev;
    int  lat;
    fseq = '{50.0, 45.0, 55.0, 47.0, 53.0};
    vg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    phi = 2.0 * PI_R * $itor($urandom_range(0, 999)) / 1000.0;
    th_prev = 0.0;
    foreach (fseq[seg]) begin
      f = fseq[seg];
      if (seg > 0 && f > fseq[seg-1]) n_up++;
      if (seg > 0 && f < fseq[seg-1]) n_down++;
      fsum = 0.0;
      for (int n = 0; n < SEG; n++) begin
        phi += 2.0 * PI_R * f * TS;
        if (phi >= 2.0 * PI_R) phi -= 2.0 * PI_R;
        vg = fx_const(VPK * $sin(phi));
        expect_true("not ready before a sample", s_ready);
        @(negedge clk) sample_en = 1;
        @(negedge clk) sample_en = 0;
        lat = 1;
        while (!s_valid) begin
          expect_true("ready high while busy", !s_ready);
          @(negedge clk);
          lat++;
          if (lat > 100) break;
        end
        expect_true($sformatf("latency %0d, expected %0d", lat, LAT), lat == LAT);
        expect_true("outputs differ from the parallel datapath",
                    s_omega == p_omega && s_dw == p_dw && s_theta == p_theta &&
                    s_sin == p_sin && s_cos == p_cos && s_q == p_q &&
                    s_alpha == p_alpha && s_beta == p_beta);
        if (to_r(s_theta) < th_prev) n_wrap++;
        th_prev = to_r(s_theta);
        if (n >= SEG - 100) fsum += to_r(s_omega) / (2.0 * PI_R);
        repeat ($urandom_range(0, 12)) @(negedge clk);
      end
      checks++;
      if (fsum / 100.0 - f > 0.05 || f - fsum / 100.0 > 0.05) begin
        failures++;
        $display("level %0d: %f Hz, pll mean %f Hz", seg, f, fsum / 100.0);
      end
    end
    $display("mechanisms: theta wraps %0d, step up %0d, step down %0d", n_wrap, n_up, n_down);
    expect_true("theta never wrapped", n_wrap > 0);
    expect_true("no upward step", n_up > 0);
    expect_true("no downward step", n_down > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
