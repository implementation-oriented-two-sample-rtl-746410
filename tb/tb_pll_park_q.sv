// Self-checking test of pll_park_q: random alpha, beta and angle, q compared
// with alpha*sin - beta*cos in floating point; plus the lock property that
// alpha = sin(phi), beta = -cos(phi) gives q = cos(phi - theta).
module tb_pll_park_q;
  import pll_pkg::*;

  fx_t alpha, beta, s, c, q;
  int checks = 0, failures = 0;

  pll_park_q dut (.alpha(alpha), .beta(beta), .sin_th(s), .cos_th(c), .q(q));

  function automatic real to_r(input fx_t v);
    return $itor(v) / (2.0 ** FX_F);
  endfunction

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * $itor($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  task automatic check(input real expv);
    #1;
    checks++;
    if ((to_r(q) - expv) > 2e-6 || (expv - to_r(q)) > 2e-6) begin
      failures++;
      if (failures < 10) $display("q=%f expected %f", to_r(q), expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, b, th, ph;
    for (int i = 0; i < 1000; i++) begin
      a  = rnd(-1.5, 1.5);
      b  = rnd(-1.5, 1.5);
      th = rnd(0.0, 6.283185);
      alpha = fx_const(a); beta = fx_const(b);
      s = fx_const($sin(th)); c = fx_const($cos(th));
      check(to_r(alpha) * to_r(s) - to_r(beta) * to_r(c));
    end
    for (int i = 0; i < 1000; i++) begin
      ph = rnd(0.0, 6.283185);
      th = rnd(0.0, 6.283185);
      alpha = fx_const($sin(ph)); beta = fx_const(-$cos(ph));
      s = fx_const($sin(th)); c = fx_const($cos(th));
      check($cos(ph - th));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
