// Self-checking test of pll_trig_approx: over the range of phase steps of a
// 40..70 Hz grid sampled at 800 Hz, the three outputs are compared with the
// truncated series computed in floating point, and with tan(x), tan(x/2)
// and sin(x) to within the truncation error.
module tb_pll_trig_approx;
  import pll_pkg::*;

  fx_t x, g, a1, a2;
  int checks = 0, failures = 0;

  pll_trig_approx dut (.x(x), .g(g), .a1(a1), .a2(a2));

  function automatic real to_r(input fx_t v);
    return $itor(v) / (2.0 ** FX_F);
  endfunction

  task automatic cmp(input string what, input real got, input real expv, input real tol);
    checks++;
    if ((got - expv) > tol || (expv - got) > tol) begin
      failures++;
      if (failures < 20) $display("%s: got %f expected %f", what, got, expv);
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
    real xr;
    for (int i = 0; i <= 600; i++) begin
      xr = 2.0 * 3.14159265358979 * (40.0 + 0.05 * i) / 800.0;
      x  = fx_const(xr);
      #1;
      xr = to_r(x);
      cmp("G",  to_r(g),  xr + xr * xr * xr / 3.0, 2e-6);
      cmp("A1", to_r(a1), xr / 2.0 + xr * xr * xr / 24.0, 2e-6);
      cmp("A2", to_r(a2), xr - xr * xr * xr / 6.0, 2e-6);
      cmp("G~tan",   to_r(g),  $tan(xr), 0.02);
      cmp("A1~tan",  to_r(a1), $tan(xr / 2.0), 0.001);
      cmp("A2~sin",  to_r(a2), $sin(xr), 0.003);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
