// Self-checking test of pll_normalize: random voltages across the range
// of a 230 V grid and beyond, compared with vg / (sqrt(2)*230) computed in
// floating point.
module tb_pll_normalize;
  import pll_pkg::*;

  fx_t vg, alpha;
  int checks = 0, failures = 0;

  pll_normalize dut (.vg(vg), .alpha(alpha));

  function automatic real to_r(input fx_t v);
    return $itor(v) / (2.0 ** FX_F);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, expv;
    for (int i = 0; i < 2000; i++) begin
      v  = ($itor($urandom_range(0, 900000)) - 450000.0) / 1000.0;
      if (i == 0) v = 325.269;  // nominal peak
      if (i == 1) v = -325.269;
      vg = fx_const(v);
      #1;
      expv = v / ($sqrt(2.0) * 230.0);
      checks++;
      // the gain is held to about 2.5e-7 absolute, i.e. 1e-4 relative
      if ((to_r(alpha) - expv) > 1e-4 * (expv < 0.0 ? -expv : expv) + 1e-6 || (expv - to_r(alpha)) > 1e-4 * (expv < 0.0 ? -expv : expv) + 1e-6) begin
        failures++;
        if (failures < 10) $display("vg=%f alpha=%f expected %f", v, to_r(alpha), expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
