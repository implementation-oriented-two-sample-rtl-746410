// Self-checking test of pll_dosc. For several fixed step angles the
// coefficients A1 = x/2 + x^3/24 and A2 = x - x^3/6 are applied for
// thousands of samples. Each step must turn the (cos, sin) vector by
// acos(1 - A1*A2) and the amplitude must stay at 1; the first samples are
// also compared with sin/cos of the accumulated angle. Idle clocks must not
// move the oscillator.
module tb_pll_dosc;
  import pll_pkg::*;

  localparam real PI_R = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, en = 0;
  fx_t a1, a2, s, c;
  int checks = 0, failures = 0;

  pll_dosc dut (.clk(clk), .rst_n(rst_n), .en(en), .a1(a1), .a2(a2), .sin_th(s), .cos_th(c));

  always #5 clk = ~clk;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real f[4], xr, step, ang, prev, d, acc;
    f = '{50.0, 45.0, 62.0, 20.0};
    a1 = '0; a2 = '0;
    repeat (3) @(posedge clk);
    cmp("sin after reset", to_r(s), 0.0, 0.0);
    cmp("cos after reset", to_r(c), 1.0, 0.0);
    rst_n = 1;
    acc = 0.0;
    foreach (f[j]) begin
      xr = 2.0 * PI_R * f[j] / 800.0;
      a1 = fx_const(xr / 2.0 + xr ** 3 / 24.0);
      a2 = fx_const(xr - xr ** 3 / 6.0);
      step = $acos(1.0 - to_r(a1) * to_r(a2));
      for (int n = 0; n < 3000; n++) begin
        @(negedge clk);
        prev = $atan2(to_r(s), to_r(c));
        en = 1;
        @(negedge clk) en = 0;
        @(negedge clk);
        ang = $atan2(to_r(s), to_r(c));
        d = ang - prev;
        if (d < -PI_R) d += 2.0 * PI_R;
        acc += step;
        cmp("step angle", d, step, 5e-5);
        cmp("amplitude", $sqrt(to_r(s) ** 2 + to_r(c) ** 2), 1.0, 1e-3);
        if (j == 0 && n < 20) begin
          cmp("sin", to_r(s), $sin(acc), 1e-4);
          cmp("cos", to_r(c), $cos(acc), 1e-4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
