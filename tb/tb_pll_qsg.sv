// Self-checking test of pll_qsg. A unit sine at several grid frequencies is
// fed one sample per enable, with dw and g set to the values the loop would
// give at that frequency. Each beta is compared with the QSG formula
// evaluated in floating point, using the dw and g of the previous sample
// (one-sample coefficient lag) and alpha two enables back, and, once the
// history is full, with the ideal quadrature signal -cos(phi[k]).
// Clocks without enable must leave the history unchanged.
module tb_pll_qsg;
  import pll_pkg::*;

  localparam real PI_R = 3.14159265358979323846;
  localparam real TS = 1.0 / 800.0;
  localparam real W0 = 2.0 * PI_R * 50.0;
  localparam real X0 = W0 * TS;

  logic clk = 0, rst_n = 0, en = 0;
  fx_t alpha, dw, g, beta;
  int checks = 0, failures = 0;

  pll_qsg dut (.clk(clk), .rst_n(rst_n), .en(en), .alpha(alpha), .dw(dw), .g(g), .beta(beta));

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k1, k2, fr[5], phi, xr, a_hist[$], dwp, gp, bref, dwr, gr;
    k1 = 1.0 / (2.0 * X0 - (8.0 / 6.0) * X0 ** 3);
    k2 = (2.0 - 4.0 * X0 ** 2) / (2.0 * W0 - (8.0 / 6.0) * TS ** 2 * W0 ** 3);
    fr = '{50.0, 45.0, 55.0, 47.0, 53.0};
    alpha = '0; dw = '0; g = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    phi = 0.7;
    dwp = 0.0; gp = X0 + X0 ** 3 / 3.0;      // reset values
    a_hist = '{0.0, 0.0};                    // alpha[k-2], alpha[k-1]
    foreach (fr[j]) begin
      xr = 2.0 * PI_R * fr[j] * TS;
      for (int n = 0; n < 40; n++) begin
        phi += xr;
        alpha = fx_const($sin(phi));
        dwr = 2.0 * PI_R * (fr[j] - 50.0);
        gr  = xr + xr ** 3 / 3.0;
        dw = fx_const(dwr); g = fx_const(gr);
        #1;
        bref = (a_hist[0] - to_r(alpha)) * k1 * (1.0 - k2 * dwp) + to_r(alpha) * gp;
        cmp("beta formula", to_r(beta), bref, 1e-5);
        // ideal quadrature, once the history and coefficients match this frequency
        if (n >= 2) cmp("beta ~ -cos", to_r(beta), -$cos(phi), 0.02);
        @(negedge clk) en = 1;
        @(negedge clk) en = 0;
        // idle clocks must not move the history
        repeat (2) @(negedge clk);
        a_hist.push_back(to_r(alpha));
        void'(a_hist.pop_front());
        dwp = to_r(dw); gp = to_r(g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
