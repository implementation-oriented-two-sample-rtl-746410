// Self-checking test of pll_vco: frequency deviations held for random
// lengths, including large negative ones that drive the frequency below
// zero, against a floating-point accumulator wrapped into [0, 2*pi).
// Each update must be exactly theta + x wrapped by the word-format 2*pi;
// x must match w*Ts and theta must stay near the floating-point integral.
// Counts wraps in both directions and requires some of each.
module tb_pll_vco;
  import pll_pkg::*;

  localparam real PI_R = 3.14159265358979323846;
  localparam fx_t TWO_PI_FX = fx_const(2.0 * PI_R);

  logic clk = 0, rst_n = 0, en = 0;
  fx_t dw, omega, x, theta;
  int checks = 0, failures = 0, wraps_up = 0, wraps_down = 0;

  pll_vco dut (.clk(clk), .rst_n(rst_n), .en(en), .dw(dw), .omega(omega), .x(x), .theta(theta));

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, dwr, w, xr, d;
    fx_t prev, nxt;
    dw = '0;
    repeat (3) @(posedge clk);
    cmp("theta after reset", to_r(theta), 0.0, 0.0);
    rst_n = 1;
    th = 0.0;
    for (int seg = 0; seg < 40; seg++) begin
      if (seg % 8 == 7) dwr = -2.0 * PI_R * 50.0 - 20.0 - $itor($urandom_range(0, 100));
      else              dwr = ($itor($urandom_range(0, 40000)) - 20000.0) / 500.0;
      dw = fx_const(dwr);
      for (int n = 0; n < 30; n++) begin
        @(negedge clk);
        #1;
        w  = 2.0 * PI_R * 50.0 + to_r(dw);
        xr = w / 800.0;
        cmp("omega", to_r(omega), w, 1e-5);
        cmp("x", to_r(x), xr, 3e-5 * xr * (xr < 0.0 ? -1.0 : 1.0) + 1e-6);  // Ts is held to 1e-4 relative
        prev = theta;
        en = 1;
        @(negedge clk) en = 0;
        // exact accumulation of the step the block reports
        nxt = prev + x;
        if (nxt >= TWO_PI_FX) begin nxt = nxt - TWO_PI_FX; wraps_up++; end
        else if (nxt < 0)     begin nxt = nxt + TWO_PI_FX; wraps_down++; end
        checks++;
        if (theta !== nxt) begin
          failures++;
          if (failures < 20) $display("theta %f expected %f", to_r(theta), to_r(nxt));
        end
        // and the phase stays close to the floating-point integral of w
        th += xr;
        if (th >= 2.0 * PI_R) th -= 2.0 * PI_R;
        else if (th < 0.0)    th += 2.0 * PI_R;
        d = to_r(theta) - th;
        if (d >  PI_R) d -= 2.0 * PI_R;
        if (d < -PI_R) d += 2.0 * PI_R;
        cmp("theta drift", d, 0.0, 0.02);
        checks++;
        if (theta < 0 || to_r(theta) >= 2.0 * PI_R) begin
          failures++;
          $display("theta out of range: %f", to_r(theta));
        end
      end
    end
    checks++;
    if (wraps_up < 10 || wraps_down < 2) begin
      failures++;
      $display("too few wraps: up %0d down %0d", wraps_up, wraps_down);
    end
    $display("wraps up %0d down %0d", wraps_up, wraps_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
