// Self-checking test of pll_pi: a random error sequence, with random idle
// clocks between enables, against a floating-point PI
// with Kp = 46, Ki = 1024, Ts = 1/800 and the 2*pi Hz-to-rad/s factor
// (integ += 2pi*Ki*Ts*e; dw = 2pi*Kp*e + integ). Then a reset must clear the
// integrator.
module tb_pll_pi;
  import pll_pkg::*;

  localparam real KW = 2.0 * 3.14159265358979323846;

  logic clk = 0, rst_n = 0, en = 0;
  fx_t e, dw;
  int checks = 0, failures = 0;

  pll_pi dut (.clk(clk), .rst_n(rst_n), .en(en), .e(e), .dw(dw));

  always #5 clk = ~clk;

  function automatic real to_r(input fx_t v);
    return $itor(v) / (2.0 ** FX_F);
  endfunction

  task automatic cmp(input real got, input real expv, input real tol);
    checks++;
    if ((got - expv) > tol || (expv - got) > tol) begin
      failures++;
      if (failures < 20) $display("dw: got %f expected %f", got, expv);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real integ, er;
    e = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    integ = 0.0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      er = ($itor($urandom_range(0, 200000)) - 100000.0) / 500000.0;  // +/-0.2
      if (i < 200) er = 0.05;   // steady ramp of the integrator first
      e  = fx_const(er);
      #1;
      cmp(to_r(dw), KW * 46.0 * to_r(e) + integ + KW * 1.28 * to_r(e), 1e-3);
      en = 1;
      @(negedge clk) en = 0;
      integ += KW * 1.28 * to_r(e);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    rst_n = 0;
    @(negedge clk) rst_n = 1;
    e = '0;
    #1;
    cmp(to_r(dw), 0.0, 1e-6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
