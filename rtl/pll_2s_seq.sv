// pll_2s_seq: the same two-sample PLL computed sequentially on one
// multiplier and one adder/subtractor.
//
// Because the sampling period (1/800 s) is very long compared with a clock
// period, the loop does not need a separate operator for every product and
// sum. This core holds the loop variables in a small register file and runs
// a fixed 27-step program per sample. In each step the single multiplier
// forms one rounded product and the single adder either adds or subtracts
// it to/from a register (a multiply-accumulate step), or adds/subtracts two
// registers. Shifts by one bit (x/2 and 2*x^3/6) are wiring on the adder
// inputs. The program is:
//
//   alpha = vg*Knorm                 corr = 1 - K2*dw'      kd = K1*corr
//   t = alpha[k-2] - alpha           beta = t*kd + alpha*G'
//   q = alpha*s - beta*c             integ += 2pi*Ki*Ts*q   dw = integ + 2pi*Kp*q
//   w = w0 + dw     x = w*Ts         theta = wrap(theta + x)   (3 steps)
//   x^3, x^3/6, A1 = x/2 + x^3/24, G = x + 2*x^3/6, A2 = x - x^3/6
//   s' = s + A2*c - A1*(A2*s)        c' = c - A1*(s + s')
//   commit: s, c, dw', G', sample history, outputs
//
// (dw' and G' are the values stored from the previous sample.) Every product
// is rounded exactly as in the parallel datapath (pll_2s_top with
// SEQUENTIAL = 0), so both give bit-identical results.
//
// Interface: sample_en starts a sample when ready is high (a sample_en while
// busy is ignored and flagged by an assertion). The outputs are registered
// and updated together, with a one-clock out_valid; the latency is 28
// clocks (one to capture vg, one per step) where the parallel datapath
// takes one. Reset values are those of the parallel datapath.
//
// That one multiplier and one adder are enough is the published claim; the
// register file, the step order and the handshake are this design's.
module pll_2s_seq
  import pll_pkg::*;
#(
  parameter real F_NOM = 50.0,
  parameter real TS    = 1.0 / 800.0,
  parameter real VNOM  = 230.0,
  parameter real KP    = 46.0,
  parameter real KI    = 1024.0,
  parameter real KW    = 2.0 * 3.14159265358979323846
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_en,
  input  fx_t  vg,
  output logic ready,
  output logic out_valid,
  output fx_t  omega,
  output fx_t  dw,
  output fx_t  theta,
  output fx_t  sin_th,
  output fx_t  cos_th,
  output fx_t  q,
  output fx_t  alpha,
  output fx_t  beta
);

  localparam real PI_R = 3.14159265358979323846;
  localparam real W0_R = 2.0 * PI_R * F_NOM;
  localparam real X0   = W0_R * TS;

  // operand sources: registers and constants
  typedef enum logic [5:0] {
    // registers
    R_VG, R_AL, R_AH1, R_AH2, R_DWQ, R_GQ, R_T, R_KD, R_BE, R_Q, R_IN, R_DW,
    R_OM, R_X, R_TS, R_TH, R_X2, R_X3, R_X36, R_G, R_A1, R_A2, R_S, R_C,
    R_SN, R_CN,
    // constants
    C_ZERO, C_ONE, C_KNORM, C_K1, C_K2, C_KITS, C_KP, C_W0, C_TS, C_2PI,
    C_6, C_24
  } src_e;

  localparam int NREG = 26;  // R_VG .. R_CN
  localparam int RI_W = $clog2(NREG);

  // register-file index of a register source
  function automatic logic [RI_W-1:0] ix(input src_e s);
    return RI_W'(s);
  endfunction

  // adder operand shaping: plain, halved (>>> 1), doubled (<<< 1)
  typedef enum logic [1:0] {SH_NONE, SH_HALF, SH_DOUBLE} shift_e;

  typedef struct packed {
    src_e   ma, mb;    // multiplier operands
    src_e   aa;        // adder operand a
    shift_e sha;       // shaping of operand a
    logic   use_prod;  // adder operand b is the product, else bb
    src_e   bb;        // adder operand b when not the product
    shift_e shb;       // shaping of operand b
    logic   sub;       // a - b instead of a + b
    src_e   dst;       // register written with the adder result
  } uop_t;

  localparam int NSTEP = 27;
  localparam int STEP_W = $clog2(NSTEP + 1);

  localparam fx_t K_NORM = fx_const(1.0 / ($sqrt(2.0) * VNOM));
  localparam fx_t K_1    = fx_const(1.0 / (2.0 * X0 - (8.0 / 6.0) * X0 ** 3));
  localparam fx_t K_2    = fx_const((2.0 - 4.0 * X0 ** 2) /
                                    (2.0 * W0_R - (8.0 / 6.0) * TS ** 2 * W0_R ** 3));
  localparam fx_t K_ITS  = fx_const(KW * KI * TS);
  localparam fx_t K_P    = fx_const(KW * KP);
  localparam fx_t K_W0   = fx_const(W0_R);
  localparam fx_t K_TS   = fx_const(TS);
  localparam fx_t K_2PI  = fx_const(2.0 * PI_R);
  localparam fx_t K_6    = fx_const(1.0 / 6.0);
  localparam fx_t K_24   = fx_const(1.0 / 24.0);
  localparam fx_t G0     = fx_const(X0 + X0 ** 3 / 3.0);

  fx_t rf [NREG];

  logic              busy;
  logic [STEP_W-1:0] step;

  function automatic fx_t rd(input src_e s, input fx_t regs [NREG]);
    case (s)
      C_ZERO:  return '0;
      C_ONE:   return FX_ONE;
      C_KNORM: return K_NORM;
      C_K1:    return K_1;
      C_K2:    return K_2;
      C_KITS:  return K_ITS;
      C_KP:    return K_P;
      C_W0:    return K_W0;
      C_TS:    return K_TS;
      C_2PI:   return K_2PI;
      C_6:     return K_6;
      C_24:    return K_24;
      default: return regs[ix(s)];
    endcase
  endfunction

  function automatic fx_t shape(input fx_t v, input shift_e sh);
    case (sh)
      SH_HALF:   return v >>> 1;
      SH_DOUBLE: return v <<< 1;
      default:   return v;
    endcase
  endfunction

  // dst = aa +/- ma*mb
  function automatic uop_t mac(input src_e dst, input src_e aa, input logic sub,
                               input src_e ma, input src_e mb);
    return '{ma: ma, mb: mb, aa: aa, sha: SH_NONE, use_prod: 1'b1, bb: C_ZERO,
             shb: SH_NONE, sub: sub, dst: dst};
  endfunction

  // dst = aa +/- bb, with optional shaping
  function automatic uop_t add(input src_e dst, input src_e aa, input shift_e sha,
                               input logic sub, input src_e bb, input shift_e shb);
    return '{ma: C_ZERO, mb: C_ZERO, aa: aa, sha: sha, use_prod: 1'b0, bb: bb,
             shb: shb, sub: sub, dst: dst};
  endfunction

  // the per-sample program
  uop_t u;
  always_comb begin
    case (step)
      0:  u = mac(R_AL,  C_ZERO, 1'b0, R_VG,   C_KNORM);  // alpha
      1:  u = mac(R_T,   C_ONE,  1'b1, C_K2,   R_DWQ);    // 1 - K2*dw'
      2:  u = mac(R_KD,  C_ZERO, 1'b0, C_K1,   R_T);      // K1*(1 - K2*dw')
      3:  u = add(R_T,   R_AH2, SH_NONE, 1'b1, R_AL, SH_NONE); // alpha[k-2] - alpha
      4:  u = mac(R_BE,  C_ZERO, 1'b0, R_T,    R_KD);
      5:  u = mac(R_BE,  R_BE,   1'b0, R_AL,   R_GQ);     // beta
      6:  u = mac(R_Q,   C_ZERO, 1'b0, R_AL,   R_S);
      7:  u = mac(R_Q,   R_Q,    1'b1, R_BE,   R_C);      // q
      8:  u = mac(R_IN,  R_IN,   1'b0, C_KITS, R_Q);      // integrator
      9:  u = mac(R_DW,  R_IN,   1'b0, C_KP,   R_Q);      // dw
      10: u = add(R_OM,  C_W0, SH_NONE, 1'b0, R_DW, SH_NONE); // omega
      11: u = mac(R_X,   C_ZERO, 1'b0, R_OM,   C_TS);     // x
      12: u = add(R_T,   R_TH, SH_NONE, 1'b0, R_X, SH_NONE);   // theta + x
      13: u = add(R_TS,  R_T,  SH_NONE, 1'b1, C_2PI, SH_NONE); // - 2pi
      14: u = add(R_TH,  R_T,  SH_NONE, 1'b0, C_2PI, SH_NONE); // + 2pi, wrap select
      15: u = mac(R_X2,  C_ZERO, 1'b0, R_X,    R_X);
      16: u = mac(R_X3,  C_ZERO, 1'b0, R_X2,   R_X);
      17: u = mac(R_X36, C_ZERO, 1'b0, R_X3,   C_6);
      18: u = '{ma: R_X3, mb: C_24, aa: R_X, sha: SH_HALF, use_prod: 1'b1,
                bb: C_ZERO, shb: SH_NONE, sub: 1'b0, dst: R_A1};  // x/2 + x^3/24
      19: u = add(R_G,   R_X,  SH_NONE, 1'b0, R_X36, SH_DOUBLE); // x + 2*x^3/6
      20: u = add(R_A2,  R_X,  SH_NONE, 1'b1, R_X36, SH_NONE);   // x - x^3/6
      21: u = mac(R_SN,  R_S,    1'b0, R_A2,   R_C);
      22: u = mac(R_T,   C_ZERO, 1'b0, R_A2,   R_S);
      23: u = mac(R_SN,  R_SN,   1'b1, R_A1,   R_T);      // new sine
      24: u = add(R_T,   R_S,  SH_NONE, 1'b0, R_SN, SH_NONE);
      25: u = mac(R_CN,  R_C,    1'b1, R_A1,   R_T);      // new cosine
      default: u = add(R_T, C_ZERO, SH_NONE, 1'b0, C_ZERO, SH_NONE); // commit
    endcase
  end

  // the one multiplier and the one adder/subtractor
  fx_t prod, opa, opb, res;
  always_comb begin
    prod = fx_mul(rd(u.ma, rf), rd(u.mb, rf));
    opa  = shape(rd(u.aa, rf), u.sha);
    opb  = u.use_prod ? prod : shape(rd(u.bb, rf), u.shb);
    res  = u.sub ? opa - opb : opa + opb;
  end

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      step      <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
      rf[ix(R_GQ)]  <= G0;
      rf[ix(R_C)]   <= FX_ONE;
      omega     <= '0;
      dw        <= '0;
      theta     <= '0;
      sin_th    <= '0;
      cos_th    <= FX_ONE;
      q         <= '0;
      alpha     <= '0;
      beta      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (sample_en) begin
          rf[ix(R_VG)] <= vg;
          busy     <= 1'b1;
          step     <= '0;
        end
      end else if (step == STEP_W'(NSTEP - 1)) begin
        // commit the sample
        rf[ix(R_S)]   <= rf[ix(R_SN)];
        rf[ix(R_C)]   <= rf[ix(R_CN)];
        rf[ix(R_DWQ)] <= rf[ix(R_DW)];
        rf[ix(R_GQ)]  <= rf[ix(R_G)];
        rf[ix(R_AH2)] <= rf[ix(R_AH1)];
        rf[ix(R_AH1)] <= rf[ix(R_AL)];
        omega     <= rf[ix(R_OM)];
        dw        <= rf[ix(R_DW)];
        theta     <= rf[ix(R_TH)];
        sin_th    <= rf[ix(R_SN)];
        cos_th    <= rf[ix(R_CN)];
        q         <= rf[ix(R_Q)];
        alpha     <= rf[ix(R_AL)];
        beta      <= rf[ix(R_BE)];
        out_valid <= 1'b1;
        busy      <= 1'b0;
      end else begin
        if (step == STEP_W'(14)) begin
          // wrap into [0, 2pi): theta+x-2pi if that is not negative,
          // theta+x+2pi if theta+x is negative, else theta+x
          if (!rf[ix(R_TS)][FX_W-1])   rf[ix(R_TH)] <= rf[ix(R_TS)];
          else if (rf[ix(R_T)][FX_W-1]) rf[ix(R_TH)] <= res;
          else                      rf[ix(R_TH)] <= rf[ix(R_T)];
        end else begin
          rf[ix(u.dst)] <= res;
        end
        step <= step + 1'b1;
      end
    end
  end

  // a new sample must not arrive while the previous one is computed
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !sample_en)
    else $error("pll_2s_seq: sample_en while busy");

endmodule
