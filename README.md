# Two-sample PLL for single-phase PFC converters

A low-cost power factor corrector has to know the phase and frequency of the
grid voltage, and it samples that voltage only once per switching period.
This repository holds synthesizable SystemVerilog for a grid phase locked
loop (PLL) built for that situation: the *two-sample* (2S) PLL. It makes
the 90-degree-shifted copy of the grid voltage, which a single-phase PLL
needs, from only two stored samples. It replaces every trigonometric function
and every division with truncated series, a recursive oscillator and a
first-order correction. What is left is additions, multiplications and
one-bit shifts, few enough that the whole loop can even run on a single
multiplier and a single adder.

The default configuration tracks a 50 Hz grid sampled at 800 Hz
(Ts = 1/800 s, 16 samples per cycle). Its loop filter gains are Kp = 46 and
Ki = 1024.

## Signal flow

One grid sample passes through the loop once per sampling period:

```
 vg --> normalization --> alpha --+--> QSG --> beta --+
        x 1/(sqrt2*Vnom)          |    ^  ^           |
                                  +----|--|-----------+--> Park (q) --> PI --> dw
                                       |  |                ^   ^              |
              dw(k-1), G(k-1) ---------+--+                |   |              v
                                                  sin,cos(k-1) |     w = w0 + dw
                                                    ^          |              |
                                                    |          |          x = w*Ts
   digital oscillator <-- A1, A2 <-- series in x <--+----------+--------------+
          |                             G --> (to QSG, next sample)           |
          +--> sin_th, cos_th                                 theta += x (mod 2pi)
```

| Block | Module | What it computes |
|---|---|---|
| Normalization | `pll_normalize` | `alpha = vg / (sqrt(2)*Vnom)`, a fixed gain in place of amplitude measurement |
| Quadrature signal generator (QSG) | `pll_qsg` | `beta` from `alpha[k]` and `alpha[k-2]` |
| Phase detector | `pll_park_q` | `q = alpha*sin(theta[k-1]) - beta*cos(theta[k-1])` |
| Loop filter | `pll_pi` | `dw = 2pi*(Kp*q + sum Ki*Ts*q)` |
| Frequency and phase | `pll_vco` | `w = w0 + dw`, `x = w*Ts`, `theta = (theta + x) mod 2pi` |
| Series approximations | `pll_trig_approx` | `G ~ tan x`, `A1 ~ tan(x/2)`, `A2 ~ sin x` from `x` |
| Digital oscillator | `pll_dosc` | `sin`/`cos` of the PLL phase by recursion |
| Sequential datapath | `pll_2s_seq` | the same loop on one multiplier and one adder |
| Top | `pll_2s_top` | the loop, parallel (default) or sequential |

`pll_pkg` holds the number format and the rounded fixed-point multiply that
every block uses.

## The two-sample quadrature generator

Take `alpha = sin(phi)`, and let the phase advance per sample be
`x = w*Ts`. The sample two periods back is `sin(phi - 2x)`. A little
trigonometry gives the quadrature signal exactly:

```
beta[k] = (alpha[k-2] - alpha[k]) / sin(2x) + alpha[k] * tan(x)  =  -cos(phi[k])
```

This needs no delay to compensate and no memory beyond two samples. It does
need `1/sin(2x)` and `tan(x)`, and `x` moves with the grid frequency. The
hardware evaluates instead

```
beta[k] = (alpha[k-2] - alpha[k]) * K1 * (1 - K2*dw) + alpha[k] * G
K1 = 1 / (2*x0 - (4/3)*x0^3)                       x0 = w0*Ts (nominal)
K2 = (2 - 4*x0^2) / (2*w0 - (4/3)*Ts^2*w0^3)
G  = x + x^3/3
```

`K1` is the two-term series of `1/sin(2x0)` at the nominal frequency.
`(1 - K2*dw)` is the first-order correction of that value for the frequency
deviation `dw` that the loop filter reports. It replaces the division by a
multiplication, because `1/(1+e) ~ 1 - e`. `G` is the two-term series of
`tan(x)`. With x0 = 0.393 rad, K1 = 1.4191 and K2 = 0.0024536 s. The series
are cut after the second term, not the first, because at only 16 samples per
cycle `x` is not small.

`dw` and `G` come out of the loop *after* `beta` has been used. So the QSG
stores them and uses the values of the previous sample. This one-sample lag
breaks what would otherwise be a combinational loop. It is invisible in
steady state.

## Oscillator instead of sin/cos

The phase detector needs `sin` and `cos` of the PLL phase. A recursion
supplies them:

```
s[k] = A2*c[k-1] + (1 - A1*A2)*s[k-1]
c[k] = c[k-1] - A1*(s[k-1] + s[k])
A1 = tan(x/2) ~ x/2 + x^3/24        A2 = sin(x) ~ x - x^3/6
```

With exact coefficients this rotates `(c, s)` by exactly `x`, because
`cos x = 1 - tan(x/2)*sin(x)`. Its update matrix has determinant 1 for
*any* `A1` and `A2`. So the approximate coefficients do not make the
amplitude grow or decay; they only change the step angle to
`acos(1 - A1*A2)`. At 50 Hz that angle is 0.39262 rad instead of 0.39270.
The loop makes up the difference by running its frequency 0.025 % high, so
`omega` reads about 0.01 Hz above the grid frequency. The oscillator starts
at `s = 0, c = 1` after reset.

The middle coefficient has to be `(1 - A1*A2)`. With `(1 + A1*A2)` the
determinant becomes `1 + 2*A1*A2`, and the amplitude grows by about 7 % per
sample.

`theta` is kept separately, by summing `x` modulo 2pi. It starts in step
with the oscillator, but the two step angles differ slightly, so `theta`
drifts slowly against the oscillator and against the grid. Use `sin_th`/`cos_th` when
the phase has to be accurate. `theta` serves as a phase ramp for
applications that tolerate the drift.

## What the outputs mean at lock

The detector `q = alpha*sin(theta[k-1]) - beta*cos(theta[k-1])` equals
`cos(phi[k] - theta[k-1])` for `alpha = sin(phi)`. The loop therefore
settles with the oscillator a quarter period *ahead* of the grid sample.
After the sample update, the oscillator stands one more step further on.
In practice:

* `-cos_th` after sample `k` is the prediction of the next normalized grid
  sample, `sin(phi[k+1])`. The tests check it to within 0.03.
* `q` is the phase error signal (about the sine of the error). It is 0 at
  lock.
* `beta = -cos(phi)`, to within 0.02 at 45 to 55 Hz.
* `omega` and `dw` are in rad/s.

## Loop filter gains

The gains Kp = 46 and Ki = 1024 are applied to a result in Hz. That result
is multiplied by 2pi to give `dw` in rad/s (parameter `KW` of `pll_pi` and
`pll_2s_seq`, folded into the constants, so it costs nothing). Read this way,
the loop reproduces the published step responses:

| Grid frequency step | Peak phase error, this RTL | Published |
|---|---|---|
| 45 -> 55 Hz | 16.4 deg | peak between 15 and 20 deg (simulation) |
| 47 -> 53 Hz | 10.2 deg | 9.8 deg (measured on an FPGA) |

With the gains taken directly in rad/s (`KW = 1`), the peaks would be about
58 and 32 degrees.

In steady state the frequency shows a small ripple at twice the grid
frequency: about ±0.33 Hz at 45 Hz and less near 50 Hz. It comes from the
residual error of the series at off-nominal frequency. The mean over 100
samples is within 0.015 Hz of the grid frequency at 45, 47, 50, 53 and 55 Hz.

## Timing and interface

`pll_2s_top` ports: `clk`, `rst_n` (asynchronous, active low),
`sample_en`, `vg`, then the outputs `ready`, `out_valid`, `omega`, `dw`,
`theta`, `sin_th`, `cos_th`, `q`, `alpha`, `beta`. All data ports use the
`pll_pkg::fx_t` format.

Present a grid sample `vg`, in volts, with `sample_en` high for one clock,
once per sampling period `TS`. The clock itself may be much faster.

* **Parallel datapath (`SEQUENTIAL = 0`, default).** Every operator is its
  own circuit: 19 multipliers after synthesis. The loop is evaluated
  combinationally in the clock of `sample_en`. The outputs are registered
  and `out_valid` pulses in the next clock. `ready` is always high. The
  combinational path runs through about a dozen multipliers in series. Clock
  it slowly enough, or use the sequential form.
* **Sequential datapath (`SEQUENTIAL = 1`).** `pll_2s_seq` keeps the loop
  variables in a 26-word register file. It runs a fixed 27-step program,
  each step one rounded product and/or one addition or subtraction
  (multiply-accumulate form). The one-bit shifts are wiring. `ready` drops
  for the duration, and `out_valid` pulses 28 clocks after `sample_en`. Every
  product is rounded as in the parallel datapath, so the two are
  bit-identical, and the tests check this sample by sample. An assertion
  flags a `sample_en` while busy. This form trades the multipliers for
  registers: a coarse synthesis counts about 1200 flip-flop bits and 1000
  memory bits, against 385 flip-flop bits for the parallel form.

Number format: signed 36-bit words with 24 fractional bits, range ±2048 and
step 6e-8 (`FX_W`, `FX_F` in `pll_pkg`). The range is set by the frequency
in rad/s, which swings several hundred rad/s beyond 314 during pull-in after
reset. The step is set by `K2`. Products are rounded to nearest. Nothing
saturates.

Parameters of `pll_2s_top`: `F_NOM` (50.0 Hz), `TS` (1/800 s), `VNOM` (RMS
nominal voltage for the normalization gain, 230.0 V), `KP` (46), `KI`
(1024), `SEQUENTIAL` (0). All constants (`K1`, `K2`, the normalization
gain, `w0`, `Ts`, 2pi, 1/6, 1/24) are computed from these at elaboration.

## Where this RTL goes beyond or departs from the published description

* Word format, reset values, output registers, `ready`/`out_valid`, the
  one-clock evaluation and the sequential program are this design's own.
  The published description gives the loop's equations and block diagram,
  its gains, 50 Hz and Ts = 1/800 s, and says that one multiplier and one
  adder suffice.
* The nominal voltage of 230 V is an assumption. Only the form of the gain,
  1/(sqrt(2)*Vnom), is given.
* The QSG uses `dw` and `G` of the previous sample (see above).
* The oscillator is written with `(1 - A1*A2)`, the form that makes the
  recursion a rotation (see above).
* In the published block diagram, the two QSG products appear with their
  coefficient paths swapped, and the `x^3/24` term of `A1` carries a minus
  sign. This RTL follows the equations, which are consistent with the exact
  forms `1/sin(2x)`, `tan x`, `tan(x/2)` and `sin x`.
* The PI output is scaled by 2pi (see "Loop filter gains").
* `theta` wraps at 2pi. It also wraps upward below 0, which only a negative
  frequency would need.
* The published resource figures are for an FPGA: 238 registers, 1940 LUTs
  and 32 DSP blocks for this PLL. They are not comparable with these
  word-level counts.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/pll_pkg.sv tb/tb_pll_2s_top.sv -o sim
./obj_dir/sim
```

| Testbench | What it establishes |
|---|---|
| `tb_pll_2s_top` | Full loop at default parameters. Grid frequency levels 50, 45, 55, 47, 53, 47, 55, 45, 50 Hz, one second each. Compared with a floating-point model of the same equations (dw within 0.5 rad/s, q within 0.01; the largest difference seen is 0.03 rad/s). Checks lock at every level, the phase relations above, the published step peaks, the one-clock latency and that nothing moves between samples. Counts theta wraps, up and down steps and the sign of the QSG correction. |
| `tb_pll_2s_seq` | Sequential datapath against the parallel one: bit-identical outputs, 28-clock latency, `ready` behaviour, lock. |
| `tb_pll_qsg` | `beta` against the formula and against `-cos(phi)` at 45 to 55 Hz, including the one-sample coefficient lag. |
| `tb_pll_dosc` | Step angle `acos(1 - A1*A2)` and unit amplitude over 12000 samples. |
| `tb_pll_pi`, `tb_pll_vco`, `tb_pll_park_q`, `tb_pll_trig_approx`, `tb_pll_normalize` | Each block against its floating-point formula. |

The full-loop test runs 7200 samples in well under a second.
