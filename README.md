# Interpolator-based timing recovery for PAM/QAM receivers

A digital receiver usually samples with a free-running clock that does not
match the transmitter's symbol clock. The mismatch covers both frequency and
phase. Nothing adjusts the ADC clock. Instead, the receiver computes new
samples *between* the ones it has, at the instants it actually needs. This is
digital resampling. Two pieces decide its quality:

* the **controller**, which says which input samples to use and where the new
  sample lies between them (the *fractional interval* μ, 0 ≤ μ < 1);
* the **interpolator**, which computes the new sample from a few neighbours
  and μ.

This RTL builds both pieces in the *time base* formulation. A time base is an
accumulator that adds a step each clock and wraps at 1. It is a digital ramp
that stands for elapsed time on one side of the converter. Whenever the ramp
crosses an integer, one clock domain has passed a sample instant of the other.
The fractional part of the ramp at that moment yields μ.

The repository wires these parts into a complete **performance-analysis
circuit**. That circuit makes a known timing offset and lets a Gardner timing
recovery loop remove it. Comparing the recovered symbols with the transmitted
ones gives the modulation error ratio (MER) that the chosen interpolator
allows.

## The measurement chain

```
 clk_a = 16·Fsym                                         clk_b = 8·Fsym
 ┌──────────┐  ┌─────────────┐  ┌──────────────────┐   ┌──────────┐   ┌───────────────────────┐
 │ pam_lfsr │→ │ rc_upsampler│→ │ resampler_in     │ → │   cdc_   │ → │ timing_recovery_out   │→ strobes,
 │ PAM      │  │ RC, β=0.25, │  │ step 0.99, cubic,│   │interface │   │ time base, interp.,   │  bits
 │ symbols  │  │ 16 sps      │  │ keep every 4th   │   │ 4 regs   │   │ Gardner, loop filter  │
 └──────────┘  └─────────────┘  └──────────────────┘   └──────────┘   └───────────────────────┘
                                   3.96 samples/symbol ──────────────→ must recover 4/symbol
```

1. `pam_lfsr` produces pseudo-random PAM levels: 2, 4 or 8 levels, Gray-mapped,
   from a 23-bit LFSR (x²³ + x¹⁸ + 1).
2. `rc_upsampler` shapes them with a raised cosine:
   - roll-off 0.25;
   - group delay 10 symbols;
   - 16 samples per symbol;
   - the outer level is at ±2¹¹ on a 14-bit sample.
3. `resampler_in` is a fixed-step resampler. Its step is 0.99, so it returns
   99 samples for every 100 it takes. The shift it introduces is exactly a
   receiver clock that runs 1% slow. Every fourth output is kept, which leaves
   3.96 samples per symbol.
4. `cdc_interface` carries those samples into the receiver clock domain.
5. `timing_recovery_out` runs on clk_b = 8·Fsym:
   - it makes one interpolant every two clocks (M = 2), so 4 interpolants per
     symbol;
   - its loop must find the step 3.96 / 8 = 0.495;
   - it must also find the phase at which the symbol strobes land on the
     symbol centres.

The clocks are inputs of `perf_analysis_top`. In hardware, an FPGA clock
synthesizer makes them, with clk_b derived from clk_a at half its rate, so the
two are related but handled as asynchronous. The MER analysis runs outside the
RTL. In simulation, `tb/mer_monitor.sv` does it.

## Number formats

| quantity | format | where |
|---|---|---|
| samples, interpolants | 14-bit signed | everywhere |
| μ | 20-bit signed, sign always 0 → Q0.19 | interpolators |
| time base accumulators | 20 fraction bits + 1 MSB | `frac_gen_in`, `frac_gen_out` |
| step (Accumulator 2) | unsigned Q0.20 | `loop_processor` |
| Gardner error | 29-bit signed (full product) | `gardner_ted` |

The package `tr_pkg` holds these types, the interpolator enum and the helper
functions. The helpers compute the raised-cosine coefficients at elaboration,
using a Taylor-series sine.

## The two time bases

**Input clock time base (`frac_gen_in`, transmit side).** The accumulator
advances by Δ = 0.99 once per input sample (M = 1). An integer cross-over shows
as a change of its MSB and raises the output enable `k`. At that point the
fraction of the ramp says how far past the crossing the current sample lies,
so

    μ = 1 − frac / Δ

The division is a multiply by the constant 1/Δ = 1059167 / 2²⁰. Every input
sample shifts into a 4-sample window. A cross-over found on sample *n* is
interpolated one sample later, when the window holds the points before and
after the interval. A `k` that comes during a gap in `x_valid` is held until
the next sample arrives.

**Output clock time base (`frac_gen_out`, receive side).** This accumulator
runs on the receiver clock and adds `step + phase` every enabled clock. The
sum is clamped to [0, 1). An MSB change means the ramp has passed the next
input sample. It raises the *input* enable `m`, which pops a sample from the
interface into the window. μ is simply the fraction, truncated to 19 bits.
The output enable `k` comes every M = 2 clocks. With step = 0.495, the window
therefore advances 0.99 samples per interpolant.

## Interpolators

All three are combinational, saturate to 14 bits, and expect the window as
x[m−1], x[m], x[m+1], x[m+2] with the basepoint at x[m].

* **`interp_linear`**: y = x[m] + μ·(x[m+1] − x[m]), one multiplier.
* **`interp_parabolic`**: the piecewise-parabolic filter with α = ½, in Farrow
  form (y = (v₂μ + v₁)μ + v₀). The coefficients are doubled so that they are
  ±1 and 3, and the result is halved with rounding.
* **`interp_cubic`**: the cubic Lagrange filter in Farrow form, with three
  multipliers by μ in cascade. Its coefficients are scaled by 6, so they become
  0, ±1, ±2, ±3 and ±6: shifts and adds. The division by 6 at the end is a
  right shift and a multiply by 21845/2¹⁶ ≈ ⅓.

  Each row of the coefficient matrix has to sum so that μ = 0 returns x[m].
  Only the value −½ (×6 = −3) for the x[m−1] tap of the μ¹ term is consistent
  with the Lagrange formula, and this design uses it.

Each multiplier stage keeps 4 guard bits. The testbenches find the results
within 2 LSB of the exact real-valued formulas over the full input range.

## Timing recovery loop

`gardner_ted` counts the interpolants modulo 4. Count 2 is the mid-symbol
sample; count 0 is the strobe. At each strobe it forms

    e = y_mid · (y_prev_strobe − y_strobe)

For one PAM rail this is the Gardner detector. The error is zero on average
when the strobes sit on the symbol centres and the midpoints on the
transitions. A positive error means the strobes are early.

`loop_processor` is a proportional-integral filter updated once per symbol:

* the **integral** part adds e·2^−K2 (rounded) to Accumulator 2. That
  accumulator is the step. It starts at 0.5 and is clamped to [0, 1).
* the **proportional** part adds e·2^−K1 (rounded) to the time base for one
  clock only. It is a phase kick and is clamped to ±½.

Rounding both shifts matters. With plain truncation the integral term has a
−½ LSB bias per symbol, which at K2 = 16 drags the step measurably low.

The defaults K1 = 8, K2 = 16 are this design's choice, found by simulation.
With them, the loop pulls in from step 0.5 across the 1% offset and settles at
0.49500. Pull-in is the loop's weak spot at these gains. The proportional path
can move the phase only about 0.015 sample per symbol, while the offset drifts
0.04 sample per symbol. Acquisition therefore relies on the slow integral
path and can take thousands of symbols. Wider gains (K1 = 6, K2 = 13) lock
within 3000 symbols in the receiver test, at the cost of more jitter. The multi-level
PAM runs need them: their larger error variance makes the narrow loop drift.
K1 ≥ 9 does not pull in at all from 0.5.

## Clock domain interface and stalls

`cdc_interface` is a circular buffer of `DEPTH` registers. The default is
four; the general-purpose resampler below uses eight. It has:

* a write counter in clk_a;
* a read counter in clk_b;
* the write counter crosses into clk_b as Gray code through two flip-flops.

`wait_o` is high when no unread sample is visible. It has hysteresis: after
reset, or after the buffer has run empty, it stays high until two registers
are filled. This keeps the reader from sitting right behind the writer.

The receiver reads at a rate the loop itself sets, so it sometimes asks for a
sample that has not arrived yet. That is normal, because the two clocks are
handled as unrelated. This design turns `wait` into a clock enable for the
*whole* receiver: the time base, the interpolator pipeline, the TED and the
loop filter all freeze. Time then never advances without data, and no sample
is used twice. In a 20000-symbol run, `wait` is high on about 600 receiver
clocks; the MER is unaffected.

The writer has no back-pressure. A writer persistently faster than the reader
overruns the registers. In this circuit the reader's average rate is
locked to the writer's, so it does not happen once the loop is locked.

## General-purpose resampler

`resampler_out` is a stand-alone asynchronous rate converter. It takes
samples on one clock (`clk_in`) and produces them at a rate tied to another
(`clk` = M·F_out, M = 2). It does not know the rate ratio; a PLL finds it.

* **Input ramp.** An 8-bit counter in the `clk_in` domain counts the samples
  that arrive. It crosses into `clk` as Gray code through two flip-flops.
  Samples cross through a `cdc_interface` with eight registers.
* **Output ramp.** A `frac_gen_out` runs on `clk` and adds `step + phase`
  each clock. Each integer cross-over pops one sample into the cubic
  interpolator's window. Its fraction is μ, with no division.
* **PLL.** The error is input ramp − output ramp − 2 samples. It drives a
  `loop_processor` that runs every clock with narrow gains (K1 = 9, K2 = 20).
  The step settles at F_in / (M·F_out). The 2-sample lag keeps the output
  ramp behind the samples that have already crossed the interface.
* **Output.** `y` with `y_valid` every M clocks. `locked` goes high once the
  ramp error has stayed within 1.25 samples for 4096 clocks.

The loop is narrow so that the one-sample steps of the integer input ramp do
not show in the output. With only eight registers of slack, acquisition must
start near the right ratio. `STEP_INIT` is that starting value; the default
17/20 suits a 10/17 rate ratio.

`perf_analysis_top` instantiates it beside the measurement chain. It has its
own clocks and `asrc_*` ports and shares nothing with the chain.

## Results

Noise-free, 2-PAM, roll-off 0.25, 10-symbol group delay:

| configuration | MER |
|---|---|
| cubic, K1/K2 = 8/16 (default top) | 47.0 dB, step 0.49500 |
| cubic, 8/15 | 41.3 dB |
| parabolic, 8/15 | 35.4 dB |
| linear, 8/15 | 33.5 dB |
| cubic, 4-PAM, 6/13 | 34.9 dB |
| cubic, 8-PAM, 6/13 | 35.9 dB |

The general-purpose resampler was tested on a sine of 0.05 cycles per input
sample. At a rate ratio of 10/17 (step 0.8458) the output matches a fitted
sine to 66.7 dB. At 10/3 (step 0.1493) it matches to 69.9 dB. Both steps are
within 0.1% of the ratio of the clock periods, and the interface never
waited once the loop had locked.

The default cubic configuration lands close to what an FPGA implementation of
this circuit is reported to reach, about 47.5 dB. Published floating-point
simulations put the cubic interpolator about 20 dB ahead of the linear one.
Here the gap is about 8 dB. In this fixed-point loop, strobe jitter from the
loop filter sets a floor that hides part of the interpolator's advantage.
Narrower gains lower the floor but pull in more slowly. The MER figures are
therefore a property of interpolator *and* loop together.

## Departures and open points

* Receiver clock: 8·Fsym (F_c/2) with M = 2. A clock of F_c/4 with M = 1
  would also give 4 interpolants per symbol. The 8·Fsym choice avoids
  incommensurate clocks.
* Loop gains, initial step, clamps and rounding are this design's choices.
* The LFSR polynomial and seed are this design's choices.
* Only one rail (the in-phase component) is carried. A square QAM
  constellation reduces to PAM on each rail; a full QAM receiver would need a
  second interpolator and the Q term of the Gardner detector.
* The resampler on the transmit side supports only M = 1 (one clock per input
  sample). The more general input-clock resampler with a PLL that tracks an
  unknown rate is not included. The output-clock resampler with a PLL is
  included (`resampler_out`). It has the interface on its input side only; its
  outputs leave with a valid flag on its own clock, not through a second
  interface onto an output clock.
* The clock synthesizer and the logic analyser / MER computation are outside
  the RTL.

## Files

`rtl/` has one module per file. Every module has defaults for all
parameters.

| module | role |
|---|---|
| `tr_pkg` | types, widths, interpolator enum, elaboration-time math |
| `pam_lfsr` | PAM symbol source |
| `rc_upsampler` | RC pulse shaping, ×16 (coefficients computed at elaboration) |
| `frac_gen_in` | input clock time base |
| `resampler_in` | fixed-step cubic resampler + ÷4 |
| `cdc_interface` | clock domain crossing, `DEPTH` registers (4 by default) |
| `frac_gen_out` | output clock time base |
| `interp_linear`, `interp_parabolic`, `interp_cubic` | interpolators |
| `gardner_ted` | timing error detector |
| `loop_processor` | PI loop filter |
| `timing_recovery_out` | receiver: time base + interpolator + TED + loop |
| `resampler_out` | general-purpose resampler, output ramp locked by a PLL |
| `perf_analysis_top` | the whole chain, with `resampler_out` beside it |

Main parameters of the top:
- `INTERP` (`INTERP_LINEAR`, `INTERP_PARABOLIC`, `INTERP_CUBIC`)
- `PAM_BITS` (1 to 3)
- `K1`, `K2`
- `RS_STEP`, `RS_INV` (the transmit-side step and its reciprocal, in Q0.20)
- `STEP_INIT`

The RC roll-off and length are parameters of `rc_upsampler` (`BETA`, `SPAN`).

## Simulation

Every testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if
something hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/tr_pkg.sv \
    tb/tb_perf_analysis_top.sv --top-module tb_perf_analysis_top -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one.

* `tb_perf_analysis_top` runs the top at its defaults for 20000 symbols, which
  takes a few seconds. It checks that:
  - the step converges to 0.495;
  - MER exceeds 44 dB;
  - all decisions are correct;
  - the interpolant and strobe rates are right;
  - each mechanism actually occurred: skipped interpolants in the resampler,
    skipped input enables in the receiver, interface waits, both error signs
    and step updates;
  - the general-purpose resampler beside the chain locks at the right step,
    does not wait once locked and produces the right number of outputs.
* `tb_perf_workloads` runs five tops side by side: cubic, linear and parabolic
  for 2-PAM, and cubic for 4-PAM and 8-PAM. It checks MER floors and the
  ordering of the interpolators.
* The other testbenches check one module each against an independent model:
  - the interpolators, against exact real-valued formulas;
  - the time bases, against a real-valued ramp;
  - the LFSR, against the bit recurrence;
  - the RC filter, against the analytic pulse;
  - the interface, for in-order, loss-free transfer between unrelated clocks;
  - the receiver alone, for closed-loop lock on an analytically generated RC
    signal;
  - the general-purpose resampler, at two rate ratios, against a fitted sine.
