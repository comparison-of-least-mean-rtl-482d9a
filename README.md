# Fractional-N frequency synthesizer with an adaptive spur canceller

A fractional-N synthesizer makes an output frequency that is a non-integer
multiple of its reference, `F_out = (N + alpha) * F_ref`, by dividing the
oscillator sometimes by N and sometimes by N+1. A delta-sigma modulator picks
the ratio for each reference period, so the ratio is right on average but
wrong in every single period. The divided clock therefore carries a
periodic phase error. The phase detector sees it, the loop filter passes part
of it to the oscillator, and it shows up as fractional spurs around the
carrier.

The modulator knows the error it is making: its accumulator holds the
accumulated quantization error. This design puts a single-tap adaptive filter
between the phase detector and the loop filter. The filter learns how much of
the measured phase error follows the modulator's accumulator and subtracts
that part, so the loop filter sees less of the pattern. Five adaptation rules
can be selected at run time: LMS, normalised LMS (NLMS), sign-error,
sign-data and sign-sign.

Default operating point: 50 MHz reference, N = 100, alpha = 0.3 and output
5.015 GHz. The oscillator has a 5.1 GHz quiescent frequency and a
sensitivity of 1 GHz/V. The loop filter has Kp = 0.21 and Ki = 0.04. The
canceller has one weight, step size 0.03 (0.5 to 1.2 for the step-size
sweep) and no leakage.

## Signal flow

```
            ref_i (50 MHz square)
              |
              v
   +--------------------+  perr (ticks,   +-----------------+  e = d - w*u   +----------------+
   | pfd                |  once per       | lms_canceller   |--------------->| lms_en_i switch|
   | sampled PFD on clk |---------------->| d = perr        |                |  1: e  0: d    |
   | (5 GHz)            |  comparison     | u = modulator   |    d --------->|                |
   +--------------------+                 |     error       |                +-------+--------+
      ^   | ref edge                      +-----------------+                        |
      |   v                                      ^ u                                 v
      |  +----------------+  state ---------------+                          +----------------+
      |  | delta_sigma    |                                                  | loop_filter    |
      |  | acc += frac    |  carry                                           | ZOH, low-pass, |
      |  | mod 10         |------------+                                     | PI, x 0.05 V   |
      |  +----------------+            |                                     +-------+--------+
      |                                v                                             | tune (V)
      |   div_o            +--------------------+        vco_clk           +---------v--------+
      +--------------------| frac_divider       |<--------------------------| vco_model        |
                           | N or N+1 (swallow) |                           | 5.1 GHz + 1 GHz/V|
                           +--------------------+                           +------------------+
                                                  freq_estimator: counts vco_clk per 100 ref periods
```

There are two clock domains:

* `clk` is the sampling clock, 5 GHz (200 ps). The phase detector, modulator,
  canceller and loop filter run on it. The phase detector resolves time in
  units of this clock, called *ticks* below.
* `vco_clk` is the oscillator output, about 5.015 GHz. The divider and the
  frequency estimator run on it.

Three single-bit signals cross between the domains, each through two
flip-flops: the divided clock into `clk`, and the carry and the reference
into `vco_clk`. The carry changes once per reference period, and the divider
reads it half a divider period away from the moment it changes.

## The canceller (`lms_canceller`)

This is the part that needs the most care.

**What is correlated with what.** When the divider runs one oscillator cycle
long, the divided edge comes one oscillator period late. Summed over the
modulator's steps, the extra cycles minus alpha equal minus the change in
the accumulator, divided by the modulus. So the timing error of comparison
k is a linear function of the accumulator value that step k started from.
That value is the modulator's `state_o` output (the value after the unit
delay). The modulator is stepped on the same reference edge the detector
compares. By the time the comparison result is ready, `state_o` holds the
value that matches it.

**Reference input with its mean removed.** The top feeds the canceller with
`u = (state - 4.5) / 10`, so `u` lies in -0.45 to +0.45. A reference with a
constant part is harmful here. The weight can then cancel the constant part
of the phase error as well, which works against the loop's integrator. In
simulation, the raw state without the NLMS offset described below drove the
loop out of lock with NLMS at mu = 0.5.

**Update rules** (`algo_i`, see `lms_algo_e` in `fnsynth_pkg`). The error is
`e = d - w*u`. It is both the output to the loop and the adaptation error.
The rules are:

| `algo_i` | rule        | weight step                     |
|----------|-------------|---------------------------------|
| 0        | LMS         | `mu * e * u`                    |
| 1        | NLMS        | `mu * e * u / (u*u + 0.25)`     |
| 2        | sign-error  | `mu * sign(e) * u`              |
| 3        | sign-data   | `mu * e * sign(u)`              |
| 4        | sign-sign   | `mu * sign(e) * sign(u)`        |

With one tap, NLMS without an offset reduces to `mu * e / u`, which grows
without bound as `u` approaches zero. The offset 0.25 (parameter `EPS`)
limits the gain `u / (u*u + EPS)` to at most 1.

**Timing.** `e_o` is registered, one `clk` cycle after the detector's
`perr_valid`. The four multiplier-only rules update the weight in that
same cycle. NLMS uses a restoring divider that produces one quotient bit per
cycle, so its weight update lands 65 cycles after the sample. Meanwhile
`busy_o` is high. At 5 GHz sampling and a 50 MHz reference there are 100
cycles per comparison. An assertion fires if an NLMS sample arrives while
the divider is busy. That happens if the reference is raised above about
75 MHz at this sampling rate.

## Phase detector (`pfd`)

The detector works like the classic two-flip-flop PFD, in sampled form.
The UP flag is set by the inverted reference, and the DN flag by the divided
clock. When both flags are high, their NAND clears both flags one sample
later, so they overlap for exactly one sample. `pd_o = UP - DN`. The
reference is inverted at the input, so a comparison is triggered by the
reference's falling edge. Both inputs pass a two-flop synchronizer first.

The canceller and the loop filter want one number per comparison, not a
pulse train. The detector therefore also sums `UP - DN` between clears, and
on each clear it outputs the sum as `perr_o`, with `perr_valid_o` high for
one cycle. `perr_o` is the phase error in ticks, positive when the reference
leads. It is what a time-to-digital converter with 200 ps resolution would
report.

## Loop filter and loop gain (`loop_filter`)

The filter runs once per comparison and has three stages:

1. **Hold.** The sample is held between comparisons (zero-order hold).
2. **First-order IIR low-pass.** `lp += (x - lp) / 2`, a pole at z = 0.5,
   which puts the cutoff near 5.5 MHz at the 50 MHz update rate.
3. **PI filter.** `H(z) = Kp + Ki z^-1 / (1 - z^-1)` with Kp = 0.21 and
   Ki = 0.04. The integrator adds its previous value.

The PI output is in ticks. It is multiplied by `KDCO` = 0.05 V/tick to give
the oscillator control word. With that factor, one unit of filter output
moves the divided period by one tick:
`5.015 GHz^2 * 200 ps / 100.3 = 50 MHz`, which is 0.05 V at 1 GHz/V. The
loop gain is then one. The usual second-order formulas then hold:

* natural frequency `wn = F_ref * sqrt(Ki)` = 10 Mrad/s (1.6 MHz)
* damping `Kp / (2 sqrt(Ki))` = 0.525

The low-pass passes everything up to well above 100 kHz. Its cutoff is kept
above the 1.6 MHz loop bandwidth on purpose. A behavioural check of the
sampled loop showed that a low-pass with a cutoff near 100 kHz inside the
loop makes it unstable, with the same gains.

## Modulator and divider (`delta_sigma`, `frac_divider`)

`delta_sigma` is a first-order accumulator with an integer modulus. On each
step it adds the fractional word. If the sum reaches `MODULUS` it sets
`carry` and keeps the remainder. With the default modulus 10 and word 3,
alpha is exactly 0.3 and the carry pattern repeats every 10 reference
periods. The fractional spurs therefore sit at multiples of 5 MHz. For a
binary accumulator, set `MODULUS = 2**ACC_W`.

`frac_divider` is a pulse-swallow divider. A divide-by-N counter on the
oscillator clock skips one count ("swallows a pulse") in a period in which
the carry is set. That period is then N+1 cycles long. The swallow is a held
count, not a gated clock. The carry is sampled at the middle of each
divider period. The divided clock is high for the first N/2 counts, and its
rising edge comes at the counter wrap.

## Oscillator model (`vco_model`)

`vco_model` is a behavioural model and cannot be synthesized. It toggles its
output after a real-valued half period computed from the control word at
every edge:

* `f = 5.1 GHz + 1 GHz/V * v`
* `f` is clamped to 4.797 to 5.163 GHz
* the output is held low while `en_i` (tied to `rst_n` in the top) is low

It has no phase noise. The only jitter in simulation comes from the loop
itself.

## Fixed-point formats

| signal                                    | format                                   |
|-------------------------------------------|------------------------------------------|
| phase error per comparison `perr_o`       | signed 12-bit integer ticks              |
| canceller and loop-filter samples, weight | signed Q12.12 (24 bits), `fnsynth_pkg::sample_t` |
| step size `mu_i`, Kp, Ki, KDCO            | unsigned Q4.12 (16 bits), `gain_t`       |
| Kp, Ki, KDCO values                       | Kp = 860, Ki = 164, KDCO = 205, i.e. 0.20996, 0.04004, 0.05005 |
| oscillator control `tune_o`               | signed Q8.16 volts                       |

Products are formed at full width and then shifted back, which rounds toward
minus infinity. The canceller weight saturates. The loop-filter integrator
does not saturate; it stays far from its range in locked operation.

## How it behaves

Two closed-loop testbenches exist. Each configuration in them starts from
reset with the oscillator at 5.1 GHz. It settles for 300 (or 600) reference
periods and is then measured for 200. The loop pulls in and locks in every
configuration: the frequency estimate reads 10030, i.e. 5.015 GHz. The
measured spur is the largest fractional component of the oscillator's
frequency: the peak deviation of the control word at multiples of 5 MHz,
expressed in frequency.

**Default sizes** (`tb/fnsynth_top_tb.sv`, 5 GHz sampling, 200 ps ticks).
All 18 configurations are printed; a selection:

| configuration  | mu   | RMS phase error into loop filter (ticks) | largest fractional FM spur | p-p period jitter |
|----------------|------|------------------------------------------|----------------------------|-------------------|
| canceller off  | -    | 0.31                                     | 1089 kHz                   | 0.44 ps           |
| LMS            | 0.03 | 0.25                                     | 569 kHz                    | 0.39 ps           |
| LMS            | 1.0  | 0.25                                     | 371 kHz                    | 0.38 ps           |
| NLMS           | 1.0  | 0.21                                     | 485 kHz                    | 0.40 ps           |
| sign-error LMS | 1.2  | 0.40                                     | 1869 kHz                   | 0.46 ps           |

At this sampling rate one tick (200 ps) is about one oscillator period. That
is as large as the whole fractional error the modulator causes. The weight
therefore has little to learn from, and the canceller gains only a factor of
two to three. The sign-error rule, whose step does not shrink with the
error, makes the spur worse.

**Ten times finer detector** (`tb/fnsynth_fine_tb.sv`: 50 GHz sampling,
20 ps ticks, `KDCO` scaled by 1/10 so the loop dynamics are unchanged). The
modulator's error now spans about ten ticks, and the canceller does what it
is meant to do:

| configuration  | mu   | RMS phase error into loop filter (ticks) | largest fractional FM spur | p-p period jitter | weight |
|----------------|------|------------------------------------------|----------------------------|-------------------|--------|
| canceller off  | -    | 3.05                                     | 1290 kHz                   | 0.19 ps           | -      |
| LMS            | 0.03 | 0.79                                     | 296 kHz                    | 0.07 ps           | -8.4   |
| NLMS           | 0.03 | 0.50                                     | 36 kHz                     | 0.03 ps           | -9.7   |
| LMS            | 1.0  | 0.51                                     | 44 kHz                     | 0.04 ps           | -9.7   |
| NLMS           | 1.0  | 0.53                                     | 51 kHz                     | 0.04 ps           | -9.6   |
| sign-sign LMS  | 0.5  | 0.61                                     | 65 kHz                     | 0.06 ps           | -10.0  |

The weight converges to about -10 ticks per unit of `u`. That is one
oscillator period (ten 20 ps ticks) per unit of `u`, the gain the divider
arithmetic above predicts. The sign is negative because a late divided edge
gives a negative phase error.
The spur falls by 25 to 30 dB.

Read these numbers as evidence that the mechanism works. They are not a
noise analysis: the oscillator model has no phase noise, and the spur is
measured at the control word rather than in an output spectrum.

## Where this design departs from the system it implements

* The detector's per-comparison sum (integrate-and-dump) stands in for a
  time-to-digital converter. The canceller and the loop filter run once per
  reference period instead of on every sample.
* The weight adapts on the canceller's own output, which is the loop
  filter's input. Adapting on the loop filter's output, which the original
  description also mentions, would need a filtered-error LMS and is not
  built.
* The canceller's reference has its mean removed, and NLMS has an offset of
  0.25. Both were added for stability, as explained above.
* The low-pass in the loop filter is first order, with its cutoff above the
  loop bandwidth.
* The loop-gain scale `KDCO` is a choice of this design.
* The divider samples the carry at mid-period rather than on the reference
  edge.
* The modulus-10 accumulator is a choice of this design.
* The original system-level study reported output frequencies between
  4.797 and 5.138 GHz for this operating point, along with SNR and spur
  levels in dBc. This loop locks at the nominal 5.015 GHz. None of those
  figures is reproduced here.
* Not built: the reference oscillator (an input port here) and a jitter
  meter. The testbench measures period jitter with simulation time instead.

## Files

| file | contents |
|------|----------|
| `rtl/fnsynth_pkg.sv` | formats, `sample_t`, `gain_t`, `lms_algo_e` |
| `rtl/pfd.sv` | sampled phase-frequency detector with per-comparison error |
| `rtl/delta_sigma.sv` | accumulator modulator |
| `rtl/frac_divider.sv` | pulse-swallow N / N+1 divider |
| `rtl/loop_filter.sv` | hold, IIR low-pass, PI, scaling to volts |
| `rtl/lms_canceller.sv` | single-tap canceller, five update rules, NLMS divider |
| `rtl/freq_estimator.sv` | oscillator-cycle counter over 100 reference periods |
| `rtl/vco_model.sv` | behavioural oscillator |
| `rtl/fnsynth_top.sv` | the closed loop |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `fnsynth_fine_tb` |

Every RTL file except `vco_model.sv` is synthesizable. The synthesizable
part of the top is everything except the oscillator instance.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/fnsynth_pkg.sv \
    tb/fnsynth_top_tb.sv --top-module fnsynth_top_tb
./obj_dir/Vfnsynth_top_tb
```

Replace `fnsynth_top` by `fnsynth_fine`, `pfd`, `delta_sigma`, `frac_divider`,
`loop_filter`, `lms_canceller`, `freq_estimator` or `vco_model` to run a
block's own testbench. The default-size run simulates 180 us and takes
about a second; the fine-detector run takes about six seconds.

To change the operating point, drive `n_i` and `frac_i` differently, or
change `MODULUS` in the top. If you change the sampling-clock period, scale
the top's `KDCO` parameter in proportion to it. That keeps the loop gain at
one. Also check that `PE_W` still holds a whole reference period in ticks.
