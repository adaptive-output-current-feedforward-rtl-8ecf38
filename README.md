# Adaptive output-current feedforward for a four-phase VRM controller

A voltage regulator for a microprocessor with adaptive voltage positioning
(AVP) must make its output voltage follow `V_ref - R_LL * i_o`: the output
is to look like a small resistance (the load line) for both slow and fast
load changes. A feedback loop alone cannot follow a fast load step, because
its bandwidth is limited by the switching frequency. Feeding the derivative
of the output current forward into the duty cycle fixes most of the
transient, but only if the feedforward gain matches the power train, and
the gain depends mainly on the output inductance, which is known only to
tens of percent.

This RTL closes that gap with an adaptive gain. The feedforward command is
`d_ff = theta * i_ff`, where `i_ff` is the (analog-differentiated,
digitised) output-current derivative and `theta` a gain register. A gradient
law correlates the voltage error with a filtered copy of `i_ff` and
integrates the product into `theta`. A wrong gain leaves an error that is
correlated with the filtered current, and the law removes it. Once `theta`
has converged it can be frozen and kept.

The design is the digital part of the controller: sample timing, the two
converter input registers, a PID feedback controller, the adaptive
feedforward path, the summing node and a four-phase hybrid DPWM (counter,
external delay line and dither). The ADCs, the analog differentiator, the
delay line and the power stage are outside; their signals are ports.

## Operating point

| quantity | value |
|---|---|
| switching frequency `f_sw` | 372 kHz, four interleaved phases |
| controller clock | 95.2 MHz = 256 x `f_sw` (a choice of this design) |
| sample rate | 4 x `f_sw` = 1.49 MHz, one sample per phase slot (every 64 clocks) |
| sampling delay (strobe to data) | 210 ns = 20 clocks |
| computation delay (data to new duty) | 84 ns = 8 clocks |
| `v_e` converter | 10 bits, LSB 2 mV |
| `i_ff` converter | 10 bits, LSB 71 mA/us |
| DPWM | 11 bits: 8 counter + 2 delay-line + 1 dither, 1.3 ns average step |
| power train the defaults assume | 4 phases, 300 nH per phase, 12 V in, 1.2 V out, 1.5 mOhm load line |

## The adaptation loop

This is the part that needs the most care, mostly because of signs and
scaling.

**Error model.** With a feedforward gain `theta` in place of the ideal gain
1, the voltage error is

    v_e = h * (theta - 1),      h = D(s) * i_o,   D = (Z_ref + G_vi) / (1 + G_vd K)

so `v_e` is the signal `h` times the gain error. The gradient law
`d(theta)/dt = -g * h * v_e` gives `d(phi)/dt = -g h^2 phi` for the error
`phi = theta - 1`. The error therefore decays whenever `h` is non-zero, that
is, whenever the load moves. Between load steps `h` is zero and `theta` simply
stays where it is.

**Where `h` comes from.** `D(s)` factors into the feedforward filter
(already present, it produces `i_ff`) times `-Gvd/(1 + Gvd K)`, the closed
loop of power stage and feedback controller. That second factor is
approximated by a second-order low-pass and implemented as a digital filter
running on `i_ff`:

    D~(z) = alpha (z + a0) / (z^2 + b1 z + b0)
    alpha = 1/32, a0 = 1, b1 = -27/16, b0 = 49/64
    y[n+1] = 27/16 y[n] - 49/64 y[n-1] + 1/32 (x[n] + x[n-1])

Each coefficient is a short sum of powers of two, so `dtilde_filter` uses
only shifts and adds. Its poles sit at radius 0.875 and angle 0.27 rad, that
is about 4.3e5 rad/s at 1.49 MHz with damping near 0.5. The DC gain is 0.8.
These values are this design's fit and should be refitted to the actual
power stage and PID. The filter's output is `-h` (the minus sign of the
factorisation is carried along), so the law the hardware runs is

    acc += hn * v_e          (hn = filter output = -h)
    theta = acc >> G_SHIFT   (g = 2^-G_SHIFT)

**Formats.** `theta` is Q4.12 in 16 bits (4096 = 1.0, range 0 to 8). The
accumulator keeps `G_SHIFT` = 6 extra fractional bits so that small
corrections add up. `d_ff = floor(theta * i_ff / 4096)` is in duty LSBs
(1/2048 of the period). With these scalings the ideal gain of the default
power train is not 1 but

    theta_nom = (L/4) * 71 mA/us / 12 V * 2048 = 0.909  ->  3723

which is the reset value of `theta`. An inductance off by +/-30 % moves
the ideal value to about 2606..4839, well inside the range.

**Modes.** `ff_mode` selects `FF_OFF` (feedback only, `d_ff = 0`),
`FF_FIXED` (feedforward with the stored gain) or `FF_ADAPT` (gain adapted
every sample). `theta_load` writes any gain. The filter runs in every mode,
so adaptation can start at any time. In the testbenches, a +30 % or -30 %
gain error converges to within about 1 % in a few tens of load steps.

**Convergence speed and noise.** The step size scales with `h^2` and with
`g`. A larger `G_SHIFT` is slower but less sensitive to noise on `v_e`,
which the error model above does not contain. `v_e` is an integer, so the
law stops once `|h * (theta - theta_ideal)|` falls below one `v_e` LSB. This
dead band is a few tens of `theta` LSBs for typical `h`.

## Timing of one sample

`sample_ctrl` derives everything from the DPWM counter. Four times per
switching period (counter bits [5:0] = 0) it pulses `adc_sample`. It
registers both converter words 20 clocks later, and it publishes the new
duty word 8 clocks after that:

    clock  0   adc_sample  -> both ADCs sample
    clock 20   capture     -> adc_capture registers v_e, i_ff (offset binary -> signed)
    clock 21               -> PID and adaptive_ff compute (one clock each)
    clock 22               -> u_fb and d_ff ready; theta updated
    clock 28   update      -> duty = clamp(u_fb + d_ff, 0, 2047)
    clock 29               -> duty visible to the DPWM

Each DPWM phase takes the duty word at its own period start. A new word
reaches each phase within one period, and each phase gets a fresh word
every period. An assertion in the top checks that both results are ready
before `update`.

## Hybrid DPWM

`dpwm` splits the 11-bit word, from the top, into a coarse count `c`
(8 bits), a fine step `f` (2 bits) and a dither bit. The period is 256
clocks. Phase `p` starts when the counter equals `64 p`, and its output
falls `c` clocks plus `f` quarter clocks later:

* In clock `c` of its period the phase raises its launch signal.
  `dl_launch`, the OR of all phases' launches, enters the external delay
  line.
* The line returns three taps delayed by 1/4, 2/4 and 3/4 of a clock. The
  output is the phase's set register ANDed with the negation of
  "launch and tap `f-1`". For `f = 0` it ends at the clock edge itself.
* With the dither bit set, every second period gets one extra fine step.
  The average over two periods is then exactly `duty / 2048` of the period.

The falling edge is therefore asynchronous, which is the purpose of the
delay line. Two corner cases can move an edge to the start of its clock
cycle:

* two phases' edges fall in consecutive clocks, which takes a duty jump of
  about a quarter period between samples;
* a period that ends near full duty is followed by one that ends near zero.

The all-ones word cannot add its dither step and gives 2046/2048.

## Files

| file | contents |
|---|---|
| `rtl/ffa_pkg.sv` | widths, Q formats, `ff_mode_e` |
| `rtl/vr_ffa_top.sv` | top: wiring of all blocks, ports for ADCs, delay line, drivers |
| `rtl/sample_ctrl.sv` | sample, capture and update strobes |
| `rtl/adc_capture.sv` | converter input register, offset binary to two's complement |
| `rtl/pid_ctrl.sv` | velocity-form PID with clamp and anti-windup |
| `rtl/adaptive_ff.sv` | `d_ff = theta * i_ff`, wraps filter and adaptation |
| `rtl/dtilde_filter.sv` | shift-and-add filter `D~(z)` |
| `rtl/gain_adapt.sv` | gradient law, integrator and gain register |
| `rtl/duty_sum.sv` | summing node with clamp |
| `rtl/dpwm.sv` | four-phase counter + delay line + dither DPWM |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/vr_ffa_loop_tb.sv` | closed-loop load-step test with an averaged power-train model |

## What is this design's own choice

The structure follows the published method: the adaptive loop (filter,
multiplier, integrator, output multiplier), the shift-and-add filter form,
and the system around it (two converters, a PID, the summing node, and a
four-phase DPWM with counter, delay line and dither). The published
operating figures are kept: sample rate, delays, converter LSBs, 11-bit
resolution and 4 phases. Everything below was chosen here and should be
checked before use:

* the clock (95.2 MHz) and, with it, the delay counts 20 and 8;
* the filter coefficients and the adaptation gain `g = 2^-6`;
* all word widths and fixed-point formats, the clamps, and the `theta`
  reset value (derived from the power-train values above);
* the PID. Only its type is given. The gains (KP = 1, KI = 1/16, KD = 10,
  in Q.8) aim at a crossover near 50 kHz for the default power train and
  were checked only against the averaged model described below;
* the split of the DPWM bits, the tap arrangement, quarter-period
  interleaving and a single duty word for all four phases (there is no
  current sharing);
* the converter interface (10-bit offset binary, one register stage) and
  the sampling instant at the start of each phase slot.

The resolution of the DPWM is taken as 1.3 ns. That is 1/2048 of the
2.69 us period, as an 11-bit DPWM at 372 kHz requires.

Not included, because they are analog or external parts: the two ADCs, the
op-amp differentiator that makes `i_ff`, the delay line, the power stage,
drivers, sense resistor and differential sensing. The voltage error arrives
already formed: the reference voltage and the load-line term are
subtracted in the analog front end, ahead of the `v_e` converter.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. They need `--timing`, because the delay-line model uses transport
delays. For example, with Verilator 5:

    verilator --binary --timing --assert --top-module vr_ffa_top_tb \
        -y rtl -y tb rtl/ffa_pkg.sv tb/vr_ffa_top_tb.sv
    ./obj_dir/Vvr_ffa_top_tb

Replace `vr_ffa_top_tb` with any other `<module>_tb`.

`vr_ffa_top_tb` runs the top at its default parameters for about 17,600
samples (1.1 M clocks, a few seconds). It drives the converter words from a
model in which `v_e` is the floating-point-filtered current times the gain
error, plus a small bias that works the PID. It models the delay line with
transport delays. It checks:

* every duty word, bit for bit, against reference PID and feedforward
  models, and its 29-clock latency;
* the width of every PWM pulse on all four phases, in quarter clocks;
* that the gain holds in fixed mode and converges in adaptive mode from
  +29 % and -30 % errors;
* that each mechanism occurs at least once: the three modes, gain load,
  adaptation, duty clamp, dither and all four phases.

The block testbenches check each module against independent reference
models. Among them:

* `dpwm_tb` checks that the high time over two periods equals the duty
  word, for 40 words, on all phases;
* `dtilde_filter_tb` checks the filter against a floating-point model;
* `gain_adapt_tb` checks the gradient law bit for bit, and its clamps.

`vr_ffa_loop_tb` closes the loop around an averaged model of the power
train:

* four phases lumped into one inductor of 300 nH / 4, 1.2 mF with 1.2 mOhm
  ESR, 12 V in, a 1.5 mOhm load line;
* a 1.8 us pole in the current differentiator, and both converters
  quantised;
* a load that steps between 5 A and 35 A every 100 us.

The test runs the top at its defaults twice: once with the modelled
inductance 25 % above nominal and once 25 % below, so the reset gain is
wrong in both. Each case runs feedback-only mode, fixed gains at 60 % and at
160 % of the ideal gain, and then adaptive mode starting from the detuned
side. The largest error after an up-step comes out as follows:

| inductance | feedback only | gain 60 % | gain 160 % | adaptive |
|---|---|---|---|---|
| +25 % | 59 mV | 25 mV | 45 mV | 16 mV |
| -25 % | 37 mV | 16 mV | 31 mV | 12 mV |

After 48 steps the adapted gain is within about 3 % (+25 %) and 6 % (-25 %)
of the ideal gain `(L/4) * 71 mA/us / 12 V * 2048`. Most of the movement
happens in the first 20 steps. The remaining offset comes from the
approximate filter and the integer dead band. The test checks:

* that the loop settles between steps;
* that the adapted gain gives a smaller error than the other three runs;
* that the adapted gain ends within 10 % of the ideal value.

What the tests do not cover:

* a switching (non-averaged) power-stage model with ripple, and
  converter noise, so the effect of noise on the adaptation is untested;
* timing of the asynchronous DPWM edge in silicon.
