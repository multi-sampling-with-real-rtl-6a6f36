# Multi-sampling, real-time-update PWM voltage controller for a three-phase converter

A digitally controlled voltage-source converter reacts late: the output
voltage is sampled, the controller computes a new modulation wave, and the PWM
only acts on it later. In a classic scheme the new value is held back until
the next sampling instant (computation delay), and the pulse-width modulator
adds half a sampling period on average (PWM delay). This delay limits how far
the voltage-loop gain can be raised before the loop goes unstable.

This RTL implements the remedy of sampling several times per switching period
and **loading every new modulation value into the PWM comparators the moment
it is ready**, wherever the carrier happens to be. With N samples per
switching period T_sw and an update latency T_update (sampling instant to new
compare value), the average digital delay becomes

    T_digital = 0.5*T_sw/N + T_update

instead of 1.5*T_sw/N for multi-sampling with an update deferred to the next
sampling instant. The update latency is therefore the number to minimise, and
that is why the whole voltage loop (ADC read-out, Clarke transform, resonant
controllers, inverse transform, PWM) sits in the FPGA: at the defaults the
latency is 2.18 us, of which 2.0 us is the analog-to-digital conversion
itself.

Default operating point: 10 kHz switching, 8 samples per switching period
(T_sa = 12.5 us), 50 Hz output, 100 MHz FPGA clock.

## One control cycle

```
 sampling instant (8 per T_sw, first at the carrier valley)
   |
   v
 carrier_gen --sample_tick--> ads8568_if ---u_a,u_b,u_c---> clarke
                                                              |
             ref_alpha, ref_beta (from the supervisory CPU)   | u_alpha, u_beta
                          |                                   v
                          +-------> resonant_ctrl x2 (alpha, beta) <-- rc_gain
                                             | u'_e alpha, beta
                                             v
                                        inv_clarke ---m_a,m_b,m_c---> rtu_pwm --> pwm[2:0]
                                                                   ^
                                           carrier ----------------+
 latency_mon: sampling instant -> modulation update, in clock cycles
```

Cycle budget at the defaults, counted from the sampling instant:

| step | cycles | what happens |
|---|---|---|
| CONVST pulse | 3 | converter samples all three channels at once |
| conversion | ~200 | converter BUSY high for 2 us |
| BUSY synchroniser | 2 | two flip-flops on the asynchronous BUSY |
| read-out | 9 | three RD_n pulses (2 low, 1 high) on the 16-bit bus |
| Clarke | 1 | abc to alpha-beta |
| resonant controllers | 3 | both axes in parallel |
| inverse Clarke and limit | 1 | three modulation waves |
| compare load | same cycle | rtu_pwm loads the new values when `mod_update` is high |

The end-to-end testbench measures 218 cycles (2.18 us), well inside
T_sa = 1250 cycles. Processing after the conversion takes 15 cycles (0.15 us).

## Real-time update PWM (`rtu_pwm`)

`carrier_gen` produces a symmetric triangle counting 0 to HALF = 5000 and
back over PERIOD = 10000 cycles; 0 stands for modulation -1 (valley) and HALF
for +1 (peak). A Q1.15 modulation value m becomes the compare value

    cmp = ((m + 32768) * HALF) >> 16

and each leg output is the registered result of `cmp > carrier`. So m = -1
keeps the leg low and m close to +1 keeps it high except right at the peak.
With a constant m the leg is high for 2*cmp - 1 cycles per period.

The key part is when `cmp` changes. It is written in the very cycle
`mod_valid` is high. It does not wait for the next carrier peak or valley,
nor for the next sampling instant. As a result the effective modulation of a
period can come from up to two successive updates, depending on where the
modulation wave crosses the carrier. Averaged over a fundamental period, this
gives the delay formula above. No extra logic suppresses multiple crossings
in one carrier half-period. Dead time and complementary gate signals are
left to the power stage.

## Resonant voltage controller (`resonant_ctrl`)

Each axis runs the controller Kr*s/(s^2 + w0^2), discretised with the Tustin
transform pre-warped at w0 = 2*pi*50 rad/s:

    G(z) = b (1 - z^-2) / (1 - a z^-1 + z^-2)
    b = Kr sin(w0 T_sa) / (2 w0),   a = 2 cos(w0 T_sa)

which gives the difference equation, evaluated once per sampling period:

    e(k) = u_ref(k) - u_meas(k)
    y(k) = b (e(k) - e(k-2)) + a y(k-1) - y(k-2)

- `a` is a parameter. It is computed at elaboration from F0 and TSA, and the
  top derives TSA from its switching frequency and sampling rate.
- `b` is the run-time input `rc_gain`, so the resonant gain can be swept
  without rebuilding. `msrtu_pkg::rc_gain_coef(kr, f0, tsa, scale)` computes
  it. For Kr = 84000 at the defaults, b is about 0.525.

Fixed point:

- The error is in ADC codes, and the coefficients have 29 fractional bits
  (range +-4).
- The state y is a 48-bit register holding 16 bits below the Q1.15 output
  LSB. Products are truncated.
- The state saturates at the register limits instead of wrapping.
- The output is the state's upper bits, limited to +-1. `rc_sat` flags when
  the limit acts.
- There is no anti-windup. The state keeps integrating while the output is
  limited, as a plain resonant controller does.

The scaling from volts to modulation is not fixed by this design. The
converter's DC-link voltage and the ADC gain are folded into `b` (the `scale`
argument). With scale = 1, a full-scale ADC code corresponds to modulation 1.

Because the poles lie on the unit circle, a 50 Hz error makes the output
grow without bound (about Kr/2 x error amplitude per second), while a DC
error produces a bounded 50 Hz output of about Kr/w0 x error. The controller
testbench checks both.

## Frame transforms (`clarke`, `inv_clarke`)

The loop runs in the stationary alpha-beta frame. The transforms are the
amplitude-invariant ones:

    u_alpha = (2u_a - u_b - u_c)/3,   u_beta = (u_b - u_c)/sqrt(3)
    m_a = u_alpha,  m_b = -u_alpha/2 + (sqrt(3)/2) u_beta,  m_c = -u_alpha/2 - (sqrt(3)/2) u_beta

The constants have 18 fractional bits and the results are rounded to nearest.
Results are saturated to 16 bits. There is no zero-sequence injection, so a
balanced modulation saturates once its phase amplitude exceeds 1.

## ADC interface (`ads8568_if`)

The three output voltages are digitised by an ADS8568 (16-bit, two's
complement, parallel bus). At each sampling instant the controller does the
following:

1. It pulses CONVST for 3 cycles.
2. It waits for the synchronised BUSY to rise, or for a 16-cycle time-out,
   and then to fall.
3. With CS_n low, it pulses RD_n once per channel and latches each word on
   the last low cycle. Channels 0, 1 and 2 are phases a, b and c.

A sampling instant that arrives while a conversion is still in progress is
ignored and pulses `adc_missed`. `latency_mon` then reports an `overrun`,
because no update followed the previous sampling instant.

## Monitoring (`latency_mon` and top-level outputs)

`update_latency` is the cycle count from each sampling instant to the
modulation update, and `update_latency_max` holds the largest value since
reset. Together they show directly whether the control cycle fits in T_sa.
The top also brings out:

- the measured alpha-beta voltages;
- the modulation waves and compare values;
- the carrier and sampling index;
- the limit flags and an update counter.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `msrtu_vsc_top` | `CLK_HZ_P` | 100 000 000 | clock frequency (assumed) |
| `msrtu_vsc_top` | `FSW_HZ_P` | 10 000 | switching frequency |
| `msrtu_vsc_top` | `N_SAMPLE_P` | 8 | samples and updates per switching period; must divide CLK_HZ_P/FSW_HZ_P |
| `resonant_ctrl` | `F0`, `TSA` | 50 Hz, 1/(FSW*N) | resonance frequency and sampling period |
| `resonant_ctrl` | `YF`, `ACC_W` | 16, 48 | extra state precision, state width |
| `ads8568_if` | `CONVST_CYC`, `RD_LO_CYC`, `RD_HI_CYC`, `BUSY_RISE_CYC` | 3, 2, 1, 16 | bus timing in clock cycles |

Shared widths and the coefficient helpers are in `rtl/msrtu_pkg.sv`.

## What follows the published method and what is this design's own

These parts follow the published method and its experiment:

- the scheme itself: several samples per switching period, with each result
  applied immediately;
- the voltage loop placed in the FPGA, using a resonant controller discretised
  by Tustin with pre-warping;
- the operating point: 10 kHz, N = 8, 50 Hz, 2 us conversion and the 2.2 us
  latency target;
- the first sampling instant at the carrier valley;
- the leg high while the modulation is above the carrier.

These parts are this design's choices:

- the 100 MHz clock;
- all word widths, rounding and saturation;
- the amplitude-invariant transforms and the plain +-1 limit;
- the ADS8568 bus sequence and timing, and the channel assignment;
- the handling of missed sampling instants;
- folding the volt-to-modulation scaling into the gain;
- sampling the reference once per control cycle;
- asynchronous active-low reset everywhere.

Not included:

- the analog chain (voltage sensor and gain amplifier);
- the converter chip itself (a behavioural model is in `tb/ads8568_model.sv`);
- the supervisory processor that supplies `ref_alpha`, `ref_beta` and
  `rc_gain`;
- the power stage;
- the baseline schemes the method is compared with (deferred update, and
  control on the processor).

## Simulating

Every file starts with a comment describing its module. Each module has a
self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog if it
hangs. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module msrtu_vsc_top_tb \
  -y rtl -y tb +libext+.sv rtl/msrtu_pkg.sv tb/msrtu_vsc_top_tb.sv
./obj_dir/Vmsrtu_vsc_top_tb
```

- `msrtu_vsc_top_tb` runs the complete design at its default parameters for
  27 ms of simulated time (a few seconds of wall time), with three-phase
  50 Hz voltages on the converter model:
  - one fundamental period with a small error, checked against a
    floating-point model of the whole control path;
  - a large error that drives the controller and modulation limits;
  - a converter slower than T_sa, which causes missed sampling instants and
    overruns;
  - recovery.

  It checks 8 sampling instants and 8 updates per switching period, the
  2.0-2.2 us latency window, and every leg output against the carrier
  compare. It also counts each of these mechanisms.
- `msrtu_vsc_nsweep_tb` runs the design with 4 and with 2 samples per
  switching period, side by side.
- `msrtu_vsc_closedloop_tb` closes the loop; see the next section.
- `carrier_gen_tb`, `ads8568_if_tb`, `clarke_tb`, `resonant_ctrl_tb`,
  `inv_clarke_tb`, `rtu_pwm_tb` and `latency_mon_tb` test the blocks on their
  own. `resonant_ctrl_tb` compares against a bit-exact model and against a
  floating-point model.

The simulator is two-state, so every register that is read has a reset value.

## Closed-loop check: where the loop goes unstable

The point of cutting the delay is a higher usable gain. For a resonant
controller driving an L-filtered converter into a resistive load, the loop
reaches the edge of stability at the phase-crossover frequency f_c where

    T_d = (pi/2 - atan(2 pi f_c L / R)) / (2 pi f_c),
    Kr_crit = 2 pi f_c sqrt(1 + (2 pi f_c L / R)^2).

The design was built for L = 6 mH, R = 32 Ohm and a 4 us voltage sensor. Its
total delay is 6.25 + 2.18 + 4 = 12.43 us, which gives f_c = 3.26 kHz and
Kr_crit = 81 300. Deferring the update to the next sampling instant instead
(1.5 T_sw/N + 4 us = 22.75 us) would lower the critical gain to about 45 000.

`msrtu_vsc_closedloop_tb` runs eight copies of the controller side by side,
with Kr from 60 000 to 100 000. Each copy drives a switched plant model:

- leg voltages of +-300 V, set by `pwm`;
- L-R phases with a floating star point;
- a 4 us sensor delay before the converter model.

Each copy tracks a 220 V line-to-line reference for 20 ms. The loops up to
Kr = 76 000 track the reference with a peak error of about 20 V (mostly
switching ripple). The loops from 80 000 upwards break into a 3.4-6.4 kHz
oscillation and sit in the modulation limits. The simulated boundary
therefore lies between 76 000 and 80 000. That is 2-7 % below the formula's
81 300. Published measurements on hardware built this way report Kr = 80 000
as still stable, so the simulation is slightly pessimistic near the edge.
A likely cause is the switching ripple, which the converter samples and feeds back
into the loop. The formula leaves that ripple out.

## Limits worth knowing

- The closed-loop test uses an ideal switched plant: no dead time, no
  device drops, and a constant DC link. It confirms the delay-limited
  stability boundary but is not a power-stage model.
- The controller has no anti-windup. Sustained saturation winds the resonant
  state up to its 48-bit limit.
- N must divide the number of clock cycles per switching period. Sampling
  instants are evenly spaced and locked to the carrier valley.
