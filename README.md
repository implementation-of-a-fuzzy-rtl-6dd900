# Fuzzy PI speed controller with space-vector PWM for an induction motor

This RTL is the digital half of a variable-speed drive for a three-phase induction motor. A
quadrature encoder reports the rotor speed. A fuzzy-logic PI controller compares that speed with
the set speed and moves the stator frequency up or down. The stator voltage follows the frequency
at a constant volts-per-hertz ratio, so the flux in the machine stays constant. A space-vector PWM
(SVPWM) modulator then turns frequency and voltage into the six gate signals of a two-level IGBT
inverter, with a dead band between the two switches of each leg.

The structure follows a published FPGA drive: a Spartan-3 controller, a 1 HP motor, 10 kHz
switching, a 7-label fuzzy rule base and a maximum modulation index of 0.907. Everything that
description leaves open is filled in here and marked as this design's choice in each file's
header. That covers the clock, number formats, encoder resolution, gains, inference method and
dead-band length. The section "Where this design fills gaps" lists the important ones.

## Block structure

```
 qep_a/qep_b ─► qep_speed ──speed_act──► fuzzy_pi_ctrl ──f_cmd──► vf_profile ──m──┐
                 (15 ms window)   speed_ref ─►│  speed_error                        │
                                              │  fuzzifier (e), fuzzifier (ce)      │
                                              │  fuzzy_rule_engine                   │
                                              │  integrator                          │
                                                         f_cmd                       ▼
                               angle_gen ◄── tick ── svpwm_pwm ◄── svpwm_times ◄──── m
                               (sector, alpha) ───────────────────►   (Ta, Tb, T0)
                                                         │ leg {c,b,a}
                                              3 x dead_band ──► pwm[5:0] = PWM6..PWM1
```

| Module | Role |
|---|---|
| `im_speed_ctrl_top` | Wires the chain above. Parameters: clock, switching frequency, speed window, dead band, gains, limits. |
| `qep_speed` | Synchronises the encoder, decodes every edge (4 steps per line), counts over a window. |
| `fuzzy_pi_ctrl` | Speed loop: `speed_error`, two `fuzzifier`s, `fuzzy_rule_engine`, integrator. |
| `speed_error` | `e = ref - actual`, `ce = e - previous e`, once per speed sample. |
| `fuzzifier` | Seven triangular memberships of one input. |
| `fuzzy_rule_engine` | 49-rule inference, one rule per clock, centre-of-gravity output. |
| `vf_profile` | Modulation index proportional to frequency, limited to 0.907. |
| `angle_gen` | Phase accumulator: reference angle, sector 1..6, angle within the sector. |
| `svpwm_times` | Dwell times of the two active vectors and the zero vectors. |
| `svpwm_pwm` | Triangular carrier and per-leg compare values: the symmetric switching sequence. |
| `dead_band` | Complementary gate pair for one leg, with dead time on each turn-on. |
| `im_ctrl_pkg` | Fuzzy label enum, membership types, switching-state helper, status struct. |

## The fuzzy PI controller

The controller does one update per speed measurement. With the defaults, that is every 15 ms.

**Inputs.** The error `e` (rpm) and its change `ce` (rpm per sample) are each described by seven
labels: nl, nm, ns, z, ps, pm, pl (negative large ... positive large). Each label is a triangle.
The triangles are evenly spaced over the input's universe, and neighbours cross at 0.5. The
universe is [-1, 1] for `e` and [-3, 3] for `ce`. The scaling parameters `E_LOG2` and `CE_LOG2`
set how many rpm the universe edge stands for: by default 512 rpm for `e` and 128 rpm per sample
for `ce`. Beyond the edge the input saturates, and the outer label is then fully true.

Because the partition is complete, at most two labels of each input are non-zero and they always
sum to 1.0. `fuzzifier` uses this directly. It maps the clamped input to a position of 0..1536 on
the label axis (256 per label). The top bits select the left label. The low 8 bits give the
membership of the right label, and the left label gets 256 minus that.

**Rules.** The rule table maps the pair (error label, change label) to an output label. Each step
of either input moves the output one label, saturating at nl and pl:

| ce \ e | nl | nm | ns | z | ps | pm | pl |
|---|---|---|---|---|---|---|---|
| nl | nl | nl | nl | nl | nm | ns | z |
| nm | nl | nl | nl | nm | ns | z | ps |
| ns | nl | nl | nm | ns | z | ps | pm |
| z  | nl | nm | ns | z | ps | pm | pl |
| ps | nm | ns | z | ps | pm | pl | pl |
| pm | ns | z | ps | pm | pl | pl | pl |
| pl | z | ps | pm | pl | pl | pl | pl |

The table is written out literally in `fuzzy_rule_engine` (`RULES`) and can be edited there.

**Inference and defuzzification.** `fuzzy_rule_engine` walks all 49 input combinations, one per
clock. A rule's strength is the product of its two memberships (8x8 bits). The engine accumulates
strength times the position of the rule's output label. Since each input's memberships sum to 1.0,
all strengths together sum to exactly 65536. The centre of gravity of the output singletons is
therefore the accumulator shifted right by 8, and no divider is needed. An assertion checks the
strength sum. The result `u_pos` lies on the output label axis 0..1536. On the output universe
[0.5, 1.0] that is `u = 0.5 + u_pos/3072`, with label z at u = 0.75 (`u_pos` = 768).

**PI action.** The output is used incrementally: each update adds
`KU * (u_pos - 768) / 256` to the frequency command `f_cmd` (Q8.8 Hz). The result is clipped to
`F_MIN..F_MAX` (0..50 Hz by default). Output z holds the frequency. This accumulation makes the
controller a PI controller: the rules act on error and error rate, and the sum integrates them. A
zero error at steady state is reached only when the speed error settles to exactly zero.

**Timing.** From the `sample` pulse to the `update` pulse takes 52 clocks: 1 for the error stage,
50 for the rule walk, 1 for the integrator. That is negligible against the 15 ms loop period.

## Space-vector modulation

**Vectors.** The six inverter switches give eight switching states, written {c, b, a}, where 1
means the upper switch of that leg is on:

| Vector | V0 | V1 | V2 | V3 | V4 | V5 | V6 | V7 |
|---|---|---|---|---|---|---|---|---|
| {c,b,a} | 000 | 001 | 011 | 010 | 110 | 100 | 101 | 111 |

V1..V6 are the corners of a hexagon, with V1 on the alpha axis. Sector k lies between Vk and
Vk+1, and the reference rotates anticlockwise.

**Angle.** `angle_gen` runs a 32-bit phase accumulator. It advances by `f_cmd / TICK_HZ` of a turn
at each modulator tick, which comes twice per switching period (20 kHz ticks for 10 kHz
switching). The upper 16 bits of the angle, multiplied by 6, split into sector (integer part) and
`alpha`, the angle inside the sector (fraction of 60°).

**Dwell times.** `svpwm_times` computes, in clock counts of half a switching period (`HALF`):

```
Ta = K * m * sin(60° - alpha) * HALF      first active vector Vk
Tb = K * m * sin(alpha)       * HALF      second active vector Vk+1
T0 = HALF - Ta - Tb                       zero vectors, split equally between V0 and V7
```

with `K = sqrt(3)/pi` (`K_Q16` = 36132). The sine comes from a 257-entry ROM over 0..60°. Entry i
holds `round(32768*sin(i*60°/256))`, and the ROM is filled by a function at elaboration. The
calculation is a 3-stage pipeline.

Note the normalisation. With this K, m = 0.907 at 30° leaves T0 at half the period. The
fundamental phase voltage is then `m*Vdc/pi`, which is 0.289 Vdc at m = 0.907. The usual
normalisation `K = 2*sqrt(3)/pi` gives twice that, and the linear-range maximum of Vdc/sqrt(3) at
m = 0.907. To get it, set `K_Q16 = 72264` in `svpwm_times` (the controller already limits m to
0.907).

**Switching sequence.** `svpwm_pwm` has an up/down carrier 0 .. HALF-1 .. 0, so one switching
period is 2·HALF clocks (100 µs at 50 MHz). At each end of the carrier it loads, for each leg,
the on-time

```
on_x = T0/2 + (leg x on in Vk ? Ta : 0) + (leg x on in Vk+1 ? Tb : 0)
```

A leg is on while `carrier < on_x`. The on-pulses are centred on the carrier valley, which gives
the symmetric sequence V0 – Va – Vb – V7 – Vb – Va – V0. Adjacent states differ in one leg, so each
transition switches only one leg. The only exception is when a dwell time is zero and its vector is
skipped. Loading at both carrier ends means the reference is sampled every half period. New times
apply from the half period after the one in which they arrive.

**Gates.** `dead_band` delays every turn-on by `DEAD` clocks (default 50 = 1 µs). Turn-off is
immediate, and a pulse shorter than the dead band is dropped. The gate outputs use the bridge
numbering:

| `pwm` bit | 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| switch | PWM1/S1 (a, upper) | PWM2/S2 (c, lower) | PWM3/S3 (b, upper) | PWM4/S4 (a, lower) | PWM5/S5 (c, upper) | PWM6/S6 (b, lower) |

## Constant V/F

`vf_profile` sets `m = 0.907 * f / 50 Hz`, using the Q0.16 value 59441 at 50 Hz. At 50 Hz and
above, m is held at 0.907 and `limited` is set. There is no low-speed voltage boost.

## Speed measurement

`qep_speed` counts encoder steps over `WINDOW` clocks, up or down with the direction. With a
1000-line encoder, 4 steps per line and a 15 ms window at 50 MHz, the count equals the speed in
rpm, so set speed and measured speed share one unit. If your encoder or clock differs, change
`WINDOW` so that one count is one rpm. Alternatively, rescale `speed_ref` and the fuzzy universes.
Both channels changing at once is an invalid step: it is not counted and sets the sticky `err`.

## Number formats and interfaces

- Clock: `CLK_HZ` = 50 MHz. All modules use one clock and a synchronous, active-high `rst`.
- Speeds are signed 16-bit rpm. `f_cmd` is unsigned Q8.8 Hz (12800 = 50 Hz). `m` is unsigned
  Q0.16.
- `im_speed_ctrl_top` outputs `speed_act`, `f_cmd`, `mod_index` and a `status` struct
  (`ctrl_status_t`) for a display, a D/A converter or a test bench. The struct holds the last
  e/ce, the fuzzy output, the clip and limit flags, the sector being modulated, the modulator tick
  and the switching state before the dead band.

## Where this design fills gaps

- **Inference method:** product AND, sum aggregation and singleton centre of gravity. A min/max
  Mamdani engine would need a divider, because the strengths would no longer sum to 1.
- **Controller output:** the fuzzy output is treated as an increment of the stator frequency.
  The voltage then follows through V/F.
- **Scaling:** the universe edges (512 rpm, 128 rpm per sample), the gain `KU` = 64 (at most
  0.75 Hz change per 15 ms update) and the 0..50 Hz range are tuning choices. They were tuned
  against the motor model in `tb/`, not against a real machine.
- **Modulator details:** `K = sqrt(3)/pi` as discussed above. The ROM resolution is 0.23°. There
  is no over-modulation: m never exceeds 0.907, so `Ta + Tb` always fits.
- **Speed feedback:** taken from encoder pulses counted in the FPGA. An analog path through a
  frequency-to-voltage converter and an A/D converter is not provided.
- **Not included:** the board peripherals (LCD, D/A and A/D converters, switches, LEDs, the PC
  link), the second FPGA, and all power and analog parts.

## Simulation

Every module has a self-checking test bench in `tb/` that ends with a `TB_RESULT` line. The model
`tb/induction_motor_model.sv` is behavioural and for simulation only. It rebuilds the stator
voltage vector from the gate signals and filters it to get frequency and amplitude. It runs a
4-pole motor with load-dependent slip and a 0.25 s mechanical time constant, and produces encoder
pulses.

For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/im_ctrl_pkg.sv tb/tb_im_speed_ctrl_top.sv --top-module tb_im_speed_ctrl_top
./obj_dir/Vtb_im_speed_ctrl_top
```

`tb_im_speed_ctrl_top` runs the whole controller at its default parameters in closed loop. It
simulates 7.2 s of drive time, which takes about 3 minutes of wall time. The sequence is:

1. 1000 rpm, no load
2. 1000 rpm, full load
3. 1200 rpm, full load
4. 1200 rpm, no load
5. 1700 rpm, beyond what 50 Hz can reach
6. stop

The bench checks the following:
- At each reachable step the speed is within 5 % of the reference.
- The frequency recovered from the gates matches `f_cmd`.
- The fundamental voltage follows `m/pi` (constant V/F).
- No leg ever has both gates on.
- Dead band, all six sectors, error saturation, clipping at 50 Hz and at zero, and the V/F limit
  each occur at least once.

It prints the settling time of each step. With the model in `tb/`, 1000 rpm enters the 5 % band
after about 1.1 s, and a step from 1000 to 1200 rpm under full load settles in about 0.5 s.
Applying or removing full load never takes the speed out of the 5 % band. With the default gains,
the integrator removes the last few percent of error slowly: the 1000 rpm no-load step still
stands at 1040 rpm after 1.5 s. Raise `KU` or narrow the error universe (`E_LOG2`) for tighter
regulation, at the cost of more overshoot.

The unit benches compare against independent floating-point references:
- the triangle memberships;
- the rule table with a real-valued centre of gravity;
- the dwell-time equations with `$sin`;
- per-leg on-times summed from the vector table.

They also check latencies: 50 clocks for the rule engine, 52 from sample to update and 3 for the
dwell times.
