# Fuzzy PID speed controller for DC motors, in FPGA logic

This is a stand-alone speed controller for the two wheel motors of a small
differential-drive robot. It runs entirely in FPGA fabric. The control law is
a two-input fuzzy controller: a zero-order Sugeno controller with five
triangular sets per input and a 5 x 5 rule table. It is wrapped into PD-, PI-
or PID-like structures.

The point of the design is that the fuzzy controller needs no look-up tables,
no floating point and almost no division:

* The membership grades come from a min/max of two straight lines. The slopes
  are fixed so that they are a shift (x2) instead of a divide.
* The rule strengths are a minimum.
* The output is the weighted average of the rule consequents. Each consequent
  is a single number, so there is no centroid to compute.
* The one division left is done by a small sequential divider with constant
  latency.

The whole fuzzy step takes 41 clocks. The full control step takes 43 clocks
(about 1 µs at 40 MHz), a tiny fraction of the 10 ms control period.

The RTL follows the controller described in the article *Development of
embedded fuzzy control using reconfigurable FPGA technology* (A. A. Nada and
M. A. Bayoumi). That article built the controller graphically. This is an
independent SystemVerilog rendering of it. The section *Choices made here*
lists where this code fills gaps or departs from the article.

## Structure

Each motor channel has three loops. They run in parallel, each at its own
rate, as separate hardware:

```
             enc_a/enc_b                                          pwm
  motor ──► quad_encoder ──speed──► pid_flc ──u──► pwm_gen ──────► driver
            (8 ms window)     ▲     (10 ms)        (20 ms period)
                              │        │
   setpoint, gains, mode ─────┘        ├──► exec_timer (loop period, compute time)
                                       └──► data_logger ──► log_* read port
```

`flc_fpga_top` builds `NCH` (default 2) of these channels. It adds one shared
control-loop timer (`tick_gen`), one shared 32-entry `data_logger`, and one
`exec_timer` per channel. A processor reads the log and supplies the set
points, the scaling gains and the mode of each motor. In the original system
this is the board's real-time processor. Here its side is plain ports.

The control step uses whatever speed the encoder produced last, so that speed
may be up to 8 ms old. The PWM generator applies a new control action at the
start of its next 20 ms period. The loops never wait for each other.

Inside `pid_flc` the fuzzy controller is `flc_core`:

```
 e  ─► fuzzifier_5mf ─► mu_e[0..4]  ─┐
                                     ├─► 5 x compat_mf (min) ─► 5 x defuzz_row ─► weighted_avg ─► f
 de ─► fuzzifier_5mf ─► mu_de[0..4] ─┘      row r = error set r      Σw·z, Σw       Σ(w·z)/Σw
```

## The number scale

All fuzzy quantities are integers in which **10000 means 1.0**. That is about
14 bits of resolution.

* Controller inputs are saturated to ±10000.
* Grades lie in 0..10000.
* The fuzzy output `f` lies in ±10000.

Speeds are signed 32-bit values in **mrad/s**. With the gain Kp = 1, an error
of 10 rad/s normalises to exactly 1.0.

The control action `u` uses the fuzzy scale. ±10000 is the driver's full
±500 µs pulse deviation.

Gains are signed **Q8.16**: 65536 = 1.0, with a range of ±128.

## Fuzzification: triangles without division

A triangle with feet `a`, `c` and peak `b = (a+c)/2` has the grade
`(x-a)/(b-a)` on its rising side. Fixing `b - a = c - b = 0.5` (5000 in the
scale) turns this into

    grade = clip( min(2(x-a), 2(c-x)), 0, 10000 )

which needs only adders, a shift and comparators (`triangle_mf`).
`fuzzifier_5mf` places five such sets at -10000, -5000, 0, 5000 and 10000:
NB, NS, Z, PS, PB. Any input therefore has at most two non-zero grades, and
they add up to 10000. For example, x = -3000 gives `{0, 6000, 4000, 0, 0}`.

The outer sets NB and PB need no special shoulder shape. The input is
saturated exactly at their peaks, so it never reaches their far side.

The same module can be built with trapezoids (`SHAPE = MF_TRAPEZOID`). These
have shoulders a quarter unit wide, so the slope is 4 (`trapezoid_mf`). It can
also be built with crisp singletons (`MF_CRISP`, `crisp_mf`). The triangular
version is the configuration the controller uses.

## Inference and the weighted average

Rule (r, c) reads: *if e is set r and de is set c then output = z(r, c)*. Its
strength is `w = min(mu_e[r], mu_de[c])` (fuzzy AND).

`compat_mf` builds the five strengths of one row of the table.
`defuzz_row` reduces that row to `Σ w·z` and `Σ w`. `weighted_avg` adds the
five rows and computes

    f = Σ(w·z) / Σ w

The consequents are stored in *half units*: -2..2 stands for -1, -½, 0, ½, 1,
which are the only values the rule tables use. The division therefore
computes `|Σ w·z| · 5000 / Σ w` on magnitudes and then applies the sign. The
result is truncated toward zero.

The divider is a restoring divider that produces one quotient bit per clock
(37 bits). The latency is fixed, whatever the operands are.

Rows are error sets and columns are change-of-error sets, both in the order
NB..PB. There are two tables in `flc_pkg`:

| `RULES_PRELIM` (default) | NB | NS | Z | PS | PB |
|---|---|---|---|---|---|
| **NB** | -1 | -1 | -1 | -½ | 0 |
| **NS** | -1 | -1 | -½ | 0 | ½ |
| **Z**  | -1 | -½ | 0 | ½ | 1 |
| **PS** | -½ | 0 | ½ | 1 | 1 |
| **PB** | 0 | ½ | 1 | 1 | 1 |

| `RULES_OPTIMIZED` | NB | NS | Z | PS | PB |
|---|---|---|---|---|---|
| **NB** | -1 | -1 | -½ | -½ | 0 |
| **NS** | -1 | -½ | -1 | 0 | ½ |
| **Z**  | -½ | -½ | 0 | ½ | ½ |
| **PS** | -½ | 0 | 1 | ½ | 1 |
| **PB** | 0 | ½ | ½ | 1 | 1 |

The second table came from a genetic-algorithm tuning in the original work.
The table is a parameter (`RULES`) of `flc_core`, `pid_flc` and
`flc_fpga_top`. Changing the rules changes no structure.

## PD, PI and PID structures (`pid_flc`)

At each control tick:

    e(k)  = setpoint - speed
    de(k) = e(k) - e(k-1)
    f(k)  = FLC( Kp·e(k), Kd·de(k) )          Kp, Kd normalise the inputs
    u_PD  = Kc_PD · f(k)
    u_PI  = Kc_PI · Σ f                        running sum, Δu(k) = Kc_PI·f(k)
    u     = u_PD | u_PI | u_PD + u_PI          mode PD | PI | PID, clipped to ±10000

One fuzzy controller feeds both parts. The PI-like controller is the running
sum of the PD-like controller's output. Seen as a linear PID, the gains are

    K_P = Kc_PD·Kp + Kc_PI·Kd,   K_I = Kc_PI·Kp,   K_D = Kc_PD·Kd

These relations are useful when picking gains. For a motor modelled as a
first-order lag τ plus an integrator, a sufficient stability condition is
`(Kc_PD/τ - Kc_PI)·Kp + (Kc_PI/τ)·Kd ≥ 0`. This implies
`Kc_PI·Kp ≥ 0`, `Kc_PD·Kd ≥ 0` and `Kc_PD·Kp/τ ≥ Kc_PI·Kp`.

The starting values used in the tests satisfy this for τ = 0.068865 s:
Kc_PD = 1, Kc_PI = 0.06, Kp = 1, Kd = 0.02.

How the fixed-point arithmetic works:

* Products with the gains are shifted right by 16. An arithmetic shift rounds
  toward minus infinity.
* The accumulator keeps the 16 fraction bits, so small increments
  accumulate.
* The accumulator is clipped to ±10000 (in the output scale) so it cannot wind
  up past what the driver can use.
* In PD mode the accumulator is held at zero. Switching to PI or PID starts
  the integral from zero.

Flags report whether a normalised input was clipped (`in_sat`) and whether
`u` was clipped (`out_sat`).

## Measuring and driving loops

**`quad_encoder`** synchronises the two encoder channels and decodes every
quadrature state change. A 400-line encoder gives 1600 counts per revolution.
Every 8 ms it converts the counts gained in the window to mrad/s with the
constant `2π·1e9 / (1600 · 8000)` = 490.87 mrad/s per count, held in Q16. The
coarse resolution (about 0.5 rad/s) is a property of this window and encoder.
A longer window or a finer encoder improves it. A change in both channels in
one clock has no direction. It is not counted and it sets the sticky `glitch`
flag.

**`pwm_gen`** produces a servo-style pulse every 20 ms. The high time is
`1500 µs + u·500 µs/10000`, rounded to a clock:

* 1000 µs is full speed counter-clockwise.
* 1500 µs is stop.
* 2000 µs is full speed clockwise.

`u` is sampled once per period, so a pulse is never cut short.

## Logging and timing

**`data_logger`** holds one record per motor per control step. A record is
`{channel, step, setpoint, speed, u}`, 100 bits. The FIFO has 32 entries. Its
read port is show-ahead: `log_rd_valid` with `log_rd_rec`, and a `log_rd_en`
pulse pops.

* A record that meets a full FIFO is dropped and counted in `log_dropped`
  (saturating).
* If the two channels finish in the same clock, they are written on
  consecutive clocks, lowest channel first.

**`exec_timer`** measures a loop the way loop rates are measured on the
target. It reports the clocks between consecutive loop iterations
(`loop_period`) and the clocks from the start of an iteration to its result
(`exec_time`). At the defaults these are 400000 and 43.

## Top-level interface (`flc_fpga_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `NCH` | 2 | motor channels |
| `CLK_HZ` | 40 000 000 | clock frequency |
| `LOOP_US` | 10 000 | control loop period |
| `ENC_WINDOW_US` | 8000 | speed measurement window |
| `PULSES_PER_REV` | 400 | encoder lines |
| `PWM_PERIOD_US` | 20 000 | driver pulse period |
| `LOG_DEPTH` | 32 | log entries |
| `RULES` | `RULES_PRELIM` | rule table |

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `loop_enable` | in | runs the control loop timer |
| `enc_a[NCH]`, `enc_b[NCH]` | in | encoder channels |
| `pwm[NCH]` | out | driver pulses |
| `setpoint[NCH]` | in | reference speed, mrad/s, signed 32 |
| `gains[NCH]` | in | `flc_gains_t {kp, kd, kc_pd, kc_pi}`, Q8.16 each |
| `mode[NCH]` | in | `MODE_PD`, `MODE_PI`, `MODE_PID` |
| `speed[NCH]` | out | measured speed, mrad/s |
| `u[NCH]` | out | control action, ±10000 |
| `in_sat[NCH]`, `out_sat[NCH]` | out | saturation in the last step |
| `enc_glitch[NCH]` | out | sticky encoder error |
| `step_count` | out | control steps since reset |
| `loop_period[NCH]`, `exec_time[NCH]` | out | loop timing, clocks |
| `log_rd_en` | in | pop the oldest log record |
| `log_rd_valid`, `log_rd_rec`, `log_level`, `log_dropped` | out | log read port and status |

Timing at the defaults:

| Step | Time |
|---|---|
| control tick to `u` | 43 clocks |
| fuzzy core, start to done | 41 clocks |
| divider | 40 clocks, start to done |
| speed updates | every 320 000 clocks |
| control steps | every 400 000 clocks |
| pulses | every 800 000 clocks |

Set points, gains and mode are sampled at each control tick.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M`. The reference models in
`tb/flc_ref_pkg.sv` are written from the textbook forms rather than from the
RTL's structure:

* membership functions with the division (x-a)/(b-a);
* the Sugeno average over all 25 rules;
* floor division for the fixed-point gains.

| Testbench | What it shows |
|---|---|
| `tb_triangle_mf`, `tb_trapezoid_mf`, `tb_crisp_mf` | grades over a sweep of the input |
| `tb_fuzzifier_5mf` | saturation, five grades, the -3000 example, grades sum to 10000 |
| `tb_compat_mf`, `tb_defuzz_row` | min rule strengths; row sums |
| `tb_weighted_avg` | quotient and sign; 40-clock latency |
| `tb_flc_core` | the whole fuzzy controller for both rule tables, each of the 25 rules at its peak, 41-clock latency |
| `tb_pid_flc` | hundreds of steps in PD, PI and PID modes with mode switches and both gain sets, against the reference model; 43-clock latency |
| `tb_quad_encoder` | speed at several rates and both directions, window period, glitch flag |
| `tb_pwm_gen` | pulse widths 1000..2000 µs, clipping, 20 ms period |
| `tb_data_logger` | order, contents, overflow and drop counting |
| `tb_exec_timer` | period and execution time for random patterns |
| `tb_flc_fpga_top` | closed loop with two motor models at a 1 MHz clock (see below) |
| `tb_flc_fpga_top_full` | closed loop at every default (40 MHz), 0.9 s |
| `tb_workloads` | loop rates 10/20/50 ms, optimised rules and constants, two-wheel trajectory tracking |

Every testbench has a watchdog.

The closed-loop tests use `tb/motor_model.sv`, a behavioural first-order
motor (τ = 0.068865 s, 20 rad/s at full command) with a 400-line encoder. The
end-to-end test `tb_flc_fpga_top` runs four phases:

1. Both motors are driven to +10 and -10 rad/s in PID mode.
2. Motor 0 is switched to PD mode. It settles at about 6.7 rad/s: the
   expected steady-state error without integral action.
3. Motor 0 goes back to PID, and a load disturbance hits motor 1, which is
   rejected.
4. The processor stops reading the log, so records are dropped and counted.

Throughout, every logged control action is compared with the reference
model. The test counts that input saturation, output saturation, mode
switches, reverse rotation, the disturbance and log overflow each occur.

The full-size test also checks every pulse width against `60000 + 2·u`
clocks.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/flc_pkg.sv tb/flc_ref_pkg.sv tb/tb_flc_core.sv --top-module tb_flc_core
./obj_dir/Vtb_flc_core
```

Replace `tb_flc_core` with any testbench name. The closed-loop tests find
`motor_model.sv` through `-y tb`. `tb_flc_fpga_top_full` simulates 36 M clocks
and takes well under a minute.

## Choices made here

The article gives the fuzzy controller and the PID-like structures in detail.
It gives the measuring, driving and logging loops only by their function. The
following are this design's own choices:

* **Scale.** 10000 = 1.0 (the article's choice), not 2^14 - 1, which its
  scaling formula would suggest.
* **Consequents.** Stored in half units. The division is done once, after
  summing. The divider is sequential with constant latency. Rounding is
  truncation toward zero.
* **One fuzzy controller for both parts of the PID-like controller.**
  `u = Kc_PD·f + Kc_PI·Σf`. This is the reading that matches the article's
  K_P/K_I/K_D relations. Where its wording names the two output gains in the
  opposite order, the relations were followed.
* **`Kp` and `Kd` normalise the fuzzy inputs.** The article's first PD formula
  could also be read as a linear PD law.
* **Formats.** Q8.16 gains, speeds in mrad/s, the integral clipped to the
  output range, and the integral held at zero in PD mode.
* **Encoder.** x4 decoding of the 400-line encoder and the direction
  convention.
* **Driver.** A 20 ms pulse period, and the mapping of u = ±10000 to ±500 µs.
* **Log.** The data-logging loop as a 32-entry FIFO with drop counting, and
  the record contents.
* **Processor side.** Plain input ports, sampled each control step, stand in
  for the processor's register interface.
* **Latency.** The fuzzy step takes 41 clocks. The article's graphical
  implementation reports about 6 µs for the same step. Nothing here tries to
  match that.

Not included:

* The classical PID controller and the look-up-table membership functions,
  which the article only uses for comparison.
* The real-time processor and its memories.
* The motors and drivers. There is a behavioural model for tests only.
* The trajectory computation that turns a robot path into wheel speed
  references. The design takes wheel speeds as set points.

**Optimised constants.** The optimised constants from the article
(Kc_PD = 1.0667, Kc_PI = 1.6956, Kd = 0.001) were tuned on its motors. It does
not state the scaling between its control action and the driver pulse. Against
the motor model here those constants give a sustained oscillation (see
`tb_workloads`). With the preliminary constants, both the preliminary and the optimised
rule tables settle at the set point. In the step tests the 10 ms loop does
better than the 20 ms and 50 ms loops. It reaches a cost (overshoot plus RMS
error over the first 2 s) of 1.9 rad/s, against 3.0 and 4.1 rad/s.

## Files

| File | Content |
|---|---|
| `rtl/flc_pkg.sv` | scale, types, gain struct, log record, both rule tables |
| `rtl/triangle_mf.sv`, `trapezoid_mf.sv`, `crisp_mf.sv` | membership functions |
| `rtl/fuzzifier_5mf.sv` | input saturation and five sets |
| `rtl/compat_mf.sv` | rule strengths of one table row |
| `rtl/defuzz_row.sv` | Σw·z and Σw of one row |
| `rtl/seq_divider.sv`, `weighted_avg.sv` | weighted average |
| `rtl/flc_core.sv` | the fuzzy controller |
| `rtl/pid_flc.sv` | PD/PI/PID-like controller |
| `rtl/quad_encoder.sv`, `pwm_gen.sv` | measuring and driving loops |
| `rtl/tick_gen.sv`, `exec_timer.sv` | loop timer, loop time meter |
| `rtl/data_logger.sv` | log FIFO |
| `rtl/flc_fpga_top.sv` | the controller |
| `tb/` | testbenches, reference models, motor model |
