# FPGA speed controller for a DC motor: encoder, PID and up/down-counter PWM

This RTL closes a speed loop around a permanent-magnet DC motor. A slotted disc on
the motor shaft gives a square wave whose frequency tracks the speed. The FPGA
counts its pulses over a fixed sampling period. It subtracts that count from a
reference, runs a PID law on the difference, and uses the result as the duty value
of an 8-bit PWM generator that drives the motor. The whole loop is a handful of
counters, one subtractor and three multiply-adds, updated once per sampling period.

```
 ref_speed ──►(+)──► speed_comparator ──► pid_controller ──► pwm_generator ──► pwm ──► motor driver / motor
               ▲ (−)      err                 u (0..255)      (data register,            │
               │                                               up/down counter,          │ shaft
               │                                               toggle flip-flop)         ▼
             speed ◄── encoder_interface ◄── enc ◄── optical_encoder (sensor model) ◄── motor_rpm
```

`dc_motor_speed_ctrl` is the top. It holds the four FPGA blocks and the
behavioural model of the optical sensor. The motor is not part of the RTL: the
top drives `pwm` out and takes the shaft speed back in on `motor_rpm`, which feeds
only the sensor model.

## Units

Speed is measured and set in **encoder pulses per sampling period**:

    speed = N_SLOTS * RPM / 60 * Ts

The defaults are a 4-slot disc and Ts = 1/4 s. So one count is 60 RPM, and
3600 RPM reads as 60. `ref_speed` uses the same unit. The coarse resolution comes
from the 4-slot disc. A longer Ts (smaller `TS_LOG2`) gives finer speed steps but
a slower loop.

## PWM generator (`pwm_generator`)

This block is the least obvious part of the design. It has no comparator against
a free-running counter. Instead it has:

* a **data register** that holds the duty value D and is written by the controller;
* an 8-bit **up/down counter**;
* a **terminal count** (`tc`): the counter is at 0 while counting down, or at 255 while counting up;
* a **toggle flip-flop** that sets the counting direction and flips on every terminal count.

On every terminal count the counter is reloaded from the data register and the
direction flips. So one period has two phases:

| phase      | counter runs | cycles  | `pwm` |
|------------|--------------|---------|-------|
| count-down | D → 0        | D + 1   | high  |
| count-up   | D → 255      | 256 − D | low   |

The period is always 257 cycles, and the duty cycle is (D+1)/257:

| D (binary) | high cycles | duty     |
|------------|-------------|----------|
| 11100110   | 231         | 89.9 %   |
| 11000000   | 193         | 75.1 %   |
| 10000000   | 129         | 50.2 %   |
| 01000000   | 65          | 25.3 %   |
| 00011001   | 26          | 10.1 %   |

Rounded, these are the 90/75/50/25/10 % targets the circuit was designed to meet.
The output is never fully off or fully on: the minimum is 1/257 and the maximum
256/257. A value written to the data register reaches the counter only at the
next terminal count, so a duty update never cuts a pulse short. After reset the
first cycle is a terminal count, which loads the data register and starts a
count-down phase.

**Polarity choice.** In the circuit this is based on, the counter counts down
while the output is low. Taken literally, that makes the duty cycle *fall* as D
rises, which contradicts the required duty-cycle table above. This RTL keeps the
structure (the direction comes from the toggle flip-flop) but drives `pwm` high
during the count-down phase, so that a larger D gives a larger duty cycle.

With a 50 MHz clock the PWM frequency is 50 MHz / 257 ≈ 194.6 kHz.

## Speed measurement (`encoder_interface`)

The sensor output is asynchronous. It goes through a two-flip-flop synchroniser
and a rising-edge detector, and its edges are counted over a gate of
`GATE_CYCLES` = CLK_HZ·Ts clocks (12 500 000 at the defaults). At the end of each
gate:

* the count goes to `speed`;
* `speed_valid` pulses for one cycle;
* the next gate starts in the same cycle, so no edge is lost or counted twice.

The count saturates at its maximum. An edge on the pin shows up in the count
three clocks later.

The sensor's comparator already gives a two-level signal, so the interface reads
it as a digital pin. There is no analog-to-digital converter in the path.

## Error and PID law (`speed_comparator`, `pid_controller`)

The comparator registers `err = ref_speed − speed` as a 17-bit signed value. The
PID evaluates the sampled form of u = Kp·e + Ki·∫e + Kd·de/dt:

    I[k] = clamp(I[k−1] + e[k], ±ILIM)
    u[k] = clamp( (Kp·e[k] + Ki·Ts·I[k] + (Kd/Ts)·(e[k] − e[k−1])) / 2^OUT_SHIFT , 0, 255 )

* This is the positional form, with rectangular integration and a backward difference.
* Ts = 2^−TS_LOG2 s. Because Ts is a power of two, the whole sum is exact in
  integer arithmetic: the datapath forms
  `Kp·e·2^TS_LOG2 + Ki·I + Kd·Δe·2^(2·TS_LOG2)` in 64 bits and shifts it right
  by `TS_LOG2 + OUT_SHIFT`.
* The gains default to Kp = 100, Ki = 200, Kd = 10. Those values were tuned on a
  continuous-time motor model. Their scaling from "pulses of error" to "PWM
  counts" is not defined by that tuning. Here the scale is `OUT_SHIFT` = 6, i.e.
  a divide by 64. With the default motor model this gives a proportional loop
  gain of about 0.6, and a well-damped but slow approach.
* Anti-windup: the integrator is clamped to ±ILIM = ±⌊2^8·2^(TS_LOG2+OUT_SHIFT)/Ki⌋
  (±327 at the defaults). At that limit the integral term alone just reaches
  full scale.
* The output is clamped to 0..255. A negative demand gives 0: the drive runs in
  one direction only.

## Timing of one control update

| cycle after the end of a gate | event                                            |
|-------------------------------|--------------------------------------------------|
| 0                             | `speed`, `speed_valid`                           |
| 1                             | `err`, `err_valid`                               |
| 2                             | PID output `u`, `u_valid`                        |
| 3                             | PWM data register (`duty`) holds the new value   |
| ≤ 3 + 257                     | the counter uses it, at the next terminal count  |

There is one update per sampling period. The loop has no handshakes, because
every stage is faster than the sampling period by many orders of magnitude.

## Optical sensor model (`optical_encoder`)

This block is a behavioural model. It is not logic meant for the FPGA. It stands
for the slotted disc, LED, OPT101 photodiode and LM324 comparator, and outputs a
square wave of frequency N_SLOTS·RPM/60.

* The shaft angle within one slot pitch is a phase accumulator that advances by
  N_SLOTS·rpm per clock and wraps at 60·CLK_HZ.
* The light reaching the photodiode is modelled as a triangle over the pitch.
* The output is high while that level exceeds `VREF`, so `VREF` sets the duty
  cycle: 127 gives about 50 %.

The model is clocked and two-state, so it simulates with plain Verilator and
also synthesises.

## Parameters (top level)

| parameter   | default    | meaning                                    |
|-------------|------------|--------------------------------------------|
| `CLK_HZ`    | 50 000 000 | clock frequency; sets the gate length      |
| `TS_LOG2`   | 2          | sampling period Ts = 2^−TS_LOG2 s (1/4 s)  |
| `N_SLOTS`   | 4          | slots on the encoder disc                  |
| `KP`        | 100        | proportional gain                          |
| `KI`        | 200        | integral gain (per second)                 |
| `KD`        | 10         | derivative gain (seconds)                  |
| `OUT_SHIFT` | 6          | output scaling, divide by 2^OUT_SHIFT      |

`speed_ctrl_pkg` holds the shared widths: 8-bit PWM, 16-bit speed, 17-bit error.

## Where this departs from, or goes beyond, the reference design

* **PWM polarity:** high while counting down (see above). The period is 257
  cycles, because each phase includes its terminal-count cycle.
* **No ADC.** The sensor output is read as a digital signal.
* **Chosen by this design:**
  * the speed measurement method (pulses per gate);
  * the sampling period (1/4 s);
  * the 50 MHz clock;
  * the PID discretisation, output scaling and integrator clamp;
  * all word widths.
* **Gain tuning.** The gains were tuned against a continuous-time motor model
  (armature 1 Ω / 0.5 H, inertia 0.01 kg·m², friction 0.1 N·m·s, motor
  constant 0.01 V·s/rad). That tuning reached a 0.257 s settling time with 1 %
  overshoot. This sampled loop updates every 0.25 s and cannot match that
  figure. Against the test motor model it settles within one count in roughly
  20 samples (about 5 s).
* **Timing closure.** The controller is reported to have run at up to
  83.291 MHz on a Spartan-3E XC3S250E. That has not been checked for this RTL.
* **The motor** is outside the RTL. The testbenches use a first-order model
  (`tb/dc_motor_model.sv`) that approaches 6000 RPM while `pwm` is high and
  0 RPM while it is low. These constants are test choices, not a particular
  motor.

## Testbenches

Every testbench checks itself. Each prints `TB_RESULT checks=N failures=M` and
has a watchdog.

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb_pwm_generator`         | Cycle-by-cycle comparison with a reference model. For each table value: 257-cycle period, D+1 high cycles and the rounded duty. A write in mid-phase takes effect only at the next terminal count. |
| `tb_speed_comparator`      | Directed and random differences, extremes of the range, latency, and hold between samples. |
| `tb_pid_controller`        | A floating-point model of the law above over directed and random error sequences. Covers the integrator clamp, both output limits, 1-cycle latency and hold between samples. |
| `tb_encoder_interface`     | Exact counts for input periods that divide a shortened gate, zero input, saturation of a 4-bit count, and the gate period. |
| `tb_optical_encoder`       | Output period against 60·CLK_HZ/(N·RPM) and duty at two `VREF` settings; no edges at standstill. |
| `tb_dc_motor_speed_ctrl`   | Closed loop with a 100 kHz clock. Steps the reference 0 → 60 → 30, checks that speed settles, and forces high and low saturation. Checks the sample period and the 2-cycle latency to `u_valid`. Counts every mechanism: terminal counts in both directions, errors of both signs, clamps, saturations, duty updates. |
| `tb_full_size_speed_ctrl`  | Closed loop with every parameter at its default (50 MHz, 12.5M-cycle samples). Steps to 3600 RPM, runs 24 samples (300M cycles, about 2–3 minutes), checks settling and the 257-cycle PWM period. |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/speed_ctrl_pkg.sv tb/tb_pwm_generator.sv --top-module tb_pwm_generator
./obj_dir/Vtb_pwm_generator
```

To run another testbench, replace `tb_pwm_generator` with its name. Lint the RTL
with `verilator --lint-only -Wall -Irtl -y rtl rtl/speed_ctrl_pkg.sv
rtl/dc_motor_speed_ctrl.sv`.
