# FPGA motor-control blocks: encoder, PID, PWM and a position/velocity loop

This is a small library of FPGA blocks for closed-loop control of one motor
axis, with a top level that wires them into a position or velocity loop. The
aim is that a control engineer can assemble a loop from ready-made parts:

- a quadrature encoder interface with jitter filtering,
- a velocity estimator,
- a PID controller with a Tustin integrator,
- a sample-clock and sine-reference generator,
- a zero-order-hold output register for a DAC,
- a PWM generator for power converters,
- push-button gain entry,
- an RS-232 monitor link.

None of these parts needs any HDL work. The blocks follow the set of building
blocks of a Matlab/DSP Builder toolbox for Altera DE boards. All widths,
number formats and handshakes are spelled out here, because that toolbox
leaves them open.

All logic runs on a single 50 MHz clock. Every slower "clock" of the control
structure is a one-cycle **clock-enable strobe**: Ts (controller sample),
Treg (feedback and output sample) and Tenc (encoder filter sample).

## The loop

```
                 +-------------+  ts, treg, tenc, Ts/2, sine
   on (SW0) ---->| clk_gen_sin |---------------------------------+
                 +-------------+                                 |
 enc_a,enc_b +-------------------+ position +--------------------+  velocity
 ----------->| encoder_interface |----+---->| velocity_estimator |----+
 enc_reset ->| filters, decoder, |    |     +--------------------+    |
  (SW2)      | 16-bit counter    |    |                               |
             +-------------------+    +--> feedback mux (vel_mode) <--+
                                                    |
  sine / ref_const (ref_sel) --> error_discriminator (ref - fb)
                                                    |
  pid_param_entry --Kp,Ki,Kd--> pid_controller (once per Ts)
                                                    | ctrl
               +------------------------------------+------------------+
               v                                    v                  v
        output_register (8 pins, ZOH)      pwm_generator (Out1..4)   rs232_tx
```

`control_structure` is the top. The same structure is a position loop
(`vel_mode = 0`, position fed back) or a velocity loop (`vel_mode = 1`, the
estimated velocity fed back). A PI velocity loop is the PID with Kd = 0.

### Sample timing

`clk_gen_sin` runs one free counter and decodes strobes from its low bits:

| strobe | period | default | range offered |
|---|---|---|---|
| `ts`   | 2^TS_LOG2 clocks | 2^16 = 1.31 ms | 2^9..2^26 (10.2 us .. 1.34 s) |
| `treg` | same as `ts`, one clock earlier | | |
| `tenc` | 2^TENC_LOG2 clocks | 2^6 = 1.28 us | 2^3..2^15 (0.16 us .. 655 us) |

The order within one sample period is as follows:

1. At `treg`, the velocity estimator takes the position and the output
   register takes the controller output.
2. One clock later, at `ts`, the PID takes the error and updates `ctrl` on the
   next clock.
3. The value of sample k therefore reaches the DAC pins at sample k+1.

The RS-232 block sends the feedback value at each `ts`.

`ts_half` is the constant Ts/2 in seconds, unsigned Q0.24. It is computed at
elaboration as round(2^(TS_LOG2-1) / 50e6 × 2^24), which gives 10995 for the
default.

## Encoder path (the part that needs the most care)

`encoder_interface` = 2 × `jitter_filter` → `quad_decoder` → `updown_counter`.

**Jitter filter.** Each channel works in four steps:

1. Two flip-flops synchronize the channel to the system clock.
2. The synchronized channel is sampled twice more on `tenc`.
3. When the live value and both samples are 1, they set an S/R flip-flop.
4. When all three are 0, they clear it. Otherwise it holds.

What this guarantees:

- A single pulse shorter than one Tenc period is always rejected.
- A level that lasts longer than two Tenc periods always passes.
- Pulses in between may or may not pass.
- A **burst** of short pulses closer together than about two Tenc periods can
  pass. The filter is a consensus of three samples, not a minimum-width timer.

So choose Tenc from the fastest encoder edge rate:

- With a 1000-line encoder at 3000 rpm, one channel's level lasts 10 us.
- The edges of A and B are 5 us apart.
- Tenc = 1.28 us keeps each level above two Tenc periods while treating
  spikes below 1.28 us as noise.

**Quadrature decoder.**

- The FSM state is the last accepted {A,B}.
- On each `tenc` strobe, a step to the neighbouring Gray state gives one
  `count` pulse. This gives four counts per encoder line.
- The direction comes from the step. 00→01→11→10→00 (B leading A) counts up.
- A jump of two states (both channels changed between strobes) is not counted.
  This can only happen if edges arrive faster than Tenc.

**Counter and output.**

- The 16-bit counter wraps. Read it as two's complement (`count`).
- `out` is the same value with bit 15 inverted (offset binary), as the bus
  builder of the block produces.
- Differences of either form are equal modulo 2^16, so the velocity is the
  same whichever is used.

**Resets.**

- `reset` is the block's Reset input, SW2 in the top. It clears the decoder
  and the counter but not the filters. While it is held, the decoder follows
  the channels, so releasing it does not count.
- `rst` is the power-on reset. It clears the filters as well. After a
  power-on reset alone, the position may be one count off until the first
  Reset pulse.

## Velocity estimator

The velocity estimator computes `dout = din − din(previous treg)`, which is
Out(z) = In(z)(1 − z⁻¹). The result is in encoder counts per sample period,
modulo 2^16. For example, with 1000 lines (4000 counts/rev), 1500 rpm and
Ts = 1.31 ms, this is 131 counts/sample.

## PID controller

Once per `ts` the controller computes:

```
u[k] = Kp·e[k] + I[k] + Kd·(e[k] − e[k−1])
I[k] = I[k−1] + Ki·(Ts/2)·(e[k] + e[k−1])        (Tustin / trapezoid)
```

This is the transfer function Kp + Ki·(Ts/2)·(z+1)/(z−1) + Kd·(z−1)/z. The
derivative is Kd times the plain difference. It is not divided by Ts, so Kd
has units of "per sample".

| signal | format |
|---|---|
| e, u | signed 16-bit integers (encoder counts / DAC units) |
| Kp, Ki, Kd | unsigned Q8.8 (0 .. 255.996) |
| Ts/2 | unsigned Q0.24 seconds |
| integrator | signed 64-bit with 32 fractional bits |

The integrator is clamped to the output range (anti-windup). The output is
floored and saturated to 16 bits.

For example, with Kp = 10, Ki = 5, Kd = 10 and Ts = 1.31 ms, a first error of
−20 after zero gives u = −401: that is −200 − 200 from the proportional and
derivative terms, plus −0.066 from the integrator, then floored. Each further
sample with the same error adds Ki·Ts·e = −0.13 to the ramp.

## Clock and sine generator

The sine has a period of 2^SIN_LOG2 clocks: 2^26, 2^27, 2^28 and 2^29 give
745, 373, 186 and 93 mHz. The top 10 counter bits address a 256-entry
quarter-wave table. Entry i is round(32767·sin(π/2·(i+0.5)/256)). The table is
mirrored for the other three quarters and scaled by SIN_AMP/32768.

The table is read with `$readmemh("rtl/sine_quarter.hex")`, a path relative
to the directory the simulator or synthesis tool runs in. Run the tools from
the folder that contains `rtl/`, or change the path.

While `on` is low the counter is held at zero, no strobes are given and the
sine is 0.

## PWM generator

Compile-time parameters:

| parameter | values | default |
|---|---|---|
| MODULATION | PWM_SAWTOOTH, PWM_TRIANGLE, PWM_BIPOLAR, PWM_UNIPOLAR | sawtooth |
| FREQ_HZ | 100k (sawtooth only), 50k, 25k, 12k, 6k | 100 000 |
| DEAD_X100 | dead time in 1/100 % of the period: 0, 75, 150, 230, 320 | 150 |
| BUS_TYPE | BUS_SIGNED, BUS_UNSIGNED reference | signed |

How it works:

- P = 50 MHz / FREQ_HZ clocks per PWM period.
- The sawtooth carrier counts 0..P−1.
- The triangle carrier counts 0..P/2−1 and back down.
- The reference is converted to offset binary and scaled to the carrier
  range: thr = round(u·R/65536). It is taken once per period.
- A leg's command is high while carrier < thr.
- Each leg drives a complementary pair through `pwm_dead_time`. After any
  change both gates stay off for round(P·DEAD_X100/10000) clocks (8 clocks at
  the default).

Output assignment:

- Out1/Out2 are leg A high/low. Out3/Out4 are leg B high/low.
- Sawtooth and triangle use leg A only.
- Bipolar switches leg B opposite to leg A.
- Unipolar compares leg B with the inverted reference.
- `Cout` is the carrier.
- `en` low switches all outputs off and restarts the carrier.

## Other blocks

- `output_register`: on `treg`, saturates the 16-bit input to signed 8 bits
  and holds it on eight pins for a DAC.
- `pid_param_entry`:
  - `sel` chooses Kp, Ki or Kd.
  - Each debounced press of up or down changes that gain by 1.0. A press must
    be stable for 2^DEB_LOG2 clocks (1.31 ms by default).
  - The gains stop at 0 and at 0xFFFF.
  - After reset the gains are Kp = 10, Ki = 5, Kd = 10.
- `rs232_tx`: on `send`, transmits a 16-bit word as two 8N1 characters, high
  byte first, at BAUD (115200 by default). It ignores `send` while busy.
- `error_discriminator`: reference − feedback, saturated to 16 bits.

## Where this design departs from, or adds to, the original block set

- All sample clocks are enables on one 50 MHz clock. There is no separate
  CLK output.
- The original Treg timing is not documented. Here Treg fires one clock
  before Ts.
- The encoder filter is exactly the three-sample S/R structure. It does not
  reject every pulse below two Tenc periods (see above).
- Decoder FSM, direction convention, counter wrap, reset split: own choices.
- All PID number formats, the anti-windup clamp and the saturation: own
  choices.
- Push-button scheme, RS-232 framing and rate, DAC coding (two's complement,
  8 bits) and PWM output-to-switch mapping: own choices.
- The error block has two inputs (reference, feedback).
- In the top, the PWM generator and RS-232 link sit on the controller output.
  The board-level structure uses only the output register.
- Not included:
  - two toolbox blocks whose function is not defined (a "Brake" block and a
    second PID variant);
  - the analog interface card (DA/AD converters, TTL/LVTTL level shifting);
  - the motor.

## Verification

Every block has a self-checking testbench in `tb/` that compares against
values worked out independently and prints `TB_RESULT checks=N failures=M`:

- `tb_jitter_filter`: random long levels must pass and pulses shorter than
  Tenc must never change the output.
- `tb_quad_decoder`: random walk with illegal jumps, one pulse per legal step
  with the right direction.
- `tb_updown_counter`: per-clock model comparison, wrap in both directions,
  clear.
- `tb_encoder_interface`:
  - 13 edges with three jitter pulses on channel A must give a count of 13.
  - A 1500-step random walk with jitter, through zero.
  - The offset-binary output.
  - Reset.
- `tb_velocity_estimator`: modulo differences, hold between strobes.
- `tb_pid_controller`:
  - The open-loop step response: the jump, and the ramp slope Ki·Ts·e.
  - 3000 random samples against a 64-bit model, including saturation.
  - The one-clock latency.
- `tb_clk_gen_sin`: strobe periods and phase, Ts/2 at default and reduced
  sizes, and the sine against `$sin` to within one table step.
- `tb_pwm_generator`:
  - All four patterns side by side.
  - On-times per period against the threshold and dead-time formula.
  - No overlap of a gate pair, minimum dead time, and En.
- `tb_output_register`, `tb_error_discriminator`, `tb_pid_param_entry`
  (bounce rejection, saturation at 0) and `tb_rs232_tx` (line decoded
  mid-bit, frame length, busy).

`tb_control_structure` closes the loop at reduced sizes through a motor model
in the testbench (a first-order velocity lag with a speed limit). The sizes
are Ts = 512 clocks, Tenc = 4, debounce 8 clocks and 5 Mbaud. It adds 3-clock
jitter pulses on channel A and covers the following:

- position steps to +200 and −100;
- tracking of a 500-count sine;
- gains raised by 30 button presses;
- the velocity loop;
- a step that saturates the PID and the DAC;
- On/Off;
- encoder reset.

Throughout the run it checks:

- the encoder count against the shaft;
- every velocity value against the position difference;
- every RS-232 word against its sample's feedback;
- that the two gates of a PWM leg are never on together.

It counts each of these mechanisms and fails if one never happened.

`tb_control_structure_full` runs the top with every parameter at its default
for four sample periods (about 260 000 clocks). It checks the following:

- Ts = 65536 and Tenc = 64 clocks, and Treg one clock before Ts;
- Ts/2 = 10995;
- position 20 and its offset-binary form;
- the velocity of each sample;
- the PID output of three samples against the control-law model, including
  one after a Kp button press;
- the held DAC value;
- the RS-232 word;
- the PWM on-time.

### Running a testbench

From the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv --top-module tb_control_structure \
  rtl/fpga_rt_pkg.sv tb/tb_control_structure.sv -o sim
./obj_dir/sim
```

Replace the top module and file for any other testbench. Every testbench
finishes in well under a second of CPU time. All modules are synthesizable
SystemVerilog-2017. Shared types (PWM pattern and bus-type enums, the gain
selector) and widths are in `rtl/fpga_rt_pkg.sv`.
