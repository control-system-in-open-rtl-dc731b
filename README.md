# PD balance controller for a two-wheeled self-balancing robot

A two-wheeled robot that stands upright is an inverted pendulum: left alone it
falls, and the only way to keep it up is to drive the wheels under its centre of
mass, forward when it leans forward and backward when it leans back. This RTL
is the control part of such a robot, sized for a small iCE40 FPGA running from
a 12 MHz clock.

The work is split between two chips. A microcontroller reads a 6-axis IMU whose
on-chip motion processor already fuses the accelerometer and gyroscope into a
clean tilt angle, and sends that angle to the FPGA over a one-way serial line.
The FPGA does everything that can run in parallel: it receives the angle, runs a
proportional-derivative (PD) controller on every sample, turns the result into
a speed and a direction, and drives both wheel motors with PWM through a dual
H-bridge driver. Nothing in the FPGA uses a processor; each stage is a small
piece of dedicated logic that acts on a one-cycle "new data" pulse.

```
              serial 8N1                   byte_ready          data_ready
 micro-    ───────────────►  uart_rx  ───────────────► angle_   ───────────► p_ctrl ──► d_ctrl
 controller   (rx pin)       IDLE/START/   data_buffer  arranger  frame       err, P     D term
 + IMU                       DATA/STOP                  (pairs                  │          │
                                                         bytes)                 ▼          ▼
                                                                              speed_calc (P + D → |u|, sign)
                                                                                   │ duty, dir
                                                                                   ▼
                                                                     motor_ctrl: 2 × pwm_gen + DIR
                                                                                   │ m_pwm[2], m_dir[2]
                                                                                   ▼
                                                                          dual H-bridge → 2 DC motors
```

All modules share the package `sbr_pkg` (widths, the `angle_frame_t` struct and
the `motor_dir_e` direction type). The top is `sbr_top`.

## The angle link

### What travels on the wire

Each angle sample is two raw bytes, not text: first the whole degrees
(0..255), then the hundredths (0..100). There is no separator, no checksum and
no start-of-sample marker. The bytes go out as ordinary 8N1 UART frames (one
low start bit, eight data bits LSB first, one high stop bit) at 9600 baud by
default, which is 1250 clock cycles per bit at 12 MHz. The sender is expected to
transmit the two bytes back to back and then stay quiet while it reads the next
sample from the sensor.

The angle is unsigned, so the sender must offset it. This design assumes it
sends 90 degrees plus the forward tilt: upright reads 90.00, leaning forward
reads more, leaning back reads less, and both stay inside 0..255.

### Receiving a byte (`uart_rx`)

The receiver is two processes. The first is a four-state machine that only
keeps time:

| state | leaves when | action |
|-------|-------------|--------|
| IDLE  | the line falls from high to low | clear counters |
| START | half a bit time has passed | line still low: go to DATA; line high again: it was a glitch, back to IDLE |
| DATA  | one full bit time has passed, 8 times | raise a one-cycle `bit_capture` flag at the centre of each bit |
| STOP  | one full bit time has passed | stop bit high: report the byte; low: drop it |

The second process does nothing but react to that flag: it shifts the sampled
bit into an 8-bit register and, when the first process reports a good stop bit,
copies it to `data_buffer` and pulses `byte_ready` for one cycle.

The input goes through a two-flop synchroniser, and IDLE reacts to a falling
edge, not to a low level. That matters after a frame with a bad stop bit: the
line may still be low for half a bit, and a level-triggered IDLE would start a
bogus frame there.

### Pairing the bytes (`angle_arranger`)

This is the least obvious part of the design. Because the stream has no markers,
a receiver that drops or mistakes one byte would from then on combine the
decimal part of one sample with the integer part of the next, and the
controller would see nonsense angles. The arranger decides for every byte
whether it is an integer part or a decimal part:

* A byte is a **decimal part** only if all three hold: an integer part is
  pending, the byte came no more than `GAP_BITS` (15) bit times after the
  previous byte, and its value is at most 100.
* **Every other byte is a new integer part.** If one was already pending, it is
  discarded and the one-cycle `resync` output pulses.

When a decimal part is accepted, the pair is written to `frame` and
`data_ready` pulses. In practice:

| what happens on the line | result |
|--------------------------|--------|
| normal pair, then a pause | one sample |
| integer byte lost (e.g. bad stop bit) | the lone decimal byte becomes a pending integer part, the next sample's integer byte (after the pause) replaces it; one sample lost, pairing correct again |
| pause of more than 15 bit times between the two bytes of a pair | the second byte starts a new pair; the sample is lost |
| a byte above 100 where a decimal part is expected | it can only be an integer part, so a new pair starts with it |

Two things are assumed about the sender: that the two bytes of a sample follow
each other within 15 bit times (back to back they are 10 bit times apart), and
that samples are separated by more than 15 bit times (1.56 ms at 9600 baud).
At 9600 baud this allows up to about 274 samples per second.

## PD control in fixed point

### Merging the angle (`p_ctrl`)

The integer part is multiplied by 100 and the decimal part is added, so the
angle becomes one unsigned integer in hundredths of a degree (0..25600, 15
bits). Scaling the integer part up instead of the decimal part down keeps every
step in integers and loses no resolution. The setpoint (`SETPOINT`, default
9000 = 90.00 degrees) is subtracted to give a signed 17-bit error, and the
error is multiplied by the run-time gain `kp` (8 bits, unsigned) into a signed
27-bit P term. Both `err` and the P term are registered and held until the next
sample; `p_valid` pulses one cycle after `data_ready`.

### The derivative (`d_ctrl`)

A two-state machine flips on every new error. Each state owns one of two error
registers: in state A the new error is written into register A and compared
with register B, in state B the other way round. So one register always holds
the previous error while the other receives the current one, with no separate
shift. The difference (current minus previous, per sample, not per second) is
multiplied by `kd` (8 bits, unsigned). For the first sample after reset there is
no previous error and the D term is 0. `d_valid` pulses one cycle after
`p_valid`.

### From control word to speed (`speed_calc`)

When `d_valid` arrives, the P term of the same sample is already stable, so the
block adds the two into a 28-bit signed word `u`. The sign of `u` is the
direction (positive error, i.e. leaning forward, drives forward). `|u|` is
shifted right by `SPEED_SHIFT` (4) and clamped to one PWM period (600); the
result is the duty in clock cycles. `saturated` says the clamp acted.

A worked example with `kp = 16`, `kd = 48`: the robot leans 2.35 degrees forward
and was at 2.00 degrees one sample earlier. The sender sends 92 and 35; the
angle is 9235, the error +235, the P term 235 × 16 = 3760, the D term
(235 − 200) × 48 = 1680, `u` = 5440, duty = 5440 / 16 = 340 of 600 cycles
(57 %), direction forward.

How hard a given gain pushes: full speed is reached when `|u|` ≥ 9600, e.g. at
6.0 degrees of error with `kp = 16` and no D term.

## Motor outputs (`pwm_gen`, `motor_ctrl`)

Each motor has its own `pwm_gen`: a counter runs 0..`PERIOD`−1 and the output is
high while the counter is below the duty, so the duty is in clock cycles
(0 = off, `PERIOD` = fully on). The default period of 600 cycles gives 20 kHz
at 12 MHz, the fastest PWM the MC33926 dual driver accepts and above the
audible range. The duty input is taken only when the counter wraps, and the
direction pin of that motor changes at the same moment, so a pulse is never cut
short and the bridge never reverses in the middle of a pulse.

Both motors get the same speed and direction. `MIRROR` inverts the direction
pin of either motor, for a motor mounted facing the other way. The driver's
enable and fault pins are not used.

## Timing

| event | cycles after the previous one |
|-------|------------------------------|
| falling edge of the start bit of the decimal byte → `byte_ready` | 9.5 bit times + 4 (synchroniser, edge detect, output register) |
| `byte_ready` → `angle_valid` (`data_ready`) | 1 |
| `angle_valid` → `p_valid` | 1 |
| `p_valid` → `d_valid` | 1 |
| `d_valid` → `duty`/`dir`/`speed_valid` | 1 |
| `duty`/`dir` → motor pins | up to one PWM period (600 cycles = 50 µs) |

From the last bit of a sample to the motors this is well under 0.1 ms, small
next to the sensor's sample period.

## Parameters of `sbr_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `CLK_HZ` | 12 000 000 | clock frequency (the board's oscillator) |
| `BAUD` | 9600 | serial rate of the angle link |
| `GAP_BITS` | 15 | idle time, in bit times, that separates two samples |
| `SETPOINT` | 9000 | upright angle in hundredths of a degree |
| `SPEED_SHIFT` | 4 | `duty = |P + D| >> SPEED_SHIFT` |
| `PWM_PERIOD` | 600 | PWM period in clock cycles (20 kHz) |
| `MIRROR` | 2'b00 | per-motor inversion of the direction pin |

`kp` and `kd` are input ports, not parameters, so the gains can be tuned
while the robot runs (from switches, or from another block); a new value is used
from the next sample on.

## What is fixed by the original design and what is chosen here

Taken from the original design: the split into a microcontroller that delivers a
fused angle and an FPGA that does control and motors; the two-byte angle format
(whole degrees, then hundredths up to 100, binary, no separator); a UART
receiver built from a timing state machine IDLE/START/DATA/STOP plus a separate
process that assembles the byte and reports it with a `byte_ready` pulse and a
data buffer; a separate block that keeps integer and decimal bytes in order;
merging the angle by multiplying the integer part by 100; a P term that is the
merged value times a gain that can be changed at run time; a D term from a
two-state machine that flips on every sample and multiplies the difference of
current and last error by a gain; PWM speed plus a direction for two DC motors
through an MC33926 driver; the 12 MHz clock and the iCE40HX4K device.

Chosen here, because the original leaves it open: the baud rate and frame
format; the synchroniser, edge-triggered start, glitch and bad-stop-bit
handling; the whole pairing rule of `angle_arranger` (time gap plus the
0..100 range); the upright setpoint and the idea that the sender offsets the
angle by 90 degrees; explicit subtraction of a setpoint (the original describes
the P branch as multiplying the merged angle by the gain and speaks of an error
only for the D branch); 8-bit gains; the D term being 0 on the first sample;
how P + D becomes a duty (shift and clamp) and the sign convention; the PWM
period; updating duty and direction only at period boundaries; the `MIRROR`
option; asynchronous active-low reset everywhere.

Not included: the microcontroller firmware, the IMU, the motor driver and the
motors are outside the FPGA; `sbr_top` has the serial input and the driver pins
as ports. An earlier variant in which the FPGA itself talked to the IMU over
I2C and fused raw accelerometer and gyroscope data is not part of this design.
There is no tilt limit that switches the motors off when the robot has fallen;
add one in `speed_calc` if needed.

## Size

Synthesised for iCE40 with yosys (`synth_ice40`) at the default parameters,
`sbr_top` takes 998 LUT4s, 238 carry cells and 243 flip-flops, against 3520
logic cells in an iCE40HX4K. Most of the LUTs are the two 17×8 and 18×8
multipliers (the iCE40HX has no DSP blocks) and the ×100 merge. Place and
route has not been run.

## Verification

Every block has a self-checking testbench that prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it hangs.
Expected values are worked out in the testbench with plain integer arithmetic,
not by reusing the RTL.

| testbench | what it checks |
|-----------|----------------|
| `tb_uart_rx` | 37 known and random bytes at 12 MHz / 9600 baud, byte value and `byte_ready` latency; a frame with a low stop bit and a short glitch give no byte |
| `tb_angle_arranger` | normal pairs, a lost integer byte, a byte above 100 in the decimal slot, a pause inside a pair; number of `resync` pulses |
| `tb_p_ctrl` | merged error and P term for corner and random samples and gains; outputs hold between samples |
| `tb_d_ctrl` | D term against an independently tracked previous error, first sample 0, back-to-back samples |
| `tb_speed_calc` | direction, shifted and clamped duty, `saturated`, both signs |
| `tb_pwm_gen` | period length, high time and pulse shape for duties 0..600; a duty change mid-period does not affect that period |
| `tb_motor_ctrl` | high time and direction pins of both motors with one motor mirrored; direction pins change only at period starts |
| `tb_sbr_top` | the whole chain at default parameters, fed by a model of the sender: 28 samples checked at the monitor outputs and at the motor pins, 3-cycle pipeline latency, and each of forward, reverse, saturation, zero duty, non-zero D term, gain change, lost byte, bad stop bit, out-of-range decimal byte, line glitch and resync happening at least once |
| `tb_balance_loop` | closed loop with a simulated pendulum (see below) |

Three rules are also checked inside the RTL by immediate assertions, active
when simulating with `--assert`: `uart_rx` never reports a byte twice,
`angle_arranger` never publishes a decimal part above 100, and `pwm_gen`'s
output always equals the compare of its counter with the latched duty.

`tb/arduino_model.sv` is the model of the sending microcontroller: it writes
8N1 bytes timed on the testbench clock and can also send a bad stop bit or a
glitch.

### Closed-loop run

`tb_balance_loop` closes the loop around `sbr_top` with a model of the robot, a
rigid pendulum on driven wheels:

    theta'' = (g / L) · sin(theta) − (A_max / L) · drive · cos(theta)

`drive` is the signed PWM high time of the motor pins averaged over 0.1 ms, so
the model sees exactly what the motor driver would. The sender model reports
the tilt every 10 ms. With L = 0.1 m, A_max = 5 m/s², `kp = 16` and `kd = 48`
the robot comes upright from an 8 degree tilt and recovers from a 1.5 rad/s
push (which saturates the motors for a few samples), settling to under 0.01
degree within 1.5 s each time. These constants are illustrative, not those of a
real robot: they show that the loop, the signs and the scaling work together,
not which gains a particular robot needs.

### Running the tests

With Verilator 5 (two-state simulation, so every register that is read has a
reset), from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sbr_pkg.sv tb/tb_sbr_top.sv \
          --top tb_sbr_top -o sim
./obj_dir/sim
```

Replace `tb_sbr_top` with any other testbench name. `tb_sbr_top` simulates about
3 million clock cycles and takes a couple of seconds; `tb_balance_loop`
simulates 36 million (3 s of robot time) and takes under half a minute.
`tb_balance_loop` accepts `+kp=N +kd=N` to try other gains.
