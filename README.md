# Magic See-Saw: an SPI-attached PID controller for a ball-balancing beam

A ball rolls freely along a track on a platform that a servo can tilt about
one axis. The goal is to hold the ball at a set point, and to bring it back
after a push, with little overshoot. A soft potentiometer under the track
gives the ball's position. A microcontroller reads it, works out the position
error and sends it to an FPGA. The FPGA evaluates a discrete PID law in
hardware and returns a control word. The microcontroller then turns that word
into a servo angle and drives the servo with a PWM signal.

This repository holds the logic of that loop in SystemVerilog:

* **`pid_controller`** is the FPGA side. It is an SPI slave that takes a 16-bit
  signed error, does one PID update per error in 16-bit two's-complement
  arithmetic, and returns a 16-bit signed control word.
* **`servo_pwm`** is the period/duty PWM generator that drives the servo.
* **`magic_seesaw_top`** puts the two side by side. It brings out every signal
  that would go to the microcontroller.

The microcontroller firmware, its ADC and its SPI master are not hardware and
are not included. Neither are the sensor, the servo and the mechanics. The
end-to-end testbench models all of them (see *Verification*).

## The control law

With e[k] as the k-th error received, the controller computes

    u[k] = u[k-1] + K1*e[k] + K2*e[k-1] + K3*e[k-2]
    K1 = Kp + Ki + Kd,   K2 = -Kp - 2*Kd,   K3 = Kd

This is the continuous PID law u = Kp*e + Ki*integral(e) + Kd*de/dt, turned
into a difference equation with backward differences. The sampling period is
folded into the gains. The gains are elaboration-time parameters `KP`, `KI`
and `KD` of `pid_core` and `pid_controller`. The module derives the three
coefficients from them (`seesaw_pkg::coef_k*`).

The defaults are **KP = 2, KI = 0, KD = 16**:

* Ki is 0 on purpose. An integral term grows for as long as the error is not
  zero, so it quickly overflows 16 bits. The integral action lives in the
  microcontroller's firmware instead (gain 1, clamped to +-2).
* Kd is larger than Kp because the ball on the beam is very lightly damped.
* The exact values 2 and 16 are this design's choice. They settle a simple
  rolling-ball model with the 40 ms firmware loop and little overshoot. Tune
  them for a real rig.

**Scaling and overflow.** The firmware sends the error in millimetres, that
is metres x 1000, as an `int16`. It divides the returned word by 12 to get
degrees. All products and sums are cut to 16 bits and **wrap**; they do not
saturate. With errors of at most 500 and the default gains, |u| stays below
17000. A finer error scale, or a non-zero `KI`, can wrap the output. Then the
platform gets a badly wrong command. This wrap matches the original board, and
the testbenches check it bit-exactly. If you widen the arithmetic, change
`WORD_W` in `seesaw_pkg` and the SPI word length together.

## The exchange protocol

There is no chip select. Two side lines frame the SPI transfers:

| line    | driver          | meaning                                            |
|---------|-----------------|----------------------------------------------------|
| `load`  | microcontroller | high while the error word is being shifted in      |
| `done`  | controller      | high while a fresh control word is waiting         |
| `reset` | microcontroller | high for a while before the first exchange: clears u, e[k-1], e[k-2] |

One control step:

1. The microcontroller raises `load`. It clocks 16 bits into `sdi`, MSB first.
2. It lowers `load`. The controller does the update and raises `done`.
3. The microcontroller sees `done`. It clocks 16 bits out of `sdo`, MSB first,
   and writes filler bits that the controller ignores.
4. After the 16th read-out bit the controller lowers `done` and waits.

If the microcontroller skips step 3, the next rise of `load` clears `done`.

SPI timing is mode 0: `sck` idles low, the slave samples `sdi` on the rising
edge and changes `sdo` after the falling edge. Bit 15 of the word is on `sdo`
as soon as `done` rises, before the first clock edge. The link was designed
for a 4 MHz `sck`.

**Latency.** `done` rises exactly **3 `clk` edges** after `load` falls:

* 2 edges for the `load` synchroniser;
* 1 edge for the update itself, which forms the sum combinationally, loads
  the output register, shifts the error history and sets `done` all at once.

`done` falls 3 to 4 `clk` edges after the last read-out `sck` edge.

## Clock domains, and why the crossings are safe

`ctrl_spi` is clocked by `sck` itself. `pid_core` runs on `clk`. The two
meet in `pid_controller`:

* `load` goes into `clk` through a two-flop synchroniser (`sync2`). The core
  acts on its falling edge.
* After each 16-bit read-out, `ctrl_spi` flips `tx_toggle`. A second
  synchroniser and an edge detector turn each flip into a one-cycle
  `tx_done` pulse.
* The 16-bit error word crosses with no synchroniser. The word was last
  written before `load` fell, and the core reads it two `clk` cycles later.
* The angle word and `done` cross into the `sck` domain the same way. The
  core holds them constant while `done` is high, and `sck` only toggles while
  `load` or `done` is high.

These word-wide crossings rely on the protocol. A master that toggles `sck`
outside a framed transfer, or changes `load` in the middle of a transfer,
breaks them. `reset` is asynchronous and active high in both domains.

## Servo PWM

`servo_pwm` divides its clock by `PRESCALE` (8) and counts prescaled ticks:

* The counter restarts after `period` ticks, and each restart raises the
  output.
* The output falls when the counter reaches `duty`.
* `duty = 0` gives a constant low; `duty >= period` gives a constant high.

New `period`/`duty` values are written with `upd_we`. They take effect only
at the end of the running period, so a pulse is never cut short.
`period_start` marks the first clock of every period.

With a 40 MHz clock the defaults give a 5 MHz tick and a 4.5 ms period
(22500 ticks), at the fast end of the DS3218 servo's 50-330 Hz range. The
servo maps 0.5 ms to 0 degrees and 2.5 ms to 270 degrees, so the duty for an
angle a (in degrees) is

    duty = 2500 + a * 10000 / 270

The firmware computes this. The calibrated level position of the original
rig was 151.5 degrees, and commands were limited to -12..+10 degrees around
it.

## Parameters

| module           | parameter    | default | notes                                    |
|------------------|--------------|---------|------------------------------------------|
| `pid_controller`, `pid_core` | `KP`, `KI`, `KD` | 2, 0, 16 | KI = 0 as in the original; KP and KD are this design's own |
| `seesaw_pkg`     | `WORD_W`     | 16      | error and control word width             |
| `servo_pwm`      | `PRESCALE`   | 8       | clock divider ahead of the counter       |
| `servo_pwm`      | `CNT_W`      | 16      | counter and register width               |
| `servo_pwm`      | `PERIOD_RST` | 22500   | 4.5 ms at 40 MHz / 8                     |
| `servo_pwm`      | `DUTY_RST`   | 0       | no pulse until the first write           |

## Where this departs from the original project, and what to trust

* **Gains.** The original design gives no gain values; KP = 2 and KD = 16 are
  assumptions (see above).
* **SPI edges.** The original's prose describes the master changing data on
  the leading edge and sampling on the falling one. Its FPGA hardware,
  however, samples on the rising edge and drives on the falling one. This
  RTL follows the FPGA hardware (mode 0). Configure the master to match.
* **Clearing `done`.** The original describes `done` falling once the word
  has been sent. Its hardware cleared `done` when the next `load` arrived.
  Both are implemented here.
* **Update trigger.** The update fires once per falling edge of the
  synchronised `load`. It cannot fire spuriously right after reset.
* **Synchronisers.** These were added; the original drove the core from the
  raw lines.
* **PWM.** In the original, the PWM came from the microcontroller's built-in
  peripheral. Here it is RTL written from that peripheral's described
  behaviour: a prescaler, a period counter that restarts, a duty compare and
  update registers applied at the period end. The reset values and the
  single write strobe are this design's own.
* **FPGA clock.** The original does not state its clock frequency. The
  testbenches use 40 MHz. Nothing in the RTL depends on it, as long as `clk`
  is fast enough to meet the 3-cycle latency between transfers.

All blocks are small and fully checked in simulation (below). Nothing here has
been run on hardware.

## Verification

Every testbench checks itself and prints
`TB_RESULT checks=<n> failures=<m>`:

* `tb_pid_core` drives two cores, one with a non-zero Ki, through the load
  handshake with random and wrapping errors. An integer model predicts every
  output. It also checks when `done` rises and clears.
* `tb_ctrl_spi` uses a behavioural master to check the error word, the
  read-out of random angles bit for bit, filler bits being ignored, idle
  clocks being ignored and one toggle per read-out.
* `tb_pid_controller` runs the full four-phase exchange at 4 MHz SPI and a
  40 MHz `clk`. It checks every control word and the exact 3-cycle latency,
  and covers a skipped read-out, reset and 16-bit wrap.
* `tb_servo_pwm` measures every period and pulse at reduced size. It covers
  mid-period writes, constant low and constant high, plus a 4.5 ms / 1.5 ms
  period at the default size.
* `tb_magic_seesaw_top` is a closed loop at default parameters. The
  testbench models the firmware (ADC, error scaling, /12, software integral,
  limits, servo offset, 40 ms loop) and a rolling ball driven by the measured
  PWM pulses. It checks:
  * every control word;
  * every PWM period and pulse;
  * that the ball settles within 25 mm of the set point, both after a 9 cm
    disturbance and after a 10 cm set-point step. In practice it ends within
    a few mm.

  It also counts each mechanism (transfer, read-out, load-cleared `done`,
  deferred PWM write, 16-bit wrap, reset) and fails if one never happens.
  It simulates about 3.4 s of real time and takes a few minutes.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
      -y rtl -y tb +libext+.sv -Irtl rtl/seesaw_pkg.sv tb/tb_pid_controller.sv \
      --top-module tb_pid_controller -o sim
    ./obj_dir/sim

Swap in another `tb_*` file and top-module name to run the others.

## Files

| file                     | content                                              |
|--------------------------|------------------------------------------------------|
| `rtl/seesaw_pkg.sv`      | word width, `word_t`, gain-to-coefficient functions  |
| `rtl/sync2.sv`           | two-flop synchroniser                                |
| `rtl/ctrl_spi.sv`        | SPI slave in the `sck` domain                        |
| `rtl/pid_core.sv`        | difference-equation core and `done` handshake        |
| `rtl/pid_controller.sv`  | FPGA controller: SPI slave + synchronisers + core    |
| `rtl/servo_pwm.sv`       | servo PWM generator                                  |
| `rtl/magic_seesaw_top.sv`| system top                                           |
| `tb/tb_*.sv`             | the testbenches above                                |
