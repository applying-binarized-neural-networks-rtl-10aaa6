# FPGA fabric of a BNN-guided autonomous rover

A small four-wheeled rover looks for a target object (a stop sign) with a
camera and drives towards it. Everything runs on one Zynq SoC: the ARM
processor grabs frames, cuts them into 32x32 tiles and runs the control loop.
The FPGA fabric holds two peripherals of that processor:

* a binarized neural network accelerator that classifies the tiles, and
* a motor controller that turns speed and direction words into the six
  control pins of an L298N H-bridge.

This repository holds SystemVerilog for the fabric side: the motor
controller, the AXI4-Lite peripheral interconnect that connects the processor
to both peripherals, the reset block, and a top level that wires them
together as the rover's block design does. The neural network accelerator is
an existing HLS core used unmodified, so it is not part of this RTL. Its
control port is brought out of the top level, and the testbench drives it
with a register model.

## Block structure

```
                       fclk_clk0 (100 MHz), fclk_reset0_n
                                   |
                             +-----------+
                             | reset_sync|---- interconnect / peripheral resets
                             +-----------+
  processor GP0 master                                       to the accelerator
  (s_axi_* ports) --AXI4-Lite--> axil_interconnect --M00--> (bnn_* ports, 0x43C0_0000)
                                         |
                                        M01 (0x43C2_0000)
                                         v
                                   motor_ctrl -------------> motor_ena_o  (ENA, left)
                                   |- motor_axil_regs        motor_enb_o  (ENB, right)
                                   |- pwm_gen (ENA)          motor_input_o[3:0] (IN4..IN1)
                                   '- pwm_gen (ENB)
```

| File | Role |
|---|---|
| `rtl/pl_top.sv` | top level: reset block, interconnect, motor controller; processor and accelerator links as plain ports |
| `rtl/axil_interconnect.sv` | one AXI4-Lite master to two slaves by address, DECERR elsewhere |
| `rtl/motor_ctrl.sv` | the motor controller peripheral (registers + two PWMs) |
| `rtl/motor_axil_regs.sv` | its AXI4-Lite register slave |
| `rtl/pwm_gen.sv` | 10-bit, 1.024 ms PWM for one enable pin |
| `rtl/reset_sync.sv` | asynchronous assert, synchronous release of the fabric resets |
| `rtl/axil_if.sv` | AXI4-Lite bundle with handshake assertions, used inside the top |
| `rtl/motor_pkg.sv` | register offsets, speed type, direction codes, command struct |

The accelerator's memory path (its AXI4 master, a vendor interconnect from
AXI4 to the processor's AXI3 HP0 port, and the DDR) connects only parts that
are not in this RTL, so it does not appear in the top level at all.

## Address map and registers

| Base | Slave |
|---|---|
| `0x43C0_0000` | accelerator control registers (M00, ports `bnn_*`) |
| `0x43C2_0000` | motor controller (M01) |
| anything else | answered by the interconnect with DECERR, read data 0 |

Each slave gets a 64 KiB window.

Motor controller registers (32 bit, write-only):

| Offset | Bits | Field |
|---|---|---|
| 00h | 3..0 | IN4..IN1, driven straight onto the H-bridge inputs |
| 04h | 9..0 | left speed, 0..1023, PWM on ENA |
| 08h | 9..0 | right speed, 0..1023, PWM on ENB |
| 0Ch | - | reserved |

Only 24 bits carry information. The fourth word is there because an
AXI4-Lite register window holds at least four words. Writes honour WSTRB per
byte and ignore bits above a field. Reads always complete with OKAY and
return zero: the registers are specified as write-only.

For reference, the accelerator's own control block (not built here) has a
control word at 00h (bit 0 start, 1 done, 2 idle, 3 ready, 7 auto restart),
the input buffer address at 10h, the output buffer address at 1Ch and the
number of images at 5Ch. Each image is 32x32 RGB with 8 bits per colour,
3072 bytes. Each result is 64 16-bit confidences, 128 bytes.

## Driving the H-bridge

Two motors on each side of the rover share one half of the L298N. ENA
carries the left side's PWM and ENB the right side's. IN1..IN4 set the
rotation direction of the two halves. The controller passes the four
direction bits through unchanged, so software decides the meaning of each
code. The codes named for the bridge are:

| IN4..IN1 | Meaning |
|---|---|
| 0000 | stop |
| 0110 | forward |
| 1001 | backward |
| 1010 | turn on the spot, left |
| 0101 | turn on the spot, right |

The rover's control software uses other patterns for its two modes. In
*search* mode it sets IN1 = ~t, IN2 = t, IN3 = t, IN4 = ~t for a turn
direction t, with equal duty on both sides. In *approach* mode it sets IN1 =
0, IN2 = 1, IN3 = 0, IN4 = 1 (code 1010) and steers by giving the two sides
different duties. These patterns do not agree with the table above for the
same wiring. Because the hardware passes the bits through, it serves either
reading. The testbenches drive both sets of codes.

Pin assignment on the Pynq-Z1 header J3: ENA IO39, IN1 IO38, IN2 IO37, IN3
IO36, IN4 IO35, ENB IO34.

## PWM timing

The timing in `pwm_gen` is the least obvious part of the design:

* **Period.** A prescaler of `TICK_DIV` = 100 clocks makes 1 us steps at
  100 MHz. A 10-bit step counter gives a period of 1024 steps, which is
  1.024 ms (976.6 Hz).
* **Duty scale.** Speed 0 means 0 % and speed 1023 must mean 100 %. With
  1024 steps, a plain `step < duty` comparison would give 1023/1024 at full
  speed, so full scale is special-cased to stay high for the whole period.
  Every other value d is high for d/1024 of the period, exactly `d*100`
  clocks. The motors start turning only above about 40 % duty, so software
  should not use small values.
* **When a new speed takes effect.** The speed is sampled once, in the first
  clock of each period, and held to the end of that period. A register write
  therefore never cuts a pulse short: it shows up at the next period start,
  up to 1.024 ms after the write. The direction pins change in the clock
  after the write.
* **Alignment.** `pwm_o` is registered, one clock behind the step counter.
  ENA and ENB come from two identical counters released by the same reset,
  so the two pins stay in phase. `motor_ctrl` brings out `ena_start_o`, a
  one-clock pulse at each period start, for observation.

## Interconnect behaviour

`axil_interconnect` has independent write and read paths, and each carries
one transaction at a time:

1. Accept a write when AW and W are both valid.
2. Decode the address.
3. Present AW and W on the chosen master port. The two may complete in
   either order.
4. Wait for B, then return it.

Reads run the same way with AR and R. With zero-wait slaves, a response
comes back 3 clocks after the request handshake. A DECERR comes back 1 clock
after it. The throughput is low, but it suits register traffic (a few
accesses per video frame). The `axil_if` interface asserts the AXI rule that
VALID and its payload stay stable until READY, on every link inside the top
level.

## Reset

`reset_sync` takes the processor's fabric reset, which is asynchronous and
active low. It drops both outputs at once. When the input rises, it passes
the input through two flip-flops, waits `HOLD_CYCLES` (16) more clocks, and
releases interconnect and peripheral reset together on the 19th rising edge.
All other flip-flops in the design use synchronous, active-low reset. After
reset the motors are stopped (IN = 0000, both duties 0).

## Where this RTL departs from, or adds to, the original design

* The motor controller was originally written in VHDL. This is a new
  SystemVerilog design of the same register map and pin behaviour.
* The fabric clock frequency (100 MHz) is taken from the name of the reset
  block in the original block design. The 100-clock prescaler follows from
  it.
* These are choices of this design, since the original gives only the
  function:
  * treating speed 1023 as fully on;
  * sampling the duty at period start;
  * reads of the motor registers returning zero;
  * the AXI handshake timing;
  * the 64 KiB windows and DECERR;
  * the sequential interconnect;
  * the reset hold time.
* The processor's general-purpose port is an AXI3 full interface in the real
  SoC; the vendor interconnect converts it. Here the top-level slave port is
  AXI4-Lite, so no protocol conversion is modelled.
* The accelerator, the processor, the memory interconnect and the L298N
  itself are outside this RTL.

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_pwm_gen` | period length and high time of every period, at 100 and at 4 clocks per step; duties 0, 1, 1022, 1023 and others, changed mid-period |
| `tb_motor_axil_regs` | register contents against a reference after every write, byte strobes, reserved word, zero reads, 1-clock response timing |
| `tb_motor_ctrl` | documented and control-mode direction codes, ENA/ENB duty per period against the written speeds |
| `tb_axil_interconnect` | random traffic to both windows and unmapped space against reference memories; routing, DECERR, SLVERR pass-through, window edges, 3-clock latency |
| `tb_reset_sync` | asynchronous assertion, release on exactly the 19th (default) or 6th (hold 3) edge, glitch restart |
| `tb_pl_top` | full-size end-to-end run, described below |

`tb_pl_top` runs the full-size design, with no parameter overrides, through
one pass of the rover's loop:

* reset;
* an inference job for a 640x480 frame split into 1107 tiles: buffer
  addresses, image count, start, poll until done, read-back;
* search and approach motor commands, with duties computed in the testbench
  from the rover's constants. For example, a turn speed of 1.3 1/s gives
  duty 332, and 0.2 m/s straight ahead gives 250;
* full speed, a stop, and accesses to unmapped addresses.

It counts each mechanism (reset release, accelerator run, status poll,
DECERR, both modes, 0 % and 100 % duty, a speed change deferred to the next
period) and fails if one never happened. About 1 M clocks run in a few
seconds.

Testbench helpers live in `tb/`:

* `axil_bfm`, an AXI4-Lite master with random delays;
* `axil_slave_model`, a register-file slave;
* `bnn_ctrl_model`, the accelerator's control registers;
* `pwm_monitor`, a per-period PWM checker.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv -Irtl rtl/motor_pkg.sv tb/tb_pl_top.sv \
    --top-module tb_pl_top
./obj_dir/Vtb_pl_top
```

Replace `tb_pl_top` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/motor_pkg.sv rtl/pl_top.sv`.

## Changing it

* **Different fabric clock.** Set `PWM_TICK_DIV` of `motor_ctrl` to clocks
  per microsecond, which keeps the 1.024 ms period. The period is
  `1024 * PWM_TICK_DIV` clocks.
* **Quieter PWM.** The 976.6 Hz switching is audible. A rate of about 15 kHz
  suits the L298N, but check the switching losses with the motors in use.
  Lower `PWM_TICK_DIV` to about 6 for 16.3 kHz at 100 MHz.
* **Other addresses.** Change the interconnect's `M00_BASE`, `M01_BASE` and
  `WIN_BITS`.
* **Other reset timing.** Set `HOLD_CYCLES` of `reset_sync`.
