# Traffic-light controller for an FPGA

A small synchronous controller that drives the lamps of a model road
crossing from an FPGA board. It runs one of two signal programs, selected with
three function keys:

* **Type 1: two-way crossing.** A North-South road and a West-East road take
  turns. Each road has a pedestrian crossing with a request button.
* **Type 2: four-arm crossing.** The North, West, South and East arms get
  green one at a time, in that order. Each arm has a pedestrian crossing with a
  request button.

The keys also give a **blink** mode, where every vehicle yellow flashes, and a
**clear** that stops the controller and returns it to its first state. The
design has two parts: a clock divider that makes a slow time base from the
50 MHz board clock, and a state machine that times each state on that base.
The output is 20 lamp drives for an LED board: a red/yellow/green head per arm
and a red/green pedestrian head per arm.

## Files

| file | contents |
|---|---|
| `rtl/tl_pkg.sv` | state, mode and lamp types; per-state delays and lamp patterns |
| `rtl/clk_div.sv` | 2^DIV_BITS clock divider with a one-cycle tick output |
| `rtl/sync_2ff.sv` | two-flip-flop synchronizer for the push buttons |
| `rtl/traffic.sv` | the state machine |
| `rtl/traffic_light_top.sv` | top level: divider, synchronizers, state machine |
| `tb/tl_tb_pkg.sv` | reference lamp tables and delays for the testbenches, written out separately from the RTL |
| `tb/clk_div_tb.sv` | divider test |
| `tb/traffic_tb.sv` | state machine test, fast tick |
| `tb/traffic_light_top_tb.sv` | end-to-end test with a 2^4 divider |
| `tb/traffic_light_top_full_tb.sv` | end-to-end test at full size (2^23 divider), type 1 |
| `tb/traffic_light_top_type2_full_tb.sv` | end-to-end test at full size, type 2 and blink |

## The signal programs

Delays are in *delay units*; see "Time base" below for what a unit is in
seconds. Lamps are listed per vehicle head N, W, S, E (R/Y/G). A pedestrian
head is red unless the table says otherwise.

### Type 1 (two-way crossing)

| state | N and S | W and E | pedestrians | delay | next |
|---|---|---|---|---|---|
| s0 | G | R | all red | 5 | s1 |
| s1 | Y | R | all red | 1 | sns if an N-S request is pending, else s2 |
| s2 | R | R | all red | 1 | s3 |
| s3 | R | G | all red | 5 | s4 |
| s4 | R | Y | all red | 1 | sew if a W-E request is pending, else s5 |
| s5 | R | R | all red | 1 | s0 |
| sns | R | R | N and S green | 6 | s3 |
| sew | R | R | W and E green | 6 | s0 |

The board has four arms, so type 1 drives the North and South heads together
from its N-S column, and West and East from its W-E column. The North or South
pedestrian button makes an N-S request. The West or East button makes a W-E
request.

A pedestrian phase replaces the all-red state that follows a yellow. All
vehicle lamps are red for six units while the crossing shows green. The
controller then carries on with the other road's green. The six-unit phase is
longer than a green so that slow and diagonal crossers can clear the road.

### Type 2 (four-arm crossing, clockwise)

| arm | green (5) | yellow (1) | all red (1) | pedestrian phase (6) |
|---|---|---|---|---|
| North | s8 | s9 | s10 | sn: s9 to sn to s10 |
| West | s11 | s12 | s13 | sw: s12 to sw to s13 |
| South | s14 | s15 | s16 | ss: s15 to ss to s16 |
| East | s17 | s18 | s19 | se: s18 to se to s19 |

After s19 the controller returns to s8. In a pedestrian phase, every vehicle
head is red and only that arm's pedestrian head is green. The phase itself is
six units long. Like type 1, the phase is entered from the arm's yellow state,
and the arm's own all-red state follows it.

### Pedestrian buttons are sampled, not stored

The controller looks at a pedestrian button only in the clock cycle in which a
yellow state ends. A button that is pressed and released during the green is
not remembered. So on the real board a pedestrian must hold the button until
the yellow ends. In the signal program, a press is the condition tested when
the yellow state ends. A request latch would be a small addition in
`traffic.sv`, but it would change that behaviour.

## Function keys and modes

`clr`, `d` and `d1` are active high (1 = pressed):

| clr | d | d1 | mode |
|---|---|---|---|
| 1 | x | x | clear: go to s0 and hold it, showing its lamps |
| 0 | 0 | x | type 1 |
| 0 | 1 | 0 | blink: all four vehicle yellows flash together, everything else dark |
| 0 | 1 | 1 | type 2 |

Blink shows the yellows for one delay unit, then dark for one delay unit. It
starts lit.

Any change of mode restarts the new program at its first state: s0 for type 1,
s8 for type 2. When clr is released, s0 runs with a fresh timer. The first
state after a mode change can be up to one tick short, because the divider
keeps running and the state is not aligned to its ticks. Every later state
lasts exactly its delay.

The pedestrian buttons are active low (`ped_n_n` .. `ped_e_n`, 1 = released),
as on the board. Every key passes through a two-flip-flop synchronizer in the
top level. A press therefore reaches the state machine 2 to 3 clock cycles
later. The design does not debounce: a bouncing key only flickers the mode for
a few milliseconds, and a pedestrian button is only looked at once per yellow.

## Time base

`clk_div` is a free-running `DIV_BITS`-bit counter. Its top bit is a square wave
at f_clk / 2^DIV_BITS, brought out as `clk_slow`. Its all-ones state gives
`tick`, a one-cycle pulse once per divided period. With the 50 MHz board clock
and the default `DIV_BITS = 23`:

    f_tick = 50 MHz / 2^23 = 5.9605 Hz,   one tick = 2^23 cycles = 0.1678 s

The state machine stays on the 50 MHz clock and advances its timer on `tick`.
It does not run on the divided clock, so the whole design is one clock domain.

A state with delay D lasts `D * TICKS_PER_UNIT` ticks. With the default
`TICKS_PER_UNIT = 1`, one delay unit is one divided-clock period. A "5" green
then lasts 5 x 0.1678 s = 0.84 s, a pedestrian phase 1.01 s, and a whole
type 1 round 2.35 s. This makes the sequence easy to watch on a demonstration
board. To get delays in real seconds, set `TICKS_PER_UNIT = 6`: one unit is
then 1.007 s and a green 5.03 s. Another option is to raise `DIV_BITS` and use
a non-power-of-two count.

## Module interfaces

### `traffic_light_top #(DIV_BITS = 23, TICKS_PER_UNIT = 1)`

| port | dir | width | meaning |
|---|---|---|---|
| clk_50 | in | 1 | 50 MHz board clock |
| rst_n | in | 1 | asynchronous reset, active low; the controller starts in s0 |
| btn_clr, btn_d, btn_d1 | in | 1 each | function keys, active high |
| ped_n_n, ped_w_n, ped_s_n, ped_e_n | in | 1 each | pedestrian buttons, active low |
| lamps | out | `tl_pkg::lamps_t` (20) | `car[arm]` = {red, yellow, green}, `ped[arm]` = {red, green}; arm 0..3 = N, W, S, E |
| state | out | `tl_pkg::state_t` (5) | current state, for debug |
| mode | out | `tl_pkg::mode_t` (2) | current mode |
| clk_slow | out | 1 | divided clock, for an indicator LED |

The packed `lamps_t` places, from MSB to LSB: car E, S, W, N (3 bits each,
red/yellow/green), then ped E, S, W, N (2 bits each, red/green). Map these
bits to the LED board's pins in the FPGA's pin constraints.

### `traffic #(TICKS_PER_UNIT = 1)`

This is the state machine on its own. It has the same lamp, state and mode
outputs as the top, and takes `tick` from any time base. Its state register
holds one of 24 states. Its timer counts up to 6 x TICKS_PER_UNIT ticks. The
mode register holds the decoded keys of the previous cycle. The lamps are a
decode of the state and mode registers, so they change one clock after the
tick that ends a state. Two assertions check that the timer never passes the
current state's delay, and that a running type 1 program holds only type 1
states.

### `clk_div #(DIV_BITS = 23)`

Ports are `clk`, `rst_n`, `clk_out` and `tick`. After reset, the first tick
comes at cycle 2^DIV_BITS - 1, and then one tick every 2^DIV_BITS cycles.

## Where this design chooses for itself

Some behaviour is not fixed by the state tables alone. These are the readings
taken here. Each one is a small, local change in `traffic.sv` or `tl_pkg.sv`.

* **Delay units.** The tables give delays in seconds, but the timer is clocked
  at 5.96 Hz. The units count divided-clock periods; see "Time base" above.
* **Type 2 pedestrian phases** are entered from the yellow state of each arm,
  for all four arms.
* **Delays.** Yellow and all-red states always last one unit.
* **Pedestrian phases in type 2.** Type 2 has a pedestrian phase for each arm,
  as its state table does.
* **Leaving a pedestrian phase.** It ends when its time is up, whether or not
  the button is still held.
* **Blink** flashes all four vehicle yellows together at one unit on, one
  unit off.
* **Keys outside the table.** clr wins over d and d1; d = 0 with d1 = 1 runs
  type 1.
* **Added parts.** The reset input, the synchronizers and the tick-enable
  time base are additions. So is the board mapping of type 1 onto four heads
  (N with S, W with E).

## Verification

Every testbench checks its results against values written out by hand in
`tb/tl_tb_pkg.sv` and in the testbenches themselves, never against the RTL
package's functions. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog.

* `clk_div_tb` runs a 4-bit divider and a default 23-bit divider side by side.
  For the 4-bit divider it checks tick and clk_out cycle by cycle for 256
  periods. For the 23-bit divider it checks that ticks come exactly 2^23
  cycles apart.
* `traffic_tb` drives the state machine with a tick every 3 cycles and
  TICKS_PER_UNIT = 2. It goes through every state of both programs, with and
  without requests, and through blink, clear, clear over type 2, and d = 0 with
  d1 = 1. For every state it checks the lamps and the exact number of ticks.
* `traffic_light_top_tb` runs the whole top with DIV_BITS = 4. A monitor
  checks every state change against a reference successor table, and the
  lamps and the duration in clock cycles. The test counts each mechanism:
  sns, sew, sn, sw, ss, se, blink toggles, clear, and switches to type 2 and
  back. It fails if any of them never happened.
* `traffic_light_top_full_tb` runs the top with every parameter at its
  default. It covers a full type 1 round with a North-South pedestrian phase,
  then one more yellow without a request. It checks every state's length to
  the cycle; a green, for example, lasts 5 x 2^23 = 41,943,040 cycles. This
  simulates about 230 million clock cycles and takes about two minutes.
* `traffic_light_top_type2_full_tb` also runs at the defaults. It covers a
  full type 2 round with the North pedestrian phase, then blink. It checks
  every state to the cycle, and checks blink's half period of 2^23 cycles.
  This run takes about three minutes.

To run one with plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/tl_pkg.sv tb/tl_tb_pkg.sv tb/traffic_light_top_tb.sv \
        --top-module traffic_light_top_tb -o sim
    ./obj_dir/sim

Use the same command for the other testbenches; change the file and
`--top-module`. `clk_div_tb` does not need the two packages.

## Not included

The LED board and the FPGA board (oscillator, keys, 40-pin ribbon cable) have
no logic. Here they appear only as the top's ports.
