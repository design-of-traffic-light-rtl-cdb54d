# Four-way traffic light controller

A fixed-time traffic signal gives every road the same green whether or not a car
is waiting. This controller serves the four roads of a crossing in turn but
reads a presence sensor on each road: a road with no vehicle is skipped, and a
road whose volume sensor reports heavy traffic gets a longer green. The RTL
also contains two simpler forms of the same four-way controller: a fixed cycle
North, East, South, West with a pedestrian walk phase, and a four-state
sequencer feeding a small lamp decoder. All of them are Moore state machines
timed by a common one-second tick.

The design follows a published article on an FPGA traffic light controller in
Verilog. That article describes its controller three times, in three ways that
do not merge into one machine (a sensor-driven eight-state machine, a
direction/phase counter with pedestrian lights, and a decoder shown in its
synthesis and simulation results). Each is built here as its own block, and
the three stand side by side in `tlc_top`.

## Signal heads and conventions

* `lamp_t` (in `tlc_pkg`) is one vehicle signal head: `{red, yellow, green}`,
  1 = lamp on. `ped_t` is a pedestrian head: `{red, green}`.
* Roads are indexed 0..3. In the sensor controller they are R1..R4; in the
  pedestrian controller they are North, East, South, West (`dir` 00, 01, 10, 11).
* Everything is clocked on `clk` with an asynchronous active-low reset `rst_n`.
* Durations are counted in ticks. `tick_divider` makes one tick every
  `CLK_DIV` clock cycles; the default 50,000,000 assumes a 50 MHz board clock
  and gives 1 s ticks.

## The road-skipping controller (`tlc_sensor_fsm`)

Eight states, two per road. State S(2k) shows green on road k+1, S(2k+1) shows
yellow on it, and every other road is red. Exactly one road is ever not red
(an assertion in the module checks this).

| state | road released | leaves to, when the state's time is up |
|---|---|---|
| S0 | R1 green  | S1 |
| S1 | R1 yellow | S2 if X2 = 1, else S4 (R2 skipped) |
| S2 | R2 green  | S3 |
| S3 | R2 yellow | S4 if X3 = 1, else S6 (R3 skipped) |
| S4 | R3 green  | S5 |
| S5 | R3 yellow | S6 if X4 = 1, else S0 (R4 skipped) |
| S6 | R4 green  | S7 |
| S7 | R4 yellow | S0 if X1 = 1, else S2 (R1 skipped) |

Points that are easy to miss:

* The presence sensor `x` of the **next** road is read once, on the tick that
  ends the current yellow. Changes of `x` at other times have no effect.
* Only one road is skipped per step. If the road after a skipped road is also
  empty it is still served; the lookup does not chain.
* Reset always enters S0, so R1 starts green whatever its sensor says.
* Green length: on entering a green the volume input `v` of that road is
  latched. `v = 1` gives `GREEN_LONG` ticks (60), otherwise `GREEN_SHORT`
  ticks (30). The first green after reset is short. A yellow lasts
  `YELLOW_TICKS` (3).
* `skip` pulses for one cycle in the cycle whose clock edge makes a skip.
* `state` and the lamps change on the clock edge at which the last tick of a
  state is sampled; each state lasts exactly its tick count.

## The North-East-South-West cycle with pedestrian phase (`tlc_ped_fsm`)

A direction counter `dir` and a phase counter `cnt`. For each direction the
phases are:

| cnt | phase | served direction | pedestrian head of that direction |
|---|---|---|---|
| 11 | all red | red | stop |
| 00 | green (left, straight and right together) | green | stop |
| 01 | first yellow y1 | yellow | stop |
| 10 | second yellow y2 | yellow | walk |

All other directions are red with their pedestrian heads on stop. After y2,
`dir` is incremented (West wraps to North, with a one-cycle `wrap` pulse) and
`cnt` returns to the all-red phase. Durations: `GREEN_TICKS` 30,
`Y1_TICKS` 3, `Y2_TICKS` 3, `ALL_RED_TICKS` 1. Setting `ALL_RED_TICKS = 0`
removes the all-red phase completely, giving the plain green, y1, y2 cycle.

Main roads can be favoured over side roads. Directions whose bit is set in
`MAIN_DIRS` get `GREEN_TICKS`; the others get `SIDE_GREEN_TICKS` (15). By
default all four directions are main roads, so they are treated equally.

## The two-road sequencer and the lamp decoder (`tlc_state_seq`, `tlc_lamp_decoder`)

`tlc_state_seq` cycles through four states named after a highway (H) and a
farm road (F): `HGRE_FRED` (00), `HYEL_FRED` (01), `HRED_FGRE` (10),
`HRED_FYEL` (11), then back to 00. The green states last `GREEN_TICKS` (30),
the yellow states `YELLOW_TICKS` (3).

`tlc_lamp_decoder` is purely combinational and turns the 2-bit state into four
4-bit vectors. It reproduces a published synthesis and simulation result bit
for bit:

| state | grn | rd | ylw |
|---|---|---|---|
| 00 | 0001 | 1100 | 1101 |
| 01 | 0010 | 1001 | 1011 |
| 10 | 0100 | 0011 | 0111 |
| 11 | 1000 | 0110 | 1110 |
| `reset` low | 0000 | 1111 | 1111 |

`an` is the constant 1110. In words: `grn` is one-hot on position s, `ylw` is
low only at position s+1, and `rd` is low at s and s+1. The table is kept
exactly as published. The source does not say which level lights a lamp, and
the table does not read as the same polarity on all three vectors, so check
the lamp drivers of your board before using these outputs directly. In the
top, the decoder's `reset` is the system `rst_n`, so its outputs are blanked
while the junction is held in reset.

## Timing: ticks and phase timers

`tick_divider` counts 0..DIV-1 and registers a one-cycle `tick` when it wraps.
The first tick comes DIV cycles after reset.

Each controller owns a `phase_timer`. The controller puts the duration of its
current state on `dur`. The timer counts ticks and raises `expire` on the tick
that completes the duration, then clears itself. The controller changes state
on that same clock edge, so the next state starts counting from zero. A
duration of 0 acts as 1. With `TW = 8` bits, durations up to 255 ticks are
possible.

The article wants the main road to get more time than side roads, by dividing
the clock differently for each. Here a single divider is used, and each state
gets its own tick count instead (`GREEN_LONG`/`GREEN_SHORT` by volume in the
sensor controller, `MAIN_DIRS` in the N/E/S/W controller). This has the same
effect and keeps one clock domain.

## Top level (`tlc_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `x[3:0]`, `v[3:0]` | in | presence and volume sensors of R1..R4 (bit 0 = R1) |
| `sensor_road[4]`, `sensor_state`, `sensor_skip` | out | road-skipping controller |
| `ped_lamp[4]`, `ped_walk[4]`, `ped_dir`, `ped_cnt`, `ped_wrap` | out | N/E/S/W controller |
| `seq_state`, `an`, `grn`, `rd`, `ylw` | out | sequencer and decoder |

Parameters: `CLK_DIV` (50,000,000), `GREEN_SHORT`/`GREEN_LONG`/`YELLOW_TICKS`
(30/60/3) for the sensor controller, `PED_GREEN`/`PED_SIDE_GREEN`/`PED_MAIN_DIRS`
(30/15/4'b1111) and `PED_Y1`/`PED_Y2`/`PED_ALL_RED` (3/3/1),
`SEQ_GREEN`/`SEQ_YELLOW` (30/3). The sensor inputs come straight from the
field. Synchronise them to `clk` outside this block if they are
asynchronous. The whole top is about 130 word-level cells and 61 flip-flops.

## Where this RTL departs from, or adds to, the source

* The source gives no clock frequency and no lamp durations ("a few seconds").
  It quotes 30-60 s as typical for a fixed-time controller. The 50 MHz clock,
  the 1 s tick, 30/60 s greens, 3 s yellows and the 1 s all-red are choices made
  here.
* Sensor controller: the source says both that the R4 green state S6 is
  followed by S0 and that S7 is R4's yellow. S6 -> S7 is used. How the volume
  sensor sets the green time is not described. The two-length rule is this
  design's.
* N/E/S/W controller: the source gives the same phase code (01) for both
  yellows. y2 is coded 10 here. Its flow chart starts each round with an
  all-red step that its state description lacks. The all-red step is included
  and can be removed with `ALL_RED_TICKS = 0`. The source's pedestrian drawing
  shows one pedestrian head (at North). Every direction has one here. The
  source does not say which roads are main roads. `MAIN_DIRS` leaves that
  choice to the user.
* Sequencer: only the state names, their order and self-holding are given.
  That each state holds until a timer expires, and the durations, are this
  design's. The first state's name `HGRE_FRED` is inferred; it is published
  only as "00".
* Reset: the source shows an active-low reset only for the decoder. All
  sequential blocks here use asynchronous active-low `rst_n`.

## Not included

* The vehicle sensors themselves (IR, inductive or linear). Only their digital
  outputs `x` and `v` enter the design.
* Emergency-vehicle priority, red-light camera capture and a night-time
  flashing mode. These are named as goals of the system but none of the
  described state machines has an input, state or sequence for them.

## Verification

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_tick_divider` | tick period and one-cycle width, restart after reset (DIV = 5) |
| `tb_phase_timer` | expiry on exactly the dur-th tick for random durations 0..6 |
| `tb_tlc_sensor_fsm` | state, 12 lamps and skip every cycle against a reference model with random sensors; each road skipped and both green lengths seen |
| `tb_tlc_ped_fsm` | dir, cnt, lamps, pedestrian heads, wrap against a model; round length in cycles; a second instance without the all-red phase |
| `tb_tlc_state_seq` | state order and the cycle count of each state |
| `tb_tlc_lamp_decoder` | all 8 input combinations against the table above |
| `tb_tlc_waveform` | replays the published 200 ns decoder simulation and matches all 40 printed values |
| `tb_tlc_top` | all three controllers end to end (CLK_DIV = 3, 1-4 tick states) against models for 40,000 cycles with a reset in the middle; requires every skip, both green lengths, main- and side-road greens, every walk, all-red, a full round, every sequencer state and decoder blanking to occur |
| `tb_tlc_skip_saving` | round length and R1 red time under fixed sensor patterns (see below) |
| `tb_tlc_top_defaults` | the top with all default parameters for its first 120 million cycles (2.4 s): ticks at exactly 50 and 100 million cycles, controllers in their first states |

What skipping buys, measured by `tb_tlc_skip_saving` with equal 6-tick greens
and 1-tick yellows. A fixed-time controller needs a 28-tick round. With one
road empty the round drops to 21 ticks (25 % shorter). With two roads empty it
drops to 14 ticks (50 %). The red time of R1 falls from 21 to 14 and 7 ticks.
The saving depends entirely on how often roads are empty; the patterns here are
examples, not traffic data.

A complete signal round at the default parameters takes several billion clock
cycles. That is beyond what was simulated. The largest complete operation
simulated uses `CLK_DIV = 3` with the short durations of `tb_tlc_top`, and the
default configuration was run for its first 2.4 s only.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl rtl/tlc_pkg.sv tb/tb_tlc_top.sv --top-module tb_tlc_top
./obj_dir/Vtb_tlc_top
```

Replace `tb_tlc_top` by any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/tlc_pkg.sv rtl/tlc_top.sv`.
The two remaining lint warnings are expected: unused package constants in
some modules, and `rst_n` used both as the asynchronous reset and in the
`disable iff` of the one-road-released assertion.
