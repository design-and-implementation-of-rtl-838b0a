# Queue-length based dynamic traffic light controller

A fixed-cycle traffic light gives every road the same green time, whatever
the traffic. This controller, for a junction of four roads, gives each road
a green time that depends on how long its waiting queue is, and on whether
it is peak or off-peak time. An emergency vehicle preempts the cycle.
The controller also drives the pedestrian lights, triggers a camera or
buzzer when a vehicle runs a red light, and shows the time of day and the
seconds left in the current phase on seven-segment displays.

The whole design is synchronous to one clock (`clk`, 50 MHz by default).
It is written in SystemVerilog with no vendor primitives.

## The junction and its signals

Each road `n` (1..4) has:

| signal | width | meaning |
|---|---|---|
| `LIGn` | 3 | vehicle signal head: `100` red, `010` yellow, `001` green |
| `PdCrsn` | 4 | the road's group of four pedestrian lamps |
| `snsn` | 4 | four IR sensors on the median that measure the queue; bit 0 is nearest the stop line |
| `sb_snr[n-1]` | 1 | IR sensor on the stop line |
| `emg_snr[n-1]` | 1 | RF receiver that hears an emergency vehicle about 500 m away |

Common signals: `clr` is a synchronous active-high reset. `TMR_set`,
`HR_set` and `MIN_set` set the clock. `Digit_sel` and `segment_o` drive a
four-digit multiplexed HH:MM display. `Seg_Out1` and `Seg_Out2` drive the
tens and units digits of the phase countdown. `cam_buz` is the
camera/buzzer trigger. `PPeak` is high during peak hours. `control` is the
mode (1 = peak) that the running phase was started with.

## Phase timing

The roads get the right of way in the fixed order 1, 2, 3, 4, 1, and so on.
When a road's phase starts, the controller does two things:

1. It takes the road's queue level from its four sensors. The level is the
   number of the farthest covered sensor. `0001` is level 1, `0011` level 2,
   `0111` level 3 and `1111` level 4. A gap such as `0101` counts as the
   farthest sensor reached (level 3). An empty road counts as level 1.
2. It takes the mode from the time of day. Peak hours are 07:00-09:59 and
   17:00-20:59.

From these two it looks up the phase length:

| level | off-peak phase | off-peak green | peak phase | peak green |
|---|---|---|---|---|
| 1 | 7 s | 4 s | 15 s | 12 s |
| 2 | 15 s | 12 s | 30 s | 27 s |
| 3 | 22 s | 19 s | 45 s | 42 s |
| 4 | 30 s | 27 s | 60 s | 57 s |

Every phase ends with 3 s of yellow. There is no all-red gap: the next
road turns green on the clock cycle in which the previous one turns red.
The queue sensors are read only at the start of a phase. A change during
a phase affects the road's next turn.

A single counter (`count_t`, 6 bits) is loaded with the phase length and
counts down once per second. The road is green while more than 3 s remain
and yellow for the last 3. The value is also what the countdown display
shows, so a 7 s phase shows 7, 6, ... 1.

## Emergency preemption

An emergency starts when a bit of `emg_snr` rises. The controller watches
for a bit going from 0 to 1, not for a bit being high. This matters because
a receiver stays high for as long as the vehicle is in range. If the
controller reacted to the level, a vehicle still in range at the end of
its sequence would start it again, and the road would keep the green. If
several bits rise in the same cycle, the lowest road number wins. A
request that arrives while a sequence is running is ignored.

The sequence takes 60 s:

- **Warning, 5 s:** every road shows yellow and every pedestrian group
  shows `0011`.
- **Green, 52 s:** the emergency road is green. All other roads are red.
- **Yellow, 3 s:** the emergency road shows yellow.

During the sequence the normal phase is frozen. Afterwards it continues
where it was interrupted: the same road, with the same seconds left. If the
emergency road was also the road that had green, its yellow leads straight
back into green.

The request comes at some arbitrary point within a second, but the sequence
counts whole seconds on the shared one-second tick. So the warning lasts
between 4 and 5 s, and the interrupted phase ends up less than one second
longer than its nominal length.

## Pedestrian lights

Each pedestrian group follows its own road:

| road light | pedestrian pattern |
|---|---|
| red | `1001`: crossing allowed |
| green or yellow | `0110`: crossing blocked |
| any light during the emergency warning | `0011` |

These are the patterns the original design shows. It does not say what
each of the four lamps of a group means, so the design reproduces the
patterns as they are.

## Red-light violations

`cam_buz` is high while any stop-line sensor is active on a road that
shows red. A vehicle that crosses on green or yellow does not trigger it.
The trigger is registered: it follows the sensor three clock cycles later
(two synchroniser stages and one register). It is not stretched.

## Clock and displays

`rtc_clock` is a 24-hour binary clock that advances on the one-second tick
from `second_tick`. While `TMR_set` is high, the clock stops and the
seconds stay at 0. Each rising edge of `HR_set` then advances the hours by
one, modulo 24. Each rising edge of `MIN_set` advances the minutes by one,
modulo 60, with no carry into the hours. Buttons are synchronised but not
debounced, so a bouncing button may count more than once. After reset the
time is 00:00:00, which is off-peak.

`time_display` scans the four HH:MM digits, one at a time. `Digit_sel` is
one-hot and active high: bit 3 is the hours tens digit and bit 0 the
minutes units digit. Each digit is refreshed `SCAN_HZ` times a second. The
decimal point of the hours units digit separates hours from minutes.

`count_display` drives the two countdown digits statically, with a leading
zero. All segment buses are `{dp,g,f,e,d,c,b,a}`, active high. For
common-anode displays, invert them.

## Module hierarchy

```
qld_tlc               top; port names of the original design
├── second_tick       1 Hz enable from CLK_HZ
├── sync2             2-FF synchroniser for TMR_set, HR_set, MIN_set, emg_snr, sb_snr
├── rtc_clock         time of day, button setting
├── peak_mode         hour -> PPeak
├── queue_level  x4   sensor pattern -> level 0..3
├── phase_ctrl        round robin, phase counter, emergency sequence, resume
├── ped_lights        pedestrian patterns
├── violation_detect  cam_buz
├── time_display      HH:MM scan (uses seg7_enc)
└── count_display     countdown digits (uses seg7_enc x2)
qld_pkg               light/pedestrian codes, timing constants, phase_len()
```

The parameters are `CLK_HZ` (default 50 000 000), which sets the length of
a second in clock cycles, and `SCAN_HZ` (default 1000), which sets the
display refresh. Timing constants are in `qld_pkg`. The queue sensors
(`snsn`) are used without synchronisers, because they are only sampled when
a phase starts. If they change often, add a `sync2` stage in front of them.

Synthesis with a generic flow gives about 107 flip-flops, plus a small
constant table for the phase lengths and segment patterns. The top has
88 I/O pins.

## Where this design departs from, or goes beyond, its source

The port list, the light and pedestrian codes, the phase lengths, the
emergency sequence and the peak windows come from the original design.
The following are this design's own choices:

- **Road order.** The order is a fixed 1-2-3-4. The original describes
  "prioritisation by queue length" but shows the roads served in turn in
  most of its waveforms. Here the queue sets only the green time; it does
  not reorder the roads.
- **Yellow time.** Yellow lasts 3 s in both modes. The original's text
  also mentions 2 s of yellow in off-peak, but its timing table says 3 s,
  and only 3 s makes the table's columns add up.
- **Emergency requests.** They are edge-triggered, the lowest road wins,
  requests during a sequence are ignored, and the road resumes with the
  same seconds left.
- **Red-light trigger.** `cam_buz` is gated by the red light. The
  original's port description says any stop-line crossing.
- **Clock setting.** The clock is set with push buttons as described
  above. Reset sets 00:00:00.
- **`control` output.** The original lists it without describing it.
  Here it carries the mode the running phase was started with.
- **Display details.** The 50 MHz clock, the display polarity, segment
  order, digit order and scan rate are all this design's choices.
  `Seg_Out1`/`Seg_Out2` show the phase countdown, not the clock's seconds.
- **Added logic.** Synchronisers were added on the asynchronous inputs.

The original also has queue and stop-line IR sensors, RF transmitters and
receivers, the LEDs, the displays and the camera or buzzer. These are
external parts with no logic in them; they connect to the ports above.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_phase_ctrl` compares the sequencer cycle by cycle with a reference
  model that counts elapsed seconds. The stimulus is random queue levels,
  mode changes and emergency requests: single, simultaneous, held past the
  sequence, and arriving during a sequence.
- `tb_qld_tlc` runs the whole controller with `CLK_HZ=10`. It covers an
  off-peak cycle with all four levels; setting the clock to 06:59 with the
  buttons; the roll-over into peak; a peak cycle with all four levels; two
  emergencies, one on the road that had green; and red-light and
  green-light crossings. Every phase is checked in clock cycles, and the
  testbench counts that each mechanism occurred.
- `tb_qld_tlc_full` runs the top at its default parameters (50 MHz). It
  covers road 1's phase from reset and road 2's complete phase, up to the
  handover to road 3: 14 s of junction time, 700 million clock cycles, a
  few minutes of simulation. It checks every green and yellow time to the
  cycle. A full four-road cycle at 50 MHz takes about 1.4 billion cycles;
  `tb_qld_tlc` covers full cycles with the clock scaled down.

To run a testbench with Verilator:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/qld_pkg.sv tb/tb_qld_tlc.sv --top-module tb_qld_tlc -Mdir obj
./obj/Vtb_qld_tlc
```

All of these testbenches pass, and each one fails when a deliberate bug is
put into the module it tests.
