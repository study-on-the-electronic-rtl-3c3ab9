# Taximeter on a CPLD/FPGA

A small digital taximeter: it counts the distance a taxi has travelled in
half-kilometre steps, keeps a fare that starts at a flag-fall value, and shows
both on an eight-digit multiplexed seven-segment display. Everything is built
from decimal (BCD) counters, a five-state state machine and a display scanner,
running from one 50 MHz board clock. There is no wheel-sensor input: the
vehicle's travel is produced inside the design by a clock divider, so the meter
advances half a kilometre every 20.02 s, the behaviour of the original
design, which derives distance from a divided clock.

The design is written in SystemVerilog (IEEE 1800-2017) and is synthesizable.
It reproduces a VHDL design made of six blocks: a frequency divider, a
distance pulse counter ("licheng"), a total distance counter ("lichengZ"), a
fare counter ("jifei"), a fare state machine ("jifei1") and a display
scanner ("disp"). Where the original leaves a point open, the choice made
here is named below under *Departures and open points*.

## How a ride unfolds

```
 50 MHz ──► freq_divider ──► 50 Hz tick ──► distance_pulse_counter ──► step (every 1001 ticks = 20.02 s)
                 │                                                       │
                 │                               ┌───────────────────────┼──────────────────┐
                 │                               ▼                       ▼                  ▼
                 │                       distance_counter            fare_fsm ──y──► fare_counter
                 │                       bai shi . ge km             st (tenths)       shi ge
                 │                               │                       │                  │
                 └──► 1000 Hz tick ──────► seg_display ◄─────────────────┴──────────────────┘
                                          dig_data, seg_data, dp
```

Every half-kilometre *step* does three things at once:

* **Distance.** `distance_counter` adds 0.5 km. Its last digit only ever
  shows 0 or 5; it carries into the kilometre digit, that one into the tens
  digit, and 99.5 km rolls over to 00.0.
* **Fare tenths digit.** `fare_fsm` moves one state round a ring of five
  states, S0 → S6 → S2 → S8 → S4 → S0, and writes the state's digit (0, 6, 2,
  8, 4) to the tenths position of the fare. Before it starts it waits two
  steps after reset.
* **Fare units.** `fare_counter` holds the two integer digits of the fare,
  starting at 08. It counts only on steps when its enable is high, and the
  enable is the state machine's output `y`, which is high for the one step
  after the ring has passed S0, i.e. once every five steps. The first enabled
  step after reset is swallowed, so the flag-fall fare covers the first stretch.

The fare on the display is therefore not one running sum. The units count one
per 2.5 km after the flag-fall stretch, and the tenths digit walks through 0, 6,
2, 8, 4 on its own. The first steps of a ride read:

| step | time (s) | distance | st (tenths) | y after step | fare shown |
|-----:|---------:|---------:|------------:|:------------:|-----------:|
| 0 (reset) | 0 | 00.0 | 0 | 0 | 08.0 |
| 1 | 20.02 | 00.5 | 0 | 0 | 08.0 |
| 2 | 40.04 | 01.0 | 0 | 0 | 08.0 |
| 3 | 60.06 | 01.5 | 0 | 1 | 08.0 |
| 4 | 80.08 | 02.0 | 6 | 0 | 08.6 (enabled step swallowed) |
| 5 | 100.10 | 02.5 | 2 | 0 | 08.2 |
| 6 | | 03.0 | 8 | 0 | 08.8 |
| 7 | | 03.5 | 4 | 0 | 08.4 |
| 8 | | 04.0 | 0 | 1 | 08.0 |
| 9 | | 04.5 | 6 | 0 | 09.6 |
| 14 | | 07.0 | 6 | 0 | 10.6 |

In general, after step k (k ≥ 4) the fare units are `8 + floor((k-4)/5)`
modulo 100, the tenths digit is `(0,6,2,8,4)[(k-3) mod 5]`, and the distance
is `(k mod 200) / 2` km.

## Display layout

Position *i* is the digit whose enable `dig_data[i]` is low. Read left to right
on a board whose position 7 is the leftmost digit:

| position | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|
| shows | 0 | distance tens | distance km **.** | distance tenths (0/5) | 0 | fare tens | fare units **.** | fare tenths |

so the left half reads `0XX.X` km and the right half the fare `0XX.X`.
The scanner lights one digit per millisecond (1000 Hz scan tick), a full
frame every 8 ms. All display outputs are active low: `dig_data` (one bit low
at a time), `seg_data` = {g, f, e, d, c, b, a} and `dp`.

## Modules

All modules reset with one active-low asynchronous reset and run on the one
clock; the slow events are one-clock *strobes* used as clock enables.

| module | original | role |
|---|---|---|
| `taxi_pkg` | – | `bcd_t`, the 0.5 km tenths step, the seven-segment encoder |
| `freq_divider` | FrequencyDivider | 50 MHz → 1000 Hz and 50 Hz square waves and strobes |
| `distance_pulse_counter` | licheng | counts 50 Hz ticks 0..1000; carry + `step` strobe every 1001 ticks |
| `distance_counter` | lichengZ | BCD distance `bai shi . ge`, 0.5 km per step, carry at 99.5 → 00.0 |
| `fare_fsm` | jifei1 | two-step warm-up, then the S0/S6/S2/S8/S4 ring; outputs `st`, `y` |
| `fare_counter` | jifei | BCD fare, starts 08, enable input, first enabled step swallowed, carry at 99 → 00 |
| `seg_display` | disp | 3-bit scan counter, digit enable, segment code, decimal point |
| `taximeter_top` | top schematic | wires the above; ports `clk`, `rst_n`, `dp`, `dig_data`, `seg_data` |

Parameters of `taximeter_top` (defaults are the real design): `CLK_HZ`
(50 000 000), `SCAN_HZ` (1000), `BASE_HZ` (50) and `COUNT_MAX` (1000; a step is
`COUNT_MAX + 1` base ticks). The testbenches shrink them to make rides fast.

### Timing

* `freq_divider` raises each strobe in the clock in which its square wave rises:
  the 1000 Hz strobe every 50 000 clocks, the 50 Hz strobe every 1 000 000.
* `distance_pulse_counter` raises `step` the clock after the 50 Hz strobe that
  wraps its count. The carry `c` rises with it and stays high until the next
  base tick.
* The distance, fare and state-machine registers change the clock after `step`.
  The fare counter samples `y` as it was before that same step, so an enable
  written at step k is used at step k+1.
* The display outputs are decoded from the scan counter and the digit
  registers. They change the clock after a scan strobe or a digit update.

### Carries

The three counters keep the original's carry outputs although nothing in the
top uses them. The distance counter's carry is set by the roll-over from 99.5
km and is only cleared by a later step that carries into the kilometre digit,
so it stays high for two steps. The fare counter's carry is high from the
99 → 00 roll-over to the next counting step.

## Departures and open points

What follows the original design: the six blocks and most of their connections
(divider outputs to scanner and distance pulse counter, `y` into the fare
enable, one shared reset), the
clock frequencies, the count limit of 1000, the BCD digit behaviour and carry
conditions of the counters, the flag-fall value 08 and the swallowed first
enabled step, the state names and their digits, the two-step warm-up, and the
first three scan positions of the display (enables 11111110, 11111101,
11111011; of these three, only position 1 has its decimal point lit).

Choices made in this design:

* **One clock.** The original clocks each stage from the output of the
  previous one (ripple clocks). Here everything runs on the 50 MHz clock, with
  strobes as enables. Behaviour per step is the same; events land one or two
  50 MHz clocks later than a ripple clock would have put them.
* **Step fan-out.** The half-kilometre step drives the distance counter, the
  fare counter and the state machine alike. The distance counter's 0.5 km per
  count makes the first certain; that the fare counter and state machine
  advance on the same step is this design's reading of the original wiring.
* **Divider ratios.** The divider divides by 50 000 and 1 000 000 to produce
  the 1000 Hz and 50 Hz its outputs are named after. (Counting to the limits
  written in the original's code would give 50 kHz and 250 Hz instead.)
* **Which counter digit goes to which display position**, and that positions 3
  and 7 show 0. The decimal point at position 5 is also this design's choice.
* **Segment code table** and bit order (`taxi_pkg::seg7_encode`).
* **State machine outputs not spelled out in the original**: `y` is low in
  every state except S0, and reset clears `y`. The ring order after S6 follows
  the digit sequence the original state machine produces.
* **Resets** of the divider, the display scan counter and `y`, which the
  original only initialises.

The design has no distance sensor, tariff inputs, waiting-time charge, GPS,
payment, tamper detection or logging; those appear only as ideas around the
original design and are not specified.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/taxi_pkg.sv tb/tb_taximeter_top.sv \
  --top-module tb_taximeter_top
./obj_dir/Vtb_taximeter_top
```

Replace the testbench name for any other test. The testbenches:

| testbench | what it checks |
|---|---|
| `tb_freq_divider` | waves and strobes cycle by cycle at a small ratio; strobe spacing of 50 000 and 1 000 000 clocks at the defaults |
| `tb_distance_pulse_counter` | random 50 Hz ticks; count, carry, step; exactly 1001 ticks per step |
| `tb_distance_counter` | random steps through two roll-overs; digits and carry against a half-km count |
| `tb_fare_counter` | random steps and enable, two roll-overs, swallowed step, re-reset |
| `tb_fare_fsm` | warm-up, ring digits, `y` once per ring, reset mid-run |
| `tb_seg_display` | digit enables, segment codes (own table) and decimal points for random digits |
| `tb_taximeter_top` | whole design at shortened time bases, observed only through the display pins: a ride cut by reset, then 520 steps past 99.5 km and past a fare of 99; counts every mechanism it saw |
| `tb_taximeter_full` | whole design at the real 50 MHz / 50 Hz / 1001-tick settings: display after reset (00.0 km, 08.0), the 1 ms scan period, and the first step at 20.02 s (00.5 km) |

`tb_taximeter_full` simulates about 10^9 clocks and takes roughly 5 to 8
minutes; the others take seconds. The testbenches work out expected values
from the clock count alone, not from the design's internal signals.

Every register the logic reads is reset, so the design does not depend on
initial values.

## Size

After coarse synthesis `taximeter_top` has 85 flip-flops (38 of them in the
divider) and about 130 word-level cells, small enough for a 240-cell CPLD such
as an EPM240 with room to spare in flip-flops.
