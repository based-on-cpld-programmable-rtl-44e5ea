# Six-digit pulse counter for an experimental electronic energy meter

A three-phase energy-metering chip reports consumed energy as a train of
pulses, one pulse per fixed quantum of energy, and holds an enable line high
while the reading should advance. This design turns that pulse train into a
six-digit decimal reading shown on a seven-segment liquid-crystal display. It
is the digital part of a small meter board. A CPLD holds the counter, six
BCD-to-LCD decoders drive the display, and one slow square-wave generator
(about 200 Hz) clocks the counter and also supplies the alternating drive the
LCD needs.

The RTL covers the counter in the CPLD and the display decoders. The generator,
the metering chip, the LCD glass, the power supply, the CPLD's JTAG programming
port and the port to an external memory are board parts. They appear only as
ports of the top module.

## Signal path

```
 count_pulse ──► [FD] ─► pulse_q ─┬─► rising edge ─► digit 0 ─► digit 1 ─► … ─► digit 5
                                  └─ [FF] pulse_prev    ▲          ▲               ▲
 count_enable ─► [FD] ─► enable_q ──────────────────────┴──────────┴─── … ─────────┘  (common enable)

 digits[5:0] ─► six CD4055-type decoders ─► seg[5:0] (segment lines)
 gen_clk ─────► DF input of every decoder ─► lcd_com (common plane)
```

| module               | role                                                                   |
|----------------------|------------------------------------------------------------------------|
| `energy_counter_top` | counter plus display unit; one generator clock for both                |
| `pulse_counter`      | input flip-flops, count-event detection, chain of six decades          |
| `input_fd`           | D flip-flop that samples one meter line on the generator clock         |
| `bcd_decade`         | one decimal digit, 0..9 with a carry on the step 9 → 0                 |
| `display_unit`       | six decoders; the first decoder's DF output drives the LCD common      |
| `cd4055_decoder`     | BCD to seven segments with AC (display-frequency) drive                |
| `counter_pkg`        | shared types: `bcd_t` (4-bit digit), `seg7_t` (segments {g..a})        |

## Input sampling and noise immunity

The meter's two lines are not used directly. Each goes through a D flip-flop
clocked by the generator, so the logic sees a line only as it stood at a
rising generator edge. A spike between two edges is never seen, and this is
the board's defence against noise on the pulse input. The price is a rate
limit. A pulse is counted only if it is high at one generator edge and low at
a later one. So the counter takes at most one pulse per two generator cycles,
which is 100 pulses/s at 200 Hz. Pulses shorter than a generator period may be
missed. Pulses longer than a period are still counted once.

## The decades: how a digit wraps

Each digit is a 4-bit binary counter. The wrap is detected the classic way, by
ANDing bits 1 and 3. This AND is high for the first time at binary 1010, which
is decimal ten. On the original board each digit is a 4-bit counter stage with
an asynchronous clear. The AND output clears the stage and also clocks the next
stage, which makes a ripple counter. This RTL keeps the count sequence and the
AND decode, but it runs every flip-flop on the one generator clock:

* `bcd_decade` forms `q + 1` and tests bits 1 and 3 of that value. If both are
  set, it loads 0 and raises `carry` for that cycle. Otherwise it loads `q + 1`.
* `carry` of digit *i* is the advance request `inc` of digit *i+1*.
  `carry[0]` is the count event.
* `ce` (the sampled enable) gates every digit, as the common count enable does
  on the board. No digit moves while it is low.
* The count runs 000000 … 999999 and then wraps to 000000. There is no overflow
  output: on the board the top digit's AND output clears only that digit.

The count event is the rising edge of the sampled pulse. A third flip-flop,
`pulse_prev`, holds the sampled level from one cycle earlier, and the event is
`pulse_q & ~pulse_prev`. On the board, the sampled pulse clocks the lowest
digit directly.

## Timing

Take a pulse that is first sampled high at generator edge *k*, with the enable
sampled high at edge *k*. The pulse appears in `digits` after edge *k+1*, when
all carries of that step take effect at once. The ripple counter on the board
updates right after edge *k*, so this design is one generator cycle (5 ms at
200 Hz) later. At the meter's pulse rates this makes no difference to the
reading. Nothing resets the count except `rst_n`. It is an asynchronous,
active-low power-on reset. It stands for the board's behaviour after a supply
interruption, when the count starts again from zero because the board keeps no
count across power loss.

## LCD drive

An LCD segment must never see DC. Each decoder passes the display-frequency
square wave to the common plane and drives each segment line with the same
wave for a dark segment, or its inverse for a lit one:
`y = pattern ^ {7{df}}`. All six decoders share `gen_clk` as DF, and only the
first decoder's DF output drives `lcd_com`. The segment table is the CD4055's
published one. Codes 0-9 are the digits: 6 and 9 have tails, and 7 lights
segments a, b and c. Codes 10-15 give L, H, P, A, a minus sign and a blank. The
counter never produces codes above 9. `digits[0]` drives the rightmost LCD
digit. The CD4055's level shift to the −5 V LCD supply is analog and is not
modelled. The LCD's decimal points and colons are not driven.

## Choices made here, not on the original board

* Single-clock design with edge detection, in place of the ripple counter with
  asynchronous clears. This adds one cycle of latency and keeps the same count
  sequence.
* Both input flip-flops use the one generator clock. On the board they have
  separate clock pins, and both pins are fed from the generator.
* An asynchronous power-on reset on all flip-flops.
* The assignment of counter digits to LCD digits.
* The decoder's segment table and XOR drive come from the decoder part's data
  sheet.
* The board's input protection gates between the meter chip and the CPLD are
  not modelled. The counter takes `count_pulse` and `count_enable` as
  active-high, and counting happens while `count_enable` is 1.

Lint reports two intentionally unused signals. `carry[N_DIGITS]` is the wrap of
the whole counter, and `df_out[N_DIGITS-1:1]` are decoder DF outputs that are
left open.

## Parameters

`N_DIGITS` (default 6) on `energy_counter_top`, `pulse_counter` and
`display_unit` sets the number of decades and decoders.

## Simulation

Each module has a self-checking testbench in `tb/`. Each testbench ends with a
line `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/counter_pkg.sv \
          tb/tb_energy_counter_top.sv --top-module tb_energy_counter_top -o sim
./obj_dir/sim
```

Swap in another testbench name to run its block. `-Irtl` lets Verilator find
each module in `rtl/<module>.sv`.

* `tb_energy_counter_top` runs the full-size design with default parameters.
  It drives random-length pulses, with the enable low now and then, and counts
  from 000000 through 999999 back to 000000, about 1 000 000 counted pulses in
  a few seconds. A reference model samples the inputs as the flip-flops do. The
  testbench compares all digits after every edge and, periodically, all segment
  lines on both clock phases. It requires at least one each of: a counted
  pulse, a pulse dropped by the enable, a glitch between edges that must not
  count, a carry into each of digits 1-5, and a full wrap. It also checks the
  two-edge latency of a clean pulse.
* `tb_pulse_counter` uses three digits so that it wraps quickly. It covers
  latency, glitches, the enable and random pulse shapes.
* `tb_bcd_decade`, `tb_input_fd`, `tb_cd4055_decoder` and `tb_display_unit`
  check each block on its own. The decoder is checked exhaustively.
