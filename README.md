# Matrix keypad decoder

A 4x4 matrix keypad has only eight wires, four rows and four columns. A key
closes a switch where its row and column cross. To find out which key is down, the
decoder drives one row low at a time and reads the columns, which have pull-ups: a
column that reads low has a pressed key on the row being driven. This design scans
the rows at 2 kHz from a 50 MHz board clock. It stops scanning while a key is held,
so the pressed key's row stays driven, and it shows that key's digit (0-9) on the
rightmost digit of a 4-digit 7-segment LED display.

```
 clk_50m ──► clock_gen ──clk_scan (2 kHz)──► row_sequencer ──row[3:0]──► keypad
                                                  ▲                        │
                                                  └──────col[3:0]──────────┘
                                  row, col ──► digit_lut ──seg {a..g}──► display
                                                      en = 4'b1110 ──► display
```

## The scan state machine (`row_sequencer`)

The state register *is* the `row` output, so the state names are the row
patterns. In each of the four valid states exactly one bit is 0, and that row is
driven low:

| state (row[3:0]) | row under test |
|------------------|----------------|
| `0111` (7h)      | 3 (top)        |
| `1011` (Bh)      | 2              |
| `1101` (Dh)      | 1              |
| `1110` (Eh)      | 0 (bottom)     |

On each rising edge of the 2 kHz clock:

* `col == 4'b1111` (no key on the tested row): go to the next row of the scan order.
  The last row wraps round to the first.
* `col != 4'b1111` (some column is low): stay. The scan stops on the pressed key.
  Once the key is released the columns read high again, and scanning resumes at the
  next row of the order.
* Any other state (two or more rows low, or none): go to the first state, `0111`,
  whatever the columns show. FPGA flip-flops typically power up at zero. This rule
  means the all-zero state, and any state corrupted later, clears itself after one
  scan clock.

The order in which rows are tested is one of four. A parameter picks it. The
parameter is named `ID_LAST_DIGIT` because, in the exercise this design comes from,
the last digit of a student number selects the order:

| `ID_LAST_DIGIT` | row order   | state sequence                  |
|-----------------|-------------|---------------------------------|
| 0, 1, 2 (default) | 3, 2, 1, 0 | 7h → Bh → Dh → Eh → 7h          |
| 3, 4, 5         | 3, 1, 2, 0  | 7h → Dh → Bh → Eh → 7h          |
| 6, 7            | 3, 0, 2, 1  | 7h → Eh → Bh → Dh → 7h          |
| 8, 9            | 3, 2, 0, 1  | 7h → Bh → Eh → Dh → 7h          |

A free-running scan with the default order, watched on a logic analyser clocked by
`clk_scan`, shows the repeating row values `D E 7 B D E ...`.

The function `keypad_pkg::scan_row` holds the table. The machine's four states
`S0..S3` are elaboration-time constants computed from it, so the next-state logic
is a small 4-way case with a default. Two concurrent assertions in the module state
the rules: every state after a clock out of reset is valid, and a low column holds
the state.

**Timing.** One row is tested per scan period, which is 500 µs. A newly pressed key
is found on the first scan edge that tests its row. That is at most four scan
periods (2 ms) after the press, and less if the press comes while its row is
already being tested. The column lines are sampled directly by the 2 kHz clock,
with no synchroniser and no debouncing. A sample taken while a contact bounces
costs at most one scan step: the scan moves on and finds the key again within one
round.

**Reset.** `reset` is asynchronous and active high. It loads `0000`, the FPGA's
power-up state, rather than a valid state. Every reset therefore also exercises
the recovery rule. It is asynchronous because the clock divider is held in reset
at the same time, so no scan clock edge comes while reset is asserted. In
simulation, raise `reset` after time 0. Otherwise there is no edge and the
register keeps its random start value until the first scan clock.

## Key to digit (`digit_lut`)

This is combinational logic. When exactly one row and exactly one column are low,
the key at the crossing is looked up and its digit drawn. This layout is assumed
(row 0 at the bottom, column 3 on the left):

```
          col3 col2 col1 col0
 row 3:    1    2    3    A
 row 2:    4    5    6    B
 row 1:    7    8    9    C
 row 0:    *    0    #    D
```

Pressing the second key from the left on the bottom row therefore shows `0`. The
letter keys, `*` and `#` blank the digit. So do "no column low" (nothing pressed, or
the scan passing over an empty row) and "more than one column low" (two keys in one
row). The segment output is `{a,b,c,d,e,f,g}`, with `a` in bit 6. It is active low
by default (`SEG_ACTIVE_LOW = 1`, for a common-anode display), which matches the
active-low digit enables. Set the parameter to 0 for a common-cathode display.
Digit shapes: 6 has its top bar, 7 has no left upper bar and 9 has its bottom bar.

Because the lookup is combinational, the display follows `row` and `col` directly.
While the scan runs over empty rows the digit is blank. Once the scan stops on a
held key the digit stays steady until the key is released.

## Scan clock (`clock_gen`)

A counter on the 50 MHz clock toggles a flip-flop every
`HALF = CLK_IN_HZ / (2*CLK_OUT_HZ)` = 12,500 cycles. That gives a 2 kHz square wave
with 50 % duty and a period of exactly 25,000 cycles. The output comes from a
register and clocks `row_sequencer` directly. The counter compares with `>=`, so it
also recovers from an arbitrary start value. Its reset is synchronous.

## Top level (`keypad_decoder`)

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk_50m`  | in  | 1 | 50 MHz board clock |
| `reset`    | in  | 1 | active high; hold for at least one scan period for a clean start |
| `col`      | in  | 4 | keypad columns, low = key on the driven row; enable pull-ups on these pins |
| `row`      | out | 4 | keypad rows, the one under test is low |
| `seg`      | out | 7 | `{a..g}`, active low by default |
| `en`       | out | 4 | digit enables, constant `4'b1110` (only the rightmost digit lit) |
| `clk_scan` | out | 1 | the 2 kHz scan clock, for an embedded logic analyser |

Parameters (the defaults are the design's operating point): `CLK_IN_HZ` = 50,000,000,
`SCAN_HZ` = 2,000, `ID_LAST_DIGIT` = 0, `SEG_ACTIVE_LOW` = 1. The package
`keypad_pkg` holds the shared types (`lines_t`, `seg_t`, the `key_t` enum), the
order table and the keypad layout.

Synthesised, the whole design is about 50 word-level cells and 19 flip-flops: a
14-bit counter and one clock bit in the divider, and 4 state bits.

## What is fixed and what is chosen

The following come from the original exercise: the block structure, the 50 MHz
and 2 kHz clocks, the row states and the four scan orders, stopping and resuming on
a key, recovery from invalid and all-zero states, showing the digit on the
rightmost display digit, and the constant `4'b1110` enable.

The following are this design's own choices, and each can be changed in one place:

* Keypad layout (`keypad_pkg::keymap`). The exercise relies on a keypad described
  elsewhere. The common telephone-style 4x4 layout is assumed because it puts `0` at
  the bottom row, second column from the left.
* Blank display for non-digit keys, no key and several keys (`digit_lut`).
* Active-low segments and the digit shapes (`digit_lut`).
* The clock generator is a plain counter divider. The original reuses an earlier
  exercise's generator, whose construction is not given.
* The reset input and its style (asynchronous in the sequencer, synchronous in the
  divider). The original relies only on flip-flops powering up at zero.
* No input synchroniser or debouncer on the columns.

The keypad, the LED display and the vendor logic analyser are outside the RTL. Their
signals are the top-level ports.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it hangs.
`tb/keypad_model.sv` is a behavioural keypad: a pressed key pulls its column low
while its row is driven low.

* `tb_keypad_decoder`: the whole design at its default parameters. It holds reset
  (rows `0000`), checks recovery to `0111`, and runs two free scan rounds. Then it
  presses each of the 16 keys at a random point of a scan period and checks four
  things: the scan stops on the key's row within four periods; the digit (or blank)
  is correct; the scan holds for three periods; the scan resumes on release. It
  also checks every scan period (25,000 cycles) and the enables. It counts scan
  steps, wrap-arounds, holds, resumes and recoveries, and fails if any of them never
  happened. It simulates 59 ms of design time in about 2 s.
* `tb_row_sequencer`: ten instances, one per `ID_LAST_DIGIT`, against orders
  written out from the table above. It checks reset, recovery, free scanning, every
  key and two keys on different rows.
* `tb_digit_lut`: all 256 row and column combinations, in both polarities. The
  reference is built from a text drawing of the keypad and the lit segments of each
  digit given by letter.
* `tb_clock_gen`: first edge, high time and period at 50 MHz to 2 kHz. It also
  checks an uneven ratio, where the half period is rounded down.

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_keypad_decoder \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/keypad_pkg.sv tb/tb_keypad_decoder.sv
./obj_dir/Vtb_keypad_decoder
```

Replace `tb_keypad_decoder` with another testbench name to run that one. Each
testbench can also be read by other simulators that take SystemVerilog-2017.
