# A keypad-driven tester for 74-series quad gate chips

This is the logic of a small bench tester for TTL gate packages. The operator
types the four-digit part number of a chip (7400, 7408, 7432 or 7486) on a
keypad, watches it appear on four seven-segment digits, and presses `*`.
The tester then drives every input combination onto the four 2-input gates of
the chip in its 14-pin socket, reads the four gate outputs back, and writes
`PASS` or `FAIL` across the display. Everything the tester does is in one
FPGA; around it sit a 74C922 keypad encoder, transistor drivers for the
display segments, a 5 V supply and the socket.

## What happens on the pins

| signal | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | system clock, asynchronous active-low reset |
| `k` | in | data-available strobe of the keypad encoder (high while a key is held) |
| `x[3:0]` | in | key code from the encoder; `4'hF` is the start key `*` |
| `s0`..`s3` | out | digit patterns `{a,b,c,d,e,f,g}`, active high, `s0` leftmost |
| `y0 y1 y3 y4 y6 y7 y9 y10` | out | inputs of the four gates in the socket |
| `y2 y5 y8 y11` | in | outputs of the four gates |

The socket lines come in threes: gate *g* (0..3) has inputs `y(3g)`,
`y(3g+1)` and output `y(3g+2)`. A standard quad 2-input package puts its
gates on pins (1,2→3), (4,5→6), (9,10→8) and (12,13→11), with ground on
pin 7 and +5 V on pin 14, so the board routes the twelve `y` lines to those
pins. NAND, AND, OR and XOR packages share this pinout, which is why one
socket and one sequence serve all four.

## Structure

```
 k, x ──► keypad_interface ──digit──► digit_entry ──digits──► ic_select
                │                          │                      │ type
                │start                     │write                 ▼
                └────────────────────────────────────────► gate_test_sequencer ◄──► y lines
                                           ▼                      │ done/pass
 s0..s3 ◄──────────────────────── display_controller ◄────────────┘
                                  (contains seg7_decoder)
```

* `keypad_interface` – two-flop synchronisers on `k` and `x`, a rising-edge
  detector on `k`, and the split into digit key and start key.
* `digit_entry` – a 2-bit position counter and four 4-bit digit registers.
  Each digit goes to the current position; after the fourth the counter wraps,
  so a fifth digit lands on the left again and overwrites it.
* `ic_select` – looks only at the last two digits: `..00` NAND, `..08` AND,
  `..32` OR, `..86` XOR. Anything else selects nothing, and `*` then does
  nothing at all (display unchanged, socket not driven).
* `gate_test_sequencer` – the test itself (next section).
* `display_controller` with `seg7_decoder` – four 7-bit registers. A stored
  digit writes its decoded shape at its position (codes A–F show as
  A b C d E F); a result overwrites all four digits with `P A S S` or
  `F A I L`.
* `ictester_pkg` – shared types: the segment and nibble types, the
  `ic_type_e` enum, the letter patterns and the per-type truth function.

## The gate test

All four gates get the same inputs at the same time. The sequence of
(A,B) values is 00, 10, 01, 11. Each pattern is held for `SETTLE_CYCLES`
clocks (default 16); the gate outputs pass through a two-flop synchroniser,
and in the last clock of the pattern all four are compared with the truth
table of the chosen type. The first mismatch ends the test as FAIL; four
clean patterns give PASS. Between tests every drive line sits at 0, and keys
pressed while a test runs are ignored.

The test catches a chip of the wrong type (an OR in place of an AND fails on
pattern 10) and any single gate output stuck at 0 or 1, since every gate
sees both output values during the four patterns. It does not measure
levels, currents or delays: it is a purely logical go/no-go test, and a chip
whose outputs take longer than about `SETTLE_CYCLES − 2` clocks to settle
would read as failing.

### Timing

Counting clock edges from the first edge that sees `k` high:

| event | edge |
|---|---|
| digit appears on the display | 4 (3 to recognise the key, 1 to write the display) |
| test starts driving the socket | 4 |
| PASS shown | 4·`SETTLE_CYCLES` + 6 |
| FAIL on pattern *v* (0..3) shown | (*v*+1)·`SETTLE_CYCLES` + 6 |

At 16 clocks per pattern and, say, a 10 MHz clock a whole test takes under
7 µs, far below anything an operator can notice. `x` must be stable two
clocks before `k` rises; the 74C922 presents its code before raising DA.

## Where this RTL departs from the original tester or fills gaps

The original logic was a single process clocked by the keypad strobe, with
no system clock: it drove a pattern and read the outputs back in the same
step. This version is synchronous to `clk`, waits a configurable settle time
per pattern and synchronises every asynchronous input. Other choices made
here rather than taken from the original:

* reset clears the digits and darkens the display;
* drive lines return to 0 after a test instead of staying at the last pattern;
* keys are ignored while a test runs;
* the codes for NAND (`..00`) and XOR (`..86`) follow the same last-two-digits
  rule as the AND and OR codes.

Kept as in the original, though a new design might change them: only the
last two digits select the test (so 1208 also tests as an AND chip), every
code other than `4'hF` counts as a digit (including `#`, if the encoder
reports it), and a number the tester does not know is silently ignored. The
hex inverter 7404 belongs to the same logic family but has six one-input
gates on a different pinout; this tester does not handle it.

## Size

After generic synthesis the top has about 95 flip-flops and some 140
word-level cells. That fits comfortably in a small FPGA of the XC4000E
class (a 4003E has 200 CLB flip-flops) and uses 47 I/O pins.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles if something hangs. `tb/ttl_quad_gate.sv` models the chip in the
socket: its type is an input, single gate outputs can be forced stuck, and
outputs follow inputs after 15 ns. `tb_ictester` runs the whole tester at
its default parameters: it types part numbers through a model of the
encoder handshake, tests good parts of all four types, wrong parts, damaged
gates, an unknown number, more than four digits and keys pressed during a
test, and checks the display and the timing in the table above.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ictester_pkg.sv tb/tb_ictester.sv --top-module tb_ictester
./obj_dir/Vtb_ictester
```

Replace `tb_ictester` with any other testbench name to run one block. To
change the settle time, set `SETTLE_CYCLES` on `ictester` (at least 3, and
long enough to cover the chip and wiring delay plus two clocks).
