# Switch-selected ID display for a 7-segment LED

Two pushbuttons, read as a 2-bit number, pick one of the four positions of
a 4-digit 7-segment LED display. That position lights up and shows the ID
digit that belongs there. With both buttons released the leftmost position
shows the first of the four digits. With both pressed the rightmost position
shows the last one. Only one position is lit at a time, so the display is
never scanned and the whole circuit is combinational: no clock, no reset,
no state. It is sized for a small CPLD (an EPM240-class part) and uses 14
I/O pins.

With the default ID digits `3456` (from an ID ending in ...123456):

| buttons pressed (x[1], x[0]) | value | lit anode `en[3:0]` | digit shown |
|---|---|---|---|
| none | 0 | `1000` (leftmost) | 3 |
| x[0] only | 1 | `0100` | 4 |
| x[1] only | 2 | `0010` | 5 |
| both | 3 | `0001` (rightmost) | 6 |

## Logical values and pin levels

Mixing logical values with electrical levels is the easiest way to get this
design wrong. Three different conventions meet at the pins:

- **Buttons `x[1:0]` are active low.** Each is a normally-open switch to
  ground, and the input pad has its weak pull-up enabled. A released button
  reads 1 and a pressed one reads 0. The design works on the logical value
  `sel = ~x`, so "pressed" is 1.
- **Digit enables `en[3:0]` are active high.** They drive the common anodes
  of a multiplexed common-anode display. `en[3]` is the leftmost digit and
  `en[0]` the rightmost. Switch value *v* lights `en[3-v]`, so positions are
  counted from the left while anode indices count from the right.
- **Segments `a`..`g` and `dp` are active low.** The segment cathodes are
  shared by all four digits, so a 0 lights that segment in whichever digit
  has its anode high. `dp` shares a pin with the colon. It is held at 1,
  which keeps it dark.

Inside the RTL, 1 always means "true": pressed, lit, selected. The only
inversion is at the input (`sel = ~x`). The active-low segment codes are
part of the decoder table.

## Datapath

```
x[1:0] --~--> sel --+--> digit_enable_decoder --> en[3:0]
                    |
                    +--> id_digit_mux --digit--> seg7_decoder --> {a,b,c,d,e,f,g}
                         (ID_DIGITS)                              dp = 1
```

| file | role |
|---|---|
| `rtl/lab1_pkg.sv` | shared types: `pos_t` (2-bit position), `bcd_t`, `id_t` (four BCD digits), `seg7_t`, `en_t`, and `SEG_BLANK` |
| `rtl/digit_enable_decoder.sv` | 2-to-4 one-hot decoder, value 0 to `en[3]` |
| `rtl/id_digit_mux.sv` | picks the ID digit for the selected position from `ID_DIGITS` |
| `rtl/seg7_decoder.sv` | BCD to active-low `{a,b,c,d,e,f,g}` pattern |
| `rtl/lab1.sv` | top level: input inversion, the three blocks, `dp` tie-off |

A digit is chosen first and then decoded. Because the ID is a constant,
synthesis folds the mux and the decoder into a few gates per output. A
generic 4-input-LUT mapping of the default ID needs 6 LUTs, and the exact
count depends on the digits. The vendor fitter's count may differ.

## Segment encoding

`seg7_t` is `{a,b,c,d,e,f,g}`, with `a` in bit 6 and `g` in bit 0. The
segments use the usual layout: `a` on top, `b` and `c` on the right, `d` at
the bottom, `e` and `f` on the left, `g` in the middle.

| digit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| code | 01 | 4f | 12 | 06 | 4c | 24 | 20 | 0f | 00 | 04 |

6 and 9 are drawn with their tails. 7 uses only `a`, `b` and `c`. The codes
10 to 15 are not decimal digits, and the decoder blanks the digit for them
(`7'h7f`). That blanking is this design's own choice.

## Setting the ID

Set the top's `ID_DIGITS` parameter to the last four ID digits as packed
BCD, leftmost digit in the top nibble. For example, an ID ending in 0125 is
`lab1 #(.ID_DIGITS(16'h0125)) ...`. The default is `16'h3456`.

## Board connection

One wiring that works on the EPM240T100C5 board with an LD5643BR display:

| signal | CPLD pin | | signal | CPLD pin |
|---|---|---|---|---|
| a | 33 | | en[3] | 35 |
| b | 44 | | en[2] | 50 |
| c | 38 | | en[1] | 48 |
| d | 34 | | en[0] | 42 |
| e | 30 | | x[1] | 99 (weak pull-up on) |
| f | 52 | | x[0] | 97 (weak pull-up on) |
| g | 40 | | dp | 36 |

Each segment cathode goes through its own 200 Ω series resistor. Any free
I/O pins will also work. The pull-ups are a pad option set in the fitter's
pin assignments, not in the RTL: without them a released button floats.

## Simulation

The testbenches use only the built-in simulator features (`--binary
--timing`). They drive `x` with the levels the pulled-up buttons would give.
The display model is in `tb/seg_ref_pkg.sv`. It describes each digit by the
names of its lit segments, builds the expected active-low patterns from
that, and decodes a pattern back into a digit, so the checks do not reuse
the design's table.

```
verilator --binary --timing --assert -Irtl -Itb rtl/lab1_pkg.sv tb/seg_ref_pkg.sv \
    rtl/digit_enable_decoder.sv rtl/id_digit_mux.sv rtl/seg7_decoder.sv rtl/lab1.sv \
    tb/lab1_tb.sv --top-module lab1_tb -Mdir obj_lab1
./obj_lab1/Vlab1_tb
```

| testbench | checks |
|---|---|
| `tb/lab1_tb.sv` | the top at its defaults: the four values in order, then 32 random ones; only the selected anode is lit, the shown digit is right, `dp` is dark, and every position is lit at least once |
| `tb/lab1_ids_tb.sv` | three copies of the top with IDs ...7890, ...0125 and ...6634, so every decimal digit goes through the whole path |
| `tb/seg7_decoder_tb.sv` | all 16 input codes |
| `tb/digit_enable_decoder_tb.sv` | all 4 values; the enables must be one-hot and in the right order |
| `tb/id_digit_mux_tb.sv` | three IDs at all four positions; expected digits come from decimal division |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
All of them pass.

## What is not in the RTL

The buttons, the pull-up resistors, the segment resistors, the display
itself and the CPLD pin locations are board parts or fitter settings, not
logic. The top's ports are exactly the signals that go to them.
