# Majority / flipped-line bus code for a 7-bit parallel bus

Long parallel buses suffer crosstalk: a line that switches couples into its
neighbours, and the more lines switch at once the worse it gets. This design
replaces a 7-bit parallel bus with a narrow one. Each 7-bit word is reduced to

* **ED**, one line carrying the word's *majority value*, and
* the *positions* of the lines that disagree with it, sent as 3-bit codes over
  a 3-bit bus, one code per clock.

Because seven is odd and ED is the majority, at most three lines can disagree
with it, so every word fits in exactly three codes. The decoder starts from a
word with ED on every line and inverts the lines the codes name.

```
            7                    ED (1)                  7
in_data ──/── enc_top ─────────────────────── dec_top ──/── out_data
                         code (3), code_valid
                       ──────────/───────────
```

The 4-wire link (ED + 3 code lines) replaces 7 data lines, at the price of
three clocks per word.

## The code

| code (3 bits) | meaning                      |
|---------------|------------------------------|
| 000           | no line (unused slot)        |
| 001 … 111     | data line *code − 1* differs from ED |

Worked example: `0101011` (line 6 on the left, line 0 on the right) has four
ones, so ED = 1. Its zeros are on lines 2, 4 and 6, sent as codes 3, 5, 7.
The decoder starts from `1111111`, inverts lines 2, 4 and 6 and gets `0101011`
back. A word with all lines equal is sent as ED and three 0 codes, and the
code bus does not toggle.

Flipped lines are sent from line 0 upward. Unused slots are sent as 0.

## Encoder (`enc_top`)

```
in_data ─► data_q ─┬─► enc_counter ─(ones, zeros)─► enc_controller ─► ED ─► ed_q ──► ed
                   │                                      │
                   └──────────────► enc_comparator ◄──────┘
                                          │ code of the slot-th flipped line
                                          ▼
                              enc_registers (3 × 3 bit) ──► code, code_valid
```

* `enc_counter` counts ones and zeros (combinational).
* `enc_controller` sets ED = 1 when ones are the majority.
* `enc_comparator` XORs the word with ED to find the flipped lines. Its `sel`
  input gives the rank of the flipped line to report. It outputs that line's
  code, or 0 if there are fewer flipped lines.
* `enc_registers` holds three codes. One code is written per clock, and the
  register written on the previous clock drives the bus.

**Sequencing.** A word is taken on the clock edge where `in_valid` and
`in_ready` are both high (edge E0). On E1, E2 and E3 the comparator's output for
slots 0, 1 and 2 is written into the registers. Each code is on the bus, with
`code_valid` high, in the clock after it is written. ED is registered at E1 and
held for the word's three codes. `in_ready` is high while the encoder is idle,
and also in the clock that writes slot 2. So a continuously offered stream is
taken at one word per three clocks, with no idle clock on the bus.

An assertion in `enc_top` checks the property the scheme relies on: no more
lines disagree with ED than there are registers.

## Decoder (`dec_top`)

```
code, code_valid ─► dec_registers (3 × 3 bit, + ED) ─► dec_line_identifier ─► mask
ed ──────────────►        │ ed_q, frame_done                                     │
                          └──────────────────────────────► dec_inversion ◄───────┘
                                                      out = {7{ED}} ^ mask ──► out_data, out_valid
```

* `dec_registers` writes each valid code into the next of three registers. It
  keeps ED with the third code. `frame_done` pulses once a word's codes are
  all stored.
* `dec_line_identifier` turns each non-zero code *p* into a one on line *p−1*
  and ORs the three, so the order of the codes does not matter.
* `dec_inversion` copies ED onto all seven lines (the "splitter") and XORs
  that word with the mask. It registers the result.

**Framing.** The decoder has no frame marker. It counts valid codes in threes
from reset, which works because the encoder always sends exactly three codes
per word. Both sides must be reset together.

**Timing.** The third code is stored at edge E. The word is on `out_data` with
`out_valid` high after E+1. From encoder input to decoder output (`enc_dec_top`):
a word taken at E0 appears after E5. `out_data` holds its value until the next
word.

## Top level (`enc_dec_top`)

The top joins the encoder to the decoder and brings out the link
(`bus_ed`, `bus_code`, `bus_valid`) so that its switching can be observed.

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| clk        | in  | 1     | rising-edge clock |
| rst_n      | in  | 1     | asynchronous active-low reset, clears all state |
| in_valid   | in  | 1     | a word is offered |
| in_ready   | out | 1     | the word is taken at this edge |
| in_data    | in  | 7     | word to send |
| bus_ed     | out | 1     | ED line |
| bus_code   | out | 3     | code bus |
| bus_valid  | out | 1     | a code is on the bus |
| out_data   | out | 7     | decoded word |
| out_valid  | out | 1     | one-clock pulse per decoded word |

The shared sizes are in `enc_dec_pkg`: `DATA_W = 7` and functions giving the
code width (`$clog2(DATA_W+1)` = 3) and the number of slots
(`(DATA_W−1)/2` = 3). Every module takes `DATA_W` as a parameter, so other
odd widths elaborate. Only 7 is tested.

## What follows the source design and what is added

Taken from the source design:
* the 7-bit word and the 3-bit code bus;
* the counter, controller, comparator and three registers in the encoder;
* the registers, splitter, line identifier and inversion in the decoder;
* ED as the majority value;
* at most three flipped lines, loaded one per clock;
* a position table in which 000 means "no flip".

Choices made here, where the description stops short:
* the `in_valid`/`in_ready` handshake and the `code_valid` line;
* the order in which flipped lines are sent;
* the rank input of the comparator;
* framing by counting codes in threes;
* registering ED in both encoder and decoder;
* the output register in the decoder;
* the asynchronous reset;
* treating the leftmost character of a printed word as line 6.

Known departures:
* **Decoder example.** The source pairs the single code `100` with the decoded
  word `0101011`. With the position table used here (code *p* = line *p−1*, 0 =
  none), that word is sent as codes 3, 5, 7. A lone code 4 with ED = 1
  decodes to `1110111`. The table was followed, because it is the only
  reading in which "all registers zero" means "no flips".
* **Controller/comparator polarity.** The source describes the comparator
  output as high when ones are the minority. This sounds opposite to the
  controller's "high for the majority". Here, ED is 1 for a majority of ones,
  and the comparator marks lines that differ from ED.
* **Splitter.** The splitter is pure wiring (one wire copied to seven), so it
  has no module of its own. It is the `{DATA_W{ed}}` at the input of
  `dec_inversion`.
* **Size.** The source reports 30, 31 and 68 flip-flops on an Artix-7 for
  encoder, decoder and both. This RTL has 23, 21 and 44 flip-flop bits. Power
  and delay figures from FPGA tools are not reproduced.

## Switching activity on the link

The aim of the code is less crosstalk. The link has 4 lines (ED and 3 code
lines), so it has 3 adjacent pairs where the 7-bit bus has 6. On the other
hand, it changes state up to three times per word instead of once.
`tb_crosstalk_activity` measures both buses while words go through the design.
It assumes the link lines lie in the order ED, code[2], code[1], code[0].
The counts below are per word sent:

| stream (3000 words)            | bus         | toggles | adjacent pairs switching in opposite directions |
|--------------------------------|-------------|---------|------------------|
| uniform random words           | 7-bit bus   | 3.48    | 0.74 |
|                                | 4-wire link | 5.32    | 0.90 |
| words 1–3 lines off all-0/all-1| 7-bit bus   | 3.46    | 0.45 |
|                                | 4-wire link | 4.49    | 0.43 |

Per clock, the link switches about half as much as the 7-bit bus. Per word,
this implementation does not show a reduction. The order of the codes within
a word and the line order of the link are both free choices. Change them in
`enc_comparator` and at the ports of `enc_dec_top`, and use this testbench to
judge the effect.

## Simulation

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. `tb_ref_pkg`
is an independent reference model of the code that the testbenches share.

| testbench | what it checks |
|-----------|----------------|
| tb_enc_counter | all 128 words |
| tb_enc_controller | every count pair of a 7-bit word |
| tb_enc_comparator | every word × ED × rank, and the worked example |
| tb_enc_registers | random writes/reads against a model |
| tb_enc_top | every word back to back plus random words with gaps. Checks ED, codes, the two-clock delay to the first code, and one word per 3 clocks |
| tb_dec_registers | random codes with gaps. Checks register contents, ED and frame_done |
| tb_dec_line_identifier | all 512 code triples |
| tb_dec_inversion | random ED and masks |
| tb_dec_top | every frame plus random frames with gaps, the worked example, and latency |
| tb_crosstalk_activity | switching counts on the 7-bit bus and on the link (see above). Also checks every word end to end |
| tb_enc_dec_top | end to end at full size: 2129 words, checked for order, value, 5-clock latency, throughput and bus contents. Counts ED=0/1 words, 0/1/2/3 flipped lines, stalls and idle gaps, and fails if any case never occurs |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_enc_dec_top rtl/enc_dec_pkg.sv tb/tb_ref_pkg.sv tb/tb_enc_dec_top.sv
./obj_dir/Vtb_enc_dec_top
```

The whole suite runs in seconds.
