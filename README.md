# 16 × 16 pipelined two's-complement multiplier (carry-save, two-phase, scannable)

This is a pipelined multiplier for 16-bit two's-complement numbers. It returns the full 32-bit
product. It accepts a new operand pair every clock cycle, and each product comes out five cycles
after its operands went in. It was designed as a full-custom NMOS chip with a non-overlapping
two-phase clock. It uses three classic techniques:

* **Simultaneous partial-product generation.** All 256 one-bit products are formed at once with
  AND gates. They are arranged so that no column of the matrix holds more than 16 bits.
* **Wallace-tree carry-save reduction.** Six levels of full adders bring every column down to
  at most two bits, which gives two 32-bit numbers.
* **A carry-lookahead adder spread over three pipeline stages.** One stage computes the block
  propagate and generate signals, one computes the block carries, and one runs the 4-bit ripple
  adders.

The stages are cut so that each is about four full-adder delays long. That is the length of
the last stage, where a carry ripples through a 4-bit adder. Every latch between stages is
also a shift register. With the `op` pin low, the contents of the four intermediate latches can
be shifted out one bit per cycle, for testing. This is a level-sensitive scan design.

## The arithmetic

With multiplier `a` and multiplicand `b`, both 16-bit two's complement:

```
P = Σ_{k=0}^{14} 2^k a_k b  −  2^15 a_15 b
  = Σ_{k=0}^{14} 2^k a_k b  +  2^15 a_15 b'  +  2^15 a_15        (mod 2^32)
```

Here `b'` is the bitwise complement of `b`. This gives the following partial products:

* Rows 0–14 are `a_k AND b_j`. Row 15 is `a_15 AND NOT b_j`.
* Every row is **sign extended to bit 31** by repeating its bit `j = 15`. This makes the sum
  correct modulo 2^32 without any correction term.
* The lone `+2^15 a_15` term is entered as **two copies of `a_15` in column 13 and one in
  column 14** (2·2^13 + 2^14 = 2^15). Columns 13 and 14 hold only 14 and 15 partial-product
  bits, so after these copies every column from 13 up is exactly 16 high. No column exceeds 16.

In total the matrix holds 395 bits (`rtl/pp_matrix.sv`).

## The carry-save reduction plan (`mult_pkg`, `csa_level`)

This is the least obvious part of the design. All of it is computed at elaboration time by
constant functions in `rtl/mult_pkg.sv`. Nothing is tabulated by hand.

**Rule applied in every level.** In every column, the bits are taken three at a time into full
adders. Each sum stays in its column and each carry moves one column up. A carry out of column
31 is dropped, because the product has only 32 bits. The one or two bits left over pass through
unchanged. There is one exception. If passing the leftovers would leave a column taller than
the level's target height, the two leftover bits go through a full adder whose carry input is
tied low, which works as a half adder. The target heights are 11, 8, 6, 4, 3 and 2. They are
the standard sequence for reducing a 16-high matrix to 2 in six levels. All adders of a level
work in parallel, so a level costs one full-adder delay.

The rule gives these column heights (column 0 first):

| after | bits | adders | heights, columns 0 … 15 (columns 16–31 are all equal to column 15) |
|---|---|---|---|
| matrix  | 395 | –   | 1 2 3 4 5 6 7 8 9 10 11 12 13 16 16 16 |
| level 1 | 269 | 121 | 1 2 1 3 4 3 5 6 5 7 8 7 9 10 11 11 |
| level 2 | 193 | 73  | 1 2 1 1 3 2 4 3 5 4 6 5 5 7 8 8 |
| level 3 | **144** | 47 | 1 2 1 1 1 3 2 2 4 3 3 5 4 4 6 6 |
| level 4 | 99  | 43  | 1 2 1 1 1 1 3 2 2 2 2 4 3 3 3 4 |
| level 5 | 76  | 22  | 1 2 1 1 1 1 1 3 2 2 2 2 2 2 2 3 |
| level 6 | **57** | 18 + 7 half | 1 2 1 1 1 1 1 1 2 2 2 2 2 2 2 2 |

Half adders appear only in level 6, in columns 8–14.

**Placement in the pipeline.** Levels 1–3 share pipeline stage 1 with the AND array. Levels 4–6
form stage 2. The 144 bits left after level 3 go into latch 1. The 57 bits left after level 6
are the two operands of the final adder. Seven columns hold a single bit, and the second operand
gets a zero there. These 57 bits go into latch 2.

**Bit layout.** Each level's bits travel as one flat vector, column by column from column 0.
Inside a column of a level's output the order is:

1. the sums of that column's adders,
2. the passed bits (or the half-adder sum),
3. the carries from the column below.

`offset(level, col)` gives where a column starts in the vector, and `height(level, col)` gives
how many bits it holds. The scan order of latches 1 and 2 follows this layout.

**Shared sign-extension adders.** In the upper columns the sign-extension bits of the low rows
come first. As a result, many first-level adders receive the same three signals in column after
column. The original chip built each of those adders only once. Here they are written out per
column and left to the synthesis tool to merge.

## The final adder across stages 3–5

The two operands X and Y are split into eight 4-bit slices.

* **Stage 3 (`pg_gen`, seven copies).** Computes the block propagate and generate of slices
  0–6 as sums of products:
  `P = Π(x_i + y_i)` and
  `G = x3y3 + (x3+y3)x2y2 + (x3+y3)(x2+y2)x1y1 + (x3+y3)(x2+y2)(x1+y1)x0y0`.
  Slice 7 is not needed, because the carry out of bit 31 is discarded.
* **Stage 4 (`cla_unit`).** Has a low and a high half. The carry into the adder is always zero,
  so the low half gives `C4 = G3`, `C8 = G7 + P7G3`, … `C16`. The high half repeats the same
  pattern starting from `C16` and gives `C20`, `C24` and `C28`.
* **Stage 5 (`rca4`, eight copies).** Each copy adds its slice with its carry. Their carry-outs
  are not used, since the lookahead unit already produced them.

Each latch carries the operand bits forward next to the new signals:

* Latch 3 is 70 bits: the 57 operand bits, G3–G27 and P7–P27.
* Latch 4 is 64 bits: the 57 operand bits and C4–C28.

## Clocking, latency and scan

Every latch bit is a master/slave pair. The masters are opened during PHI1 by one of two strobes
from `latch_ctrl`:

* `NORMAL = PHI1·OP` loads the datapath value.
* `SHIFT = PHI1·¬OP` loads the neighbouring cell.

The slaves are opened by PHI2. The two phases must not overlap. The testbenches use this cycle:

```
phi1  __|‾‾‾‾‾‾|___________________|‾‾‾‾‾‾|____
phi2  _______________|‾‾‾‾‾‾|__________________
        10 ns   5 ns   10 ns  5 ns
```

Operands must be stable while PHI1 is high. Operands applied before the PHI1 of cycle 1 appear
on `p` during the PHI2 of cycle 5. A new pair may be applied in every cycle. Nothing is reset,
so the first four outputs after power-up are meaningless.

**Scan.** With `op` low, each cycle moves every intermediate latch one cell toward its bit 0:

* `l_in[k-1]` enters at the top bit of latch k.
* Bit 0 of latch k appears on `l_out[k-1]`.
* A bit fed in reaches the output after as many cycles as the latch is wide: 144, 57, 70 and
  64 cycles.

The 32-bit output latch is not on the scan path. Its master opens on `NORMAL`, so `p` holds the
last product while the other latches are scanned. To look at the internal state for a given
operand pair, follow these steps:

1. Hold the pair on the inputs for five cycles with `op` high.
2. Lower `op`.
3. Clock 144 times, collecting one bit from each `l_out` per cycle.

Bit 0 of each latch is on its `l_out` pin as soon as `op` is lowered. Bit n appears after n shift cycles.

## Modules

| file | what it is |
|---|---|
| `mult_pkg.sv` | sizes; the reduction plan as constant functions; latch widths `L1_W`…`L4_W` |
| `mult16_pipe.sv` | the complete multiplier (top) |
| `pp_matrix.sv` | AND array forming the 395-bit partial-product matrix |
| `csa_level.sv` | one carry-save level, `LEVEL` = 1…6 |
| `full_adder.sv` | the adder cell, written as the selector adder's two cases |
| `pg_gen.sv` | 4-bit block P/G |
| `cla_unit.sv` | carries C4…C28 |
| `rca4.sv` | 4-bit ripple adder slice |
| `latch_ctrl.sv` | NORMAL/SHIFT strobes from PHI1 and OP |
| `lssd_latch.sv` | scannable two-phase latch, width `W` |
| `out_latch.sv` | 32-bit output latch |

Top-level ports of `mult16_pipe`: `phi1`, `phi2`, `op`, `a[15:0]` (multiplier), `b[15:0]`
(multiplicand), `l_in[3:0]`, `l_out[3:0]` and `p[31:0]`. The design has no parameters. All
sizes follow from `N = 16` in the package. The package functions are written for this
16 × 16 matrix: the two copies at column 13 and one at column 14 are specific to it.

The latches are real level-sensitive latches (`always_latch`), because that is the circuit.
Expect tools to report them as latches. Verilator also reports the scan path through a latch
(slave of cell i+1 → master of cell i → slave of cell i) as a combinational loop. The
non-overlapping phases break that loop: the master and slave of a cell are never open at the
same time.

## Simulating

Each testbench in `tb/` prints `TB_RESULT checks=N failures=M`. For example, the end-to-end
test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/mult_pkg.sv tb/tb_mult16_pipe.sv --top-module tb_mult16_pipe
./obj_dir/Vtb_mult16_pipe
```

`tb_mult16_pipe` runs the design at full size. It does the following:

* applies seven reference pairs (±143 × ±27, 1123 × 891, −1123 × 891, −32768 × −32768) one at
  a time, checking that each product appears in cycle 5 and not in cycle 4;
* runs 600 back-to-back pairs;
* shifts random streams through all four latches and checks the delays;
* scans out the latch contents for 20 products and checks that they are consistent: latches 1
  and 2 add up to the product, and the P, G and carry bits match their operands;
* checks that `p` holds during the scan and that multiplying works again afterwards.

`tb_mult16_reference_session` replays a recorded reference session. First it runs five cycles
with zero operands. Then it applies the seven reference pairs on consecutive cycles. After every
cycle it compares the upper and lower halves of `p` with the recorded values.

The block testbenches check each leaf against arithmetic computed independently. The
full-adder, P/G, ripple-adder and strobe testbenches are exhaustive. Every carry-save level is
checked for conservation of the weighted sum under random inputs.

## How far this follows the original design, and where it departs

Taken as designed:

* the five-stage partition;
* the two's-complement identity and the sign-extension scheme;
* the six-level Wallace reduction in two stages of three;
* the P/G equations;
* the lookahead equations with zero carry in;
* the 4-bit ripple slices;
* the latch widths 57, 70, 64 and 32;
* the two-phase latch with NORMAL/SHIFT strobes;
* the five-cycle latency.

Choices made here:

* **Adder placement in the carry-save tree.** The original adder-by-adder placement is not
  reproduced. The greedy rule above is used instead. Its first level has the same 121 adder
  positions as the original. The original built 86 of them, because 35 had the same inputs as
  another adder and were shared. With the bit order used here, 81 distinct first-level adders
  remain after merging. Levels 2, 3, 4 and 6 use somewhat different numbers of adders than the
  original. After level 3 it leaves **144** bits, where the original first latch has **143**. So a bit shifted into latch 1 appears after 144
  cycles, not 143. Level 6 needs seven half adders that the original does without.
* **Bit order inside the latches.** The order in which bits sit in each latch is this design's
  own. Scanned-out latch words therefore do not match bit for bit those of the original chip.
  Only the products and the meaning of the fields agree.
* **Electrical detail is not modelled.** This covers dynamic charge storage (values here are
  held forever), the active-low NAND/adder interface of the first level, and the superbuffered
  high-fanout sign-extension nets.
* **Output latch strobe.** The output latch opens on NORMAL rather than on PHI1 alone.
* **Not included.** The clock-line drivers, the pad frame and the off-chip two-phase clock
  generator have no logic function here. The clock phases and pins are plain ports.
