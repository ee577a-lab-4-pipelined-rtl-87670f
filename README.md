# Pipelined 5-bit two's complement multiplier

This is a 5 × 5 signed multiplier built as an array of adder cells. It is
pipelined so that a new pair of operands can enter on every clock. The two
inputs `a` and `b` are 5-bit two's complement numbers (−16 … 15). The output
`s` is their exact 10-bit two's complement product (−240 … 256).

The array has four rows of five adder cells. Three register levels cut it
into four stages. A product leaves the array three clock edges after its
operands enter.

Two versions are included, with the same function and the same latency:

* `mul5_pipe` places each register level straight across the array, between
  two adder rows.
* `mul5_pipe_opt` places each register level as a staircase. The low cells of
  the next row move up into the current stage. This balances the stages: the
  simple version has five cells of carry ripple in every stage, while the
  staggered one has five in stage 1 and at most three in stages 2–4.

`mul5_top` puts the two side by side.

## The arithmetic: a Baugh-Wooley array

A plain AND-array multiplier only works for unsigned numbers. For signed
numbers, the sign bit of a two's complement number has weight −2⁴. Every
partial product `a[i]·b[j]` where exactly one of `i`, `j` is 4 therefore has
a negative weight. The Baugh-Wooley scheme removes these negative terms:

* `a[i]·b[j]` enters the array inverted (a NAND gate) when exactly one of `i`,
  `j` is 4. Otherwise it enters as is (an AND gate). `a[4]·b[4]` is an AND,
  because the product of two negative weights is positive.
* Inverting an n-bit group adds a known offset. For 5-bit operands, the
  offsets of both groups add up to −2⁹ + 2⁵. Modulo 2¹⁰ this equals
  **+2⁵ + 2⁹**, so adding these two constants makes the sum exactly `a·b`
  modulo 2¹⁰.

The array adds the constants without any extra adders:

* **2⁵** uses the spare third input of the leftmost full adder in the first
  row (bit 5). That input is tied to 1.
* **2⁹** is handled at the end. The carry out of the last row (bit 9) goes
  through a half adder whose other input is 1. Its sum is the inverted carry,
  and its carry (bit 10) is dropped.

`mul5_pkg::bw_pp` holds the AND/NAND rule. Every stage forms its partial
products through it.

One consequence matters when you use the design: **an all-zero register state
is not the code for any product.** The constants and inverted terms are
folded into the partial sums, so the partial sums of 0 × 0 are not zero.
While reset is held, and for three clock edges after it is released, `s`
shows a fixed non-product value (−272 for `mul5_pipe`). Ignore `s` until the
first operands sampled after reset have gone through.

## The rows and the simple pipeline

Each row (`bw_row`) is a 5-cell ripple adder. Cell 0 is a half adder and
cells 1–4 are full adders. The carry runs from the low end to the high end.
Row r adds partial-product row `a·b[r]` (shifted left by r) to the partial
sum so far. Its cell 0 produces final product bit r.

| stage | module        | adds                  | input bits of its row | registered after it                               |
|-------|---------------|-----------------------|-----------------------|---------------------------------------------------|
| 1     | `mul5_stage1` | rows `b[0]` and `b[1]` | bits 1–5             | sum bits 0–5, carry (bit 6), `a`, `b[4:2]`: 15 FFs |
| 2     | `mul5_stage2` | row `b[2]`            | bits 2–6              | sum bits 0–6, carry (bit 7), `a`, `b[4:3]`: 15 FFs |
| 3     | `mul5_stage3` | row `b[3]`            | bits 3–7              | sum bits 0–7, carry (bit 8), `a`, `b[4]`: 15 FFs   |
| 4     | `mul5_stage4` | row `b[4]`, then 2⁹   | bits 4–8, bit 9       | nothing: combinational                             |

How a stage works:

* Bits below the row's range are already final, and the stage passes them
  straight to its register.
* The row's top input is the carry out of the previous row.
* The operand bits are carried along with the data, so that each stage sees
  the `a` and `b` of its own product. The number of `b` bits carried shrinks
  stage by stage, because each stage only needs the `b` bits of later rows.
* The output is `s[3:0]`, taken from the third register level, plus `s[9:4]`,
  taken from stage 4's logic. Stage 4 has no output register.

### Timing

```
edge  1: a,b (pair n) sampled into register level 1
edge  2: pair n in level 2            (pair n+1 in level 1)
edge  3: pair n in level 3            -> s = a_n * b_n after one more row delay
```

A pair applied before rising edge k is on `s` after edge k+2, counting edge k
as the first. It stays there until edge k+3. Because stage 4 has no output
register, `s[9:4]` settles one ripple row after the edge. If the product must
be sampled in the same clock domain, add an output register (the latency then
becomes four edges). Throughput is one product per clock.

## The staggered register levels (`mul5_pipe_opt`)

In the simple version every stage has a full 5-cell ripple in series.

Look at row r+1. Its low cells only need the low sum bits of row r, and row
r's ripple produces those bits first. So the low `RIGHT_CELLS` cells of row
r+1 can work in the same stage as row r, in parallel with the rest of row r's
ripple. Each register level then becomes a staircase:

```
              high (left) cells          low (right) cells
row r     ... [FA][FA][FA] |  [FA][HA]          <- whole row in stage r
          -----------------+
row r+1   ... [FA][FA][FA]    [FA][HA]          <- low cells still in stage r
                           +------------------
                              (register)         <- carry of the low part crosses here
```

With the default `RIGHT_CELLS = 2`:

* **Stage 1** has all of row 1 and cells 0–1 of row 2. The longest path is
  five cells: row 1, or three cells of row 1 followed by two of row 2.
* **Stages 2 and 3** each have cells 2–4 of one row and cells 0–1 of the
  next. The longest path is three cells.
* **Stage 4** has cells 2–4 of row 4 and the 2⁹ inversion.

Each register level stores:

* the product bits already final,
* the high sum bits of row r that row r+1 still needs,
* row r's carry,
* the low sums of row r+1,
* the carry from row r+1's low part into its high part (this carry enters the
  high part in the next stage as its carry in),
* all of `a`, and the `b` bits still needed.

That is 16 flip-flops per level, one more than in `mul5_pipe`. The extra one
is the carry that crosses the staircase. The source design states that the
staggered version keeps the flip-flop count unchanged. This implementation
does not match that: it needs the extra carry flip-flop at each level.

`RIGHT_CELLS` may be 1, 2 or 3. The source design gives no number, so the
default of 2 is this design's choice: it keeps stage 1 no longer than before.
Function and latency are the same for every value. The testbench checks all
three values.

## Interfaces

`mul5_pipe`, `mul5_pipe_opt`:

| port    | dir | width | meaning                                               |
|---------|-----|-------|-------------------------------------------------------|
| `clk`   | in  | 1     | clock, rising edge                                    |
| `rst_n` | in  | 1     | reset, active low, asynchronous; clears all registers |
| `a`     | in  | 5     | multiplicand, two's complement                        |
| `b`     | in  | 5     | multiplier, two's complement                          |
| `s`     | out | 10    | product `a*b`, two's complement, three edges later    |

`mul5_top` has `clk` and `rst_n`. It then has `a`, `b`, `s` for the simple
pipeline and `a_opt`, `b_opt`, `s_opt` for the staggered one.

## Module hierarchy

```
mul5_top
├── mul5_pipe
│   ├── mul5_stage1 ─ bw_row (half_adder, full_adder), pipe_reg
│   ├── mul5_stage2 ─ bw_row, pipe_reg
│   ├── mul5_stage3 ─ bw_row, pipe_reg
│   └── mul5_stage4 ─ bw_row, half_adder
└── mul5_pipe_opt ─ bw_row, fa_chain (full_adder), pipe_reg
mul5_pkg: widths, operand/product types, the partial-product rule bw_pp
```

`pipe_reg` is a W-bit D flip-flop bank with the asynchronous active-low
clear. `fa_chain` is a run of full adders with a carry input: the high part
of a row whose low part sits in the previous stage.

## Simulation

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog if
it hangs. For example, with Verilator 5:

```
verilator --binary --timing -y rtl rtl/mul5_pkg.sv tb/mul5_top_tb.sv \
          --top-module mul5_top_tb -o sim
./obj_dir/sim
```

What the testbenches cover:

* **Cells and rows:** exhaustive.
* **Stages:** checked against the arithmetic sum of the incoming partial sum
  and the new partial-product row. This uses integer arithmetic, not the
  adder structure.
* **`mul5_pipe_tb` and `mul5_pipe_opt_tb`:**
  * stream all 1024 operand pairs back to back;
  * check on every cycle that `s` is the product of the pair sampled three
    edges earlier, which checks the value and the latency;
  * reset in the middle of a stream and check that the pipeline refills.
* **`mul5_top_tb`** runs both pipelines at their default parameters:
  * It first replays a 15-vector acceptance test: ten products chosen at
    random (−36, −96, 110, −117, 26, 16, −3, 13, −16, 84) and five directed
    pairs (0·0, 1·3, 2·6, 3·3, 8·2). Only the products of the random ten are
    known, so the testbench finds an operand pair for each one.
  * It then streams every pair.
  * It counts full pipeline overlap, negative products, the −16 operand,
    and a refill after reset. It fails if any of these never happens.

## What is and is not modelled

Modelled:

* The HA/FA row structure, the carry chaining between rows, the bit ranges
  at every register level, and the output wiring. These follow the source
  schematics.
* The AND/NAND pattern of the partial-product gates. This is the
  Baugh-Wooley rule, which the schematics are consistent with.
* The staircase placement of the optimized register levels follows its
  written description.

This design's own choices:

* The gate-level form of the HA/FA cells.
* Reset polarity and behaviour: active low, because the source simulation
  holds the reset pin high during operation; asynchronous clear to zero.
* The value of `RIGHT_CELLS`.
* Building three staggered register levels. The description mentions "the
  other three levels", but the design has three register levels in all.

Not modelled:

* The source's results on transistor-level timing: a 2.2 ns clock for the
  simple version and 2.0 ns for the staggered one.
* The full-custom layout (114 µm × 120 µm).

RTL has no delays, so none of these can be reproduced here. The RTL keeps the
cell counts per stage that set those clock periods.
