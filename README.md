# 64-bit multiply-accumulate unit on modified Wallace trees, with carry-save multi-operand adders

A multiply-accumulate (MAC) unit forms `acc <= acc + a*b` once per clock. It is
the inner loop of FIR filters, inner products and transforms. This design does
it for unsigned 64-bit operands with a 129-bit accumulator. The multiplier has
no carry-propagate adders inside its reduction tree. Each 16 x 16 piece is a
*modified (reduced-complexity) Wallace tree*. That tree compresses the
partial-product matrix with full adders only, until the last stage, and needs
only one carry-propagate adder at the end.

The second half of the design is a set of carry-save *multi-operand adders*.
Each one reduces many operands to a sum word and a carry word without
propagating carries. They are:

* a 9:2 tree laid out as a linear array of 3:2 rows;
* an 11:2 tree built from 5:3 compressors;
* a 15:4 bit counter;
* a 4:2 compressor cell.

They sit next to the MAC in the top level, on their own ports.

## Hierarchy

```
wallace_mac_top
├── mac64                    clocked MAC: 64x64 -> 128-bit product -> 129-bit accumulator
│   ├── mult64_quad          four 32x32 products + three adders
│   │   ├── mult32_quad x4   four 16x16 products + three adders
│   │   │   ├── wallace_mult #(N=16) x4   modified Wallace tree (full_adder, half_adder)
│   │   │   └── quad_combine #(N=32)
│   │   └── quad_combine #(N=64)
│   └── mac_accumulator      129-bit adder + register
├── cs_tree_9to2             9 operands -> 2 words, seven csa_row (3:2) rows
├── cs_tree_11to2            11 operands -> 2 words, five c53_row rows of counter_5to3
├── counter_15to4            15 bits -> 4-bit count (full_adder, counter_5to3, parallel_adder4)
└── compressor_4to2          multiplexer-based 4:2 cell
```

Everything except the accumulator register is combinational.

## The modified Wallace reduction (`wallace_mult`)

This is the least obvious block. It multiplies two N-bit unsigned numbers in
three phases.

**1. Partial products as columns.** Bit `a[i] & b[j]` has weight `i+j`. Each
bit is placed in column `c = i+j`, pushed to the bottom of the column. Column
`c` holds `min(c+1, 2N-1-c)` bits. Drawn with the tallest column in the
middle, the matrix is an inverted pyramid. The tallest column holds N bits,
so the matrix has N rows.

**2. Reduction stages.** In each stage, every column is cut into groups of
three bits, from the bottom:

* a group of three goes into a full adder. The sum stays in the column and
  the carry moves to the next column.
* a leftover single bit or pair passes through unchanged.

The number of rows follows

    r(j+1) = 2*floor(r(j)/3) + (r(j) mod 3),     r(0) = N

and the stages stop at two rows:

| N  | rows per stage                          | stages |
|----|-----------------------------------------|--------|
| 64 | 64 43 29 20 14 10 7 5 4 3 2             | 10     |
| 16 | 16 11 8 6 4 3 2                         | 6      |
| 10 | 10 7 5 4 3 2                            | 5      |

Carries arriving from the neighbouring column can make a column taller than
the row count for that stage. Only then is a half adder put on that column's
leftover pair. This is what separates the modified tree from the classic one:
the classic Wallace tree puts a half adder on every leftover pair, and half
adders do not reduce the bit count.

**3. Final addition.** The two remaining rows are added by one carry-propagate
adder, written as `+`.

The whole schedule is computed at elaboration by constant functions in the
module (`make_plan`). That covers the height of each column in each stage and
the number of full and half adders in each column. The generate loops then
place exactly those `full_adder` and `half_adder` cells. Each stage has its
own column arrays (`g_stage[s].in_col`, `out_col`, `cy`). These localparams
report the size of the tree:

* `NUM_STAGES`: number of reduction stages.
* `NUM_FA`: number of full adders.
* `NUM_HA`: number of half adders.
* `HA_FIRST_STAGE`: the first stage that holds a half adder.

With the default N = 64 the tree has 10 stages, 3853 full adders and 53 half
adders. All the half adders are in the tenth stage.

Elaboration is slow at N = 64. Verilator needs about a minute just to lint
the module, because the plan is evaluated by its constant-function
interpreter.

## Building the 64-bit product from quarters (`quad_combine`)

An N x N product is split into four products of the N/2-bit halves
(H = N/2):

    q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH
    a*b = q3*2^N + (q1 + q2)*2^H + q0

Three adders produce the product, and none of them can overflow:

* `t1 = {q3, H zeros} + q2`
* `t2 = q1 + q0[N-1:H]`
* `p = {t1 + t2, q0[H-1:0]}`

`mult32_quad` applies this to four 16 x 16 Wallace trees. `mult64_quad`
applies it to four `mult32_quad`. So the 128-bit product comes from sixteen
16 x 16 trees and 3 + 4*3 = 15 adders.

## Accumulator and timing (`mac_accumulator`, `mac64`)

* `acc` is a 129-bit register. At each rising edge it loads `acc + a*b`,
  modulo 2^129.
* `rst` is synchronous and active high. It clears `acc` to 0.
* There is no enable. The unit accumulates on every cycle, so hold `a` or `b`
  at 0 to pause it.
* Operands applied during cycle k are in `acc` after the edge that ends
  cycle k. That is one MAC per clock, with latency 1.
* The multiplier is not pipelined, so the clock period has to cover the whole
  multiplier tree.

## Carry-save multi-operand adders

All trees take N-bit unsigned operands (default N = 16). They return two
words of N+4 bits: `sum_o` and `carry_o`. `carry_o` is already shifted into
place, so `sum_o + carry_o` is the exact sum of the operands.

**`csa_row`** is a row of full adders, one per bit, with no carry chain:
`a + b + ci = s + 2*co`.

**`cs_tree_9to2`** connects seven rows as a linear array. The carry word of
each row is the third input of the next row:

```
level 0  R0 = I2+I1+I0   R1 = I4+I3+2C0   R2 = I6+I5+2C1   R3 = I8+I7+2C2
level 1  R4 = S1+S0+2C3  R5 = S3+S2+2C4
level 2  R6 = S5+S4+2C5  -> Sf, Cf
```

**`counter_5to3`** counts five bits into a 3-bit number. It uses two full
adders, and its two weight-2 carries are merged by an XOR and an AND.
**`c53_row`** is a word-wide row of these counters. Its outputs are weighted
1, 2 and 4.

**`cs_tree_11to2`** uses five `c53_row`:

* comp1 takes operands I0..I4.
* comp2 takes I5..I7 plus comp1's two carry words.
* comp4 takes I8..I10 plus comp2's two carry words.
* comp3 adds the three sum words and comp4's carry words.
* comp5 reduces comp3's three outputs to two words.

comp5 has two inputs tied to 0, so its weight-4 output is always 0.

**`counter_15to4`** counts fifteen bits:

1. Five full adders each take three bits.
2. One 5:3 counter counts the five carries, giving weights 2, 4 and 8.
3. The other counts the five sums, giving weights 1, 2 and 4.
4. `parallel_adder4`, a 4-bit ripple adder, adds the two counts.

**`compressor_4to2`** computes `x1+x2+x3+x4+cin = sum + 2*(carry+cout)` with
XOR stages and multiplexers:

* `cout = (x1^x2) ? x3 : x1`, which does not depend on `cin`. In a row of
  cells, `cout` of bit i drives `cin` of bit i+1 without a ripple.
* `sum = parity ^ cin`.
* `carry = parity ? cin : x4`.

## Where this RTL departs from, or goes beyond, the original description

* **Half-adder count.** With the half-adder rule above, the 64 x 64 tree has
  its 10 stages and keeps half adders to the last stage, as described. But it
  uses 53 half adders, not 8. No placement rule that gives 8 is described.
* **Which multiplier the MAC uses.** The text describes one 64 x 64 modified
  Wallace tree. The implemented MAC instead follows the block structure of its
  schematic: four 32 x 32 blocks, each made of four 16 x 16 trees.
  `wallace_mult` still defaults to N = 64 and is tested at that size. It can
  be put in place of `mult64_quad`, as `wallace_mult #(.N(64))`, for a
  single-tree MAC.
* **Final adder.** The final adder of the Wallace tree is a carry-propagate
  adder. A carry-save adder, also mentioned for that place, cannot produce a
  single product word.
* **Compressors and the MAC.** The compressors are described as the building
  blocks of the MAC, but their place inside it is not given. They are
  therefore separate units in the top.
* **Choices of this design:**
  * unsigned operands;
  * a synchronous reset and no enable;
  * accumulator wrap-around;
  * the internal width of the trees (N+4);
  * the exact word-to-port wiring of the 11:2 tree;
  * the multiplexer data assignment inside the 4:2 cell.
* **Not modelled.** The FPGA carry-chain mapping of the linear arrays is not
  modelled. The rows are plain full-adder rows, and any technology mapping is
  left to synthesis.

## Verification

Every module that is not a small helper has a self-checking testbench in
`tb/` (`tb_<module>.sv`). Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The testbenches do
the following:

* **Small cells** (full adder, 4:2, 5:3, 15:4, 4-bit adder): checked
  exhaustively. The 4:2 test also checks that `cout` does not depend on `cin`.
* **Trees and rows:** random and corner operands (all ones, all zeros)
  against the testbench's own sums.
* **`tb_wallace_mult`:** products at N = 64, 16 and 10 (random and corner
  operands) and exhaustively at N = 4. It checks the stage counts against its
  own evaluation of the row formula. It checks that N = 64 takes 10 stages
  with half adders only in stage 10.
* **`tb_mult32_quad`, `tb_mult64_quad`:** products against the testbench's
  own product.
* **`tb_mac_accumulator`, `tb_mac64`:** a reference accumulator, checked
  every cycle. The tests check that `acc` does not change before the edge.
  They include a mid-run reset and all-ones operands until the 129-bit
  accumulator wraps.
* **`tb_wallace_mac_top`** runs the whole top at its default parameters:
  twenty 16-element inner products through the MAC, one of them all ones so
  that the accumulator wraps. In every cycle it also drives and checks all
  four compressor units. It counts resets, accumulations, wraps, finished
  inner products and the operations of each compressor, and a mechanism that
  never happened counts as a failure.

## Simulating

All sources are in `rtl/`, one module per file. Verilator finds the modules
a testbench needs with `-y rtl`. For example:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl \
          --top-module tb_wallace_mac_top tb/tb_wallace_mac_top.sv -o sim
./obj_dir/sim
```

Approximate build times:

* blocks that contain the 64-bit multiplier: about 1 minute;
* `tb_wallace_mult`, with its N = 64 tree: about 3 minutes.

Once built, each simulation runs in well under a second.
