# Modified Booth multiplier, 64 x 64 bits

A signed multiplier that needs only half as many partial products as a
plain shift-and-add (AND-array) multiplier. The multiplier operand is
recoded in radix 4: each pair of its bits becomes one digit from
{-2, -1, 0, +1, +2}. Each digit selects a ready-made multiple of the
multiplicand. A 64 x 64 multiplication therefore adds 32 rows instead of 64.
The rows are compressed to two by a carry-save tree. A 128-bit carry
look-ahead adder then adds those two rows into the product.

The design follows the modified Booth multiplier described by Patel,
Bastawadi and Daddimani in "Design of High Speed Hardware Efficient Modified
Booth Multiplier Using HDL". Their description fixes the three steps, the
recoding table, the 64-bit main size and the carry look-ahead final adder.
The shape of the reduction tree, the adder's group size and the handling of
signs are choices made here. They are listed in the section on departures
below.

```
 x[63:0] ──┐
           ├─> booth_pp_gen ──32 rows x 128b──> csa_tree ──s,c──> cla_adder ──> p[127:0]
 y[63:0] ──┘   (32 x booth_encoder)             (8 levels of      (128-bit,
                                                 3:2 rows)         groups of 4)
```

## Interface and timing

`modified_booth_multiplier #(N = 64)`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x`  | in  | N     | multiplicand, two's complement |
| `y`  | in  | N     | multiplier, two's complement (this operand is recoded) |
| `p`  | out | 2N    | product `x * y`, two's complement |

The multiplier is purely combinational. It has no clock, no reset and no
pipeline registers, and `p` is valid one propagation delay after `x` and `y`
settle. If you need a pipeline, register the inputs and the output, or cut
between the three stages. The stage boundaries are the `pp`, `row_s` and
`row_c` signals in the top module. `N` may be any even value of at least 4.
The 8, 16 and 32-bit multipliers are the same module with `N` overridden.

## Step 1: radix-4 recoding (`booth_encoder`, `booth_pp_gen`)

Bits of `y` are read in overlapping triplets `{y[2i+1], y[2i], y[2i-1]}`,
with `y[-1] = 0`. A triplet has the value `-2*y[2i+1] + y[2i] + y[2i-1]`:

| triplet | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---------|-----|-----|-----|-----|-----|-----|-----|-----|
| digit   | 0   | +1  | +1  | +2  | -2  | -1  | -1  | 0   |

Because the triplets overlap by one bit, the digits `d_i` satisfy
`y = sum d_i * 4^i` for a two's complement `y`. This is why the recoding
handles signed multipliers with no correction step.

`booth_encoder` turns a triplet into three flags, `mbm_pkg::booth_sel_t`:
`two` (|d| = 2), `one` (|d| = 1) and `neg` (d < 0). A zero digit has all
three flags clear.

`booth_pp_gen` forms the four non-trivial multiples once and shares them
between all 32 rows:

| signal | value |
|--------|-------|
| `m`    | +X |
| `m11`  | -X, from a subtractor |
| `m2`   | +2X, a shift |
| `m21`  | -2X, a shift of `m11` |

The multiples are N+2 bits wide. One extra bit is needed for the shift by 2,
and a second so that +2 * (-2^(N-1)) still fits.

Each row has its own encoder and a multiplexer that picks 0, ±X or ±2X. The
chosen multiple is sign-extended to the full 2N bits and shifted left by 2i.
Summing all rows modulo 2^(2N) then gives the exact signed product.

This is the simplest correct way to handle signs. It costs area: every row
carries a full-width sign extension into the tree. The usual area
optimisations are not used. These are the sign-encoding "1 1 ~s" prefix
trick, and negation by inversion plus a "+1" bit injected into the tree.

## Step 2: reduction to two rows (`csa_tree`, `csa_row`)

`csa_row` is a row of full adders (a 3:2 compressor). It takes three W-bit
words and returns a sum word and a carry word, with the carry word already
shifted left by one place. `csa_tree` applies these rows level by level.
Each level takes its rows in groups of three; one or two left-over rows pass
straight down. A level with n rows leaves `2*floor(n/3) + n mod 3` rows. For
32 rows the counts per level are

    32 -> 22 -> 15 -> 10 -> 7 -> 5 -> 4 -> 3 -> 2

so the tree has 8 full-adder delays. All arithmetic is modulo 2^W, so the
carry out of the top bit is dropped, and `s + c` equals the sum of the
inputs. The level count is computed at elaboration, so the tree adapts to
any `ROWS` of at least 2.

## Step 3: the final carry look-ahead adder (`cla_adder`)

The final adder is as wide as the product (2N = 128 bits). It is the stage
whose delay matters most, because a carry may have to cross all 128 bits.
`cla_adder` is a hierarchical carry look-ahead adder whose groups have four
members:

* **Up pass.** The bit generate `g = a & b` and propagate `p = a ^ b` form
  level 0. Every four nodes of one level become one node of the next, with a
  group generate and a group propagate. The levels hold 128, 32, 8, 2 and 1
  nodes. A partial group, such as the 2 nodes under the root, is padded with
  g = 0 and p = 1.
* **Down pass.** Starting from `cin` at the root, each node's carry in and
  its children's (g, p) give the carry into all four children at once.

All the equations come from one function, `mbm_pkg::lookahead4`. It writes
each carry as a sum of products taken straight from the inputs
(`c2 = g1 | p1 g0 | p1 p0 c0`, and so on). Within a group, no carry waits
for the carry below it. A carry crosses log4(W) levels of look-ahead logic
on the way up and again on the way down. The sum is `p ^ carry` at level 0.
The adder is written as a single `always_comb` with loops. A synthesis tool
flattens it into the AND/OR network described above.

## Departures and design choices

* **No pipelining.** The design is combinational. Pipelined bit-level
  multipliers with a multi-stage structure and a pipelined CLA of
  half-adder, XOR and flip-flop cells are the earlier work that the
  published design is compared with. They are not reproduced here.
* **Reduction tree.** The source says only that the rows are added "until
  two remain". It mentions both CSA trees and 4:2 compressors. This design
  uses 3:2 full-adder rows (a Wallace-style tree).
* **Adder group size.** Four is used here. Six-bit CLA groups appear only in
  the description of the earlier pipelined design, and six does not divide
  128.
* **Sign handling.** Full sign extension of every row, as described under
  step 1.
* **Signed operands.** The reference example is 13 x -6 = -78 at 8, 16, 32
  and 64 bits. Products are two's complement, so at 8 bits the result is
  `1111111110110010`.
* **Not included.** The radix-2 Booth multiplier is the speed baseline that
  the modified Booth design is measured against, and it is not part of this
  design. The quoted delays of 6.62, 16.51, 27.92 and 51.18 ns for 8 to 64
  bits are technology results. RTL simulation cannot reproduce them.

## Verification

Every block has a self-checking testbench in `tb/` (`csa_row` is covered
through `csa_tree`). Each one ends by
printing `TB_RESULT checks=<n> failures=<m>`, and each has a watchdog.

| testbench | what it does |
|-----------|--------------|
| `booth_encoder_tb` | all 8 triplets against the weighted digit value; every digit -2..+2 must occur |
| `booth_pp_gen_tb`  | N = 8 over all 65,536 operand pairs, plus N = 64 with edge and random operands; each row is compared with `d_i * x * 4^i` and the row sum with `x * y` |
| `csa_tree_tb`      | 32-row/128-bit, 4-row/16-bit and 2-row/8-bit trees, with random and all-ones rows |
| `cla_adder_tb`     | 8-bit adder over every input and carry-in; 128-bit adder with carries injected at every bit position, fully propagating operands and random ones |
| `modified_booth_multiplier_tb` | full 64-bit design: the worked example, every pairing of 8 edge values (0, 1, -1, min, max, alternating patterns), 20,000 random and 2,000 small random products |
| `modified_booth_multiplier_sizes_tb` | 8, 16, 32 and 64-bit instances side by side with the worked example and 5,000 random products |

The full-design testbench counts how often each digit value was selected,
once for positive and once for negative multiplicands. It also counts
products of both signs and the corner case -2 x (most negative
multiplicand). A counter that stays at zero is reported as a failure. The
reference is always the simulator's own wide signed multiplication. The
multiplier is combinational, so each product is checked in the cycle its
operands are applied.

## Simulating

Every testbench is self-contained. With Verilator 5:

```sh
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/mbm_pkg.sv tb/modified_booth_multiplier_tb.sv \
    --top-module modified_booth_multiplier_tb -o sim
./obj_dir/sim
```

Replace the testbench name to run another. The package `rtl/mbm_pkg.sv`
must come first. The full-size testbench builds in about ten seconds and
runs in under a second.

## Files

| file | contents |
|------|----------|
| `rtl/mbm_pkg.sv` | `booth_sel_t` digit flags, `lookahead4` carry look-ahead equations |
| `rtl/booth_encoder.sv` | triplet to digit flags |
| `rtl/booth_pp_gen.sv` | shared multiples, one encoder and selector per row, alignment |
| `rtl/csa_row.sv` | W-bit 3:2 compressor row |
| `rtl/csa_tree.sv` | carry-save reduction to two rows |
| `rtl/cla_adder.sv` | hierarchical carry look-ahead adder |
| `rtl/modified_booth_multiplier.sv` | top level |
