# Sparse tree adder

A 32-bit binary adder that computes carries with a parallel-prefix tree, like
a Kogge-Stone adder, except that the tree is *sparse*: it computes only one
carry per 4-bit block instead of one per bit. Each 4-bit block then forms its
own sum with a small carry skip adder, started by the carry the tree delivered
for the block below. Every block gets its carry from the tree, not from its
neighbour. So all blocks work in parallel, and the tree is much smaller and
has far less wiring than a full prefix tree.

The design is purely combinational: no clock, no reset, no carry in.

```
 a[31:0] b[31:0]
     |     |
 +---v-----v---+   g = a & b, p = a ^ b per bit
 | gpr_block   |   (initialization stage)
 +------+------+
        | gp[31:0]
 +------v--------------+   36 carry-merge cells, 5 rows
 | sparse_prefix_tree  |   one carry per 4-bit block
 +------+--------------+   (prefix tree stage)
        | grp_carry[7:0], low_carry[2:0]
 +------v--------------+   7 x 4-bit carry skip adders
 | summation_stage     |   + lowest block from tree carries
 +------+--------------+   (summation stage)
        |
   sum[31:0]     cout = grp_carry[7]
```

## The carry merge operator

Every node of the tree is a `carry_merge` cell. It joins the generate/propagate
pair of a span of bits (`hi`) with the pair of the span right below it (`lo`):

    G = hi.g | (hi.p & lo.g)
    P = hi.p & lo.p

When the joined span reaches down to bit 0, `G` is the carry out of its top
bit. The pair travels through the design as the packed struct
`stadd_pkg::gp_t` (`g`, `p`).

## The sparse tree

This is the part that takes some care to follow. Write `[h:l]` for the pair
of bits `h` down to `l`. For 32 bits the rows are:

| row | cells | at bits | produces |
|-----|-------|---------|----------|
| 1 | 16 | every odd bit `i` | `[i:i-1]` |
| 2 | 8 | 3, 7, ..., 31 | the block pair `[4j+3:4j]` for block `j` = 0..7 |
| 3 | 4 | 7, 15, 23, 31 | `[7:0]`, `[15:8]`, `[23:16]`, `[31:24]` |
| 4 | 4 | 11, 15, 27, 31 | `[11:0]`, `[15:0]`, `[27:16]`, `[31:16]` |
| 5 | 4 | 19, 23, 27, 31 | `[19:0]`, `[23:0]`, `[27:0]`, `[31:0]` |

Rows 1 and 2 reduce each 4-bit block to a single pair. Rows 3 to 5 are a
divide-and-conquer (Sklansky) prefix over the eight block pairs. In row `l`
(counting from 0), block `j` is merged only when bit `l` of `j` is set, and it
is merged with block `((j >> l) << l) - 1`. After the last row, block `j`
holds `[4j+3:0]`. Its generate, `grp_carry[j]`, is the carry into block
`j+1`. `grp_carry[7]` is the adder's carry out. A block that a row does not
merge passes its pair on unchanged; block 0, for instance, is complete after
row 2.

The longest carry path is therefore five merge cells deep. A full Kogge-Stone
tree for 32 bits is also five rows deep, but it has about 130 cells. This
tree has 36, plus one cell for the lowest block (below).

For `WIDTH` other than 32 the same rule is generated, with
`$clog2(WIDTH/4)` block rows. Any multiple of 4 from 8 upwards is accepted; a
number of blocks that is not a power of two (for example 24 bits) works too.

## Summation blocks

Blocks 1 to 7 each have a `carry_skip_adder`. It contains three parts:

* a 4-bit ripple chain on the block's `g`/`p`, starting from the group carry:
  `sum[k] = p[k] ^ c(k)`, `c(k+1) = g[k] | p[k] & c(k)`;
* an AND of the four propagates;
* a skip multiplexer that sends the carry in straight to the block's carry
  out when all four bits propagate.

Because the tree already provides the next block's carry, the skip output is
not needed for the sum. The summation stage keeps it anyway and has an
immediate assertion, `a_skip_matches_tree`. The assertion checks that every
block's skip output equals the tree's carry for that block, so any mismatch
between the two carry paths is reported in simulation.

Block 0 (bits 3..0) has no adder. Its carry in is 0, so its sums are `p` XOR
the carries into bits 1, 2 and 3. The tree supplies them as `low_carry`: `g[0]`,
the row-1 pair `[1:0]`, and one extra merge cell for `[2:0]`.

The delay from operands to sum is one GP level, up to five merge cells, and at
most four ripple steps inside the top block.

## Interface

`sparse_tree_adder #(parameter int unsigned WIDTH = 32)`

| port | dir | width | |
|------|-----|-------|--|
| `a`, `b` | in | `WIDTH` | operands |
| `sum` | out | `WIDTH` | `(a + b) mod 2^WIDTH` |
| `cout` | out | 1 | carry out of the top bit |

The outputs are valid one combinational delay after the inputs change. To use
the adder in a pipeline, register its inputs and outputs outside it.

## Choices and departures

* **No carry in.** The reference structure has only A, B, SUM and COUT. A
  published pin count of 105 bonded I/Os for this 32-bit adder does not match
  those 97 signals; the structure was followed. A carry in could be added as
  the `g` of a virtual bit -1. That would need a summation adder for block 0
  too.
* **Carry skip, not carry select.** Sparse tree adders often use carry select
  blocks, and the blocks are labelled "CSA" in the reference drawing. This
  design uses carry skip blocks (ripple chain, AND, multiplexer), as described
  for this adder.
* **Lowest block.** The reference drawing shows no summation block for bits
  3..0 and takes their sums from the GP row and the first tree cells. The carry
  into bit 3 is not drawn, so the extra merge cell for `[2:0]` is this design's
  own choice.
* **Ripple on g/p.** The carry skip adders reuse the `g`/`p` of the first stage
  rather than the raw operands. The function is the same.
* **Sizes.** A Spartan-3E implementation of this 32-bit adder was reported at
  70 slices, 117 four-input LUTs and 10.018 ns, against 90 slices, 170 LUTs and
  18.53 ns for a Kogge-Stone adder. These numbers are not reproduced here.
  Generic gate-level synthesis of this RTL with yosys gives 238 two-input
  gates (117 AND, 58 OR, 63 XOR).

## Files

| file | contents |
|------|----------|
| `rtl/stadd_pkg.sv` | `gp_t` pair type, `GROUP = 4` |
| `rtl/gpr_block.sv` | initialization stage |
| `rtl/carry_merge.sv` | merge cell |
| `rtl/sparse_prefix_tree.sv` | the sparse tree |
| `rtl/carry_skip_adder.sv` | 4-bit carry skip adder |
| `rtl/summation_stage.sv` | summation blocks and the skip/tree assertion |
| `rtl/sparse_tree_adder.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_sparse_tree_adder_widths.sv` | top at 8 bits (exhaustive), 16, 24 and 64 bits |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
A watchdog counts a failure if the testbench hangs. For example:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/stadd_pkg.sv tb/tb_sparse_tree_adder.sv --top-module tb_sparse_tree_adder
./obj_dir/Vtb_sparse_tree_adder
```

`tb_sparse_tree_adder` runs the 32-bit adder with its default parameters. It
applies directed corner cases, every 4-bit pattern in each block against
random surroundings, and 20,000 random pairs, and compares `{cout, sum}` with
integer addition. It also counts, from the operands, how often each carry
situation occurred and fails if one never did:

* a block skipped (all bits propagate, carry in 1);
* a block killed an incoming carry;
* a block generated a carry by itself;
* a carry rippled inside the lowest block;
* a carry ran from bit 0 to the carry out;
* the carry out was set.

The module testbenches check:

* `carry_merge` over all 16 input pairs;
* `carry_skip_adder` over all 512 operand and carry-in combinations;
* the tree's carries against integer carries at 32, 24 and 8 bits;
* the summation stage with carries supplied by the testbench, so it is tested
  on its own.

The widths testbench covers other word sizes: all 65,536 pairs at 8 bits, and
directed and random pairs at 16, 24 and 64 bits.
