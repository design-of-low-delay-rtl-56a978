# 32-bit Brent-Kung parallel-prefix adder

A ripple-carry adder makes every bit wait for the carry of the bit below it,
so a 32-bit add takes 32 carry steps in series. A parallel-prefix adder
instead computes all carries at once with a tree of small "merge" cells. The
Brent-Kung tree used here needs only `2*log2(N) - 1` cell levels (9 for 32
bits) while keeping the number of cells close to `2N` (57 for 32 bits), which
is the trade-off that makes it attractive against both the ripple-carry adder
and the wider, faster but much larger Kogge-Stone tree.

The RTL is purely combinational: `sum = a + b + cin` with no clock, no
registers and no latency in cycles. The default width is 32 bits; the same
module built with `WIDTH = 16` gives the 16-bit version.

## The three stages

```
 a[31:0] b[31:0]            cin
    |       |                |
 +--v-------v--+             |
 | pre-process |  P = a ^ b, G = a & b        (bk_preprocess)
 +--+-------+--+             |
    P       G                |
    |    +--v----------------v--+
    |    | carry generation     |  cin cell at bit 0, then the
    |    |  Brent-Kung tree     |  prefix tree of black / gray cells
    |    +----------+-----------+             (bk_carry_tree)
    |               c[31:0]    (c[i] = carry out of bit i)
 +--v---------------v--+
 | post-process        |  sum[i] = P[i] ^ c[i-1], sum[0] = P[0] ^ cin
 +------+--------------+  cout   = c[31]       (bk_postprocess)
        v
    sum[31:0], cout
```

* **Pre-processing** turns each bit pair into a *propagate* `P = a ^ b` (a
  carry entering this bit leaves it) and a *generate* `G = a & b` (this bit
  makes a carry by itself).
* **Carry generation** computes, for every bit `i`, whether a carry leaves
  bit `i`, given everything below it and the carry-in.
* **Post-processing** forms each sum bit from its propagate and the carry
  entering it.

## The cells

All cells work on (generate, propagate) pairs that describe a *group* of
adjacent bits: the group generates a carry, or it passes one through.

| cell | module | equations | use |
|------|--------|-----------|-----|
| black | `bk_black_cell` | `G = Gh \| (Ph & Gl)`, `P = Ph & Pl` | merge two groups whose result does not yet reach bit 0; its propagate is needed later |
| gray | `bk_gray_cell` | `G = Gh \| (Ph & Gl)` | merge into a group that reaches bit 0: the result is a finished carry, no propagate needed |
| carry-in (M) | `bk_cin_cell` | `c0 = G0 \| (P0 & cin)` | folds the carry-in into bit 0 so the tree above never sees it |

Because the carry-in is absorbed at bit 0, every group that reaches bit 0
already includes it, and its generate *is* the carry out of its top bit.

## The Brent-Kung tree (the part worth reading closely)

`bk_carry_tree` builds the tree from generate loops; each tree level is one
generate block (`stg[s]`) holding that level's `gs`/`ps` vectors, and bits
with no cell at a level simply pass through.

**Up-sweep**, levels `l = 0 .. L-1` with `L = clog2(WIDTH)` and distance
`d = 2**l`: every bit `i` with `(i+1)` a multiple of `2d` merges its group
with the group ending at bit `i-d`. After this sweep, bit `2**k - 1` holds the
finished carry for every `k`, and the other odd bits hold partial groups.
A merge whose low half starts at bit 0 (`i+1 == 2d`) gives a finished carry
and uses a gray cell; all other up-sweep merges are black cells.

**Down-sweep**, levels `l = L-2 .. 0`: every bit `i` with `(i+1)` an odd
multiple of `d` (other than `d` itself) merges its partial group with the
finished carry at bit `i-d` through a gray cell.

For 32 bits:

| sweep | level | distance | bits with a cell | cells |
|-------|-------|----------|------------------|-------|
| up | 0 | 1 | 1, 3, 5, ..., 31 | 16 (bit 1 gray) |
| up | 1 | 2 | 3, 7, ..., 31 | 8 (bit 3 gray) |
| up | 2 | 4 | 7, 15, 23, 31 | 4 (bit 7 gray) |
| up | 3 | 8 | 15, 31 | 2 (bit 15 gray) |
| up | 4 | 16 | 31 | 1 (gray) |
| down | 3 | 8 | 23 | 1 |
| down | 2 | 4 | 11, 19, 27 | 3 |
| down | 1 | 2 | 5, 9, ..., 29 | 7 |
| down | 0 | 1 | 2, 4, ..., 30 | 15 |

That is 26 black and 31 gray cells, plus the carry-in cell, in 9 cell levels
(bit 0's carry needs only the carry-in cell). The 16-bit tree has 11 black
and 15 gray cells in 7 levels. Any `WIDTH >= 2` is legal: a node's inputs
only come from lower bits, so a width that is not a power of two is simply
the power-of-two tree with its upper bits left out.

Delay from any input to any output: one gate (pre-processing), at most
`1 + 2*L - 1` AND-OR levels (carry-in cell plus tree) and one XOR.

## Files

| file | contents |
|------|----------|
| `rtl/brent_kung_adder.sv` | top: the three stages wired together, parameter `WIDTH` (default 32) |
| `rtl/bk_preprocess.sv` | propagate / generate per bit |
| `rtl/bk_carry_tree.sv` | carry-in cell and Brent-Kung tree |
| `rtl/bk_black_cell.sv`, `rtl/bk_gray_cell.sv`, `rtl/bk_cin_cell.sv` | the cells |
| `rtl/bk_postprocess.sv` | sum and carry-out |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_brent_kung_adder16` for the 16-bit build |

Ports of the top:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | WIDTH | operands |
| `cin` | in | 1 | carry-in |
| `sum` | out | WIDTH | `a + b + cin` modulo `2**WIDTH` |
| `cout` | out | 1 | carry out of the top bit |

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl tb/tb_brent_kung_adder.sv \
          --top-module tb_brent_kung_adder -Mdir obj_top -o sim
./obj_top/sim
```

Replace the testbench name for any other one. All run in well under a
second.

What the testbenches compare against is computed independently of the RTL:

* the cells are tested exhaustively against integer arithmetic;
* `tb_bk_carry_tree` checks the 32-bit and a 16-bit tree against a bit-serial
  ripple of `c[i] = g[i] | p[i] & c[i-1]`, on operand-derived and on fully
  random generate/propagate vectors;
* `tb_brent_kung_adder` runs the default 32-bit adder on directed and 5000
  random operand sets against 33-bit integer addition, and counts how often
  the carry-in changed the result, a carry-out occurred, a carry ran through
  all 32 bits, a carry chain crossed more than 16 bits, and no carry occurred
  at all; each must happen at least once;
* `tb_brent_kung_adder16` does the same for `WIDTH = 16`.

## Where this design makes its own choices

* **Tree wiring.** The reference organisation draws the tree in operand
  slices (bits 0, 7:1, 15:8, 23:16, 31:24 for 32 bits; 0, 3:1, 7:4, 11:8,
  15:12 for 16 bits) and produces its carries slice by slice. Its exact
  cell-by-cell wiring is not reproduced: the tree here is the textbook
  Brent-Kung construction, which produces the same carries with the standard
  cell count and depth.
* **Carry-in placement.** The carry-in enters a dedicated cell beside bit 0 in
  the carry generation stage, rather than the pre-processing stage.
* **Carry-out.** `cout` is an addition so adders can be chained; it is simply
  `c[WIDTH-1]` wired through.
* **No timing model.** The design was characterised for delay on an FPGA
  against a carry-select adder at 16 and 32 bits. Nothing here reproduces
  those figures: the RTL is functionally checked
  only. The ripple-carry and carry-select adders used as comparison points
  are not included.

Lint note: Verilator reports the propagate vector of the last tree level as
unused; it is kept so that every level has the same shape.
