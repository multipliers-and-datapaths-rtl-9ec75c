# A 53 x 53-bit Booth multiplier with array-style partial-product reduction

This is the significand multiplier of an IEEE 754 double-precision floating-point unit,
written so that its partial-product reduction network can be swapped. The idea behind it
is that, inside a bus-oriented datapath where every bit slice has the same width and only
about ten wiring tracks are free per slice, the reduction tree with the fewest counter
levels is not necessarily the fastest. Networks built from *linear arrays* of 3-2 counters
need almost no tracks between non-adjacent cells, which lets the counters use faster
differential (dual-rail) circuits. Two such networks are provided:

* the **higher-order array** (default): several linear-array chains that join one another
  once their delays match, here with chains of 6, 6, 8 and 8 rows;
* the **hybrid** network: a type-one tree next to one plain linear array. The tree is
  either a delay-balanced tree of linear chains (a ZM, or balanced-delay, tree) or an
  overturned-stairs (OS) tree.

Both reduce the same 28 rows to a carry-save pair, so the two give bit-identical results;
they differ only in topology, which is what matters for layout and circuit speed.

## Data path

```
 a_sig, b_sig (53 b) --> operand latch --> pp_gen: 27 Booth encoders + 27 Booth muxes
                                             |  28 rows x 106 b
                                             v
                      hoa_tree (6-6-8-8)  or  hybrid_tree (ZM or OS tree + array)
                                             |  sum, carry (106 b each)
                                             v
                                      carry-save latch
                                             |
                                      cpa (106 b) --> sig_round --> result register
```

| Module | Role |
|---|---|
| `mul_pkg` | widths (53, 106, 27 Booth rows, 28 reduction rows), `booth_sel_t`, `reduction_e` |
| `booth_encoder` | one overlapping 3-bit multiplier group to `{one, two, neg}` |
| `booth_mux` | selects 0, X or 2X and inverts it for a negative digit |
| `pp_gen` | all 27 encoder/mux pairs, row alignment, the correction row |
| `csa32` | 3-2 counter, a word-wide row of full adders |
| `csa42` | 4-2 counter made of two 3-2 counters in series |
| `csa53` | 5-3 counter made of two 3-2 counters in series |
| `linear_array` | N rows through N-2 counters in series |
| `hoa_tree` | higher-order array of linear-array chains |
| `os_tree` | overturned-stairs tree: body of 5-3 joins plus a 3-2 root |
| `hybrid_tree` | ZM or OS tree beside a linear array |
| `cpa` | 106-bit carry-propagate adder |
| `sig_round` | normalisation and round to nearest, ties to even |
| `mul_datapath` | the top: registers, and the choice of network |

## Booth rows and the correction row

The multiplier operand `b_sig` gets a zero below its LSB and two zeros above its MSB. It
is then cut into 27 overlapping groups `{y[2i+1], y[2i], y[2i-1]}`. Each group is worth the
digit `d = -2*y[2i+1] + y[2i] + y[2i-1]`, in -2..+2. Because the top group always has a
zero sign bit, the operand is treated as unsigned. Row *i* is `d*X`, weighted by 4^i.

A negative digit inverts the selected `X` or `2X`, giving a one's complement, so the
row still needs +1. Every row is sign-extended over the whole 106-bit word and shifted
left by 2i. The 27 missing +1s all sit at different even bit positions (bit 2i), so they
share one extra row, the **correction row** (`pp[27]`). That makes 28 rows, which is
exactly what the 6-6-8-8 array takes. The product of two 53-bit numbers fits in 106 bits,
so summing the 28 rows modulo 2^106 gives the exact product. The group `111` (-0) is
encoded as a plain zero.

## Reduction networks

Every counter in this design is a full-width word (`W = 106`). The same structure serves
every column of the product. This is the regularity an array design aims for: each
column is reduced by an identical copy of the network built for the tallest column.

**Linear array** (`linear_array`). The first 3-2 counter adds rows 0-2. Each later counter
adds the previous sum and carry to one new row. N rows take N-2 counter delays, and a
counter only ever feeds its neighbour.

**Higher-order array** (`hoa_tree`, parameters `NCH`, `CHAIN`, `N`). The rows are dealt out
in order to chains of `CHAIN[k]` rows, and each chain is a linear array. Chain *k* then
takes the sum and carry of everything above it as two more inputs, through two more 3-2
counters (one `csa42`). That connection needs just two tracks between non-adjacent
counters. Depths, counted in 3-2 counter delays for the default `{6,6,8,8}`:

| stage | own rows | own depth | result ready at |
|---|---|---|---|
| chain 0 | 6 | 4 | 4 |
| chain 1 + join | 6 | 4 | 6 |
| chain 2 + join | 8 | 6 | 8 |
| chain 3 + join | 8 | 6 | 10 |

Chain lengths chosen so that each chain's own depth equals the depth of everything above
it (for example 4-4-6-8 or 3-3-5-7) give a balanced-delay ZM tree of type one. The same
module builds those.

**Hybrid** (`hybrid_tree`, parameters `NZ`, `ZM_CHAIN`, `LIN_N`). The first `N - LIN_N` = 18
rows go to a balanced 3-3-5-7 tree (depth 7). The last `LIN_N` = 10 rows go to one linear
array (depth 8). A 4-2 counter joins the two, for a depth of 10. The linear array is the
critical path. Moving rows from the tree into the array trades counter levels against the
tracks the tree needs. In a folded physical layout the split between tree and array is
made column by column, at the fold of the product parallelogram. Here it is made by row,
the same for every column: the arithmetic is the same, the floor plan is not.

**Overturned-stairs tree** (`os_tree`, parameters `K`, `N`). The tree has a body and a
root. The body of height *k* joins the body of height *k-1* with a linear array of *k*
rows (height *k-2*) through a 5-3 counter (`csa53`). The 5-3 counter is two 3-2 counters
in series, so its three outputs are ready after *k-1*, *k* and *k* delays. The first
counter takes the array's two outputs and the body's early output. The second takes the
body's two late outputs. No input has to wait for another. The base body has height 1:
one 3-2 counter plus one untouched row. The root is a final 3-2 counter. A body of
height *K* takes `3 + K(K+1)/2` rows (4, 6, 9, 13, 18, 24, ...) and the tree has *K+1*
levels. In the hybrid (`TREE = TREE_OS`), `K = 5` reduces the 18 tree rows in 6 levels,
one fewer than the ZM tree. The price is one more track between non-adjacent counters.

Choose the network with `mul_datapath #(.REDUCTION(mul_pkg::RED_HYBRID))`, and the tree
in the hybrid with `.HYBRID_TREE(mul_pkg::TREE_OS)`. The defaults are `RED_HOA` and
`TREE_ZM`.

## Rounding

`sig_round` takes the 106-bit product of two normalised significands, which lies in
[1, 4). If bit 105 is set, the result is bits 105:53 and `exp_inc` is 1. Otherwise it is
bits 104:52. The next lower bit is the guard bit, and the OR of all the bits below it is
sticky. The result is rounded up when the guard bit is set and either sticky or the
result's LSB is set (ties to even). If rounding carries out of an all-ones result, the
result becomes 1.0 and `exp_inc` grows by one more. `inexact` is guard OR sticky. Only
this one rounding mode is provided. Sign, exponent arithmetic, special values and
subnormals belong to the surrounding floating-point datapath and are not part of this RTL.

## Interface and timing (`mul_datapath`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active-low reset of all registers |
| `in_valid` | in | 1 | an operation is presented this cycle |
| `a_sig`, `b_sig` | in | 53 | significands with hidden bit; `b_sig` is Booth encoded |
| `out_valid` | out | 1 | results valid |
| `product` | out | 106 | exact product |
| `sig` | out | 53 | normalised, rounded significand |
| `exp_inc` | out | 2 | exponent adjustment (0, 1 or 2) |
| `inexact` | out | 1 | rounding discarded a nonzero bit |

There are three register stages: the operand latch, the carry-save latch in front of the
CPA, and the result register. An operation presented in cycle *n* appears in cycle *n+3*.
A new operation can be accepted every cycle, and there is no back-pressure. The exact
product is correct for any operands. `sig`, `exp_inc` and `inexact` are only meaningful
when both operands have their top bit set.

## What is not modelled

* Physical properties: bit pitch, wiring tracks, folding of the partial-product
  parallelogram, interleaved versus separated placement of the two folded halves, and the
  circuit family of the counters (pass-transistor or domino). None of these change the
  logic function, and they are the subject of the comparison this design comes from.
* The reduction networks this design is an alternative to: double linear arrays, 4-2
  counter trees, higher-order (type two and up) ZM and OS trees, and a stand-alone OS tree
  over all 28 rows. No pipelined or iterative form is built: both networks could take a
  register after any counter, but here they are single-cycle, which is what they are meant
  for (low latency with few wiring tracks).
* The hybrid network's column-by-column split (see above).
* Rounding modes other than round to nearest, ties to even.

## Verification

Each module has a self-checking testbench, `tb/tb_<module>.sv`. The reference values come
from the testbench's own arithmetic: `a*b` on 106-bit vectors, and rounding by integer
division and remainder (`tb/tb_ref_pkg.sv`). The testbenches cover the following:

* `tb_booth_encoder` checks all 8 groups. `tb_booth_mux` checks every digit with random
  and corner multiplicands.
* `tb_pp_gen` checks that the 28 rows add up to `x*y`, plus row alignment and correction
  bits, over 2000 operand pairs.
* `tb_csa32`, `tb_csa42`, `tb_csa53`, `tb_linear_array` (N = 1, 2, 3, 8, 13),
  `tb_hoa_tree` (6-6-8-8 and 4-4-6-8), `tb_os_tree` (body heights 1 to 6) and
  `tb_hybrid_tree` (with both tree kinds) check that the carry-save totals equal the sum of
  the inputs. The hybrid and OS tests also drive one-hot rows, so every row must
  reach the result.
* `tb_sig_round` checks both normalisations, ties to even and to odd, carry-out to 2.0,
  exact results and random products.
* `tb_mul_datapath` streams 3000 operations into all three networks side by side (the
  array, the hybrid with a ZM tree and the hybrid with an OS tree), with random
  idle cycles. It checks every result and the 3-cycle latency. It also counts negative and
  ±2 Booth digits, both normalisations, round-ups, carry-out to 2.0, ties, exact results,
  back-to-back issue and idle cycles, and fails if any of them never occurs.
* `tb_mul_full` runs 500 complete multiplications on the default configuration, with no
  parameters overridden.

All testbenches pass. Each testbench was also run against a copy of its module with one
deliberate bug and failed.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mul_pkg.sv tb/tb_ref_pkg.sv tb/tb_mul_datapath.sv --top-module tb_mul_datapath
./obj_dir/Vtb_mul_datapath
```

Use the same command for any other testbench. Each one prints
`TB_RESULT checks=N failures=M`. The simulator has no X state, so every register is
reset.

## Changing the design

* Other operand widths: change `SIG_W` in `mul_pkg`. `PROD_W`, `BOOTH_ROWS` and `PP_ROWS`
  follow from it. The chain lengths of `hoa_tree` (`CHAIN`) and `hybrid_tree`
  (`ZM_CHAIN` plus `LIN_N`) must add up to `PP_ROWS`, and an elaboration error reports a
  mismatch in `hoa_tree`. `sig_round` and the testbench reference model assume the
  double-precision sizes.
* Other array shapes: give `hoa_tree` any list of chain lengths, for example
  `.NCH(3), .CHAIN('{8, 10, 10})`.
