# Partitioned 32x32 array multiplier for low-voltage operation

Dynamic power falls with the square of the supply voltage, but a lower
supply makes every gate slower. A circuit can only run at a reduced voltage
without losing its clock rate if its critical path is first made shorter.
This design does that for a 32x32 unsigned array multiplier. It adds
parallelism inside the multiplier, at a small cost in area.

A plain array multiplier's longest carry path runs along a row of full adders
and down the side of the array, so it grows with the operand width. Here the
operands are split in halves, and four half-size multipliers form the four
cross products side by side. A short adder network then adds them with their
shifts. The split is applied again inside each half-size multiplier:

```
32x32  =  4 x (16x16)  + adder network (16-bit halves)
16x16  =  4 x (8x8)    + adder network (8-bit halves)
8x8    =  4 x (4x4)    + adder network (4-bit halves)
4x4    =  ripple-carry array multiplier (the leaf)
```

At the default size that is 64 leaf arrays and 21 adder networks (16 + 4 + 1).
Cutting the array in both directions is the same as combining two cuts of one
array: a horizontal cut between rows (multiplicand bits) and a vertical cut
between columns (multiplier bits).

## The arithmetic

Split both operands into H-bit halves, a = {a_hi, a_lo} and b = {b_hi, b_lo}:

```
a*b = p_ll + (p_hl + p_lh) << H + p_hh << 2H
      p_ll = a_lo*b_lo   p_hl = a_hi*b_lo   p_lh = a_lo*b_hi   p_hh = a_hi*b_hi
```

Each product is 2H bits wide. The sum needs no real multi-operand adder,
because the products overlap only in H-bit slices. The network adds them as
two "pairs" first, and then adds the two pairs together.

## The adder network (`pp_combiner`)

This is the part that takes the most care. Its adder types and its carry
timing are what let it add only about one adder's delay on top of the
sub-multipliers. For the top level (H = 16):

```
 right pair, 48 bits: r = p_ll + p_hl << 16
   r[15:0]  = p_ll[15:0]                                   (wires)
   r[31:16] = p_ll[31:16] + p_hl[15:0]       16-bit ripple adder -> carry c_r
   r[47:32] = c_r ? p_hl[31:16] + 1 : p_hl[31:16]
              (16-bit half-adder incrementer, precomputed; a mux picks on c_r)

 left pair, 32 bits plus a carry: l = p_lh + p_hh << 16
   l[15:0]  = p_lh[15:0]                                   (wires)
   l[31:16] = p_lh[31:16] + p_hh[15:0]       16-bit ripple adder -> carry c_l
   (the left pair's top 16 bits, p_hh[31:16] + c_l, are folded into the last step)

 final sum, 64 bits: p = r + l << 16
   p[15:0]  = r[15:0]                                       (wires)
   p[31:16] = l[15:0]  + r[31:16]            16-bit ripple adder -> carry c0
   p[47:32] = l[31:16] + r[47:32] + c0       16-bit CLA          -> carry c_cla
   {C, p[48]} = p_hh[16] + c_l + c_cla       one full adder
   p[63:49] = C ? p_hh[31:17] + 1 : p_hh[31:17]
              (15-bit half-adder incrementer, precomputed; a mux picks on C)
```

Why the adders are mixed like this:

- **Ripple adders where bits arrive in order.** The sub-multipliers are
  arrays themselves, so their low product bits settle first and the high
  bits last. A ripple adder that takes those bits consumes them as they
  arrive. Its carry chain runs about as fast as the operands settle, so it
  adds roughly one full-adder delay after the last sub-multiplier bit.
  Ripple-carry is also the lowest-power adder, so it is used wherever it is
  not on the critical path.
- **One CLA where both operands arrive together and late.** The upper half
  of the final sum adds the left pair's ripple sum to the right pair's
  muxed top bits. Both operands arrive at about the same time, at the end.
  A carry look-ahead adder is used only here. The lower half of that addition
  is a ripple adder whose inputs arrive earlier, so its carry c0 is ready
  by the time the CLA needs it. The final addition therefore costs only
  about one CLA delay.
- **Carry-select increments instead of a third adder.** The top bits of a
  pair only ever gain 0 or 1 from a carry. An incrementer (a chain of half
  adders whose first carry-in is 1) computes the +1 version in advance, in
  parallel. The late carry then only drives a multiplexer select.
- **Two late carries into one full adder.** The product's top 16 bits must
  absorb two carries: c_l from the left pair and c_cla from the final CLA.
  A single full adder adds both to bit 16 of p_hh. Its sum is a result bit,
  and its carry selects the incremented top 15 bits. Since a*b < 2^64, that
  last increment never overflows, so both incrementer carry-outs are left
  unconnected.

The two cross products p_hl and p_lh have the same size, and either can sit
in either pair. Here p_hl goes in the right pair. With `USE_CLA = 0` the
CLA becomes a ripple adder. That is the cheaper variant, with a longer
path. The same network, scaled to H = 8 and H = 4, is used at the lower
levels.

## The leaf: ripple-carry array (`array_multiplier`)

This is a generic N x M array of full adders, one row per bit of `a`. Cell
(i, j) adds `a[i] & b[j]` to the sum coming down from the row above, plus
the carry from its right neighbour. Carries ripple right to left along a
row. The carry out of a row's leftmost cell enters the next row's leftmost
cell as its sum input. Each row's rightmost sum is one product bit. The last
row gives the top bits, and its carry out gives the MSB. The first row's sum
and carry inputs are 0. The module is used with N = M = 4 as the leaf. At
N = M = 8/16/32 it is the conventional multiplier that the partitioned one
replaces.

## The carry look-ahead adder (`cla_adder`)

The CLA is a two-level look-ahead adder over 4-bit groups. It forms bit
generate/propagate signals, then group generate/propagate signals. It
computes every group carry directly from the group signals and `cin`, as a
sum of products. Inside each group, every bit carry is computed directly from
that group's carry-in. The width must be a multiple of 4: 16, 8 and 4 in the
default tree.

## Interface and timing of the top (`par_mult32_top`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst_n`     | in  | 1     | asynchronous reset, active low; clears all registers |
| `in_valid`  | in  | 1     | `a`, `b` hold operands this cycle |
| `a`, `b`    | in  | 32    | unsigned operands |
| `out_valid` | out | 1     | `p` holds a new product |
| `p`         | out | 64    | unsigned product, registered |

The combinational multiplier sits between an input register and an output
register, so its delay is a register-to-register path. Operands sampled with
`in_valid` at clock edge t appear on `p`, with `out_valid`, after edge t+1.
The latency is two cycles, and the unit takes one product per cycle. `p`
holds its value while no new product arrives.

Parameters (top and `part_multiplier`): `W` = 32 operand width; `LEAF_W` =
4 leaf array size; `USE_CLA` = 1 CLA in the final adder. `W` must be
`LEAF_W` times a power of two. A smaller `LEAF_W` (2) adds one more level of
partitioning. Adder networks whose halves are not a multiple of 4 bits then
use a ripple adder in place of the CLA. A larger `LEAF_W` (8, 16) uses fewer
levels.

## How much shorter the path is

The longest path below is counted in 2-input gates (AND/OR/XOR/MUX). It was
measured on the RTL as written: flattened and mapped to generic gates by
yosys, with no logic optimisation, using `ltp -noff`. Gate count is the
number of those gates. These are structural figures, not timing
measurements.

| size  | array: levels / gates | partitioned, CLA: levels / gates | partitioned, ripple only: levels / gates |
|-------|-----------------------|----------------------------------|------------------------------------------|
| 8x8   | 52 / 416              | 35 / 454                         | 42 / 441                                 |
| 16x16 | 116 / 1856            | 63 / 2102                        | 81 / 2021                                |
| 32x32 | 244 / 7808            | 115 / 9007                       | 156 / 8613                               |

At 32x32 the partitioned multiplier has 53% fewer gate levels, for 15% more
gates. The original analysis expected about 68% less delay for about 17%
more area. Its logic-synthesis comparison reported 35.27 against 25.13 delay
units at 32x32, 16.7 against 12.73 at 16x16, and 7.42 against 6.54 at 8x8.
As there, the gain grows with the operand width.

Both designs compute the same function. The power saving comes from lowering
the supply until the shorter path is as slow as the original one. That step
is outside the RTL: no voltage value is given, and there is no regulator or
level shifter to model.

## What is not here

- **Supply scaling.** The reduced supply is an operating point. There is no
  logic for it.
- **The multi-core alternative.** The other way of adding parallelism is N
  copies of the whole multiplier, fed in turn by a multiphase clock and
  merged by an N-to-1 multiplexer. It was considered and rejected for its
  area, so it is not built.
- **One-direction partitions.** A horizontal-only or vertical-only cut of the
  array is not offered as a separate configuration. The tree always cuts
  both ways.
- **Power and delay in simulation.** The testbenches check function and
  cycle timing only.

## Choices made in this RTL

- Operands are unsigned.
- The I/O registers, the valid bits and the asynchronous reset of the top
  are additions, made so the multiplier is a clocked block.
- The CLA's 4-bit grouping is a choice of this design, as is the gate form of
  the full and half adders (XOR sum, majority carry).
- The network drawn for the 32x32 level is reused at every level of the
  tree.
- The tree is written as explicit levels (`g_lvl[k].g_node[n]`), not as a
  recursive module. Leaf n takes, at split level m, the half of `a` given by
  bit 0 of base-4 digit m of n, and the half of `b` given by bit 1.
- `USE_CLA = 1` is the architecture as designed. An early implementation of
  it replaced the CLA with a ripple adder, and `USE_CLA = 0` reproduces that
  version.

## Files

| file | contents |
|------|----------|
| `rtl/par_mult32_top.sv` | registered 32x32 multiplier, the top |
| `rtl/part_multiplier.sv` | the partitioned multiplier tree |
| `rtl/pp_combiner.sv` | adder network for four partial products |
| `rtl/array_multiplier.sv` | N x M ripple-carry array multiplier |
| `rtl/cla_adder.sv` | carry look-ahead adder |
| `rtl/rc_adder.sv` | ripple-carry adder |
| `rtl/ha_incrementer.sv` | half-adder chain adding 1 |
| `rtl/mux2.sv` | word-wide 2-to-1 multiplexer |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | one-bit cells |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_size_sweep.sv` | 8x8, 16x16 and 32x32, partitioned and plain array, side by side |

The testbenches compare against integer multiplication and addition. They
run exhaustive sweeps where the width allows: all 4x4, 8x8 and 5x3 products,
all 8-bit look-ahead additions and all 16-bit increments. Elsewhere they use
corner cases and random or LFSR operands. The top's testbench uses the
default parameters and streams 20,000 LFSR operand pairs with random gaps
and a reset in mid-stream. It checks every product and its two-cycle
latency. It also counts how often each carry path of the top-level adder
network fires, and fails if one never does. Each testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl \
    tb/tb_par_mult32_top.sv --top-module tb_par_mult32_top -o sim
./obj_dir/sim
```

Any other testbench runs the same way. `-y rtl` lets Verilator find each
module in `rtl/<module>.sv`. The full-size end-to-end test runs in a few
seconds.
