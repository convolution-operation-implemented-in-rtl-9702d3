# Constant-coefficient convolution for FPGA pixel streams

This design computes an N-tap convolution (FIR filter) on a stream of pixels,
one result per clock:

    y(i) = sum_{k=0}^{N-1} h(k) * x(i-k)

The coefficients h(k) are fixed when the hardware is built. That allows three
multiplier-free ways to form the products:

- **MM, multiplierless:** shifts and additions taken from the coefficients' digits.
- **LM, look-up-table multiplication:** small tables indexed by slices of the sample.
- **DA, distributed arithmetic:** tables indexed by one bit of several samples at a time.

All three turn the whole convolution into one large multi-operand addition.
On an FPGA the best way to build that addition is a tree of plain ripple-carry
adders, because the dedicated carry chain is fast and costs no logic cells.
Carry-save arithmetic, the usual ASIC choice, does not pay off there. What is
left to decide is:

- how the operands are paired;
- how wide each adder must be;
- where the pipeline registers go.

The shared `adder_tree` block makes those decisions, so it is the core of the design.

The top level, `conv_top`, feeds one sample history to all three convolvers side
by side. Their results are identical by construction. What differs is hardware
cost and latency, so the top serves to compare the three schemes or to pick one.

## Block overview

| file | role |
|---|---|
| `rtl/conv_pkg.sv` | default configuration, CSD recoding, result width |
| `rtl/tap_delay_line.sv` | shift register holding x(i) … x(i-N+1) |
| `rtl/adder_tree.sv` | pipelined, range-sized adder/subtractor tree |
| `rtl/mm_convolver.sv` | MM: CSD shift-and-add convolution |
| `rtl/lm_convolver.sv` + `rtl/lm_lut.sv` | LM: sliced table multipliers |
| `rtl/da_convolver.sv` + `rtl/da_lut.sv` | DA: bit-plane tables |
| `rtl/conv_top.sv` | delay line plus the three convolvers |

## The adder tree

`adder_tree` adds `N_IN` signed operands. Operands flagged in the `SUB` mask are
subtracted instead.

**Pairing.** In each layer, node 2j and node 2j+1 of the layer below feed one
two-input adder. An odd node at the end of a layer moves up unchanged. For
example, the operands a..e become ((a+b)+(c+d))+e, which takes ceil(log2 n)
layers. The operand order given by the caller is therefore the pairing order.
The order changes the cost of the tree, because operands with similar ranges
and shifts make narrower adders when paired. The convolvers place their
operands in a fixed, simple order (see below). A better order can be found
offline, for example by exhaustive search for up to about 8 operands or by
simulated annealing for more, and applied by permuting the operands. The
hardware does not change.

**Subtraction without negators.** Each node carries a sign that is worked out
at elaboration:

- Two positive children are added, giving a positive node.
- Two negative children are also added, giving a negative node.
- A mixed pair becomes a subtractor: the positive child minus the negative one.

So the hardware never negates an operand on its own. The root is negative only
if every operand is subtracted. In that single case the output is negated once.

**Widths from ranges, not from port widths.** For each operand, the caller gives:

- a value range, `IN_LO`/`IN_HI`, as 64-bit signed fields;
- a count of low bits known to be zero, `IN_SH`, as 8-bit fields. An operand
  `x << p` has p such bits.

From these, the block works out at elaboration the exact range of every node.
Each adder is made just wide enough for that range, in two's complement. Low
bits that are zero in one operand do not enter a carry chain. In an addition,
the other operand's bits pass straight through. In a subtraction this happens
only when the subtrahend has the zero bits. Only the remaining upper bits form
the ripple-carry adder.

The resulting number of carry-chain bits, roughly the full and half adders of
the tree, is available as the localparam `ADDER_BITS`. With no ranges given,
every operand is assumed to span the full `W`-bit signed range.

**Pipelining.** Registers go between adders, never inside a carry chain. A
register stage follows every `K`-th adder layer, and the last layer is always
registered. The latency is therefore ceil(ceil(log2 N_IN)/K) cycles, or 1
cycle for a single operand. A new operand set is accepted every cycle. There is
no stall. `out_valid` is `in_valid` delayed by the same amount. Only the valid
bits are reset.

`K = 1` (a register after every adder layer) is the default. It is the
shortest-path setting for an FPGA. A larger `K` trades clock rate for fewer
registers. Two things are not built:

- splitting a single long adder with registers every M carry cells, the
  ASIC-style approach;
- a hybrid of the two.

**Output.** `dout` is `W` bits wide, sign-extended or truncated from the root.
It is exact whenever the true sum fits in `W` bits. The convolvers choose
`W = X_W + H_W + ceil(log2 N)`, which always fits.

## Forming the operands

Coefficients are passed as one packed vector `COEFFS`. Coefficient k, in two's
complement, sits in bits `[k*H_W +: H_W]`. Samples are unsigned `X_W`-bit pixels.
All tables, digit patterns, ranges and shifts are computed from `COEFFS` during
elaboration. No table file is read.

**MM (`mm_convolver`).** Each coefficient is recoded into canonic signed digits
(CSD). CSD uses the digits 0, +1 and −1, with no two neighbouring digits
non-zero, so it has the fewest non-zero digits of any signed binary form. For
example, 14 becomes 16 − 2. Each non-zero digit d at position p of h(k) becomes
one operand `x(i-k) << p`, and it is subtracted when d = −1. Operands are placed
tap by tap, lowest digit first.

**LM (`lm_convolver`, `lm_lut`).** Each sample is cut into `C_W`-bit slices.
The default is 4, so an 8-bit pixel has two slices. Slice c of tap k addresses
a 2^C_W-entry table holding h(k) times every slice value. The table output is
weighted by 2^(c·C_W). That gives N·ceil(X_W/C_W) operands, placed tap by tap,
lowest slice first.

**DA (`da_convolver`, `da_lut`).** The sum is reordered by bit plane:
y = Σ_j 2^j Σ_k h(k)·x_j(i−k), where x_j is bit j of a sample. Taps are grouped
`G` at a time, 4 by default. For bit plane j, the j-th bits of a group's samples
address a 2^G-entry table holding every sum of the group's coefficients. All
planes are evaluated in parallel, so a result still comes every cycle. That gives
X_W·ceil(N/G) operands, placed plane by plane, group by group. Because all
address bits of a table have equal weight, a DA table is only H_W + log2 G bits
wide. An LM table must hold full products.

The tables are combinational arrays, which map to FPGA distributed memory. The
only registers in a convolver are those of its adder tree.

## Default configuration and timing

Defaults (in `conv_pkg`):

- 8 taps;
- 8-bit unsigned pixels;
- 8-bit signed coefficients h = 3, −14, 25, 100, 90, 21, −9, 1;
- `K = 1`, `C_W = 4`, `G = 4`;
- results 19 bits wide.

| path | operands | adder layers | latency from `in_valid` | adder bits (`ADDER_BITS`) |
|---|---|---|---|---|
| MM | 20 CSD digits | 5 | 1 + 5 = 6 cycles | 234 |
| LM | 16 table outputs | 4 | 1 + 4 = 5 cycles | 173 |
| DA | 16 table outputs | 4 | 1 + 4 = 5 cycles | 147 |

The first cycle of latency is the delay line. MM needs no tables. LM uses
sixteen 16×12-bit tables. DA uses sixteen 16×10-bit tables: eight bit planes
times two tap groups.

Interface of `conv_top`:

- inputs: `clk`, `rst_n` (asynchronous, active low), `in_valid`, `x_in[X_W-1:0]`;
- outputs: `y_mm`, `y_lm`, `y_da` (signed, `Y_W` bits), each with its own `_valid`.

There is no back-pressure: the design takes one sample per cycle when
`in_valid` is high, and the delay line holds its contents while `in_valid` is
low. Reset clears the sample history to zero, so the first N−1 results after
reset read zeros in place of the samples before the stream.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`. To build and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/conv_pkg.sv tb/tb_conv_top.sv \
              --top-module tb_conv_top
    ./obj_dir/Vtb_conv_top

Replace `tb_conv_top` with `tb_adder_tree`, `tb_tap_delay_line`,
`tb_mm_convolver`, `tb_lm_convolver` or `tb_da_convolver` to run the other tests.

- **`tb_adder_tree`** runs six trees on random operands with a random valid
  pattern. It checks every sum and its arrival cycle. The trees cover:
  - 16, 11 and 13 operands, with mixed, partial and full subtraction;
  - a single operand;
  - `K = 2` and `K = 3`;
  - a 4-operand tree with given ranges and shifts, driven at the ends of its
    ranges. It must report exactly 30 adder bits (9, 12 and 12-bit adders with
    1, 2 and 0 bypassed low bits).
- **`tb_mm/lm/da_convolver`** each run two instances against a reference dot
  product computed in the testbench, and check latency:
  - one with edge-case coefficients (−128, 127, 0, −1, …);
  - one with the defaults and a different `K`, slice width or group size.
- **`tb_tap_delay_line`** compares every tap with a model history.
- **`tb_conv_top`** uses the default parameters. It streams a synthetic 16×64
  image and then random pixels with idle cycles, all-ones bursts and isolated
  bright pixels. It checks all three outputs against y(i) and their latencies
  of 6, 5 and 5 cycles. It counts the following, and fails if any never
  happened:
  - idle cycles;
  - back-to-back samples;
  - negative results;
  - all-ones histories;
  - results that read the reset history.

  It also prints `ADDER_BITS` of the three trees.

## Changing it

- **Coefficients:** override `COEFFS` (and `N`, `H_W`) on `conv_top`. The CSD
  digits, tables, operand ranges, widths and latencies all follow. The MM
  latency depends on the number of non-zero CSD digits.
- **Pipelining:** `K` sets how many adder layers lie between registers.
- **Table size:** `C_W` (LM) and `G` (DA) set the number of table address
  bits. 4 matches a 4-input FPGA LUT. For G = 4, each table is one 4-input LUT
  per output bit.
- **Pairing order:** to use an optimised order, permute the operand placement
  in a convolver (the `ops[...]` index). Permute the range, shift and sign
  vectors the same way. `adder_tree` takes any order.

## Departures and open points

These follow the usual constant-coefficient FPGA convolver scheme but are
choices of this implementation:

- **Pairing order.** The operand order is the simple one described above. It
  is not optimised, so the adder cost is that of a straightforward order. An
  order found by a search can only lower it.
- **Correlation between operands is not used.** Operand ranges and shifts are.
- **Configuration.** The number of taps, the coefficient values, the slice
  width `C_W` and the group size `G` are example settings. 8-bit
  coefficients follow the common case.
- **Unsigned pixels.** Signed samples would need the top bit plane of DA
  subtracted and the top LM slice sign-extended. Neither is built.
- **DA is bit-parallel.** It produces a result every cycle. A bit-serial DA,
  with one result every X_W cycles, would be smaller but is not provided.
- **One-dimensional.** The convolution runs along the pixel stream. A 2-D
  image kernel would need line buffers in front of the delay line, which are
  not part of this design.
- **Widths and synthesis.** `ADDER_BITS` is the tree's own count of
  carry-chain bits. It is not a mapped FPGA result. Synthesis may trim a few
  more bits, such as constant top bits of a table output.
