# Depth-optimized circuit building blocks for secure computation

In secret-sharing based secure multi-party computation (GMW-style protocols
such as ABY2.0), a function is evaluated as a Boolean circuit. XOR, XNOR and
NOT gates are evaluated locally by each party and cost nothing. Every AND
gate needs interaction, and the number of communication rounds equals the
circuit's **multiplicative depth**: the largest number of AND gates on any
input-to-output path. Modern protocols evaluate a 2-, 3- or 4-input AND in
one round at the same online cost, so a good circuit uses wide ANDs to cut
depth, and it trades ORs and carries for XORs wherever it can.

This repository is a synthesizable SystemVerilog library of such circuits,
following the three-layer organisation of the SynCirc building-block
library:

| Layer | Blocks (module) |
|---|---|
| I – gates | multi-input AND cell (`sc_and`), δ-input σ-output lookup table gate (`sc_lut`); XOR/XNOR/NOT are plain operators |
| II – basic blocks | adder `add_clf`, subtractor `sub_clf`, carry-save adder `csa`, comparator `comp_gt`, multiplexer `mux_n`, equality `eq_test`, bit extraction `bit_ext`, multiplier `mul_clf`, divider `div_restoring`, AES S-box `aes_sbox` |
| III – functions | AES-128 `aes_encrypt`, sorting network `sort_bitonic`, Manhattan distance `dst_manhattan`, `relu`, `sigmoid`, `maxpool`, set intersection `psi`, binary32 `fp_add` / `fp_mul` |

Everything is purely combinational: no clock, no reset, no state. The blocks
are meant to be read by a synthesis flow that maps them to a netlist of
AND2/AND3/AND4/XOR/NOT gates (or to LUTs) for a secure-computation engine.
They are equally usable as ordinary combinational hardware.
`syncirc_top` places one instance of every block side by side.

## The two rules every block follows

1. **No ORs on the critical path.** Where a textbook circuit ORs terms that
   can never be 1 together, the terms are XORed instead (free). The carry
   recurrence `G = g1 | p1·g0` becomes `g1 ^ p1·g0`, because with
   `p = a ^ b` and `g = a & b` a bit cannot both generate and propagate.
2. **Merge four things per AND level.** A single AND of fan-in 4 combines
   four groups, so trees are radix 4 and their depth is `ceil(log4 n)`
   rather than `ceil(log2 n)`.

## Carry networks (`prefix4`, `add_clf`, `sub_clf`, `bit_ext`)

These are the part of the library that takes the most care to follow.

`prefix4` computes, for every bit position `i`, the group generate and
propagate of bits `[i:0]`. It is a divide-and-conquer (Sklansky) prefix tree
with four-way nodes. At level `k` the bits are cut into blocks of `4^(k+1)`,
each made of four quarters of `4^k` bits. After level `k-1` every position
already knows the prefix of its own quarter. A position in quarter `m`
(m = 1..3) now folds in the prefixes that end the `m` quarters below it. For
m = 3, with `e2, e1, e0` the last positions of quarters 2, 1 and 0:

```
G = G_i ^ P_i·G_e2 ^ P_i·P_e2·G_e1 ^ P_i·P_e2·P_e1·G_e0
P = P_i·P_e2·P_e1·P_e0
```

Each term is one AND of at most four inputs, and all of a level's ANDs are
side by side. So the network costs `ceil(log4 W)` AND levels. With the
generate level in front, the adder's depth is `ceil(log4 W) + 1`: 3 levels
for 16 bits and 4 levels for 32 or 64 bits.

* `add_clf` returns `W+1` bits; the top bit is the carry out.
* `sub_clf` computes `x + ~y + 1`. The carry-in of 1 is folded into bit 0:
  that bit's generate becomes `~(~x0 & y0)` and its propagate 0, so the
  subtractor costs no extra level. Its top output bit is the carry out,
  which is 1 exactly when `x >= y`. The divider uses this bit as its
  quotient bit.
* `bit_ext` returns only the most significant bit of `x + y`. It is the sign
  of a value held as two additive shares. It runs the prefix network over
  the low `W-1` bits only.

## Comparison and equality (`comp_gt`, `eq_test`, `and_tree`)

`comp_gt` is the recursive greater-than: per bit, `gt = x & ~y` (one AND) and
`eq = ~(x ^ y)` (free). Four groups, most significant first, merge as
`GT = gt3 ^ eq3·gt2 ^ eq3·eq2·gt1 ^ eq3·eq2·eq1·gt0` and
`EQ = eq3·eq2·eq1·eq0`, so the depth is `ceil(log4 W) + 1`. The comparison
is unsigned; a signed comparison comes free by inverting both sign bits
(as `maxpool` does). `eq_test` is an XNOR layer followed by an AND4 tree
(`and_tree`, built from `sc_and` cells), with depth `ceil(log4 W)`.

## Multiplexers with depth 1 (`mux2`, `mux4`, `mux8`, `mux_n`)

A 2:1 mux is `a0 ^ s·(a0 ^ a1)`. In the 4:1 mux, the literal of the upper
select bit goes into the same AND:

```
y = ~s1·a0 ^ ~s1·s0·(a0^a1) ^ s1·a2 ^ s1·s0·(a2^a3)
```

That is two AND2 and two AND3 per bit, all at depth 1. The 8:1 mux decodes
two select bits as literals inside each AND: per pair, one AND3 and one AND4,
still at depth 1. `mux_n` builds any N as a tree of 8:1 stages, taking the
select bits three at a time from the LSB. A last stage with one or two bits
left uses a 2:1 or 4:1 mux. The depth is `ceil(log8 N)`. Select values
beyond N-1 return 0.

The LUT gate `sc_lut` is logically a 2^δ:1 selection of σ-bit table entries.
It is built on `mux_n`, and its table is an input port.

## Arithmetic (`csa`, `mul_clf`, `div_restoring`)

* `csa` is a row of 3:2 compressors. Its carry is `(a&b) ^ (c&(a^b))`:
  one AND level, exclusive terms.
* `mul_clf` is the W×W→W multiplier (the product mod 2^W). It forms the
  partial products with one AND level, reduces them with a Wallace tree of
  `csa` rows, and adds the last two rows with `add_clf`.
* `div_restoring` computes W quotient bits, most significant first. Each
  step shifts a dividend bit into the remainder, then subtracts the divisor
  with a (W+1)-bit `sub_clf`. The carry out is the quotient bit, and a `mux2`
  keeps either the difference or the old remainder. It also outputs the
  remainder. Dividing by zero gives an all-ones quotient and the dividend as
  remainder.

## AES (`aes_sbox`, `aes_encrypt`)

The S-box computes the field inverse as `x^254 = x^2·x^4·…·x^128`. Squaring
in GF(2^8) is linear and therefore free. The seven squares are multiplied in
a balanced tree of six GF(2^8) multiplications. Each multiplication is one
level of AND2 gates, so the S-box has depth 3. The affine output map is all
XORs. This reaches the S-box depth the library targets, but it uses many
more AND gates (6 × 64) than a hand-optimized S-box circuit.

`aes_encrypt` is full AES-128 (FIPS-197 byte order) as one combinational
circuit: 160 round S-boxes and 40 key-schedule S-boxes. Everything else is
XOR and wiring.

## Advanced functions

| Module | What it computes | Built from |
|---|---|---|
| `sort_bitonic` | N unsigned keys sorted ascending (default 16 × 16 bit) | 10 stages of `cmp_swap` (COMP + 2 MUX) |
| `dst_manhattan` | `|p0-q0| + |p1-q1|`, 16-bit coordinates, 17-bit result | 4 `sub_clf`, 2 `mux2`, `add_clf` |
| `relu` | `max(x0 + x1, 0)` for two additive shares | `add_clf` and `bit_ext` in parallel, one AND level |
| `sigmoid` | 0 / x+½ / 1 piecewise-linear sigmoid on shares, 12 fractional bits | `add_clf`, two `bit_ext`, `mux4` |
| `maxpool` | maximum of 16 signed values | binary tree of `comp_gt` + `mux2` |
| `psi` | for each of 32 elements of set A: is it in set B? | 32×32 `eq_test`, AND4 trees as NOR |

## Floating point (`fp_add`, `fp_mul`)

These are IEEE-754 binary32 adders and multipliers. `fp_add` has a `sub`
input for subtraction. Squaring is `fp_mul` with equal inputs. Both round to
nearest, ties to even.

Number handling is simplified, as in many hardware FP libraries:

* subnormal inputs count as zero;
* results below the normal range are flushed to a signed zero;
* every NaN result is `0x7FC00000`;
* `inf - inf` and `inf × 0` are NaN;
* an exact cancellation gives +0.

`fp_mul` forms its 48-bit significand product with `mul_clf`. `fp_add` is a
single-path adder with guard, round and sticky bits. Its alignment and
normalization use ordinary operators, and a synthesis flow would lower them
to the library's blocks.

## Top level

`syncirc_top` brings every block out side by side, with the block name as
port prefix (`add_`, `sub_`, `comp_`, `mux_`, `eq_`, `bitext_`, `mul_`,
`div_`, `sbox_`, `aes_`, `sort_`, `dst_`, `relu_`, `sig_`, `pool_`, `psi_`,
`fadd_`, `fmul_`, `lut_`).

Default sizes:

* 32-bit operands for the arithmetic, comparison and machine-learning blocks
  (`W`);
* 16-bit division (`W_DIV`);
* sorting of 16 keys of 16 bits (`N_SORT`, `W_SORT`);
* 16-bit distance (`W_DST`);
* an 8:1 multiplexer (`N_MUX`);
* 16-input maxpool (`N_POOL`);
* 32-element set intersection (`N_PSI`);
* 12 fractional bits for the sigmoid (`FRAC`);
* an 8×8 LUT (`DELTA`, `SIGMA`).

Every block module is parameterized in the same way and can be used on its
own.

## Multiplicative depth by construction (default sizes)

These numbers are counted from the structure described above. They were not
measured on a synthesized netlist.

| Block | Depth |
|---|---|
| `add_clf`, `sub_clf`, `comp_gt` (32 bit) | 4 (`ceil(log4 32) + 1`) |
| `add_clf`, `sub_clf`, `comp_gt` (16 bit) | 3 |
| `eq_test` (32 bit) | 3 |
| `bit_ext` (32 bit) | 4 |
| `mux4`, `mux8` | 1 |
| `mux_n` with N ≤ 8 | 1 |
| `mux_n` with N ≤ 64 | 2 |
| `aes_sbox` | 3 |
| `csa` | 1 |
| `mul_clf` (32 bit) | 1 + 8 carry-save levels + 4 = 13 |

## Where this implementation departs from the published library

* **Gate counts differ.** Most of the published building blocks are given
  by name, depth and gate count, not by their inner structure. The
  structures here reach the stated depth formula `ceil(log4 l) + 1` for
  adders, subtractors and comparators, depth 1 for 2:1, 4:1 and 8:1
  multiplexers, and depth 3 for the S-box. They do not reproduce the
  published AND-gate counts. The S-box and the multiplier in particular use
  more gates.
* **Two published depth values are lower than the formula.** For 8-bit and
  32-bit adders, and for 32-bit comparators, the published tables list one
  level less than `ceil(log4 l) + 1` gives. This library follows the
  formula.
* **The multiplier's depth is not tuned.** It uses a plain Wallace tree and
  has not been tuned to the published `1.5·log2(l) + 2`.
* **Some interpretations are this implementation's own:**
  * bit extraction is the sign of a sum of two shares;
  * ReLU and the sigmoid take two additive shares;
  * the sigmoid's approximation and fixed-point format;
  * 2-D Manhattan distance;
  * AES-128 as the key size;
  * the bitonic sorting network;
  * an all-pairs set intersection of 32 × 32 bits.
* **Floating-point division, square root, sine and cosine are not
  included.** The published library takes them from proprietary IP.
* **The software flow is not RTL.** High-level synthesis from C/C++,
  technology mapping with a cost library, and output in Bristol format are
  software and have no RTL here.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_add_clf \
    rtl/syncirc_pkg.sv tb/tb_add_clf.sv
./obj_dir/Vtb_add_clf
```

Replace `tb_add_clf` with any testbench name. The testbenches check their
blocks against independent models:

* integer arithmetic in the testbench;
* an insertion sort;
* an AES model that finds S-box inverses by search (`tb/aes_ref_pkg.sv`);
* binary32 results computed in double precision and rounded once
  (`tb/fp_ref_pkg.sv`).

For the arithmetic blocks, the testbenches also instantiate small or odd
widths and try them exhaustively.

`tb_syncirc_top` runs the whole top at its default sizes. It checks every
block and counts the cases each block exists for:

* carries, borrows and product wrap-around;
* equal and unequal words;
* division by zero;
* duplicate sort keys;
* clipped ReLU inputs and all three sigmoid regions;
* set hits and misses;
* floating-point cancellation, overflow, underflow and NaN;
* the AES reference vector.

A case that never occurs counts as a failure. Building the AES circuit (200
S-boxes) takes Verilator the longest: tens of seconds with a parallel C++
build.

## Files

* `rtl/syncirc_pkg.sv` – shared helpers: `clog4`, GF(2^8) arithmetic, the
  binary32 field struct.
* `rtl/<block>.sv` – one module per file. The helper modules are `prefix4`,
  `and_tree`, `mux2`, `mux4`, `mux8` and `cmp_swap`.
* `tb/tb_<block>.sv` – one testbench per block.
* `tb/aes_ref_pkg.sv`, `tb/fp_ref_pkg.sv` – reference models.
