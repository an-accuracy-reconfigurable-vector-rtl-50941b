# Accuracy-reconfigurable vector multiplier from Mitchell logarithmic multipliers

Mitchell's logarithmic multiplier replaces a multiplication by a shift and
an addition. Each operand becomes an approximate base-2 logarithm: the
position of its leading 1, plus the bits below it read as a binary fraction.
The two logarithms are added, and the sum is turned back into a number by a
shift. This costs a fraction of the area of an array multiplier. The price is
that the product is always low, by up to 11.1 % (3.8 % on average).

This design keeps the small multipliers and buys accuracy back with
parallelism. A group of four Mitchell multipliers can work in three modes:

| mode | products per group | how one product is formed                              | worst error | mean error (32-bit) |
|------|--------------------|--------------------------------------------------------|-------------|---------------------|
| OD-1 | 4                  | one Mitchell multiplication                            | 11.1 %      | 3.8 %               |
| OD-2 | 2                  | the smaller operand is split into 2 terms, 2 multipliers | 4.8 %     | 1.05 %              |
| OD-4 | 1                  | the smaller operand is split into 4 terms, 4 multipliers | 1.1 %     | 0.10 %              |

The mode is chosen per vector. One piece of hardware therefore serves both
fast, coarse work (eight products per cycle) and near-exact work (two
products per cycle). Both the modes and the error figures are reproduced by
the testbenches described below.

## Why splitting an operand helps

Operand decomposition (OD) writes one operand X as its leading power of two
plus the rest:

    X = X11 + X'        X11 = 2^k (the leading 1 of X),   X' = X & ~X11
    X * Y = X11 * Y + X' * Y

A power of two has a zero fraction, so its Mitchell logarithm is exact. The
Mitchell product `X11 * Y` is then just `Y << k`, with no error. All of the
error sits in `X' * Y`. Since X' < X/2, that term is at most half the
product, so its error weighs at most half as much. OD-4 repeats the split
twice more:

    X = X11 + X12 + X13 + X'''
    X12 = leading 1 of X',   X13 = leading 1 of X'',   X''' = what is left

Three exact shifts then leave only a small remainder term to approximate. The
operand that gets split is the smaller of the two, chosen by a comparator.
Fewer set bits in the split operand means a smaller remainder.

Nothing new is needed to compute the terms. The same four multipliers
receive different operands, and the adder tree that follows them (two
pairwise adders, then a final adder) already sums what each mode needs:

    OD-1   mult0..3 = x0*y0, x1*y1, x2*y2, x3*y3     products = multiplier outputs
    OD-2   mult0..3 = X0_11*Y0, X0'*Y0, X1_11*Y1, X1'*Y1
                                                     products = the two pairwise sums
    OD-4   mult0..3 = X11*Y, X12*Y, X13*Y, X'''*Y    product  = the final sum

In every mode the final adder also gives the sum of the group's products,
which serves multiply-accumulate work.

## The Mitchell multiplier in this design

`mitchell_mult` keeps every fraction bit: an (N-1)-bit fraction, and a
2N-bit decoder that shifts left or right. Nothing is truncated, so the
result is exactly Mitchell's value:

    mA + mB < 1 :  A*2^kB + B*2^kA - 2^(kA+kB)
    mA + mB >= 1:  2*(A*2^kB + B*2^kA) - 2^(kA+kB+2)

where kA and kB are the leading-one positions, and the test `mA + mB >= 1`
is the carry out of the fraction adder. Three consequences follow:

* a product with a power of two is exact, which the decomposition needs;
* the result never exceeds the true product, and a sum of terms never does
  either, so OD-2 and OD-4 products fit in 2N bits;
* a narrow operand zero-extended into a 32-bit lane gives the same product
  as a narrow Mitchell multiplier would.

A zero operand gives a zero product. This matters in OD-4, where an operand
with fewer than three set bits produces zero terms.

## Top level: `od_vector_accel`

Parameters: `N = 32` (operand width), `LANES = 8` (multipliers, a multiple of
4), `CMP_EN = 1` (compare operands and split the smaller one). With
`CMP_EN = 0`, x is always split. That variant saves the comparators at some
cost in accuracy.

| port          | dir | width            | meaning |
|---------------|-----|------------------|---------|
| `clk`, `rst_n`| in  | 1                | clock; synchronous active-low reset of the output registers |
| `in_valid`    | in  | 1                | a vector is issued this cycle |
| `in_mode`     | in  | `od_mode_t` (2)  | `OD1`, `OD2` or `OD4` for this vector |
| `in_x`,`in_y` | in  | LANES x N        | element operands, unsigned |
| `out_valid`   | out | 1                | results of the vector issued in the previous cycle |
| `out_mode`    | out | 2                | that vector's mode |
| `out_prod`    | out | LANES x 2N       | product of each element |
| `out_pvalid`  | out | LANES            | element holds a product (8, 4 or 2 elements per mode) |
| `out_swapped` | out | LANES            | the comparator split y rather than x |
| `out_dot`     | out | LANES/4 x (2N+2) | sum of each group's products |

Element numbering: in OD-1 all `LANES` elements are used. In OD-2 only
elements `0 .. LANES/2-1` are used, and in OD-4 only `0 .. LANES/4-1`.
Elements beyond that are ignored, and their outputs are 0 with
`out_pvalid` low. Element e goes to group `e / (4/ways)`, so `out_dot[g]`
sums elements `g*(4/ways)` up to `(g+1)*(4/ways)-1`.

Timing: one vector per cycle, and results one cycle later. The whole
datapath is combinational: comparator, three chained leading-one
detectors, the Mitchell encode/add/decode and the adder tree. It ends in a
single output register. The mode may change on every vector. An assertion
flags the undefined mode code 2'd3, which otherwise behaves as OD-1.

## Module hierarchy

    od_vector_accel          top: routes elements to groups, output register
      od_group (x LANES/4)   four multipliers, mode muxes, adder tree
        operand_compare (x2)      picks the smaller operand
        operand_decomposer (x2)   X11, X12, X13 and remainders
          lod (x3)                leading-one detectors
        mitchell_mult (x4)        log multiplier
          lod (x2)
        adder_tree4               two pair adders and the final adder
    od_pkg                   od_mode_t and od_ways()

## What follows the original design and what does not

Taken from the design: the Mitchell encode-add-decode, with the fraction
carry going into the exponent; the OD-2 and OD-4 splits with
`X' = ~X11 & X`; splitting the smaller operand; four multipliers per group
feeding two adders and a final adder; the operand mapping of each mode; and
a 32-bit unit with eight multipliers.

Choices made here, where the design is silent:

* the mode encoding, and carrying the mode with each vector (the design
  only says software selects the accuracy, for instance through an
  instruction-set extension, which is not part of this RTL);
* two groups of four for the eight multipliers, and how vector elements
  map onto them;
* one register stage at the output, its reset, and no further pipelining;
* the full-precision fraction and decoder widths, and zero handling;
* leading-one detection as a priority scan, not an iterative shifter;
* `out_dot` as the way multiply-accumulate sums leave the unit. There is no
  accumulator register across vectors.

Not built: a processor interface or instruction encoding; the cheaper
variant limited to OD-1 and OD-2; and the exact multiplier arrays and the
earlier bitwise decomposition scheme, which the design is compared with
but does not contain.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference models in `tb/tb_ref_pkg.sv`
are written from the arithmetic, not from the RTL. Mitchell's product is
computed from its closed form above. The operand split peels set bits off
one at a time.

| testbench               | what it shows |
|-------------------------|---------------|
| `tb_lod`                | leading-one index, mask, zero flag |
| `tb_mitchell_mult`      | bit-exact Mitchell products, exact power-of-two products, worst error reaches and never exceeds 11.11 % (3 x 3 gives 8) |
| `tb_operand_compare`    | smaller operand routed to the splitter; `CMP_EN = 0` variant |
| `tb_operand_decomposer` | OD-2 and OD-4 terms, disjoint and summing to X |
| `tb_adder_tree4`        | pair sums and total at full scale |
| `tb_od_group`           | every slot, valid mask, swap flag and sum in all modes; OD-2 error below 4.81 %, OD-4 below 1.10 % |
| `tb_od_vector_accel`    | end to end at the default size: a random stream with idle cycles, all six mode switches, swaps, zero OD-4 terms, fraction carries, ignored slots and a mid-stream reset; latency 1 cycle |
| `tb_accuracy_table`     | worst error and mean relative error per mode: all 8-bit pairs, and 40,000 random 16- and 32-bit pairs |
| `tb_image_smoothing`    | 3x3 Gaussian smoothing (weights 40/24/14, 8 fraction bits) of a 48x48 noisy image; PSNR against exact smoothing |
| `tb_slam_kernels`       | sum of squared distances through `out_dot`, and rotation of 1024 map points with Q1.15 cos/sin |

Measured accuracy (max error / mean relative error, %):

| operands | OD-1          | OD-2         | OD-4          |
|----------|---------------|--------------|---------------|
| 8-bit, all pairs | 11.11 / 3.79 | 4.81 / 0.97 | 1.09 / 0.06 |
| 16-bit, random   | 11.08 / 3.82 | 4.78 / 1.04 | 1.10 / 0.10 |
| 32-bit, random   | 11.10 / 3.85 | 4.80 / 1.05 | 1.10 / 0.10 |

The 16- and 32-bit figures agree with the published ones to the last digit:
3.84, 1.05 and 0.10 % mean, with worst cases of 11.11, 4.81 and 1.10 %. The
exhaustive 8-bit sweep comes out slightly worse than the published 8-bit
figures (3.67, 0.89 and 0.03 % mean, 1.08 % worst in OD-4). Those were
evidently measured over a different set of operand pairs. The testbench
allows for this gap.

Smoothing gives PSNR of 31.8 dB (OD-1), 47.8 dB (OD-2) and exact results
(OD-4) against exact smoothing. The kernel weights have at most three set
bits, so OD-4 splits them with no remainder. In the SLAM kernels the mean
map-point error falls from 753 mm (OD-1) to 240 mm (OD-2) and 25 mm (OD-4)
for points up to 20 m away. These inputs are generated, not recorded scans.

Each testbench runs in seconds. To simulate one with Verilator, list the
two packages first; the `-I` paths let it find the modules by name:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/od_pkg.sv tb/tb_ref_pkg.sv tb/tb_od_vector_accel.sv \
      --top-module tb_od_vector_accel
    ./obj_dir/Vtb_od_vector_accel

Lint prints only unused-signal warnings, for example for the leading-one
index in the decomposer, which needs only the mask.
