# Reconfigurable adder-based distributed arithmetic: 8-point DCT datapath

This design computes eight inner products of an 8-element input vector with fixed
coefficient vectors on every clock. It uses no multipliers and no ROM lookup tables.
It uses *adder-based distributed arithmetic* (DA): each coefficient is split into its bits,
and the sums of inputs that share a coefficient bit are built once from a small pool of
shared adders. A set of configurable routing matrices decides which inputs each adder
combines and where each partial sum goes. The datapath can therefore be reprogrammed for
another fixed-coefficient transform without changing the hardware. After reset it is
configured as the 8-point 1D DCT: 9-bit inputs, 12-bit coefficients and 14-bit outputs,
giving one transform per clock (8 x 14 = 112 result bits per cycle).

## The arithmetic

For one output, `Z = sum_i C_i X_i`, with `M`-bit two's-complement coefficients
`C_i = -C_i,M-1 2^(M-1) + sum_j C_i,j 2^j`. Swapping the two sums gives

    Z = -T_(M-1) 2^(M-1) + sum_{j=0}^{M-2} T_j 2^j,     T_j = sum of the X_i whose C_i has bit j set

So every output is a weighted sum of M *bit-column terms* `T_j`, and each `T_j` is a sum
of a subset of the inputs. For example, with four 4-bit coefficients 1101, 1011, 1110
and 0011, the columns are `T_3 = X0+X1+X2`, `T_2 = X0+X2`, `T_1 = X1+X2+X3` and
`T_0 = X0+X1+X3`.

Many columns, across all outputs, share subsets. Computing a subset sum once and reusing it is
where the saving comes from. The ROM-based alternative (a 2^L-word table indexed by one
bit of every input, plus a shift-accumulator) needs N cycles for N-bit inputs. This datapath
instead finishes a whole vector per clock.

## Datapath

    x_in[0..7] (9 b)
       |
    routing matrix 1 ── 12 x 2 selects ──> adder array 1: 12 two-input adders   (10 b sums)
       |                                        |
       |                          ==== pipeline register 1 ====
       v                                        v
    routing matrix 2 (sources: 8 inputs + 12 array-1 sums)
       |                       ── 22 x 2 selects ──> adder array 2: 22 adders  (11 b sums)
       |  (inputs and array-1 sums also bypass array 2)
       |                          ==== pipeline register 2 ====
       v
    routing matrix 3 (sources: 8 inputs + 12 array-1 sums + 22 array-2 sums, or zero)
       |   8 outputs x 12 bit weights x 2 slots
       v
    8 Wallace-tree matrices: z_k = -(slots of weight 11) 2^11 + sum_j (slots of weight j) 2^j
       |
    routing matrix 4: output k <- tree rm4[k], bits [out_lsb +: 14]
       |                          ==== output register ====
    y_out[0..7] (14 b), out_valid
All four routing matrices, and the output bit window, are set by one configuration
word. The word is `rda_pkg::rda_cfg_t`, 1492 bits.

* **Routing matrix** (`routing_matrix.sv`): one multiplexer per output. Select code
  `s < NSRC` picks source `s`. The all-ones code (always `>= NSRC` here) gives zero, which
  is how unused adders and empty bit columns are switched off.
* **Adder arrays** (`adder_array.sv`): independent two-input signed adders. Each adder is
  one bit wider than its operands, so no partial sum can overflow.
* **Wallace-tree matrix** (`wallace_tree.sv`): one per output. It takes 25 rows: 24 slots
  (12 weights x 2 slots), each sign-extended to 24 bits and shifted by its weight, plus one
  constant row. The slots of the top weight are inverted (`~v`), and the constant row adds
  back the two "+1"s that complete their negation. The rows go through layers of 3:2
  carry-save adders (25 -> 17 -> 12 -> 8 -> 6 -> 4 -> 3 -> 2) and then one carry-propagate
  adder.
* **Configuration bits** (`config_reg.sv`): a serial shadow chain and an active register.
  See below.
* **Top** (`rda_top.sv`): wires the stages together, unpacks the configuration fields,
  and holds the three pipeline registers.

Why two slots per weight: every DCT bit column is empty, a 4-input set, or all 8 inputs.
A 4-input sum comes out of adder array 2. An 8-input column is fed to the tree as two
4-input terms, `T(0123)` and `T(4567)`, in the two slots of that weight, so no third adder
level is needed. The second slot also lets a general configuration build a column as the
sum of any two available terms.

## Mapping the DCT (`rda_dct_pkg.sv`)

This is the least obvious part of the design. The package computes the whole
configuration word at elaboration time with a constant function (`dct_config()`). The
word becomes the reset value of the configuration register.

**Coefficients.** `F_k(i) = c_k cos(pi k (2i+1)/16)`, where `c_0 = 1/sqrt(8)` and
`c_k = 1/2` otherwise. Each is held as a 12-bit number with 11 fraction bits
(`F_0 = 724 = 0b001011010100`). The magnitude is `q = round(2048 |F|)`, taken from the
9-entry table `COSQ[a] = round(1024 cos(a pi/16))`. A negative coefficient is stored as
**`~q`**, which is `-q-1`, one LSB below the exact two's-complement value. This is
deliberate. Because `F_k(7-i) = -F_k(i)` for odd `k`, the `~q` encoding makes every
bit column of an odd row hold exactly one input of each mirror pair `(i, 7-i)`. The whole
8 x 8 matrix then has only 96 bit columns of three kinds:

* empty;
* one of **22 distinct 4-input sets**;
* all 8 inputs (row 0).

With exact two's-complement negatives you would get 37 distinct sets of 2, 4, 5, 6 and
8 inputs, and they would not fit the adder arrays.

The 22 sets are:

    0123 4567 0124 0145 0356 0135 0246 1247 2345 1357 0257
    0167 1346 1237 3567 1457 0236 1256 0347 2467 2367 0456

**Common-term sharing.** Adder array 1 forms twelve pair sums:
`T(01) T(23) T(45) T(67) T(06) T(35) T(24) T(17) T(07) T(25) T(16) T(34)`. Every one of
the 22 sets splits into two of these pairs, so adder array 2 forms each set with a single
add. The function uses the first disjoint pair split it finds, in the order above. The cost
is 12 + 22 = 34 two-input adders, plus the eight Wallace trees. A direct implementation
needs 672 two-input adders (96 columns of 8 inputs, 7 adders each).

**Routing.** Routing matrix 3 receives, for each output `k` and weight `j`, the source that
carries exactly bit column `j` of row `k`. Routing matrix 4 is the identity. The output keeps
bits [21:8] of the exact sum, so `Y_k` has 3 fraction bits and is truncated toward minus
infinity. `|Y_k| <= 8 * 1005 * 256 / 2048 < 1024`, so 14 bits never overflow.

**Accuracy.** Against the exact real-valued DCT the error of `Y_k / 8` is at most 0.71:
the quantisation of the coefficients, including the one-LSB offset of the negative ones,
adds at most `sum_i |F_q - F| * 256 = 0.58`, and truncation adds 1/8. The testbench checks
a looser bound of 1.25, plus bit-exact agreement with the quantised coefficients.

## Interface and timing (`rda_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (restores the DCT configuration) |
| `in_valid`, `x_in[8]` | in | 1, 8 x 9 signed | input vector |
| `out_valid`, `y_out[8]` | out | 1, 8 x 14 signed | results, exactly 3 clocks after the input |
| `cfg_shift`, `cfg_sdi` | in | 1 | shift one configuration bit into the shadow chain |
| `cfg_commit` | in | 1 | copy the shadow chain into the active configuration |
| `cfg_sdo` | out | 1 | end of the shadow chain (bit 0), for chaining |

* A vector is accepted on every clock with `in_valid` high. There are no stalls.
* **Reconfiguration.** Shift the new 1492-bit word in, bit 0 first. The datapath keeps
  computing with the active word meanwhile. Then pulse `cfg_commit` for one clock; the
  new word is active from the next clock.
* **Commit drops vectors.** Vectors given in the commit cycle and the two cycles before it
  are dropped: their `out_valid` never rises. This stops any result from mixing two
  configurations.
* `config_reg` asserts that `cfg_shift` and `cfg_commit` are never high together.
* The field layout of the word is the packed struct `rda_cfg_t`; bit 0 is `rm1[0][0]`.

## Where this RTL departs from, or adds to, the source design

The following come from the design this RTL follows:

* the stage order (routing matrix / two-input adder array / routing matrix / adder array
  with bypass / routing matrix / Wallace-tree matrices / routing matrix), configured by
  configuration bits;
* the DCT sizes (9-bit inputs, 12-bit coefficients, 14-bit outputs, 8 outputs);
* the one-transform-per-clock rate;
* the pair scheme;
* the list of 22 + 1 shared terms.

Everything below is a choice of this implementation:

* the multiplexer structure of the routing matrices;
* the select encodings and the layout of the configuration word;
* the serial shadow/commit loading and its reset preset;
* the pipeline cut (3 stages);
* two tree slots per weight, used for the 8-input term instead of a 35th adder;
* the output bit window (bits [21:8], truncated, not saturated);
* dropping in-flight vectors on commit.
* forwarding the raw inputs to routing matrices 2 and 3. The source design draws a
  bypass only around adder array 2; the DCT mapping does not use the extra paths.

The coefficient encoding (`~q` for negatives) is reconstructed. It is the encoding that
reproduces the published common-term list exactly.

Not included:

* a transpose memory for the 2D 8x8 DCT. The 1D datapath would have to be used twice.
  The second pass would need inputs wider than 9 bits;
* any software that maps arbitrary coefficient sets onto the adders. Only the DCT
  mapping is provided.

Area, power and frequency figures are not something RTL simulation can confirm.

## Files

| file | contents |
|---|---|
| `rtl/rda_pkg.sv` | sizes, widths, select encodings, configuration word type |
| `rtl/rda_dct_pkg.sv` | DCT coefficients and the constant function that builds the DCT configuration |
| `rtl/routing_matrix.sv`, `rtl/adder_array.sv`, `rtl/wallace_tree.sv`, `rtl/config_reg.sv` | building blocks |
| `rtl/rda_top.sv` | the datapath |
| `tb/*_tb.sv` | one self-checking testbench per block, plus `rda_cts_example_tb` (sharing-scheme example on the full datapath) |

## Verification

Each testbench prints `TB_RESULT checks=N failures=F`.

* `rda_top_tb` runs the top at its default sizes. It streams about 1,900 random and extreme
  vectors, back to back and with bubbles.
* The DCT results are compared bit-exactly with a floating-point-derived reference, and
  checked against the exact DCT.
* During the run a random configuration word is shifted in while the DCT keeps running.
  The word exercises bypassed inputs and array-1 sums, zero selects, arbitrary output
  routing and output LSB.
* The word is then committed, and the dropped vectors are checked.
* The random configuration is checked against a model that evaluates the configuration
  fields directly.
* A reset then restores the DCT.
* Every result's latency is checked (3 clocks). The testbench counts each mechanism and
  fails if one never occurs.
* `rda_cts_example_tb` reconfigures the datapath three times through the serial chain.
  It runs the 4-input example from the arithmetic section (coefficients -3, -5, -2 and 3,
  sign-extended to 12 bits) with three ways of sharing terms: X0+X1 shared (6 adders),
  X1+X2 shared (6 adders), and X0+X2 with X1+X3 shared (5 adders). Without sharing it
  would take 7. Each run checks 100 back-to-back results.
* `rda_dct_pkg_tb` checks the generated DCT word against the 22-term list and the pair
  scheme, and checks every bit column.

To simulate with Verilator (example for the top):

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/rda_pkg.sv rtl/rda_dct_pkg.sv rtl/rda_top.sv tb/rda_top_tb.sv \
        --top-module rda_top_tb -o sim
    ./obj_dir/sim

For the other blocks, replace the top module and the testbench file. Add
`rtl/rda_pkg.sv` (and `rtl/rda_dct_pkg.sv` for the DCT package test).

## Changing the design

Sizes live in `rda_pkg`: `L`, `XW`, `M`, `NA1`, `NA2`, `NOUT`, `P` and `YW`. The
configuration type and all select widths follow from them. A new application needs its
own configuration word. Use `rda_dct_pkg::dct_config()` as a model: choose pair terms
for adder array 1 and larger terms for adder array 2, then point each bit column of each
output at one term, or at two disjoint ones.
