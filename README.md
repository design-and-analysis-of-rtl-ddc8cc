# Error-balanced approximate MAC with positive and negative 4-2 compressors

An approximate multiplier saves energy by dropping some of the partial-product
reduction work. Most designs err mostly in one direction, though. In a long
dot product (a convolution over many channels, say) those errors add up
instead of averaging out. This design avoids that with two cheap
approximate 4-2 compressors that err in *opposite* directions:

* a **positive multiplier (PM)** built from the positive compressor (PC)
  over-estimates on average;
* a **negative multiplier (NM)** built from the negative compressor (NC)
  under-estimates on average.

A parallel multiply-accumulate unit then gives each lane one of the two
flavours, in the ratio that makes the expected errors cancel. Each
multiplier is as crude as the most aggressive one-sided designs, but the
accumulated result stays close to the exact one.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017), with 8×8 unsigned
operands.

## The compressors

A 4-2 compressor in column *i* takes four bits `a b c d` of weight 2^i and
returns bits of weight 2^i and 2^(i+1).

**Exact** (`exact_compressor`): it also takes a carry-in `z_i` from the
column below and gives a carry-out `z_(i+1)`. With `t = a^b^c^d`:

    sum   = t ^ z_i
    carry = t ? z_i : d
    cout  = (a^b) ? c : a          -- independent of z_i, so no ripple

**Approximate** (`pos_compressor`, `neg_compressor`): these have no carry-in
and no carry-out. Both use the same low output, a four-input OR
(`or4_gate`):

    sum   = a | b | c | d                       (PC and NC)
    carry = ab | bc | bd | cd                   (PC)
    carry = ab | cd                             (NC)

The OR never under-estimates, and it gives 0 for an all-zero input. So a
zero operand, or a column with no ones, still gives an exact zero. NC's
sparser carry drops a weight-2 term often enough to push the total error
negative. Over the 16 equally likely input patterns, the summed error
(output value − number of ones) is +1 for PC and −3 for NC. In a
multiplier the patterns are not equally likely, which is why the
multiplier-level figures below were computed by exhaustive simulation.

## The multiplier tree (`approx_mult`)

`pp_gen` forms the 64 partial products `a[m] & b[n]`. Column *c*
(weight 2^c, c = 0…14) holds `min(c+1, 15−c)` dots. Two compressor stages
take the height from 8 to 4 to 2, and `final_adder` (a ripple
carry-propagate adder) adds the two remaining 15-bit rows into the 16-bit
product.

| stage | column | cells |
|---|---|---|
| 1 | 0–3 | dots pass through |
| 1 | 4 | half adder |
| 1 | 5 | compressor |
| 1 | 6 | compressor + half adder |
| 1 | 7 | two compressors |
| 1 | 8 | compressor (carry-in 0) + full adder |
| 1 | 9 | compressor (carry-in from column 8) + half adder |
| 1 | 10 | compressor (carry-in from column 9) |
| 1 | 11 | full adder whose third input is column 10's carry-out |
| 1 | 12–14 | dots pass through |
| 2 | 0–1 | dots pass through |
| 2 | 2 | half adder |
| 2 | 3–12 | one compressor each, carry chain starting at 0 in column 3 |
| 2 | 13 | full adder whose third input is column 12's carry-out |

After stage 1 no column holds more than four bits, and after stage 2 no
more than two.

**The W parameter.** Every compressor site in a column below `W` is
approximate (PC or NC, chosen by `KIND`). The others are exact. Half and
full adders are always exact. An approximate site passes no carry, so the
next exact compressor up the chain gets carry-in 0.

* `W = 8` approximates the compressors of columns 0–7. This is the split
  the reference dot diagram is drawn with.
* `W ≥ 13` approximates every compressor. This is the `W = 16` setting
  that the MAC uses and that the error figures refer to.
* `W < 8` is rejected at elaboration. Stage-1 columns 5–7 would then need
  carry-outs that the layout has no room for.

**Dot order.** Within a column, dots enter the cells in order of the
multiplier bit index *n* (`b[0]` first). The approximate compressors are not
symmetric in their inputs, so another order gives different individual
products. The totals over all operand pairs are unaffected, because
swapping A and B maps one order onto the other.

**Exact cases.** A product where either operand is 0 or a power of two is
exact in every configuration. Every column then holds at most one 1.

### Error of one product

These are exhaustive over all 65536 operand pairs (approximate − exact),
and the testbench checks them:

| configuration | mean error | min | max |
|---|---|---|---|
| PM, W = 8  | +85.15 | −520 | +520 |
| NM, W = 8  | −8.81 | −520 | +440 |
| PM, W = 16 | +909.69 | −8000 | +8288 |
| NM, W = 16 | −362.72 | −9120 | +8064 |

Note that individual errors have both signs. The flavour fixes only the
sign of the mean.

## The blended MAC (`approx_mac`, top level)

`NPE` lanes each multiply one operand pair per cycle. Each lane's flavour
is fixed at elaboration by `mac_pkg::lane_kind(k, NUM_PM, NUM_NM)`: lane
*k* is PM when `(k·NUM_PM) mod (NUM_PM+NUM_NM) < NUM_PM`, which spreads the
PM lanes evenly. The lane products are summed exactly and added to an
exact accumulator. Only the multipliers approximate.

**The blend ratio.** For the errors to cancel, the lane counts must satisfy
`n_PM·E_PM + n_NM·E_NM ≈ 0`. That means `n_NM / n_PM = E_PM / |E_NM|`,
which is 909.69 / 362.72 ≈ 2.51 at W = 16. The defaults are therefore
`NUM_PM = 2`, `NUM_NM = 5` and `NPE = 7` (one blend period). They leave an
expected error of +5.8 per beat of seven products. If you change `W`,
recompute the ratio from the table. At W = 8, for example, it is about
1 PM to 10 NM.

Note that here the NM has the *smaller* mean error, so NM lanes are the
majority. The original paper describes the NM as the larger-error
multiplier and states the ratio the other way round. This RTL follows the
cancellation condition and the error figures of its own multipliers.

### Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears the accumulator and `out_valid`) |
| `in_valid` | in | 1 | this cycle is a beat: `NPE` operand pairs are present |
| `in_first` | in | 1 | first beat of a dot product; the accumulator restarts from this beat |
| `in_last` | in | 1 | last beat of a dot product |
| `in_a`, `in_b` | in | `NPE`×8 | operands, unsigned, one pair per lane |
| `out_valid` | out | 1 | one-cycle pulse, the cycle after the last beat |
| `out_acc` | out | `ACC_W` | the result; held until the next beat |

Timing works as follows:

* One beat is accepted per cycle.
* Idle cycles (`in_valid` low) may appear anywhere and leave the
  accumulator unchanged.
* A new dot product may start in the cycle right after a last beat.
* A dot product that is not a multiple of `NPE` pads the spare lanes with
  zero operands. Every lane multiplies these exactly to 0.
* An assertion flags `in_first` or `in_last` raised without `in_valid`.

A 3×3 kernel over 64 channels (576 products) takes 83 beats at the
defaults.

| parameter | default | meaning |
|---|---|---|
| `W` | 16 | approximate columns in every multiplier |
| `NUM_PM`, `NUM_NM` | 2, 5 | blend ratio |
| `NPE` | 7 | lanes |
| `ACC_W` | 32 | accumulator width (a 3×3×64 window needs 26 bits) |

## Measured behaviour

These figures use random 8-bit operands, W = 16 and the default blend.
NMED is the mean |error| divided by the largest possible dot product.

* **3×3×64 windows, 2000 windows.** Mean |error|: about 37 000 blended,
  206 000 with all lanes NM and 523 000 with all lanes PM. NMED: about
  0.0010, 0.0055 and 0.014.
* **Channel sweep, 3×3 kernels, 200 windows per width.** One-sided errors
  grow with the dot product, so their NMED stays flat. The blended errors
  cancel, so the blended NMED falls as the dot product gets longer:

| C | blended | all NM | all PM |
|---|---|---|---|
| 8 | 0.0029 | 0.0058 | 0.0142 |
| 32 | 0.0014 | 0.0053 | 0.0139 |
| 128 | 0.00079 | 0.0056 | 0.0139 |
| 512 | 0.00037 | 0.0056 | 0.0140 |

## How this relates to the published design

The following follow the published design:

* the compressor equations;
* the carry-free approximate compressors;
* the two multiplier flavours and the stage layout of the 8×8 tree;
* the idea of blending fixed-flavour lanes in a parallel MAC with exact
  accumulation.

The following are this implementation's own choices:

* the order of dots inside a column;
* the lane count and the lane-assignment rule;
* the 2:5 ratio (derived from the exhaustive error means above);
* the accumulator width;
* the valid/first/last handshake and its one-cycle latency;
* the reset style;
* the ripple final adder.

Not provided:

* the signed 16×16 multiplier that the paper also evaluates (its tree is
  not specified);
* runtime switching between exact and approximate modes;
* the propagate/generate-based approximate half and full adders that are
  sometimes mentioned alongside this design (their logic is not
  specified);
* any power, delay or area characterisation.

## Files and simulation

`rtl/` (one unit per file):

* `mac_pkg`: shared types and `lane_kind`.
* `pp_gen`, `half_adder`, `full_adder`, `exact_compressor`, `or4_gate`,
  `pos_compressor`, `neg_compressor`, `final_adder`: the building blocks.
* `tree_compressor`: one compressor site, approximate or exact by column.
* `approx_mult`: the multiplier tree.
* `approx_mac`: the top level.

`tb/`:

* One self-checking testbench per block, `tb_<module>`. Each prints a
  `TB_RESULT checks=… failures=…` line.
* `approx_ref_pkg`: a bit-level reference model of the multiplier, written
  independently of the RTL, together with the exhaustive error totals.
* `tb_approx_mac`: the 3×3×64 convolution workload at default parameters.
* `tb_conv_channels`: the channel sweep.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/mac_pkg.sv tb/approx_ref_pkg.sv tb/tb_approx_mac.sv \
        --top-module tb_approx_mac
    ./obj_dir/Vtb_approx_mac

For the leaf blocks, leave out `tb/approx_ref_pkg.sv` and change the top
module. `tb_approx_mult` checks all 65536 operand pairs in four
configurations (PM and NM, each at W = 8 and 16). Each testbench runs in
well under a minute.
