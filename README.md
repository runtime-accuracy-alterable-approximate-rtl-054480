# Runtime accuracy-alterable approximate floating-point multipliers

Error-tolerant workloads such as image processing, signal processing and neural
networks do not need exact products. These multipliers approximate one
operand and save the adders that the exact product would need. In an IEEE-754
single-precision multiply, the 24-bit mantissa of `a` is kept whole. Only the
hidden bit and the top **k** fraction bits of `b` are used. k is called the
*level of accuracy*. Larger k costs more partial products and gives a smaller
error.

The best k differs from one operand pair to the next. An error estimator, a
classifier trained offline, can predict the smallest k that keeps the error of
a given pair within the application's tolerance. A multiplier whose k is fixed
when it is built must use one k for every pair. The multipliers here change
their accuracy at run time instead:

| unit | accuracy | cost of accuracy |
|---|---|---|
| `simple_adder_fpmul` | k fixed by a parameter | the baseline structure: k+1 partial products added at once |
| `accum_fpmul` | any k from 1 to 23, chosen per operation | one partial product per clock cycle, so k cycles per product |
| `reconfig_fpmul` | two levels, k_low or k_high = 2·k_low+1, chosen per operation | at k_low it computes **two** products at once |

Each of them can also round operand `b` with a small *window*, described below.
At the same k, this cuts the mean error roughly in half.

## How the mantissa product is approximated

Write the mantissa of `b` as `mant_b[23:0]`, with the hidden bit at bit 23.
Fraction bit j is `mant_b[23-j]`. At level k the multiplier forms

    P = mant_a[23:0] × mant_b[23:23-k]

This is a sum of k+1 partial products. The partial product for `mant_b[23-i]`
is `mant_a` gated by that bit and shifted left by k−i places. P has 25+k bits,
with 23+k fraction bits, and lies in [1,4). A final stage (`fp_assemble`)
builds the result:

- the sign is the xor of the two signs;
- the exponent is `exp_a + exp_b − 127`, plus one if P ≥ 2;
- the fraction is the 23 bits below the leading one of P, truncated.

Truncating `b` always makes the product too small. The relative error is below
2^−k and averages about 2^−k/1.45 for uniformly spread fractions.

## Window rounding

Rounding `b` to nearest would need an incrementer across all k+1 kept bits. A
carry out of that incrementer would also renormalise `b`. The window scheme
avoids both. A window of W fraction positions (W = 3 or 5) is centred on the
last kept bit k:

```
 fraction position:   k-2   k-1    k  | k+1   k+2
 window W=3:                 [ kept   | drop ]
 window W=5:           [    kept      | drop   drop ]
```

- **Decision.** Round up when fraction bit k+1 is one. With W=5 the two dropped
  window bits are examined: `10` and `11` round up, `01` and `00` do not. This
  is the same test.
- **Bounded carry.** The increment of one unit at position k may ripple only
  through the kept bits inside the window: 2 bits for W=3, 3 bits for W=5. It
  never passes the hidden bit. If those bits are all ones, the carry would
  leave the window, and the rounding is skipped. The increment is therefore a
  2- or 3-bit operation whose position moves with k.

Rounding is applied to the mantissa of `b` before it reaches the partial
products. The window follows k when k changes at run time.

Example at k=2. For `b = 1.01|1…` the kept bits are `01`, so the result is
`1.10`. For `b = 1.11|1…` the kept bits are `11`, which is full, so the result
stays `1.11`. With W=5 the window also covers the hidden bit, and no rounding
can happen there either. At k=1 both windows reach the hidden bit and behave
identically.

The bounded carry and its suppression are this implementation's reading of
"the window size is the maximum number of bits used for rounding". This
reading reproduces the published error rates closely. For example, k=2 gives
4.95% with W=3 and W=5 alike, and W=3 equals W=5 at k=1. See the accuracy
section.

## The three multipliers

### Simple adder-based (`simple_adder_fpmul`, `simple_adder_mant`)

k is the parameter `K` (default 2), and the unit is purely combinational.
`WINDOW` is 0 (no rounding), 3 or 5 (default 3). K=2 with rounding is the
smallest configuration that meets a 5% error tolerance. Which window to use
for it is not specified; window 3 is the smaller circuit.

### Accumulator-based (`accum_fpmul`, `accum_mant`)

A 48-bit accumulator adds one partial product per clock cycle. Iteration i
adds `{mant_a & {24{mant_b[23-i]}}, (23-i)'b0}`. Iteration 1 also adds the
hidden-bit term `mant_a << 23`, so k=1 finishes in one cycle. After iteration
k the accumulator holds `mant_a × mant_b[23:23-k]` scaled to 46 fraction
bits.

Handshake: `start_i` is accepted when `busy_o` is low. It samples `a_i`,
`b_i` and `k_i`; a `k_i` outside 1..23 is clamped into that range. `done_o`
pulses exactly **k cycles** after the start edge. `p_o` then holds the result
until the next start. There is an asynchronous active-low reset. The
handshake, the reset and folding the hidden-bit term into iteration 1 are
choices of this implementation.

### Reconfigurable adder-based (`reconfig_fpmul`)

The unit is built from two 24×M sub-multipliers, with M = k_low+1:

```
 sub-multiplier 1:  a1                 × b1[upper M bits]   --> shift left M --+
 sub-multiplier 2:  high ? a1 : a2     × (high ? b1[next M bits]               |--> full adder --> product 1
                                              : b2[upper M bits])  ------------+        (high: sum, low: gated)
                                                                   \--------------------> product 2 (low mode)
```

- **High accuracy mode.** Both halves work on pair 1. The adder joins them into
  one product that uses 2M bits of `b1`, so k_high = 2M−1.
- **Low accuracy mode.** Each sub-multiplier serves its own pair at
  k_low = M−1. The adder's second input is gated to zero. Product 1 keeps the
  same scaling as in high mode, and product 2 leaves on a separate port.

`K_LO` = 1, 2 or 3 gives the three evaluated pairs: k=1 & 3, 2 & 5 and 3 & 7.
The default is 3, i.e. k=3 & 7 with window-3 rounding. This is the
best-performing option at a 3% tolerance.

**Mode selection** (`accuracy_mode_sel`):

- A predicted level below `THRESHOLD` asks for low mode.
- The unit is offered pair 1 and, when `pair2_valid_i` is set, pair 2. It
  chooses low mode when pair 1 and the offered pair 2 are both below the
  threshold, and then multiplies both pairs in the same operation.
- Otherwise pair 1 runs alone in high mode. `p2_valid_o` stays low, and the
  source must offer pair 2 again.
- `force_i`/`force_high_i` override the predictions. This is for applications
  that want one accuracy for every pair.

The default threshold is 4, which is k_low+1. With it, every pair gets at
least the level the estimator asked for. Thresholds of 2, 3 and 4 were
evaluated; the pairing rule and the default are choices of this
implementation.

With rounding, `b1` is rounded at k_high in high mode and at k_low in low
mode. `b2` is always rounded at k_low.

## Number format

The operands and results are IEEE-754 single precision. The approximation
concerns only the mantissas, so the sign and exponent handling, and the
treatment of special values, are choices of this implementation:

- Subnormal operands count as zero.
- Results below the normal range flush to signed zero.
- Exponent overflow gives a signed infinity.
- NaN, or infinity × 0, gives `7FC00000`.
- The final product is truncated, never rounded.

## Accuracy

`tb/tb_error_rate.sv` multiplies 2000 pairs drawn uniformly from (0,100) with
all 18 fixed-k configurations. It compares the mean relative error with
published figures for the same experiment:

| k | no rounding | window 3 | window 5 | published (none / 3 / 5) |
|---|---|---|---|---|
| 1 | 16.48 % | 10.95 % | 10.95 % | 16.30 / 11.10 / 11.10 |
| 2 | 8.65 % | 4.95 % | 4.95 % | 8.40 / 4.95 / 4.90 |
| 3 | 4.49 % | 2.70 % | 2.37 % | 4.50 / 2.82 / 2.80 |
| 4 | 2.31 % | 1.41 % | 1.24 % | 2.30 / 1.36 / 1.30 |
| 5 | 1.13 % | 0.72 % | 0.65 % | 1.10 / 0.71 / 0.70 |
| 6 | 0.57 % | 0.36 % | 0.32 % | 0.50 / 0.35 / 0.30 |

`tb/tb_runtime_workload.sv` runs the same kind of data set through the
run-time designs at a 5% tolerance. An oracle stands in for the estimator: it
predicts the smallest k that meets 5% on each pair. The test checks the
following:

- Every product of the accumulator design stays within 5%. Its mean latency is
  about 2.3 cycles.
- Without rounding, every pair that the reconfigurable design can reach stays
  within 5%.
- k=3 & 7 with rounding needs about 1060 operations for 2000 pairs, because
  almost half of its operations produce two products.

The exact numbers depend on the random seed.

## Files

| file | contents |
|---|---|
| `rtl/fpmul_pkg.sv` | widths, `fp32_t`, level-of-accuracy type, `mant_of()` |
| `rtl/window_round.sv` | truncation and window rounding of `b`, k at run time |
| `rtl/simple_adder_mant.sv`, `rtl/simple_adder_fpmul.sv` | fixed-k multiplier |
| `rtl/accum_mant.sv`, `rtl/accum_fpmul.sv` | iterative multiplier |
| `rtl/sub_multiplier.sv`, `rtl/reconfig_adder.sv`, `rtl/reconfig_mant.sv` | reconfigurable mantissa datapath |
| `rtl/accuracy_mode_sel.sv`, `rtl/reconfig_fpmul.sv` | mode selection, reconfigurable multiplier |
| `rtl/fp_assemble.sv` | sign, exponent, normalisation, special values |
| `rtl/rtaa_fpmul_top.sv` | the three units side by side, each with its own ports |
| `tb/fpmul_ref_pkg.sv` | integer reference model, used by every testbench |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_error_rate.sv`, `tb/tb_runtime_workload.sv` | the accuracy experiments above |

The top module `rtaa_fpmul_top` brings out each unit's ports with a prefix:
`s_` for the simple unit, `acc_` for the accumulator unit and `rc_` for the
reconfigurable unit. The level-of-accuracy predictions (`acc_k_i`,
`rc_k1_pred_i`, `rc_k2_pred_i`) are inputs. The estimator itself is not part
of this RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
Example, for the end-to-end test of the top at its default parameters:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/fpmul_pkg.sv tb/fpmul_ref_pkg.sv tb/tb_rtaa_fpmul_top.sv \
    --top-module tb_rtaa_fpmul_top
./obj_dir/Vtb_rtaa_fpmul_top
```

Replace the testbench name to run any other test. The packages must come
first on the command line.

## Limits and departures

- **The error estimator is not included.** It is a k-nearest-neighbour
  classifier trained offline. Its training data are labelled with a cost
  function: area × delay × power, weighted by (1 + error) between a lower and
  an upper error bound, and infinite above the upper bound. No hardware form
  of the classifier is defined, so its predictions are inputs here.
- **Area, delay and power** were reported elsewhere for a different synthesis
  flow. They are not reproduced.
- **Combinational timing.** The simple and reconfigurable units have no
  registers. The accumulator unit takes one partial product per cycle. Add
  pipeline registers where a target clock needs them.
- **Choices of this implementation:** the bounded-carry reading of window
  rounding, window 3 as the default wherever rounding is used, the
  low-mode output arrangement of the reconfigurable adder, the pairing rule
  and the default threshold, and the floating-point wrapper with its
  special-value rules.
- **Only operand `b` is approximated.** Approximating both operands would need
  a different datapath, and none is provided.
