# Dynamic approximate BF16 × FP8 multiply-accumulate for mixed-precision inference

Neural-network inference tolerates small arithmetic errors, and most of the
cost of a floating-point multiplier is the mantissa multiplication. This
design replaces that multiplication by an addition (Mitchell's logarithmic
approximation) and adds back part of the missing term with a tiny 3×3-bit
multiplier that can be switched on or off **per operand at run time**:

| mode | what is computed for the significand | cost |
|------|--------------------------------------|------|
| NC (no correction) | `1 + mA + mB` | one adder |
| LPC (low-precision correction) | `1 + mA + mB + hi3(mA)·mB + 2^-7` | adder + 3×3 multiplier |

The multiplier takes a 16-bit feature (activation) and an 8-bit weight,
produces a 16-bit product, and sits in front of a floating-point accumulator
and a ReLU. A network can then run its sensitive layers (typically the first
ones) in LPC and the rest in NC, or choose the mode per weight, without any
re-quantisation between layers.

The design follows a master's thesis on dynamic approximate multipliers for
mixed-precision inference; the multiplier's structure, its two modes, the
number formats and the weight conversion are taken from it. Where the thesis
is silent (control signals, exception rules, the accumulator's internals)
the choices are this design's own; they are listed in
[Own choices and departures](#own-choices-and-departures).

## Number formats

| name | bits | layout (sign / exponent / mantissa) | bias | used for |
|------|------|------------------------------------|------|----------|
| FP32 | 32 | 1 / 8 / 23 | 127 | weights and biases as trained |
| BF16 | 16 | 1 / 8 / 7  | 127 | features, products, biases, results |
| FP8  | 8  | 1 / 4 / 3  | 7   | weights inside the multiplier |

* An exponent field of 0 means **zero** in every format; subnormals are not
  used (they are flushed to +0 wherever they would arise).
* There is no Inf or NaN. An all-ones exponent is an ordinary value in FP8
  (code 15 = 2^8) and in BF16 inputs; results never exceed the largest finite
  BF16 value `0x7F7F` (they saturate).
* FP8 keeps exactly the FP32 exponents 121..135 (code = FP32 exponent − 120),
  so its range is 2^-6 … 1.875·2^8.

The types are `fp32_t`, `bf16_t` and `fp8_t` in `rtl/amul_pkg.sv`; the mode
is the enum `amul_mode_e` (`MODE_NC = 0`, `MODE_LPC = 1`).

## The approximate multiplication

Write the operands as A = (1+x)·2^ea and B = (1+y)·2^eb with fractions
0 ≤ x, y < 1. The exact product is (1 + x + y + xy)·2^(ea+eb). Mitchell's
method drops `xy`, because log2(1+x) ≈ x, so the log of the product is
approximately ea + eb + x + y. The error is always towards zero and at most
1/9 (at x = y = 1/2).

**Sign and exponent** are exact: the sign is the XOR of the operand signs,
and the biased result exponent is

    e = exp_A + exp_B − 7 − scale (+1 if the significand overflowed)

(7 removes the FP8 bias so the result carries the BF16 bias; `scale` is
explained below).

**Mantissa** (`amul_mant_unit`, all in units of 2^-7, the BF16 mantissa LSB):

1. `sum = mA + (mB << 4)` — the 3-bit weight mantissa is aligned to the top
   of the 7-bit feature mantissa.
2. LPC only: `s = sum + 2·(mA[6:4] · mB) + 1`. The 3×3 product of the top
   three mantissa bits of both operands (`amul_err_corr`) estimates `x·y`
   with an LSB of 2^-6; the `+1` (2^-7) offsets the bias of truncating the
   feature mantissa to three bits. In NC, `s = sum`.
3. If `s < 128` the significand `1 + s/128` is below 2 and `s` is the
   mantissa. Otherwise the product moved up one binade, the exponent is
   incremented, and
   * NC: mantissa = `s − 128`. In the log domain 2^(1+f) ≈ 2·(1+f), so the
     excess is **not** halved.
   * LPC: mantissa = `(s − 128) >> 1`, because (1+x+y+c)/2 = 1 + (s−1)/2 in
     fractions.

   `s` can reach 338 (x = 127/128, y = 7/8), so it is kept at nine bits.

Worked example: feature 1.5 (`0x3FC0`, mA = 64), weight 1.5 (`0x3C`, mB = 4):

* NC: sum = 64 + 64 = 128 ≥ 128, so the exponent is incremented and the
  mantissa is 0. Result 2.0, 11.1 % below the exact 2.25.
* LPC: s = 128 + 2·(4·4) + 1 = 161, so the mantissa is (161−128)>>1 = 16.
  Result 2·(1 + 16/128) = 2.25, which is exact.

Over every weight and feature mantissa, measured against the exact product
of the same operands, the mean relative error is about 3.8 % in NC and
1.0 % in LPC. The worst NC error is Mitchell's 1/9. These figures are
printed by `tb_approx_mul`.

**Exception processing** (`amul_exception`): a zero operand, or a result
exponent ≤ 0, gives +0. A result exponent ≥ 255 gives ±`0x7F7F`.

## Power-of-two weight scaling

Weights are often much smaller than 1. The narrow FP8 range (2^-6 and up)
would flush many of them to zero. A signed exponent `scale` (6 bits,
−32..31) therefore multiplies each weight by 2^scale when it is converted
to FP8. The multiplier subtracts the same `scale` from the product
exponent. The two shifts cancel, so no re-quantisation step and no
calibration data are needed: only the choice of one integer per layer.
The top level uses one `scale` input for both shifts.

## Weight and bias conversion

`fp32_to_fp8` maps bits without rounding:

* it adds `scale` to the FP32 exponent;
* a result of ≤ 120 (or a zero/subnormal input) gives +0;
* a result above 135 is clamped to code 15 and keeps its mantissa;
* in all cases the mantissa is truncated to its top three bits.

`fp32_to_bf16` keeps the top 16 bits of a bias and flushes subnormals.

## Accumulator

`fp_accumulator` keeps its running sum in a 24-bit float: the BF16 sign and
exponent with a 15-bit mantissa (`GUARD_W = 8` extra bits). The extra bits
keep truncation error small over long dot products. The adder is a plain
single-cycle design:

1. swap the operands so the larger magnitude comes first;
2. shift the smaller one right, keeping guard, round and sticky bits;
3. add or subtract;
4. renormalise by one right shift, or by a leading-zero count and left shift;
5. truncate.

Underflow and exact cancellation give +0; overflow saturates. The output is
the sum with its mantissa truncated to 7 bits. Each dot product starts from
its bias: the first term is added to the bias, not to the previous sum.
This is the expensive part of the MAC. A fixed-point (Kulisch-style)
accumulator with delayed normalisation would be cheaper, but is not built
here.

## Layer datapath and timing (`scheme2_top`)

```
 weight FP32 ──► fp32_to_fp8 (×2^scale, truncate) ──► FP8 ─┐
 feature BF16 ─────────────────────────────────────────────┤ approx_mul (NC/LPC, ×2^-scale)
                                                           ▼
 bias FP32 ──► fp32_to_bf16 ──► BF16 ──► fp_accumulator (starts from bias)
                                                           ▼
                                         bf16_relu (relu_en) ──► result BF16
```

Ports: `clk`, `rst_n` (active-low, asynchronous), `in_valid`, `in_first`,
`in_last`, `feature[15:0]`, `weight[31:0]`, `bias[31:0]`, `mode`,
`scale[5:0]` (signed), `relu_en`, `out_valid`, `result[15:0]`.

* Stream one dot product's terms with `in_valid`. Idle cycles (in_valid low)
  may appear anywhere.
* Mark the first term with `in_first`; the bias is taken in that cycle.
* Mark the last term with `in_last`; `relu_en` is taken in that cycle.
* `mode` and `scale` belong to each term, so the mode can change from one
  weight to the next.
* `out_valid` is high for one cycle, two clock cycles after the cycle that
  carried `in_last`. `result` holds the finished value in that cycle.
* Throughput is one term per cycle. The next dot product may begin in the
  cycle right after `in_last`.

```
cycle      0      1      2      3      4
in_valid   1      1      1      0      0
in_first   1      0      0
in_last    0      0      1
product    -      p0     p1     p2            (approx_mul register)
acc        -      -      b+p0   +p1    +p2
out_valid  0      0      0      0      1      result = relu(b+p0+p1+p2)
```

Sub-module timing: `approx_mul` has one input register and answers one
cycle after its operands. `fp_accumulator` adds one register stage.

## Module map

| file | role |
|------|------|
| `amul_pkg.sv` | formats, mode enum, constants |
| `scheme2_top.sv` | layer datapath, top level |
| `approx_mac.sv` | multiplier + accumulator |
| `approx_mul.sv` | approximate multiplier (input register, sign XOR, the four units below) |
| `amul_input_reg.sv` | operand/mode/scale register |
| `amul_exp_unit.sv` | exponent adder and carry adder |
| `amul_err_corr.sv` | 3×3 correction multiplier |
| `amul_mant_unit.sv` | mantissa adder, correction adder, overflow handling |
| `amul_exception.sv` | zero, underflow and overflow handling |
| `fp_accumulator.sv` | 24-bit floating-point accumulator |
| `fp32_to_fp8.sv` | weight conversion with up-scaling |
| `fp32_to_bf16.sv` | bias truncation |
| `bf16_relu.sv` | activation with bypass |

## Own choices and departures

Each RTL file's opening comment also says which parts follow the thesis and
which are this design's own.

* **HPC mode is not built.** A high-precision mode that multiplies six
  mantissa bits of each operand exists for 16 × 16-bit operation. With a
  3-bit weight mantissa, LPC already uses every weight bit, so this design
  (like the thesis's hardware) has only NC and LPC. A 16 × 16-bit variant is
  not built.
* **Widths.** The exponent sum is kept as a 10-bit signed value (a 9-bit
  path would wrap on underflow). The corrected mantissa sum is 9 bits (an
  8-bit path would lose the largest LPC sums).
* **Exceptions** (zero, underflow to +0, saturating overflow, no Inf/NaN),
  the scaling width, reset, and the valid/first/last control are this
  design's choices.
* **Accumulator internals** (24-bit format read as BF16 plus 8 mantissa
  bits, guard/round/sticky alignment, truncation) are this design's
  reading of "a naive floating-point accumulator of 16 + 8 bits".
* **One scale** drives both the weight up-scaling and the product
  down-scaling. Separate values would be a one-line change.
* **Activation** is ReLU with a bypass for layers without one.
* **Not included:** storage for weights, biases and features, and layer
  sequencing. Terms are streamed in through ports. Residual additions and
  pooling are also left to the surrounding system. The INT8 fixed-point
  baseline the thesis compares against is not part of this design.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Reference values come from
`tb/amul_ref_pkg.sv`, which works from the format definitions with integers
and reals, independently of the RTL structure.

| testbench | what it checks |
|-----------|----------------|
| `tb_amul_exp_unit` | exhaustive exponents × carry, a spread of scales |
| `tb_amul_err_corr` | exhaustive 3×3 products, both modes |
| `tb_amul_mant_unit` | exhaustive mantissas, both modes, against real-valued significands |
| `tb_amul_exception` | exponent sweep −300..300, zero operands |
| `tb_amul_input_reg` | load enable, valid timing, reset |
| `tb_approx_mul` | all FP8 weights × all feature mantissas, 20 000 random operands with scaling, underflow and overflow; bit-exact, one-cycle latency, error statistics |
| `tb_fp_accumulator` | 400 random sequences within truncation error; cancellation, saturation, underflow |
| `tb_fp32_to_fp8`, `tb_fp32_to_bf16`, `tb_bf16_relu` | conversions and activation against real-valued references |
| `tb_approx_mac` | 300 random dot products, idle gaps, back-to-back starts, two-cycle latency |
| `tb_scheme2_top` | 12 small layers (NC, LPC, per-weight mixed; scaled and unscaled; with and without ReLU) at default parameters |
| `tb_cnn1_conv1` | first layer of the small CNN on a 32×32×3 image, in LPC, in NC and with LPC only for the largest tenth of weights: every output against the bit-level model; LPC must be closer than NC to the exact FP32 layer |
| `tb_cnn_inference` | full forward passes of the small CNN, the medium CNN, ResNet9 and MobileNetV2 (first layer LPC, rest NC), about 57 million MACs |

`tb_scheme2_top` also counts every mechanism it triggers and fails if one
never occurs:

* NC and LPC products, and a mode switch within one dot product;
* mantissa overflow in both modes;
* weight scaling, weight underflow and weight clamping;
* zero features;
* ReLU clipping and ReLU bypass;
* back-to-back dot products and idle gaps.

Accumulated results are checked against an exact double-precision sum. The
allowed error is (terms + 2) · max|partial| · 2^-14 plus one BF16 step.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/amul_pkg.sv tb/amul_ref_pkg.sv tb/tb_scheme2_top.sv \
    --top-module tb_scheme2_top
./obj_dir/Vtb_scheme2_top
```

Replace the testbench name to run any other. Most testbenches run in
seconds; `tb_cnn_inference` takes about a minute.

## Using it in a network

The single MAC performs one multiply-accumulate per cycle, so a network
takes as many cycles as it has multiply-accumulates. The counts below are
per 32×32 CIFAR-10 image and are exercised by `tb_cnn_inference`:

| network | MACs per image | longest dot product |
|---------|----------------|---------------------|
| small CNN (3 conv + 1 linear) | 2,811,904 | 1,024 |
| medium CNN (3 conv + 2 linear) | 11,375,616 | 2,048 |
| ResNet9 | 18,317,632 | 304 |
| MobileNetV2 (CIFAR variant) | 24,484,096 | 1,280 |

The accumulator has no length limit. A practical accelerator would
instantiate many `approx_mac`s in parallel and add weight and feature
memories around them. Operations outside the datapath are left to the
surrounding system:

* Max pooling is done outside. Global average pooling can be run as a dot
  product with weights 2^-k.
* A residual addition can be folded into the block's last dot product as one
  extra term with weight 1.0 in NC mode, which is exact. In LPC mode that
  term would gain 2^-7.
* ReLU6 needs an upper clamp at 6, which is not built.

`tb_cnn_inference` uses pseudo-random weights, not trained ones, so the
logit errors it prints say nothing about classification accuracy.

A good mixed-precision policy follows layer sensitivity:

* Run the first layer in LPC. First layers are small and the most
  sensitive.
* Run the large later layers in NC.
* Per-weight selection is also possible, for example LPC only for weights
  of large magnitude. With the untrained, evenly spread weights of
  `tb_cnn1_conv1` this gains nothing in output error (LPC on 8 % of the
  products). Any benefit depends on trained weights, where a few large
  ones dominate.
