# SSFPM: approximate single-precision multiplier by static segmentation

Most of the power of a floating-point multiplier goes into the 24 x 24 bit
mantissa product. This design makes that product much smaller. It gives up a
controlled amount of accuracy and keeps the sign, the exponent and the
IEEE 754 single-precision format exact. The architecture is the static
segmented floating-point multiplier (SSFPM) and its corrected variant (cSSFPM)
of G. Di Meo, G. Saggese, A. G. M. Strollo, D. De Caro and N. Petra,
"Approximate Floating-Point Multiplier based on Static Segmentation",
*Electronics* 11, 3005 (2022). The SystemVerilog here is an independent
implementation of that description. It is not the authors' code.

Three ideas make it work:

1. **Drop the implicit ones.** Instead of `P = (1+Ma)(1+Mb)` the unit computes
   `P' = P - 1 = Ma*Mb + Ma + Mb`. The multiplier now sees plain 23-bit
   fractions with no bit stuck at 1, so they can be segmented.
2. **Static segmentation.** Each mantissa is cut down to one M-bit segment. If
   its top `23-M` bits (the *control segment*) are all zero, the low segment
   `m[M-1:0]` is used and nothing is lost. Otherwise the high segment
   `m[22:23-M]` is used and the low `23-M` bits are dropped. The *selection
   flag* `alpha` records which segment was used.
3. **Segment and truncate.** A plain segmented multiplier needs a shifter
   after the product and a second adder. Here the operands of the multiplier
   and of the adder are truncated before the operation instead, so that the
   product and both addends share one LSB. The whole multiply-and-add becomes
   a single `(M/2) x (M/2)` product summed with two M-bit addends in one
   carry-propagate adder. One two-way shift at the end restores the weight.

`M` is the single accuracy knob, fixed at design time. The published design
is evaluated for M = 12 to 21. The default here is M = 12 with the correction
term on (cSSFPM, M = 12), the configuration published with the largest power
and area saving.

## Datapath

```
 a[31] b[31] ---------------- XOR ----------------------------- Sc ----+
 a[30:23] b[30:23] --- exponent_adder (Ea+Eb-127) ------------- esum --+
 a[22:0]  b[22:0]  --- ssmaa (segmented Ma*Mb+Ma+Mb [+E*]) ---- P'[47:22]
                                                                       |
                        ===== pipeline register (stage_q) =====        |
                                                                       v
   P'[47:22] -> mantissa_normalizer -> sel, 24 bits -> mantissa_rounder -> Mc
   esum, sel -> exponent_update (esum + sel)                            -> Ec
```

| module | role |
|---|---|
| `ssfpm` | top: arithmetic stage, one pipeline register, normalization logic |
| `ssmaa` | static segmented multiply-and-add (segmentation, truncation, fused sum, final shift) |
| `ssmaa_correction` | error-compensation term E* for the corrected variant |
| `exponent_adder` | `Ea + Eb - 127` |
| `mantissa_normalizer` | `sel = P'[47] \| P'[46]` and selection of the 24 bits to round |
| `mantissa_rounder` | 24-bit add of one LSB, upper 23 bits kept |
| `exponent_update` | `Ec = esum + sel` (sel on the carry-in, no multiplexer) |
| `ssfpm_pkg` | widths (`NE = 8`, `NM = 23`, `NQ = 22`, `PW = 26`), `fp32_t`, `arith_stage_t` |

### Interface and timing of `ssfpm`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset; clears only `out_valid` |
| `in_valid` | in | 1 | `a`, `b` hold an operand pair |
| `a`, `b` | in | 32 (`fp32_t`) | operands, IEEE 754 single precision |
| `out_valid` | out | 1 | `c` holds the product of the pair given one cycle earlier |
| `c` | out | 32 (`fp32_t`) | approximate product |
| `alpha_a`, `alpha_b` | out | 1 | segment flags of that product (for observation) |

Operands are sampled on a rising edge, and the result is valid after that same
edge: latency 1 cycle, one result per cycle. The register sits between the
arithmetic stage and the normalization logic, as in the published design. The
normalization logic is combinational on the output side. A clock cycle
therefore holds the normalization plus whatever logic follows the multiplier.
There is no stall or back-pressure: the unit takes a new pair every cycle.

## The segment-and-truncate table (the heart of `ssmaa`)

Let `seg_a` be the M-bit segment chosen for `Ma`, and likewise `seg_b` for
`Mb`. With `{alpha_a, alpha_b}` as the row, the multiplier and adder inputs are:

| flags | multiplier a | multiplier b | addend a | addend b | P'ssm LSB weight | final shift into P'[47:22] |
|---|---|---|---|---|---|---|
| 00 | `seg_a >> 12` | `seg_b >> 11` | `seg_a` | `seg_b` | 2^-23 | `NM - NQ` = 1 |
| 01 | `seg_a >> 12` | `seg_b >> 11` | `seg_a >> (23-M)` | `seg_b` | 2^-M | `2NM - M - NQ` = 24 - M |
| 10 | `seg_a >> 12` | `seg_b >> 11` | `seg_a` | `seg_b >> (23-M)` | 2^-M | 24 - M |
| 11 | `seg_a >> floor(M/2)` | `seg_b >> ceil(M/2)` | `seg_a` | `seg_b` | 2^-M | 24 - M |

Why these shifts work: the sum must have the LSB weight of the larger
addend. In row 00 both addends have LSB 2^-23, and the product has LSB 2^-46.
Dropping 12 + 11 = 23 bits from its inputs brings it to 2^-23. In row 11 both
addends have LSB 2^-M and the product has 2^-2M, so M bits are dropped, split
between the inputs. In the mixed rows the unsegmented addend is also shifted
down to 2^-M. Every product of truncated inputs then lands on the same column
as the addends. The multiplier widths are `max(ceil(M/2), M-12)` and
`max(floor(M/2), M-11)`, which is 6 x 6 for M = 12. In row 00 with M = 12 the
product term is empty: a 12-bit segment has no bit left after dropping 12.

`P'ssm = mult_a*mult_b + add_a + add_b (+ E*)` is an (M+2)-bit sum. Because
`0 <= P' < 3`, its top two bits never read `11`. Only `P'[47:22]` is ever
formed: the 22 LSBs would be discarded by normalization anyway, which also
shrinks the final shift multiplexer.

Example (M = 12), `1.5 x 1.5`: both mantissas are `0x400000`, so both flags
are 1 and `seg = 0x800`. The multiplier sees `0x20 x 0x20 = 0x400`, the adder
adds `0x800 + 0x800`, and P'ssm = `0x1400`, i.e. 1.25 at LSB 2^-12. P = 2.25,
which is exact.

## Normalization without forming P

`P' = P - 1` has integer bits `00`, `01` or `10`. The true product `P` is in
`[2, 4)` exactly when either is set, so `sel = P'[47] | P'[46]`. The fraction
bits of P and P' are equal, and the one integer bit of P that survives a
right shift by one is `P[46] = ~P'[46]`. The normalizer therefore outputs
`P'[45:22]` when `sel = 0` and `{~P'[46], P'[45:23]}` when `sel = 1`, and `sel`
increments the exponent. The rounder adds one unit at the round bit and keeps
the upper 23 bits (round half up).

In the segmented multiplier the round bit is always 0, for every M from 12
to 22, so the rounder never changes the value. With flags 00 the product is
below 1 (sel = 0) and the round bit P'[22] is cleared by the final shift of
1. In the other rows the shift is `24 - M >= 2`, which clears P'[23:22].
It is kept because it belongs to the architecture, and it starts to matter if
`NQ` is lowered.

## Error correction (cSSFPM)

The largest error occurs when both segments are high (row 11): the multiplier
then ignores the truncated lower part `eps` of each operand. The dominant
missing term is `UPa*eps_b + UPb*eps_a`. Each `eps` is estimated from its own
MSB as `(2*msb + 1) * 2^(width-1)`. After a further simplification, the
compensation adds bit `k` of P'ssm as

```
c_k = (ma[23-KA+k] & mb[23-KB-1]) | (mb[23-KB+k] & ma[23-KA-1])
```

with `KA = ceil(M/2)` and `KB = floor(M/2)`, the numbers of bits each operand
gives the multiplier. Only the `NCORR` most significant columns are kept
(default 2, starting at `k = KA-1`). The term is applied only in row 11. It
costs a handful of AND/OR gates feeding the existing adder.

## Accuracy

Mean relative error distance (MRED) over 4e5 random operand pairs, next to
the published values (from `tb_ssfpm_error_metrics`). The odd values of M between these rows
fall on the same smooth curves. MRED depends only on the mantissas. The
published error means normalized to the largest representable product (NMED
and similar) also depend on how the exponents are drawn, so they are not
reproduced here.

| M | SSFPM here | published | cSSFPM here | published |
|---|---|---|---|---|
| 12 | 3.404e-3 | 3.41e-3 | 1.449e-3 | 1.45e-3 |
| 14 | 1.680e-3 | 1.68e-3 | 7.07e-4 | 7.08e-4 |
| 16 | 8.28e-4 | 8.28e-4 | 3.479e-4 | 3.48e-4 |
| 18 | 4.045e-4 | 4.05e-4 | 1.723e-4 | 1.73e-4 |
| 21 | 1.40e-4 | (plot only) | 8.36e-5 | 7.96e-5 |

The largest relative error seen is 5.0e-3 for the default (cSSFPM, M = 12),
and it falls roughly by half for every two added bits of M. The analytic
bound used by the tests is `2^(1-M/2) + 2^(2-M)`. Only the mantissa product
is approximated; the sign and exponent logic is exact. A mantissa that fits in the low segment and whose product term truncates to
zero gives an exact result; `-13.140625 x 1.0` is one example.

## Applications

Three testbenches use the multiplier for every product of an image-processing
kernel, with sums, divisions and other arithmetic done exactly. Each one
compares the result with the same computation using exact single-precision
products. The test images are generated inside the testbenches (gradients,
discs, texture, noise), so the PSNR values are close to the published ones
but not expected to match them exactly. PSNR is in dB; "exact" means no
pixel differs.

| kernel | SSFPM M=12 | published | cSSFPM M=12 | published | cSSFPM M=14 | published |
|---|---|---|---|---|---|---|
| Gaussian 5x5, sigma 2 | 53.3 | 55.5 | 57.3 | 60.4 | 63.4 | 64.4 |
| Sobel edges | 72.5 | 71.9 | 75.0 | 76.4 | exact | exact |
| JPEG, Q = 40 | 45.8 | 45.6 | 53.5 | 52.9 | 62.8 | 55.4 |
| JPEG, Q = 70 | 48.5 | 46.9 | 59.7 | 53.0 | 64.8 | 56.7 |
| JPEG, Q = 100 | 49.5 | 49.7 | 55.3 | 57.8 | 57.8 | 60.2 |
| HDR tone mapping, beta = 0.5 | 55.9 | 46.2 | 58.5 | 53.9 | 61.3 | 58.6 |

The JPEG bench uses the baseline luminance quantization table, scaled for the
quality Q in the usual way. Tone mapping uses the global operator
`L = beta/Lm * Ltmp`, `Lmap = L/(1+L)`. Each colour channel is weighted by
`Lmap/Ltmp` and scaled to 0..255. The generated HDR image is smoother than a
photograph, which explains the higher PSNR for that row.

## What the design does not do

- **Special values.** Zero, infinity, NaN and denormals get no special
  treatment: every input is read as a normal number with an implicit one. The
  8-bit exponent wraps modulo 256 on overflow or underflow. The published
  datapath has no such logic, and its error analysis leaves denormals out. A
  product of zero therefore comes out as a tiny nonzero number.
- **Rounding carry.** The rounder's carry-out is dropped, as in the published
  datapath. With the default `NQ` this never happens (see above).
- **Only the multiplier.** The image filtering, JPEG and tone-mapping
  applications use it as the multiplication unit only. Their adders,
  storage and other arithmetic are not part of this RTL. The testbenches
  above model them in behavioural code.
- **Zero operands.** The application testbenches treat a product with a zero
  factor as zero outside the multiplier, because the multiplier has no zero.

## Choices made where the architecture leaves room

- Default configuration M = 12 with correction, 2 correction columns.
- `in_valid`/`out_valid` and the reset of the valid bit, which clears only
  `out_valid`. The datapath registers have no reset.
- The selection flags are brought out as ports.
- Odd M: in row 11, `Ma` gives the multiplier `ceil(M/2)` bits and `Mb`
  `floor(M/2)`. The correction's top column then holds only the `Ma` term.
  This reproduces the published odd-M accuracy curve within a few per cent.
  Giving `Ma` the smaller half instead, as a table of the original also
  suggests, changes nothing for even M.
- The correction columns are the two most significant ones, applied only
  when both flags are set. For M <= 14 the term is zero in the other rows
  anyway.
- The fused partial-product matrix is written as a single expression
  `a*b + c + d + e`. Building one carry-save tree with one final adder is
  left to synthesis.

## Parameters

| parameter | default | range | effect |
|---|---|---|---|
| `M` | 12 | 12..22 | segment width; accuracy versus size |
| `CORRECTION` | 1 | 0/1 | add the compensation term (cSSFPM) |
| `NCORR` | 2 | 1..ceil(M/2) | correction columns kept |

## Testbenches

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_ssfpm` | end to end at default parameters: 2e5 random pairs with idle cycles, bit-exact against the reference model, latency 1, error bound, directed exact cases; counts each flag row, normalization, non-zero correction, idle cycles and reset |
| `tb_ssfpm_error_metrics` | the accuracy workload: 20 configurations (M = 12..21, with and without correction) side by side; MRED against the published numbers, monotonic in M, correction always helps |
| `tb_ssfpm_image_filter` | Gaussian and Sobel filtering of a generated 48x48 image through three builds; PSNR >= 50 dB, correction and larger M help, M = 14 edges exact |
| `tb_ssfpm_jpeg` | DCT / quantize / inverse DCT of a generated 32x32 image at Q = 40, 70, 100 through three builds; PSNR >= 40 dB, correction helps |
| `tb_ssfpm_tone_mapping` | tone mapping of a generated 40x40 HDR image through three builds; PSNR >= 40 dB, correction helps |
| `tb_ssmaa` | the multiply-and-add for M = 12, 15, 16, 18, all flag rows |
| `tb_ssmaa_correction` | E* for M = 12 and M = 15, and disabled |
| `tb_exponent_adder`, `tb_exponent_update` | exhaustive |
| `tb_mantissa_normalizer`, `tb_mantissa_rounder` | random plus corner cases, against P = P' + 1 and integer rounding |

`tb/ssfpm_ref_pkg.sv` holds the reference model. It recomputes the result
from the segmentation equations on whole 48-bit quantities: common scale of
the addends, floored multiplier inputs, and E* as
`2^(46-M-2) * sum 4*c_k*2^k`. It normalizes from `P = P' + 1` directly
rather than through the `sel` trick.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ssfpm_pkg.sv tb/ssfpm_ref_pkg.sv tb/tb_ssfpm.sv --top-module tb_ssfpm
./obj_dir/Vtb_ssfpm
```

Each run takes seconds. Replace the testbench file and top name for the
others. To change the configuration, set the parameters on the `ssfpm`
instance, for example `ssfpm #(.M(16), .CORRECTION(1'b0))`.
