# Hybrid Approximate Adder (HAA)

Image filters, video codecs and recognition pipelines tolerate small
arithmetic errors, so their adders need not be exact in the low-order bits.
The hybrid approximate adder puts that to use. It adds the most significant
bits exactly and handles the rest with three cheaper approximations, each
cruder than the one above it. Most of the carry logic disappears: the only
carry chain left is in the exact upper part. Every low-order sum bit
settles after a few gate levels, however wide the adder is.

This repository holds synthesizable SystemVerilog for the adder, following
the architecture published as "High-Speed Approximate Adder Architecture for
Image Processing Applications" (D. P. Upendranath, K. Vankdoth). It also
holds self-checking testbenches, including an error-statistics run and an
image-sharpening run.

## The four regions

For an N-bit adder let P = N/4 - 1. The operand bits are split, from the
bottom up, into:

| region | bits (general) | bits (N = 16) | hardware | sum bits |
|---|---|---|---|---|
| CR, constant region | `[P-1:0]` | `[2:0]` | none | the constant `CORRECTION` |
| LSR, approximate region | `[2P-1:P]` | `[5:3]` | one OR gate per bit | `a \| b`, carries dropped |
| MSR, moderately significant region | `[3P-1:2P]` | `[8:6]` | chain of approximate full adders | see below |
| ASR, accurate significant region | `[N-1:3P]` | `[15:9]` | exact (N-3P)-bit adder | exact, carry in = `a[3P-1]` |

The ASR's carry out is the adder's carry out, so `{cout, sum}` approximates
`a + b`. The constant region ignores its operand bits completely. Its output
is 0 in the plain variant (HAA1) and 3 (binary 011) in the corrected variant
(HAA2). The constant 3 moves the mean error close to zero without adding
any gates.

## The approximate full adder

The MSR is built from a full adder that gives up two of its eight input
patterns to lose its carry logic (`rtl/approx_fa.sv`):

    sum   = A·(C + B') + C·B'
    carry = B

| A B C | sum carry | exact value | error |
|---|---|---|---|
| 0 0 0 | 0 0 | 0 | |
| 0 0 1 | 1 0 | 1 | |
| 0 1 0 | 0 1 | 1 | **+1** (gives 2) |
| 0 1 1 | 0 1 | 2 | |
| 1 0 0 | 1 0 | 1 | |
| 1 0 1 | 1 0 | 2 | **-1** (gives 1) |
| 1 1 0 | 0 1 | 2 | |
| 1 1 1 | 1 1 | 3 | |

The carry output is a wire, so a chain of these cells has no carry
propagation at all. The carry into cell i+1 is the B input of cell i.

## How the MSR is wired, and why the ASR's carry input is `a[3P-1]`

This is the least obvious part of the design. The cell is not symmetric in
A and B, and the published 16-bit diagram feeds operand bit `a[8]` into the
ASR as its carry input, even though that bit belongs to the MSR. This RTL
wires the MSR so that both facts hold together:

* cell i of the MSR gets operand bit `b[2P+i]` on its A pin, `a[2P+i]` on
  its B pin, and the previous cell's carry on its C pin;
* the carry into the lowest cell is 0, because the OR region below
  produces no carry;
* so the carry out of the MSR is its top cell's B pin, which is `a[3P-1]`:
  the bit the diagram shows entering the ASR.

In effect, the MSR predicts "a carry leaves this region exactly when the
top `a` bit is 1", and the ASR uses that prediction.

The pin assignment is an inference, not something spelled out in the
source. Two things support it. It makes the chain's carry out the bit the
diagram shows. It also reproduces the published accuracy figures (next
section). Feeding `a[i]` to pin A instead more than doubles the normalised
mean error distance (NMED, about 1.64e-3 instead of 0.70e-3) and no longer
matches them.

## Accuracy

`tb/tb_haa_error_analysis.sv` applies two million uniformly random operand
pairs. Error is exact minus approximate. NMED is the mean |error| divided by
2^(N+1) - 2. MRED is the mean of |error| / exact sum.

| configuration | mean error | NMED (1e-3) | MRED (1e-3) | published mean error / NMED / MRED |
|---|---|---|---|---|
| HAA1, N = 16 | 4.96 | 0.701 | 1.946 | 5.07 / 0.6 / 1.9 |
| HAA2, N = 16 | 1.96 | 0.695 | 1.930 | 1.87 / 0.69 / 1.9 |
| HAA1, N = 32 | -750 | 0.0427 | 0.118 | 65.32 / 0.002 / 0.004 |
| HAA2, N = 32 | -753 | 0.0427 | 0.118 | 58.32 / 0.002 / 0.005 |

The 16-bit results agree with the published ones. The 32-bit results do
not. With P = N/4 - 1 = 7, the 32-bit adder approximates 21 of its 32 bits.
The published 32-bit error figures point to a smaller approximate part, but
the source gives no other split. Also, the correction constant 3 was
derived for the 16-bit adder. Its 7-bit constant region would need a value
of its own, and none is given. So treat the 32-bit parameter setting as
"the same rule applied at N = 32", not as a reproduction of the published
32-bit adder.

The published area, power and delay (a 90 nm standard-cell library) are
not reproduced here.

## Use in an image filter

The target application is sharpening: `O = 2Z - W`, where W is a 5x5
Gaussian blur. Its kernel is

    1  4  7  4  1
    4 16 26 16  4
    7 26 41 26  7
    4 16 26 16  4
    1  4  7  4  1     (sum 273)

The 25 weighted pixels are accumulated with 24 additions, and those
additions are where the approximate adder goes. `tb/tb_sharpen.sv` does
this with the default 16-bit adder on a generated 256x256 image. It
compares the result with the same filter using exact additions and gets a
PSNR of about 37.8 dB. The published figures, about 40 to 41.5 dB, were
measured on real photographs, which are not used here.

Mind the word length. With 8-bit pixels the weighted sum can reach
273 × 255 = 69615, which does not fit in 16 bits. A 16-bit accumulator is
safe only for pixels up to 240 (273 × 240 = 65520), less the adder's own
positive error. The testbench limits pixels to 0..220 and fails if a carry
ever leaves the accumulator. For full 8-bit range, use N = 20 or more.
The constant region then widens with P, so the error grows too.

## Modules

| file | module | role |
|---|---|---|
| `rtl/haa_pkg.sv` | `haa_pkg` | functions `region_width(N)` = N/4-1 and `asr_width(N)` = N-3P |
| `rtl/haa_adder.sv` | `haa_adder` | top: the four regions wired together |
| `rtl/asr_adder.sv` | `asr_adder` | exact W-bit ripple-carry adder (ASR) |
| `rtl/exact_fa.sv` | `exact_fa` | exact full adder, the ASR's cell |
| `rtl/msr_adder.sv` | `msr_adder` | P-bit chain of approximate full adders (MSR) |
| `rtl/approx_fa.sv` | `approx_fa` | the approximate full adder |
| `rtl/lsr_or.sv` | `lsr_or` | P OR gates (LSR) |

`haa_adder` parameters:

* `N` (default 16) is the operand width. It must be a multiple of 4 and at
  least 8; elaboration-time assertions check this.
* `CORRECTION` (default 3, the HAA2 variant) is the constant-region value.
  Set it to 0 for HAA1. It must fit in P bits.

Ports: `a`, `b` (N bits) in; `sum` (N bits) and `cout` out. The adder is
purely combinational: there is no clock, no reset and no handshake, and
the result is valid one propagation delay after the operands. Lint reports
`a[P-1:0]` and `b[P-1:0]` as unused. That is expected: the constant region
does not read them.

The ASR is a plain ripple-carry chain because the source only asks for
"precise full adders" there. Any exact adder with the same function can
replace it, and will be faster at large N.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. They all use the reference model in
`tb/haa_ref_pkg.sv`. That model builds the adder region by region from
the cell's truth table (a lookup, not the gate equations), so it is
independent of the RTL. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/haa_pkg.sv tb/haa_ref_pkg.sv tb/tb_haa_adder.sv \
        --top-module tb_haa_adder -o sim
    ./obj_dir/sim

| testbench | what it covers |
|---|---|
| `tb_approx_fa` | all 8 patterns against the truth table; exactly one +1 and one -1 error |
| `tb_lsr_or` | OR region, exhaustive at P = 3, random at P = 7 |
| `tb_msr_adder` | MSR chain, exhaustive at P = 3 (both carry inputs), random at P = 7; carry out equals the top `a` bit |
| `tb_asr_adder` | exact adder, exhaustive at W = 7, random at W = 11 |
| `tb_haa_adder` | default 16-bit HAA2: corners plus 1,000,000 random pairs. Counts how often each approximation happens (constant region differs from the exact bits, carry dropped in the OR region, +1 and -1 cell errors, ASR carry input set, carry out set) and fails if any count is zero. Requires NMED and MRED near the published values. |
| `tb_haa_error_analysis` | the accuracy table above: 16- and 32-bit, HAA1 and HAA2, 2,000,000 pairs each |
| `tb_sharpen` | the sharpening filter above, with PSNR against exact additions |

Each testbench finishes in a few seconds.

## What is this design's own choice

These points follow from the published architecture only by inference,
or go beyond it:

* Which operand drives which pin of the approximate cells, and the 0 carry
  into the MSR. Both are inferred as explained above and confirmed by the
  error statistics.
* The generic block diagram draws a carry input at the constant region.
  That region outputs a constant, so it could not use one, and the adder
  has no carry input.
* The ASR structure (ripple carry) and the lack of any pipelining.
* The default `CORRECTION` = 3 is kept for every N, although it was derived
  for N = 16 only.
