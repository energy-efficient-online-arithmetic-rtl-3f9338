# Pipelined online sum-of-products with reduced working precision

Deep-learning layers come down to inner products: many multiplications whose results are
summed. In conventional binary arithmetic the clock period of a multiplier or adder tree grows
with the operand width, because carries run from the least to the most significant bit. This
design uses **online arithmetic** instead. Operands and results are signed-digit numbers, and
every unit works *most significant digit first*. A unit with online delay δ produces result digit
*j* once it has seen operand digits up to *j + δ*. No carry ever crosses a whole word.

Each unit here is **unrolled into a digit-level pipeline**. Every iteration of the online
recurrence becomes a register stage. The clock period is therefore that of one small digit
slice, whatever the operand width or the number of products, and a new operand set can enter
on every clock.

The multiplier also runs at **reduced working precision**. An online multiplier only needs about
p = ⌈(2n+5)/3⌉ fractional bits of its residual to stay exact to the last output digit. Its
pipeline stages are therefore built with just the bits they need. Precision grows while operand
digits arrive and shrinks again during the last stages. The unused digit slices are simply not
there.

The top level, `ol_sop`, combines NUM = 16 such multipliers (8-digit operands) with a tree of
pipelined online adders. It computes

    S = (x_0*y_0 + ... + x_15*y_15) / 16

with a new set of 16 pairs every cycle. The most significant result digit appears 12 cycles
after the set, and one more digit follows every cycle.

## Number format

- **Digits.** Every digit is a radix-2 signed digit in {-1, 0, 1}. It is carried on two wires,
  `p` and `m`, and its value is `p - m` (struct `ol_pkg::sd_t`). The code `11` is never produced
  and reads as 0.
- **Operands.** An n-digit operand is a fraction: x = Σ x_i·2^-i for i = 1..n. Index 0 of a
  digit vector is the most significant digit x_1. Operands therefore lie in (-1, 1), and a
  number can have several representations.
- **Internal words.** Inside the multiplier, words are two's complement in a common frame of
  n+2 bits: two integer bits and n fractional bits. Bit n+1 weighs -2, bit n weighs 1, and
  fractional position i sits at bit n-i. This applies to the converted operands, the
  carry-save residual and the adder outputs. A stage that keeps only f fractional bits holds
  the bits below position f at constant zero. Synthesis removes them.

## The online multiplier

### Recurrence

The multiplier computes z = x·y with online delay δ = 3. It runs iterations j = -3 .. n-1.
Let x[j] be the value of the first j digits of x. Each iteration does:

    v[j]    = 2·w[j] + (x[j]·y_{j+4} + y[j+1]·x_{j+4}) · 2^-3
    z_{j+1} = SELM(v̂[j])            (only for j >= 0)
    w[j+1]  = v[j] - z_{j+1}

The residual is kept in carry-save form (WS, WC). The two products of a word by a digit come
from the selectors: pass, complement, or zero. A complement needs a +1 ulp, which is added as
the free carry-in bit of the carry-save adder rows:

| Piece | File | What it does |
|---|---|---|
| On-the-fly converter | `ol_otfc` | Keeps x[j] as two words: Q = x[j] and QM = x[j] - ulp. Appending a digit is a 2:1 selection plus writing one bit, with no carry. |
| Selector | `ol_selector` | Digit × word gives the word, its complement, or 0. It raises the negation ulp `neg_o` when the digit is -1. |
| [4:2] adder | `ol_csa42` | Two rows of full adders add A, B, WS and WC. The ulp cy (A negated) enters the first carry row and cx (B negated) the second, both at the stage's least significant kept bit. |
| Selection slice | `ol_sel_slice` | A 4-bit carry-propagate adder forms v̂ = v₋₁v₀.v₁v₂ from the top of the carry-save pair. |

The selection slice then picks the digit:

| v̂ | z |
|---|---|
| ≥ 1/2 | 1 |
| -1/2 .. 1/4 | 0 |
| ≤ -3/4 | -1 |

Subtracting z from v̂ only flips v₀ (v₀* = v₀ XOR |z|), so the new residual keeps one integer bit.

### Unrolling

`olm_pipelined` unrolls the recurrence into n+3 register stages, one `olm_stage` per iteration j.
The stages come in three kinds, fixed at elaboration:

- **Initialization, j = -3..-1.** Converter, selectors and adder, but no output digit.
- **Recurrence, j = 0..n-4.** The full stage. It emits z_{j+1}.
- **Last δ stages, j = n-3..n-1.** All operand digits have been used, so only the residual
  shift and the selection slice remain.

Stage j consumes operand digit j+4. Operands arrive in parallel, so `ol_staircase` delays digit
k by k cycles. Each operand pair then travels down the pipeline with its own digits. The product
leaves as a stair-case: z_1 comes 4 cycles after the operands and z_k comes k+3 cycles after
them. One new product can start every clock.

### Reduced working precision

`ol_pkg::frac_bits(j, n, p)` gives the number of fractional bits stage j keeps:

- It starts at 4 bits (j = -3).
- It grows by one bit per stage, up to n, while j ≤ p-3.
- At j = p-2 it drops to p.
- At j = p-1 it drops by 3.
- After that it drops by 1 per stage.

The stages discard the bits below this limit. For the two sizes used most:

| n | p | fractional bits for j = -3 .. n-1 |
|---|---|---|
| 8 | 7 | 4 5 6 7 8 8 8 8 7 4 3 |
| 16 | 13 | 4 5 6 7 8 9 10 11 12 13 14 15 16 16 13 10 9 8 7 |

Truncating to p bits keeps the error of the n-digit product below 2^-n. It also keeps every
k-digit prefix within 2^-k of x·y. Both bounds were checked with a bit-level model of the
stages for n ≥ 8, and randomly in simulation up to n = 32. Below n = 8 the bound no longer holds,
so `olm_pipelined` asserts N ≥ 8.

The 16-digit multiplier reproduces a well-known step-by-step example digit for digit:

- x = 0.66644287109375 and y = -0.3156280517578125;
- product digits 0 -1 0 1 -1 0 1 0 0 1 -1 0 1 0 -1 1;
- z = -13785/65536.

## The pipelined online adder

The serial online adder (online delay 2) uses two full adders per digit. Here it is unrolled
over digit positions.

- **Module 1** (`ola_module1`) of position i adds x⁺, ¬x⁻ and y⁺. It produces a transfer h,
  which goes combinationally to position i-1. Its sum g is registered.
- **Module 2** (`ola_module2`) of position i adds g, ¬y⁻ and the transfer from position i+1.
  The result is t and w.
- **Result digits.** Digit d is (w of position d-1, registered twice; ¬t of position d,
  registered once). The new leading digit takes h of position 0, and the final digit is
  (w of the last position, 0).

Inputs are stair-case timed: digit i of a pair comes i cycles after digit 0. Under that timing,
every transfer meets the same operand pair it belongs to. A W-digit sum has W+1 digits. Digit d
appears d+2 cycles after digit 0 of the operands (`ola_pipelined`).

## Adder tree and the SoP unit

`ola_tree` adds NUM stair-case operands in log2(NUM) levels of pipelined adders. NUM must be a
power of two.

- Each level adds one leading digit and is read again as a fraction, so the tree output is
  (Σ operands)/NUM.
- The output has W + log2(NUM) digits.
- Each level adds 2 cycles of latency.

`ol_sop` puts it all together:

    x_i, y_i (parallel) -> NUM x olm_pipelined -> ola_tree -> stair_o   (MSD-first stream)
                                                              -> ol_staircase (reversed) -> sum_o

| Output | Meaning | Latency after the set (NUM=16, N=8) |
|---|---|---|
| `stair_o[d]` | result digit d, stair-case | 4 + 2·log2(NUM) + d = 12 + d |
| `stair_valid_o` | marks digit 0 of a valid set | 12 |
| `sum_o` | all WS = N + log2(NUM) digits together | 4 + 2·log2(NUM) + WS - 1 = 23 |
| `sum_valid_o` | marks `sum_o` | 23 |

**Throughput.** One set per clock, with no gaps required between sets. `in_valid_i` only drives
the valid flags. The datapath always computes.

**Which output to use.** The stream `stair_o` is what a following online unit would consume: it
can start on digit 0 eleven cycles before the last digit exists. The re-aligned word `sum_o` is
for ordinary logic.

**Accuracy.** Each product is within 2^-N of exact. The tree adds exactly, so
|S - Σx·y/NUM| < 2^-N.

**Reset.** Synchronous and active high. It puts every stage into the state of an all-zero
operand pair.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `ol_sop` | `NUM` | 16 | products per set (power of two) |
| | `N` | 8 | operand digits |
| | `P` | ⌈(2N+5)/3⌉ | multiplier working precision |
| `olm_pipelined` | `N`, `P` | 16, 13 | operand digits, working precision |
| `ola_pipelined` | `W` | 8 | operand digits |
| `ola_tree` | `NUM`, `W` | 16, 8 | operands, digits per operand |
| `ol_staircase` | `NDIG`, `REVERSE` | 16, 0 | digits, skew or de-skew |

`P` is exposed so the precision rule can be explored, but only P = ⌈(2N+5)/3⌉ is verified.

## How large it gets

The default `ol_sop` synthesizes to roughly 10.8k cells, with about 7.5k flip-flops spread
through the pipeline registers.

The unit is built for convolution layers arranged as matrix products (im2col). An output pixel
of a K×K kernel over T_n input channels is a dot product of P = K·K·T_n pairs. The unit that
computes it needs NUM ≥ P, padded with zeros up to a power of two.

As an example, AlexNet's layer 3 with T_n = 5 and K = 3 has P = 45, which fits NUM = 64. A full
layer tile needs T_m such units in parallel. For AlexNet that comes to 4,000 to 17,000
multipliers per layer. That is far more than one default unit, so the testbench below runs one
output channel on a reduced feature map.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog if it hangs. Stimulus
is random through `$urandom`, and reference values are computed independently in the
testbench with integers.

| Testbench | What it checks |
|---|---|
| `tb_ol_otfc` | Converter chains against the integer value of the digits so far. Q and QM = Q - ulp. |
| `tb_ol_selector`, `tb_ol_csa42` | Word × digit and the 4-input sum with ulps, modulo the frame, above the kept LSB. |
| `tb_ol_sel_slice` | All 256 top-bit combinations: digit rule, new residual, and v = z + w. |
| `tb_ol_staircase` | Per-digit delays, forward and reversed. |
| `tb_olm_stage` | Stages of all three kinds from random consistent states, against the recurrence. |
| `tb_olm_pipelined` | 16-digit multiplier with back-to-back pairs. The worked example digit by digit, every prefix error bound, and exact digit timing. |
| `tb_olm_sizes` | The same bounds for n = 8, 24 and 32. |
| `tb_ola_module1`, `tb_ola_module2` | The full-adder modules and their register stages. |
| `tb_ola_pipelined`, `tb_ola_tree` | Exact sums, and sum/NUM for the tree, under stair-case timing. |
| `tb_ol_sop` | The top at its defaults: bursts and gaps, latencies 12 and 23, stream equal to parallel output, error < 2^-8. It counts back-to-back sets, sets after idle cycles, negative digits, extreme operands, each result digit value and early leading digits, and fails if any of them never happened. |
| `tb_ol_sop_sizes` | 32- and 128-product units: latency and error bound. |
| `tb_sop_conv_layer` | A 3×3×5 convolution (one output channel, 8×8 output pixels) streamed as one receptive field per clock through a 64-input unit. Checks each pixel against the exact convolution, one pixel per clock, and the total cycle count. |

To run one of them with Verilator 5, list the package first:

    verilator --binary --timing -Wall -Wno-fatal rtl/ol_pkg.sv \
        $(ls rtl/*.sv | grep -v ol_pkg) tb/tb_ol_sop.sv --top-module tb_ol_sop
    ./obj_dir/Vtb_ol_sop

The default `tb_ol_sop` builds in well under a minute. `tb_ol_sop_sizes` takes about two minutes
to build, because it holds 160 multipliers.

## Design choices and departures

**Stage count.** The multiplier pipeline has n+3 stages, one per iteration from j = -3. A
version with only n stages, starting at j = 0, is sometimes described. It would have to fold
the three initialization iterations into the first stage.

**Selector negation.** A selector's negation ulp is raised exactly when its digit is -1 (m=1,
p=0). Taking it as x⁺·¬x⁻ instead would add the ulp for positive digits.

**Constant zeros instead of narrower words.** The working-precision reduction is expressed as
constant-zero low bits in a common word frame, not as words of different widths. This keeps
every stage's code identical. Synthesis removes the constant bits, so the hardware matches a
stage built at its own width.

**Additions of this design.** These are added around the arithmetic path:

- the parallel re-aligned result `sum_o`;
- the valid flags;
- the input stair-case shifter inside the multiplier;
- the N ≥ 8 and power-of-two assertions.

Latencies count from the cycle the parallel operands are presented. They therefore include the
stair-case skew, unlike a count from the first digit's arrival.

**Not included.**

- The non-pipelined (iterative) online multiplier and serial online adder, which are only the
  starting point for the unrolled designs.
- Conventional multipliers and parallel adders, which serve only for comparison.
- A complete CNN accelerator: buffers, tiling control and layer-to-layer pipelining are not
  part of this RTL.

**Lint warnings left standing.** `-Wall` reports the following; none affects the logic:

- `vhat_o` of `ol_sel_slice` is an observation port.
- The operand inputs of the last δ multiplier stages are unused. Those stages have no operand
  digits left.
