# Approximate arithmetic units: block-truncated integers, log-domain estimation, data hiding

Much of the energy of an arithmetic unit goes into bits that barely change the
result. This RTL holds three small, independent designs built on that idea.
They follow the methods of a thesis on approximate computing for low power.

1. **Approximate integer format (AIF).** An N-bit integer is split into B
   blocks of K bits. A few *sentinel bits* mark which blocks carry information.
   Only the PC most significant valid blocks enter a narrow adder or
   multiplier, and a cheap rounding step keeps the error unbiased or bounded.
   This is the main design.
2. **Log-domain estimation.** Floating-point values are mapped to a short
   fixed-point log2 word. Multiply, divide, root, power and min/max become
   additions, shifts and compares. Addition and subtraction are *estimated*
   with a small correction table. The estimates decide whether a branch of a
   data-flow graph is negligible, meaning it can be skipped. A vector unit
   estimates whole dot products.
3. **Information hiding in a float multiplier.** The P least significant
   mantissa bits of a single-precision product are given up. They carry a
   keyed checksum of the operands instead, at a bounded loss of precision.

`approx_top` places the three side by side, each with its own ports
(`aif_*`, `le_*`, `ld_*`, `ih_*`). A fourth group (`am_*`) is a float
multiplier that keeps 10 mantissa bits: the cheap unit that recomputes the
graph nodes the log-domain check did not cut. A fifth (`fx_*`) converts
fixed-point data to and from the log domain. They share only the clock and an
asynchronous active-low reset.

## 1. The approximate integer format

### Valid blocks and sentinel bits

Block *i* holds bits `[iK+K-1 : iK]`.

- For an unsigned number, a block is *valid* when it, or any block above it,
  is non-zero.
- For a two's-complement negative number, "non-zero" becomes "contains a 0".
  The upper blocks of a negative number are all ones and carry no more
  information than leading zeros do.

The sentinel `st[B-1:0]` is therefore a thermometer code. `st[i]` is 1 for
every block at or below the leftmost valid block. `aif_sentinel` builds it
from one K-bit OR or NAND detector per block and an OR over the blocks above.
For example, with N=32, B=8, K=4, the value `0x0001_2345` has five valid
blocks: `st = 0001_1111`.

### Storage word

`aif_encode` and `aif_decode` convert between an integer and the stored form
`{sign, st[B-1:0], payload[(B-1)K-1:0]}`. This is 37 bits at the defaults.

- The payload holds the B-1 most significant blocks that can be valid.
- When all B blocks are valid, block 0 is dropped. It is truncated, not
  rounded: storage costs one block of precision only for full-width values.
- The sign bit lets a short negative value be sign-extended again on decode.

The encoder is where the sentinel is produced. In the engine this happens in
the fetch stage, so the arithmetic stage gets the sentinels for free.

### Approximate addition (`aif_adder`)

1. OR the two sentinels; the leftmost 1 is the top block *t*.
2. Take blocks *t … t-PC+1* of both operands, the *window*. If fewer than PC
   blocks are valid, the window starts at block 0 and the sum is exact.
3. Add the two PC·K-bit windows with one more carry-in. The carry-in is the
   AND of the two most significant *dropped* bits. This is *efficient
   rounding*: one AND gate instead of a rounding adder. It always
   underestimates, by less than 2^t + 2^(t-1) for t dropped bits.
4. Shift the window sum back. The bits below the window are zero.
5. Unsigned: a carry out of the window sets the next sentinel bit. A carry
   out of the top block raises `ovf`.

   Signed (`is_signed`): the windows carry one extra sign bit. `ovf` means the
   sum left the signed N-bit range. The result sentinel is regenerated from
   the sum, because adding numbers of opposite sign can remove valid blocks.

The rounding carry is what keeps long accumulations usable. In a 40-term
Fibonacci recurrence at PC=4, every term from the 25th to the 30th agrees with
the published relative errors to three digits; `tb_aif_fibonacci` checks
these.

Signed fixed-point arithmetic needs no changes to the units. The binary point
only matters when a result leaves the datapath. An 8×8 inverse DCT with Q14
basis values run entirely on the signed adder and multiplier recovers a
test image at 24 dB PSNR with PC=2. With PC=4 and PC=6 it gets 59 dB, the
same as exact integer arithmetic (`tb_aif_idct`). Take a 16-point FFT on
23-bit inputs and compare it with the exact integer FFT. The average relative
output error is about 2e-2 at PC=2, 1e-4 at PC=4 and 2e-8 at PC=6
(`tb_aif_fft`). Nearest-centre clustering of overlapping 4-D clusters
misassigns 4% of points at PC=2 and none from PC=4 up (`tb_aif_kmeans`).

### Approximate multiplication (`aif_multiplier`)

1. Each operand is reduced to its own PC leading valid blocks with *classic
   rounding*: add the most significant dropped bit. This is unbiased.
2. A window of all ones can round up out of the window. It then becomes a
   single 1 one block higher, which is exact and still fits PC·K bits.
3. A PC·K × PC·K multiplier forms the product, and it is shifted back by the
   sum of the two window offsets.
4. For unsigned operands the product sentinel is n_A + n_B − 1 + Cout ones,
   where Cout tells whether the product reaches block n_A + n_B − 1. Signed
   products get a regenerated sentinel.

The relative rounding error of each operand is below 2^-(K(PC-1)+1). For
example, at K=4 and PC=2, 263 becomes 256 (−2.7% against a 3.125% bound).
The full 2N-bit product is returned: fixed-point rescaling belongs to the
user.

### Engine (`aif_engine`)

The engine has two pipeline stages and accepts one operation per cycle. The
result appears exactly two cycles later with `out_valid`. There is no
back-pressure.

| `in_op`   | operation                                     |
|-----------|-----------------------------------------------|
| `AIF_ADD` | A + B (unsigned, or signed with `in_signed`)  |
| `AIF_SUB` | A + (−B), always two's complement             |
| `AIF_MUL` | A × B (unsigned, or signed with `in_signed`)  |

- Stage 1 encodes both operands to storage words and registers them.
- Stage 2 decodes them and runs the adder or the multiplier.
- For add and subtract, `out_result` is the N-bit sum, sign- or
  zero-extended to 2N bits. `out_st[B-1:0]` is its sentinel and `out_ovf`
  its overflow.
- For multiply, `out_result` is the product and `out_st` its 2B sentinel
  bits.

Parameters are set in `aif_pkg`: N=32, B=8, PC=4 (K = N/B = 4). The source
evaluates PC from 2 to 6 without naming one. PC=4 is where clustering
reaches zero misclassified points, at about half the power.

## 2. Log-domain estimation

### Number format (`log_pkg`)

A log word is 14 bits: `{sign, L[12:0]}`. L = (log2|x| + 127) · 32 is an
8.5-bit fixed-point logarithm with the float's bias.

Converting from IEEE single precision needs no logic. The exponent is already
the integer part. The top five mantissa bits approximate the fraction, by
log2(1+m) ≈ m. Converting back is the same wiring in reverse (`to_log`,
`from_log`). The error is under 0.09 (log2(1+m) − m) plus the 1/32
truncation step.

Fixed-point data takes the same path through `fx_log_convert`:

- A leading-one detector gives the integer part of log2.
- The five bits under the leading one give the fraction.
- The recovery shifts {1, fraction} back by the exponent.

Its defaults are 32 bits in Q16.16. The result saturates, and values smaller
than the last fraction bit become 0.

### Operations (`log_alu`)

| op       | result                                          |
|----------|-------------------------------------------------|
| MUL, DIV | La ± Lb ∓ bias                                  |
| SQRT     | (La + bias) / 2                                 |
| POW n    | n·(La − bias) + bias                            |
| MAX, MIN | compare as signed real values                   |
| ADD, SUB | larger magnitude plus a correction term (below) |

Results saturate to exponents 0..254.

For ADD and SUB, ed = round(|La − Lb|), the distance in octaves:

- Like signs add: the larger magnitude is raised by 2^-ed (ed ≤ 5), using
  log2(1 + 2^-ed) ≈ 2^-ed.
- Unlike signs subtract: the larger magnitude is lowered by a table entry:

  | ed     | 0  | 1 | 2     | 3    | 4    | 5    | >5 |
  |--------|----|---|-------|------|------|------|----|
  | 1/32 s | 32 | 32| 14    | 6    | 3    | 1    | 0  |

  These approximate −log2(1 − 2^-ed) in units of 1/32 (ed=2 is 13.3, taken
  as 14). Entries 0 and 1 are clamped to one octave, since the exact values
  are unbounded or equal to 1.

The sign is that of the larger magnitude.

### Cutting a branch (`log_cut_check`)

Take an add, sub, max or min node with a dominant input I_d and a minor input
I_m. I_m is *non-critical* when f(I_d − I_m) ≥ δ in log units. f is the
identity for add and sub, and the absolute value for min and max. Multiply,
divide, root and power nodes are error-sensitive and never cut.

`log_estimator` puts conversion, ALU and cut check in one combinational path.
Software that walks a data-flow graph would call it once per node.

### Vector unit (`log_dot`)

A dot product Σ x_i·y_i is estimated in two passes over a buffer of up to
DEPTH=16 products:

1. **Load:** z_i = x_l + y_l − bias, while tracking the maximum m.
2. **Accumulate:** every z_i is compared with the same m, and 2^-round(m − z_i)
   is summed. The result is Z_l = m + Σ − 1.

Because every term uses the same reference, errors do not compound along the
vector. The estimate is good when a few terms dominate. It overestimates when
many terms are close to the maximum. Signs are ignored: this is a magnitude
estimate.

Handshake: pulse `start` with `len`, then present `len` pairs with
`in_valid`. `done` pulses 2·len+1 clock edges after `start` when the pairs
come one per cycle. `z_l` and `z_f` then hold until the next start.

As a use case, `tb_log_kmeans_cut` runs the conditional cut for clustering.
Each point's squared distance to every centre is first estimated with
`log_dot`, feeding each coordinate difference as both x and y. Only the
centres whose estimate lies within δ octaves of the smallest estimate are
then recomputed exactly. On 100 random points in 8 dimensions with 4
centres, δ = 1 skips 57% of the exact distance computations and misassigns
2% of points. δ = 2 skips 28.5% and misassigns none.

## 3. Information hiding (`fp_mul`, `info_hide`)

`fp_mul` is an IEEE-754 single-precision multiplier with round-to-nearest-even.
It flushes subnormals to zero, saturates to infinity and returns a quiet NaN
for invalid operations. Its parameter `MB` keeps only the top MB fraction
bits. The operands are cut, the significand multiplier shrinks to
(MB+1)×(MB+1) bits, and the product is rounded at MB bits. The default,
MB=23, is exact single precision. The top's `am_*` instance uses MB=10.

`info_hide` works as follows:

1. Clear the P=10 least significant mantissa bits of both operands.
2. Multiply the two operands.
3. With `embed_en`, replace the P low bits of the product with
   K_S = K_A ⊕ K_B ⊕ K_O ⊕ Key. Here K_A and K_B are the cleared operand bits,
   K_O the product's own low bits, and Key a P-bit secret.

A receiver holding Key and the operands can recompute K_S to authenticate the
value. Clearing P bits costs at most 2^(P−23) relative error per operand
(about 1.2e-4 at P=10). The embedded field adds up to 2^(P−23) more.

## Departures and choices

- **Lemma bound.** The source prints the multiplier's rounding bound as
  2^-(K(PC-1)+2), but its own example only satisfies 2^-(K(PC-1)+1). The
  testbench checks the latter, which is the true bound of round-half-up.
- **Signed and subtract.** The source defines negative valid blocks and says
  signed arithmetic works "similarly", without giving the adder or
  multiplier. The signed windows, the sign bit in the storage word, and
  subtraction as A + (−B) are this design's.
- **Division.** Approximate division is only named in the source and is not
  built.
- **Multiplier corner cases.** The window fold on a rounding carry-out, and
  saturation when both unsigned operands round up to 2^N, are not described
  in the source.
- **Unbuilt log-domain features.**
  - The graph-level cut algorithms (global, local, conditional) are software
    and are not built.
  - Of the 10-mantissa-bit float units, only the multiplier is built. How
    the 10 bits are obtained (truncate inputs, round output) is this
    design's reading.
- **Worked example.** The source's worked example prints 38.67124 for
  3.14159 × 12.31. These units give 38.670444 (Key = 0001010101), which is
  within the bound above.
- **Own choices.** Reset style, handshakes, latencies, `DEPTH` and the δ
  format are this design's own.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself, with a watchdog.

- The `*_ref_pkg.sv` files hold the reference models.
- `fp_ref_pkg` converts between `real` and float bit patterns without the
  simulator's shortreal support.

Packages come first on the command line:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/aif_pkg.sv rtl/log_pkg.sv tb/aif_ref_pkg.sv tb/log_ref_pkg.sv tb/fp_ref_pkg.sv \
  rtl/*.sv tb/tb_approx_top.sv --top-module tb_approx_top -o sim
./obj_dir/sim
```

Verilator ignores repeated files, so listing the packages twice is harmless.
Swap the last file and the top name for any other testbench:

| testbench           | what it covers                                                    |
|---------------------|-------------------------------------------------------------------|
| `tb_aif_sentinel`   | sentinel generation                                               |
| `tb_aif_codec`      | storage encode and decode                                         |
| `tb_aif_adder`      | adder: random unsigned and signed, error bound                    |
| `tb_aif_multiplier` | multiplier: random unsigned and signed, rounding bound            |
| `tb_aif_fibonacci`  | Fibonacci accumulation against published errors                  |
| `tb_aif_idct`       | 8×8 inverse DCT in signed fixed point at PC = 2, 4, 6 (PSNR)      |
| `tb_aif_kmeans`     | nearest-centre clustering at PC = 2, 4, 6 (mis-clustered share)   |
| `tb_aif_fft`        | 16-point FFT in signed fixed point at PC = 2, 4, 6 (relative error) |
| `tb_aif_engine`     | pipeline latency and op mix                                       |
| `tb_log_alu`        | log-domain ALU                                                    |
| `tb_log_cut_check`  | cut check                                                         |
| `tb_log_estimator`  | node estimator                                                    |
| `tb_log_dot`        | vector unit                                                       |
| `tb_log_kmeans_cut` | clustering with conditional cut at δ = 1, 2 (work saved, errors) |
| `tb_fx_log_convert` | fixed point to log word and back                                  |
| `tb_fp_mul`         | float multiplier against a real-number model                      |
| `tb_info_hide`      | hiding: key recovery and error bound                              |
| `tb_approx_top`     | end to end at default parameters                                  |

`tb_approx_top` counts more than twenty distinct mechanisms, among them:

- rounding carry, sentinel growth, overflow, window fold, dropped block;
- subtract, signed add and multiply;
- each log op, compensated and table-based adds;
- cut and kept inputs, vector runs, hidden and plain products;
- reduced-mantissa products that differ from full precision;
- fixed-point round trips through the log domain.

It fails if any mechanism never occurred. Each testbench runs in seconds.
