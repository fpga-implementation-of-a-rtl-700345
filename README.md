# Binary32 floating-point cube root (Newton-Raphson, sequential)

This core computes the cube root of an IEEE 754-2008 single-precision
(binary32) number. It does not divide the exponent with a divider or take
the root digit by digit. It splits the work into two parts:

* **Exponent.** The unbiased exponent is written as `3n + r` with a small
  ROM. The root's exponent is then `n`. The remainder `r` becomes a
  multiplication by one of four constants: cbrt(2), cbrt(4), 1/cbrt(2) or
  1/cbrt(4).
* **Significand.** The significand, read as a fraction `c` in [0.5, 1),
  goes to a Newton-Raphson cube root unit. The iteration
  `x' = (2x + c/x^2) / 3` needs a division. The unit replaces it with a
  second Newton-Raphson iteration for the reciprocal, `y' = y(2 - x*y)`,
  so it only needs multipliers, an adder, a subtractor and a multiply by
  the constant 1/3.

The core handles one operation at a time. With the default iteration counts
it takes 19 clock cycles from operand to result: two reciprocal steps
(3 cycles each), one cube root step (4 cycles) and nine one-cycle stages
around them.

All RTL is SystemVerilog-2017 in `rtl/`. Every module has a self-checking
testbench in `tb/`.

## Data flow and cycle budget

Take a normal operand `X = (-1)^S * M * 2^Iexp`. Here `M` is the 24-bit
integer significand (hidden one restored) and `Iexp = E - 127 - 23`.
`M/2^24` is a fraction `c` in [0.5, 1), so

```
cbrt(X) = (-1)^S * cbrt(c) * cbrt(2^24) * cbrt(2^Iexp)
        = (-1)^S * cbrt(c) * 2^8 * 2^(+-n) * cbrt(2^r)^(+-1),   |Iexp| = 3n + r
```

`start` is sampled on edge t. Each stage below writes its register on the
edge shown:

| edge  | stage | module | what happens |
|-------|-------|--------|--------------|
| t     | 1 | `fp_decoder` | split S / E / T, restore the hidden one, classify (zero, inf, qNaN, sNaN, normal) |
| t+1   | 2 | `exp_index` | `Iexp = E - 150`, its sign, `\|Iexp\|` as the ROM address |
| t+2   | 3 | `exp_div3_rom` | 151 x 8-bit ROM gives `n` (6 bits) and `r` (2 bits); `Pexp = n` |
| t+3   | 4 | `cbrt_unit` (seed) | `c = M` read as UQ0.24 enters the unit, which reads its two seed ROMs |
| t+4 .. t+13 | | `rec_block` x2, `cr_block` x1 | Newton-Raphson iterations, 3+3+4 cycles |
| t+14  | 5 | `cr_scale` | `rQ' = rQ * K(r, sign)`, `Pexp'` multiplexer |
| t+15  | 6 | `q_normalize` | 32-bit `Q` with its MSB set, exponent update, LSB/G/R/STK |
| t+16  | 7 | `fp_rounding` | `add_one`, round to nearest, ties to even |
| t+17  | 8 | `q_update` | `Fcr = Q[31:8] + add_one`, biased `Fexp` |
| t+18  | 9 | `fp_encoder` | pack binary32, special results, flags; `done` rises |

A register that samples `done` does so at edge t+19. In general the latency
is `9 + CR_ITER * (3*REC_ITER + 4)` cycles.

## The exponent path (the subtle part)

For a **non-negative** `Iexp`, the root is `cbrt(c) * 2^8 * 2^n * cbrt(2^r)`.
For a **negative** `Iexp`, it is `cbrt(c) * 2^8 * 2^-n / cbrt(2^r)`.

Stage 5 picks the constant `K` and a partial exponent `Pexp'`:

| sign(Iexp) | r   | K (UQ1.23)          | Pexp'               |
|------------|-----|---------------------|---------------------|
| +          | 0   | 1                   | n                   |
| +          | 1,2 | cbrt(2), cbrt(4)    | n                   |
| -          | 0   | 1                   | ~n + 1 = -n         |
| -          | 1,2 | 1/cbrt(2), 1/cbrt(4)| ~n = -n - 1         |

The last row uses the one's complement `~n`, which is one less than the
true exponent `-n`. Stage 6 adds that one back.

Stage 6 normalises `rQ' = rQ * K`. This is a 56-bit UQ1.55 number, and
`rQ` lies in [0.79, 1):

* **Integer bit set** (`rQ' >= 1`). This happens only for `Iexp >= 0` with
  `r != 0`. `Q` is the top 32 bits, so `0.Q = rQ'/2`, and the exponent
  gains one.
* **`rQ'` in [0.5, 1).** `Q` is taken one bit lower, so `0.Q = rQ'`.
* **`rQ'` just below 0.5.** This can happen when the root estimate is a
  hair under cbrt(0.5) and is then multiplied by 1/cbrt(4). `Q` is taken
  two bits lower and the exponent loses one.

After stage 6 the result is exactly `0.Q * 2^(Pexp + 8)`. Stage 8 then gives
`Fexp = Pexp + 7 + 127`, plus one when rounding carries out of 24 bits.

Worked example, `X = 8.0`:

* `E = 130`, `M = 2^23`, so `Iexp = -20 = -(3*6 + 2)`, giving `n = 6` and
  `r = 2`.
* `c = 0.5`, so `rQ ~ 0.7937`. `K = 1/cbrt(4)`, so `rQ' ~ 0.5`.
* `Pexp' = ~6 = -7`, and the compensation gives `Pexp = -6`.
* The result is `0.5 * 2^2 = 2.0`.

If the unit returns `rQ` a few units below cbrt(0.5), then `rQ'` falls just
under 0.5 and the third case applies. Rounding then carries out and gives
2.0 again. The end-to-end testbench counts this case.

## The Newton-Raphson unit (`cbrt_unit`)

**Seeds.**

* `cr_seed_rom`: 32 words of 22 bits. Its address is the five bits of `c`
  after the leading one. Word `i` holds cbrt(0.5 + i/64), rounded up to 24
  bits, with the two leading ones dropped, so `CR0 = .11 & word`.
* `rec_seed_rom`: 32 words of 23 bits. Its address is the five bits of
  `CR0` after its leading one. Word `i` holds 1/(0.5 + i/64), rounded up,
  with the leading one dropped. The first entry saturates.

Both tables are computed at elaboration from these formulas, so no data
files are needed.

**`rec_block`** computes `y' = 2y - x*y^2` in 3 cycles:

1. square and `2y`;
2. multiply by `x`, truncated to 48 bits;
3. subtract.

Its result is given truncated to 24 bits (UQ1.23, fed back) and to 32 bits
(UQ1.31, passed on).

**`cr_block`** computes `x' = (2x + c*y^2)/3` in 4 cycles:

1. square `y`, truncated to UQ1.23;
2. multiply by `c`;
3. align `2x` and add (49 bits);
4. multiply by `round(2^32/3)`.

The result saturates just below 1.0. This matters because the iteration
approaches the root from above and may reach 1.0 for `c` near 1.

**Sequencing.** The multiplexers select the seed on the first pass and the
fed-back value afterwards (`n0`/`n1` = 0 or > 0). Each block is started in
the same cycle its predecessor reports `done`, so no cycle is lost between
steps.

With `CR_ITER > 1`, each cube root iteration starts its reciprocal again
from `REC0` and runs `REC_ITER` steps. Keeping the previous `y` and running
a single step instead converges much worse: about 7e-5 relative error
against 3e-7.

## Accuracy

The error is set by the 5-bit seed. The seed is up to about 1% off, and one
cube root step roughly squares that relative error. Measured against real
arithmetic (`tb_cbrt_iterations`):

| REC_ITER | CR_ITER | latency | max relative error |
|----------|---------|---------|--------------------|
| 1 | 1 | 16 | 1.8e-4 |
| 2 | 1 | 19 | 1.05e-4 (default) |
| 3 | 1 | 22 | 1.05e-4 |
| 2 | 2 | 29 | 3.2e-7 |

So the default 19-cycle configuration is good to about 13 bits, not to a
few ULPs of the 24-bit significand. To get close to full single precision,
either use `CR_ITER = 2` (29 cycles) or enlarge the seed tables.

The published description of this architecture claims +/-3 LSB with the
default configuration. This implementation does not reach that, and the
arithmetic above suggests one cube root step cannot.

## Special operands

| operand | result |
|---------|--------|
| +-0, and subnormals (flushed to zero) | +-0 |
| +-infinity | +-infinity |
| quiet NaN | the same NaN |
| signalling NaN | quietened NaN, `invalid` = 1 |
| negative finite | negative root (the sign passes through) |

`overflow` and `underflow` come from the final range check
(`Fexp >= 255`, `Fexp <= 0`). For binary32 inputs the root's exponent always
lies between 85 and 169, so in the full core both flags stay low. Only
`tb_fp_encoder` exercises them.

The computation runs even for special operands, so the latency is always
the same.

## Interface of `cbrt_fp32`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | rising-edge clock, asynchronous active-low reset |
| `start` | in | 1 | operand valid; ignored while `busy` |
| `x` | in | 32 | operand |
| `busy` | out | 1 | operation in progress |
| `done` | out | 1 | one-cycle pulse: `result` and the flags are valid (they hold until the next `done`) |
| `result` | out | 32 | binary32 cube root |
| `invalid`, `overflow`, `underflow` | out | 1 | exception flags |

Parameters: `REC_ITER` (default 2) and `CR_ITER` (default 1). The package
`cbrt_pkg` holds the formats, the scaling constants and the operand-class
enum.

Fixed-point formats (UQa.b = a integer bits, b fraction bits):

| signal | format |
|--------|--------|
| `c`, `x` | UQ0.24 |
| `rq` | UQ0.32 |
| `y` | UQ1.23 and UQ1.31 |
| `K` | UQ1.23 |
| `rQ'` | UQ1.55 |

## Files

| file | contents |
|------|----------|
| `rtl/cbrt_pkg.sv` | widths, constants, `fp_class_e`, `fp_decoded_t` |
| `rtl/cbrt_fp32.sv` | top: nine stages around the unit, stage registers, handshake |
| `rtl/fp_decoder.sv` | binary32 decoder and classifier |
| `rtl/exp_index.sv` | Iexp and ROM index |
| `rtl/exp_div3_rom.sv` | 151-word `n & r` ROM |
| `rtl/cbrt_unit.sv` | Newton-Raphson unit controller and multiplexers |
| `rtl/cr_seed_rom.sv`, `rtl/rec_seed_rom.sv` | seed tables |
| `rtl/rec_block.sv`, `rtl/cr_block.sv` | the two iteration datapaths |
| `rtl/cr_scale.sv` | constant multiply and `Pexp'` selection |
| `rtl/q_normalize.sv` | Q normalisation, LSB/G/R/STK |
| `rtl/fp_rounding.sv` | round to nearest even |
| `rtl/q_update.sv` | increment, final significand and exponent |
| `rtl/fp_encoder.sv` | packing, special results, flags |

Each module `m` has a testbench `tb/tb_m.sv`.

* `tb/tb_cbrt_fp32.sv` runs the full core at its default parameters. It
  applies directed operands, every exponent, every special class and 3000
  random operands, and checks values, latency and mechanism coverage.
* `tb/tb_cbrt_iterations.sv` compares four iteration settings side by side.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/cbrt_pkg.sv \
          tb/tb_cbrt_fp32.sv --top-module tb_cbrt_fp32 -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. Only the
package has to be listed first. Replace `tb_cbrt_fp32` with any other
testbench name. Every testbench ends
with a line `TB_RESULT checks=N failures=M`, and has a watchdog. Once
built, the full core test runs in well under a second.

## Departures from the published description

* **Cycle formula.** The description prints the cycle count as
  `9 + 2*n_iter_rec + n_iter_cr`. That does not give its own figure of 19
  cycles. The RTL uses `9 + CR_ITER*(3*REC_ITER + 4)`, which gives 19 for
  the published configuration.
* **Second block operands.** The description and its datapath figure
  disagree about them. The RTL follows the iteration formula:
  `y^2` times `c`, plus `2x`, times 1/3.
* **Accuracy.** About 1e-4 relative error at 19 cycles, not +/-3 LSB (see
  Accuracy above).
* **Cube root seed address.** Row `i` of the seed table holds
  cbrt(0.5 + i/64), so the RTL addresses it with the five bits after the
  leading one of `c`. The published worked example skips two leading ones
  instead and reads row 16 for 0.875. That row holds cbrt(0.75). The RTL
  reads row 24.
* **Reciprocal seed address.** The RTL uses the five bits after the first
  leading one of `CR0`. That is what the published worked example and seed
  table imply; one sentence says "after the two leading ones".
* **Seed rounding.** The seed tables are rounded up, which matches the
  legible rows of the published table.
* **Final exponent.** The published rule uses offsets of +9/+8. The RTL
  follows the value instead: `Fexp = Pexp + 7 + bias`, +1 on rounding
  carry.
* **Extra normalisation case.** The `rQ' < 0.5` case of stage 6 is not in
  the description.
* **Adder width.** The adder in `cr_block` is 49 bits wide, not 48.
* **Sticky bit.** As described, it covers only `Q[5:0]`. Bits of `rQ'`
  below `Q` are dropped.
* **Design choices not in the description.** The fixed-point formats, the
  handshake, the reset, the subnormal flush and the NaN handling.
* **Not included.** The soft-processor co-processor wrapper and its link,
  and the FPGA-specific mapping of the multipliers to DSP slices. The
  multipliers are plain `*` operators.
