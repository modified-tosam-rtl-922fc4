# TOSAM: a truncation-and-rounding approximate multiplier

TOSAM replaces the N x N array of an exact multiplier with a few small
operations. It builds on the fact that every non-zero magnitude can be written
as

    A = 2^kA * (1 + YA),    0 <= YA < 1,

where kA is the position of the leading one. The product is then

    A * B = 2^(kA+kB) * (1 + YA + YB + YA*YB).

TOSAM(h,t) approximates this in two ways:

* **Truncation.** YA and YB are cut to the `t` bits just below the leading one:
  `(YA)t` and `(YB)t`. These enter the sum as plain addends.
* **Rounding.** Only the cross term `YA*YB` needs a multiplier. Both factors
  are cut further, to their top `h` bits, and a `1` is appended. The result,
  `(Y)APX`, is an `h+1`-bit number that sits in the middle of its `1/2^h`
  interval. Rounding to the interval midpoint rather than truncating keeps the
  mean error close to zero.

The result is

    A * B ~ 2^(kA+kB) * (1 + (YA)t + (YB)t + (YA)APX * (YB)APX).

The only real multiplier left is (h+1) x (h+1) bits, whatever the operand width.
For that reason the design scales well to wide operands.

The main configuration is a 16-bit signed TOSAM(3,7), so h = 3 and t = 7. Of
the 256 partial products of an exact 16 x 16 multiplier, it keeps 31:
* 14 bits of (YA)t and (YB)t;
* 16 partial products of the 4 x 4 APX product;
* the leading 1.

Worked example: 11761 x 2482.
* 11761 = 2^13 x 1.0110111110001b, so (YA)t = 0.0110111 and (YA)APX = 0.0111.
* 2482 = 2^11 x 1.00110110010b, so (YB)t = 0.0011011 and (YB)APX = 0.0011.
* The mantissa is 1 + 55/128 + 27/128 + 7/16 x 3/16 = 441/256.
* The product is 441/256 x 2^24 = 28 901 376. The exact value is 29 190 802,
  so the error is 0.99 %.

## Datapath

The signed multiplier `tosam_mult` chains six units. All are combinational, and
there is no clock anywhere in the design.

```
 a ─► abs_approx ─► lod ──kA,KA──► trunc ─(YA)t─┐
                                                ├─► arith ─M─► shift ─► sign_zero ─► p
 b ─► abs_approx ─► lod ──kB,KB──► trunc ─(YB)t─┘          ▲ kA+kB        ▲ a, b
```

| Unit | Module | What it does |
|---|---|---|
| Approximate absolute value | `tosam_abs_approx` | For a negative operand, inverts the bits (one's complement, i.e. \|a\|-1) and drops the sign bit. The magnitude is N-1 bits wide. |
| Leading-one detector | `tosam_lod` | Outputs a one-hot `K[i] = I[i] & ~|I[W-1:i+1]`. An OR encoder turns it into the binary position `k`. |
| Truncation | `tosam_trunc` | Computes `(Y)t[m] = OR_j K[j] & I[j+m-t]`. The one-hot K drives a t-bit multiplexer directly, so no shifter is needed. |
| Arithmetic | `tosam_arith` | Computes `M = 1 + (YA)t + (YB)t + (YA)APX*(YB)APX`. `(Y)APX` is wiring plus a constant 1. |
| Shift | `tosam_shift` | Computes `floor(M * 2^(kA+kB))`, dropping the fraction. |
| Sign and zero | `tosam_sign_zero` | Forces the result to 0 if either operand is 0. Otherwise it negates the result when the operand signs differ. |

### Fixed-point widths

Most of what is hard to follow in this RTL is the bookkeeping of binary points.
All widths derive from `N`, `H` and `T`:

| Name | Value | Meaning |
|---|---|---|
| `W` | N-1 if signed, N if unsigned | magnitude width |
| `KW` | `$clog2(W)` | width of each exponent `k` |
| `(Y)t` | T bits | MSB has weight 1/2 |
| `(Y)APX` | H+1 bits | MSB weight 1/2; the LSB is the constant rounding 1 |
| `F` | max(T, 2H+2) | fraction bits of M. The APX product is kept at full precision (2H+2 fraction bits). |
| `M` | F+2 bits | 1 <= M < 4 |
| shifted product | 2W bits | `M << (kA+kB)` with its F fraction bits dropped |
| `p` | 2N bits | the final product, two's complement when signed |

For TOSAM(3,7), F = 8 and M is 10 bits wide.

### Zero and small operands

The datapath always assumes a leading one, so it cannot produce zero. This is
why the last unit tests the original operands for zero. A magnitude of 0 can
still reach the leading-one detector through the approximate absolute value:
`a = -1` inverts to 0. In that case K is all zero, k = 0 and (Y)t = 0, so the
datapath treats the magnitude as 1, which is the correct |a|.

### Signed operation and its cost

The absolute value is approximate: a negative operand `-x` is handled as `x-1`.
This saves the carry chain of a true negation. For large operands the error is
negligible. For small ones it is large: `-2` is treated as 1. The sign of the
result is applied at the end by exact two's complement negation.

With `SIGNED = 0`:
* the absolute-value units are left out;
* the magnitude uses all N bits;
* the last unit only does zero detection.

## Accuracy-configurable multiplier

`tosam_cfg_mult` is a signed multiplier whose accuracy is chosen per operation
by a `mode` input (`tosam_pkg::tosam_mode_e`):

| Mode | Computes | (Y)t bits | (Y)APX | Result LSBs forced to 0 |
|---|---|---|---|---|
| `MODE_T2` | TOSAM(0,2) | 2 | constant 0.1b | 10 |
| `MODE_T6` | TOSAM(2,6) | 6 | top 2 bits, then 1 | 6 |
| `MODE_T9` | TOSAM(5,9) | 9 | top 5 bits, then 1 | 0 |

The truncation and shift units are built for the largest mode (t = 9, h = 5).
`M` has 12 fraction bits. The configurable arithmetic unit, `tosam_cfg_arith`,
works as follows:

* It ANDs away the (Y)t bits the mode does not use. In silicon, the adders and
  AND gates behind those bits would be power-gated and their inputs isolated.
  This RTL models only the logical effect: the inputs are zero.
* It places the rounding 1 of (Y)APX at a mode-dependent position, by OR-ing
  that bit with the mode signal.
* It forces the low result bits to zero. These bits are zero anyway for the
  operands a mode leaves, so the mask costs nothing. It mirrors the isolated
  outputs of the original structure.

The mode encoding 2'd3 is not defined and behaves like `MODE_T9`.

`tosam_top` places the fixed TOSAM(3,7) multiplier and the configurable
multiplier side by side. They have separate ports and share no signals.

## Accuracy

The testbenches used uniformly random 16-bit positive operands of at least 256.
They measured the following errors:

| Configuration | Mean \|relative error\| | Max \|relative error\| |
|---|---|---|
| TOSAM(3,7), fixed | 1.04 % (mean signed error -0.32 %) | 3.3 % |
| T2 = TOSAM(0,2) | 10.7 % | 31 % |
| T6 = TOSAM(2,6) | 2.0 % | 6.7 % |
| T9 = TOSAM(5,9) | 0.26 % | 0.87 % |

The span from T2 to T9, roughly 11 % down to 0.3 %, is the accuracy range
published for TOSAM. Smaller operands give larger relative errors, mostly
because of the one's complement absolute value.

## Parameters

| Module | Parameter | Default | Notes |
|---|---|---|---|
| `tosam_mult` | `N` | 16 | operand width. The scheme was also evaluated at 32 bits; `N = 32` works and is tested. |
| `tosam_mult` | `H` | 3 | rounding width h. Must satisfy `H <= T`; `H = 0` is allowed. |
| `tosam_mult` | `T` | 7 | truncation width t |
| `tosam_mult` | `SIGNED` | 1 | 0 selects the unsigned multiplier |
| `tosam_cfg_mult` | `N` | 16 | This width is this implementation's choice. |
| `tosam_top` | `N`, `H`, `T`, `CFG_N` | 16, 3, 7, 16 | |

## What follows the published design and what does not

These parts follow the published design:
* the arithmetic;
* the order of the units;
* the leading-one and truncation equations;
* the rounding bit;
* omitting the absolute-value unit for unsigned operation;
* the modes and sizing of the configurable multiplier.

These are choices of this implementation:
* **Exponent encoding.** The one-hot-to-binary encoder for k. The original uses
  a lookup table that it does not give.
* **Negation.** Exact two's complement negation of the result.
* **Shift rounding.** Truncation of the fraction bits left below the binary
  point after the shift.
* **Mode encoding.** The two-bit enum.
* **Configurable width.** The 16-bit width of the configurable multiplier.

These parts are not reproduced:
* **Reduction tree.** The exact partial-product reduction tree and its fast
  9-bit final adder. The sums are written arithmetically and left to synthesis.
* **Power gating and transmission gates.** These have no logic function beyond
  the zeroed inputs, which are modelled.
* **The "modified" TOSAM.** The published design is presented as a modified
  TOSAM with a slightly shorter delay (22.389 ns against 23.363 ns). No
  description of what was modified is available, so this RTL implements the
  TOSAM architecture as described.

There are no pipeline registers. Register the inputs or outputs outside
`tosam_top` if timing requires it.

## Files

`rtl/`:
* `tosam_pkg.sv`: mode enum and the t/h maxima of the configurable design
* `tosam_abs_approx.sv`
* `tosam_lod.sv`
* `tosam_trunc.sv`
* `tosam_arith.sv`
* `tosam_shift.sv`
* `tosam_sign_zero.sv`
* `tosam_mult.sv`
* `tosam_cfg_arith.sv`
* `tosam_cfg_mult.sv`
* `tosam_top.sv`

`tb/`:
* `tosam_ref_pkg.sv`: an integer reference model of TOSAM(h,t). It uses
  128-bit values and a different common denominator from the RTL.
* `tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=<n> failures=<n>`.

What the testbenches cover:
* The unit testbenches test exhaustively where the input space allows: the
  absolute-value unit, the LOD, the truncation unit, and the arithmetic units
  in every mode.
* `tb_tosam_mult` checks the worked example, corner cases and random operands
  for signed 16-bit, unsigned 16-bit and signed 32-bit instances.
* `tb_tosam_top` runs `tosam_top` at its default parameters. It counts that
  each mechanism occurs at least once:
  * zero operands;
  * negative results and negative operands;
  * truncating and short operands;
  * each mode, and mode changes.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/tosam_pkg.sv tb/tosam_ref_pkg.sv tb/tb_tosam_top.sv \
    --top-module tb_tosam_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_tosam_top` with any other testbench name. Every testbench finishes
in well under a second.

To lint a module on its own:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/tosam_pkg.sv rtl/tosam_mult.sv
```

`tosam_shift` leaves the low F bits of its internal shifted value unused, on
purpose, and lint reports this.
