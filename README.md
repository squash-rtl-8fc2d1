# Self-healing approximate square-accumulate (SAC)

A square-accumulate unit computes the energy of a vector, `sum(A_i^2)`. It is
the core of least-squares solvers, such as the gain calibration of radio
telescopes. Approximate arithmetic makes the squarer smaller and lower in
power. Used naively, it leaves an error in every product, and the accumulator
adds those errors up.

This design turns the accumulator into a *healing stage*. Squarers are used in
pairs, and the two members of a pair are approximated in opposite directions:

- one member (Sq1) always errs **high**;
- the other (Sq2) errs **low**, by exactly the same amount for the same input.

Sq1 squares the odd-indexed elements of the vector and Sq2 the even-indexed
ones. When both lanes see the same input distribution, the errors cancel in the
exact accumulator. The pair costs two squarers. That is no more than the usual
layout, because each pair consumes two elements per cycle.

The RTL contains three units built on this idea:

| unit | module | squarers | input |
|---|---|---|---|
| logic-pruned self-healing SAC (the main design) | `sac_sh` | two 8x8 squarers built from pruned 2x2 elements, configuration SH7 | 8-bit unsigned |
| truncated mirror-error SAC | `sac_trunc` | two sign-forcing truncated squarers | 8-bit two's complement |
| complex SAC for calibration | `complex_sac` | two self-healing pairs (real and imaginary parts), configuration SH3 | 8-bit two's complement complex |

`squash_top` places the three units side by side. They share only the clock and
reset.

## The 2x2 mirror elements

An 8x8 squarer is built recursively from 2x2 elements. Approximation is applied
only inside those elements. Each approximate element gets one input case wrong,
and its mirror gets the same case wrong in the opposite direction:

| element | module | exact except | error |
|---|---|---|---|
| accurate square | `sq2x2_exact` | none | 0 |
| S1 | `sq2x2_s1` | 2*2 = 0 | -4 |
| S2 (mirror of S1) | `sq2x2_s2` | 2*2 = 8 | +4 |
| accurate multiply | `p2x2_exact` | none | 0 |
| M1 | `p2x2_m1` | 3*3 = 7 | -2 |
| M2 (mirror of M1) | `p2x2_m2` | 3*3 = 11 | +2 |

Giving up one case saves logic:

- S2 needs no gate at all (`p3 = a1`).
- M1 drops the fourth output bit.
- M2 costs more than M1, but less than an exact multiplier.

The logic equations of each element were derived from its truth table.

## Building the 8x8 squarer

With `A = a7..a0` split into 2-bit digits, the square needs only ten 2x2
elements. An ordinary 8x8 product needs sixteen. The saving comes from equal
cross products, which are shared and shifted one bit further:

```
A*A = Sq4x4(a3..a0) + 32 * P4x4(a3..a0, a7..a4) + 256 * Sq4x4(a7..a4)
Sq4x4(h,l) = l*l + 8*(l*h) + 16*(h*h)               (Sq2x2, P2x2, Sq2x2)
P4x4(lo,hi) = l0*h0 + 4*(l0*h1 + l1*h0) + 16*(l1*h1) (four P2x2)
```

The adders are always exact. `sq8x8` takes a 10-bit `APX_MASK` and a polarity
`POL`:

- `APX_MASK` bit k makes element k approximate.
- `POL = ERR_NEG` selects S1/M1; `POL = ERR_POS` selects S2/M2.

Elements are numbered from the least significant end:

| bit | element | weight |
|---|---|---|
| 0 | Sq2x2(a1a0) | 1 |
| 1 | P2x2(a1a0, a3a2) | 8 |
| 2 | Sq2x2(a3a2) | 16 |
| 3-6 | P2x2 of the cross block: (a1a0,a5a4), (a1a0,a7a6), (a5a4,a3a2), (a3a2,a7a6) | 32 x {1, 4, 4, 16} |
| 7 | Sq2x2(a5a4) | 256 |
| 8 | P2x2(a5a4, a7a6) | 2048 |
| 9 | Sq2x2(a7a6) | 4096 |

Named masks are in `squash_pkg`:

| name | mask | meaning |
|---|---|---|
| `CFG_ACCU` | `10'h000` | exact |
| `CFG_SH1` | `10'h002` | least significant P2x2 |
| `CFG_SH3` | `10'h007` | SH1 plus the two least significant Sq2x2 |
| `CFG_SH7` | `10'h07F` | SH3 plus all four P2x2 of the cross block |

Two squarers with the same mask and opposite `POL` give outputs whose sum is
exactly `2*A*A` for every `A`. The `sq8x8` testbench checks this for all 256
inputs in five configurations.

**Output width.** The squarer output is **17 bits**, not the 16 of an exact
square. A positive-error squarer can exceed 65,535: in SH7, input 255 gives
66,641. If the output were cut to 16 bits, the mirror property would break for
large inputs. For the same reason `p4x4` has a 9-bit output (15*15 gives 275
with four M2 elements). `sq4x4` fits in 8 bits: its largest possible result is
241.

## Conventional versus self-healing

`sac_sh #(.MIRROR(0))` is the conventional baseline: both squarers use S1/M1,
so the error is always negative and grows with vector length. With
`MIRROR = 1` (the default), Sq1 uses the mirror elements S2/M2 instead.

The mean error is then zero whenever both lanes see the same distribution. The
residual error on a finite vector grows only with the square root of its
length. A vector whose odd and even elements are equal comes out exact.

The quality testbench `tb_workload_sac` measures MSE in dB over the vector
sums. It runs five units on the same stream:

| set | Convent | SH1 | Convent3 | SH3 | SH7 |
|---|---|---|---|---|---|
| uniform, 100 x 124 | 42.3 | 31.6 | 67.0 | 49.2 | 70.1 |
| normal(128, 22.5), 100 x 124 | 42.5 | 33.2 | 67.1 | 49.7 | 57.9 |
| uniform, 1000 x 10,000 | 80.0 | 51.4 | 105.1 | 69.1 | 88.9 |
| normal(128, 22.5), 1000 x 10,000 | 80.0 | 51.8 | 105.1 | 68.5 | 78.0 |

What the table shows:

- Each self-healing configuration beats its conventional counterpart with the
  same mask.
- SH7 approximates seven elements where Convent3 approximates three, so SH7 is
  cheaper. On the long vectors SH7 is still more accurate than Convent3.
- On short uniform vectors the residual does not cancel well enough, and SH7
  comes out worse than Convent3.

The testbench fails if any of these orderings changes, apart from the
short-vector SH7 case.

## Truncated mirror pair

`trunc_sq` reaches the same effect by truncation instead of logic pruning. A
square does not depend on the sign of its input, so the squarer may force the
sign before truncating:

- `NEG = 0` squares `+|A|`. Dropping the LSB rounds it down, so the result is
  too small.
- `NEG = 1` squares `-|A|`. The arithmetic shift rounds it away from zero, so
  the result is too large.

The 7-bit square is shifted left by two to restore the 16-bit scale. For
`A = 25`:

- Sq1 gives 12^2 x 4 = 576 (error -49).
- Sq2 gives 13^2 x 4 = 676 (error +51).

The two errors have opposite signs but unequal magnitudes, so this pair cancels
only in part. `|A|` is formed one bit wider than `A`, so -128 needs no special
case.

`sac_trunc` pairs one squarer of each kind. `MEE2 = 0` (MEE1, the default)
squares odd-indexed elements as positive; `MEE2 = 1` swaps the lanes.

`tb_workload_trunc` compares this unit with two designs modelled only in the
testbench:

- conventional: squaring the truncated operand as it comes;
- all-positive: forcing every operand positive.

MSE in dB over 1000 vectors of 10,000 elements:

| input | MEE1 | conventional | all-positive |
|---|---|---|---|
| uniform | 79.9 | 81.0 | 116.1 |
| normal, mean 0 | 74.8 | 75.5 | 104.9 |
| normal, mean 30 | 76.2 | 109.4 | 109.9 |

With a zero-mean input, a conventional truncated squarer already sees as many
negative as positive operands, so it gains little from the pair. Once the mean
moves away from zero, only the forced-sign pair keeps cancelling.

## Complex SAC

`complex_sac` computes `sum(Zr^2 + Zi^2)` for two complex samples `Z_k` and
`Z_k+1` per cycle:

- `Zr_k` and `Zi_k` go to positive-error squarers (S2/M2).
- `Zr_k+1` and `Zi_k+1` go to negative-error squarers (S1/M1).
- The four squares are accumulated together.

Real and imaginary parts are taken as 8-bit two's complement numbers. Their
magnitudes (0..128) feed the unsigned squarers. The default configuration is
SH3.

This unit is the power term of an iterative least-squares gain calibration.
The rest of that loop is not part of this RTL: the multiply-accumulate with the
visibilities, the element-wise product and the division.

`tb_workload_cx` runs five complex units side by side (exact, Convent, SH1,
Convent3, SH3) on 200 generated vectors of 1000 complex samples. The parts
are roughly normal with mean 0 and standard deviation 40, a stand-in for
calibration data. It checks that each self-healing unit beats its
conventional counterpart. Typical per-vector MSE:

| Accu | Convent | SH1 | Convent3 | SH3 |
|---|---|---|---|---|
| 0 | 3.1e6 | 2.3e4 | 1.2e9 | 1.2e6 |

Because the magnitudes of zero-mean data are spread evenly over the two lanes,
the mirror errors cancel almost completely here. Data with a less even spread
cancels less.

## Interface and timing

Every SAC unit takes a stream of beats. Each beat carries two elements (or two
complex samples) with three flags:

- `in_valid`: the beat carries data.
- `in_first`: the first beat of a vector. The sum restarts with this beat.
- `in_last`: the last beat of a vector.

The squarers are combinational. `healing_accumulator` registers the sum.
`out_valid` pulses for one cycle, exactly one cycle after the `in_last` beat,
with `acc` holding the vector's sum. `acc` keeps that value until the next
valid beat.

Other properties of the stream:

- A new vector may start on the very next cycle.
- Idle cycles (`in_valid = 0`) may occur anywhere.
- A one-beat vector has both `in_first` and `in_last` set.
- An assertion flags `in_first` or `in_last` without `in_valid`.

Reset is synchronous and active low. It clears `acc` and `out_valid`.

The accumulator is 32 bits and wraps modulo 2^32. That holds about 32,000
beats (64,000 elements) of SH7 results at full scale, or 66,000 exact 8-bit
squares.

In `squash_top`, each unit's stream is a packed struct from `squash_pkg`
(`sac_in_t`, `cx_in_t`). The results are `sh_acc`/`sh_out_valid`,
`tr_acc`/`tr_out_valid` and `cx_acc`/`cx_out_valid`.

## Where this RTL departs from the original proposal, or fills gaps

These were decided here; they are not given by the original design:

- **Output widths.** The squarer outputs are 17 bits (see above); the original
  drawing shows 16.
- **Interface and control.** Accumulator width, framing flags, reset and
  single-cycle timing are all choices made here. The original design does not
  pipeline or time the unit.
- **Complex input format.** 8-bit two's complement, with a magnitude step in
  front of the unsigned squarers.
- **Defaults.** `sac_sh` defaults to SH7, the configuration with the best area
  and power for a quality still better than its conventional peer.
  `complex_sac` defaults to SH3, the configuration evaluated for calibration.
- **Test data.** The normal sets for the truncated SAC use sigma 22.5; that
  width is assumed.

Not built:

- the array of L/2 parallel SAC blocks, because the number of blocks and the
  way the stream is distributed are unspecified (each block would be one
  `sac_sh`);
- the other stages of the calibration loop;
- the truncated-squarer variants that append constant bits other than zero;
- the off-line design-space exploration (error-probability analysis of masks).
  That is a software method, so no mask beyond the named ones is singled out.

Area and power figures are not reproduced. Synthesis of these modules will show
how the approximate elements shrink the logic, but no library numbers come with
this RTL.

## Files and simulation

`rtl/`:

- `squash_pkg.sv`: types, masks and widths.
- Elements: `sq2x2_exact`, `sq2x2_s1`, `sq2x2_s2`, `p2x2_exact`, `p2x2_m1`,
  `p2x2_m2`, and the selectors `sq2x2_elem` and `p2x2_elem`.
- Squarers: `sq4x4`, `p4x4`, `sq8x8`, `trunc_sq`.
- Accumulation and units: `healing_accumulator`, `sac_sh`, `sac_trunc`,
  `complex_sac`, `squash_top`.

`tb/`:

- One self-checking testbench per module, `tb_<module>.sv`. The two element
  selectors are exercised through `tb_sq4x4`, `tb_p4x4` and `tb_sq8x8`.
- The shared reference models, `squash_ref_pkg.sv`. They model each squarer as
  the exact square plus the error of every element hit, which is independent
  of the RTL structure.
- The workload testbenches `tb_workload_sac.sv`, `tb_workload_trunc.sv` and
  `tb_workload_cx.sv`.

`tb_squash_top` runs all three units concurrently at the top's default
parameters. It checks every result and its timing. It also counts the design's
mechanisms and fails if one never occurs:

- opposite errors in one beat;
- exact cancellation;
- mirror outputs above 16 bits;
- the -128 input;
- back-to-back vectors, idle gaps and one-beat vectors.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. To run
one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/squash_pkg.sv tb/squash_ref_pkg.sv tb/tb_sac_sh.sv --top-module tb_sac_sh
./obj_dir/Vtb_sac_sh
```

Replace `tb_sac_sh` with any other testbench name. Most testbenches finish in
well under a second; `tb_workload_trunc` takes about 25 s and
`tb_workload_sac` about 15 s. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/squash_pkg.sv rtl/<module>.sv`.
The only warnings are about package constants that a given module does not use.
