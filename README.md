# Constant-coefficient dividers as multiply-and-shift

A divider is expensive hardware, but when the divisor `d` is a constant it
does not have to be a divider at all. Choose an integer `A` and a shift `K`
with `A / 2^K ≈ 1/d`. Then

    y = floor(x * A / 2^K)

takes one constant multiplication (a handful of adders) and a wire shift.
The question is which `A` and `K` to pick. The obvious answer is "truncate
the binary expansion of 1/d to K bits". It is rarely the best one:

* Every `A` close to `2^K/d` gives some approximation. One of them may give
  *exactly* `floor(x/d)` for every input of interest, or the smallest error,
  or the fewest adders.
* The way the hardware drops low bits biases the result. Truncation pulls
  results down, and ceiling pushes them up. A good `A` sits on the side of
  `2^K/d` that cancels that bias.
* If some error is allowed (an SNR or maximum-error budget), a shorter `A`
  with a smaller `K` may meet it at lower cost. So may a multiplier that
  discards whole low columns of its partial products.

This RTL implements the dividers that follow from those ideas, at the
configurations evaluated for them:

* exact dividers by 3, 5 and 23;
* noise-budgeted dividers by 5;
* a divider built on a truncated ("left-sided") multiplier;
* a range-decomposed divider;
* a unit that computes several fractions `N_i/d` with one shared reciprocal.

All of them are combinational. None has a clock, register or handshake. A
pipeline register can go around any of them.

## Choosing A and K

`rtl/cdiv_pkg.sv` holds the selection rules as constant functions. They run
when the design is elaborated, so a divider needs only `D` (and optionally a
numerator `NUM` for a constant `NUM/D`). `A` and `K` then follow by default:

| function | what it returns |
|---|---|
| `coef_a(n, d, k, crit)` | `A` for shift `k`: `floor(n*2^k/d)` (`CRIT_LOWER`), rounded (`CRIT_NEAREST`) or `ceil(n*2^k/d)` (`CRIT_UPPER`) |
| `crit_for(rnd)` | the criterion that compensates a rounding mode: truncation → upper, rounding → nearest, ceiling → lower |
| `exact_limit(n, d, A, k, crit)` | first input for which exactness is no longer guaranteed |
| `min_k_exact(n, d, xw, crit)` | smallest `k` whose coefficient is exact for every `xw`-bit input |

**Range of exactitude.** Take an upper-nearest `A`. Then `x*A/2^K` exceeds
`x*n/d` by `x*e/(d*2^K)`, where `e = A*d − n*2^K ≥ 0`. The true quotient
`x*n/d` can sit as close as `1/d` below the next integer. So the truncated
result is guaranteed exact while

    x < 2^K / e           (for n = 1 this equals floor(A*d/(A*d − 2^K)) − 1)

Ceiling with a lower-nearest `A` is the mirror image. Rounding with the
nearest `A` needs the error to stay below `1/(2d)`, which halves the limit;
that bound assumes an odd `d`. The limit is sufficient, not necessary. For
`d = 23`, `A = 713`, `K = 14` it guarantees inputs 0…1091, but every 10-bit
input happens to be exact.

For 10-bit unsigned dividends with truncation, the search gives:

| d | A | K | guaranteed exact range |
|---|---|---|---|
| 3 | 683 | 11 | 0 – 2047 |
| 5 | 205 | 10 | 0 – 1023 |
| 23 | 713 | 14 | 0 – 1091 |

The search minimises `K`, which is not the same as minimising adders.
Either override `K` and `A` explicitly, or take the values from this table.

## The full-precision divider (`cdiv_const`)

`y = Q(x*A / 2^(K−YF))`, where `YF` fraction bits of the quotient are kept
(`YF > K` shifts left). `Q` is set by `RND`:

* `RND_TRUNC` (default): floor;
* `RND_ROUND`: round half up, done by adding `2^(S−1)` before the shift;
* `RND_CEIL`: ceiling, done by adding `2^S − 1` before the shift.

`SIGNED` makes the dividend and quotient two's complement. The product comes
from `cdiv_cmul`, a shift-and-add network over the canonical signed digits
(CSD) of `A`. No two CSD digits are adjacent non-zeros, so a run of ones
costs one adder and one subtractor. For example, 205 = 256 − 64 + 16 − 4 + 1.
CSD is this implementation's way of removing redundant additions; a
synthesis tool may find a better one.

With truncation, `A` must not be below `2^K/d`. Otherwise the quotient
falls one short at every exact multiple of `d`.

## Spending an error budget

When exactness is not required, `K` can shrink until the error budget is
used up. For `d = 5` and inputs 0…1023:

| A | K | max error | mean squared error | SNR |
|---|---|---|---|---|
| 205 | 10 | 0 | 0 | ∞ |
| 103 | 9 | 1 | 0.5 | 102.31 |
| 51 | 8 | 1 | 0.4980 | 102.35 |

**SNR units.** SNR is given as `10·ln(Σy² / Σe²)`: a natural logarithm, not
`log10`. These are the units of the published figures this design
reproduces. A budget of "90" on this scale equals 39.1 dB in the usual
`10·log10` units. The testbenches compute and compare SNR on this scale.

## Truncated partial products (`cdiv_lsm`)

This is the cheapest scheme and the least obvious one. Write `x*A` as the
sum of `x·2^i` over the set bits `i` of `A`. A left-sided multiplier
discards every column below `2^T` in each partial product before adding:

    acc = Σ_i floor(x·2^i / 2^T)        (in units of 2^T)
    y   = floor(acc / 2^(K−T))

With `T = K = 10`, no adder cells are needed for the low ten columns at all.
The cost is a downward bias of up to one unit per partial product. That
bias is cancelled by raising `A` above its exact value:

* With `A = 205` (exact when untruncated) and `T = 10`, the output is never
  above `floor(x/5)`. Maximum error is 4 and SNR is 80.70.
* With `A = 208` and `T = 10`, the output is below the exact quotient for
  small `x` and above it for large `x`. Maximum error is 3, MSE is 1.6406,
  and SNR is 90.43. It meets a budget of 90 with the smallest multiplier.

The same scheme with less truncation:

| A | T | max error | MSE | SNR |
|---|---|---|---|---|
| 204 | 9 | 3 | 1.6641 | 90.29 |
| 205 | 9 | 2 | 1.1133 | 94.31 |
| 206 | 9 | 2 | 0.5645 | 101.10 |
| 206 | 8 | 1 | 0.3301 | 106.47 |

To pick `A` for a new case: start from the exact `A` and `K`, choose the
largest `T`, and raise `A` while the SNR improves. If it never reaches the
budget, lower `T` and repeat. The module uses the plain binary form of `A`,
not CSD: a truncated *subtracted* partial product would bias the other way.

"Truncated to `T` bits" is read here as "columns below weight `2^T` are
dropped"; this reading reproduces the published error figures.

## Range decomposition (`cdiv_range`)

A short coefficient can be exact on part of the range. Split the input into
two intervals, and give each interval the same multiplier plus its own
additive constant:

    y = floor((x*A + C) / 2^K),    C = C_LO for x < SPLIT, else C_HI

For `d = 5` and `x` in 0…127, the shortest pair is `13x/64` on 0…63 and
`(13x − 13)/64` on 64…127. Both are exact. A single coefficient exact over
0…127 needs `K = 9` (`A = 103`). The second interval costs one comparator and one
constant adder. `sel_hi` shows which interval is active.

The coefficient and offsets are this design's own, found by exhaustive
search. The split point, input range and divisor follow the published
example.

## Several fractions from one reciprocal (`cdiv_multi`)

`y[i] = floor(x*N[i]/D)` for a list of numerators. The product `p = x*A` is
formed once. Each fraction then adds one constant multiplication by `N[i]`
and a `K`-bit shift. `K` is chosen so that `x*N[i]` stays within the range of
exactitude, which makes every output exact. The numerators (1, 2, 3 over 5
by default) are example values.

## The top level (`cdiv_top`)

`cdiv_top` places the selected configuration of each study side by side.
The top has no parameters.

| port | unit | configuration |
|---|---|---|
| `x` → `q3`, `q5`, `q23` | `cdiv_const` | exact, A/K = 683/11, 205/10, 713/14 |
| `x` → `q5_noise` | `cdiv_const` | A/K = 51/8, max error 1 |
| `x` → `q5_lsm` | `cdiv_lsm` | A = 208, K = 10, T = 10, max error 3 |
| `xs` → `ys` | `cdiv_const` | signed 8-bit ÷ 10, 8 fraction bits, A/K = 13/7 |
| `xr` → `qr`, `qr_hi` | `cdiv_range` | ÷ 5 on 0…127, two intervals |
| `x` → `qm[0..2]` | `cdiv_multi` | x/5, 2x/5, 3x/5 |

The signed ÷10 unit is never more than 0.2 away from `xs/10`. The truncated
reciprocal `25/256` is up to 0.3 away with a comparable
multiplier.

## Files

| file | contents |
|---|---|
| `rtl/cdiv_pkg.sv` | enums `crit_e`, `rnd_e`; coefficient, range and CSD functions |
| `rtl/cdiv_cmul.sv` | CSD shift-and-add constant multiplier |
| `rtl/cdiv_const.sv` | full-precision divider |
| `rtl/cdiv_lsm.sv` | divider on a truncated multiplier |
| `rtl/cdiv_range.sv` | range-decomposed divider |
| `rtl/cdiv_multi.sv` | shared-reciprocal multi-fraction divider |
| `rtl/cdiv_top.sv` | all of the above, side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench sweeps every input value, compares the outputs with integer
or real arithmetic done in the testbench, and prints
`TB_RESULT checks=N failures=M`.

* `tb_cdiv_const` checks:
  * the chosen A/K pairs;
  * exactness for d = 3, 5 and 23;
  * round and ceiling modes;
  * the error statistics of A/K = 103/9 and 51/8;
  * the signed ÷10 deviation;
  * a rational 3/7.
* `tb_cdiv_lsm` checks each truncated configuration against a reference
  built from integer division, against the error table above, and against
  the below/above error shape.
* `tb_cdiv_top` runs the whole top at its defaults. It counts every
  mechanism (exact results, budgeted errors, errors on both sides, negative
  inputs, both range intervals) and fails if one never occurs.

To run one:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/cdiv_pkg.sv rtl/cdiv_cmul.sv rtl/cdiv_const.sv rtl/cdiv_lsm.sv \
      rtl/cdiv_range.sv rtl/cdiv_multi.sv rtl/cdiv_top.sv \
      tb/tb_cdiv_top.sv --top-module tb_cdiv_top -Mdir obj_top
    ./obj_top/Vtb_cdiv_top

Swap in another testbench and `--top-module` to run the other checks. Each
one finishes in well under a second.

Lint reports unused high bits of some internal shift results. Those bits
are zero by construction: the quotient range is bounded.
