# Coefficient-partitioned multiplierless FIR filters

A fixed-coefficient filter does not need multipliers. Each product `h * x` can
be built from shifted copies of `x` and adders, and sharing common digit
patterns between coefficients (common subexpression elimination, CSE) keeps
the number of adders small. Fewer adders is not the whole cost, though. The
area and power of each adder grow with its **width**. That width is set by
how far apart, in bit positions, its operands are shifted. A coefficient
whose nonzero digits span 14 positions forces its last adder to be about 14
bits wider than the input, even if that adder only adds two terms.

This RTL applies **coefficient partitioning (CP)** to shorten those adders:

1. Write the coefficient in canonic signed digit (CSD) form and replace the
   frequent digit patterns by shared subexpressions.
2. Factor out the position of the leading term. This is the
   *pseudo floating-point* (PFP) shift `2^-PS1`, and it is pure wiring.
3. Split the remaining span into two halves. Rescale the lower half by its
   own leading position `2^-PS2` (its *order*), which is wiring too.
4. Add each half in a narrow adder. Only one final adder, which joins the two
   halves, covers the full span.

The adder count and the critical path (in adder steps) stay the same as with
plain CSE. What shrinks is the width of the inner adders.

Two filters are built from this idea, side by side in `cp_fir_top`:

* **CP-HCSE** (`cp_hcse_fir`) uses *horizontal* subexpressions found inside
  each coefficient: `x2 = x1 + x1>>2` for the digit pattern `1 0 1` and
  `x3 = x1 - x1>>2` for `1 0 -1`. This is the better choice for long
  coefficient words.
* **CP-VCSE** (`cp_vcse_fir`) uses *vertical* subexpressions, which pair a
  digit of one coefficient with the same digit of the next one or the one
  after: `x4 = x1 + x1[-1]`, `x5 = x1 - x1[-1]`, `x6 = x1 + x1[-2]` and
  `x7 = x1 - x1[-2]`. This is the better choice for short words of about
  8 bits.

Both implement the same 6-tap linear-phase low-pass example, with pass band
edge 0.2π and stop band edge 0.25π. The coefficients are 16-digit CSD words
and the input samples are 8 bits. The outputs are exact.

## Number format

A coefficient is a fraction with `COEF_W` CSD digits. Digit `p` (p = 1 ... COEF_W)
weighs `2^-p`. It is passed as two masks of `COEF_W` bits:

* `POS` has a 1 for every +1 digit.
* `NEG` has a 1 for every -1 digit.

Digit `p` sits at bit `COEF_W - p`, so a mask reads like the written word
`0.d1 d2 d3 ...`. The coefficient value in units of `2^-COEF_W` is simply
`POS - NEG`. The default coefficients (h5..h3 mirror h0..h2) are:

| tap | CSD digits (positions with nonzero digits) | POS | NEG | value ×2^16 |
|---|---|---|---|---|
| h0 = h5 | +2 +6 −8 +10 +12 +14 −16 | 4454 | 0101 | 17235 |
| h1 = h4 | +2 −4 +8 +10 +12 −14 −16 | 4150 | 1005 | 12619 |
| h2 = h3 | +2 −5 +9 −15 | 4080 | 0802 | 14462 |

Inputs are two's complement integers. Every product and output is exact and
is expressed in units of `2^-COEF_W` of the input LSB, so
`y_out = Σ (POS_k − NEG_k) · x[n−k]`. Nothing is rounded or truncated.
Inside the multipliers, `x2` and `x3` keep the two bits that the `>>2` shifts
out: they are carried as `5·x1` and `3·x1` with two fraction bits.

## How one coefficient becomes adders (`cp_mult`, `cp_pkg`)

`cp_mult` receives its coefficient as a parameter. Functions in `cp_pkg`
derive the whole adder structure from it at elaboration time.

1. **Subexpressions.** The word is scanned from the most significant digit.
   Each `±1 0 ±1` group becomes a single `±x2` or `±x3` term, and every other
   nonzero digit becomes a `±x1` term. With `USE_HS = 0` every digit stays a
   plain term of the input. `cp_vcse_fir` uses that setting, because its
   inputs are already subexpressions.
2. **PFP shift.** `PS1` is the position of the first term. The span `M` is the
   distance from the first term to the last.
3. **Partition.** A term lies in the MSB half if it is at most `floor(M/2)`
   positions behind the first term. The remaining terms form the LSB half.
   `PS2` is the offset of the first LSB term.
4. **Adders.**
   * Each half is summed with its operands aligned only to each other (MSB
     adder `MW` bits, LSB adder `LW` bits).
   * The LSB sum is then shifted by `PS2`, which is wiring.
   * A final adder (`TW` bits) joins the two halves.
   * The outer `2^-PS1` shift is wiring as well.

   Every width is the exact span of the aligned operands plus a carry. A
   half with more than two terms gets ceil(log2 n) growth bits. A half made
   of a single negated term gets one extra bit, so that `-(-2^(w-1))` fits.

Worked example, `h = 0.0000101001010101` (the default of `cp_mult`). The word
is three `1 0 1` groups, so the product is `x2 (2^-5 + 2^-10 + 2^-14)`. The
PFP shift is `PS1 = 5`, the span is 9, and the partition gives

    h·x = 2^-5 ( x2 + 2^-5 ( x2 + 2^-4 x2 ) )

This costs one HS adder (11 bits), a 16-bit LSB adder and a 21-bit final
adder. By the published count, plain CSE needs 11 + 22 + 26 = 59 full adders
for the same product and the partitioned form 11 + 16 + 22 = 49. The adder
count (three) and the depth (three adder steps) are the same.

The six-tap filter needs three distinct coefficients. Their adder widths,
next to the full-adder counts of the published method, are:

| coefficient | partition | MSB / LSB / final adder bits | published count |
|---|---|---|---|
| h0 | `2^-2 (x1 + 2^-4 x3 + 2^-8 (x2 + 2^-4 x3))` | 15 / 16 / 24 | 16 / 16 / 25 |
| h1 | `2^-2 (x3 + 2^-6 x2 + 2^-10 (x3 − 2^-4 x1))` | 18 / 14 / 25 | 18 / 13 / 24 |
| h2 | `2^-2 (x1 − 2^-3 x1 + 2^-7 (x1 − 2^-6 x1))` | 12 / 15 / 23 | 12 / 15 / 23 |

Together with the two 11-bit HS adders, the multiplier block has
**184 full-adder positions**. The published count for this example is also
184. The published method sizes every adder as one more than its widest
operand's *range*, measured from the top. The exact alignment used here
differs from that by at most one bit per adder, in either direction.

## CP-HCSE filter (`cp_hcse_fir`)

    x_in ──► cp_mb ──────────────────────────► sym_tdl ──► y_out
             ├ hs_gen: x2 = x1 + x1>>2, x3 = x1 − x1>>2
             └ cp_mult × 3 (h0, h1, h2), sharing x1, x2, x3

* `cp_mb`, the **multiplier block**, computes the two subexpressions once. It
  then forms `h_i · x[n]` for the `ceil(N/2)` distinct coefficients. The
  critical path is three adder steps: one HS adder, one half-sum adder and
  one final adder.
* `sym_tdl` is a **transposed delay line**. Every tap multiplies the current
  sample, so in a symmetric filter each product feeds two structural adders,
  those of tap `k` and of tap `N−1−k`. The mirrored half therefore costs only
  delays and adders:

      z[N-1] <= p(N-1);   z[k] <= p(k) + z[k+1];   y <= p(0) + z[1]
      with p(k) = product min(k, N-1-k)

The module is parameterised in `DATA_W`, `COEF_W`, `N_TAPS` and the
coefficient masks. Elaboration stops with an error if the masks are not valid
CSD words or are not symmetric.

## CP-VCSE filter (`cp_vcse_fir`)

Vertical subexpressions are found across the coefficient table, column by
column, in the first symmetric half only. The grouping is computed at
elaboration from the masks:

1. Taps are visited from h0 towards the centre, and digits from the most
   significant one.
2. A digit not yet used is paired with the same digit of the next tap
   (`x4` if the signs agree, `x5` if they differ). If that digit is zero, it
   is paired with the tap after it instead (`x6`/`x7`).
3. A digit that finds no partner stays a plain `x1` term.
4. Pairs stay inside the first half. The exception is the pair that
   straddles the centre: h(N/2−1), h(N/2) for even N, or the two taps around
   the centre tap for odd N. That pair is its own mirror image. The centre
   tap of an odd-length filter keeps plain terms.

All digits that multiply one source at one delay form one constant. For the
default coefficients this gives:

| constant | digits | multiplies | covers |
|---|---|---|---|
| C_A | +2 +10 +12 −16 | x4 | h0,h1 (and h4,h5 four samples later) |
| C_B | −8 +14 | x5 | h0,h1 (and h4,h5 with the sign of x5 flipped) |
| C_C | +6 | x1 | h0 (and h5) |
| C_D | −4 | x1[−1] | h1 (and h4) |
| C_E | +2 −5 +9 −15 | x4[−2] | h2,h3, the centre pair |

Each constant is PFP-coded and partitioned by its own `cp_mult` (with
`USE_HS = 0`). The mirrored half is built by delaying products instead of
multiplying again:

    y[n] = A[n] + B[n] + C[n] + D[n-1] + E[n-2] + A[n-4] − B[n-4] + D[n-4] + C[n-5]

In general, a group of source span s (0 for `x1`, 1 for `x4`/`x5`, 2 for
`x6`/`x7`) placed at delay d reappears at delay N−1−d−s. It is subtracted
there for `x5` and `x7`, whose two digits swap places in the mirror. The sum
is realised as a transposed chain of N−1 registers plus the output register.
`vs_gen` holds the two-sample input delay that `x4`..`x7` need.

Totals for this grouping:

* 2 vertical-subexpression adders
* 7 multiplier-block adders
* 8 structural adders
* about 4 adder steps in the multiplier block

The module is parameterised like `cp_hcse_fir`: `DATA_W`, `COEF_W`,
`N_TAPS` and the coefficient masks. Elaboration stops with an error if the
masks are not valid CSD words or are
not symmetric.

## Interface and timing

Both filters, and each half of `cp_fir_top`, have the same interface:

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous, active-low; clears all delay registers and the output |
| `in_valid` | in | 1 | a sample is present; when low, the filter state is held |
| `x_in` | in | `DATA_W` (8) | sample, two's complement |
| `out_valid` | out | 1 | `y_out` was updated by the last clock edge |
| `y_out` | out | `OUT_W` (27) | `Σ h_k x[n−k]`, exact, in units of `2^-COEF_W` |

The clock edge that takes sample `x[n]` also registers `y[n]`, so the latency
is one clock. The throughput is one sample per clock. The multiplier block is
combinational between the input and the first register. In `cp_fir_top` each
filter has its own `*_in_valid`, `*_x`, `*_out_valid` and `*_y`. The two
filters share `clk` and `rst_n`.

## Files

| file | contents |
|---|---|
| `rtl/cp_pkg.sv` | term types; CSD scan, partition and width functions |
| `rtl/hs_gen.sv` | horizontal subexpression adders x2, x3 |
| `rtl/cp_mult.sv` | one coefficient-partitioned constant multiplier |
| `rtl/cp_mb.sv` | multiplier block: shared `hs_gen` + one `cp_mult` per distinct coefficient |
| `rtl/sym_tdl.sv` | symmetric transposed delay line and structural adders |
| `rtl/cp_hcse_fir.sv` | CP-HCSE filter |
| `rtl/vs_gen.sv` | vertical subexpression adders x4..x7 with their two delay registers |
| `rtl/cp_vcse_fir.sv` | CP-VCSE filter |
| `rtl/cp_fir_top.sv` | both filters side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_fir_sizes.sv`, `tb/fir_size_case.sv` | both filters at 2 to 400 taps and 8- to 24-digit coefficients |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/cp_pkg.sv \
        tb/tb_cp_fir_top.sv --top-module tb_cp_fir_top
    ./obj_dir/Vtb_cp_fir_top

Replace `tb_cp_fir_top` with any other testbench name. The package must come
first on the command line. `-y rtl -y tb` lets Verilator find the other
modules by name.

What the testbenches check:

* `tb_cp_mult` applies every 8-bit input to six multipliers: the worked
  example, h0..h2, a negative coefficient that uses −x2/x3/−x3/x1 terms, and a
  single digit. It also checks the derived `PS1`, `PS2` and adder widths
  against the table above.
* `tb_cp_fir_top`, `tb_cp_hcse_fir` and `tb_cp_vcse_fir` compare each output
  with a convolution model, one clock after its sample. They cover:
  * an impulse, which must read back h0..h5
  * full-scale steps and alternations
  * random data with random stalls
  * a reset in mid-stream

  They also count each of these events and fail if one never happened.
* `tb_fir_sizes` builds both filters at N/word length = 10/8, 30/12,
  50/16, 80/20, 120/24, 250/16 and 400/16. It adds odd lengths (CP-HCSE 25
  and 101 taps; CP-VCSE 3, 11 and 51 taps), a 2-tap CP-VCSE filter, and
  17/16, 26/9 and 61/14, the sizes of three filters from a comparison with
  signed common subexpressions. It
  uses generated symmetric CSD coefficients, which exercise all five
  CP-VCSE sources.

## Using other coefficients

Override `H_POS`/`H_NEG` (packed `[0:N_TAPS-1][COEF_W-1:0]`, element 0 = h0),
`N_TAPS`, `COEF_W` and `DATA_W` on `cp_hcse_fir` or `cp_vcse_fir`. The masks must be valid
CSD words (no two adjacent nonzero digits) and symmetric. All adders, widths
and shifts follow from the masks. `OUT_W` defaults to
`DATA_W + COEF_W + clog2(N_TAPS)`, which is always enough because every
|h| < 1.

## Where this design makes its own choices

* **Adder widths** are exact (aligned operand span plus a carry), not the
  published range rule. See the comparison table above. Synthesis chooses the
  adder architecture; the published method assumes ripple-carry adders.
* **Subexpression search** is greedy from the most significant digit. It
  reproduces the published decomposition for every coefficient of the example.
  Other orders can give other, equally valid, structures.
* **Filter form.** The published expression for the CP-HCSE output is written
  with delayed inputs. This design uses the transposed form instead, so that
  the multiplier block exists once per distinct coefficient. The 184-adder
  count above refers to that multiplier block. Structural adders in the delay
  line are full output width and are not part of the count.
* **CP-VCSE grouping** follows the vertical subexpression procedure, with
  two choices of its own: a pair with the next tap is preferred over a pair
  two taps away, and the second half is always taken from the first by
  delays rather than grouped separately. The published structure for the
  example has 13 adders and a 5-step critical path. The grouping here uses
  17 adders in all (2 + 7 + 8) and is not claimed to match its full-adder
  count.
* **Clocking, reset, the `in_valid`/`out_valid` handshake and the
  full-precision output** are this design's own. The method specifies only
  the arithmetic.
* **Not built:**
  * The elliptic IIR filters used in the evaluation. Their coefficients and
    structure are not available.
  * The signed-subexpression (SCSE) filters of the comparison. Their
    coefficients and subexpression set come from another work.
  * The low-pass coefficient sets of the 10- to 400-tap FIR evaluation. The
    size sweep stands in for them with generated coefficients.
