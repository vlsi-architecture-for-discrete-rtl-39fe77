# B-spline factorized discrete wavelet transform

A one-level DWT analysis filter bank splits a signal into a lowpass and a
highpass subband at half the rate. The usual ways to build one are direct
convolution with the two filters or a lifting ladder. This RTL uses a third
way, based on a property every wavelet filter pair has: each filter factors
into a binomial ("B-spline") part, a short "distributed" part and a constant
gain:

    H(z) = (1 + z^-1)^gH * Q(z) * h0        (lowpass)
    G(z) = (1 - z^-1)^gG * R(z) * g0        (highpass)

The binomial factors have small integer coefficients, so they need only
shifts and adds. Only Q(z) and R(z) need real multipliers. Those two
polynomials are short, so the filter bank needs fewer multipliers than the
convolution or lifting forms, at the cost of more adders. Most of those
adders are off the critical path.

Two filter pairs are built, each in the forms proposed for it:

| architecture | filter | B-spline part | distributed part | multipliers | adders |
|---|---|---|---|---|---|
| `bspline97`, Type-I | (9,7) (JPEG2000 default) | (1 +/- z^-1)^4 | Q of degree 4, R of degree 2 | 3 | 18 |
| `bspline97`, Type-II | (9,7) | (1 +/- z^-1)^4 | same | 3 | 18 |
| `bspline610`, Solution-1 | (6,10) | (1 +/- z^-1)^3, then (1 - z^-1)^2 | Q of degree 2, S of degree 4 | 3 | 20 |
| `bspline610`, Solution-2 | (6,10) | (1 +/- z^-1)^3 | Q of degree 2, R' of degree 6 | 4 | 18 |

The coefficients are

    (9,7):  Q(z) = 1 + t1 z^-1 + t2 z^-2 + t1 z^-3 + z^-4,   R(z) = 1 + t3 z^-1 + z^-2
            t1 = -4.630464, t2 = 9.597484, t3 = 3.369536
    (6,10): Q(z) = 1 + s3 z^-1 + z^-2
            G(z) = (1-z^-1)^3 (1-z^-1)^2 S(z) = (1-z^-1)^3 R'(z)
            S(z)  = 1 + s1 z^-1 + s2 z^-2 + s1 z^-3 + z^-4
            R'(z) = 1 + r1 z^-1 + r2 z^-2 + r3 z^-3 + r2 z^-4 + r1 z^-5 + z^-6
            s1 = -t1, s2 = t2, s3 = -t3, r1 = 2.630464, r2 = 1.336557, r3 = -9.934042

The gains h0 and g0 are not applied anywhere. They are left to whatever comes
next: a scaler, or the quantizer of an image coder, which can absorb them for
free.

## The Pascal stage

A direct polyphase build of (1+z^-1)^4 and (1-z^-1)^4 needs 16 adders per
output pair. The two polynomials share their even-power terms and differ only
in the sign of their odd-power terms:

    (1 +/- z^-1)^4 = (1 + 6z^-2 + z^-4) +/- (4z^-1 + 4z^-3)

So each polyphase branch forms the even-tap sum and the odd-tap sum once, and
a butterfly gives both outputs: the sum is the lowpass B-spline output and the
difference is the highpass one. That takes 12 adders, with 6a = 4a + 2a and
4a + 4b = 4(a + b). The degree-3 stage for (6,10) works the same way on
(1 + 3z^-2) +/- (3z^-1 + z^-3). There, 3 * e[m-1] is formed once for two
rows, and 3 * o is formed once and reused one pair later from a register.

## Polyphase bookkeeping

This is the part that takes the most care. Every filter runs at the
decimated rate on polyphase pairs. Notation: [a b c] means
a + b z^-1 + c z^-2 at the decimated rate.

**Splitting the input** (`polyphase_split`).
- Type-I delays the odd branch by one sample before the 2:1 decimators, so
  pair m is (e, o) = (x[2m], x[2m-1]).
- Type-II advances the odd branch, so pair m is (x[2m], x[2m+1]). In causal
  hardware, that pair is ready only when x[2m+1] arrives.

**Pascal rows.** The Pascal stage produces the even and odd components of
u = (1+z^-1)^N x and v = (1-z^-1)^N x. For N = 4:

| | row1 | row2 | row3 | row4 |
|---|---|---|---|---|
| Type-I  | [1 6 1] on e | [4 4 0] on o | [1 6 1] on o | [0 4 4] on e |
| Type-II | [1 6 1] on e | [0 4 4] on o | [1 6 1] on o | [4 4 0] on e |

The butterfly then gives:

    ue = row1 + row2    ve = row1 - row2    (samples u[2m], v[2m])
    uo = row3 + row4    vo = row3 - row4    (u[2m-1] / v[2m-1] for Type-I,
                                             u[2m+1] / v[2m+1] for Type-II)

**Distributed part.** Each distributed filter splits into an even and an odd
sub-filter. The even one acts on (ue, ve) and the odd one on (uo, vo):

| | (9,7) Type-I | (9,7) Type-II | (6,10) |
|---|---|---|---|
| lowpass even | Q0 = [1 t2 1] | [1 t2 1] | [0 1 1]; retimed [1 1] |
| lowpass odd | Q1 = [t1 t1 0] | [0 t1 t1] | [0 s3]; retimed [s3] |
| highpass even | R0 = [0 1 1] | [0 1 1] | Solution-1: [1 s2 1] after (1-z^-1)^2; Solution-2: [1 r2 r2 1] |
| highpass odd | R1 = [0 t3 0] | [0 0 t3] | Solution-1: [s1 s1]; Solution-2: [r1 r3 r1] |

**Sharing.** Equal taps share one multiplier. For example, Q1 is computed as
t1 * (uo[m] + uo[m-1]). That is how the multiplier counts in the table above
come about.

**Retiming** (`RETIME`, default 1). In each architecture, one pair of
sub-filters as drawn shares a leading delay. Retiming cuts that delay out of
both sub-filters, which saves registers and makes that band come out one
output sample earlier. `RETIME = 0` gives the form as drawn.
- (9,7): the highpass pair. R0 = [1 1] and R1 = [t3] (Type-I) or [0 t3]
  (Type-II). In Type-II the t1 pre-adder also moves in front of its
  register, so every multiplier reads a register. Counting the Pascal stage,
  this leaves 8 decimated-rate registers in Type-I (10 as drawn) and 10 in
  Type-II (12 as drawn).
- (6,10): the lowpass pair. Q0 = [1 1] and Q1 = [s3], which saves two
  registers: 10 instead of 12 in either solution.

**Output alignment.**
- (9,7), retimed: L is centred on sample 2m-4 and H on 2m-3. That is the
  usual lowpass-even / highpass-odd interleaving. As drawn (`RETIME = 0`),
  H is centred on 2m-5 instead.
- (6,10), retimed: L is centred on sample 2m-2.5 and H on 2m-4.5. As drawn,
  both bands are centred on 2m-4.5.

**Solution-1 (1-z^-1)^2 stage** (`diff2_poly`). It maps (ve, vo) to
(we, wo) with no multipliers:

    we = ve[m] + ve[m-1] - 2 vo[m]
    wo = vo[m] + vo[m-1] - 2 ve[m-1]

**Functions.** Taking x[n] = 0 before reset, the architectures compute:

    (9,7)   L[m] = sum_k hq[k] x[2m-k],  hq = (1+z^-1)^4 Q(z)
            H[m] = sum_k gq[k] x[2m-k],  gq = (1-z^-1)^4 R(z)   (z^-2 times that if RETIME = 0)
    (6,10)  L[m] = sum_k hq[k] x[2m-k],  hq = (1+z^-1)^3 (1 + s3 z^-1 + z^-2)   (z^-2 times that if RETIME = 0)
            H[m] = sum_k gq[k] x[2m-k],  gq = (1-z^-1)^5 S(z)

Type-I and Type-II give exactly the same output sequence. Type-II gives it
one input sample later. The two (6,10) solutions differ only in rounding.

## Number format

- **Data.** Every datapath word is 16-bit two's complement, and adders wrap
  modulo 2^16. Overflow is not detected.
- **Headroom.** The largest gain from input to output (the sum of the
  absolute filter taps) is 51.6 for the (9,7) lowpass and 89.0 for the
  (6,10) highpass. Any input within +/-368 therefore never overflows. That
  covers 9-bit signed samples such as level-shifted 8-bit pixels.
  Intermediate sums may wrap, but the wrap cancels: additions are exact
  modulo 2^16, and no multiplier operand can overflow in that input range.
- **Multipliers.** Every multiplier is 16 x 12. Coefficients are 12-bit
  signed numbers with 7 fraction bits (Q5.7, value = round(c * 128)). This
  is the narrowest integer part that holds |r3| = 9.93.
- **Products.** A product is shifted right arithmetically by 7, which
  truncates towards minus infinity, and is kept to 16 bits. `dwt_pkg::cmul`
  does this.
- **Error.** Compared with the exact real-valued filters, each output is off
  by at most one LSB per multiplier plus |multiplier operand| / 256 from
  coefficient rounding.

## Interface and timing

Every architecture has the same ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset that clears all state |
| `in_valid`, `in_x` | in | 1, 16 | one input sample per cycle at most; gaps allowed, no back-pressure |
| `out_valid` | out | 1 | one pulse per completed input pair |
| `out_l`, `out_h` | out | 16 | lowpass and highpass subband samples, without h0 / g0 |

- **Rate.** One (L, H) pair comes out per two input samples. At full input
  rate, `out_valid` pulses every other cycle.
- **Latency.** `out_valid` rises two clock edges after the cycle in which the
  pair-completing sample is accepted. For Type-I that sample is x[2m]; for
  Type-II it is x[2m+1]. One edge is the polyphase register and one is the
  output register.
- **Delay lines.** All decimated-rate delay lines advance only when a pair
  completes, so input gaps do not disturb the filters.
- **`RETIME` parameter** (`bspline97` and `bspline610`, default 1). Selects
  the retimed datapath; see above.
- **`PIPE` parameter** (default 0). It adds the pipelining cut.
  - On `bspline97` this is one register stage between the Pascal stage and
    the distributed part. It takes the Pascal-stage adders off the path
    through the multipliers. Both bands come out one output sample later.
  - On `bspline610` (Solution-1 only) it is one register on each of the two
    (1-z^-1)^2 outputs, in front of S(z). It shortens the highpass path. The
    highpass comes out one output sample later; the lowpass is unchanged.

`bspline_dwt_top` puts the four architectures side by side on one input
stream. Its outputs are `v97a/l97a/h97a` ((9,7) Type-I), `v97b/l97b/h97b`
((9,7) Type-II), `v610a/l610a/h610a` ((6,10) Solution-1) and
`v610b/l610b/h610b` ((6,10) Solution-2). The four are alternatives; a real
system would keep one. `RETIME97`, `PIPE97`, `RETIME610` and `PIPE610`
pass through to the `RETIME` and `PIPE` parameters.

## Module hierarchy

    bspline_dwt_top
      bspline97  (TYPE = Type-I, Type-II)
        polyphase_split   pascal_bspline4   dist97
      bspline610 (SOLUTION = 1, 2)
        polyphase_split   pascal_bspline3   dist610_lp
        diff2_poly + dist610_hp_sol1        (Solution-1)
        dist610_hp_sol2                     (Solution-2)
    dwt_pkg: widths, coefficient constants, cmul, poly_type_e

## Departures and limits

- **Register placement.** Exactly where the retimed and pipeline registers
  sit is worked out here from the retiming and pipelining cuts. The
  published architecture marks the cuts but does not list the registers.
- **Register counts.** The (9,7) datapaths match the published counts: 8
  (Type-I) and 10 (Type-II) retimed, 10 and 12 as drawn, and 12 for
  pipelined Type-I.
- **(6,10) register counts.** These are one register above the published
  ones in every variant. Solution-1 has 10 retimed, 12 retimed and
  pipelined, and 14 pipelined only (published: 9, 11, 13). Solution-2 has
  10 retimed (published: 9). The extra register holds 3 * o[m-1] in the
  Pascal stage; recomputing it would cost one more adder instead. The adder
  and multiplier counts match.
- **(6,10) pipelining variants.** Solution-1 has three published timing
  variants: retimed, retimed and pipelined, and pipelined only. These are
  `RETIME`/`PIPE` = 1/0, 1/1 and 0/1.
- **Added registers and handshake.** The input polyphase register, the output
  register, the valid signalling and the reset behaviour are additions; the
  architecture description does not cover them.
- **Number format.** The Q5.7 coefficient format and truncating products are
  choices made for this RTL. The 16-bit words and 16 x 12 multipliers follow
  the published design point.
- **Not included.** The normalization gains h0/g0. The lifting and
  convolution architectures, which the B-spline architectures were compared
  against.
- **No synthesis results.** Timing and gate-count figures depend on a cell
  library and are not reproduced.

## Simulation

Each testbench in `tb/` prints `TB_RESULT checks=N failures=M` and has a
watchdog. To build and run one with Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl rtl/dwt_pkg.sv \
        tb/bspline_dwt_top_tb.sv --top-module bspline_dwt_top_tb -o sim
    ./obj_dir/sim

Replace the testbench file and top-module name to run another one.

- **Leaf blocks.** `polyphase_split_tb`, `pascal_bspline4_tb`,
  `pascal_bspline3_tb`, `dist97_tb`, `dist610_lp_tb`, `diff2_poly_tb`,
  `dist610_hp_sol1_tb` and `dist610_hp_sol2_tb` drive random inputs with
  random enable gaps. They compare each cycle against an independent model:
  a direct full-rate convolution for the binomial and difference stages, and
  a tap-by-tap model for the distributed filters. Those models round their
  coefficients from the decimal values themselves rather than reading
  `dwt_pkg`.
- **Architectures.** `bspline97_tb` tests five configurations: both types,
  retimed and as drawn, plus pipelined. `bspline610_tb` tests five: both
  solutions retimed and as drawn, plus retimed and pipelined Solution-1. They compare
  bit-exactly against a full-rate model built from the serial input, and
  check the rate and the two-cycle latency.
- **Top level.** `bspline_dwt_top_tb` runs at default parameters. The input
  is an impulse followed by a 512-sample image row, with input stalls. It
  compares every output of all four architectures with the real-valued
  (9,7) and (6,10) filters within the fixed-point error bound, checks that
  Type-I and Type-II agree sample for sample, checks latency and output
  counts, and counts that stalls and each architecture's outputs occurred.

All testbenches run in well under a second.
