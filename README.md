# Two-path floating-point adder with one significand addition per path

This is an IEEE 754 binary64 adder/subtractor built around one idea: **two's
complementation and rounding never need the adder at the same time, so one
addition can do both.** A conventional adder aligns, adds, and then adds again
to round (and, for a negative difference, once more to convert). Here each
datapath has a single *compound adder* that produces both `X+Y` and `X+Y+1`.
A small piece of logic looks at the bits that were shifted out during alignment
and at a few bits of the sum, and decides which of the two sums is the
correctly rounded result. That decision already accounts for the
normalization shift the result will need.

The algorithm is the one of Quach and Flynn, "An Improved Algorithm for
High-Speed Floating-Point Addition" (Stanford CSL-TR-90-442, 1990). The RTL
follows its select equations for round-to-nearest and round-toward-zero. It
also builds the half-adder row it proposes for the directed modes. Everything
the algorithm leaves open, from the exponent width and special values to the
port list, is this design's own. That is listed in
[Departures and own choices](#departures-and-own-choices).

The adder is purely combinational: the result is valid in the same cycle as
the operands.

## Notation

Significands are `n = N = 53` bits wide, hidden one included. Once the
operands are swapped, `A` is the one with the larger exponent and `B` is
shifted right by `d = |Ea - Eb|`. Of the bits shifted out of B, three matter:

| name     | meaning                                                  |
|----------|----------------------------------------------------------|
| `b_n`    | first bit shifted out (guard position, G)                |
| `b_n+1`  | second bit shifted out (round position, R)               |
| `s`      | OR of all further shifted-out bits (sticky)              |
| `L`      | LSB of the N-bit sum                                     |
| `S_g1`   | `a_(n-1) xor b'_(n-1)`: half sum of the adder inputs at the LSB |
| `S_g2`   | the same one position higher                             |
| `E_o`    | effective operation: 0 = add, 1 = subtract               |
| `S_E`    | sign of the result                                       |

`b'` is B as the adder sees it, so it is inverted for a subtraction.

## The two paths

| path | used when | alignment | normalization | module |
|------|-----------|-----------|---------------|--------|
| g    | effective addition, or subtraction with `d > 1` | full right shift by `d` | at most one bit, right (addition) or left (subtraction) | `g_path` |
| l    | effective subtraction with `d <= 1` | 0 or 1 bit | possibly many bits left (cancellation) | `l_path` |

Both paths run in parallel on every operation. `result_select` takes the l
path exactly when `E_o = 1` and `d <= 1`. Only one long shift is ever on the
way from the operands to the result: the alignment in the g path, or the
normalization in the l path.

```
 x, y ──┬─ es_swap ── g_path: align_shifter ─ half_adder_row ─ compound_adder ─ mux(g_in) ─ 1-bit norm ─┐
        │                                                   └──────── gin_logic ───────┘               ├─ result_select ─ z
        └─ pred_swap ─ l_path: compound_adder ─ mux(l_in)/convert ─ lod ─ norm_shifter ────────────────┘
                                         └──── lin_logic ────┘
```

## How one addition rounds: the g path select `g_in`

The exact result of `A ± B` would need a 2N-bit adder. Only the upper N bits
are added; the lower half reaches them in two ways:

* **Complement carry `C_c`.** For a subtraction B is inverted, and the two's
  complement "+1" goes in at the very bottom of the 2N-bit frame. It ripples up
  into the N-bit adder only when every shifted-out bit is zero, so
  `C_c = !b_n & !b_n+1 & !s`.
* **Rounding carry.** When rounding up, the increment lands on the N-bit LSB.

If `C_c = 1`, then G, R and s are all zero after complementing. The result is
exact and needs no rounding. So the two increments exclude each other, and the
select is

```
g_in = G·C_r  OR  C_c          (take X+Y+1 when g_in = 1)
```

Here `C_r` is the rounding condition. For round-to-nearest-even it is
`C_r = S OR L`, where S is the final sticky.

G, S and L depend on the normalization the result will need, which gives four
cases:

| case | condition | what the increment must achieve |
|------|-----------|---------------------------------|
| NRS: addition, no shift       | no carry out of `A+B`          | round at the LSB: `G = b_n`, `S = b_n+1 \| s`, `L = S_g1` |
| ORS: addition, 1-bit right shift | carry out of `A+B`          | round at bit 1. Here `G = S_g1`. If G is 1, adding 1 at bit 0 carries into bit 1, which is the same as adding 2 there. If G is 0 no rounding is needed. So `X+Y+1` is still enough. |
| NLS: subtraction, no shift    | MSB of the sum set             | G/R/s are those of the complemented tail: `G = !b_n xor (!b_n+1 & !s)` |
| OLS: subtraction, 1-bit left shift | MSB of the sum clear      | the complemented G becomes the new LSB and is shifted in as `q`; R and s become the new guard and sticky |

For NLS/OLS, the MSB that decides is that of `X+Y` unless `C_c` reaches the
adder. In that case `g_in = 1` anyway.

Put together, the round-to-nearest select that `gin_logic` implements term by
term is

```
g_in = !E_o·[ g_out0·S_g1·(b_n | b_n+1 | s | S_g2)  |  !g_out0·b_n·(b_n+1 | s | S_g1) ]
     |  E_o·{ !b_n·!b_n+1·!s
            |  g0_0·[ !b_n·(b_n+1 | s)  |  b_n·!b_n+1·!s·S_g1 ]
            | !g0_0·!b_n·(b_n+1 xor s) }
q    = !b_n·b_n+1·s | b_n·!b_n+1            (bit shifted in on OLS)
```

`g_out0` is the carry out of `A+B`. `g0_0` is the MSB of `X+Y`. Round toward
zero reduces to `g_in = E_o·C_c` and `q = b_n xor (s | b_n+1)`.

After the select, `g_path` normalizes by one bit at most:

* For an addition, a carry out of the selected sum means a right shift and
  exponent + 1. This also catches rounding 1.11…1 up to 10.00…0.
* For a subtraction, the carry out is the discarded complement overflow. A
  clear MSB means a left shift with `q` shifted in, and exponent − 1. With
  `d > 1` the difference is above 1/2, so one bit is always enough.

## Directed rounding and the half-adder row

Toward +∞ or −∞, an inexact result is rounded up whenever the increment points
away from zero for the result's sign. After a one-bit right shift (ORS) that
increment is 2 at the N-bit LSB, even when the LSB of `A+B` is 0. `X+Y+1` no
longer covers that, so `A+B`, `A+B+1` and `A+B+2` would all be needed.

`half_adder_row` solves this without a third adder. A row of half adders turns
`A, B` into a sum row and a carry row. The carry row is shifted one place left,
which frees its LSB slot. When the LSB of `A+B` is 0, that slot receives a 1
(the inverted sum LSB). The compound adder then sees `X+Y = A+B+1` and
`X+Y+1 = A+B+2`. Plain `A+B` is `X+Y` with its LSB cleared, and `clr_lsb`
does that. When the LSB is 1, nothing is filled, and `A+B+1` already carries
into bit 1. The carry of the top half adder and the carry of the adder are
ORed: their total is below 2^(N+1), so at most one of them is set.

In this design the fill is enabled only for the directed modes on effective
additions. For subtraction the directed modes need nothing new: complement
and increment still exclude each other. `gin_logic` then uses
`g_in = C_c | (increment wanted & inexact)`.

## The l path: prediction, conversion, long shift

With `d <= 1`, the exponents differ by one exactly when their LSBs differ. So
`pred_swap` predicts the one-bit alignment as `pred = Ex[0] xor Ey[0]`. It
picks the larger operand from the two low exponent bits: with a difference of
one, `Ex` is larger iff `(Ex[1:0] - Ey[1:0]) mod 4 = 1`. Neither step waits for
the full exponent subtraction. When `d > 1` its outputs are wrong, but then
they are not used.

At most one bit is shifted out (`b_n`), so the select is simple:

```
l_in = !b_n | !pred | l0_0·b_n·R        (take X+Y+1 = A-B exactly when set)
q    = b_n
```

* `!b_n` covers two cases. Either the complement carry reaches the adder, or
  `d = 0`, where nothing was shifted out.
* `l0_0·b_n·R` covers the only inexact case: `d = 1`, `b_n = 1` and no left
  shift. The difference then ends in exactly one half LSB. `R` is `S_l1` (odd
  LSB, a tie) for round-to-nearest, the direction test for the directed modes,
  and 0 toward zero.
* When a left shift follows, the result is exact. `b_n` itself is shifted in
  behind the LSB by `norm_shifter`.

With `d = 0` the difference can be negative. The carry out of `X+Y+1 = A-B`
is then 0, and the magnitude is `B - A = ~(A + ~B)`, the bitwise inverse of
`X+Y`. The conversion costs an inverter row and no adder, and the sign is
taken from B. `lod` counts the leading zeros of the selected sum and
`norm_shifter` shifts left by that count. The shift is capped at `E_a - 1`,
so tiny differences come out as subnormals with exponent field 0. A zero
difference gives +0, or −0 when rounding toward −∞.

## Result assembly

`result_select` does the following:

* It picks the path.
* It adds the g path's ±1 to `E_a`.
* It packs subnormal g results, which only appear when both inputs are
  subnormal.
* It handles overflow. Round-to-nearest gives ±∞. Toward zero gives the
  largest finite number. Each directed mode gives ±∞ on its own side and the
  largest finite number on the other.
* It handles special operands. A NaN input, or ∞ − ∞, gives the default quiet
  NaN `0x7FF8000000000000`. An infinity passes through with its effective sign.

Subnormal inputs are unpacked with hidden bit 0 and exponent 1, and go through
the same datapath.

## Interface

```systemverilog
fp_adder #(.N(53), .EW(11)) u (
  .x (x),     // [EW+N-1:0] operand, IEEE format {sign, exponent, fraction}
  .y (y),     // [EW+N-1:0] operand
  .sub(sub),  // 1: z = x - y, 0: z = x + y
  .rm (rm),   // fpadd_pkg::rmode_t: RM_RNE=0, RM_RTZ=1, RM_RUP=2 (+inf), RM_RDN=3 (-inf)
  .z  (z)     // [EW+N-1:0] rounded result
);
```

No exception flags are produced. `N` and `EW` are parameters. The defaults are
binary64, and `N=24, EW=8` gives binary32, which is tested.

| module | role |
|--------|------|
| `fpadd_pkg`      | rounding-mode enum, default widths, `dir_inc` helper |
| `fp_adder`       | top: unpacking, both paths, final select |
| `es_swap`        | exponent difference `d`, swap, `E_o` (g path) |
| `pred_swap`      | one-bit alignment prediction and swap (l path) |
| `align_shifter`  | right shift by `d` with `b_n`, `b_n+1`, `s` |
| `half_adder_row` | half adders with the inverted-LSB fill |
| `compound_adder` | `X+Y` and `X+Y+1` with carries |
| `gin_logic`      | `g_in`, `q`, `clr_lsb` for all four modes |
| `lin_logic`      | `l_in`, `q` |
| `lod`            | leading-zero count |
| `norm_shifter`   | left shift inserting `q` |
| `g_path`, `l_path` | the two datapaths |
| `result_select`  | path select, exponent, overflow, specials, packing |

## Departures and own choices

These are the points where this RTL is not a direct transcription of the
published algorithm:

1. **Shift direction after rounding (g path, subtraction).** The published
   scheme decides "no shift" or "one left shift" from the sums before
   rounding. In the left-shift case a rounding carry can turn 0.11…1 into
   1.00…0, and a left shift would then drop the leading one. `g_path`
   therefore reads the shift direction from the *selected* sum. The select
   equations are unchanged.
2. **Directed-mode select for additions.** The published round-toward-+∞
   equation selects `X+Y+1` for every odd `A+B` in the no-shift addition case.
   That would round exact positive results up. This design uses the general
   rule `C_in = (inexact & increment wanted) | C_c` together with the fill and
   `clr_lsb`. The published subtraction and one-bit-shift terms agree with the
   implemented logic. Round toward −∞ mirrors the sign, as published. The
   published shift-in bit `q` for a directed mode whose sign truncates is
   `b_n·(b_n+1 | s)`. That disagrees with the complemented guard bit, which is
   `b_n xor (b_n+1 | s)`, the value the published round-toward-zero `q` also
   uses. `gin_logic` uses the complemented guard bit.
3. **Half-adder row always present.** It sits in the g path for all modes and
   is active only for directed modes on additions. A round-to-nearest-only
   adder would not need it.
4. **Leading-one detection after the adder.** The algorithm runs leading-one
   detection in parallel with the addition but does not say how. `lod` works
   on the selected sum. The shift amounts are the same, but the timing is not.
5. **l path swap and conversion.** Choosing the larger operand from two
   exponent LSBs, and converting through `~(X+Y)`, are this design's own.
6. **IEEE details.** These are all this design's choices: the exponent width,
   subnormals, overflow results, NaN/∞ handling, zero signs, the
   rounding-mode encoding and the absence of flags. The published adder also
   feeds its adder carry-in from a block labelled "G,R,S,V"; the meaning of V
   is not given, and nothing corresponds to it here.
7. **No pipeline.** The datapath is one combinational block. Register it
   outside if needed.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
with a `TB_RESULT checks=… failures=…` line.

* `tb_fp_adder` checks the whole adder at its default size against the
  reference model `tb/fp_ref_pkg.sv`. That model is a conventional
  align-add-normalize-round adder with a 128-bit frame and a jammed sticky
  bit. The test runs 160 000 operand pairs: 40 000 per rounding mode, in eight
  operand classes (random, close exponents, near-cancellation, subnormals,
  near-overflow, long shifts, specials, all-ones significands). In
  round-to-nearest mode the reference itself is also compared with the
  simulator's native double arithmetic. The test counts how often each
  mechanism occurs (NRS/ORS/NLS/OLS, rounding carry, `A+B+2` via the fill,
  LSB clear, d = 0, conversion, d = 1 rounding, long shift, zero, subnormals,
  overflow, NaN, ∞), and fails if any of them never occurs.
* `tb_fp_adder_single` builds the adder with `N=24, EW=8` and compares it with
  binary64 sums rounded once to binary32 (round-to-nearest).
* `tb_gin_logic` and `tb_lin_logic` test the select logic exhaustively. For
  every input combination they work out the required increment arithmetically
  from a model of the low-order bits. They do not reuse the select equations.
* `tb_g_path` and `tb_l_path` compare each path with the reference model.
  `tb_g_path` also checks the worked example 1.1 − 0.0111111111 (d = 2, no
  shift) and 1.0 − 0.0111111111 (one left shift).
* The leaf blocks (`es_swap`, `pred_swap`, `align_shifter`, `half_adder_row`,
  `compound_adder`, `lod`, `norm_shifter`, `result_select`) are checked
  against directly computed values.

Run one testbench with Verilator 5:

```sh
verilator --binary --timing --assert --top-module tb_fp_adder \
    rtl/fpadd_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv tb/tb_fp_adder.sv
./obj_dir/Vtb_fp_adder
```

Every testbench finishes in well under a second. For lint, run
`verilator --lint-only -Wall rtl/fpadd_pkg.sv rtl/*.sv --top-module fp_adder`.
The remaining lint warnings are about unused signals only, for example a
carry that the l path does not need, and the hidden bit of the l path result,
which the packing drops.
