# Multi-precision floating-point divider (SP / DP / DPE / QP)

This is a floating-point divider built around one 114 x 114-bit multiplier. It divides
in quadruple precision (QP, 113-bit significand), and the same hardware also divides in
double-extended (DPE), double (DP) and single (SP) precision. The significand quotient
comes from a truncated series expansion, not from a digit recurrence. A small table
gives the reciprocal of the divisor's leading bits. After that a fixed schedule of
multiplications on the shared multiplier builds the quotient. Lower precisions need fewer
series terms, so they skip states and finish sooner:

| mode | exponent | fraction | FSM cycles | latency | new operation every |
|------|----------|----------|------------|---------|---------------------|
| SP   | 8 bits   | 23 bits  | 7          | 9       | 8 cycles            |
| DP   | 11 bits  | 52 bits  | 9          | 11      | 10 cycles           |
| DPE  | 15 bits  | 64 bits  | 10         | 12      | 11 cycles           |
| QP   | 15 bits  | 112 bits | 11         | 13      | 12 cycles           |

The results are faithfully rounded: in QP, DPE and DP every result is one of the two
representable numbers that bracket the exact quotient. SP is the exception described
under *Accuracy*.

## Register format

All four precisions share one 128-bit layout. As a result the sign, the exponent and
the significand sit on the same wires in every mode:

```
 127 | 126 ........ 112 | 111 ................................. 0
sign |  exponent field  |  fraction, left-aligned
     |  SP  [119:112]   |  SP  [111:89]
     |  DP  [122:112]   |  DP  [111:60]
     |  DPE [126:112]   |  DPE [111:48]
     |  QP  [126:112]   |  QP  [111:0]
```

The exponent ends at bit 112 and the fraction starts at bit 111, so the binary point
does not move between modes. On input, bits outside the selected mode's fields are
ignored. On output they are zero. DPE is treated like the IEEE formats: its 64
fraction bits have an implicit leading one, so its significand has 65 bits. x87's
explicit integer bit is not modelled. Modes are encoded `00` SP, `01` DP, `10` DPE,
`11` QP (`fpdiv_pkg::mode_e`).

## Datapath

```
 in_a,in_b,in_mode ──► input register
                          │
   stage 1 (comb.)   fp_unpack x2 ─► exp_sign_unit (sign, e_a-e_b+BIAS, shift, specials)
                          └─ m2[111:104] ─► recip_lut (256 x 113)
                          │
                   first-stage register (held for the whole operation)
                          │
   stage 2           mant_div:  div_fsm ─► in1/in2 registers ─► mult114 ─┐
                                  ▲────────── term registers A..L ◄──────┘
                                  M = A - L  (registered)
                          │
   stage 3 (comb.)   post_proc: normalise, sub-normal shift, round to nearest even,
                                specials, pack
                          │
                      output register ─► out_q, out_flags, out_valid
```

*Exponent path.* The bias is one 15-bit signal built from the mode bits:
`{0, 4{QP|DPE}, 3{QP|DPE|DP}, 7'h7F}`. This gives 127, 1023 or 16383, so one
subtractor computes `e_a - e_b + BIAS` in every mode. When that exponent is below 1,
the result will be sub-normal. The same unit then also supplies the right-shift amount
`1 - exponent` (saturated at 200). Sub-normal operands are
normalised in stage 1 by a leading-zero count and a shift. Their exponent then becomes
zero or negative, and the internal exponent is a signed 18-bit number.

## The series-expansion mantissa divider (`mant_div`)

This is the core of the design. Let `m1` and `m2` be the normalised significands in
`[1,2)`. The divisor is split as `m2 = a1 + a2`, where `a1` is its hidden bit plus its
8 leading fraction bits and `a2 < 2^-8` is the rest. The table supplies
`r ≈ 1/a1`, and with

```
A = m1*r          x = r*m2 - 1   (0 <= x < 2^-8 + 2^-111)
q = m1/m2 = A/(1+x) = A * (1 - x + x^2 - x^3 + ...)
```

the series is regrouped so that it needs only a few multiplications:

```
q ≈ A - A*(x - x^2)*(1 + x^2 + x^4 + x^6)*(1 + x^8)
        └─ G ──┘    └──── H ─────────┘   └─ I ──┘
```

The product `(x - x^2)(1 + x^2 + ... + x^6)(1 + x^8)` equals `x - x^2 + x^3 - ... - x^16`.
The error left over is about `x^17 < 2^-136`. Each lower precision drops factors:

* DPE drops `I` (series through `x^8`).
* DP also drops `x^6` from `H` (series through `x^6`).
* SP keeps only `G` (series through `x^2`).

### Schedule

`div_fsm` has eleven states. In each state the operand registers `in1`/`in2` are
loaded. Their product appears on the combinational multiplier output during the
following state, where it is captured:

| state | captured from the product            | operands loaded for the next state |
|-------|--------------------------------------|------------------------------------|
| S0    | –                                    | m1, r                              |
| S1    | A = m1*r                             | m2, r                              |
| S2    | B = x = m2*r - 1                     | B, B                               |
| S3    | C = x^2; G = B - C                   | C, C                               |
| S4    | D = x^4; H_T = 1 + C + D             | C, D                               |
| S5    | E = x^6                              | D, D                               |
| S6    | F = x^8; I = 1 + F                   | G, (DP ? H_T : H_T + E)            |
| S7    | J = G*H                              | J, I                               |
| S8    | K = J*I (QP) or J (DP, DPE)          | (SP ? G : K or J), A               |
| S9    | L = A*K (or A*G in SP)               | –                                  |
| S10   | M = A - L, registered; Done / idle   | –                                  |

The paths through the states are:

* QP: S0–S10.
* DPE: skips S7.
* DP: skips S5 and S7.
* SP: goes from S3 straight to S8.

In DP the product seen in S6 is not used. In SP the product seen in S8 is not used.
After reset the FSM rests in S10, and it leaves S10 only when a new operation starts.

### Fixed-point formats

All terms are unsigned integers with an implied scale: value = integer · 2^-s.

| term            | width | s   | note                                             |
|-----------------|-------|-----|--------------------------------------------------|
| m1, m2, r       | 113   | 112 | r in (0.5, 1]                                    |
| A               | 128   | 126 | product bits [225:98]                            |
| B, G            | 114   | 121 | product bits [216:103]; the integer 1 of m2*r is dropped |
| C (operand copy)| 96    | 110 | for D = C^2 and E = C*D                          |
| D (operand copy)| 96    | 124 | for E and F = D^2                                |
| H_T, H, I       | 114   | 113 | one integer bit                                  |
| J, K            | 114   | 120 |                                                  |
| L, M            | 122/128 | 126 | M = q in (0.5, 2)                              |

The higher powers are kept only to the bits that matter. They are multiplied by `G`
(about 2^-8) and added to 1, so their own truncation hardly shows. The errors that do
add up come from the truncations of B, G, J, K, L and of the copy `A[127:14]` fed to
the last product. Together they keep |M − q| below about 2^-117. That is well under
half a QP ulp.

### Why `x = r*m2 - 1` and a rounded-up table

With a 113-bit table entry, `r*a1` differs from 1 by up to 2^-112. Using the literal
`B = r*a2` would put that difference straight into the quotient, close to one QP ulp.
This design instead forms `x` from the whole divisor, `r*m2 - 1`. The identity
`q = A/(1+x)` is then exact whatever `r` is. Table entries are `ceil(2^120/(256+i))`,
rounded up, so `x` is never negative and every term stays unsigned. The table is
computed from that formula when the design is elaborated, so there is no data file.

## Multiplier (`mult114`, `kara39`)

The 114-bit operands are cut into three 38-bit parts. A 3-way Karatsuba step then
needs six products: three of the parts (38 x 38) and three of pairwise sums (39 x 39).
Each of the six is a `kara39` unit, a 2-way Karatsuba step that splits 39 bits into a
high 19 and a low 20. Each unit has one 19x19, one 20x20 and one 21x21 multiplier,
which makes 18 small multipliers. These map onto the DSP blocks of an FPGA. The
multiplier is purely combinational: one product per clock, with no internal pipeline.

## Post-processing (`post_proc`)

1. If M < 1, it is shifted left by one and the exponent drops by one.
2. If the exponent is below 1, the significand is shifted right by `1 - exp`. The
   amount comes from the exponent unit (`rshift`), plus one when step 1 shifted left.
   The shifted-out bits go into the sticky bit.
3. The significand is rounded to nearest, ties to even, at 24/53/65/113 bits. A carry
   out of the significand raises the exponent, and can turn a sub-normal result into a
   normal one.
4. Overflow gives infinity. NaN, infinity and zero results are inserted from the class
   decided in stage 1. The result is packed.

Flags (`fpdiv_pkg::flags_t`) are `invalid` (0/0, ∞/∞), `div_by_zero`, `overflow` and
`underflow`. There is no inexact flag: M is an approximation, so its low bits cannot
tell an exact quotient from an inexact one. For the same reason `underflow` is raised
for every tiny result. A NaN result is the positive quiet NaN with only the top fraction
bit set. NaN operands are not propagated.

## Accuracy

* **QP, DPE, DP:** faithful. The result is always the truncated exact quotient or the
  next representable number above it.
* **SP:** the series stops at `x^2`, so M can exceed the exact quotient by up to
  `q·x^3`. That is about one SP ulp when the divisor's `a2` is near its maximum, and
  then round-to-nearest can land one ulp above the faithful pair. In the end-to-end
  test this happens for about 0.1 % of random SP divisions. It would take one more
  series factor (one more FSM state) to remove it.
* Results are not always correctly rounded in any mode. When the exact quotient lies
  within the error of M of a rounding boundary, either neighbour can come out.

## Interface and timing (`fp_div_top`)

| port        | dir | width | meaning                                             |
|-------------|-----|-------|-----------------------------------------------------|
| clk, rst_n  | in  | 1     | clock; asynchronous active-low reset               |
| in_valid    | in  | 1     | an operation is offered                             |
| in_ready    | out | 1     | it is taken at this edge if in_valid                |
| in_mode     | in  | 2     | `mode_e`                                            |
| in_a, in_b  | in  | 128   | dividend, divisor (register format above)           |
| out_valid   | out | 1     | one-cycle pulse                                     |
| out_q       | out | 128   | quotient, held until the next result                |
| out_flags   | out | 4     | {invalid, div_by_zero, overflow, underflow}         |

`in_ready` is high while the FSM rests in S10 and the input register is empty. Once
taken, an operation moves through these steps:

1. It spends one cycle in the input register while stage 1 is evaluated.
2. It spends 7 to 11 cycles in S0..S10.
3. M is registered at the end of S10.
4. One cycle later the rounded result is in the output register.

This gives the latency and issue interval in the table at the top. The next operation
is taken at the clock edge that ends the previous one's S10 cycle. Consecutive
operations are therefore accepted one cycle more than the FSM cycle count apart. An
offered operation must stay unchanged until it is taken (an assertion checks this).

## Where this RTL makes its own choices

These are not given by the architecture and were chosen here:

* the handshake, reset, flags and NaN encoding;
* S10 doubling as the idle state;
* DPE as a 64-bit fraction with an implicit leading one;
* part of the fixed-point slices (those of A, B, the C operand, D, J and L are the
  architecture's) and the forming of `x` (see above);
* the table rounding;
* the 39-bit split;
* the exact cut between the shift amount computed with the exponent and the extra
  shift added after normalisation.

The state schedule, the series grouping, the mode-dependent state skipping, the table
size, the multiplier decomposition and the latency/throughput figures are those of
the architecture.

## Files and simulation

`rtl/` holds one unit per file:

* `fpdiv_pkg` (types, field helpers, unified bias)
* `fp_div_top`
* `fp_unpack`, `lzc`
* `exp_sign_unit`
* `recip_lut`
* `mant_div`, `div_fsm`
* `mult114`, `kara39`
* `post_proc`

`tb/` has one self-checking testbench per unit, plus `fpdiv_ref_pkg`. That package is
an integer reference: exact long division of the significands and packing. Every
testbench ends by printing `TB_RESULT checks=N failures=M`.

`tb_fp_div_top` runs about 400,000 divisions over the four modes. They are random
normal operands, extreme divisor patterns, sub-normal operands and results, overflow
and all special operands. For every result it checks the faithful-rounding property,
the sign, the flags and the latency. It checks the issue interval on back-to-back
streams. It also counts each mechanism and reports any that never occurred.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/fpdiv_pkg.sv tb/fpdiv_ref_pkg.sv tb/tb_fp_div_top.sv --top-module tb_fp_div_top
./obj_dir/Vtb_fp_div_top
```

Replace `tb_fp_div_top` with any other testbench name. The design has no parameters
other than the table size in `recip_lut`.
