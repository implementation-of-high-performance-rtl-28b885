# Posit multiplier (posit⟨16,1⟩, combinational)

This is a parameterised multiplier for **posits**, the "type III unum" number format. It
is a drop-in alternative to IEEE-754 floating point. A posit spends no bit patterns on NaNs:
there is exactly one non-real value, NaR. Its exponent field is partly variable-length, so
precision tapers. Numbers near 1.0 get more fraction bits than a float of the same width,
and very large or very small numbers get fewer.

The unit takes two N-bit posits (default N = 16, ES = 1) and returns their product,
rounded to nearest even, in a single combinational pass. The datapath works in three
steps:

1. **Extraction.** Each operand is decoded into its sign, regime, exponent and significand.
2. **Core arithmetic.** The sign is an XOR. A radix-4 Booth multiplier forms the significand
   product. The regime and exponent of both operands are added as one signed "scale".
3. **Construction.** The result's regime, exponent and fraction are packed into one bit
   string, then rounded. Sign and exceptions are applied last.

## The posit format in brief

An N-bit posit with ES exponent bits reads, after the sign bit:

```
 s | r r r ... r  r̄ | e (up to ES bits) | f (the rest)
     \ regime run /
```

* **Sign.** A negative posit is the two's complement of its absolute value. Every field is
  therefore read from the complemented word.
* **Regime.** A run of m identical bits ends at the first bit of opposite value, or at the
  end of the word. A run of ones means k = m−1. A run of zeros means k = −m. On 4 bits:
  `0001`→−3, `001x`→−2, `01xx`→−1, `10xx`→0, `110x`→1, `1110`→2.
* **Exponent.** The next ES bits form an unsigned value e with no bias. If the regime leaves
  no room for them, the missing bits count as zeros.
* **Fraction.** The remaining bits are the fraction f, with a hidden leading 1.
* **Value.** (−1)^s · useed^k · 2^e · 1.f, where useed = 2^(2^ES). In one number this is
  **scale = k·2^ES + e**, and the value is 1.f · 2^scale.
* **Special patterns.** `000…0` is zero. `100…0` is NaR.
* **Range.** maxpos = `0111…1` and minpos = `000…01`, with scales ±(N−2)·2^ES.

The widths below follow from N and ES. The `posit_pkg` functions compute them.

| name | formula | posit⟨16,1⟩ | meaning |
|---|---|---|---|
| RS | log2 N | 4 | width of the absolute regime value |
| MW | N−ES−2 | 13 | widest significand, hidden 1 included (the 2-bit minimum regime leaves N−3−ES fraction bits) |
| XW | ES+RS+2 | 7 | width of the summed product scale |

## Datapath

```
in1 ─► posit_extract ─┐ s1,rc1,r1,e1,m1            ┌─► posit_pack ─► out
in2 ─► posit_extract ─┤ s2,rc2,r2,e2,m2            │   (pack, round,
                      ├─ s = s1 ^ s2 ──────────────┤    saturate, sign,
                      ├─ booth_mult(m1,m2) ─► movf, normalise ─┤    exceptions)
                      └─ posit_exp_proc(rc,r,e,movf) ─► exp_o, e_o, r_o ─┘
```

Everything is combinational, with no clock and no handshake. The longest path runs from
extraction, through the significand multiplier and its final adder, then normalisation and
packing, to rounding. To run the unit at a clock rate, register its inputs and outputs, or
cut the path into pipeline stages.

### Extraction (`posit_extract`, `posit_lbd`)

A negative operand is first two's-complemented, giving `xin`. The first bit after the sign is
the **regime check bit** `rc`. `posit_lbd` is a leading-bit counter. For `rc = 1` it acts as
a leading-one detector, and for `rc = 0` as a leading-zero detector. Both share one priority
encoder, and the input is inverted when counting ones.

The run length `cnt` sets the absolute regime value:

* r = cnt − 1 for a run of ones;
* r = cnt for a run of zeros.

The signed regime is recovered later as k = rc ? r : −r.

Shifting the word left by cnt+1 removes the regime run and its terminating bit. The exponent
and fraction are then left-aligned. The significand `m` is `{1, fraction}`, padded on the
right to MW bits. The shift amount is one bit wider than `cnt`, because for maxpos the run
fills the whole word (cnt = N−1) and cnt+1 would otherwise wrap.

The block also flags zero and NaR operands.

### Significand product (`booth_mult`)

`booth_mult` is an unsigned MW×MW multiplier. It recodes the multiplier operand three bits at
a time into radix-4 digits in {−2, −1, 0, 1, 2}. The operand is zero-extended so that its top
digit sees a 0, which keeps the unsigned operand positive. Each digit selects 0, a or 2a, with
a two's complement for negative digits. A final adder sums the partial products weighted by
4^i. The RTL writes this adder as a chain of word adders and leaves its structure to
synthesis.

Both significands lie in [1, 2), so their product lies in [1, 4):

* The product's MSB is the **mantissa overflow** `movf` (product ≥ 2).
* Without overflow, the product is shifted left by one. Its leading 1 is then always at the
  MSB.
* Overflow instead adds one to the scale.

### Scale and result regime (`posit_exp_proc`)

Each operand's scale is the concatenation {k, e} read as one signed number: k·2^ES + e. The
product scale is

```
exp_o = {k1, e1} + {k2, e2} + movf          (XW bits, signed)
```

The packer needs the result's exponent bits and the **absolute regime run length** r_o:

* e_o = exp_o mod 2^ES (its low ES bits).
* For exp_o ≥ 0: r_o = k+1, with k = exp_o >> ES. The regime is k+1 ones.
* For exp_o < 0: r_o = −k. The regime is −k zeros. The block computes this as the
  magnitude's upper bits, plus one when the magnitude's low ES bits are non-zero, which is a
  ceiling division.

### Construction and rounding (`posit_pack`)

The final encoding is the subtlest part of the unit.

**Regime by shifting.** Let `neg` be the sign of exp_o. The packer forms the bit string

```
REM = { N copies of !neg, neg, e_o, fraction[FW+1 MSBs], OR(remaining fraction bits) }
```

and shifts it right by r_o, filling with zeros. The N bits at the top of the shifted string
then consist of r_o zeros followed by N−r_o copies of `!neg`. The bits just below them hold
r_o more copies of `!neg`, the terminating bit `neg`, the exponent and the fraction. Those
lower bits form exactly the regime/exponent/fraction string of the result. The unit keeps N−1
of them.

For example, 1.5 × 1.5 in posit⟨16,1⟩ (`0x4800 × 0x4800`):

| step | value |
|---|---|
| significand product | 2.25, so movf = 1 |
| scale | exp_o = 0 + 0 + 1 = 1 |
| regime | k = 0, r_o = 1, e_o = 1 |
| kept string | `10` `1` `001000000000` |
| result | `0x5200` |

**Rounding.** The kept bits end at the last kept bit L. The guard bit G is the next bit. The
sticky bit S is the OR of everything after G, including any bits shifted out of the bottom of
REM. One ULP is added when `G & (L | S)`, which is round to nearest, ties to even. This applies
whatever the regime length, including when the regime pushes exponent bits out of the word.
That matches rounding the exact, unbounded bit string, as posit arithmetic defines it.

Rounding can never carry out of the kept bits. A packed regime always contains its
terminating bit, so the kept string is never all ones unless it saturates. An assertion in
the RTL checks this.

**Saturation.** Posits never overflow to NaR and never underflow to zero. When r_o ≥ N−1,
the regime alone would fill the word:

* a non-negative scale gives **maxpos**;
* a negative scale gives **minpos**.

The `saturated` output reports this.

**Sign and exceptions.** A negative product returns the two's complement of `{0, kept}`. A
NaR operand gives NaR. Otherwise, a zero operand gives zero. NaR × 0 is NaR.

## Interface of `posit_mult`

| port | dir | width | meaning |
|---|---|---|---|
| `in1`, `in2` | in | N | posit operands |
| `out` | out | N | posit product, rounded to nearest even |
| `nar` | out | 1 | result is NaR (an operand is NaR) |
| `zero` | out | 1 | result is zero (an operand is zero and neither is NaR) |
| `mant_ovf` | out | 1 | significand product reached 2 (finite, non-zero results only) |
| `round_up` | out | 1 | rounding added one ULP |
| `saturated` | out | 1 | the result was clamped to maxpos or minpos |

Parameters are `N` (default 16) and `ES` (default 1, must be ≥ 1). The testbenches also check
posit⟨8,1⟩, posit⟨8,2⟩ and posit⟨32,2⟩.

## Design choices and where they depart from a literal reading

* **Word size.** The default N = 16 is the word size the unit was built and shown at. The
  exponent size **ES = 1** is a choice. It is the customary exponent size for 16-bit posits.
* **Significand width.** The multiplier is (N−ES−2)×(N−ES−2), hidden bit included. This is the
  smallest width that holds every posit significand. A wider "(N−ES)-bit" Booth multiplier
  would also work, but it wastes two bits.
* **Rounding at every regime length.** The unit rounds whatever the regime length. A cheaper
  variant skips the rounding increment once the regime is long (r_o ≥ N−ES−2). That variant
  truncates products that land in the low-precision tails, so this unit does not use it.
* **Saturation.** Saturation at maxpos/minpos follows the usual posit rules. The algorithm
  this unit follows treats exceptions only in general terms.
* **Operand flags.** The zero flags are active-high. The product is zero when either operand
  is zero.
* **Status outputs.** `mant_ovf`, `round_up` and `saturated` are extra observability outputs.
  The datapath does not need them.
* **Complemented operands.** `posit_extract` outputs the complemented operand `xin`. The top
  level does not use it, and lint reports the signal as unused.
* **Pipelining and reduction tree.** There is no pipelining and no hand-built Booth reduction
  tree. Both are left to the integrator or to synthesis.

## Files

| file | contents |
|---|---|
| `rtl/posit_pkg.sv` | width functions shared by all modules |
| `rtl/posit_lbd.sv` | leading-one / leading-zero counter |
| `rtl/posit_extract.sv` | operand extraction |
| `rtl/booth_mult.sv` | radix-4 Booth significand multiplier |
| `rtl/posit_exp_proc.sv` | scale sum, result exponent and regime run |
| `rtl/posit_pack.sv` | packing, rounding, saturation, sign, exceptions |
| `rtl/posit_mult.sv` | top level |
| `tb/posit_ref_pkg.sv` | bit-serial reference model (decode, exact multiply, encode with RNE) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_posit_mult_sizes` |

## Verification

The expected values come from `posit_ref_pkg`, a reference model that shares no code with
the RTL. It decodes posits one bit at a time and multiplies the significands exactly as
integers. To encode, it writes out the exact, unbounded regime/exponent/fraction string of the
product, keeps N−1 bits and rounds to nearest even on the rest. Values at or beyond maxpos, or
below minpos, are clamped.

| testbench | what it checks |
|---|---|
| `tb_posit_lbd` | all 15-bit inputs, both polarities |
| `tb_booth_mult` | 13-bit corners and 50 000 random pairs; 8-bit exhaustive |
| `tb_posit_extract` | every posit⟨16,1⟩ pattern, every field |
| `tb_posit_exp_proc` | every regime/exponent/overflow combination of posit⟨16,1⟩ |
| `tb_posit_pack` | 60 000 random scales and fractions, half of them exact ties, plus the exceptions |
| `tb_posit_mult` | end to end at the default size: the special operands against each other, then 400 000 random pairs (half of them near 1.0) |
| `tb_posit_mult_sizes` | posit⟨8,1⟩ and posit⟨8,2⟩ exhaustively; posit⟨32,2⟩ on 100 000 random pairs |

`tb_posit_mult` compares all the flags as well as the product. It fails if any of these never
happens:

* mantissa overflow, and its absence;
* round-up;
* saturation to maxpos, and to minpos;
* NaR and zero results;
* negative results;
* products whose exponent bits were cut by a long regime.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

To simulate one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/posit_pkg.sv tb/posit_ref_pkg.sv tb/tb_posit_mult.sv \
    --top-module tb_posit_mult
./obj_dir/Vtb_posit_mult
```

Verilator finds the other modules through `-Irtl`. Each testbench runs in about a second.
