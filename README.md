# Fused single-precision three-term floating-point adder

This is a single-precision floating-point unit that computes

    y = round( a ± b ± c )

with **one** rounding step. A chain of two ordinary adders rounds twice, once
after each addition, so it can be wrong in the last place. It can also lose
the result completely when the first sum cancels. This unit keeps the whole
sum exact up to one final round-to-nearest-even step. Its output is meant to
be the correctly rounded exact sum for every input, including subnormals. The
window argument below is the reason, and the end-to-end test checks it on
300 000 biased random cases against an exact reference. Infinities and NaNs
are handled as well.

The datapath uses the improved fused three-term architecture:

* all exponent differences are computed in parallel;
* significands are inverted without incrementers, using two extra LSB bits;
* the sum is reduced twice, once as +S and once as −S, and the non-negative
  pair is chosen;
* a three-input leading-zero anticipator (LZA) finds the normalization shift;
* the carry-save pair is normalized *before* it is added;
* a compound adder forms *sum* and *sum+1* for the upper f+1 bits, where
  f = 24 is the significand width;
* every carry-propagate adder is a Brent-Kung parallel-prefix adder. These
  adders replace Kogge-Stone adders to save area.

The unit is purely combinational: one operation per evaluation, with no clock
and no pipeline registers.

## Interface

| port  | dir | width | meaning                                   |
|-------|-----|-------|-------------------------------------------|
| `a`   | in  | 32    | operand A, IEEE 754 binary32              |
| `b`   | in  | 32    | operand B                                 |
| `c`   | in  | 32    | operand C                                 |
| `op1` | in  | 1     | 0: A + B, 1: A − B                        |
| `op2` | in  | 1     | 0: … + C, 1: … − C                        |
| `y`   | out | 32    | correctly rounded result, binary32        |

Rounding is round to nearest, ties to even. No other rounding modes and no
exception flags are provided. If any input is a NaN, or the sum contains +∞
and −∞, the result is the quiet NaN `0x7FC00000`. Otherwise an infinite input
gives that infinity. Results too large to represent become ±∞. An exact-zero
result is +0, except when all three terms are −0, which gives −0.

## Datapath, stage by stage

```
 a,b,c,op ─► sign logic ─────────────────────────────────────────┐
        └─► exponent compare (6 subtractors) ─► 3 alignment shifters
                 │                                   │
                 │                 invert + 2-bit LSB correction
                 │                     ┌─────────────┴─────────────┐
                 │              3:2 CSA (+S)                3:2 CSA (−S)
                 │                     │ significand comparison ──► select
                 │                     └────────────┬──────────────┘
                 │             3-input LZA ◄────────┤ (selected terms / pair)
                 └──► early normalization (pair << LZA count, subnormal limit)
                              │ upper 25 bits          │ lower 32 bits
           2 half-adder rows + BK compound adder (H, H+1)   BK adder: carry, round, sticky
                              └──────── RNE select, renormalize ───► y
```

### The alignment window (the hard part)

All three significands are placed in one 57-bit two's-complement window.
Bit 0 is the least significant:

| bits    | content                                                       |
|---------|---------------------------------------------------------------|
| [1:0]   | LSB extension: receives the +1/+2 for inverted terms          |
| [2]     | sticky: OR of everything shifted out below the window         |
| [29:3]  | 27 guard bits                                                 |
| [53:30] | significand of the operand with the largest exponent          |
| [55:54] | carry headroom (three terms)                                  |
| [56]    | sign                                                          |

A fixed window cannot hold three arbitrary operands. Correct rounding
therefore rests on the following argument, which is the main thing to
understand before changing any widths. Call the operands X, Y and Z, with X
having the largest exponent and Y the middle one.

* **Far case.** Suppose Y's exponent is 27 or more below X's. Then
  |Y + Z| < ¼ ulp(X). This holds even when X is a power of two and Y + Z is
  negative. The correctly rounded result is then X itself, so the top module
  returns X directly.
* **Otherwise Y fits whole in the window.** The 27 guard bits are enough for
  this, so X + Y is exact. Only Z can lose bits.
  - The lost part T has the sign of Z, and |T| is less than one window LSB.
  - Unless X + Y = 0, the result is at least 2^-2 ulp(X). Its half-ulp is
    therefore a multiple of two window LSBs.
  - Replacing T by a single "sticky" half-LSB with the same sign keeps the
    value on the same side of every rounding boundary. It also keeps an exact
    tie a tie only when T = 0.
  - This is why the sticky bit sits *below* the guard bits, and why it is
    inverted together with its significand.
* **Exact cancellation.** If X + Y = 0 exactly (same exponent and fraction,
  opposite signs), the result is Z. The top returns Z unchanged, or +0 when Z
  is a zero.

These two shortcuts are selected by the top module. The exponent compare
block reports the max/middle/min ordering and the middle exponent's distance
(`d_mid`) to support them.

### Sign logic and inversion

The effective signs are `seff_a = sign_a`, `seff_b = sign_a ^ sign_b ^ op1`
and `seff_c = sign_a ^ sign_c ^ op2`. B or C is inverted when its effective
sign is 1, meaning it opposes A, so at most two terms are inverted.

Inverting a magnitude gives −M − 1. Instead of incrementing after each
inverter, the count of inverted terms (1 or 2) is written into the two
extension bits of a term that is *not* inverted. Those bits are zero in every
aligned magnitude. The three terms then sum exactly to S = |A| ± |B| ± |C|,
and the result sign is `seff_a` XOR (S < 0).

### Dual reduction and significand comparison

Two term sets are built and each is compressed by a 3:2 carry-save adder:

* **+S:** A kept; B and C inverted by their effective signs.
* **−S:** every inversion flipped.

The significand comparison takes the sign bit of the +S pair's sum, using a
Brent-Kung carry network. It then selects the pair (and its three terms) that
sums to |S|. Nothing is ever complemented after the addition.

The −S set has no correction slot when B and C are both added. That set is
never selected, because S ≥ 0 whenever nothing is inverted.

### Three-input LZA and early normalization

The LZA sees the three selected terms. Its pre-encoding forms, per bit, the
3:2 sum and carry digits, then the transfer `t` and kill `z` signals. From
these it builds the indicator for a non-negative result,
`f_i = t_i ^ ~z_(i-1)`. A priority encoder (the LZD) counts the leading zeros
of `f`. This count equals the true leading-zero count of |S| or is one less.
It is never more.

The early-normalization stage shifts *both* vectors of the carry-save pair
left by that count. Their sum, taken modulo 2^57, is exactly |S| shifted,
because |S| has at least that many leading zeros. Afterwards the leading one
is in bit 56 or bit 55.

The shift is limited to `emax + 2`. That is the shift at which a leading one
in bit 56 has biased exponent 1. Beyond it the result is subnormal and keeps
exponent field 0; `at_min` reports this case.

### Compound addition and rounding

The normalized pair is split at window bit 32. Addition and rounding run in
parallel.

* **Lower 32 bits.** A Brent-Kung adder yields the carry `c1` into the upper
  part, plus the round and sticky bits.
* **Upper 25 bits (f + 1).** The top 22 bits go to a Brent-Kung compound
  adder, which produces H and H + 1 from one prefix tree. It does not wait
  for the lower part.
* **The 3 LSBs of the upper part.** A 4-bit adder in the rounding logic adds
  them together with `c1`. The carry out of that pre-round sum picks H or
  H + 1 as the pre-round upper part, and its top bit tells where the leading
  one is.
* **Leading one in upper bit 24.** The significand LSB is window bit 33. The
  round bit is bit 32 and the sticky is the OR of the lower sum. The rounding
  increment is 2 in units of bit 32.
* **Leading one in upper bit 23** (the LZA count was one short). The LSB is
  bit 32, the round bit is the lower sum's top bit, and the increment is 1.
* **Round decision.** The increment is added to the 3-bit field. The field's
  final carry selects H or H + 1 for the result, and the field itself gives
  the result's three LSBs.

**Why sum and sum + 1 are enough.** The pre-round carry and the rounding
carry could both be 1, which would need H + 2. To prevent this, two
half-adder rows act on the upper bits first. The first row starts at bit 32
and the second at bit 33, so the carry vector is zero at both possible round
positions. Then the 3-bit field plus `c1` plus the increment stays below 16,
so the carry into the compound part is at most 1.

If rounding carries out of the significand, the result shifts right by one
and the exponent goes up by one. A subnormal that rounds up into the hidden
bit becomes exponent 1. An exponent of 255 or more becomes ±∞.

### Brent-Kung adder

`fp3_bk_adder` is parameterized by `WIDTH`:

1. An up-sweep combines generate/propagate pairs over blocks of 2, 4, 8, …
   bits at positions 2^k − 1.
2. A down-sweep fills in the remaining positions.

This takes about 2·log2(WIDTH) levels and about 2·WIDTH cells, fewer cells
and shorter wires than Kogge-Stone. With group terms G(i:0) and P(i:0), the
carry into bit i is G(i−1:0) for the sum and G(i−1:0) | P(i−1:0) for
sum + 1. The adder appears three times: at width 57 in the comparison, 32 in
the lower rounding part and 22 in the compound adder.

## Where this implementation departs from the reference architecture

* **Window size.** The reference names 2f + 6 bits for a traditional design.
  It splits the proposed design into f + 1 bits for the compound adder and
  f + 7 bits for rounding. Here the window is 57 bits: the upper part is
  f + 1 = 25 bits as in the reference, and the lower part is 32 bits because
  the sign bit is kept in the window. The guard-bit count (27) is chosen for
  the correct-rounding argument above.
* **Compound-adder width and half-adder rows.** The compound adder covers
  the top 22 of the 25 upper bits, and the rounding logic produces the other
  three. The two half-adder rows that keep the carry into the compound adder
  at 0 or 1 are this design's own detail.
* **Normalization adjustment.** The reference right-shifts the two compound
  sums by up to two "overflow" bits. Here the pair is normalized modulo 2^57,
  so only a one-bit choice is left (leading one in bit 56 or 55).
* **Three-input LZA.** The pre-encoding equations are this design's own. The
  reference gives only the two-part structure (pre-encoding and LZD).
* **Dual reduction and significand comparison.** Both are this design's
  reading of functions the reference names but does not detail.
* **Added behaviour.** The far-operand and exact-cancellation shortcuts,
  subnormal support, IEEE special values, and the shift limit for subnormal
  results are additions.
* **Pipelining.** The reference's FPGA figures mention 59 registers. No
  pipeline is described, so none is built.

## Files

| file | content |
|------|---------|
| `rtl/fp3_pkg.sv` | formats, window layout constants, `fp32_t` |
| `rtl/fp3_adder.sv` | top: datapath wiring, special values, shortcuts |
| `rtl/fp3_sign_logic.sv` | effective signs |
| `rtl/fp3_exp_align.sv` | six subtractors, max exponent, ordering, alignment |
| `rtl/fp3_align_shift.sv` | one right shifter with sticky |
| `rtl/fp3_invert_reduce.sv` | inversion, LSB correction, dual 3:2 reduction |
| `rtl/fp3_sig_compare.sv` | sign of the significand sum |
| `rtl/fp3_lza3.sv` | three-input LZA |
| `rtl/fp3_early_norm.sv` | pair normalization before addition |
| `rtl/fp3_round_add.sv` | compound addition, RNE rounding, exponent |
| `rtl/fp3_bk_adder.sv` | Brent-Kung compound adder |
| `tb/fp3_ref_pkg.sv` | exact reference model and operand generators |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fp3_accuracy` |

## Verification

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

The main testbench is `tb_fp3_adder`. It compares `y` with a reference that
builds the exact sum as a 300-bit integer in units of 2^-149, then rounds it.
The reference shares nothing with the windowed hardware. The test applies
300 000 random triples, biased towards the hard cases:

* nearby exponents (massive cancellation);
* exact cancellation with a tiny third term;
* a middle term around the far threshold;
* rounding ties;
* subnormals;
* overflow;
* special values.

It also counts how often each mechanism fires and fails if any never does:

* −S selection;
* two inverted terms;
* LZA one short;
* subnormal shift limit;
* round-up;
* significand carry-out;
* far case;
* cancellation;
* overflow;
* NaN/∞;
* subnormal output.

`tb_fp3_accuracy` compares the adder with a chain of two correctly rounded
two-term additions on 100 000 triples, most with nearby exponents. The fused
result never has the larger error. The two-adder chain differs from it in
about 11% of these cases. In a few cases it also returns zero, or the wrong
sign, for a non-zero sum.

All testbenches pass. Each was also run against a copy of its module with a
deliberate bug, and each caught it.

To simulate with Verilator 5 from the repository root (shown for the top;
substitute any `tb_*` name):

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_fp3_adder rtl/fp3_pkg.sv tb/fp3_ref_pkg.sv tb/tb_fp3_adder.sv
./obj_dir/Vtb_fp3_adder
```

The full run takes well under a minute. To lint the RTL alone, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/fp3_pkg.sv rtl/fp3_adder.sv`.
The remaining lint warnings are unused carry-out and sum+1 outputs of the
shared adder, and unused package constants.

## Changing it

The format constants live in `fp3_pkg`. Moving to another format needs:

* new `EXP_W`/`FRAC_W`;
* a guard width of at least f + 3;
* the far threshold equal to the guard width;
* the packing in the top module and the reference model generalized. Both are
  written for binary32, for example `QNAN` and the 32-bit port widths.
