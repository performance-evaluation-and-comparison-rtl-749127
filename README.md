# Vedic multipliers: Urdhva-Tiryagbhyam and Nikhilam with 4:2 compressors

Two unsigned binary multipliers built on methods from Vedic mathematics, each
at 8 and 16 bits, with the partial products summed by 4:2 compressors rather
than carry-save adders:

- **Urdhva-Tiryagbhyam** ("vertically and crosswise") forms every bit product
  at once and sums them column by column.
- **Nikhilam** ("all from nine and the last from ten") multiplies the
  operands' distances from a base and corrects the result with a cheap
  addition. It is meant for operands close to the base.

All of the logic is combinational. There is no clock, no reset and no
handshake. A product is valid one propagation delay after the operands
change.

## The Urdhva-Tiryagbhyam multiplier

Decimal example: 1111 × 1111. Result digit k is the sum of all digit
products a_i·b_j with i + j = k, giving 1, 2, 3, 4, 3, 2, 1 = 1234321. In
binary the digit products are single AND gates. The hardware
(`urdhva_multiplier`) has three stages:

1. `product_terms` is an AND array. It produces N partial-product words,
   `pp[j] = (a & {N{b[j]}}) << j`, each 2N bits wide. Column k of these words
   holds exactly the crosswise products with i + j = k.
2. `compressor_tree` reduces the N words to two using rows of 4:2
   compressors (see below). 8 words take two levels (8 → 4 → 2). 16 words
   take three levels (16 → 8 → 4 → 2).
3. `final_adder` is an ordinary adder that adds the two remaining words.

`vedic_2x2` is the same idea at its smallest size, built as its own
multiplier. The vertical product a0b0 is bit 0. A half adder sums the two
crosswise products. A second half adder adds a1b1 to that carry.

## The Nikhilam multiplier

Take a base B with complements ca = B − a and cb = B − b. Then

    a · b = (a − cb) · B + ca · cb

Decimal example with B = 10: 8 × 7. The complements are 2 and 3. The right
part is 2 · 3 = 6. The left part is the cross difference 8 − 3 = 5. Result:
56. If ca·cb does not fit in the right part, the excess is carried into the
left part.

In binary this design takes B = 2^N. The complements are then two's
complements, and the left part a − cb equals a + b − 2^N. The product is
2N bits wide, so its upper half is computed modulo 2^N and the −2^N term
drops out:

    p[2N-1:N] = (a + b + (ca·cb >> N)) mod 2^N
    p[N-1:0]  = (ca·cb) mod 2^N

`nikhilam_multiplier` is built as follows:

- Two `twos_complement` blocks form ca and cb. Each output is N+1 bits wide,
  so the complement of 0 is exactly 2^N.
- An N-bit `urdhva_multiplier` forms ca·cb from the low N bits of the
  complements. The low half of its result is the low half of the product.
- A 4-word `compressor_tree` and a `final_adder` form the upper half. The
  four words are:
  - a;
  - b;
  - the high half of ca·cb (the carried-over excess);
  - a correction word for a zero operand.

**The correction word.** The complement of 0 is 2^N, which does not fit the
N-bit complement multiplier. When a = 0 the missing term 2^N·cb adds cb to
the upper half. When b = 0 the missing term adds ca. The correction word
supplies this term.

Nikhilam is advertised as efficient only when both operands are above half
their range, because the complements are then small. This implementation is
still exact for every operand pair. It does not exploit small complements:
its complement multiplier is a full N-bit multiplier.

## The 4:2 compressor

`compressor_4_2` adds four bits of one weight and a carry-in:

    x1 + x2 + x3 + x4 + cin = sum + 2·(cout + carry)

    cout  = (x1 ^ x2) ? x3  : x1
    carry = (x1 ^ x2 ^ x3 ^ x4) ? cin  : x4
    sum   = (x1 ^ x2 ^ x3 ^ x4) ? ~cin : cin

The XOR/XNOR of each input pair is formed first and used as the select of
the multiplexers. The selects are therefore ready before the late data input
(cin) arrives.

**Rows and the tree.** `compressor_row` chains WIDTH cells:

- The cout of bit k is the cin of bit k+1. cout does not depend on cin, so
  a row's delay is one cell, with no ripple.
- The carry of bit k moves one place left into the carry word.
- The top bit's cout and carry are dropped. Widths are chosen so that
  nothing is lost: 2N bits for the product, N bits for the Nikhilam upper
  half (which is modulo 2^N anyway).

`compressor_tree` groups the words four at a time at each level. A short
group is padded with zero words. The level schedule is computed by functions
in `vedic_pkg`.

## Top level

`vedic_multipliers_top` places the multipliers side by side:

| ports | contents |
|---|---|
| `a_2x2`, `b_2x2` → `p_2x2` | 2x2 Vedic multiplier |
| `a_small`, `b_small` → `p_small_urdhva`, `p_small_nikhilam` | both methods, `SMALL_N` = 8 bits |
| `a_large`, `b_large` → `p_large_urdhva`, `p_large_nikhilam` | both methods, `LARGE_N` = 16 bits |

At each width, both methods get the same operands, so their products can be
compared directly. Each module's `N` parameter sets the operand width; any
N ≥ 2 works.

## Where this design departs from, or fills in, the method

- **Binary base.** The method is stated for decimal with base 10. The base
  here is 2^N.
- **Zero-operand correction word.** This is an addition of this design
  (see above). It makes Nikhilam exact for all operands.
- **Complement multiplier.** The multiplier of the complements is taken to
  be the Urdhva multiplier of the same width.
- **Compressor arrangement.** The grouping of words, the level schedule and
  the cout→cin chaining within a row are this design's own. So is the
  adder type: a plain `+`, left to synthesis.
- **Sum equation.** The compressor's sum output is the 5-input parity, in
  multiplexer form. The cout and carry equations and the XOR/XNOR + MUX
  structure are the published ones.
- **Unsigned only.** Signed operation is not covered.
- **Timing and area not reproduced.** Published FPGA results (Virtex-5,
  8 bit: 9.6 ns Urdhva vs 6.7 ns Nikhilam; 16 bit: 15.48 ns vs 11.24 ns)
  depend on the vendor flow and are not reproduced here. Note also that
  this Nikhilam implementation contains a complete Urdhva multiplier plus
  extra logic. In this RTL it is therefore larger than the Urdhva
  multiplier, not smaller.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each one:

- compares outputs with values computed directly in the testbench (integer
  multiplication and addition);
- prints `TB_RESULT checks=N failures=M`;
- has a watchdog.

| testbench | what it does |
|---|---|
| `tb_compressor_4_2` | all 32 input combinations; checks the arithmetic identity and each output equation |
| `tb_vedic_2x2`, `tb_twos_complement` | exhaustive |
| `tb_urdhva_multiplier`, `tb_nikhilam_multiplier` | all 65,536 8-bit pairs; corners plus 20,000 random 16-bit pairs |
| `tb_compressor_tree` | 4, 5, 8 and 16 words |
| `tb_vedic_multipliers_top` | end to end at default parameters (below) |

`tb_vedic_multipliers_top` also replays three published 16-bit vectors:
3·25664, 7·9256 and 31·1325. It counts each case the design distinguishes
and fails if any never occurs:

- both operands above half range;
- a negative cross difference;
- a carried-over excess;
- a zero operand;
- the 2x2 top carry.

Run a test with plain Verilator from the repository root:

    verilator --binary --timing --assert -Irtl -Itb rtl/vedic_pkg.sv \
        tb/tb_vedic_multipliers_top.sv --top-module tb_vedic_multipliers_top
    ./obj_dir/Vtb_vedic_multipliers_top

Every test finishes in well under a second. Verilator's lint reports only
unused-signal warnings, which come from the dropped top-bit carries and
unused padding slots of the tree.
