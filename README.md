# Weighted modulo 2^n+1 arithmetic on diminished-1 adders

Residue number systems often use the moduli {2^n − 1, 2^n, 2^n + 1}. The
2^n + 1 channel is the slow one. Its residues range over [0, 2^n], so a
weighted (ordinary binary) residue needs n+1 bits, and a weighted modulo
2^n+1 adder is larger and slower than a binary adder. A *diminished-1* adder
works on n-bit operands that hold each value minus one. It is about as fast as
a binary adder, but it needs conversions to and from the weighted form.

This RTL is built on one observation. Give a diminished-1 adder two n-bit
vectors whose sum is the wanted sum **decreased by one**, and add one detector
gate tree. The result is then the correct (n+1)-bit *weighted* residue, with
no conversion. In the two components where this matters most, the
"decreased by one" costs almost nothing:

* the **residue generator** RG(k, 2^n+1) reduces a k-bit number modulo 2^n+1;
* the **multi-operand modular adder** MOMA(k, 2^n+1) adds k weighted residues.

Both reduce their operands with a carry-save tree and finish with an
augmented diminished-1 adder. They need no second binary adder and no
multiplexer after the final adder. Everything is combinational.

## The arithmetic

Write M = 2^n + 1. Three facts carry the whole design.

**1. The augmented diminished-1 adder.** For n-bit X, Y, let cout be the
carry out of the plain sum X + Y. A diminished-1 (inverted end-around-carry)
adder returns `|X + Y|_{2^n} + not(cout)`. If X + Y ≥ 2^n, that is
X + Y − 2^n ≡ X + Y + 1 (mod M). Otherwise it is X + Y + 1. So it always
computes X + Y + 1 modulo M, except in one case. When X + Y = 2^n − 1 (X and
Y bitwise complementary), the true answer 2^n does not fit in n bits: the low
bits wrap to zero. That case is exactly the one where all half-sums
X_i ^ Y_i are 1. The top result bit is therefore the AND of the half-sums,
which the adder computes anyway. The result is

    r = |X + Y + 1|_M,  0 <= r <= 2^n,  n+1 bits.

If X + Y ≡ A + B − 1, then r = |A + B|_M. This is `aug_dim1_adder`.

**2. Inverted end-around-carry carry-save stages add one.** A row of full
adders turns x, y, z into a sum vector and a carry vector. The carry out of
the top bit has weight 2^n ≡ −1. Complementing it and placing it at bit 0
(`not(c) − 1 ≡ −c`) keeps the result n bits wide. It costs a +1:

    s + c ≡ x + y + z + 1 (mod M).

A tree that reduces m operands to two has m − 2 stages, and so adds m − 2
(`iec_csa`, `iec_csa_tree`).

**3. Bookkeeping the ones.** Every tree stage and the final adder add one
each. A component therefore gets the right residue if it inserts a constant
(or computed) correction operand that cancels them. There is one special
case. A correction equal to −1 ≡ 2^n does not fit in n bits, and the fix is
to drop it: dropping a tree operand also drops a stage, and with it the +1
that the stage would have added. Both components use this.

## Components

### Two-operand adder (`weighted_mod_adder`)

n-bit weighted operands A, B in [0, 2^n − 1] first pass through a
translator. The translator is a single carry-save stage with the constant
operand 2^n − 1 ≡ −2, so it outputs A\*, B\* with A\* + B\* ≡ A + B − 1.
With a constant all-ones input, each full adder reduces to an XNOR (sum) and
an OR (carry), so the translator is one gate level deep. The augmented
adder then gives |A + B|_M.

### Residue generator (`residue_generator`, RG(K, 2^N+1))

The k-bit input is cut into n-bit groups g_0, g_1, … (least significant
first; the last group is zero-padded). Since 2^n ≡ −1,
|A| = g_0 − g_1 + g_2 − …. A negated group becomes its complement plus 2
(−g ≡ not(g) + 2). The padded positions of a complemented group are just
constant ones. With G groups, G/2 of them complemented, the groups plus a
constant

    C = |2·floor(G/2) − G|_M

go through the carry-save tree, and the augmented adder finishes. When
C ≡ −1 it is left out (fact 3): RG(9, 2^3+1) has no correction operand at
all. Example: 143 = 010 001 111₂ gives operands 111, 110, 010. One stage
reduces them to 011 and 100, which are complementary, so the result is
1000₂ = 8 = |143|_9. For K ≤ N the input is already reduced and is passed
out zero-extended.

### Multi-operand adder (`weighted_moma`, MOMA(K, 2^N+1))

The operands are (n+1)-bit residues in [0, 2^n]. Only the low n bits enter
the carry-save tree. An operand with its top bit set is 2^n ≡ −1, and its low
bits are zero. `moma_corr` counts those operands (a ones counter) and maps
the count to

    E = |−K − ones|_M   (n+1 bits),

which also cancels the K − 2 tree stages, the last stage and the final
adder. E depends only on the top bits, so it is ready well before the tree
output. It is added in a last carry-save stage after the tree. When E = 2^n
(≡ −1), a multiplexer driven by E's top bit feeds the final adder from the
tree directly and skips that stage. This case can occur only when K + ones ≡ 1
(mod 2^n+1). For small n it does: MOMA(6, 2^2+1) with no operand at 2^n is
one case. At the default MOMA(8, 2^8+1) it never does, and synthesis removes
the multiplexer.

Example: 8 + 4 + 6 + 3 modulo 9. One operand is 2^3, so E = |−4 − 1|_9 = 4,
and the result is 3.

### The diminished-1 carry network (`dim1_adder`)

This block is the hardest one to read. Bit i has generate g_i = a_i & b_i and
half-sum h_i = a_i ^ b_i, and h_i also serves as the propagate signal. Over a
span of bits, the carry out is a function of the carry in: `G | P & c_in`.
If the span runs across the end-around link from bit n−1 to bit 0, the
function is instead `G | P & not(c_in)`, because that link is inverted. Two
adjacent spans, an upper one (G1, P1) after a lower one (G2, P2), compose
like this:

| inversion                      | G                     | P          |
|--------------------------------|-----------------------|------------|
| none in the upper span         | G1 \| P1&G2           | P1&P2      |
| in or just before the upper span | G1 \| P1&~G2&~P2    | P1&~G2     |

The second row holds because not(G2 | P2&x) = ~G2&~P2 | ~G2&~x. Whether a
span contains the inversion depends only on its position. The RTL decides it
at elaboration, so it never becomes a signal.

For n a power of two the network is a cyclic Kogge-Stone tree: log2(n)
levels of n nodes, where node i at level l combines with node (i − 2^l) mod n.
After the last level, every node covers all n bits, and the span closes on its
own carry:

* c_0 = not G, from the span without the link, fed back through the inverter;
* c_i = G | P for i > 0. All bits propagating with none generating means
  X + Y = 2^n − 1, and the diminished-1 rule then sets every carry.

For other n (the worked n = 3 examples, for instance), the adder uses a
prefix tree for spans [i:0] and a suffix tree for spans [n−1:i] instead,
with one extra level: `c_i = G[i-1:0] | P[i-1:0] & not G[n-1:i]`.

## Files and parameters

| module | role | parameters (default) |
|---|---|---|
| `mod2n1_pkg` | elaboration-time helpers: residue of a constant, tree shape, group count | — |
| `iec_csa` | one inverted-EAC carry-save stage | N (8) |
| `iec_csa_tree` | Wallace-style tree of those stages, M operands → 2 | N (8), M (9) |
| `dim1_adder` | diminished-1 parallel-prefix adder, also outputs half-sums | N (8) |
| `aug_dim1_adder` | dim1_adder plus top-bit detector: (n+1)-bit weighted result | N (8) |
| `weighted_translator` | A, B → A\*, B\* with sum decreased by one | N (8) |
| `weighted_mod_adder` | two-operand weighted adder | N (8) |
| `residue_generator` | RG(K, 2^N+1) | K (32), N (8) |
| `moma_corr` | ones counter and correction decoder | K (8), N (8) |
| `weighted_moma` | MOMA(K, 2^N+1) | K (8), N (8) |
| `mod2n1_top` | the adder, the RG and the MOMA side by side, sharing N | N (8), RG_K (32), MOMA_K (8) |

All results are N+1 bits wide. Nothing is clocked and nothing needs reset; to
pipeline, register the inputs and outputs of the top. All modules need N ≥ 2,
and the MOMA needs K ≥ 2. The package's constant arithmetic uses 64-bit
integers; N = 32, the largest size the adder was estimated at, is tested. The defaults are one point of the
evaluated ranges (n = 4, 8, 16; RG k = 2n to 8n; MOMA k = 4, 8, 12). All of
those sizes are reached by setting parameters, and the testbenches
`tb_rg_table3` and `tb_moma_table4` run every one of them.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
integer arithmetic. Each prints `TB_RESULT checks=… failures=…`.

* Exhaustive runs: the diminished-1 and augmented adders, the translator and
  the two-operand adder at n = 2, 3, 4 and 8 (random at 16 and 32); the correction generator; the
  residue generators (9, 3), (8, 4) and (6, 4).
* Random runs with corner cases: the default RG(32, 2^8+1) and
  MOMA(8, 2^8+1), and the carry-save trees with 2, 3, 4, 9 and 17 operands.
* Worked values: 143 mod 9 = 8; 7+4+5+0 ≡ 7 and 8+4+6+3 ≡ 3 (mod 9);
  1+1+3+1+0+1 ≡ 2 (mod 5), with each intermediate diminished-1 sum of the
  chained form.
* `tb_mod2n1_top` runs the whole top at two small sizes. It requires that
  every mechanism occurs at least once: a wrapped two-operand sum; a 2^n
  result in each component; MOMA operands equal to 2^n; the correction stage
  both used and bypassed. It also covers an RG with and without its
  correction operand.
* `tb_mod2n1_full` runs the top at its default sizes: all 65 536 adder
  pairs, plus 20 000 random inputs each for the RG and the MOMA.

To run one with plain Verilator:

    verilator --binary --timing --assert -Irtl rtl/mod2n1_pkg.sv tb/tb_weighted_moma.sv \
              --top-module tb_weighted_moma -Mdir obj && ./obj/Vtb_weighted_moma

Each testbench runs in well under a second.

## Where this RTL makes its own choices

* **Carry network of the diminished-1 adder.** The published approach relies
  on a diminished-1 prefix adder with as few levels as a binary Kogge-Stone
  adder. The span algebra above reaches the same log2(n) level count for n a
  power of two, but its cells are this design's own. For other n it spends
  one extra level.
* **Translator of the stand-alone adder.** The method only requires
  A\* + B\* ≡ A + B − 1. Here a constant −2 carry-save row provides it.
* **Tree shape.** The carry-save trees use Wallace grouping. In the residue
  generator the constant correction enters at the first level, since it is
  known in advance. In the MOMA the computed correction enters at the last
  stage, as the method prescribes.
* **Correction generator.** It is a behavioural count followed by a decode of
  each possible count. Synthesis produces the gates; this is not a
  hand-drawn half-adder counter.
* **Operand validity.** MOMA operands must be valid residues: the top bit may
  be set only when the low bits are zero. Other inputs give wrong results
  and are not checked.
* **Timing.** No delay or area targets are built in. The design is plain
  combinational RTL for synthesis to map.
