# Modulo-reduced residue-to-binary conversion with MUX-based inc/dec units

A residue number system (RNS) stores an integer X as its remainders
(x1, x2, x3) against a set of pairwise coprime moduli. Addition and
multiplication then work on each remainder separately, with no carries
between them. Getting back to ordinary binary is the expensive step. The
textbook method (the Chinese Remainder Theorem and its "modified" form)
ends in one large reduction modulo the product of several moduli.

This design rests on one identity. When one factor of a modulus is a power
of two, the large reduction splits into a small one and some free wiring:

    |K| mod (2^n * P)  =  2^n * ( |K >> n| mod P )  +  (K mod 2^n)

`K mod 2^n` is just the low n bits of K, and the addition is a
concatenation. Only the upper part of K needs reducing, and by the small
modulus P instead of 2^n·P. Applied to residue-to-binary conversion, the
one wide modular adder becomes two narrow ones that work side by side.

The RTL contains:

* **The main converter**, for the moduli set {2^n, 2^n+1, 2^n−1}. It uses
  only n-bit adders. Its small arithmetic pieces are MUX-based: an
  incrementer, a modulo 2^n−1 decrementer and a modulo 2^n+1 subtractor.
  Its default width is n = 22, which gives a 66-bit dynamic range, so every
  64-bit value can be converted.
* **The MUX-based incrementers and decrementers**: unsigned, two's
  complement, and modulo 2^n−1. They replace a ripple-carry adder with an
  OR chain and a row of 2:1 multiplexers.
* **A general three-moduli converter** for six moduli sets of the form
  {P1, 2^n, P3}, all built on the same splitting identity.
* **A converter for any number of moduli** and the **modulo reduction
  unit** it is built on. The unit generalises the identity above to a
  product of any small moduli, reducing K by P1·P2·…·Pn through n small
  reductions that run in parallel.

Everything is combinational: there is no clock, no register and no reset.
A result is valid one combinational delay after the inputs settle.

## 1. Converting {2^n, 2^n+1, 2^n−1} back to binary

### 1.1 Arithmetic

The inputs are these residues:

| Input | Definition | Width | Range |
|---|---|---|---|
| x1 | X mod 2^n | n bits | |
| x2 | X mod 2^n+1 | n+1 bits | [0, 2^n] |
| x3 | X mod 2^n−1 | n bits | [0, 2^n−2] |

The output is X in [0, 2^n·(2^2n − 1)).

The low n bits of X are x1 itself. The rest is Y = (X − x1) / 2^n < 2^2n − 1,
so the output is `x = {Y, x1}`. A direct formula would need Y modulo
(2^n+1)(2^n−1) = 2^2n − 1, a 2n-bit end-around-carry adder. Splitting it
gives

    Y = (2^n + 1) * h + k
    h = | T1 + T2 + T3 − [x1 < x2] |  mod 2^n − 1
    k = | x1 − x2 |                    mod 2^n + 1

The terms T1, T2 and T3 cost no logic, because of two facts about modulo
2^n−1 arithmetic on n-bit words:

* **Negation is bit inversion**, so T1 = |−x1| = ~x1.
* **Multiplying by 2^(n−1) is a right rotation by one**, so
  T2 = rotr(x2) and T3 = rotr(x3).

The case x2 = 2^n needs its own handling, because then x2 does not fit in n
bits. T2 is replaced by the constant 2^(n−1)−1 = 0111…1, the −1 is
dropped, and k is simply x1 + 1.

The three cases:

| case | h | k |
|---|---|---|
| x2 < 2^n, x1 ≥ x2 | \|Z\| mod 2^n−1 | \|x1 − x2\| mod 2^n+1 |
| x2 < 2^n, x1 < x2 | \|Z − 1\| mod 2^n−1 | \|x1 − x2\| mod 2^n+1 |
| x2 = 2^n | \|Z'\| mod 2^n−1 | x1 + 1 |

Here Z = T1 + T2 + T3 and Z' = T1 + (2^(n−1)−1) + T3.

Example with n = 3, so the moduli are {8, 9, 7}. X = 169 has residues
(1, 7, 1). T1 = 110, T2 = rotr(111) = 111 and T3 = rotr(001) = 100.
Z mod 7 = (6 + 7 + 4) mod 7 = 3. Since x1 < x2, h = |3 − 1| = 2. Then
k = |1 − 7| mod 9 = 3, and Y = 9·2 + 3 = 21. So X = 21·8 + 1 = 169.

### 1.2 Structure

```
 x1 ─┬──────────────────────────────────────────────────────────► x[n-1:0]
     │   ┌─────────────────────────────┐
 x2 ─┼──►│ ones_comp_adder_unit        │ h (n bits)   ┌──────────┐
 x3 ─┼──►│  csa_mux_unit  (FA row+MUX) ├─────────────►│ cpa_unit ├─► x[3n-1:n]
     │   │  ones_comp_adder            │              │          │   (= Y)
     │   │  mod_decrementer   ─┐ MUX   │   ┌─────────►│          │
     │   └──────────────────▲──┴───────┘   │ k (n+1)  └──────────┘
     │                   cn │              │
     │   ┌──────────────────┴─────────────┴┐
     └──►│ mod_sub_unit                     │
 x2 ────►│  mod_sub_2n1 (x1 − x2 mod 2^n+1) │
         │  mux_incrementer (x1 + 1)        │
         └──────────────────────────────────┘
```

**`csa_mux_unit`** is one row of n full adders. The second operand comes
from a 2:1 MUX per bit that picks between rotr(x2) and the constant
0111…1, steered by x2[n]. The row outputs a sum word S and a carry word C,
where carry bit i has weight 2^(i+1).

**`ones_comp_adder`** computes (S + 2C) mod 2^n−1. Doubling modulo 2^n−1
is a left rotation, so C enters rotated and its top carry wraps to bit 0.
The original design gives this adder only by name and by its delay (two
n-bit adders). The version here computes a+b and a+b+1 in parallel and
keeps a+b+1 if that sum carries out of n bits. This gives a **single
representation of zero**: 0…0, never 1…1. The single zero matters later,
because the final step relies on h ≤ 2^n−2.

**`mod_decrementer`** produces |Z − 1| mod 2^n−1 from the adder output
(section 2.3). A final MUX picks between the adder output and the
decremented value, steered by `cn`, the carry out of the subtractor below.

**`mod_sub_unit`** computes k:

* It always runs the modulo 2^n+1 subtractor **`mod_sub_2n1`** on x1 and
  the low n bits of x2.
* It always runs a MUX-based incrementer on x1.
* x2[n] selects which of the two results becomes k.

The subtractor works as follows:

* It forms S = x1 + ~x2 + 1 with an ordinary n-bit adder.
* Its carry out `cn` is 1 exactly when x1 ≥ x2. The result is then S.
* Otherwise the result is S + 1, from a MUX-based incrementer. The
  incrementer's carry, inverted, becomes the result's top bit, because
  S + 1 reaches 2^n only when S is all ones.

**`cpa_unit`** computes Y = 2^n·h + h + k. An n-bit adder forms the low
half, h + k[n−1:0]. The high half is h, or h + 1 in two cases: when that
adder carries out, or when k = 2^n (k[n] = 1). An OR gate of the two
conditions steers the MUX. Because h ≤ 2^n−2, h + 1 never overflows.

The critical path goes through the full-adder row, the 1's complement
adder (two adders), the OR chain of the decrementer, the h MUX and the
final n-bit adder. It contains no 2n-bit carry chain.

### 1.3 Sense of `cn`

The original description gives `cn` both senses in different places. This
design uses the one that follows from the adder itself: `cn` = 1 when
x1 ≥ x2, including the case x2 = 2^n, where the subtractor sees
x2[n−1:0] = 0. `cn` = 1 selects the undecremented sum. Section 1.1 states
the arithmetic this choice implements, and the exhaustive tests confirm
it.

### 1.4 Inputs outside the residue ranges

x3 = 2^n−1 is the second code for zero modulo 2^n−1. It is not a valid
residue here and is not supported: the 1's complement adder can then
return all ones. Likewise x2 must not exceed 2^n.

## 2. MUX-based incrementers and decrementers

### 2.1 Binary decrement without a carry chain

Decrementing flips every bit from bit 0 up to and including the least
significant one bit (LSOB). Bits above it are unchanged.

**`lsob_dm`**, the decision module, is an OR prefix chain:
d[j] = z[0] | … | z[j]. Bit j of the result is a 2:1 MUX:

* z[j] if d[j−1] = 1, meaning a one exists below bit j;
* ~z[j] otherwise.

Bit 0 is always inverted. **`mux_decrementer`** is exactly this. Its flag
`cout_n` = d[n−1] is **active low**: it is 0 only for z = 0, when a borrow
leaves the top bit.

Increment is the complement of decrementing the complement, so
**`mux_incrementer`** feeds ~z to the decision module and keeps the same
output MUXes. Its `cout_n` is 0 only for z = all ones.

**`mux_incdec`** puts a data-in MUX in front of the decision module,
choosing z or ~z. Its mode input is `inc_n_dec`: 0 increments and 1
decrements.

The path is one inverter, up to n−2 OR gates and two MUXes. The linear OR
chain follows the original design. A synthesis tool may rebuild it as a
prefix tree.

### 2.2 Two's complement

The bit patterns of signed and unsigned increment/decrement are identical,
so **`mux_incdec_signed`** uses the same datapath and changes only the
flag. Its decision module spans bits 0..n−2, and

    ovf_n = d[n−2] | (inc_n_dec ^ z[n−1])

`ovf_n` is low exactly in two cases: incrementing 01…1, or decrementing
10…0.

### 2.3 Modulo 2^n−1

**`mod_decrementer`**: the binary and modulo 2^n−1 decrements differ only
for z = 0. There the binary result is 1…11 and the modulo result is 1…10.
So the binary decrementer is reused, and bit 0 passes through one more MUX
that inverts it when `cout_n` shows z = 0.

**`mod_incrementer_dz`** (double zero): the decision module runs on ~z, and
bit 0 is inverted unless z is all ones. This folds the end-around carry
back in. The result for z = 2^n−2 is 1…1, the all-ones code of zero.

**`mod_incrementer`** (single zero) adds an n-input AND of ~z[0], z[1], …,
z[n−1]. It detects z = 2^n−2 and inverts the double-zero result to 0…0.
An all-ones input is read as zero and gives 0…01.

## 3. General converters

### 3.1 Three moduli (`rb_converter_mcrt3`)

For a set {P1, 2^n, P3}, the modified CRT gives

    X = x1 + P1 * ( |K| mod 2^n·P3 ),   K = C1·x1 + C2·x2 + C3·x3

and the splitting identity turns the reduction into a modulo-P3 reduction
of K >> n, with the low n bits of K concatenated below it. The parameter
`SET` selects one of six moduli sets:

| SET | P1 | P3 | C1 | C2 | C3 | 8-bit example |
|---|---|---|---|---|---|---|
| 1 | 2^n+1 | 2^n−1 | 2^(2n−1)−1 | (2^n−1)^2 | 2^(2n−1) | {9,8,7}, n=3 |
| 2 | 2^2n+1 | 2^n+1 | 2^(2n−1)−1 | 2^n+1 | 2^(2n−1) | {17,4,5}, n=2 |
| 3 | 2^n−1 | 2^(n−1)−1 | 2^(2n−1)−2^(n+1)+1 | 2^(2n−2)−1 | 2^(2n−2) | {15,16,7}, n=4 |
| 4 | 2^2n+1 | 2^n−1 | 2^(2n−1)−1 | (2^n−1)^2 | 2^(2n−1) | {65,8,7}, n=3 |
| 5 | 2^2n+1 | 2^2n−1 | 2^(2n−1)−1 | (2^n−1)(2^2n−1) | 2^(2n−1) | {17,4,15}, n=2 |
| 6 | 2^(n+1)+1 | 2^(n+1)−1 | 2^n−1 | (2^n−1)(2^(n+1)−1) | 2^n | {17,8,15}, n=3 |

The moduli sets and constants come from the original method, which gives
these converters as arithmetic only. The circuit is this design's own:

* K is a sum of constant products.
* The modulo-P3 reduction cuts K >> n into slices the width of P3 and
  combines them in a chain:
  * for P3 = 2^m − 1, by end-around-carry addition, with a final 1…1 → 0
    correction;
  * for P3 = 2^m + 1, by alternately adding and subtracting, with a
    correction after each step.
* The output is x1 + (Y << a) ± Y.

Port widths follow from `SET` and `N`. Set 3 needs N ≥ 3.

### 3.2 Modulo reduction by a product of small moduli (`mod_reduce`)

Applied repeatedly, the splitting identity works for any factors, not just
powers of two:

    |K| mod P1·P2·…·Pn  =  Σ_{m=1}^{n−1} P1·…·Pm · ( |⌊K / (P1·…·Pm)⌋| mod P(m+1) )
                          + |K| mod P1

Each term is a small modulo operation. The terms are the digits of the
result in the mixed radix P1, P2, …, and they are all computed at the same
time. For example, with moduli 2, 3, 4 and 5:

    |1099| mod 120 = 24·(45 mod 5) + 6·(183 mod 4) + 2·(549 mod 3) + (1099 mod 2)
                   = 0 + 18 + 0 + 1 = 19

The moduli are an array parameter `P`, and the operand width is `KW`. The
defaults are {2, 3, 4, 5} and 11 bits. Each digit is a constant division
and modulo, and the digits are added with their weights in one adder tree.
Where a weight is a power of two, the division is a bit selection and
synthesis removes it.

### 3.3 Any number of moduli (`rb_converter_mcrt`)

For pairwise coprime moduli {P1, …, Pn} with M = P1·…·Pn and Ni = M/Pi,
the modified CRT gives

    X = x1 + P1 · ( |K| mod P2·…·Pn ),   K = Σ wi·x'i
    w1 = (N1·|N1⁻¹ mod P1| − 1) / P1,  x'1 = x1
    wi = Ni / P1,                        x'i = |Ni⁻¹·xi| mod Pi   (i ≥ 2)

The reduction modulo P2·…·Pn is a `mod_reduce` over P2, …, Pn. Every
constant (Ni, the inverses and the weights) is worked out at elaboration
from the parameter array `P`. The default is {9, 8, 7, 5}, where the
residues (7, 4, 3, 2) convert to X = 52. The residues come in as one packed
array `xr`, with `xr[0]` belonging to P1.

Each inverse is the smallest positive one. For {9, 8, 7, 5} that makes
N1⁻¹ = 1 and w1 = 31. Any other valid inverse, such as 10 (which gives
w1 = 311), changes w1 by a multiple of P2·…·Pn and leaves X unchanged.
Each x'i is reduced modulo Pi before the sum, which keeps K small
(K = 565 for the example above).

## 4. Top level (`modred_top`)

The top places the parts side by side, each with its own ports:

| ports | unit | parameters |
|---|---|---|
| x1, x2, x3 → x | `rb_converter_n1` | N = 22 (x is 66 bits) |
| z, inc_n_dec → y, cout_n | `mux_incdec` | W = 32 |
| zs, inc_n_dec_s → ys, ovf_n | `mux_incdec_signed` | W = 32 |
| zm → ym | `mod_incrementer` (single zero, contains the double-zero one) | W = 32 |
| a1, a2, a3 → a | `rb_converter_mcrt3` | MSET = 1, MN = 3 ({9,8,7}) |
| g → gx | `rb_converter_mcrt` | GNM = 4, GP = {9,8,7,5} |
| rk → rr | `mod_reduce` | RNM = 4, RP = {2,3,4,5}, RKW = 11 |

The binary incrementer, the binary decrementer and the modulo 2^n−1
decrementer are reached through the converter. Output bits x[N−1:0] are x1
wired straight through, with no logic in between. That is the design
working as intended.

Default sizes:

* **N = 22**: the smallest n whose range 2^n(2^2n − 1) exceeds 2^64. The
  design is quoted at 32-bit and 64-bit dynamic ranges. For a 32-bit
  range, n = 11 is enough.
* **W = 32**: the smaller of the two quoted unit widths (32 and 64 bits).
  The 64-bit units are the same RTL with N = 64.

## 5. Verification

Every testbench is self-checking. Each computes its reference values with
plain integer arithmetic, not with the structure under test, and ends by
printing `TB_RESULT checks=<n> failures=<n>`. A watchdog stops a hung run.

| testbench | what it covers |
|---|---|
| `mux_decrementer_tb`, `mux_incrementer_tb`, `mux_incdec_tb` | every input at 6–8 bits; random and corner inputs at 32 bits |
| `mux_incdec_signed_tb` | the full 4-bit signed table, every 8-bit input, random at 32 bits |
| `mod_decrementer_tb`, `mod_incrementer_dz_tb`, `mod_incrementer_tb` | every input at 3 and 8 bits; random at 32 bits |
| `mod_sub_2n1_tb` | every pair at 3 and 6 bits; random at 32 bits |
| `csa_mux_unit_tb`, `ones_comp_adder_tb`, `ones_comp_adder_unit_tb`, `mod_sub_unit_tb`, `cpa_unit_tb` | exhaustive at 3–4 bits; random at 22 bits |
| `rb_converter_n1_tb` | every X at n = 3 and n = 5; random X at n = 22 |
| `rb_converter_mcrt3_tb` | all six sets: exhaustive at their 8-bit sizes; at n = 4–5 the first 200,000 values plus random ones; two wide instances; the worked examples |
| `mod_reduce_tb` | moduli {2,3,4,5} and {8,7,5}: every K; five moduli at 24 bits and two moduli at 32 bits: random K; the 1099 example |
| `rb_converter_mcrt_tb` | two to five moduli ({9,8,7,5}, {9,8,7}, {5,4,3}, {7,16}, {7,16,9,5,11}): every X; {17,32,31,15}: every seventh X plus random ones; the (7,4,3,2) example |
| `modred_top_tb` | end to end at N = 4, W = 6, set 2 with n = 3, {5,4,3} and 3·4·5: every input of every part; counts each mechanism |
| `modred_top_full_tb` | end to end with all defaults: 22,000 conversions at n = 22, the side units at 32 bits, the {9,8,7} and {9,8,7,5} converters and the 2·3·4·5 reduction exhaustive, both worked examples |
| `workloads_tb` | the quoted sizes: converters for 32-bit and 64-bit ranges; inc/dec and modulo units at 32 and 64 bits |

The end-to-end tests count how often each mechanism occurs. A mechanism
that never occurs counts as a failure. The mechanisms are:

* the three converter cases;
* the decrementer wrapping at zero;
* k = 2^n;
* the final adder's carry;
* unsigned carry and borrow;
* signed overflow in both directions;
* the single-zero wrap of the modulo incrementer;
* the slice carries and zero correction of the general converter;
* a weighted sum K that reaches P2·…·Pn in the n-moduli converter, so
  the reduction has something to remove;
* an operand of the reduction unit at or above its modulus.

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
          --top-module modred_top_full_tb tb/modred_top_full_tb.sv
./obj_dir/Vmodred_top_full_tb
```

Replace the name to run another testbench. Each runs in seconds. The
simulator is two-state, and every input is driven before it is read.

## 6. Where this design makes its own choices

* **Insides of the 1's complement adder.** Only its role and delay are
  given. This design uses the dual-sum, single-zero form of section 1.2.
* **Sense of `cn`**: see section 1.3.
* **Flag and select taken from the diagrams.** Two places differ between
  the written equations and the block diagrams:
  * the unsigned incrementer's carry flag comes from the OR chain over ~z;
  * the signed overflow XOR uses z[n−1].

  In both, the design follows the diagrams, and the exhaustive tests agree
  with them.
* **Default widths**: N = 22, W = 32, the {9,8,7}, {9,8,7,5} and 2·3·4·5
  instances, as in section 4. All are parameters.
* **Circuits of the general converters.** For the converters of section 3
  and the reduction unit, the method gives only the arithmetic. The
  constant products, the slice folding, the per-digit division and modulo,
  and the adder trees are this design's own. So is the choice of the
  smallest inverse in section 3.3.
* **Not built:**
  * The adder-based incrementer/decrementers and the earlier 2n-bit
    end-around-carry converter. They serve only as points of comparison.
* **No registers.** The units are described as combinational blocks with
  gate-count and delay estimates. Pipelining, if wanted, is left to the
  user.
