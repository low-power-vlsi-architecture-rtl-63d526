# Residue-number-system adder from reversible gates

This design adds two 16-bit numbers in a residue number system (RNS). Each
operand is split into three residues modulo **{2^n−1, 2^(n+k), 2^n+1}**,
with n = k = 4 by default, which gives the moduli {15, 256, 17}. The three
residues are added in three independent channels that do not carry into one
another. The result is converted back to binary. The same operands also go
through a plain Brent-Kung adder, so the conventional sum is available next
to the RNS sum.

All the arithmetic is made of three reversible gates:

| gate    | inputs → outputs                                  | use here                                 |
|---------|---------------------------------------------------|------------------------------------------|
| HNG     | A,B,C,D → A, B, A⊕B⊕C, (A⊕B)C ⊕ AB ⊕ D            | full adder with D = 0                    |
| Peres   | A,B,C → A, A⊕B, AB⊕C                              | half adder with C = 0; prefix (G,P) cell |
| Feynman | A,B → A, A⊕B                                      | XOR, copy (B = 0), inverter (B = 1)      |

A reversible gate maps its inputs one-to-one onto its outputs. Constant
inputs and unused "garbage" outputs are the price of that. In the RTL,
garbage outputs are wired to `unused_*` nets.

The whole design is combinational. It has no clock, no reset and no
state. A result is valid one propagation delay after the operands change.

## Top level: `moduloadder_with_reversable_gates`

```
 A ──forward_converter──┐ (x1, x2, x3)
                        ├─ rns_channel_adder ─(s1,s2,s3)─┬─ reverse_converter ── Xsum
 B ──forward_converter──┘ (x01,x02,x03)                  └───────────────────── Rsum
 A,B ── bk_adder (16 bit) ─────────────────────────────────────────────────── Nsum
```

| port   | width (default) | meaning                                                    |
|--------|-----------------|------------------------------------------------------------|
| `A`,`B`| 3N+K (16)       | operands                                                   |
| `Nsum` | 3N+K+1 (17)     | A + B, from a Brent-Kung adder                             |
| `Rsum` | 3N+K+1 (17)     | channel sums packed `{s1[3:0], s2[7:0], s3[4:0]}`          |
| `Xsum` | 3N+K (16)       | RNS sum converted back: (A + B) mod M, M = 15·256·17 = 65280 |

The dynamic range M is 65280, which is smaller than 2^16. So `Xsum` equals
`Nsum` only when A + B < 65280. Larger sums wrap modulo M, as any
fixed-range RNS result does.

Parameters `N` and `K` (both `int unsigned`, default 4) set the moduli. The
converters require 1 ≤ K ≤ N.

## Modulo 2^n−1 arithmetic: end-around carry

Since 2^n ≡ 1 (mod 2^n−1), a carry out of bit n−1 is worth exactly 1. Every
modulo 2^n−1 unit therefore feeds its top carry back into bit 0. That is
the end-around carry (EAC). Four units use it:

- **`csa_eac`**: a 3:2 carry-save adder made of one HNG full adder per bit.
  The carry vector is the full adders' carries moved up one place, with the
  top carry in bit 0. Then sum + carry ≡ x + y + z exactly. Its delay is one
  full adder at any width.
- **`rca_eac_modadd`**: a ripple-carry adder with EAC, in two rows. First, a
  ripple of HNG full adders adds `a + b + cin`. Second, a ripple of Peres
  half adders adds the first row's carry-out to its sum. The second row's
  own carry is dropped. It costs n HNG and n Peres gates, with 2n constant
  inputs and 3n garbage outputs.
- **`bk_modadd`**: the parallel-prefix version. A Brent-Kung tree
  (`bk_prefix_tree`) computes the group generate and propagate `G(i:0)`,
  `P(i:0)`. The carry-out `G(n−1:0)` comes out of the tree, and one extra
  level re-injects it:
  `c(i+1) = G(i:0) | P(i:0)·G(n−1:0)`, `s(i) = p(i) ⊕ c(i)`.
  `G(n−1:0)` does not depend on the re-injected carry, so there is no
  combinational loop. The extra level is the whole cost of making the
  prefix adder modular.
- **`csa_eac` at 2n bits** inside the reverse converter.

Zero has two forms modulo 2^n−1: all zeros and all ones. The adders above
can return all ones for a zero result, so `x1` and `s1` (the top bits of
`Rsum`) can show zero as `4'hf`. The reverse converter accepts either form
and always produces a binary result in [0, M−1].

`rca_eac_modadd` keeps a carry-in port. With `cin = 1` and both operands all
ones (both "zero"), it returns 0 instead of 1. Every instance in this design
ties `cin` to 0.

## Prefix cells from Peres gates

A prefix cell combines a high and a low group:
`G = G_hi | P_hi·G_lo`, `P = P_hi·P_lo`. Propagate is defined as a⊕b, so a
group that propagates cannot also generate, and the two terms of G are
never 1 together. The OR can therefore be an XOR, and a Peres gate gives
exactly `AB ⊕ C`:

- `G = Peres(P_hi, G_lo, G_hi).R`
- `P = Peres(P_hi, P_lo, 0).R`

The bit-level `(p, g)` also comes from one Peres gate, as a half adder. Each
sum bit comes from a Feynman gate. So `bk_adder` and `bk_modadd` contain
only reversible gates.

`bk_prefix_tree` builds the Brent-Kung network for any N ≥ 2:

- **Up-sweep.** In level l, column i combines with column i − 2^l wherever
  i + 1 is a multiple of 2^(l+1).
- **Down-sweep.** The remaining columns i = 3·2^l − 1 + m·2^(l+1) are filled
  in, from level log2(N) − 2 down to level 0.

For N = 4 the tree forms (3:2) and (1:0), then (3:0) and (2:0).

## Modulo 2^n+1 arithmetic: complemented end-around carry

Here 2^n ≡ −1, so the top carry must be subtracted. `csa_ceac` is
`csa_eac` with the end-around carry inverted by a Feynman gate (B = 1).
Since −c = (1 − c) − 1, its outputs satisfy

    sum + carry ≡ x + y + z + 1   (mod 2^n+1)

That is, each CEAC stage adds a constant 1, and the user of the stage must
account for it. `modadd_2n1` adds two residues in [0, 2^n] by a plain add
and one conditional subtraction of 2^n+1. This is ordinary logic, not
reversible gates.

## Forward converter

X (3n+k bits) is cut into chunks c0 = X[n−1:0], c1, c2 and c3 = X[3n+k−1:3n].
c3 is k bits, zero-extended to n.

- **x2 = X mod 2^(n+k)** is the low n+k bits of X. It needs no logic.
- **x1 = X mod 2^n−1 = c0 + c1 + c2 + c3 (mod 2^n−1).** Two `csa_eac`
  stages reduce the four chunks to two vectors, and `rca_eac_modadd` adds
  them.
- **x3 = X mod 2^n+1 = c0 − c1 + c2 − c3 (mod 2^n+1).** For an n-bit chunk,
  −c ≡ ~c + 2, so X ≡ c0 + ~c1 + c2 + ~c3 + 4. Three `csa_ceac` stages take
  these four words plus one constant operand. The stages themselves add 3,
  so the constant is 4 − 3 = **1**. `modadd_2n1` then adds the two vectors
  that remain.

## Reverse converter

The output is X = {Y, x2}, where Y = ⌊X / 2^(n+k)⌋ < 2^(2n)−1. Y is found
modulo M2 = 2^(2n)−1 = (2^n−1)(2^n+1):

    Z ≡ x1·(2^n+1)·2^(n−1) + x3·(2^n−1)·2^(n−1)      (CRT for 2^n∓1)
    Y ≡ 2^−(n+k) · (Z − x2)                           (mod M2)

Here 2^(n−1) is the inverse of 2 modulo 2^n−1 and of −2 modulo 2^n+1.
Modulo 2^(2n)−1, multiplying by a power of two is a rotation of a 2n-bit
word, and negation is a bitwise complement. So the operand preparation is
wiring and inverters only. It produces four words, with r = −(n+k) mod 2n
and s = (n−1+r) mod 2n:

| word | value                             | meaning      |
|------|-----------------------------------|--------------|
| opA  | rotl({x1, x1}, s)                 | x1·(2^n+1)   |
| opB  | rotl({x3[n−1:0], 0…0, x3[n]}, s)  | x3·2^n       |
| opC  | rotl(~zext(x3), s)                | −x3          |
| opD  | rotl(~zext(x2), r)                | −x2          |

Two 2n-bit `csa_eac` stages and a 2n-bit `bk_modadd` sum the four words.
The adder can return all ones for zero. Y is always below M2, so all ones is
mapped to 0 before the concatenation.

## Channels

`rns_channel_adder` holds the three processing units:

- **Modulo 2^n−1:** `bk_modadd`.
- **Modulo 2^(n+k):** `bk_adder`, with its carry-out dropped.
- **Modulo 2^n+1:** `modadd_2n1`.

## What is specified and what is this design's own

**Taken from the specification:**
- the three gates and their equations
- the CSA with EAC made of HNG full adders
- the two-row ripple-carry EAC adder made of HNG and Peres gates
- the 4-bit Brent-Kung tree
- the block structure of both converters (how many CSAs of which kind,
  then which modular adder; x2 taken straight from X; output Y & x2)
- the parallel, carry-free channels
- the top module's name and its A/B/Nsum/Rsum ports

**This design's own work:**
- n = k = 4, read from the port widths rather than stated
- both operand preparations, including the CEAC constant and the CRT words
- the modulo 2^n+1 adder
- the Brent-Kung end-around-carry scheme and its Peres-gate mapping
- which EAC adder serves where (ripple-carry in the forward converter;
  Brent-Kung in the channel and the reverse converter)
- the zero fix in the reverse converter
- the `Xsum` port and the packing order of `Rsum`

**Known differences:**
- The reference waveform shows `Rsum` as 16·Nsum + 6 for its three
  examples, with residues that do not match the moduli. This design's
  `Rsum` holds the true modular channel sums instead. The plain sums in that
  waveform (60, 357 and 223 for 25+35, 123+234 and 123+100) are reproduced.
- The reported FPGA figures (64 LUTs, 0.522 mW, against 124 LUTs and
  1.012 mW for a conventional Kogge-Stone version) cannot be checked from
  RTL.
- The conventional baseline itself is not included.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`.
Each compares against integer arithmetic and ends with a
`TB_RESULT checks=… failures=…` line:

- The gates are checked exhaustively, including that each is a bijection.
- The N = 4 adders and compressors are checked exhaustively. Other widths,
  including non-power-of-two Brent-Kung trees (5, 7, 12), get exhaustive or
  random vectors.
- The forward converter is checked for every 16-bit X.
- The reverse converter is checked for every X in [0, 65279], with both
  forms of a zero residue modulo 15.
- `tb_moduloadder_with_reversable_gates` runs the top level at its default
  size: the three waveform operand pairs, corner cases and 300 000 random
  pairs. It also counts every mechanism and fails if any never fired:
  - EAC in the forward converter and in the channel
  - wrap in the 256 channel and reduction in the 17 channel
  - all-ones zero
  - the reverse-converter zero fix
  - sums beyond M
  - the plain adder's carry-out

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        --top-module tb_moduloadder_with_reversable_gates \
        tb/tb_moduloadder_with_reversable_gates.sv
    ./obj_dir/Vtb_moduloadder_with_reversable_gates

To change the moduli, override `N` and `K` on the top (1 ≤ K ≤ N). The
top-level testbench assumes the defaults. The block testbenches already
instantiate other sizes (for example N = 5, K = 2 and N = 5, K = 3 for the
converters).
