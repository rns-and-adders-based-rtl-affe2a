# Radix-8 Booth modulo 2^n−1 multiplier

A residue number system (RNS) splits a wide integer into small residues, one
for each modulus, and does arithmetic on all of them in parallel, with no
carries between them. The moduli {2^n−1, 2^n, 2^n+1} are popular because each
channel reduces to ordinary binary hardware with a twist. This RTL is the
**2^n−1 channel's multiplier**: it computes

    P = |X · Y| mod (2^n − 1)

for n‑bit residues X and Y, with n = 8 by default. Because 2^n ≡ 1 modulo
2^n−1, a carry out of the top bit re-enters at bit 0 (end-around carry), and a
left shift by s places becomes a rotation. Every adder in the design uses this.

In an RNS multiplier the 2^n−1 channel is usually not the slowest one. The
design uses that slack to save area. It uses radix‑8 Booth recoding, which
needs fewer partial products than radix‑4, and limits the carry chain of the
one awkward multiple, 3X, to a chosen length K. K is a parameter, so the
channel's delay can be matched to the other channels.

The circuit is purely combinational: no clock, no registers and no handshake.
Inputs go in and the product settles.

## Data flow

```
 X ──┬─► soft_multiples ──── B+X, B+2X, B+4X ──┐
     └─► hard_multiple_gen ─ B+3X ─────────────┤
                                               ▼
 Y ──► Booth quartets ──► pp_row 0 .. pp_row ND−1      (ND = floor(n/3)+1 = 3)
                               │  pp_i (n bits) + q_i (n/K carry bits)
                               ▼
       pp_0, pp_1, pp_2, q (packed), CC ──► mod_csa_tree (end-around CSAs)
                                                │ sum, carry
                                                ▼
                                         mod_adder_cla (end-around CLA) ──► P
```

The three stages are partial-product generation, carry-save accumulation and
one carry-propagate addition. This is the usual multiplier structure; every
adder in it works modulo 2^n−1.

## Radix-8 Booth digits

Y is extended with a zero below bit 0 and zeros above bit n−1. It is then cut
into overlapping quartets {y(3i+2), y(3i+1), y(3i), y(3i−1)}. Each quartet
gives a digit d_i = −4·y(3i+2) + 2·y(3i+1) + y(3i) + y(3i−1) in −4…+4, and
Y = Σ d_i·8^i. For n = 8 there are three digits. The top digit only sees y7,
y6 and y5, and is never negative.

| quartet | digit | quartet | digit |
|---|---|---|---|
| 0000 | 0  | 1000 | −4 |
| 0001, 0010 | +1 | 1001, 1010 | −3 |
| 0011, 0100 | +2 | 1011, 1100 | −2 |
| 0101, 0110 | +3 | 1101, 1110 | −1 |
| 0111 | +4 | 1111 | "−0" |

`booth_encoder` turns a quartet into a sign (the quartet's top bit) and a
one‑hot select of X, 2X, 3X or 4X. `booth_selector` does one bit: it ANDs and
ORs the selected candidate bit and XORs the result with the sign. Negation is
the one's complement, which is exact modulo 2^n−1. Quartet 1111 is therefore
an all-ones vector, which is also zero.

Modulo 2^n−1, 2X and 4X are rotations of X. 3X is the **hard multiple**: it
needs a real addition.

## The hard multiple and the bias: the subtle part

**Cutting the carry chain.** 3X = X + rot(X,1). Instead of one n‑bit adder
with an end-around carry, `hard_multiple_gen` uses M = n/K separate K‑bit
ripple-carry adders. No carry passes between them. The carry out of adder j
has weight 2^(K(j+1)), and the top adder's carry wraps to bit 0. These carries
are kept as extra bits that the carry-save tree adds later. So 3X comes out
in a *partially redundant* form: an n‑bit sum S plus M sparse carry bits, each
sitting at the bottom bit of a K‑bit group. K sets the longest carry chain.
K = n gives one full end-around adder. K = 1 gives a single layer of full
adders.

**Why a bias.** To negate 3X you complement S and the carry vector. But the
carry vector is almost all zeros, so its complement is almost all ones. That
would double the bits the tree must add.

**The fix.** Every multiple carries a bias B = Σ_j 2^(Kj), which is one 1 at
the bottom of every K‑bit group (B = 0x11 = 17 for n = 8, K = 4). At each
such bit three bits of equal weight meet: the sum bit s, the wrapped carry c
and the bias 1. Their sum s+c+1 is written as

* a sum bit `s XNOR c` at position Kj, and
* a carry bit `s OR c` at position Kj+1.

So B+3X is an n‑bit vector plus M carry bits at the fixed positions Kj+1. The
soft multiples are biased the same way (`soft_multiples`). Adding 1 to a bit
v gives sum ¬v and carry v, so for B+2X with n = 8:

    sum   = x6 x5 x4 ¬x3 x2 x1 x0 ¬x7      carries: x3 at bit 5, x7 at bit 1

Example, X = 71 = 0100_0111, K = 4: the two 4‑bit additions 0111+1110 and
0100+1000 give sums 0101 and 1100, with a carry of 1 out of the low half. After
the bias merge, S = 1100_0100 and there are carry bits at bits 1 and 5. The
total is 196 + 2 + 32 = 230 = (17 + 3·71) mod 255.

**Negating a biased multiple.** Complementing both the sum vector and the M
carry bits gives (with V = B + |d|X)

    ¬S + Σ ¬c_j·2^(Kj+1)  ≡  −V + Σ_j 2^(Kj+1)  =  −V + 2B  =  B − |d|X   (mod 2^n−1)

The ones that complementing puts into the empty carry positions add up to
exactly 2B. So a negative row still carries the bias +B, and each row stands
for B + d·X.

**Digit 0.** Digit 0 must also give B, not zero. At the bias positions
`pp_row` therefore feeds the selector inverted candidate bits and the inverted
sign. The selector's output is then the biased bit for every digit, and 1 when
nothing is selected. For −0, complementing B and its (empty) carry bits gives
B again by the identity above.

**Compensation constant.** Row i is rotated left by 3i, which is ×8^i, so the
rows add up to X·Y + Σ_i 8^i·B. The constant

    CC = −(Σ_i 8^i · B) mod (2^n − 1)

is added once to cancel the bias. For n = 8, K = 4: Σ = 73·17 = 1241 ≡ 221, so
CC = 34. `mod_mult_pkg::comp_const` computes it for any N and K.

## Partial-product rows and where the carry bits land

`pp_row` #(IDX = i) holds one encoder and n + n/K selectors (ten for n = 8).
Its outputs are the rotated vector pp_i and the rotated carry bits q_i. Carry
bit j ends up at position (Kj + 1 + 3i) mod n:

| row | carry-bit positions (n=8, K=4) |
|---|---|
| 0 | 1, 5 |
| 1 | 4, 0 |
| 2 | 7, 3 |

These six positions are all different. So the top ORs the q vectors into a
single tree operand, giving five operands in all: pp_0, pp_1, pp_2, q and CC.
For other N and K, positions may collide, for example N = 12, K = 3. The
elaboration-time check `q_disjoint` then gives each row's carry bits their own
operand.

## Accumulation and the final adder

`mod_csa_tree` reduces its operands three at a time with rows of full adders.
Each carry row is rotated, not shifted, by one place. For five operands there
are three levels: the three partial products first, then the carry bits, then
the constant.

`mod_adder_cla` is a one-level carry-lookahead adder with *cyclic* carry
equations:

    C_i = OR over t = 0..n−1 of ( G_(i−t) · P_i · P_(i−1) · … · P_(i−t+1) )   (indices mod n)
    S_i = P_i XOR C_(i−1),  C_(−1) = C_(n−1)

A carry can never run all the way round: that needs every P_i = 1, and then
no G_i is set. So the logic has no loop. The carry-lookahead adder replaces
the parallel-prefix adder of the earlier form of this multiplier, to save
area. The parallel-prefix version is not included.

**Output coding.** P is in 0 … 2^n−1. A zero result may come out as all ones
(255 for n = 8), the second code of zero modulo 2^n−1. A user that needs a
canonical zero must map all ones to 0.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | residue width, 3 ≤ N ≤ 32 |
| `K` | 4 | width of each hard-multiple ripple adder; must divide N. It sets the length of the 3X carry chain, and so the delay/area trade-off |

Derived values: ND = ⌊N/3⌋ + 1 Booth rows, M = N/K carry bits per row, and the
constant CC. The defaults are the configuration the design is presented in.
The other sizes were verified in simulation (below), but nothing beyond the
8‑bit case comes from the design description.

## Choices made here

These points are not fixed by the underlying description. They are this
implementation's own choices:

* The circuit is fully combinational, with no pipeline registers.
* The Booth digits come from a zero-extended, unsigned Y. There are ⌊N/3⌋+1
  of them, so no wrap of the top bit is needed.
* Digit 0 is produced at the bias positions with inverted selector inputs.
* The carries of a negative row are complemented together with its sum bits.
* The value of CC, and the order in which the tree combines its operands.
* Carry-bit vectors are packed into one operand only when their positions do
  not collide.
* The final adder is a flat one-level lookahead, with one product term per
  carry distance. Its area grows as n² terms, which is fine at n = 8.

## Files

| file | contents |
|---|---|
| `rtl/mod_mult_pkg.sv` | package: bias, rotation, compensation constant, operand count |
| `rtl/mod_mult_radix8.sv` | top: X, Y → P |
| `rtl/hard_multiple_gen.sv` | biased B+3X with K‑bit ripple adders |
| `rtl/soft_multiples.sv` | biased B+X, B+2X, B+4X |
| `rtl/booth_encoder.sv`, `rtl/booth_selector.sv` | radix‑8 digit encoder, one-bit selector |
| `rtl/pp_row.sv` | one rotated partial product with its carry bits |
| `rtl/mod_csa_tree.sv` | end-around carry-save tree |
| `rtl/mod_adder_cla.sv` | end-around carry-lookahead adder |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mod_mult_configs` |

## Verification

Each testbench computes its expected values with integer arithmetic, not with
the RTL's structure. It prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

* `tb_mod_mult_radix8` checks all 65 536 pairs at the defaults against
  (x·y) mod 255. It also counts, and requires, every Booth digit from −4 to +4,
  the −0 quartet, ±3X, non-empty carry bits, the final adder's end-around
  carry, and zero coming out as all ones.
* `tb_mod_mult_configs` covers N = 8 with K = 1, 2, 8 (exhaustive), and
  N = 12 with K = 3, 4, 6 and N = 16 with K = 4, 8 (random).
* The block testbenches check the biased multiples bit by bit (value and
  carry positions), the encoder against the recoding table, the selector
  exhaustively, each row for all x and quartets, the CSA tree on random
  operands, and the CLA adder exhaustively at n = 8.

Each testbench was also run against a copy of its module with one deliberate
bug, and failed.

Simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl rtl/mod_mult_pkg.sv tb/tb_mod_mult_radix8.sv \
          --top-module tb_mod_mult_radix8 -o sim && ./obj_dir/sim
```

Swap in any other `tb/tb_<module>.sv` with its `--top-module` to test one
block. All testbenches finish in well under a second.

## Limits

* Only the 2^n−1 channel is here. The 2^n and 2^n+1 multipliers and the RNS
  forward and reverse converters are not part of this RTL.
* No timing or area figures are claimed. Under generic coarse synthesis the
  default top maps to about 580 word-level cells, with no flip-flops.
