# Parameterizable elliptic-curve cryptography core for NIST Koblitz curves

This RTL implements elliptic-curve ElGamal in hardware over the binary fields
GF(2^m). It covers key generation, encryption and decryption. Two parameters
set the design:

- `M` selects one of the five NIST Koblitz curves (163, 233, 283, 409 or 571 bits).
- `W` sets how many bits the field multiplier processes per clock cycle, from 1 to ceil(M/2).

The multiplier's speed in turn decides which of two inversion circuits is
built. One source therefore spans a wide range, from a small, slow core to a
large one that finishes a K-163 point multiplication in about 15,000 cycles.

Points stay in affine coordinates (x, y) throughout. No projective-to-affine
converter is needed, and inputs and outputs match the usual software
representation.

The defaults are K-163 with `W = 82`, so a field multiplication takes 2 cycles.

## The arithmetic

Elements of GF(2^m) are m-bit polynomials over GF(2). Addition is XOR. Every
product is reduced modulo the curve's irreducible polynomial f(x):

| curve | f(x) | a |
|---|---|---|
| K-163 | x^163 + x^7 + x^6 + x^3 + 1 | 1 |
| K-233 | x^233 + x^74 + 1 | 0 |
| K-283 | x^283 + x^12 + x^7 + x^5 + 1 | 0 |
| K-409 | x^409 + x^87 + 1 | 0 |
| K-571 | x^571 + x^10 + x^5 + x^2 + 1 | 0 |

The curve is y^2 + xy = x^3 + a·x^2 + 1. These constants live in
`rtl/ecc_pkg.sv` as functions of `M`. Each module derives from them its
reduction taps, the number of multiplier cycles and the choice of inversion
circuit.

## Module hierarchy

```
ecc_core                       key generation, encryption, decryption side by side
├── ecc_keygen                 Q = d·P                     1 point multiplier
├── ecc_encrypter              C1 = k·P, C2 = Msg + k·Q    2 point multipliers, 1 point adder
└── ecc_decrypter              Msg = C2 − d·C1             1 point multiplier, 1 point adder

ecc_point_mult                 Q = k·P                     point adder + 2 squarers (Frobenius)
└── ecc_point_adder            C = A + B                   divider, multiplier, 2 squarers
    ├── gf2m_divider           g/h: builds one of
    │   ├── gf2m_div_binary        binary algorithm, 2m cycles
    │   └── gf2m_div_iti           Itoh–Tsujii inversion (own multiplier + squarer)
    ├── gf2m_multiplier        interleaved, W bits per cycle
    └── gf2m_squarer           combinational
```

## Field operators

**Squarer** (`gf2m_squarer`). Squaring in a polynomial basis only spreads the
bits: bit i moves to bit 2i. The 2m-bit result is then folded back. The part
above x^m is multiplied by (f − x^m) and XORed onto the low part. For sparse
NIST polynomials this is a handful of shifted copies, and two folds are enough
for every curve. The squarer is purely combinational and its result is used in
the same cycle.

**Multiplier** (`gf2m_multiplier`). This is the interleaved shift-and-add
method, scanning b from its most significant bit. Each bit step does
`acc = acc·x mod f`, a single conditional XOR with f, and then
`acc ^= a` if the bit is 1. W steps are chained combinationally per clock,
so a product takes ceil(M/W) cycles:

| M | W = 1 | W ≈ M/8 | W = ceil(M/2) |
|---|---|---|---|
| 163 | 163 | 8 (W=21) | 2 (W=82) |
| 233 | 233 | 8 (W=30) | 2 (W=117) |
| 571 | 571 | 8 (W=72) | 2 (W=286) |

b is zero-padded on its high side to a whole number of digits. The leading
zeros leave the accumulator at zero, so padding costs nothing in correctness.

**Division.** Division is the slowest field operation, and the point adder
needs one per point addition. Two circuits are provided.

- `gf2m_div_binary` computes g/h directly with a right-shifting binary
  extended Euclidean algorithm. It takes exactly 2m cycles: a load cycle plus
  2m−1 steps.
  - It keeps a·g ≡ u·h and b·g ≡ v·h (mod f), starting from (h, g) and (f, 0).
  - Each step either divides a by x or, when a is odd, replaces a by
    (a+b)/x. Before that replacement it swaps the two pairs if the degree
    bound of a is below that of b.
  - The degree bounds da and db start at m−1 and m. Their sum falls by
    exactly one per step.
  - After 2m−1 steps, b = 1 and v = g/h whatever the data. No
    data-dependent termination test is needed.
- `gf2m_div_iti` computes h^−1 = h^(2^m − 2) with the Itoh–Tsujii addition
  chain and multiplies the result by g.
  - The chain uses β_k = h^(2^k − 1), β_2k = β_k^(2^k)·β_k and
    β_(k+1) = β_k^2·h, walking the bits of m−1 from the top.
  - This costs m−1 squarings, at one cycle each, and N multiplications, with
    N = ⌊log2(m−1)⌋ + popcount(m−1) − 1:

    | curve | N |
    |---|---|
    | K-163 | 9 |
    | K-233 | 10 |
    | K-283 | 11 |
    | K-409 | 11 |
    | K-571 | 13 |

  - Each multiplier result is squared in the cycle it arrives.
  - A division takes (m−1) + (N+1)·ceil(m/W) + 2 cycles. For K-163 with
    W = 82 that is 184 cycles.

`gf2m_divider` builds Itoh–Tsujii when (m−1) + N·ceil(m/W) ≤ 2m, and the
binary circuit otherwise. For K-163 this means binary for W = 1 and
Itoh–Tsujii for W = 21 and W = 82. `ARCH = 1` or `ARCH = 2` forces one of
the two.

## Point addition

`ecc_point_adder` uses the standard affine formulas for binary curves:

- addition, x1 ≠ x2: λ = (y1+y2)/(x1+x2), x3 = λ²+λ+x1+x2+a,
  y3 = λ(x1+x3)+x3+y1
- doubling: λ = x1 + y1/x1, x3 = λ²+λ+a, y3 = x1² + λ·x3 + x3

One squarer forms λ² and the other x1². The multiplier forms λ·(x1+x3) or
λ·x3.

The point at infinity O is carried as a flag next to the coordinates. The
first cycle after start classifies the operands. The following cases finish
there, 2 cycles after start:

- O + P and P + O
- P + (−P)
- doubling of (0, 1), the point of order two

A general addition or doubling takes D + ceil(M/W) + 4 cycles, where D is the
division latency. That is 190 cycles for the defaults.

## Point multiplication with the Frobenius map

This is the least obvious part of the design. On a Koblitz curve,
τ(x, y) = (x², y²) maps the curve onto itself and costs only two squarings.
τ satisfies τ² − μτ + 2 = 0 (μ = ±1), so on the prime-order subgroup τ acts
as multiplication by a fixed integer.

`ecc_point_mult` therefore reads its M-bit scalar input `k` as a τ-adic digit
string, k = Σ k_i τ^i with k_i ∈ {0, 1}, and not as a binary integer. It
evaluates the string Horner-style:

```
Q = O
for i = M-1 downto 0:
    Q = τ(Q)               1 cycle, the two squarers
    if k_i: Q = Q + P      one point addition
```

No separate doubling step is needed. The cost is M one-cycle Frobenius steps plus
one addition per 1-digit. The latency is M + 2 + Σ(1 + addition latency) over
the 1-digits. A random K-163 scalar (about 81 one-digits) takes about 15.5k cycles on
average with W = 82.

Every digit string stands for some integer scalar. So a private key d and a
per-message number k can simply be random M-bit strings, and ElGamal stays
consistent: d·(k·P) = k·(d·P). An integer scalar from elsewhere, such as a
key produced by software, must first be converted to τ-adic form. That
conversion, for example to a τ-NAF, is not part of this RTL. Negative digits
are not supported.

## Key generation, encryption and decryption

- **`ecc_keygen`**: one point multiplier computes Q = d·P. The key goes into
  an output register and `key_valid` is raised. The register holds until the
  next start.
- **`ecc_encrypter`**: two point multipliers compute k·P and k·Q in parallel
  from the same start. When both are done, a point adder forms
  C2 = Msg + k·Q. C1 = k·P.
- **`ecc_decrypter`**: one point multiplier computes S = d·C1. Negation is
  free on a binary curve, −(x, y) = (x, x+y), so the point adder forms
  C2 + (−S).

Messages are curve points. This RTL does not map byte strings onto points.

`ecc_core` places the three units side by side, each with its own ports and
controller, and all three can run at the same time. They share only the
generator-point input (`gx`, `gy`). The public key used for encryption is an
input (`enc_qx`, `enc_qy`), because in ElGamal it is normally the receiver's
key, not the local one.

## Interface and timing

All sequential blocks use the same handshake and reset:

- **Reset**: `rst_n` is asynchronous and active low.
- **Start**: pulse `start` for one cycle with the operands valid. The operands
  may change afterwards.
- **Busy**: `busy` is high while the block works. Starting a busy block is an
  error and is caught by an assertion.
- **Done**: `done` is high for one cycle. The result is valid from then on
  and holds until the next start.

Measured at the defaults (K-163, W = 82):

| operation | cycles |
|---|---|
| field multiplication | 2 |
| division (Itoh–Tsujii) | 184 |
| point addition / doubling | 190 |
| point multiplication | about 13.5k–16k (depends on the number of 1-digits) |
| encryption | about 15.6k (two multiplications in parallel, then one addition) |

With W = 1 the binary divider is used: 326 cycles per division and 493 per
point addition.

Point multiplications with random scalars, from `tb/tb_point_mult_workloads.sv`:

| curve | W | multiplication cycles | cycles per k·P |
|---|---|---|---|
| K-163 | 1 | 163 | about 39k |
| K-163 | 21 | 8 | about 17.6k |
| K-163 | 82 | 2 | about 14.1k |
| K-233 | 30 | 8 | about 37k–43k |
| K-233 | 117 | 2 | about 30k |

For a given curve, making W larger shortens the whole point multiplication
less than it shortens a single field multiplication. Squarings and the fixed
control cycles do not shrink with W.

## Simulation

Every testbench in `tb/` checks its results against a model in
`tb/gf_ref_pkg.sv`, printing `TB_RESULT checks=N failures=F` at the end. The
model is written independently of the RTL:

- schoolbook multiplication with bit-serial reduction
- inversion by the polynomial extended Euclidean algorithm
- random curve points made with the half-trace

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ecc_pkg.sv tb/gf_ref_pkg.sv tb/tb_ecc_core.sv --top-module tb_ecc_core
./obj_dir/Vtb_ecc_core
```

`tb_ecc_core` runs the core at its default parameters. It uses the NIST K-163
base point and checks first that the point lies on the curve. It then runs:

1. a key generation, an encryption and a decryption, one after the other
2. all three units at once
3. a decryption of the message from step 2

It also counts Frobenius steps, general and special-case additions,
Itoh–Tsujii divisions and cycles with all three units busy, and fails if any
count is zero. It runs in a few seconds.

The operator testbenches also check exact latencies:

- multiplier: W = 1, 21, 82 on K-163 and W = 72 on K-571
- divider: both circuits on K-163 and K-233, and the automatic choice
- squarer: K-163, K-233 and K-571

## Where this design makes its own choices

- **Scalars** are τ-adic digit strings in {0, 1}, evaluated with the
  Frobenius map (see above). Point-multiplication cycle counts are therefore
  lower than those of a design using integer scalars.
- **Binary division** uses the degree-bound step rule described above. It
  has the stated 2m-cycle latency, but the rule is one choice among several.
- **Itoh–Tsujii chain** uses the binary expansion of m−1. For K-571 this
  needs 13 multiplications; a shorter addition chain would save one or two.
- **Division by zero** is not detected. It cannot occur inside the point
  adder, which divides only by x1+x2 ≠ 0 or x1 ≠ 0.
- **Handshake, reset and result registers** are this design's conventions.
  There is no shared command interface or bus wrapper.
- **Sizes checked by simulation**: K-163 for everything, K-233 and K-571 for
  the field operators. Other sizes are parameter settings and have not been
  simulated as full cores.
