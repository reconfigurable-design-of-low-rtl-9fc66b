# Hybrid crypto processor for signcryption: ECC over GF(2^163) + sponge hash

Signcryption gives encryption and authentication in one step. A hybrid scheme splits it
into two halves:

- a **key encapsulation mechanism (KEM)** agrees on a fresh symmetric key with the
  receiver and authenticates it;
- a **data encapsulation mechanism (DEM)** uses that key on the message.

This processor does the key encapsulation, and its reverse on the receiver side, in
hardware. It follows the Kurosawa-Desmedt pattern and uses two engines:

- an **elliptic-curve processor** over the binary field GF(2^163). It does the group
  operations, i.e. scalar multiplications on the curve.
- a **sponge hash** built on the 1600-bit Keccak-f permutation (called MKDH below). It
  serves as the collision-resistant hash (TCR), the key-derivation function (KDF) and the
  message authentication code (MAC).

The ECC processor has three units: a memory unit, a control unit and an arithmetic unit.
The effort goes into the arithmetic unit. Its one multiplier is built the way fast integer
multipliers are built: modified-Booth partial products, a Wallace tree and a carry-lookahead
adder. A carry-suppress mode turns the same array into a GF(2)[x] multiplier.

All RTL is SystemVerilog-2017 and synthesizable. The testbenches are self-checking and run
under Verilator.

## What one encapsulation computes

The receiver's public key is given as four curve points: G1, G2, C and D. Only their x
coordinates are passed in. The sender supplies an ephemeral scalar r. `hcp_kem_ctrl` then
runs these eight steps in order, one engine at a time:

| step | engine | result |
|---|---|---|
| 1 | ECC | u1 = x(r·G1) |
| 2 | ECC | u2 = x(r·G2) |
| 3 | hash | alpha = low 163 bits of H(u1 ‖ u2) (TCR) |
| 4 | ECC | e = x(r·C) |
| 5 | ECC | w = x(r·D) |
| 6 | ECC | f = x(alpha·W) = x(r·alpha·D) |
| 7 | hash | K1 ‖ K2 = H(e ‖ f) (KDF): K1 = bits 127:0, K2 = bits 255:128 |
| 8 | hash | T = H(K2 ‖ u1 ‖ u2) (MAC) |

The outputs are:

- the ciphertext CT = (u1, u2, T);
- the 128-bit session key K = K1;
- `err` (the "bottom" result), set if any scalar multiplication hit the point at infinity.

In the hash inputs, field elements are 21 bytes each, little-endian, zero-extended. K2 is 16
bytes, little-endian. Every message fits in one sponge block.

**Departure from textbook Kurosawa-Desmedt.** The textbook scheme derives the key from one
group element, C^r·D^(r·alpha), which needs a point addition. This ECC processor computes x
coordinates only and has no point addition. So both x(r·C) and x(r·alpha·D) go into the KDF.

r·alpha·D is formed as alpha·(r·D). This reuses the x-only ladder and avoids arithmetic
modulo the group order.

If G1 = G, C = c·G and D = d·G, a receiver holding c and d gets the same key from u1 alone:
e = x(c·U1) and f = x(alpha·d·U1).

### Decapsulation (`decap = 1`)

The same engines run the receiver's side. The inputs are the received (u1, u2, T) and the
secret scalars c and d. The steps are:

1. alpha = TCR(u1 ‖ u2)
2. e = x(c·U1)
3. w = x(d·U1)
4. f = x(alpha·W)
5. K1 ‖ K2 = KDF(e ‖ f)
6. T' = MAC_K2(u1 ‖ u2)

If T' ≠ T, or a point at infinity appeared, `err` ("bottom") is set and `key` reads zero.
Otherwise `key` = K1, the sender's session key. A decapsulation takes about 7.3k cycles:
three scalar multiplications and three hashes.

This path does not check that u1 and u2 are valid group elements.

### Key generation (`keygen = 1`)

From the secret scalars c and d this mode computes the receiver's public values:

- `pk_cx` = x(c·G1)
- `pk_dx` = x(d·G1)

It runs two scalar multiplications and takes about 4.8k cycles. The generators G1 and G2
are inputs. The textbook scheme builds each public value from both generators, which needs
a point addition; here both come from G1, and that is what makes the decapsulation above
work from u1 alone.

`keygen` takes priority over `decap`.

## The ECC processor (`ecc_processor`)

### Flexible multiplier (`flex_mult`, `wallace_tree`, `cla_adder`)

This is the part that most needs explaining. A W-bit multiplication (W = 163) runs in three
combinational steps.

1. **Partial products (radix-4 modified Booth).** b is zero-extended and cut into
   W/2 + 1 = 82 overlapping 3-bit windows (b[2i+1], b[2i], b[2i-1]). In integer mode each
   window is a digit in {-2, -1, 0, 1, 2}:
   - `one` = b[2i] ^ b[2i-1]
   - `two` selects 2a
   - `neg` is set for negative digits

   A negative digit puts ~(|d|·a), sign-extended, in its row and a single 1 at bit 2i of an
   extra correction row. That completes the two's complement without an adder per row. So
   there are 83 rows, each 2W + 2 = 328 bits wide.
2. **Wallace tree.** Layers of 3:2 compressors (sum = a^b^c, carry = majority shifted left)
   take 83 rows down to 2. The layer count is worked out at elaboration.
3. **Carry-lookahead adder.** A Kogge-Stone parallel-prefix network adds the last two rows.

**GF(2) mode (`gf_mode = 1`).**

- Each radix-4 window (b[2i+1], b[2i]) selects b[2i]·a XOR b[2i+1]·(a<<1), with no sign.
- The compressors and the adder get `carry_en = 0`. Carry rows become zero and sums become
  XOR.
- The output is then the carry-less product (degree at most 2W-2).

The arithmetic unit uses only this mode. The integer mode stays available and is tested on
its own.

### Arithmetic unit (`ecc_arith_unit`, `gf2m_reduce`)

- **Multiply:** the carry-less product is reduced modulo f(x) = x^163 + x^7 + x^6 + x^3 + 1.
  The reduction is an unrolled XOR network. It cancels each set bit above x^162, from the
  top down, with a shifted copy of f.
- **Add:** XOR.
- **Copy.**
- **Square:** a multiply with both operands equal.

Each operation takes one clock. The unit reads two registers and writes one.

### Memory unit (`ecc_memory`)

Eight 163-bit registers hold x, b, X1, Z1, X2, Z2, T1 and T2. There are two combinational
read ports and one write port, written at the clock edge. There is no reset: every register
is written before it is read.

### Control unit (`ecc_control`)

The control unit runs the Montgomery ladder in Lopez-Dahab projective coordinates. It
issues one micro-operation per clock.

| phase | cycles | operations |
|---|---|---|
| idle | 1 | start accepted |
| init | 7 | load x and b; X1 = x, Z1 = 1, Z2 = x², X2 = x⁴ + b |
| ladder | 14 per bit below the top set bit of k | addition into (XA,ZA): T1 = XA·ZB, T2 = XB·ZA, ZA = (T1+T2)², XA = x·ZA + T1·T2; doubling of (XB,ZB): ZB = XB²·ZB², XB = XB⁴ + b·ZB⁴ |
| inversion | 180 | Itoh-Tsujii on Z1 along the bits of 162 = 10100010₂ |
| final | 1 | x = X1 · Z1⁻¹ |

For a key bit of 1, (XA,ZA) = (X1,Z1) and (XB,ZB) = (X2,Z2). For a 0 bit the roles swap
through the register addresses, so one micro-op list serves both branches and the timing
does not depend on the bit value.

Inversion keeps beta_k = Z^(2^k - 1):

- beta_2k = beta_k^(2^k) · beta_k
- beta_2k+1 = beta_2k² · Z
- 1/Z = beta_162²

Latency from the `start` edge to `done` is **188 + 14·t cycles**, where t is the index of
the top set bit of k. For a full 163-bit scalar that is about 2.45k cycles.

`inf` is raised in two cases:

- k = 0;
- Z1 = 0 at the end of the ladder, i.e. k·P is the point at infinity. This covers k equal to
  the group order.

The curve is y² + xy = x³ + ax² + b. `b` is an input: NIST B-163 is used in the tests,
and K-163 (b = 1) works the same way. The ladder does not use `a`. Only the x coordinate of
k·P is produced.

## The MKDH sponge (`mkdh_sponge`, `keccak_round`)

The state has 1600 bits, split as rate 1088 + capacity 512.

- **Blocks in:** messages arrive as 1088-bit blocks, byte i in bits [8i+7:8i]. On the last
  block `in_bytes` gives the number of valid bytes (0..136).
- **Padding:** SHA-3 domain padding (0x06 after the data, 0x80 in the last byte of the
  block). A last block that is exactly full triggers a padding-only block automatically.
- **Absorbing:** each block is XORed into the state, then 24 rounds run, one per clock.
  `keccak_round` is one Keccak-f[1600] round: theta, rho, pi, chi, iota. The round
  constants and rotation offsets are tables in `hcp_pkg`.
- **Squeezing:** the low 256 bits of the state are the output. `out_next` runs the
  permutation again for another 256 bits.

With these choices the digest equals SHA3-256.

Timing:

- `out_valid` is seen 25 cycles after the edge that takes the last block (1 absorb cycle +
  24 rounds).
- It takes 50 cycles when a padding-only block follows.
- It takes 25 cycles after `out_next`.
- `in_ready` is high when the sponge is idle or holding a digest.

## Top level (`hcp_top`) and interfaces

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| start | in | 1 | begin an encapsulation (taken when idle) |
| r | in | 163 | ephemeral scalar |
| g1x, g2x, cx, dx | in | 163 | receiver public key, x coordinates |
| curve_b | in | 163 | curve coefficient b |
| busy, done | out | 1 | busy while running; done pulses once |
| err | out | 1 | a scalar multiplication gave the point at infinity, or (decapsulation) the tag did not verify |
| u1, u2 | out | 163 | ciphertext elements |
| tag | out | 256 | MAC tag T |
| key | out | 128 | session key K |
| keygen | in | 1 | 1 = key generation (takes priority over decap) |
| decap | in | 1 | 0 = encapsulate, 1 = decapsulate |
| pk_cx, pk_dx | out | 163 | public values from key generation |
| sk_c, sk_d | in | 163 | receiver secret scalars (key generation, decapsulation) |
| u1_in, u2_in, tag_in | in | 163, 163, 256 | received ciphertext (decapsulation) |

Inputs must stay stable while `busy` is high. Outputs are valid at `done` and held until the
next start.

An encapsulation takes about 12.1k cycles: five scalar multiplications and three 25-cycle
hashes. Concurrent assertions check three things:

- the two engines are never busy together;
- `done` comes only when the ECC control unit is idle;
- blocks never claim more bytes than the rate holds.

Parameters: `M` (field size, default 163), `POLY` (the low terms of f(x), default
x^7+x^6+x^3+1) and `RATE` (default 1088). For another recommended binary field, set `M` and
`POLY` together, e.g. M = 571 with POLY = x^10+x^5+x^2+1, and supply that curve's `b`. The
field size is fixed when the design is built. Switching field size at run time is not
implemented.

## How far to trust it, and where it departs

These parts follow the design description:

- the split into KEM (hash-based) and a group-operation engine;
- the three-unit ECC processor;
- the three-step Booth / Wallace / CLA multiplier;
- the 1600-bit sponge with padding to a multiple of the rate and identical rounds that
  differ only in the round constant;
- the TCR / KDF / MAC steps and the key split into K1 and K2;
- the field size 163.

These are this implementation's own choices:

- the carry-less mode of the multiplier;
- the reduction polynomial and the B-163 test curve;
- the register map, the ladder and its 14-operation schedule;
- Itoh-Tsujii inversion;
- x-only results;
- rate/capacity 1088/512 and SHA-3 padding;
- one round per clock;
- hash input byte formats and MAC = H(K2 ‖ ·);
- feeding e and f to the KDF instead of one combined group element.

These are not built:

- **Key generation in the two-generator form.** The design's own key generation uses G1
  only (see above).
- **The group-membership check of decapsulation.** Decapsulation rejects only a wrong
  tag or a point at infinity.
- **A symmetric cipher for the message (the DEM half).** No cipher is specified for it.
- **Run-time field-size switching.**

After coarse synthesis with yosys, the whole processor holds about 3.8k flip-flop bits plus
3.6k bits in memories and constant tables. The 1600-bit sponge state and the ~1.8k bits of
KEM result registers dominate; the ECC register file adds 8 × 163 bits. The multiplier is
the largest piece of logic, mostly in its 328-bit prefix adder.

No timing closure or power figures have been measured for this RTL. The multiplier is one
large combinational path: a 163×163 Booth array, a 10-level Wallace tree and a 328-bit
prefix adder, followed by reduction. It will not reach high clock rates without pipelining.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. All reference
values come from `tb/hcp_ref_pkg.sv`, which is written independently of the RTL:

- shift-and-add GF(2^163) multiplication and Fermat inversion;
- affine point addition and doubling with full y coordinates, and double-and-add scalar
  multiplication;
- a Keccak reference whose round constants come from the specification's LFSR and whose
  rotation offsets come from its (x, y) walk.

| testbench | what it checks |
|---|---|
| `tb_flex_mult` | W = 163, 8 and 16; integer products against `*`, carry-less against a bit-serial model; corner and random operands |
| `tb_ecc_arith_unit` | multiply, add and copy against the reference; a·a⁻¹ = 1 |
| `tb_ecc_memory` | both read ports against a shadow array; read-during-write returns the old word |
| `tb_ecc_processor` | x(k·G) for k = 0, 1, 2, 3, 1000, n-1, n (order), random k and a second base point; `inf`; exact latency 188 + 14t; both ladder branches |
| `tb_keccak_round` | 200 random states × all round constants; 24 chained rounds on the zero state give lane F1258F7940E1DDE7 |
| `tb_mkdh_sponge` | SHA3-256 of "" and "abc"; lengths 0 to 500 bytes, including an exactly full block; second squeeze; latencies |
| `tb_hcp_top` | key generation of C and D against the reference; full-size encapsulation against the reference; receiver-side key agreement in the reference; hardware decapsulation returns the same key, and rejects a tag with one bit flipped; r = 0 gives `err`; counts scalar multiplications, ladder bit-1 and bit-0 steps, inversions, TCR/KDF/MAC hashes, key generations, decapsulations, rejections and the error outcome |

To run one with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_hcp_top -y rtl -y tb +libext+.sv \
  rtl/hcp_pkg.sv tb/hcp_ref_pkg.sv tb/tb_hcp_top.sv -o sim && obj_dir/sim
```

The full-size top-level test takes under a minute. Most of that time goes to the
behavioural reference.
