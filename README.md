# Unified AES-128 / Camellia-128 engine

AES and Camellia are both 128-bit block ciphers, and their round functions are
built from the same parts: an 8-bit S-box derived from inversion in GF(2^8),
a linear byte-mixing layer, and key addition. This engine uses one copy of
each part for both ciphers. Each of the eight S-boxes can act as AES
SubBytes, AES InvSubBytes or any of Camellia's four S-boxes. One 64-bit
linear layer computes AES MixColumns, AES InvMixColumns or Camellia's
P-function. Camellia's FL / FL^-1 units also do key whitening. The AES key
expansion borrows four of the datapath S-boxes instead of having its own. The
organisation follows a published unified architecture for the two ciphers,
which reports about 30 % less area than two separate cores.

Clocks per request, from the clock that accepts it up to the clock before
`done`:

| request                    | AES-128 | Camellia-128 |
|----------------------------|---------|--------------|
| key setup                  | 12      | 7            |
| encrypt or decrypt a block | 31      | 22           |

The clock that shows `done` can already accept the next block. Blocks can
therefore be streamed at one per 31 clocks for AES (128/31 ≈ 4.13 bits per
clock) or one per 22 clocks for Camellia (≈ 5.82 bits per clock).

## One S-box for six functions

Every S-box has the same form: an affine map, an inversion in GF(2^8), and
another affine map. Camellia defines its inversion in the composite field
GF((2^4)^2):

* GF(2^4) uses a polynomial basis with α⁴ = α + 1;
* GF(2^8) = GF(2^4)[β] with β² = β + (α³ + 1);
* a byte `c` holds `a + b·β`, with `a = c[3:0]` and `b = c[7:4]`.

AES uses the polynomial field mod x⁸+x⁴+x³+x+1. The two fields are
isomorphic, so a linear 8×8 bit-matrix δ moves AES bytes into the composite
field, and δ⁻¹ moves them back. Every S-box can then share one composite
inverter (`gf_comp_inv`), placed between an input stage and an output stage.
Each stage picks one of three affine maps:

| mode            | input stage        | inverter   | output stage          |
|-----------------|--------------------|------------|-----------------------|
| AES SubBytes    | δ                  | GF((2⁴)²)⁻¹ | A·δ⁻¹ ⊕ 0x63          |
| AES InvSubBytes | δ·A⁻¹ (incl. 0x63) | GF((2⁴)²)⁻¹ | δ⁻¹                   |
| Camellia s1     | f (incl. ⊕ 0xc5)   | GF((2⁴)²)⁻¹ | h ⊕ 0x6e              |

Here A is the AES affine matrix, and f and h are Camellia's affine maps.
Camellia's s2, s3 and s4 are s1 with rotated bits: s2 = s1 <<< 1,
s3 = s1 >>> 1, and s4(x) = s1(x <<< 1). They are selected by rotations at the
S-box's input and output.

The inverter works through the norm:
`d = a² + a·b + 9·b²`, then `(a + bβ)⁻¹ = d⁻¹·((a + b) + b·β)`, with
`d⁻¹ = d¹⁴` in GF(2^4).

The six maps are stored in `uc_pkg` as constant matrices: eight row masks plus
an output constant each. Output bit `i` is `parity(mask[i] & x) ^ const[i]`.
Only the AES maps depend on which isomorphism δ is chosen. There are eight
valid choices; this design fixes one of them. To check a change to these
constants, compare the S-box with the exhaustive tables built by
`tb_unified_sbox`.

Bit conventions: an AES byte has bit 0 as the coefficient of x⁰. A Camellia
byte has bit 7 as Camellia's x1, as in the Camellia specification.

Each stage merges its three maps into one matrix (`affine8_merged` in
`uc_pkg`). Where all three maps have a 1, the connection is fixed, so its XOR
is built once for every mode. Where only some maps have a 1, the entry is
ANDed with the mode's one-hot select. Each output bit is then one XOR tree
over the union of the three rows.

With this design's δ, the six maps need 106 two-input XORs when built
separately and 87 when merged, plus the gating. The published architecture
picks its δ and factors common sub-terms by hand, and reports about 40% fewer
XORs. That finer factoring is not reproduced here; synthesis may find part of
it.

## One linear layer for MixColumns, InvMixColumns and P

`unified_perm` takes 8 bytes x0..x7. For AES these are two columns of four
bytes; for Camellia they are z1..z8. The terms below are computed once per
column and reused by all three outputs:

```
s   = x0 ^ x1 ^ x2 ^ x3                     column sum
e_i = s ^ x_i                               {01} matrix: x_{i+1}^x_{i+2}^x_{i+3}
d_i = x_i ^ x_{i+1}
MixColumns     z_i = e_i ^ 02·d_i
InvMixColumns  y_i = z_i ^ 04·(x_i ^ x_{i+2}) ^ 08·s
P-function     w_i     = s(col0) ^ x_{i+1} ^ e_i(col1)      i = 0..3
               w_{4+i} = d_i(col0) ^ e_i(col1)
```

InvMixColumns is MixColumns plus a {04,08} term, so the MixColumns result
feeds the InvMixColumns result. The P-function uses the {01} terms of the
second column and the `d` terms of the first. Multiplication by 02 is the
usual `xtime`.

## FL / FL^-1 and whitening

Camellia's FL on the halves (xL, xR), with key halves klH and klL, is

```
yR = ((xL & klH) <<< 1) ^ xR
yL = (yR | klL) ^ xL
```

Both FL and FL^-1 end in a 32-bit XOR on each half. `fl_kw` and `flinv_kw`
reuse those XORs for whitening:

* `sel_kadd = 1` feeds the key halves straight into the XORs, so y = x ^ kl.
  The low half goes through a rotate right, which cancels the rotate left on
  the FL path.
* `en = 0` zeroes both XOR inputs, so the data passes through unchanged.

Together the two units cover 128 bits. The engine uses them for Camellia's
FL layers, Camellia's pre- and post-whitening, the KL addition in the middle
of the KA derivation, and AES's first AddRoundKey.

## Round schedules

The state is a 128-bit register. The round logic is 64 bits wide:

```
state ─► switching matrix ─► ⊕ k64 ─► 8 S-boxes ─► ⊕ rk (AES dec) ─► permutation ─► ⊕ (rk | R) ─► state
   └────────────────────────────► FL(hi) | FL^-1(lo), with optional half swap ───────────────────► state
```

**AES, 31 clocks.** Clock 0 is the accept clock. In it the FL units add
round key 0 directly to `data_in`. At the same time the round-key register
is loaded from KL (for encryption) or K2 (for decryption). Each of the 10
rounds then takes three clocks:

1. **Key clock.** The key scheduler sends RotWord(w3) to four S-boxes and gets
   the next round key back in the same clock.
2. **Columns 0 and 1.** The switching matrix gathers the bytes selected by
   ShiftRows (output column j, row r comes from input column j+r; j−r for
   decryption). They go through S, MixColumns and ⊕ key, and the result is
   held in a 64-bit half register. The state itself is not yet written,
   because the next clock still reads it.
3. **Columns 2 and 3.** Same as clock 2; then the state is written as
   {half register, new columns}.

Decryption runs InvSubBytes → ⊕ K_r → InvMixColumns. That is why there is a
key XOR between the S-boxes and the linear layer. The last round bypasses the
linear layer. Decryption round keys come from stepping the key schedule
backwards from K10.

**Camellia, 22 clocks.**

| clock      | operation |
|------------|-----------|
| 0 (accept) | whitening of `data_in` with kw1‖kw2 |
| 1–6        | Feistel rounds |
| 7          | FL / FL^-1 |
| 8–13       | Feistel rounds |
| 14         | FL / FL^-1 |
| 15–20      | Feistel rounds |
| 21         | half swap + whitening with kw3‖kw4 |

A Feistel round is (L, R) ← (R ⊕ P(S(L ⊕ k)), L). The byte positions use
S-boxes s1, s2, s3, s4, s2, s3, s4, s1. Decryption is the same sequence with
the subkeys in reverse order.

## Key scheduler and key setup

Three 128-bit registers serve both ciphers:

* **KL** holds the user key.
* **K2** holds AES K10 or Camellia KA.
* **RK** holds the running AES round key.

A key setup request must follow every new key:

* **AES, 12 clocks:** the key is loaded, ten forward key steps follow, then
  K10 is copied into K2.
  Encryption starts from KL; decryption starts from K2 and steps backwards.
* **Camellia, 7 clocks:** the key is loaded into KL and into the state. The
  datapath then computes KA with two F-rounds keyed by
  Σ1 and Σ2, a KL addition in the FL units, and two F-rounds keyed by Σ3 and
  Σ4. KA is then copied into K2.

Camellia subkeys are fixed rotations of KL and KA (by 0, 15, 30, 45, 60, 77,
94 and 111 bits). They are selected combinationally from the schedule step
and the direction. For decryption the halves of the FL-layer keys are
exchanged, so that FL gets ke4 (or ke2) and FL^-1 gets ke3 (or ke1).

## Interface

`unified_cipher` ports: `clk`, `rst_n` (asynchronous, active low), `start`,
`op` (0 key setup, 1 encrypt, 2 decrypt), `alg` (0 AES, 1 Camellia),
`key_in[127:0]`, `data_in[127:0]`, `data_out[127:0]`, `busy`, `done`.

* `start` is accepted only when `busy` is low. Requests made while busy are
  ignored.
* In the accept clock the block is loaded together with its first key
  addition. For key setup, the key is loaded instead.
* `busy` then stays high for the rest of the latency in the table above.
* `done` pulses for one clock afterwards. `data_out` holds the result until
  the next request. With `start` held high, the next block is taken in the
  `done` clock.
* Blocks and keys are big-endian byte strings, with the first byte in bits
  127:120, as in the cipher specifications.
* For decryption, `data_in` is the ciphertext.

## Files

| module | role |
|---|---|
| `uc_pkg` | types, control words, affine matrices, GF(2^4) and key constants |
| `gf_comp_inv` | GF((2^4)^2) inverter |
| `unified_sbox` | six-function S-box |
| `unified_perm` | MixColumns / InvMixColumns / P layer |
| `fl_kw`, `flinv_kw` | FL, FL^-1 with whitening |
| `key_scheduler` | KL / K2 / RK registers, AES key steps, Camellia subkeys |
| `cipher_datapath` | state, switching matrix, 8 S-boxes, XORs, linear layer, FL units |
| `cipher_ctrl` | sequencer |
| `unified_cipher` | top |

Each module has a testbench `tb/tb_<module>.sv`. `tb/tb_ref_pkg.sv` holds
reference models written from the AES and Camellia definitions, independent
of the RTL.

## Verification

* `tb_unified_cipher` runs the whole engine at its only size. It checks:
  * the FIPS-197 vectors (key 000102…0f → 69c4e0d8…; key 2b7e1516… →
    3925841d…);
  * the RFC 3713 Camellia-128 vector (0123…3210 → 67673138…);
  * 40 random keys with two blocks each, alternating between the ciphers, for
    encryption, decryption and their round trip;
  * the latency of every request;
  * streams of back-to-back blocks, which must complete one block every 31
    clocks (AES) or 22 clocks (Camellia);
  * that every mechanism was exercised: both key setups, all four operations,
    cipher switches, key steps on the shared S-boxes, FL layers, whitening,
    the AES final-round bypass and Camellia's final swap.
* `tb_unified_sbox` checks all 256 inputs in all six modes. `tb_gf_comp_inv`
  checks all 256 inverses.
* The permutation, FL, key-scheduler, datapath and controller testbenches
  check their blocks against the reference models.

To run one testbench with plain Verilator, for example the top:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/uc_pkg.sv tb/tb_ref_pkg.sv $(ls rtl/*.sv | grep -v uc_pkg) \
  tb/tb_unified_cipher.sv --top-module tb_unified_cipher -o sim && ./obj_dir/sim
```

Every testbench prints `TB_RESULT checks=N failures=M`. The top-level test
takes well under a second.

## Choices made in this design

The published architecture fixes the parts to share, the 64-bit width with
eight S-boxes, and the clock counts (31 for AES, 22 for Camellia). The
following were chosen here:

* The request interface and the separate key-setup operation. Without it,
  AES decryption would need K10 and Camellia would need KA before the first
  block.
* Splitting an AES round into key / half / half clocks, and the half register.
* Placing the AES decryption key XOR between the S-boxes and the linear layer.
* Using the FL units for AES's first AddRoundKey.
* The choice of δ. The merged matrices are written as masked rows, without
  the hand-factored common sub-terms.
* Selecting Camellia subkeys with a multiplexer of fixed rotations.
* An asynchronous active-low reset.

Only 128-bit keys are supported. Gate counts and timing depend on the target
library; no figures are given here.
