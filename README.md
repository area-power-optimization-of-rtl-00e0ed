# AES-128 with a composite-field S-box and a term-sharing InvMixColumn

This is a synthesizable SystemVerilog AES-128 engine. It has an encryptor and a
decryptor, and both share one key register and one key schedule. It keeps the
standard AES algorithm and changes two of its most expensive circuits:

* **The S-box has no lookup table.** Each S-box computes the GF(2^8)
  multiplicative inverse in a *composite field* GF(((2^2)^2)^2), where
  inversion breaks down into small 2- and 4-bit operations. Inside that
  inverter, squaring and the multiplication by the field constant λ are merged
  into one 3-XOR circuit.
* **InvMixColumn reuses its products.** The decryption matrix needs the costly
  coefficients {0e}, {0b}, {0d} and {09}. Each of them is a sum of {09}, {04},
  {02} and {01}. So every input byte is multiplied by {09}, {04} and {02}
  once, and the four output bytes are built from XORs of those shared
  products.

The design follows the paper *"Area & Power Optimization of AES Algorithm Using
Modified MixColumn with Composite S-Box"* (IJRSET, vol. 3, issue 4, April 2016)
for these two circuits and for the round structure. The paper does not give the
surrounding architecture (unrolled pipeline, key handling, interface), so that
part is this design's own. See [Departures and choices](#departures-and-choices).

## Block structure

```
aes_top                      key register + shared key schedule + two pipelines
├── key_expansion            11 round keys, combinational; 40 composite S-boxes
├── aes_encrypt              11-stage pipeline: initial AddRoundKey + 10 rounds
│   └── aes_enc_round ×10    sub_shift_rows → mix_column ×4 (not round 10) → ⊕ key
└── aes_decrypt              11-stage pipeline: initial AddRoundKey + 10 rounds
    └── aes_dec_round ×10    sub_shift_rows(inverse) → ⊕ key → inv_mix_column ×4 (not round 10)

sub_shift_rows               (Inv)ShiftRows wiring + 16 composite_sbox
composite_sbox               input matrix → gf8_inv_composite → output matrix
gf8_inv_composite            gf4_sq_scale, gf4_mul ×3, gf4_inv
aes_pkg                      types, constants, the four 8×8 basis-change matrices, xtime
```

Every module has its own file `rtl/<module>.sv`. `aes_pkg.sv` must be read
first.

## Interface and timing

All signals are synchronous to `clk`. `rst_n` is an asynchronous, active-low
reset. It clears the valid bits of both pipelines and the key register.

| port | width | meaning |
|---|---|---|
| `key_load`, `key_in` | 1, 128 | load a new cipher key |
| `enc_valid_in`, `enc_data_in` | 1, 128 | plaintext block in |
| `enc_valid_out`, `enc_data_out` | 1, 128 | ciphertext block out |
| `dec_valid_in`, `dec_data_in` | 1, 128 | ciphertext block in |
| `dec_valid_out`, `dec_data_out` | 1, 128 | plaintext block out |
| `enc_busy`, `dec_busy` | 1 | some block is inside that pipeline |

* **Byte order.** The byte order is the FIPS-197 one. Byte 0 of a block or key
  is in bits 127:120. The state is filled column by column, so state row `r`,
  column `c` holds byte `r + 4c`.
* **Latency and throughput.** Each pipeline takes one block per cycle. A block
  that is on the inputs in cycle n is on the outputs, with `valid_out` high, in
  cycle n+11. The eleven registers are one after the initial AddRoundKey and
  one per round. The two pipelines are independent and may run in the same
  cycle. There is no back-pressure: outputs must be taken when they appear.
* **Key changes.** The key schedule is combinational from the key register, so
  a new key takes effect on every stage at once. `key_load` is allowed only
  while both pipelines are empty and no block is entering. An assertion in
  `aes_top` checks this rule.
* **Power.** A stage's data register loads only when its valid bit is set, so
  idle stages do not toggle.

## The composite-field S-box

This is the hardest part of the design to follow.

### The tower of fields

AES defines the S-box in GF(2^8) with m(z) = z^8+z^4+z^3+z+1:
S(a) = Affine(a^-1), with 0 mapped to 0. Here the inverse is computed in a field
that is isomorphic to GF(2^8) but built as a tower:

| level | elements | defining polynomial |
|---|---|---|
| GF(2^2) | 2 bits | x^2 + x + 1 |
| GF(2^4) = GF((2^2)^2) | 4 bits `{h,l}` = h·y + l | y^2 + y + φ, φ = {10} |
| GF(2^8) = GF((2^4)^2) | 8 bits `{ah,al}` = ah·z + al | z^2 + z + λ, λ = {1000} |

The value of λ comes from the paper's "multiplication by λ" equations
(K3 = q0^q1^q2^q3, K2 = q1^q3, K1 = q2, K0 = q2^q3). In this tower, {1000} is the
only constant whose product has that form. z^2+z+{1000} is irreducible over
GF(2^4), so the tower is a valid field. The paper's squaring equations
(k3 = q3, k2 = q3^q2, k1 = q2^q1, k0 = q3^q1^q0) are exactly squaring in this
GF(2^4).

### Inversion (`gf8_inv_composite`)

For a = ah·z + al:

```
a^-1 = (ah·z + (ah ⊕ al)) · d^-1,    d = λ·ah^2 ⊕ (ah ⊕ al)·al
```

This takes:

* one `gf4_sq_scale` for λ·ah^2;
* one GF(2^4) multiplier for (ah⊕al)·al;
* one GF(2^4) inverse (`gf4_inv`), which uses the same formula one level down,
  and where the GF(2^2) inverse is simply squaring;
* two GF(2^4) multipliers for the two output halves.

Zero maps to zero, as the S-box needs.

`gf4_sq_scale` is the circuit the paper optimizes. Squaring followed by ×λ,
written as two linear maps, takes nine two-input XORs. Composed, most terms cancel:

```
h  = q2 ⊕ q3
K3 = q0 ⊕ q3    K2 = q1 ⊕ h    K1 = h    K0 = q2
```

That is three XOR gates.

### Basis changes

The input and output need 8×8 matrices over GF(2) that map between the AES
polynomial basis and the tower. Let β be a root of m(z) in the tower; this
design uses β = {41}. The map δ sends z^k to β^k, so column k of δ is β^k written
in the tower. Where possible the matrices are merged with the affine
transform:

* **forward:** `S(a) = (A·δ^-1)·inv(δ·a) ⊕ {63}`
* **inverse:** `S^-1(b) = δ^-1·inv((δ·A^-1)·(b ⊕ {63}))`

Here A is the linear part of the affine transform. `aes_pkg` stores the four
matrices δ, δ^-1, A·δ^-1 and δ·A^-1 as eight row masks each: bit j of row i is
set when input bit j feeds output bit i. To change the tower, recompute them
from these formulas. Any of the eight roots of m(z) gives a correct S-box with
different matrices.

## The enhanced InvMixColumn (`inv_mix_column`)

For each input byte s_j of a column, the unit forms:

* c09 = {09}·s_j
* c04 = {04}·s_j
* c02 = {02}·s_j

From these it builds

```
{0e}s = c09⊕c04⊕c02⊕s    {0b}s = c09⊕c02    {0d}s = c09⊕c04
```

and XORs them per output row of the standard matrix
(0e 0b 0d 09 / 09 0e 0b 0d / 0d 09 0e 0b / 0b 0d 09 0e).

{09} and {04} are "reduced xtime" products. Each is the plain shift (b<<3 or
b<<2) plus a reduction term built only from the bits shifted out:

| bit | t for {08}·b (then ⊕ b gives {09}) | t for {04}·b |
|---|---|---|
| 7 | 0 | 0 |
| 6 | b7 | 0 |
| 5 | b6⊕b7 | b7 |
| 4 | b5⊕b6 | b6⊕b7 |
| 3 | b5⊕b7 | b6 |
| 2 | b6⊕b7 | b7 |
| 1 | b5⊕b6 | b6⊕b7 |
| 0 | b5 | b6 |

{02} is ordinary xtime: a shift plus a conditional ⊕{1b}.

The forward `mix_column` is the plain circulant (02 03 01 01), built from four
xtime units.

## Departures and choices

Choices that follow the paper:

* the round order of both directions (decryption: InvShiftRows, then the
  inverse S-box);
* the combined square-and-λ circuit;
* the sharing of {09}/{04}/{02} products in InvMixColumn, and its
  reduced-xtime terms;
* composite-field S-boxes in encryption and decryption.

Where this design departs from the paper or fills a gap:

* **Output coefficients.** Each InvMixColumn output byte takes its
  coefficients from the standard inverse matrix, which the paper also gives.
  The RTL was checked against that matrix, not against the paper's
  simplified per-row equations.
* **{02} product.** The paper describes {02} as a plain left shift. That is
  only correct when bit 7 is clear, so full xtime is used.
* **Basis-change matrices.** The paper gives the tower but not the matrices;
  they are derived as described above.
* **GF(2^4) units.** The paper only names the GF(2^4) multiplier and inverse.
  Their gate structure here (Karatsuba form, inverse via GF(2^2)) is this
  design's own.
* **Key schedule.** The paper does not describe one. This is the standard
  AES-128 schedule, fully unrolled. SubWord uses the same composite S-box.
* **Architecture.** The unrolled 11-stage pipeline, the valid/busy interface,
  the shared key register and the key-load rule are this design's own. The
  paper does not say whether its rounds are iterated or unrolled. Its reported
  area suggests an unrolled design.
* **Out of scope.** Only AES-128 is built. AES-192 and AES-256 are mentioned
  in the paper but not evaluated. The paper's FPGA area, delay and power
  comparison with a conventional decryptor is not reproduced here, and the
  conventional InvMixColumn it compares against is not included.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
`tb/aes_ref_pkg.sv` works only in the polynomial basis: shift-and-add
multiplication, brute-force inversion, and S-box tables built from those at
the start of simulation. It therefore shares no structure with the hardware.

| testbench | what it establishes |
|---|---|
| `tb_gf4_sq_scale`, `tb_gf4_mul`, `tb_gf4_inv`, `tb_gf8_inv_composite` | exhaustive, against schoolbook tower arithmetic |
| `tb_composite_sbox` | all 256 forward and inverse entries match the FIPS-197 S-box definition |
| `tb_mix_column`, `tb_inv_mix_column` | known test columns, every single-byte column, 2000 random columns |
| `tb_sub_shift_rows` | index-pattern state, random states, inverse undoes forward |
| `tb_aes_enc_round`, `tb_aes_dec_round` | FIPS-197 round example, random states and keys, final-round variant |
| `tb_key_expansion` | FIPS-197 A.1 round keys, 100 random keys |
| `tb_aes_encrypt`, `tb_aes_decrypt` | FIPS-197 C.1 block, 400 random blocks with gaps and back-to-back runs, latency = 11 |
| `tb_aes_top` | full design at default size (see below) |

`tb_aes_top` runs the whole design at its default parameters:

* It encrypts the paper's example block 85fc3432abcd53210be0ac125ccdb110 and
  gets 9ba71628a7ee25e0416a7354a15b1321. The paper does not print its key, but
  the FIPS-197 key 2b7e151628aed2a6abf7158809cf4f3c reproduces this ciphertext
  exactly. The same cycle, it decrypts the ciphertext back to the plaintext.
  It then runs the four published ECB-AES128 blocks for that key (NIST
  SP 800-38A), back to back in both directions.
* It runs independent random traffic on both pipelines.
* It runs a loop-back phase, where every ciphertext is fed straight into the
  decryptor and must return the original plaintext.
* It reloads the key and runs the FIPS-197 C.1 block.

It counts each mechanism: key loads, simultaneous encryption and decryption,
back-to-back blocks, round trips and known answers. A mechanism that never
happened counts as a failure. The model's own consistency with AES was also
checked against the published FIPS-197 vectors.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_top \
  -y rtl -y tb +libext+.sv rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv
./obj_dir/Vtb_aes_top
```

Replace `tb_aes_top` with any other testbench name. The full-design testbench
takes about a minute to build and under a second to run. The testbenches use
`$urandom` only; they need no constraint solver or four-state simulation.

All modules pass `verilator --lint-only -Wall`. The remaining lint notes are:

* package constants unused by a given module;
* `rst_n` used both as an asynchronous reset and in the assertion's
  `disable iff`.

Two modules report outputs wired straight to inputs, and both are inherent to
the function:

* `gf4_sq_scale`: K0 = q2.
* `key_expansion`: round key 0 is the cipher key itself.
