# Modified AES-128 with a nibble S-box

This is a combinational AES-128 variant. It keeps the AES round structure and
replaces the 8-bit Rijndael S-box with a 4-bit S-box. The 4-bit S-box is built
the same way as the Rijndael one, an inverse in a finite field followed by an
affine map, but over GF(2^4) instead of GF(2^8). Each byte is then substituted
in two halves: its upper nibble and its lower nibble each go through the same
4-bit box. The aim is a smaller substitution stage than the 256-entry AES table.

The top level, `aes_top`, takes a 128-bit plaintext `datain` and a 128-bit
`key`. It drives `cipher`, the encryption of `datain`, and `decrypted`, the
decryption of `cipher` under the same key. So `decrypted` always equals
`datain`. There is no clock and no register: both outputs settle one
propagation delay after the inputs change.

The cipher does **not** interoperate with standard AES. With the byte-wise
S-box replaced, every ciphertext differs from what FIPS-197 gives.

## The nibble S-box (`maes_sbox4`)

This is the only part that differs from AES, and the part that needed the most
choices.

Forward substitution of a nibble `x`:

1. **Inverse:** take the multiplicative inverse of `x` in GF(2^4), modulo
   x^4 + x + 1. Zero maps to zero. The inverse is x^14, computed with five
   GF(2^4) multiplications.
2. **Affine map:** multiply by a 4x4 bit matrix, then XOR a 4-bit constant:

   ```
   y3 = x3 ^ x1 ^ x0
   y2 = x3 ^ x2 ^ x0
   y1 = x3 ^ x2 ^ x1
   y0 = x2 ^ x1 ^ x0        then y ^= 4'b1001
   ```

The hardware is a one-dimensional 16-entry lookup table, `TABLE[din]`. The
table is computed from these two steps when the design is elaborated, by
`sbox4_table()` in `maes_pkg`, so no value is typed in by hand. This gives the
table below. It is the S-box of the well-known simplified-AES
teaching cipher.

| x    | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | A | B | C | D | E | F |
|------|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| S(x) | 9 | 4 | A | B | D | 1 | 8 | 5 | 6 | 2 | 0 | 3 | C | E | F | 7 |

The inverse box (`INVERSE = 1`) runs the steps backwards. It removes the
constant, applies the inverse matrix, and then takes the GF(2^4) inverse. The
inverse matrix is the transpose of the forward one.

**What is given and what is chosen.** The scheme itself is specified:

- GF(2^4) inverse followed by a 4x4 matrix and a 4x1 constant;
- two lookups per byte, one per nibble.

The concrete box is not specified. There are three irreducible degree-4
polynomials (x^4+x+1, x^4+x^3+1 and x^4+x^3+x^2+x+1), and any invertible matrix
with any constant is allowed. This design uses x^4 + x + 1 and the
simplified-AES matrix and constant.

To change the box, edit `gf16_mul`, `sbox4_affine` and `sbox4_inv_affine` in
`rtl/maes_pkg.sv`. Also edit `SBOX_TABLE` in `tb/maes_ref_pkg.sv`, which the
testbenches use as an independent reference.

A consequence worth knowing: a byte substitution built from two independent
4-bit boxes is much less nonlinear than the 8-bit AES S-box. No high nibble
ever mixes with a low nibble inside SubBytes. Treat this cipher as a study of
hardware cost, not as a vetted cryptographic primitive.

## Round structure (`maes_encrypt`, `maes_decrypt`)

The byte order is the usual AES one. Byte 0 is bits [127:120], and the state
byte at row r, column c is byte r + 4c.

Encryption is fully unrolled into `NR` = 10 rounds:

```
state = datain ^ rk[0]
rounds 1..9 : SubBytes -> ShiftRows -> MixColumns -> AddRoundKey(rk[r])
round 10    : SubBytes -> ShiftRows ->               AddRoundKey(rk[10])
```

- `maes_sub_bytes` uses 32 `maes_sbox4` instances, two per byte.
- `maes_shift_rows` rotates row r left by r bytes. It is pure wiring.
- `maes_mix_columns` multiplies every column by the AES matrix
  [2 3 1 1] (circulant) over GF(2^8), modulo x^8+x^4+x^3+x+1.
  - Multiplying by 2 is `xtime`: a left shift, then an XOR with 0x1B if the
    shifted-out bit was set.
  - Multiplying by 3 is `xtime(a) ^ a`.
- `maes_add_round_key` is a 128-bit XOR.

Decryption is the standard AES inverse cipher, built from the same modules
with `INVERSE = 1`:

```
state = cipher ^ rk[10]
rounds 9..1 : InvShiftRows -> InvSubBytes -> AddRoundKey(rk[r]) -> InvMixColumns
final       : InvShiftRows -> InvSubBytes -> AddRoundKey(rk[0])
```

InvMixColumns uses the matrix [e b d 9]. Each constant is built from `xtime`
chains (9 = 8+1, b = 8+2+1, d = 8+4+1, e = 8+4+2).

## Key schedule (`maes_key_expand`)

This is the AES-128 key expansion. Round key 0 is the key itself. Each later
round key is derived from the one before:

```
t      = SubWord(RotWord(w3)) ^ {Rcon(i), 24'h0}
w0'    = w0 ^ t
w1'    = w1 ^ w0'
w2'    = w2 ^ w1'
w3'    = w3 ^ w2'
```

`Rcon(i)` is x^(i-1) in GF(2^8): 01, 02, 04, ..., 80, 1b, 36. SubWord uses the
nibble S-box, because this cipher has no other S-box. That is this design's
reading. Keeping the Rijndael S-box in the key schedule alone would be another
valid reading.

All 11 round keys are produced combinationally. One `maes_key_expand` instance
feeds both the encryption and the decryption chain.

## Interface and timing

| port        | dir | width | meaning                                   |
|-------------|-----|-------|-------------------------------------------|
| `datain`    | in  | 128   | plaintext block                           |
| `key`       | in  | 128   | cipher key                                |
| `cipher`    | out | 128   | encryption of `datain` under `key`        |
| `decrypted` | out | 128   | decryption of `cipher` under `key`        |

The parameter is `NR`, the number of rounds, default 10, the AES-128 round count.
The key schedule works for any `NR`, but only 10 is AES-128. 192- and 256-bit
keys are not supported.

The design is one large combinational cone. It passes through the key
schedule, ten encryption rounds and ten decryption rounds, and it has no
flip-flops. An FPGA implementation of this kind of design reports a
combinational path delay of about 75.7 ns. If you need a clock rate, put
registers at the round boundaries in `maes_encrypt` and `maes_decrypt`. The
`st[r]` vectors there are the natural cut points.

Coarse synthesis of `aes_top` gives 720 S-box tables plus about 4.6k other
word-level cells, mostly XORs. Each table is a 16 x 4-bit ROM, 64 bits. The 720
tables split as follows:

- 320 in the encryption chain;
- 320 in the decryption chain;
- 80 in the key schedule.

Example vector, for this S-box choice:

```
datain = 3243f6a8885a308d313198a2e0370734
key    = 2b7e151628aed2a6abf7158809cf4f3c
cipher = ae1ffa674dbc2b73f0d23b67f208ad8f
```

## Departures and open points

- **No chaotic mask.** The variant this design follows is also described
  elsewhere with a second change. That change replaces most MixColumns
  steps with a mask generated from the Hénon map and keeps only one
  MixColumns. The map parameters, the number format, the seeding and the way
  the mask is applied were never specified, so it is not built. Every round
  except the last applies MixColumns, as in AES.
- **S-box contents** are this design's choice, as explained above. Published
  waveforms for this variant show other ciphertexts for the same inputs. Only
  the round trip (`decrypted == datain`) can be compared with them.
- **Decryption** and the inverse transforms follow standard AES. Only the
  existence of a decryption output is specified.
- **Key schedule S-box**: the nibble box, as explained above.

## Verification

Each module has a self-checking testbench in `tb/`. The expected values come
from `tb/maes_ref_pkg.sv`, a behavioural model written separately from the RTL.
The model uses byte arrays, the printed S-box table, bit-serial GF(2^8)
multiplication, and a word-by-word key expansion.

| testbench               | what it checks                                                     |
|-------------------------|--------------------------------------------------------------------|
| `tb_maes_sbox4`         | all 16 nibbles, both directions, forward-then-inverse identity     |
| `tb_maes_sub_bytes`     | fixed patterns, 200 random states, round trip                      |
| `tb_maes_shift_rows`    | FIPS-197 round-1 vector, index pattern, random states, round trip  |
| `tb_maes_mix_columns`   | known AES columns (db 13 53 45 -> 8e 4d a1 bc), FIPS-197 round 1, random, round trip |
| `tb_maes_add_round_key` | fixed pair, zero key, random, key applied twice                    |
| `tb_maes_key_expand`    | hand-derived round key 1 of the zero key, all 11 round keys for 52 keys |
| `tb_maes_encrypt`       | 201 blocks against the model, with round keys supplied by the model |
| `tb_maes_decrypt`       | 201 blocks against the model, 100 model ciphertexts decrypted back |
| `tb_aes_top`            | end to end at default parameters: 350 vectors, key-bit and plaintext-bit sensitivity |

`tb_aes_top` counts how often each behaviour occurred, and it fails if one
never did:

- encryption changed the block;
- decryption recovered it;
- a single key-bit flip changed the ciphertext;
- a single plaintext-bit flip changed more than one byte of the ciphertext.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/maes_pkg.sv tb/maes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Each testbench ends with one line, `TB_RESULT checks=N failures=M`. Swap in
another `tb_*.sv` file and its module name to run a different one.

## Files

- `rtl/maes_pkg.sv` holds the shared types and the field arithmetic:
  - types `block_t` and `nibble_t`;
  - GF(2^4) multiply and inverse;
  - the S-box affine maps and the table builder `sbox4_table`;
  - `xtime` and the InvMixColumns constants;
  - `rcon`.
- `rtl/maes_sbox4.sv`, `maes_sub_bytes.sv`, `maes_shift_rows.sv`,
  `maes_mix_columns.sv` and `maes_add_round_key.sv` are the round transforms.
  Each is parameterised by `INVERSE` where that applies.
- `rtl/maes_key_expand.sv`, `maes_encrypt.sv` and `maes_decrypt.sv` are the
  key schedule and the two unrolled round chains.
- `rtl/aes_top.sv` is the top level.
- `tb/maes_ref_pkg.sv` is the reference model. The `tb/tb_*.sv` files are the
  testbenches.
