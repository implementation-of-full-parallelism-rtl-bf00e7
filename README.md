# Full-parallelism AES-128: unrolled encryption and decryption with online key expansion

This is an AES-128 engine built for throughput. Nothing is reused in time:

- Each of the ten rounds has its own hardware and its own pipeline register.
- Inside a round, the sixteen byte substitutions run at once, in four "Sub-4" units of four S-boxes.
- The four column mixes also run at once, in four "Mix-4" units.
- The key schedule is not stored. Each stage derives the round key it needs from the key of the stage before ("online key expansion"). Every block therefore carries its own key, and consecutive blocks may use different keys.

Encryption and decryption are two separate datapaths in the same top module. Each accepts one 128-bit block per clock.

```
 encryption channel (latency 11 clocks)

 pt,key ─► AddKey ─►[R]─► round 1 ─►[R]─► ... ─► round 9 ─►[R]─► round 10 ─►[R]─► ct
              │ key0          │ key1                 │ key9          │ key10
              └──────────────►└─ KeySub+KeySche ─► ... ─────────────►┘

 one round:  state ─► Sub-4 x4 (one per row) ─► ShiftRows ─► Mix-4 x4 (one per column) ─► AddKey
             key(r-1) ─► KeySub (g) ─► KeySche (XOR chain) ─► key(r) ──────────────────────┘
             round 10 has no Mix-4.

 decryption channel (latency 20 clocks)

 ct,key ─► key step 1 ─►[R]─► ... ─► key step 10 + AddKey(key10) ─►[R]─►
           inv round 9 ─►[R]─► ... ─► inv round 0 ─►[R]─► pt
           (each inverse round rebuilds key r from key r+1 on the fly)
```

## Interface and timing

Top module: `aes_full_parallel` (no parameters).

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset, clears the valid bits only |
| `enc_in_valid`, `enc_pt`, `enc_key` | in | 1/128/128 | plaintext block and its cipher key |
| `enc_out_valid`, `enc_ct` | out | 1/128 | ciphertext, exactly 11 clocks after the input |
| `dec_in_valid`, `dec_ct`, `dec_key` | in | 1/128/128 | ciphertext block and its cipher key (the normal key, not the last round key) |
| `dec_out_valid`, `dec_pt` | out | 1/128 | plaintext, exactly 20 clocks after the input |

- **Throughput.** Each channel accepts a new block on every clock, with or without gaps, and the two channels run independently in the same clock.
- **Flow control.** There is no back-pressure: an output is present for one clock and must be taken then.
- **Ordering.** Blocks leave in the order they entered.
- **Assertions.** Two concurrent assertions in the top check the fixed latencies.

**Byte order** follows FIPS-197. Byte 0 of a block is bits `[127:120]`. Byte *n* sits in row *n mod 4* and column *n / 4* of the 4×4 state, so column *c* is the word `[127-32c -: 32]`. For the FIPS-197 Appendix B example, `enc_pt = 128'h3243f6a8885a308d313198a2e0370734` with `enc_key = 128'h2b7e151628aed2a6abf7158809cf4f3c` gives `enc_ct = 128'h3925841d02dc09fbdc118597196a0b32`.

## The S-box: inversion in a tower field

`aes_sbox` computes the S-box instead of reading a 256-entry table. The AES S-box is the multiplicative inverse in GF(2^8), followed by an affine transform. Inversion is cheap in a tower of small fields. So the byte is first mapped into

```
GF(2^2) = GF(2)[x]   / (x^2 + x + 1)
GF(2^4) = GF(2^2)[y] / (y^2 + y + PHI),     PHI    = 2'b10
GF(2^8) = GF(2^4)[z] / (z^2 + z + LAMBDA),  LAMBDA = 4'b1100
```

The map into the tower is δ. It is the linear map that sends 2^i (the AES polynomial basis) to β^i, where β = `8'h42` is a root of the AES polynomial x^8+x^4+x^3+x+1 in the tower. Its eight columns are `01 42 6a 60 5f 91 51 c6`, and the columns of δ⁻¹ are `01 bc 5c b0 ff b6 be de`. Both sets are `DELTA` and `DELTA_INV` in `aes_pkg`. To regenerate them, search the tower for a root of the AES polynomial and take its powers 0..7.

In the tower a byte is `ah·z + al`, with two 4-bit halves. Its inverse is

```
d      = LAMBDA·ah² ⊕ (ah ⊕ al)·al          (a 4-bit value)
inv    = ( ah·d⁻¹ ) · z + ( (ah ⊕ al)·d⁻¹ )
```

so the 8-bit inversion costs one square, one multiplication by a constant, three GF(2^4) multiplications and one GF(2^4) inversion. The GF(2^4) inversion uses the same formula one level down, with PHI in place of LAMBDA. In GF(2^2) the inverse is simply the square. After inversion, δ⁻¹ maps back and the affine transform (`⊕ 63h`) finishes the byte.

The inverse S-box (`INVERSE = 1`) applies the inverse affine transform first (`⊕ 05h`), then the same δ, inversion and δ⁻¹. The GF helper functions live in `aes_pkg` and are plain combinational logic. One S-box synthesises to about 200 word-level gates.

## Keys on the fly, in both directions

**Encryption** needs the round keys in the order they are generated. `aes_key_sche` takes round key r−1 (words w0..w3) and produces round key r:

```
n0 = w0 ⊕ g(w3),  n1 = w1 ⊕ n0,  n2 = w2 ⊕ n1,  n3 = w3 ⊕ n2
g(w) = SubWord(RotWord(w)) ⊕ {rcon(r), 0, 0, 0},   rcon(r) = x^(r-1) in GF(2^8)
```

`g` is `aes_key_sub`. Its SubWord uses one more Sub-4 unit, so each encryption round holds 20 S-boxes: 16 for data and 4 for the key.

**Decryption** needs round key 10 first, but the caller supplies the cipher key. `aes_dec_pipeline` therefore works in two halves.

1. **Forward half.** Ten forward key-expansion stages run first, one per clock, while the ciphertext waits beside them. The tenth stage also applies the initial AddRoundKey with key 10.
2. **Backward half.** The ten inverse rounds follow. Each one rebuilds its key from the previous key with the same XORs read backwards (`aes_key_sche`, `INVERSE = 1`):

   ```
   w3 = n3 ⊕ n2,  w2 = n2 ⊕ n1,  w1 = n1 ⊕ n0,  w0 = n0 ⊕ g(w3)
   ```

So the decryption side also stores no key schedule and lets every block have its own key. The cost is ten extra pipeline stages of latency and key-expansion logic: decryption takes 20 clocks against 11 for encryption. If the last round key were supplied directly, the forward half could be removed.

## Rounds and their order

- `aes_enc_round`: SubBytes (four `aes_sub4`, one per state row), `aes_shift_rows`, MixColumns (four `aes_mix4`, one per column), then `aes_add_round_key`. The round with `ROUND = 10` has no MixColumns.
- `aes_dec_round`: InvShiftRows, InvSubBytes, AddRoundKey, then InvMixColumns. The round with `ROUND = 0` has no InvMixColumns and uses key 0, the cipher key.
- `aes_mix4`: builds the column products from repeated `xtime` (multiply by 2):
  - forward matrix: circulant {02, 03, 01, 01};
  - inverse matrix: circulant {0e, 0b, 0d, 09}.

All round logic is combinational between registers. The critical path is one full round: inverse S-box, mixing and the key step run in series with the data path.

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | types, `NR = 10`, field constants, GF(2^2)/GF(2^4) arithmetic, δ maps, affine maps, `xtime`, `rcon` |
| `rtl/aes_sbox.sv` | composite-field S-box / inverse S-box |
| `rtl/aes_sub4.sv` | four S-boxes on one 32-bit row (Sub-4) |
| `rtl/aes_shift_rows.sv` | ShiftRows / InvShiftRows wiring |
| `rtl/aes_mix4.sv` | MixColumns / InvMixColumns of one column (Mix-4) |
| `rtl/aes_add_round_key.sv` | state ⊕ key |
| `rtl/aes_key_sub.sv` | key-schedule function g |
| `rtl/aes_key_sche.sv` | one forward or backward key-expansion step |
| `rtl/aes_enc_round.sv`, `rtl/aes_dec_round.sv` | one registered round |
| `rtl/aes_enc_pipeline.sv`, `rtl/aes_dec_pipeline.sv` | the two unrolled datapaths |
| `rtl/aes_full_parallel.sv` | top: both channels side by side |
| `tb/aes_ref_pkg.sv` | behavioural AES reference for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Coarse synthesis of the top gives about 90,000 word-level cells and 7,711 flip-flops. The decryption side is larger because of its key pre-expansion stages.

## Verification

The reference in `tb/aes_ref_pkg.sv` shares no code with the RTL, so agreement between the two is a real check:

- it stays in the AES polynomial basis throughout;
- the S-box finds each inverse by search, the inverse S-box searches the S-box;
- MixColumns uses shift-and-add multiplication;
- the key schedule is the textbook word recursion.

It reproduces the FIPS-197 vectors of Appendices B and C.1. The testbenches check these properties:

- **S-box:** both S-boxes, over all 256 inputs.
- **Small units:** Sub-4, ShiftRows, Mix-4, AddRoundKey and g, on random values and on the FIPS-197 intermediate values.
- **Key steps:** forward and backward steps for all ten rounds of random keys. The FIPS-197 round-10 key is also checked.
- **Single rounds:** middle and last round, one clock latency, a block every clock, and valid and reset behaviour.
- **Pipelines:** FIPS vectors plus 200 random blocks, each with its own key. Each block's exact latency (11 or 20 clocks) is checked.
- **Top (`tb_aes_full_parallel`), end to end:**
  - 300 clocks of encryption traffic, mostly back to back, with the key held for a few blocks and then changed.
  - Every ciphertext is sent straight back through the decryption channel and must return the original plaintext.
  - Otherwise the decryption channel decrypts random blocks, checked against the reference.
  - The testbench counts encryptions, decryptions, round trips, clocks with both channels busy, back-to-back inputs, key changes and idle clocks. It fails if any count is zero.

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. To run one with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_full_parallel.sv \
    --top-module tb_aes_full_parallel -Mdir obj
./obj/Vtb_aes_full_parallel
```

Replace the testbench name to run another one. The top-level test takes about a minute and a half to build and run. The testbenches use only two-state values and `$urandom`.

## Where this design departs from, or fills in, the original description

The original description names the units and their parallel arrangement, the order of the AES steps, the composite-field S-box and online key expansion. The following are this implementation's own choices or readings.

- **Execution platform.** The original work maps the AES tasks onto an array of small programmable processors. It reports its throughput as 70 clock cycles per block on that array. Here the same data flow is built directly as fixed hardware: one round per pipeline stage, one block per clock per channel. The processor array itself is not modelled.
- **Decryption keys.** The original says only that decryption uses the round keys in reverse order. The forward-then-backward on-the-fly scheme above, and the resulting 20-clock latency, are this design's own.
  - Decryption ends with key 0, the cipher key, as AES requires.
- **Sub-4 grouping.** Each Sub-4 unit takes one state row, because the original ties its split to the rows. The S-box works byte by byte, so a column grouping would give the same result.
- **Field constants.** The tower polynomials, PHI, LAMBDA and the basis-change matrices δ and δ⁻¹ are choices. Any valid set gives the same S-box values. The structure of the inversion (square, scale by λ, multiply, invert in GF(2^4), two output multiplies) follows the original.
- **Standard AES details.** The following are taken from the AES standard, because the original does not spell them out:
  - the MixColumns matrices;
  - the round constants;
  - the application of RotWord to the last word of the previous key (the g function).
- **Interface.** Two independent channels, valid bits without back-pressure, and a synchronous reset of the valid bits only. None of this is specified by the original.
- **Key size.** Only 128-bit keys (10 rounds) are supported. The original mentions 192- and 256-bit keys only as part of the AES background.
- **Other architectures.** The original also describes three smaller architectures as steps toward this one: an eight-core loop-rolled version, a one-task-per-processor version and a version with only the column mixing parallelised. They are not built here.
