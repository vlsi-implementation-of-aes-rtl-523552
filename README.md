# AES-128 data hiding in images: SystemVerilog RTL

This design hides a secret message inside an RGB image. The message is first
encrypted with AES-128. The ciphertext bits then replace the least significant
bits of the image's colour bytes. The picture looks unchanged, and whoever
extracts the bits still needs the key to read them. The recovery side does the
reverse: it reads the LSBs, decrypts them, and measures how far the stego image
is from the original.

The RTL follows a published VLSI proposal for AES-based image data hiding. That
proposal gives the overall data flow as two block diagrams, one for hiding and
one for recovery. It also gives one concrete hardware idea: the AES round
function needs only a single 256-byte S-box table. The {02} and {03} multiples
that MixColumns needs are derived from the S-box output with a shift and XORs.
Everything the proposal leaves open (architecture, widths, wavelet, bit order,
handshakes, timing) is a choice made here. Each choice is marked below and in
the header comment of each file.

## Data flow

```
 hiding path
   secret bytes ──► secret_packer ──► aes_encrypt ──┐ ciphertext blocks
                    (128-bit blocks,   (10 rounds,   ▼
                     zero padding)     iterative)  lsb_embed ──► stego image
   cover image ──► lwt_haar2d ──► ilwt_haar2d ──────┘  (2x2 RGB blocks)
   (2x2 RGB blocks)      └──► coef (sub-band coefficients, observation port)

 recovery path
   stego image ──► lsb_extract ──► aes_decrypt ──► recovered 128-bit blocks
        │
        └───────► quality_meter ◄── original image   (sse, n_bytes, n_diff)

 aes_key_expand: one key schedule, all 11 round keys, shared by both cores
```

`stego_aes_top` instantiates all of it. The two paths share only the key
schedule and the `start`/`msg_blocks` controls, so they can run at the same
time.

## The AES-128 core

**One table for SubBytes, ShiftRows and MixColumns.** MixColumns multiplies
each state column by the constant matrix

```
 02 03 01 01
 01 02 03 01
 01 01 02 03
 03 01 01 02
```

Each input is an S-box output S(a), so every output byte is an XOR of four
terms: S, 2·S or 3·S. `aes_sbox` holds one 256-entry table and produces all
three values:

- 2·S is S shifted left by one bit, XORed with `0x1b` when bit 7 of S was 1
  (reduction modulo x⁸+x⁴+x³+x+1);
- 3·S is 2·S XOR S.

`aes_enc_round` puts ShiftRows into the addressing of its 16 `aes_sbox`
instances. Output column c, row r looks up input column (c+r) mod 4, row r.
It then XORs the lookups per column as above and adds the round key. In the
final round (`last=1`) MixColumns is bypassed. The S-box contents are not
written out as numbers. `aes_pkg` computes them at elaboration from their
definition: the GF(2⁸) inverse (as a²⁵⁴), then the affine map with constant
`0x63`. The inverse S-box is the inverted table.

**Byte order.** A block is a 128-bit vector. Bits [127:120] hold byte 0 in
FIPS-197 order, and byte 4c+r is row r, column c of the state. This gives the
FIPS-197 test vectors directly: key `000102…0f` and plaintext `00112233…ff`
encrypt to `69c4e0d86a7b0430d8cdb78070b4c55a`.

**Architecture (own choice).** The cores are iterative, with one round per
clock on a 128-bit datapath. `aes_encrypt` XORs the input with round key 0 when
it accepts the block. It then applies rounds 1 to 10, the tenth without
MixColumns, and holds the result until `out_ready`. `aes_decrypt` is the
standard FIPS-197 inverse cipher:

- XOR with round key 10;
- then, with keys 9 down to 0: InvShiftRows, InvSubBytes, AddRoundKey,
  InvMixColumns;
- InvMixColumns uses the matrix {0e 0b 0d 09} and is skipped with key 0.

The publication gives no inverse round, so this part is standard AES rather
than its design. InvMixColumns uses general GF(2⁸) multipliers, not tables.

**Key schedule.** `aes_key_expand` produces one round key per clock from
`key_valid`:

- RotWord, then SubWord through four more `aes_sbox` instances;
- XOR with the round constant, which starts at 01 and is doubled each round;
- the running XOR across the four words.

All eleven keys stay in registers, 1408 flip-flops in all. The encryption core
reads them forward and the decryption core reads them backward. Only 128-bit
keys are supported. The publication mentions the 192- and 256-bit variants of
AES but builds the 128-bit one.

| event | cycle |
|---|---|
| `key_valid` sampled | 0 |
| `keys_ready` high | 10 |
| block accepted by a core (`in_valid & in_ready`) | t |
| `out_valid` | t + 10 |
| next block can be accepted | after the output handshake (11 cycles per block with a ready sink) |

## Getting bits into pixels: packing and LSB mapping

This is the part with the most invented detail. It is also what an extractor
must match bit for bit.

1. **Packing (`secret_packer`).** Secret bytes fill a 128-bit block, first byte
   most significant. After 16 bytes, or a byte marked `secret_last`, the block
   goes to AES. The tail of a short last block is zero-filled, and
   `padded_blk` pulses when that block enters AES. The receiver gets whole
   padded blocks back. Removing the padding, and knowing the message length,
   is left to the software around the design.
2. **Image stream.** Images travel as 2x2 pixel blocks (`pix2x2_t`). In a block,
   p[0] is top-left, p[1] top-right, p[2] bottom-left and p[3] bottom-right.
   Each pixel has 8-bit R, G and B. So one block carries 12 colour bytes,
   numbered k = 3·pixel + {R=0, G=1, B=2}. The order of blocks in the image is
   the sender's business. The receiver just has to see the same order.
3. **Embedding (`lsb_embed`).** The ciphertext is treated as one bit stream,
   most significant bit of each block first. Colour byte k of each cover block
   gets the next `LSB_BITS` bits in its low bits, for k = 0…11. With the default
   `LSB_BITS=1`, a 2x2 block takes 12 bits, so a 128-bit ciphertext block
   covers 10⅔ pixel blocks. The embedder keeps a 140-bit buffer (128+12) for
   this reason. It loads the next ciphertext block when fewer than 12 bits
   remain.
4. **Stall and pass-through.** While ciphertext is still due and the buffer
   holds fewer than 12 bits, `cover_ready` drops. The image stream waits for
   AES, which is the usual case, since AES needs 11 cycles per 128 bits. After
   the last bit, the bytes of a partly used block and all later blocks pass
   unchanged, and `embed_done` rises.
5. **Extraction (`lsb_extract`).** Reads the low bits back in the same order.
   It emits a ciphertext block for each 128 bits gathered, stops after
   `msg_blocks` blocks, and ignores the pixels that follow.

`msg_blocks`, the number of 128-bit blocks in the message, is given to both
sides with the `start` pulse. The publication does not say how the receiver
learns the message length. `LSB_BITS` may be 1, 2 or 4 (checked by an
assertion). The publication speaks only of replacing "the least significant
bits" of each pixel, so 1 bit per colour byte is the default.

## Wavelet stage

The hiding diagram routes the cover image through a DWT, its sub-band
coefficients, a "fused image" and an IDWT before the LSB step. The publication
does not name the wavelet. Its result screens are labelled LWT, so this design
uses a lossless integer lifting Haar transform on each 2x2 block:

```
 pair (a,b):  d = a - b,   s = b + floor(d/2)        inverse: b = s - floor(d/2), a = d + b
 rows:   (x00,x01) -> s0,d0     (x10,x11) -> s1,d1
 cols:   (s0,s1) -> LL, LH      (d0,d1) -> HL, HH
```

LL lies in 0…255, HL and LH in −255…255 and HH in −510…510, all held as 10-bit
signed values. The rule for fusing sub-bands is not given, so no fusion is
built. The coefficients go straight from `lwt_haar2d` to `ilwt_haar2d`, and
they are also brought out on the top's `coef` port (the "LWT image"). Integer
lifting is exact, so the cover image equals the input image. The transform
pair is where a fusion or coefficient-domain step would go. `ilwt_haar2d`
clamps its output to 0…255, which only matters once coefficients are changed.
Each transform is one registered stage handling one block per clock.

The publication also conflicts with itself here. Its diagram embeds the bits
after the IDWT, in the pixels. Its text describes the fused image as rebuilt
"from the modified sub-bands". The RTL follows the diagram.

## Quality measurement

`quality_meter` compares each 2x2 block of the image under test with the same
block of the original image. It accumulates three counters:

- `sse`: the sum of squared byte differences;
- `n_bytes`: the number of bytes compared;
- `n_diff`: the number of bytes that differ.

MSE is `sse / n_bytes`, and PSNR is 10·log10(255² / MSE), computed outside the
design. The publication only names a "quality measurement" block, so the
choice of metrics is this design's. In the top, the recovery side feeds it
`rx_stego` and `rx_orig`, and `start` clears it. With 1 LSB per byte, the error
on each changed byte is ±1, so `sse == n_diff`.

## Top-level interface (`stego_aes_top`)

All streams are valid/ready: a transfer happens on a rising edge with both
high. There is one clock and a synchronous active-low reset `rst_n`.
Parameter: `LSB_BITS` (default 1).

| group | signals | notes |
|---|---|---|
| key | `key_valid`, `key[127:0]`, `keys_ready`, `keys_busy` | load a key, wait for `keys_ready` (10 cycles) |
| message | `start`, `msg_blocks[15:0]` | one-cycle pulse: clears the embedder, the extractor and the quality counters |
| secret in | `secret_valid/ready`, `secret_byte[7:0]`, `secret_last`, `padded_blk` | `secret_last` on the final byte |
| cover in | `cover_valid/ready`, `cover_blk` (`pix2x2_t`) | stalls while waiting for ciphertext |
| coefficients | `coef_valid`, `coef` (`coef_blk_t`) | observation only; `coef_valid` is the DWT output valid, and a coefficient set is final when the IDWT accepts it |
| stego out | `stego_valid/ready`, `stego_blk`, `embed_done` | |
| recovery in | `rx_valid/ready`, `rx_stego`, `rx_orig` | stego block and the matching original block |
| recovered out | `recov_valid/ready`, `recov_data[127:0]` | padded plaintext blocks |
| quality | `sse[47:0]`, `n_bytes[31:0]`, `n_diff[31:0]` | |

Sequence: load the key, pulse `start` with `msg_blocks`, then stream the secret
bytes and the cover blocks in any interleaving. For recovery, load the same key
(or keep it), pulse `start`, and stream stego/original block pairs.

Size after generic synthesis: about 2,700 flip-flops. The 36 lookup tables,
each 256×8, appear as 73,728 ROM bits: 16 S-boxes in the encryption round, 16
inverse S-boxes in the decryption round and 4 S-boxes in the key schedule.

## How far it is checked

Every module has a self-checking testbench in `tb/`. All compare against
reference models in `tb/aes_ref_pkg.sv`, written separately from the RTL:

- the S-box is built from log/antilog tables with generator {03};
- the round steps are applied one at a time;
- the key schedule works word by word;
- the Haar lifting reference uses its own floor division.

What is covered:

- all 256 S-box and inverse S-box entries, including 2S and 3S;
- the FIPS-197 Appendix B/C vectors (round 1, round 10, round keys 1 and 10,
  full cipher);
- hundreds of random rounds and blocks;
- latency: `keys_ready` after exactly 10 cycles, `out_valid` exactly 10 cycles
  after acceptance;
- padding, LSB bit order, stall and pass-through, extraction, and the exact
  wavelet inverse with clamping.

`tb_stego_aes_top` runs the whole chain at default parameters:

- a 37-byte message (three blocks, one padded) in a 16x16 image;
- then a 1024-byte message (64 blocks) in a 64x64 image, with a different key.

Every stego block, every recovered block and the quality counters must match
the reference. The testbench also counts each mechanism: key expansion, cover
stall, padding, pass-through, coefficient output, decryption and measured
distortion. A mechanism that never occurs is a failure. Hiding the 1 KB
message in the 64x64 image took about 1,900 clock cycles with random gaps and
back-pressure.

## Departures and gaps

- **Sub-band fusion** is not built (no rule given); DWT feeds IDWT directly.
- **Key encoding / password check.** The publication's flow encodes the user's
  secret key and checks a password in host software. The design takes a raw
  128-bit AES key.
- **Host side.** Image I/O, PSNR, removing the padding and managing the
  message length are outside the design.
- **Only AES-128**; no 192/256-bit keys, no modes of operation (CBC, CTR) and
  no MAC. The publication lists these only as possible extensions.
- The publication's timing figures (1.15 ms to encrypt and 1.05 ms to decrypt
  1 KB) come from its software runs. There is no hardware clock rate to compare
  with. At 11 cycles per block, 1 KB needs 704 AES cycles.
- All widths, handshakes, the bit order, the iterative architecture and the
  cycle counts are this design's own.

## Simulating and changing it

Files: `rtl/aes_pkg.sv` (types, GF(2⁸) helpers, S-box generation) and one
module per file in `rtl/`, with testbenches `tb/tb_<module>.sv`. All
testbenches use `tb/aes_ref_pkg.sv` and `tb/tb_common.svh`. From the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_stego_aes_top.sv \
    --top-module tb_stego_aes_top -o sim
./obj_dir/sim
```

Replace `tb_stego_aes_top` with any other testbench name. Each prints
`TB_RESULT checks=N failures=M`. The top-level run also prints the cycle counts
and the mechanism counts. `tb_lsb_roundtrip` runs `lsb_embed` into
`lsb_extract` at `LSB_BITS` = 1, 2 and 4.

To change the number of hidden bits per byte, set `LSB_BITS` on the top (1, 2
or 4); both sides must use the same value. To add a wavelet-domain step, insert
it between `u_dwt` and `u_idwt` in `stego_aes_top` on the `coef_blk_t` stream.
