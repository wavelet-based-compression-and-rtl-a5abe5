# Wavelet compression and key-hash encryption of grayscale images

This RTL implements an image protection chain for an FPGA: a grayscale
image is decomposed with the Cohen-Daubechies-Feauveau (CDF) 9/7 discrete
wavelet transform, and the resulting coefficient stream is encrypted by
XORing it with the SHA-1 digest of a secret key. The wavelet step separates
the smooth content of the image (the LL approximation sub-band) from its
edges and texture (the HL, LH and HH detail sub-bands). That is the basis for
lossy compression. The key-hash step makes the stored or transmitted
coefficients unreadable without the key. The structure follows the paper
"Wavelet Based Compression and Key Hashing Encryption of Image on FPGA". In
that paper the wavelet part was built in a high-level FPGA tool flow and
SHA-1 in HDL. Here every part is written as synthesizable SystemVerilog.

```
 host pixels                                                              host reads
 (row, col) ──► image_preproc ──► dwt2d ──────────► xor_cipher ──► image_postproc ──► (row, col)
               frame store,      row/column CDF 9/7     ▲ XOR        stream back to
               raster stream     (dwt_filter_bank)      │            a frame memory
                                                        │ 160-bit digest
 host key ────► sha1_msg_pad ──► sha1_core ─────────────┘
 (32-bit words) 512-bit blocks    80 rounds (sha1_msg_sched)
```

`wavelet_crypto_top` connects these blocks. Its defaults are a 128×128
8-bit image, one decomposition level and 16-bit coefficients. The key can
have any length.

## The wavelet transform

### Filter taps

Both analysis filters are symmetric. Tap *k* equals tap *−k*:

| tap | low-pass h (9 taps) | high-pass g (7 taps) |
|-----|--------------------|----------------------|
| 0   | 0.6029             | 1.1150               |
| ±1  | 0.2666             | −0.5912              |
| ±2  | −0.0782            | −0.0575              |
| ±3  | −0.0168            | 0.0912               |
| ±4  | 0.0267             | –                    |

The low-pass taps sum to 1, so a flat image keeps its value in LL. The
high-pass taps sum to 0. In hardware the taps are signed fixed point with 14
fractional bits: `round(value · 2^14)`, for example 0.6029 → 9878. They live
in `wcrypt_pkg`. A change of the taps or of `COEF_FRAC` only touches that
package and the matching decimal values in `tb/tb_ref_pkg.sv`.

### One line: `dwt_filter_bank`

Each valid input sample shifts a nine-sample window. Both filters are
evaluated every clock on the same window, centred on its middle sample. Each
pair of mirrored samples is added first, then multiplied once by its tap. This
takes five multiplies for the low-pass filter and four for the high-pass.
The 2:1 decimation is a selection:

* if the centre sample has an even index along the line, the low-pass result
  (an approximation coefficient, L) goes out;
* if the index is odd, the high-pass result (a detail coefficient, H) goes
  out.

So one coefficient leaves for every sample that enters, alternating L, H,
L, H. Results are rounded to nearest and saturated to `DW` bits. The latency
is two clocks.

The block does not know where a line starts or ends. The caller does three
things:

* it feeds the line already extended at both ends;
* it raises `in_emit` on the samples whose window is centred on a real
  sample;
* it passes a tag (here the write address) that comes out with the
  coefficient.

### Boundary extension

A line x[0..n−1] is read as n+8 samples with whole-sample symmetric
extension:

```
x[4] x[3] x[2] x[1] | x[0] x[1] ... x[n-1] | x[n-2] x[n-3] x[n-4] x[n-5]
```

The first eight samples only fill the window. After that, each read produces
one coefficient, for centres 0..n−1. Each line of length n therefore costs
n+8 clocks. Lines must have at least 5 samples.

### Rows, then columns: `dwt2d`

`dwt2d` owns two frame memories, A and B, of `IMG_W·IMG_H` words each, and
one filter bank that both passes share:

1. **Load.** The raster-order input stream is written into A.
2. **Row pass.** Each row of A is read with extension and filtered. The
   coefficient for centre c goes to the same row of B:
   * at column c/2 if c is even (L, left half);
   * at column w/2 + c/2 if c is odd (H, right half).
3. **Column pass.** Each column of B is filtered in the same way. The result
   goes back into A: L in the top half and H in the bottom half.
4. A now holds the four sub-bands of one level:

   ```
   +------+------+
   | LL1  | HL1  |     LL: low-pass in both directions (approximation)
   +------+------+     HL: high-pass along rows, low-pass along columns
   | LH1  | HH1  |     LH: low-pass along rows, high-pass along columns
   +------+------+     HH: high-pass in both directions
   ```
5. With `LEVELS > 1`, steps 2–3 are repeated on the LL quadrant of the
   previous level, which is w/2 × h/2 in the top-left corner (octave-band
   decomposition). The other quadrants are left in place.
6. **Unload.** A is streamed out in raster order, with `out_last` on the
   final word.

The memory addresses carry all the address arithmetic. The read address and
the write address of each sample are computed together when the read is
issued. The write address then travels through the filter pipeline as the
tag. Each pass waits 4 clocks at its end for the pipeline to drain, then the
next pass starts reading what the previous one wrote.

**Cycle counts** (w = `IMG_W`>>l, h = `IMG_H`>>l for level l):

* load: `IMG_W·IMG_H` cycles;
* each level: row pass `h·(w+8)+4` cycles, column pass `w·(h+8)+4` cycles;
* unload: `IMG_W·IMG_H` cycles, when the consumer never stalls;
* the first output word is valid 2 + (sum of the pass lengths) cycles after
  the last input sample was accepted.

At 128×128 with one level, the transform itself takes 34,824 cycles.

Coefficient growth: the worst-case gain per 1-D pass is 1.38 for L and 2.59
for H. An 8-bit image therefore stays below ±1,800 after one level, so 16-bit
words leave room for several levels. Saturation only guards extreme inputs.

## Key hashing: `sha1_msg_pad`, `sha1_msg_sched`, `sha1_core`

The secret key is a byte string of any length. It arrives as a stream of
32-bit words with the first byte in bits 31:24. The word marked `last` says
how many of its bytes are valid (0–4; 0 allows an empty key).

`sha1_msg_pad` collects the words into 16-word (512-bit) blocks. After the
last word it adds the SHA-1 padding, one word per clock:

1. the byte 0x80 right after the last key byte;
2. zero words;
3. the key length in bits as a 64-bit number in words 14 and 15 of the final
   block.

If the 0x80 byte falls into word 14 or 15, no room is left for the length.
That block is then sent filled with zeros, and one more block carries the
length. Each block is flagged as first (start from the initial values) and/or
final (its digest is the result).

`sha1_core` runs the 80 SHA-1 rounds, one per clock, on the five working
words A..E. The words start from the initial values 67452301, efcdab89,
98badcfe, 10325476 and c3d2e1f0 (hex). Each round computes:

```
T = rotl5(A) + F_t(B,C,D) + E + K_t + W_t ;  E=D ; D=C ; C=rotl30(B) ; B=A ; A=T
```

F_t and K_t change every 20 rounds:

| rounds | F_t                    | K_t        |
|--------|------------------------|------------|
| 0–19   | choose (B ? C : D)     | 5a827999   |
| 20–39  | parity                 | 6ed9eba1   |
| 40–59  | majority               | 8f1bbcdc   |
| 60–79  | parity                 | ca62c1d6   |

`sha1_msg_sched` supplies W_t. It holds only 16 words. Word 0 is the current
W_t, and each step appends `rotl1(W[t+13] ^ W[t+8] ^ W[t+2] ^ W[t])`, which is
W_{t+16}.

After round 79 the working words are added to the chaining value. A block
takes 81 cycles from `start` to `done`. With `init = 0` the core continues
from the previous digest. The top hands each block to the core as soon as
the core is idle, and sets `init` from the block's first flag. `key_ready`
rises after the final block.

The core gives the published SHA-1 results ("abc", the empty string, a
two-block message). The result is plain SHA-1 of the key, not HMAC.

## Encryption: `xor_cipher`

The coefficient stream is XORed with the 160-bit digest, taken in `DW`-bit
slices:

* word 0 of a frame uses bits 159:144, word 1 uses bits 143:128, and so on;
* after 10 words (for 16-bit words) the slices start again from the top;
* after the word marked `in_last` the slices also start again from the top,
  so every frame starts at the same place in the key.

The same block with the same digest decrypts.

While `key_ready` is low the cipher accepts nothing. If the transform
finishes before the key has been hashed, the result waits in `dwt2d`. This
is how a frame can be started before the key.

**Strength.** This is a repeating 160-bit XOR key stream. Equal coefficients
at the same position modulo 10 give equal cipher words, and one known
plaintext frame reveals the digest. That is the scheme as described, and it
should not be taken for strong encryption.

## Pre- and post-processing

`image_preproc` is a frame store for `PIX_W`-bit pixels. The host writes it
by (row, column), in any order, one pixel per clock. A `start` pulse reads
it out as a raster-order stream of zero-extended `DW`-bit samples.

`image_postproc` writes the encrypted stream into its own frame memory in
raster order. `in_last` realigns the write position. It pulses `frame_done`
at the end of each frame. The host reads any (row, column) with a one-cycle
read latency.

Converting a colour or larger image to the 128×128 grayscale working image
is a host task and is not part of the RTL.

## Using the top level

1. Write the image with `pix_wr_en`, `pix_wr_row`, `pix_wr_col` and
   `pix_wr_data`.
2. Stream the key on `key_in_valid`, `key_in_ready`, `key_in_data`,
   `key_in_last` and `key_in_nbytes`. `key_ready` falls with the first word.
   It rises again when `key_digest` holds the digest of the whole key. For a
   key of up to 55 bytes that is about 100 cycles after the last word. Send a
   new key only between frames.
3. Pulse `img_start`. This step can come before step 2.
4. Wait for `frame_done`. Then read the encrypted sub-band image through
   `rd_row` and `rd_col`. Data are on `rd_data` one clock after the address.

With the defaults and a key that is already hashed, a frame takes 67,596
cycles, measured from the edge that samples `img_start` to the edge that
raises `frame_done`:

* 16,384 cycles to stream the image in;
* 34,824 cycles of transform;
* 16,384 cycles to stream the result out;
* 4 cycles of pipeline.

The three image memories (pre, A/B, post) take 16,384 × (8 + 16 + 16 + 16)
bits. In synthesis they map to block RAMs, because every memory has one
write port and one synchronous read port.

| parameter   | default | meaning                                   |
|-------------|---------|-------------------------------------------|
| `IMG_W`, `IMG_H` | 128 | image size; multiples of 2^`LEVELS`, ≥ 5·2^`LEVELS` |
| `LEVELS`    | 1       | octave decomposition levels               |
| `PIX_W`     | 8       | input pixel width                         |
| `DW`        | 16      | coefficient width; must divide 160        |

## What follows the paper and what does not

**From the paper:**

* the overall chain: pre-processing to a serial stream, the CDF 9/7 analysis
  filter bank, row-then-column 2-D decomposition, SHA-1 hashing of a key, a
  bit-wise XOR of the serial stream with the digest, and post-processing back
  to a matrix;
* the tap values;
* the SHA-1 constants, round functions and message schedule;
* the 128×128 grayscale working size.

**Corrections to damaged printed values:**

* The printed low-pass centre tap is garbled. It is taken as 0.6029, the
  value that gives unit DC gain and the usual CDF 9/7 analysis tap.
* The first round constant is printed with a missing digit. It is taken as
  5a827999.
* The schedule recurrence is implemented with the one-bit rotation that SHA-1
  requires.

**Choices of this design, where the paper gives no detail:**

* the fixed-point format, rounding and saturation;
* whole-sample symmetric boundary extension;
* the sub-band layout in memory;
* one decomposition level by default;
* the standard SHA-1 padding;
* the key delivered as a stream of 32-bit words;
* the slicing and alignment of the digest in the XOR;
* the valid/ready handshakes;
* the stall on a missing key.

**Not built:**

* The "compression" ends at the sub-band decomposition. The paper describes
  no quantisation, thresholding or entropy coding, so none is built. All four
  sub-bands are stored and encrypted. A user who wants a smaller output can
  keep only the LL quadrant: the top-left `IMG_W/2^L × IMG_H/2^L` words.
* The paper's original 512×512 colour input is reduced on the host. The RTL
  also runs directly at 512×512 (set `IMG_W`, `IMG_H`). With `LEVELS = 2` its
  LL2 sub-band is 128×128. The testbench `tb_wavelet_crypto_top_512` checks
  that configuration.

## Verification

Every testbench checks itself against a reference model that is written
separately from the RTL, in `tb/tb_ref_pkg.sv`:

* the wavelet reference is a direct convolution using the decimal taps;
* the SHA-1 reference is a straightforward 80-word implementation;
* the padding reference builds the blocks byte by byte.

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_dwt_filter_bank` | random, full-range (saturating) and impulse lines; band, value and 2-cycle latency |
| `tb_dwt2d` | 16×16 one level and 24×20 two levels, input gaps and output stalls, exact pass cycle count |
| `tb_sha1_msg_pad` | every key length 0..140 bytes (including the extra-block cases), gaps and stalls, first/final flags |
| `tb_sha1_msg_sched` | all 80 words of random blocks |
| `tb_sha1_core` | published digests including a two-block message, random chained messages, 81-cycle block time |
| `tb_xor_cipher` | slice order, frame restart, stall without key, decryption by a second instance |
| `tb_image_preproc` | shuffled writes, raster stream with and without stalls |
| `tb_image_postproc` | full and short frames, `frame_done`, read-back |
| `tb_wavelet_crypto_top` | default size, two frames: a 13-byte key after the image (stall), then a 60-byte two-block key before the image (timed) |
| `tb_wavelet_crypto_top_512` | 512×512, two levels, same checks |

The default-size test also repeats the histogram comparison used to judge
such schemes. It counts 256 bins of the input pixels and of the low byte of
the encrypted words. With the synthetic test images the input peaks at
237–462 pixels per bin. The encrypted image uses all 256 bins and peaks at
116–141. The L1 distance between the two histograms is about 8,900 out of a
possible 32,768.

The two end-to-end tests compare every output word with the reference
transform XOR the reference digest. They also count the mechanisms they rely
on (hashing, chained key blocks, row pass, column pass, boundary extension
reads, key stall, frame reassembly) and fail if any of them never happened.

To run a testbench with Verilator (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_wavelet_crypto_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/wcrypt_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_wavelet_crypto_top.sv
./obj_dir/Vtb_wavelet_crypto_top
```

Replace the top module and the last file for the other testbenches. The
default-size test needs about 230,000 clock cycles and runs in seconds. The
512×512 test needs about 4 million cycles.

The asynchronous resets need a real falling edge of `rst_n`. The testbenches
start with `rst_n` high and drop it at 1 ns.
