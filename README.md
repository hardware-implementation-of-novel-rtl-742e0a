# JPEG compression with selective TEA encryption

This is a streaming hardware encoder that compresses and encrypts a grey-scale
image in a single pass. It runs the baseline JPEG pipeline: 8x8 DCT,
quantization, zigzag scan, then DC difference / zero run length coding and
Huffman coding. Between the zigzag scan and the entropy coder it encrypts the
lowest-frequency coefficients of every 8x8 block with the Tiny Encryption
Algorithm (TEA). Those few coefficients carry most of a block's visual
content. Encrypting them scrambles the image and leaves the other 58
coefficients, which are mostly zero, to compress as usual.

There are two encryption methods, selected by the `mode` input:

| `mode` | name | coefficients replaced by ciphertext |
|---|---|---|
| 0 `ENC_OFF` | plain JPEG | none |
| 1 `ENC_DC` | method 1 | DC of every block |
| 2 `ENC_DC_AC` | method 2 | DC and AC1..AC5 (zigzag order) of every block |

Method 1 costs little compression, but block outlines stay visible. Method 2
hides the image, but the random-looking AC values no longer compress, so the
stream grows. On a synthetic 288x288 test image (see
[Measured behaviour](#measured-behaviour)), the output is 3,750 bytes without
encryption, 5,511 bytes with method 1 and 24,666 bytes with method 2.

The SystemVerilog is synthesizable and all of it is written here. It follows
a published FPGA design (Verilog on a Virtex-6) in its block structure, its
encryption methods and its sizes. Where that description stops, this design
makes its own choices, listed in
[Departures and own choices](#departures-and-own-choices).

## Data path

```
pix (8 bit, block by block)
  -> dct_2d:  level shift -> pingpong_buffer -> dct_1d (rows)
              -> dual_ram (read transposed) -> pingpong_buffer -> dct_1d (columns)
              -> dual_ram (read transposed)                       Z[u][v], row-major
  -> quantizer        (x round(65536/Q), +2^15, >>16, Q = JPEG luminance table)
  -> zigzag_reorder   (dual_ram read in zigzag order)
  -> coef_encrypt     (tea_core on DC..AC5, method select, block buffer)
  -> dc_diff_encoder  (DC -> DC - previous DC)
  -> zrl_encoder      (DC / (run,value) / ZRL / EOB symbols)
  -> huffman_coder    (standard luminance tables, code + amplitude bits)
  -> bit_packer       (bytes, FFh 00h stuffing, final padding)
  -> out_bytes / out_count
```

All blocks share `jpeg_tea_pkg`: the 12-bit coefficient type, the encryption
mode and symbol types, and the constant tables. The package computes each
table at elaboration from its definition. These are the DCT matrix, the
reciprocal quantization ROM, the zigzag scan and the canonical Huffman codes.

## Timing: blocks in, blocks out, no back-pressure

The pipeline never stalls and has no ready signal. It accepts one pixel per
clock, with idle clocks allowed anywhere. Every stage works in one of two
ways:

* **Word stages** (quantizer, DC difference, run length, Huffman, packer):
  one word in, one result out, one clock later.
* **Block stages** (ping-pong buffers, DCT passes, dual RAMs, encryption):
  collect a group of 8 or 64 words at the input rate, then replay it in
  consecutive clocks.

A stage never emits faster than one word per clock, and a block is replayed
before the next one can finish arriving. So no stage can be overrun, which
the assertions in `dct_1d`, `dual_ram` and `coef_encrypt` check. The dual RAM
(two banks that swap roles after every block) appears five times: after each
DCT pass, for the zigzag scan and in the encryption unit. Only the read
address sequence changes (`ORDER` 0 linear, 1 transpose, 2 zigzag).

With pixels arriving every clock, `done` comes 286 clocks after the last
pixel of an image. An image of W x H pixels therefore takes W*H + 286 clocks.
For 288x288 that is 83,230 clocks, or about 0.95 ms at 87 MHz.

## The encryption unit (coef_encrypt, tea_core)

This is the least conventional part of the design.

**TEA widened to 72 bits.** `tea_core` is TEA with two 36-bit halves instead
of two 32-bit ones. The key stays 128 bits: K[0] = `key[127:96]` ..
K[3] = `key[31:0]`. One clock performs a full TEA cycle, which is two Feistel
rounds:

```
sum += 9E3779B9h
v0  += ((v1 << 4) + K0) ^ (v1 + sum) ^ ((v1 >> 5) + K1)
v1  += ((v0 << 4) + K2) ^ (v0 + sum) ^ ((v0 >> 5) + K3)
```

All arithmetic is modulo 2^36. The 32-bit key words and delta are
zero-extended. 64 Feistel rounds take 32 clocks.

**Six coefficients make one TEA block.** The first six zigzag coefficients
(DC, AC1..AC5) are 12 bits each, which makes exactly 72 bits, DC in the top
field. The unit starts TEA as soon as AC5 has arrived. TEA then runs while
the rest of the block fills the block buffer, and it always finishes at
least 26 clocks before the block is complete. When the block is replayed,
the selected fields replace the coefficients:

* method 1 keeps only the DC field;
* method 2 uses all six fields.

Both methods encrypt the same 72-bit block.

**The 11-bit fold.** A cipher field is 12 random bits. A 12-bit AC value
could fall outside the baseline Huffman tables, which stop at 10-bit AC
amplitudes and 11-bit DC differences. So each replacing value is the signed
value of the field's low 11 bits (-1024..1023). That bit is lost, so the
original coefficients cannot be recovered from the stream even with the key.
The output is meant to be stored or shown as a scrambled image, not
decrypted.

**Look-ahead for the run length coder.** Encryption can turn zeros into
non-zeros among AC1..AC5. The unit therefore reports, with every block, the
zigzag index of the last non-zero AC coefficient after encryption
(`out_last_nz`). With this value the run length coder knows, on each zero,
whether a non-zero value still follows:

* after the 16th zero of a run, it emits ZRL only if a non-zero value
  follows;
* right after the last non-zero value, it emits EOB.

So each input word produces at most one symbol, with no buffering of pending
ZRLs.

## DCT arithmetic

The DCT is Z = C X C^T, where C is the orthonormal 8-point DCT matrix
(JPEG's F(u,v) scaling). C is held with 12 fractional bits. It is built by
symmetry from the nine values `round(4096 * c(k) * cos(m*pi/16))`,
m = 0..8.

Each pass has these properties:

* it computes one output coefficient per clock with eight multipliers;
* it rounds its result to an integer by adding half and shifting right by
  12;
* it keeps 12-bit words, with no overflow: the row pass is bounded by
  128*sqrt(8) and the final coefficients by 1024.

Pixels are level-shifted by -128 first.

Quantization multiplies by `round(65536/Q)`, adds 2^15 and shifts right by
16, which avoids a divider and gives z/Q rounded to nearest. The rounding
offset matters more than it looks. A bare shift floors, so every small
negative coefficient becomes -1 instead of 0. On the test image that nearly
triples the compressed size and drops the PSNR of plain JPEG from 39.6 dB to
22 dB.

## Entropy coding and output

* `dc_diff_encoder`: the DC predictor starts at 0 and restarts after the
  last block of every image.
* `huffman_coder`: uses the standard luminance DC and AC tables (ISO/IEC
  10918-1 Annex K.3). It emits one right-aligned bit string per word,
  `{code, amplitude}`, of up to 27 bits. Negative amplitudes are sent as
  value - 1 in the low `size` bits.
* `bit_packer`: appends these bit strings MSB first and emits complete
  bytes. It inserts 00h after every FFh byte. On the last word of an image
  it pads the final byte with ones.

In one clock the packer can complete up to five bytes, which become ten after
stuffing. The output is therefore `out_bytes[10]` with a count, and
`out_bytes[0]` comes first. The stream is a bare JPEG entropy-coded segment:
no SOI/DQT/DHT/SOF/SOS headers are generated. To view the result, wrap it in
a standard header with the Annex K tables and the quality-50 luminance
quantization table.

## Top-level interface (`jpeg_tea_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `pix_valid`, `pix` | in | 1, 8 | pixel stream: 8x8 blocks, row-major inside a block, blocks in raster order |
| `key` | in | 128 | TEA key, hold stable during an image |
| `mode` | in | 2 | `enc_mode_e`, hold stable during an image |
| `out_valid`, `out_count`, `out_bytes` | out | 1, 4, 10x8 | output bytes of this clock |
| `done` | out | 1 | pulses once after the last byte of an image |

Parameters: `IMG_W`, `IMG_H` (default 288 x 288, multiples of 8). The input
does not include a raster-to-block line buffer. A raster-scan source needs
one in front of the encoder, holding 8 lines.

## Measured behaviour

The full-size testbench feeds one synthetic 288x288 image in all three modes.
The image has smooth shading, two sharp-edged discs and a band of fine
texture. The testbench then decodes the coefficients as a standard JPEG
decoder without the key would: inverse zigzag, multiply by Q, inverse DCT,
clamp to 0..255.

| mode | bytes | PSNR vs original | RMSE |
|---|---|---|---|
| plain JPEG | 3,750 | 39.6 dB | 2.7 |
| method 1 (DC) | 5,511 | 5.73 dB | 131.8 |
| method 2 (DC + 5 AC) | 24,666 | 5.65 dB | 133.0 |

The source reports these results for its 288x288 photographs (Lena, Melissa):

* plain JPEG: 6-8 KB;
* method 1: 7-9 KB and 6.6-7.0 dB;
* method 2: 21-22 KB and 5.3-6.2 dB.

The pattern is the same here:

* Scrambling the DC coefficients alone already makes the PSNR that of noise.
  The encrypted DC values, times Q = 16, drive most blocks to black or white.
* Method 2 costs far more bits than method 1, because five random AC values
  per block replace mostly zero ones.

The absolute sizes differ because the test image is smoother than a
photograph.

## Departures and own choices

Taken from the source design:

* the block chain;
* ping-pong buffers of 8 registers in front of the DCT passes;
* dual RAMs between the passes;
* quantization by `65536/Q` multiplication and a 16-bit shift, with a
  counter-addressed coefficient ROM;
* TEA with 64 Feistel rounds, delta 9E3779B9h, a 72-bit block (two 36-bit
  halves) and a 128-bit key;
* encryption after the zigzag scan;
* the two methods;
* the 288x288 image size.

Chosen here:

* the block-ordered pixel input and the level shift;
* the rounding offset before the quantizer's shift;
* 12-bit words, the fixed-point DCT and its rounding;
* one DCT output per clock;
* packing six coefficients into the TEA block, the 11-bit fold, and zero
  extension of the key words and delta;
* one TEA cycle per clock;
* the standard Annex K tables, because the source only says "JPEG
  standard";
* the last-non-zero look-ahead;
* the 10-byte output bus, and no file headers;
* asynchronous reset.

Known differences:

* The source reports 9 DSP blocks. This design has 17 multipliers: 8 per DCT
  pass and 1 in the quantizer.
* The source reports 167 bonded I/O pins. This top has 227 port bits, mostly
  the 128-bit key and the 80-bit output bus. The source does not say how its
  key and bytes reach the pins.
* The source's 87 MHz clock rate has not been checked here, because no FPGA
  timing run was made.
* The PSNR/RMSE figures of the source images cannot be reproduced: those
  images are not available, and no decoder is included.

## Verification

Every module has a self-checking testbench in `tb/`, and every one ends by
printing `TB_RESULT checks=N failures=M`. The reference model,
`tb/jpeg_ref_pkg.sv`, is written independently of the RTL:

* floating-point cosines rounded to the fixed-point matrix;
* a bouncing-walk zigzag;
* TEA on 64-bit integers;
* the textbook JPEG run-length loop;
* a queue-based bit writer.

| testbench | what it shows |
|---|---|
| `tb_pingpong_buffer`, `tb_dct_1d`, `tb_dual_ram`, `tb_dct_2d` | bit-exact DCT against the reference, group/block order, latency, idle clocks |
| `tb_quantizer`, `tb_zigzag_reorder` | reciprocal quantization, result within half a step of z/Q, exact on multiples of Q; zigzag order (also against a hand-written prefix) |
| `tb_tea_core` | ciphertext against software TEA, 32-clock latency, busy/start rules, avalanche |
| `tb_coef_encrypt` | all three modes, 11-bit fold, last-non-zero index |
| `tb_dc_diff_encoder`, `tb_zrl_encoder`, `tb_huffman_coder`, `tb_bit_packer` | DPCM with restart; ZRL/EOB placement; codes against hand-written standard codes; stuffing and padding |
| `tb_jpeg_tea_top` | 32x24 images in all modes, with input gaps; byte-exact against the reference; counts that ZRL, EOB, stuffing, gaps and every mode occurred |
| `tb_jpeg_tea_full` | the default 288x288 configuration, a synthetic image in all three modes, byte-exact; stream sizes, and PSNR/RMSE of what a decoder without the key shows |

In each testbench, stimulus is applied and outputs are compared on the
falling clock edge.

To run one testbench with Verilator 5, for example the full-size one:

```
verilator --binary --timing --assert --top-module tb_jpeg_tea_full \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/jpeg_tea_pkg.sv tb/jpeg_ref_pkg.sv tb/tb_jpeg_tea_full.sv -o sim
./obj_dir/sim
```

Replace the module name to run another testbench. Testbenches that do not use
the reference model need only `rtl/jpeg_tea_pkg.sv` before their own file.
The full-size run takes a few seconds. Lint with
`verilator --lint-only -Wall -Irtl rtl/jpeg_tea_pkg.sv rtl/<module>.sv`.

Lint gives two kinds of remaining warnings:

* `SYNCASYNCNET`, because the assertions sample the asynchronous reset
  synchronously in `disable iff`;
* an unused package constant in modules that do not use it.
