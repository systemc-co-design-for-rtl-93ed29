# Multiplier-free 8x8 DCT by distributed arithmetic, with an image codec datapath

This RTL computes the 8x8 forward Discrete Cosine Transform used by JPEG- and
MPEG-style image compression without a single multiplier. The 8-point
transform is evaluated by *distributed arithmetic*: the inputs are fed one
bit-plane at a time into small ROMs that hold pre-added coefficient sums, and
shift-accumulators put the partial products together. Two passes of that
8-point unit through an 8x8 transposition RAM give the 2D transform. The
mirror-image inverse transform, a quantiser, an inverse quantiser, zig-zag
reordering stages and a run-length / Huffman entropy coder and decoder are
built around it. Together they form the encoder and decoder of a still-image
codec, from pixels to a bit stream and back.

The architecture of the forward transform (symmetry split, bit-slice units,
eight 16-entry ROMs in 4.11 fixed point, shift-accumulators, 15-bit ports,
row/column passes through a transposition RAM) follows the article
*SystemC Co-Design for Image Compression: Fast Discrete Cosine Transform using
Distributed Arithmetic Method*, which builds it as a SystemC RTL model. The
article describes each surrounding codec stage in a sentence. Their
implementation here is this design's own, and is marked as such below and in
each file header.

## Files

| file | module | role |
|---|---|---|
| `rtl/dct_pkg.sv` | package | widths, coefficient table, ROM and zig-zag table functions, default quantisation table, Huffman tables |
| `rtl/dct_da_rom.sv` | `dct_da_rom` | forward DA look-up table D_x, one per output x |
| `rtl/dct_bit_slice.sv` | `dct_bit_slice` | holds four B-bit values, presents one bit-plane per clock |
| `rtl/dct_shift_acc.sv` | `dct_shift_acc` | shift-accumulator with rounding/saturating output buffer |
| `rtl/dct1d.sv` | `dct1d` | 8-point forward DCT |
| `rtl/dct_transpose_ram.sv` | `dct_transpose_ram` | 8x8 RAM, row or column access |
| `rtl/dct2d.sv` | `dct2d` | 8x8 forward DCT |
| `rtl/idct_da_rom.sv`, `rtl/idct1d.sv`, `rtl/idct2d.sv` | | inverse DCT, same structure |
| `rtl/quantizer.sv`, `rtl/dequantizer.sv` | | table quantiser and its inverse |
| `rtl/zigzag_reorder.sv`, `rtl/inverse_reorder.sv` | | 8x8 block <-> 64-entry zig-zag sequence |
| `rtl/entropy_encoder.sv`, `rtl/entropy_decoder.sv` | | run-length / Huffman coding to and from a serial bit stream |
| `rtl/adder_subtractor.sv` | `adder_subtractor` | residual / rebuild unit of a predictive video coder |
| `rtl/image_codec.sv` | `image_codec` | top level: encoder chain, decoder chain, adder/subtractor |

Every module has a self-checking testbench `tb/tb_<module>.sv`.

## The distributed-arithmetic 8-point DCT (`dct1d`)

The 1D transform is F_x = sum_{i=0..7} C(i,x) f_i with
C(i,x) = c(x)/2 cos((2i+1) x pi/16), c(0) = 1/sqrt(2), c(x>0) = 1.
Its matrix has only seven distinct magnitudes, A..G:

| | A | B | C | D | E | F | G |
|---|---|---|---|---|---|---|---|
| value | 0.353553 | 0.490393 | 0.415735 | 0.277785 | 0.097545 | 0.461940 | 0.191342 |

**Symmetry split.** Rows with even x are symmetric (C(i,x) = C(7-i,x)) and rows
with odd x antisymmetric. With u_i = f_i + f_(7-i) and v_i = f_i - f_(7-i),
i = 0..3, every output becomes a 4-term dot product:
F_x = sum_{i<4} C(i,x) u_i for even x and the same with v_i for odd x.

**Bit-planes instead of multiplications.** Write u_i as a B-bit two's-complement
number, u_i = -2^(B-1) u_i[B-1] + sum_{j<B-1} 2^j u_i[j]. Then

    F_x = sum_j 2^j D_x(u[j]) - 2^(B-1) D_x(u[B-1]),   D_x(a) = sum_{i: a[i]=1} C(i,x)

where u[j] is the 4-bit word made of bit j of u_0..u_3. D_x has only 16 possible
values, so it is a 16-entry ROM addressed by that bit-plane.

**Hardware.** A transform uses

* 8 input registers (f_0..f_7) and the butterfly adders forming u_i, v_i
  (16 bits: B = 16 for 15-bit inputs);
* two `dct_bit_slice` units, one for u and one for v, shifting out one
  bit-plane per clock, **sign plane first**;
* eight `dct_da_rom`, D_0, D_2, D_4, D_6 addressed by the u plane and D_1, D_3,
  D_5, D_7 by the v plane;
* eight `dct_shift_acc`: in the sign cycle acc = -D, then acc = 2 acc + D for
  each lower plane. After 16 planes acc is exactly sum C(i,x) u_i in the ROM's
  fixed point; no precision is lost inside the accumulator (31 bits).

**ROM format.** A ROM word is signed 4.11 fixed point, 15 bits. As in the
article's ROM listing, a word holds **twice** the coefficient sum: ROM 0 reads
0x0000, 0x05a8 (0.707107 = 2A), 0x0b50, 0x10f8, 0x16a0 for 0..4 set address
bits. Each coefficient is rounded to 11 fraction bits on its own before summing,
which reproduces that listing exactly. The contents are computed at elaboration
(`dct_pkg::rom_entry`) from the sign pattern of the coefficient table and the
seven rounded magnitudes round(2 K 2^11) = 1448, 2009, 1703, 1138, 400, 1892,
784 for A..G. Address bit i carries u_i (or v_i).

**Output scaling.** The accumulator thus carries 12 fraction bits relative to the
true F_x. The final buffer of each shift-accumulator stores
round(acc / 2^out_shift), saturated to signed 15 bits; `out_shift` is an input so
that one unit can serve both passes of the 2D transform. `out_shift = 12`
gives integer F_x.

**Timing.** `start` (while `busy` is low) registers the inputs; the next cycle
loads the bit-slices; 16 cycles accumulate; one cycle drains the ROM data
register; one cycle loads the final buffers. `done` pulses **20 cycles after
the start cycle**, with all eight outputs valid and held until the next
result. A new transform can start the cycle after `done` (21 cycles per
transform). The unit is not pipelined across transforms.

## The 2D transform (`dct2d`)

The 2D DCT F(x,y) = c(x)c(y)/4 sum_i sum_j f(i,j) cos((2i+1)x pi/16)
cos((2j+1)y pi/16) is separable. `dct2d` runs it as:

1. **Row pass**: each pixel row i (one valid/ready transfer of 8 pixels) goes
   through `dct1d`; the 8 results are written into row i of the transposition
   RAM.
2. **Column pass**: each RAM column is read, transformed by the same `dct1d`
   and written back into the same column.
3. **Readout**: the RAM is read row by row. Output row x holds F(x, 0..7):
   x is the vertical frequency, the index within the row the horizontal one.

One `dct1d` is time-shared between the passes. Pixels are 8-bit unsigned and are
transformed as they are, without a -128 level shift, so F(0,0) ranges up to
2040. Between the passes the RAM keeps `MID_FRAC` = 3 fraction bits (row
results up to 721 fit in the 15-bit word with 3 fraction bits); the column pass
rounds to integers. Against the exact real-valued 2D DCT the output is within
one unit: the full 1024-block test measures a maximum error of exactly 1.

**Timing** without stalls: a row or column takes 21 cycles, so the first
output row is valid 336 cycles after the first input row is accepted, and a
block occupies the unit for 344 cycles (8 output rows). `in_ready` is high only
while the unit waits for the next pixel row; the next block's first row is
accepted after the last output row has been taken. Output rows are held while
`out_ready` is low.

`dct_transpose_ram` is an 8x8 array of 15-bit words with whole-row or
whole-column writes and combinational whole-row or whole-column reads
(register-file style), so a word written at an edge can be read in the next
cycle.

## The inverse transform (`idct1d`, `idct2d`)

f_i = sum_x C(i,x) F_x splits the other way round: an even part
e_i = sum_k C(i,2k) F_2k and an odd part o_i = sum_k C(i,2k+1) F_2k+1, with
f_i = e_i + o_i and f_(7-i) = e_i - o_i. `idct1d` therefore bit-slices the even
inputs (F_0, F_2, F_4, F_6) and the odd inputs (F_1, F_3, F_5, F_7) directly,
uses eight `idct_da_rom` tables (e_0..e_3, o_0..o_3, same doubled 4.11 format),
accumulates in the same `dct_shift_acc` units, and applies the butterfly to the
exact accumulator values before one rounding. Interface and 20-cycle latency
equal `dct1d`. `idct2d` is `dct2d` with the inverse unit: coefficient rows in,
pixel rows out, clamped to 0..255.

## Codec stages

* `quantizer`: q = sign(F) floor((|F| + Q/2) / Q) with Q from an 8x8 table,
  one coefficient row per cycle, one register stage. The table resets to the
  example luminance table of the JPEG standard and can be rewritten entry by
  entry (`tbl_we`, `tbl_addr` = 8 row + column, `tbl_data`; a 0 is used as 1).
* `dequantizer`: F' = q Q saturated to 15 bits, same table and interface.
* `zigzag_reorder`: collects the 8 rows of a block, then emits the 64 values in
  zig-zag order (DC, then along the anti-diagonals), one per transfer, with the
  scan position and a `last` flag. Single buffer: fill (8 cycles) then drain (64).
* `inverse_reorder`: the reverse, 64 values in, 8 rows out.
* `entropy_encoder`: codes each block's 64 zig-zag values as a serial bit
  stream, in the manner of baseline JPEG:
  * The DC value is sent as the Huffman code of its size category s (the bit
    length of |v|), followed by s amplitude bits.
  * A run of zeros followed by a non-zero AC value becomes one symbol
    {run, size}, sent as its code plus the amplitude bits.
  * Runs of 16 or more zeros first send ZRL codes (16 zeros each).
  * Trailing zeros become one EOB code.
  * Amplitude bits are the low s bits of v, or of v - 1 when v is negative.

  The code tables are the example luminance tables of the JPEG standard. They
  are stored in `dct_pkg` as counts per code length plus a symbol list, from
  which the canonical codes are computed at elaboration. Each accepted value
  becomes one token of at most 60 bits (up to three ZRLs, code, amplitude) in
  a shift register that is sent one bit per cycle. The DC value is coded
  directly, not as a difference from the previous block. Values beyond the
  table range are clamped: DC to +-2047, AC to +-1023. Only a quantiser step
  of 1 reaches them.
* `entropy_decoder`: reads that stream one bit per cycle. Because the codes are
  canonical, the bits read so far form a complete code of length L exactly
  when they lie in [FIRST[L], FIRST[L] + count[L]). The symbol is then found
  by an index, with no search. The decoder then reads the amplitude bits and
  emits the zeros and the value, one per cycle.
* `adder_subtractor`: per pixel row, residual = current - predicted (signed 9
  bits) or rebuilt = clamp(residual + predicted). It belongs to a predictive
  video coder whose prediction (motion) module is not part of this RTL.

## Top level (`image_codec`)

    pixels --> dct2d --> quantizer --> zigzag_reorder --> entropy_encoder --> enc_out_* (bits)
    dec_in_* (bits) --> entropy_decoder --> inverse_reorder --> dequantizer --> idct2d --> pixels
    vid_* --> adder_subtractor --> vid_y

| port group | meaning |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset |
| `tbl_we/tbl_addr/tbl_data` | quantisation table write, shared by both quantisers |
| `enc_in_valid/ready/pix[8]` | pixel rows 0..7 of each 8x8 block |
| `enc_out_valid/ready/bit` | coded bit stream, first bit of each code first |
| `enc_block_done` | the forward DCT finished a block |
| `dec_in_valid/ready/bit` | coded bit stream |
| `dec_out_valid/ready/row/pix[8]` | decoded pixel rows |
| `dec_block_done` | the inverse DCT finished a block |
| `vid_valid/mode_add/a[8]/pred[8]`, `vid_out_valid/vid_y[8]` | adder/subtractor |

All streams are valid/ready; a transfer happens on a clock edge with both high.
The 2D transforms take 344 cycles per 8x8 block, and the quantiser and
reorder stages run in their shadow. The entropy coders move one bit per cycle
plus about one cycle per coefficient. They become the slower stage for a block
whose code is longer than about 280 bits, as in busy blocks with small
quantiser steps. A 256x256 image (1024 blocks) needs at least 352,000 cycles
per direction. The test image codes to about 241,000 bits (3.7 bit/pixel) with
the default table. It runs through in about 519,000 cycles under random
stalls.

Connect `enc_out_*` to `dec_in_*`, directly or through a FIFO, for a complete
coding loop, as the top-level testbench does.

## Where this design makes its own choices

The article fixes the forward DA structure, the coefficient table, the 4.11
15-bit ROM format with the doubled ROM 0 contents, the 15-bit 1D ports and the
two-pass RAM organisation. The following are this design's choices:

* signed two's-complement 1D inputs and outputs (the article declares its ports
  as unsigned 15-bit, while its equations treat u_i and v_i as two's complement);
* most-significant-plane-first accumulation, B = 16, and the 20-cycle sequencing;
* the rounding and saturation in the shift-accumulator output buffer and the
  run-time `out_shift`;
* one shared 1D unit for both passes (the article's text can be read as one
  unit used twice or as two units), 3 fraction bits between passes, 15-bit RAM
  words (the article leaves the RAM width to the area budget), no level shift;
* valid/ready interfaces, FSMs and all widths not listed above;
* everything inside the inverse DCT, quantisers, reorder stages, entropy
  coders and the adder/subtractor. This includes the default quantisation
  table, the zig-zag order and the Huffman coding scheme and tables, all taken
  from JPEG practice. The entropy coders also depart from JPEG where that is
  simpler: DC is not differenced, out-of-range values are clamped, and the
  stream has no byte packing or markers.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Expected values are computed inside the testbench from the cosine definition,
not from the RTL's tables:

* `tb_dct_da_rom`, `tb_idct_da_rom`: every ROM word; ROM 0 also against its
  published word list.
* `tb_dct_bit_slice`, `tb_dct_shift_acc`, `tb_dct_transpose_ram`: bit-plane
  order, exact accumulation with rounding and both saturation limits, row and
  column access.
* `tb_dct1d`, `tb_idct1d`: bit-exact results for random full-range inputs,
  |error| <= 1 against the real-valued transform for pixel-range inputs, the
  20-cycle latency, saturation.
* `tb_dct2d`: a full 256x256 image, bit-exact and within 2 of the real 2D DCT,
  first-block timing (336 / 344 cycles), random input gaps and output
  back-pressure.
* `tb_idct2d`, `tb_quantizer`, `tb_dequantizer`, `tb_zigzag_reorder`,
  `tb_inverse_reorder`, `tb_adder_subtractor`: the same style for each stage.
* `tb_entropy_encoder`, `tb_entropy_decoder`:
  * Each testbench builds the canonical codes from the tables itself and checks
    known JPEG codewords (EOB = 1010, ZRL = 11111111001).
  * It codes random blocks with its own model, then compares every output bit
    or every decoded value.
  * The blocks cover ZRL, EOB, blocks that end on a non-zero value, negative
    values and clamping.
* `tb_image_codec`: the whole top level at default parameters on a full
  256x256 test image with stalls on every interface, the encoder looped back
  into the decoder, a quantisation table rewrite halfway, and bit-exact checks
  of every coded bit and every decoded pixel (about 2.5 million checks, about
  10 s of simulation). It also reports the reconstruction PSNR (about 30 dB
  for its synthetic image with the default table).

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
      --top-module tb_image_codec rtl/dct_pkg.sv tb/tb_image_codec.sv
    ./obj_dir/Vtb_image_codec

Replace `tb_image_codec` by any other testbench name. The RTL is plain
synthesizable SystemVerilog-2017; the ROM contents and the zig-zag table are
computed by constant functions in `dct_pkg`.

## Changing the design

* `PIX_W` and `MID_FRAC` on `dct2d`/`idct2d`/`image_codec` set the pixel width
  and the fraction bits kept between passes; `dct2d` asserts that pixel width
  plus fraction bits still fit the 15-bit intermediate word.
* `WORD_W`, `ROM_W` and `BITS` in `dct_pkg` set the 1D word, ROM word and number
  of bit-planes; the accumulator width follows. Latency grows by one cycle per
  extra bit-plane.
* The Huffman tables are `DC_BITS`/`DC_VALS` and `AC_BITS`/`AC_VALS` in
  `dct_pkg` (code counts per length 1..16, then the symbols). Any other
  table pair in that form works: both coders derive their codes from it.
  `DC_NSYM`/`AC_NSYM` must then give the symbol counts, and `DC_MAX_SIZE`/
  `AC_MAX_SIZE` the largest size category each table holds.
* For higher throughput the natural next step is a second `dct1d` (one per
  pass) with double-buffered transposition RAMs, so that row and column passes
  of consecutive blocks overlap.
