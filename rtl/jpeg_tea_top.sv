// jpeg_tea_top: JPEG compression with TEA encryption of selected DCT
// coefficients, for one 8-bit grey-scale image.
//
// Pixel stream -> 2-D DCT -> quantizer -> zigzag reorder -> coefficient
// encryption (TEA, method selected by `mode`) -> DC difference coding /
// zero run length coding -> Huffman coding -> bit packing -> byte stream.
// Encryption sits after the zigzag scan and before the entropy coder, so the
// encrypted coefficients are compressed together with the others and the
// output is an ordinary JPEG entropy-coded segment whose lowest-frequency
// coefficients are scrambled.
//
// Pixels must be delivered block by block: the 64 pixels of an 8x8 block in
// row-major order, blocks in raster order over the image; IMG_W x IMG_H
// pixels (multiples of 8) make one image. The pipeline accepts one pixel per
// clock without stalling and never back-pressures. After the last block of
// an image the packer pads the final byte and `done` pulses; the DC
// predictor restarts for the next image.
//
// Interface: pix_valid/pix; key (128-bit TEA key) and mode, to be held stable
//            during an image; out_valid/out_count/out_bytes (up to 10 bytes
//            per clock, out_bytes[0] first); done.
// Timing:    about 4 x 64 + 30 clocks from a block's first pixel to its
//            bytes; throughput one pixel per clock.
// The chain of stages and the 288x288 image size follow the source; the
// block-ordered pixel input, the output bus and the absence of JPEG
// headers are this design's choices.
module jpeg_tea_top
  import jpeg_tea_pkg::*;
#(
  parameter int unsigned IMG_W = 288,
  parameter int unsigned IMG_H = 288
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pix_valid,
  input  logic [7:0]      pix,
  input  logic [127:0]    key,
  input  enc_mode_e       mode,
  output logic            out_valid,
  output logic [3:0]      out_count,
  output logic [9:0][7:0] out_bytes,
  output logic            done
);

  localparam int unsigned NBLK = (IMG_W / 8) * (IMG_H / 8);
  localparam int unsigned BW   = (NBLK > 1) ? $clog2(NBLK) : 1;

  logic        dct_valid, q_valid, zz_valid, enc_valid, dd_valid, zr_valid, hc_valid;
  idx_t        dct_idx, q_idx, zz_idx, enc_idx, dd_idx;
  coef_t       dct_data, q_data, zz_data, enc_data, dd_data;
  idx_t        enc_lnz, dd_lnz;
  logic        enc_last, dd_last, zr_last, hc_last;
  sym_t        zr_sym;
  logic [26:0] hc_bits;
  logic [4:0]  hc_len;
  logic [BW-1:0] blk_cnt;

  dct_2d u_dct (
    .clk, .rst_n, .pix_valid, .pix,
    .out_valid(dct_valid), .out_idx(dct_idx), .out_data(dct_data));

  quantizer u_quant (
    .clk, .rst_n, .in_valid(dct_valid), .in_data(dct_data),
    .out_valid(q_valid), .out_idx(q_idx), .out_data(q_data));

  zigzag_reorder u_zz (
    .clk, .rst_n, .in_valid(q_valid), .in_data(q_data),
    .out_valid(zz_valid), .out_idx(zz_idx), .out_data(zz_data));

  coef_encrypt u_enc (
    .clk, .rst_n, .mode, .key,
    .in_valid(zz_valid), .in_idx(zz_idx), .in_data(zz_data),
    .out_valid(enc_valid), .out_idx(enc_idx), .out_data(enc_data),
    .out_last_nz(enc_lnz));

  // block counter marks the last coefficient of the image
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) blk_cnt <= '0;
    else if (enc_valid && enc_idx == 6'd63)
      blk_cnt <= (blk_cnt == BW'(NBLK - 1)) ? '0 : blk_cnt + 1'b1;
  end
  assign enc_last = (enc_idx == 6'd63) && (blk_cnt == BW'(NBLK - 1));

  dc_diff_encoder u_dc (
    .clk, .rst_n, .in_valid(enc_valid), .in_idx(enc_idx), .in_data(enc_data),
    .in_last_nz(enc_lnz), .in_last(enc_last),
    .out_valid(dd_valid), .out_idx(dd_idx), .out_data(dd_data),
    .out_last_nz(dd_lnz), .out_last(dd_last));

  zrl_encoder u_zrl (
    .clk, .rst_n, .in_valid(dd_valid), .in_idx(dd_idx), .in_data(dd_data),
    .in_last_nz(dd_lnz), .in_last(dd_last),
    .out_valid(zr_valid), .out_sym(zr_sym), .out_last(zr_last));

  huffman_coder u_huff (
    .clk, .rst_n, .in_valid(zr_valid), .in_sym(zr_sym), .in_last(zr_last),
    .out_valid(hc_valid), .out_bits(hc_bits), .out_len(hc_len), .out_last(hc_last));

  bit_packer u_pack (
    .clk, .rst_n, .in_valid(hc_valid), .in_bits(hc_bits), .in_len(hc_len),
    .in_last(hc_last), .out_valid, .out_count, .out_bytes, .done);

  logic unused;
  assign unused = ^{dct_idx, q_idx};

endmodule
