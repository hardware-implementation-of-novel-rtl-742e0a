// dct_2d: two-dimensional 8x8 DCT, Z = C X C^T, on a serial pixel stream.
//
// Pixels of one 8x8 block arrive row by row (64 words, row-major), one per
// clock at most. They are level-shifted (p - 128) and passed through
//   ping-pong buffer -> 1-D DCT (rows, X C^T) -> dual RAM, read transposed
//   -> ping-pong buffer -> 1-D DCT (columns, C (X C^T)) -> dual RAM, read
//   transposed,
// so the output is the 64 coefficients Z[u][v] of the block in row-major
// order (u = vertical, v = horizontal frequency), with out_idx = 8u + v.
// The split into a row pass and a column pass, the ping-pong buffers and the
// dual RAMs between the passes follow the source. The level shift by 128 and
// the 12-bit intermediate words, rounded to integers after each pass, are
// this design's choices; the row-pass results are bounded by 128*sqrt(8)
// and the final coefficients by 1024, so 12 bits never overflow.
//
// Interface: pix_valid/pix (8-bit unsigned); out_valid/out_idx/out_data
//            (signed 12-bit, 64 consecutive clocks per block).
// Timing:    a block leaves the unit about 2 x 64 + 20 clocks after its
//            first pixel enters when pixels arrive every clock; the unit
//            accepts a new pixel on every clock.
module dct_2d
  import jpeg_tea_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_valid,
  input  logic [7:0]  pix,
  output logic        out_valid,
  output idx_t        out_idx,
  output coef_t       out_data
);

  coef_t       shifted;
  logic        pp1_valid, pp2_valid;
  coef_t       pp1_data [8];
  coef_t       pp2_data [8];
  logic        row_valid, col_valid;
  logic [2:0]  row_idx, col_idx;
  coef_t       row_data, col_data;
  logic        tr_valid;
  idx_t        tr_idx;
  logic [CW-1:0] tr_data, out_raw;

  assign shifted = coef_t'({1'b0, pix}) - coef_t'(128);

  pingpong_buffer #(.N(8), .W(CW)) u_pp_row (
    .clk, .rst_n, .in_valid(pix_valid), .in_data(shifted),
    .out_valid(pp1_valid), .out_data(pp1_data));

  dct_1d #(.W(CW)) u_dct_row (
    .clk, .rst_n, .in_valid(pp1_valid), .in_data(pp1_data),
    .out_valid(row_valid), .out_idx(row_idx), .out_data(row_data));

  // row results written row-major, read column by column
  dual_ram #(.N(64), .W(CW), .ORDER(1)) u_ram_row (
    .clk, .rst_n, .in_valid(row_valid), .in_data(row_data),
    .out_valid(tr_valid), .out_idx(tr_idx), .out_data(tr_data));

  pingpong_buffer #(.N(8), .W(CW)) u_pp_col (
    .clk, .rst_n, .in_valid(tr_valid), .in_data(coef_t'(tr_data)),
    .out_valid(pp2_valid), .out_data(pp2_data));

  dct_1d #(.W(CW)) u_dct_col (
    .clk, .rst_n, .in_valid(pp2_valid), .in_data(pp2_data),
    .out_valid(col_valid), .out_idx(col_idx), .out_data(col_data));

  // column results arrive column by column, read back row-major
  dual_ram #(.N(64), .W(CW), .ORDER(1)) u_ram_col (
    .clk, .rst_n, .in_valid(col_valid), .in_data(col_data),
    .out_valid(out_valid), .out_idx(out_idx), .out_data(out_raw));

  assign out_data = coef_t'(out_raw);

  // the index outputs of the inner stages are implied by the stream order
  logic unused;
  assign unused = ^{row_idx, col_idx, tr_idx};

endmodule
