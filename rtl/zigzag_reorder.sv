// zigzag_reorder: puts the 64 quantized coefficients of a block into zigzag
// order (increasing spatial frequency along the anti-diagonals).
//
// A dual RAM stores each block in raster order and reads it back through
// the zigzag address sequence, so one block is written while the previous
// one is read. out_idx is the zigzag index (0 = DC coefficient).
//
// Interface: in_valid/in_data (row-major); out_valid/out_idx/out_data.
// Timing:    the block is read in 64 consecutive clocks, the first word on
//            the outputs one clock after the edge that writes the last one.
module zigzag_reorder
  import jpeg_tea_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t in_data,
  output logic  out_valid,
  output idx_t  out_idx,
  output coef_t out_data
);

  logic [CW-1:0] raw;

  dual_ram #(.N(64), .W(CW), .ORDER(2)) u_ram (
    .clk, .rst_n, .in_valid, .in_data(in_data),
    .out_valid, .out_idx, .out_data(raw));

  assign out_data = coef_t'(raw);

endmodule
