// quantizer: JPEG quantization by multiplication.
//
// Division by the quantization step Q is replaced by a multiplication with
// R = round(65536 / Q), taken from a 64-entry coefficient ROM, followed by an
// arithmetic shift right by 16 bits. Half an LSB (2^15) is added before the
// shift, so the result is z / Q rounded to nearest (ties up). The ROM is addressed by a counter that
// advances with every incoming DCT coefficient (the DCT_FLAG of the source),
// so coefficients must arrive in row-major order, 64 per block. The
// structure (counter, coefficient RAM, multiplier, >>16) follows the source;
// Q is the JPEG luminance table of Annex K.1; rounding R to nearest and the
// rounding offset before the shift are this design's choice. A bare shift
// would floor, turning every small negative coefficient into -1, which
// roughly triples the compressed size of a typical image.
//
// Interface: in_valid/in_data (signed 12-bit DCT coefficient);
//            out_valid/out_idx/out_data (quantized coefficient, same order).
// Timing:    one clock of latency, one coefficient per clock.
module quantizer
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

  localparam qtab_t   ROM = quant_table();
  idx_t               cnt;
  logic signed [29:0] prod;

  assign prod = 30'(in_data) * $signed({1'b0, ROM[cnt]}) + 30'sd32768;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        cnt      <= cnt + 1'b1;
        out_idx  <= cnt;
        out_data <= coef_t'(prod >>> 16);
      end
    end
  end

endmodule
