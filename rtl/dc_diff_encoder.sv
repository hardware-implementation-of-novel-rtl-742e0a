// dc_diff_encoder: difference (DPCM) coding of the DC coefficients.
//
// On the coefficient stream in zigzag order, the DC coefficient (index 0) of
// every block is replaced by its difference from the DC coefficient of the
// previous block; AC coefficients pass unchanged. The predictor starts at 0
// and returns to 0 after the word marked in_last (the last word of an image),
// so every image is coded on its own. Difference coding of the DC values
// follows the source; the reset of the predictor per image is the JPEG rule
// this design applies.
//
// Interface: in_valid/in_idx/in_data/in_last_nz/in_last; the same fields out,
//            registered.
// Timing:    one clock of latency, one word per clock.
module dc_diff_encoder
  import jpeg_tea_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  idx_t  in_idx,
  input  coef_t in_data,
  input  idx_t  in_last_nz,
  input  logic  in_last,
  output logic  out_valid,
  output idx_t  out_idx,
  output coef_t out_data,
  output idx_t  out_last_nz,
  output logic  out_last
);

  coef_t pred;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred        <= '0;
      out_valid   <= 1'b0;
      out_idx     <= '0;
      out_data    <= '0;
      out_last_nz <= '0;
      out_last    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        out_idx     <= in_idx;
        out_last_nz <= in_last_nz;
        out_data    <= (in_idx == '0) ? in_data - pred : in_data;
        if (in_last)             pred <= '0;
        else if (in_idx == '0)   pred <= in_data;
      end
    end
  end

endmodule
