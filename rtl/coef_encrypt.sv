// coef_encrypt: TEA encryption of the lowest-frequency coefficients of each
// zigzag-ordered 8x8 block.
//
// The first six coefficients of a block in zigzag order (DC and AC1..AC5,
// 12 bits each, DC in the most significant field) form one 72-bit TEA block.
// The TEA core is started as soon as AC5 has arrived, and runs while the rest
// of the block is stored in a dual RAM. When the block is read back, the
// coefficients selected by the method are replaced by their cipher fields:
//   ENC_OFF    nothing is replaced (plain JPEG);
//   ENC_DC     method 1: only the DC coefficient;
//   ENC_DC_AC  method 2: DC and AC1..AC5.
// A cipher field replaces a coefficient as the signed value of its low 11
// bits, so encrypted values stay within the size categories of the baseline
// Huffman tables (|v| <= 1024). Encrypting after the zigzag scan, the two
// methods, the DC + five AC selection and the 72-bit TEA block follow the
// source; packing six 12-bit coefficients into the 72-bit block, encrypting
// the same six-coefficient block in both methods and the 11-bit fold are
// this design's reading. The unit also reports, with every block, the zigzag
// index of the last non-zero AC coefficient after encryption (0 if there is
// none), which the run length coder needs to place ZRL and EOB symbols
// without look-ahead.
//
// Interface: in_valid/in_idx/in_data, zigzag order, 64 words per block;
//            mode and key sampled when a block's first six words are in;
//            out_valid/out_idx/out_data/out_last_nz.
// Timing:    output of a block starts one clock after the edge that takes its
//            last input word and lasts 64 consecutive clocks; TEA needs 32 clocks and always ends
//            before the block is complete (AC5 arrives >= 58 clocks earlier).
module coef_encrypt
  import jpeg_tea_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  enc_mode_e     mode,
  input  logic [127:0]  key,
  input  logic          in_valid,
  input  idx_t          in_idx,
  input  coef_t         in_data,
  output logic          out_valid,
  output idx_t          out_idx,
  output coef_t         out_data,
  output idx_t          out_last_nz
);

  coef_t         pt_f [NENC];     // plaintext fields being collected
  logic [71:0]   pt_word, ct;
  logic          tea_start, tea_busy, tea_done;
  idx_t          tail_nz, tail_nz_n;
  enc_mode_e     blk_mode;        // mode of the block being collected

  // values for the block being read out
  coef_t         hold_f [NENC];
  idx_t          hold_lnz, blk_lnz, cur_lnz;
  coef_t         new_f  [NENC];
  idx_t          new_lnz;

  logic          ram_valid;
  idx_t          ram_idx;
  logic [CW-1:0] ram_data;
  logic          last_in;

  // ---------------------------------------------------------- write side
  always_comb begin
    for (int i = 0; i < int'(NENC); i++)
      pt_word[71 - 12*i -: 12] = (in_valid && in_idx == idx_t'(i)) ? in_data : pt_f[i];
  end

  assign tea_start = in_valid && in_idx == idx_t'(NENC - 1);
  assign last_in   = in_valid && in_idx == 6'd63;

  always_comb begin
    tail_nz_n = (in_valid && in_idx == 6'd0) ? 6'd0 : tail_nz;
    if (in_valid && in_idx >= idx_t'(NENC) && in_data != '0) tail_nz_n = in_idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NENC); i++) pt_f[i] <= '0;
      tail_nz  <= '0;
      blk_mode <= ENC_OFF;
    end else begin
      if (in_valid && in_idx < idx_t'(NENC)) pt_f[in_idx[2:0]] <= in_data;
      tail_nz <= tail_nz_n;
      if (tea_start) blk_mode <= mode;
    end
  end

  tea_core #(.ROUNDS(64)) u_tea (
    .clk, .rst_n, .start(tea_start), .pt(pt_word), .key,
    .busy(tea_busy), .done(tea_done), .ct);

  // fields and last non-zero index of the block, fixed when it is complete
  always_comb begin
    for (int i = 0; i < int'(NENC); i++) begin
      if ((blk_mode == ENC_DC_AC) || (blk_mode == ENC_DC && i == 0))
        new_f[i] = coef_t'($signed(ct[71 - 12*i - 1 -: 11]));
      else
        new_f[i] = pt_f[i];
    end
    new_lnz = tail_nz_n;
    if (tail_nz_n == '0)
      for (int i = 1; i < int'(NENC); i++)
        if (new_f[i] != '0) new_lnz = idx_t'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NENC); i++) hold_f[i] <= '0;
      hold_lnz <= '0;
      blk_lnz  <= '0;
    end else begin
      if (last_in) begin
        hold_f   <= new_f;
        hold_lnz <= new_lnz;
      end
      blk_lnz <= cur_lnz;
    end
  end

  // ----------------------------------------------------------- read side
  dual_ram #(.N(64), .W(CW), .ORDER(0)) u_buf (
    .clk, .rst_n, .in_valid, .in_data(in_data),
    .out_valid(ram_valid), .out_idx(ram_idx), .out_data(ram_data));

  assign cur_lnz = (ram_valid && ram_idx == '0) ? hold_lnz : blk_lnz;

  always_comb begin
    out_valid   = ram_valid;
    out_idx     = ram_idx;
    out_last_nz = cur_lnz;
    out_data    = (ram_idx < idx_t'(NENC)) ? hold_f[ram_idx[2:0]] : coef_t'(ram_data);
  end

  a_tea_ready: assert property (@(posedge clk) disable iff (!rst_n)
    last_in |-> !tea_busy);

  logic unused;
  assign unused = tea_done;

endmodule
