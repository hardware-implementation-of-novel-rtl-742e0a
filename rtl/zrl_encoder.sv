// zrl_encoder: zero run length coding of the AC coefficients.
//
// For each word of the zigzag stream it produces at most one symbol:
//   index 0                 -> DC symbol carrying the DC difference;
//   AC, non-zero            -> AC symbol (run of preceding zeros, value);
//   AC, zero, 16th zero of a run that a non-zero coefficient follows
//                           -> ZRL symbol (sixteen zeros), run restarts;
//   first AC after the last non-zero AC (index last_nz + 1)
//                           -> EOB symbol;
//   any other word          -> no symbol.
// Knowing the last non-zero index of the block in advance (in_last_nz, 0 if
// every AC coefficient is zero) lets the coder emit a ZRL only when it is
// needed, with one symbol per word and no stall. The symbol set follows the
// JPEG baseline; the look-ahead through in_last_nz is this design's own.
//
// Interface: in_valid/in_idx/in_data/in_last_nz/in_last;
//            out_valid (every word), out_sym (kind SYM_NONE when no symbol),
//            out_last.
// Timing:    one clock of latency, one word per clock.
module zrl_encoder
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
  output sym_t  out_sym,
  output logic  out_last
);

  logic [3:0] run;
  sym_t       sym;
  logic [3:0] run_n;

  always_comb begin
    sym   = '{kind: SYM_NONE, run: 4'd0, value: '0};
    run_n = run;
    if (in_idx == '0) begin
      sym   = '{kind: SYM_DC, run: 4'd0, value: in_data};
      run_n = '0;
    end else if (in_idx > in_last_nz) begin
      if (in_idx == in_last_nz + 1'b1) sym.kind = SYM_EOB;
      run_n = '0;
    end else if (in_data != '0) begin
      sym   = '{kind: SYM_AC, run: run, value: in_data};
      run_n = '0;
    end else if (run == 4'd15) begin
      sym   = '{kind: SYM_ZRL, run: 4'd15, value: '0};
      run_n = '0;
    end else begin
      run_n = run + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= '0;
      out_valid <= 1'b0;
      out_sym   <= '{kind: SYM_NONE, run: 4'd0, value: '0};
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        run     <= run_n;
        out_sym <= sym;
      end
    end
  end

endmodule
