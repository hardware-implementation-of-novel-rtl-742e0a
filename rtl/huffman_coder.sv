// huffman_coder: Huffman coding of DC and AC symbols with the JPEG standard
// luminance tables.
//
// DC symbol: size category s of the DC difference; code = DC table[s].
// AC symbol: code = AC table[(run << 4) | s]. ZRL uses symbol F0h, EOB 00h.
// After the code come s amplitude bits: the value itself when it is
// positive, value - 1 (its one's complement) when negative, low s bits.
// The output is one right-aligned bit string per word, {code, amplitude},
// of out_len bits (0 to 27; 16-bit code + 11 amplitude bits at most). The two
// code tables are built from the BITS/HUFFVAL lists of the standard when the
// design is elaborated. Huffman coding with a DC and an AC table follows the
// source; the tables themselves are the JPEG defaults (Annex K.3).
//
// Interface: in_valid/in_sym/in_last; out_valid/out_bits/out_len/out_last.
// Timing:    one clock of latency, one symbol per clock.
module huffman_coder
  import jpeg_tea_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sym_t        in_sym,
  input  logic        in_last,
  output logic        out_valid,
  output logic [26:0] out_bits,
  output logic [4:0]  out_len,
  output logic        out_last
);

  localparam hufftab_t DC_TAB = huff_table(1'b0);
  localparam hufftab_t AC_TAB = huff_table(1'b1);

  logic [3:0]    s;
  logic [20:0]   ent;
  logic [CW-1:0] amp;
  logic [15:0]   code;
  logic [4:0]    clen;
  logic [26:0]   bits;
  logic [4:0]    len;

  always_comb begin
    s    = size_cat({in_sym.value[CW-1], in_sym.value});
    ent  = '0;
    case (in_sym.kind)
      SYM_DC:  ent = DC_TAB[{4'd0, s}];
      SYM_AC:  ent = AC_TAB[{in_sym.run, s}];
      SYM_ZRL: ent = AC_TAB[8'hF0];
      SYM_EOB: ent = AC_TAB[8'h00];
      default: ent = '0;
    endcase
    code = ent[15:0];
    clen = ent[20:16];
    amp  = in_sym.value[CW-1] ? in_sym.value - 1'b1 : in_sym.value;
    amp  = amp & ((CW)'((1 << s) - 1));
    if (in_sym.kind == SYM_DC || in_sym.kind == SYM_AC) begin
      bits = (27'(code) << s) | 27'(amp);
      len  = clen + 5'(s);
    end else begin
      bits = 27'(code);
      len  = clen;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
      out_len   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        out_bits <= bits;
        out_len  <= len;
      end
    end
  end

endmodule
