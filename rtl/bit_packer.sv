// bit_packer: packs the variable-length codes into the output byte stream.
//
// Each clock it appends the out_len bits of one coded word (MSB first) to
// the fewer than eight bits left over from earlier words and emits every
// byte that is complete. A byte FFh is followed by a stuffed 00h byte, as a
// JPEG entropy-coded segment requires. With the word marked in_last, the
// leftover bits are padded with ones to a byte boundary and emitted in the
// same clock, and done pulses. Per clock at most 27 + 7 bits are pending,
// i.e. 5 bytes after padding and 10 after stuffing, so the output is a
// 10-byte wide bus with a count (out_bytes[0] first). The source names a
// packaging stage; stuffing and padding are the JPEG rules and the wide
// output bus is this design's way of never stalling the pipeline.
// JPEG file headers (markers, tables) are not produced.
//
// Interface: in_valid/in_bits/in_len/in_last;
//            out_valid/out_count/out_bytes, done.
// Timing:    one clock of latency.
module bit_packer (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [26:0]     in_bits,
  input  logic [4:0]      in_len,
  input  logic            in_last,
  output logic            out_valid,
  output logic [3:0]      out_count,
  output logic [9:0][7:0] out_bytes,
  output logic            done
);

  logic [7:0]      rem;       // leftover bits, left-aligned
  logic [2:0]      fill;      // number of leftover bits
  logic [39:0]     tmp;
  logic [5:0]      total;
  logic [2:0]      nfull;
  logic [9:0][7:0] bytes_n;
  logic [3:0]      cnt_n;
  logic [7:0]      b;
  logic [7:0]      rem_n;
  logic [2:0]      fill_n;

  always_comb begin
    total   = 6'(fill) + 6'(in_len);
    tmp     = {rem, 32'd0} | ((40'(in_bits)) << (6'd40 - total));
    nfull   = 3'(total >> 3);
    fill_n  = total[2:0];
    rem_n   = tmp[39 - 8*nfull -: 8] & ~(8'hFF >> fill_n);
    if (in_last && fill_n != 3'd0) begin
      // pad the partial byte with ones and emit it too
      tmp[39 - 8*nfull -: 8] = rem_n | (8'hFF >> fill_n);
      nfull  = nfull + 1'b1;
      rem_n  = '0;
      fill_n = '0;
    end else if (in_last) begin
      rem_n = '0;
    end
    bytes_n = '0;
    b       = '0;
    cnt_n   = '0;
    for (int i = 0; i < 5; i++) begin
      if (3'(i) < nfull) begin
        b = tmp[39 - 8*i -: 8];
        bytes_n[cnt_n] = b;
        cnt_n = cnt_n + 1'b1;
        if (b == 8'hFF) begin
          bytes_n[cnt_n] = 8'h00;
          cnt_n = cnt_n + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem       <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_count <= '0;
      out_bytes <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= in_valid && cnt_n != '0;
      done      <= in_valid && in_last;
      if (in_valid) begin
        rem       <= rem_n;
        fill      <= fill_n;
        out_count <= cnt_n;
        out_bytes <= bytes_n;
      end else begin
        out_count <= '0;
      end
    end
  end

endmodule
