// dual_ram: two alternating RAM banks for block-wise reordering.
//
// Words arrive on the write side one per clock at most and are written to
// consecutive addresses 0..N-1 of the current write bank. When the N-th word
// of a block has been written, the banks change roles: the full bank is read
// out, one word per clock for N consecutive clocks, while the other bank
// takes the next block. The read address of the i-th output word is
// perm(i), set by ORDER: LINEAR (i), TRANSPOSE (8x8 transpose, i.e. the row
// and column fields of i swapped) or ZIGZAG (raster position of the i-th
// zigzag coefficient). The two banks, the muxed write and read addresses and
// the output select follow the dual-RAM structure of the source; the
// selectable read order is this design's way of using one structure for
// the DCT transposes and for the zigzag scan.
//
// Interface: in_valid/in_data; out_valid/out_idx/out_data, out_idx = i.
// Timing:    the first word of a block is on the outputs one clock after the
//            edge that writes its last word; a block of N words is read in N
//            consecutive clocks, which is never slower than the write side.
module dual_ram #(
  parameter int unsigned N     = 64,
  parameter int unsigned W     = 12,
  parameter int unsigned ORDER = 0      // 0 linear, 1 transpose, 2 zigzag
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [W-1:0]           in_data,
  output logic                   out_valid,
  output logic [$clog2(N)-1:0]   out_idx,
  output logic [W-1:0]           out_data
);

  localparam int unsigned AW = $clog2(N);

  logic [W-1:0]  ram0 [N];
  logic [W-1:0]  ram1 [N];
  logic          wsel;          // bank being written; the other one is read
  logic [AW-1:0] waddr, rcnt, raddr;
  logic          rd_active;
  logic          last_write;

  localparam jpeg_tea_pkg::zztab_t ZZ = jpeg_tea_pkg::zigzag_table();

  function automatic logic [AW-1:0] perm(input logic [AW-1:0] i);
    case (ORDER)
      1:       return {i[AW/2-1:0], i[AW-1:AW/2]};
      2:       return AW'(ZZ[6'(i)]);
      default: return i;
    endcase
  endfunction

  assign last_write = in_valid && (waddr == AW'(N - 1));
  assign raddr      = perm(rcnt);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (!wsel) ram0[waddr] <= in_data;
      else       ram1[waddr] <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel      <= 1'b0;
      waddr     <= '0;
      rcnt      <= '0;
      rd_active <= 1'b0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
    end else begin
      if (in_valid) waddr <= last_write ? '0 : waddr + 1'b1;
      if (last_write) begin
        wsel      <= !wsel;
        rd_active <= 1'b1;
        rcnt      <= '0;
      end else if (rd_active) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == AW'(N - 1)) rd_active <= 1'b0;
      end
      // registered read from the bank that is not being written
      out_valid <= rd_active;
      out_idx   <= rcnt;
      out_data  <= wsel ? ram0[raddr] : ram1[raddr];
    end
  end

  a_read_done_before_swap: assert property (@(posedge clk) disable iff (!rst_n)
    last_write |-> (!rd_active || rcnt == AW'(N - 1)));

endmodule
