// dct_1d: 8-point one-dimensional DCT, one output coefficient per clock.
//
// y[k] = sum_n C[k][n] * x[n], with C the JPEG (orthonormal) DCT matrix held
// in fixed point with CFRAC fractional bits (jpeg_tea_pkg::dct_coef). On
// in_valid the eight inputs are latched; during the next eight clocks the
// unit computes y[0] .. y[7], one per clock, with eight constant-coefficient
// multipliers and an adder tree, and rounds the sum to an integer
// (add half, arithmetic shift right by CFRAC). Eight clocks per vector
// matches the ping-pong buffer, which delivers a new vector at most every
// eight input words. The source computes the 1-D DCT as a matrix product; the
// one-output-per-clock schedule and the rounding are this design's choices.
//
// Interface: in_valid + in_data[8] (at least 8 clocks apart);
//            out_valid/out_idx/out_data: eight consecutive clocks per vector,
//            out_idx = k.
// Timing:    y[0] is on the outputs one clock after the edge that takes the
//            vector, y[7] eight clocks after.
// Range:     with |x| <= 2^(W-1)/sqrt(8) the outputs fit W bits; the DCT
//            stages of this pipeline stay within that bound (see dct_2d).
module dct_1d
  import jpeg_tea_pkg::*;
#(
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data [8],
  output logic                out_valid,
  output logic [2:0]          out_idx,
  output logic signed [W-1:0] out_data
);

  localparam int unsigned PW = W + CFRAC + 4;  // product/sum width

  logic signed [W-1:0] x [8];
  logic [2:0]          k;
  logic                busy;
  logic signed [PW-1:0] acc;

  localparam dctmat_t CMAT = dct_matrix();

  always_ff @(posedge clk) begin
    if (in_valid) x <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      k    <= '0;
    end else if (in_valid) begin
      busy <= 1'b1;
      k    <= '0;
    end else if (busy) begin
      k <= k + 1'b1;
      if (k == 3'd7) busy <= 1'b0;
    end
  end

  always_comb begin
    acc = '0;
    for (int n = 0; n < 8; n++)
      acc += PW'(x[n]) * PW'(CMAT[{k, 3'(n)}]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= busy;
      out_idx   <= k;
      out_data  <= W'((acc + PW'(1 << (CFRAC - 1))) >>> CFRAC);
    end
  end

  // a new vector may only arrive once the previous one has been computed
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (!busy || k == 3'd7));

endmodule
