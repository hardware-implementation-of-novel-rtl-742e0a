// tea_core: Tiny Encryption Algorithm widened to a 72-bit block.
//
// The block is split into two 36-bit halves v0 (upper) and v1 (lower); the
// 128-bit key into four 32-bit words K[0] (key[127:96]) .. K[3] (key[31:0]).
// Each TEA cycle performs two Feistel rounds:
//   sum += DELTA
//   v0  += ((v1 << 4) + K[0]) ^ (v1 + sum) ^ ((v1 >> 5) + K[1])
//   v1  += ((v0 << 4) + K[2]) ^ (v0 + sum) ^ ((v0 >> 5) + K[3])
// with all arithmetic modulo 2^36 and logical shifts. ROUNDS Feistel rounds
// (64, i.e. 32 cycles) make one encryption. DELTA = 9E3779B9h, derived from
// the golden ratio. The round function, the 64 rounds, the 72-bit block with
// 36-bit halves and the 128-bit key follow the source; zero-extending the
// 32-bit key words and DELTA to 36 bits is this design's reading of how the
// widened halves use them. The unit performs one TEA cycle (two Feistel
// rounds) per clock.
//
// Interface: start (one-cycle pulse, ignored while busy) with pt and key;
//            busy while iterating; done pulses when ct is valid; ct then holds
//            until the next start.
// Timing:    done is high ROUNDS/2 clocks after the edge that takes start.
module tea_core #(
  parameter int unsigned      ROUNDS = 64,
  parameter logic [31:0]      DELTA  = 32'h9E37_79B9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [71:0]   pt,
  input  logic [127:0]  key,
  output logic          busy,
  output logic          done,
  output logic [71:0]   ct
);

  localparam int unsigned CYCLES = ROUNDS / 2;

  logic [35:0] v0, v1, sum;
  logic [35:0] k0, k1, k2, k3;
  logic [35:0] sum_n, v0_n, v1_n;
  logic [$clog2(CYCLES+1)-1:0] cnt;

  assign k0 = {4'd0, key[127:96]};
  assign k1 = {4'd0, key[95:64]};
  assign k2 = {4'd0, key[63:32]};
  assign k3 = {4'd0, key[31:0]};

  always_comb begin
    sum_n = sum + {4'd0, DELTA};
    v0_n  = v0 + (((v1 << 4) + k0) ^ (v1 + sum_n) ^ ((v1 >> 5) + k1));
    v1_n  = v1 + (((v0_n << 4) + k2) ^ (v0_n + sum_n) ^ ((v0_n >> 5) + k3));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0   <= '0;
      v1   <= '0;
      sum  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        v0   <= pt[71:36];
        v1   <= pt[35:0];
        sum  <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        v0  <= v0_n;
        v1  <= v1_n;
        sum <= sum_n;
        cnt <= cnt + 1'b1;
        if (cnt == ($bits(cnt))'(CYCLES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ct = {v0, v1};

endmodule
