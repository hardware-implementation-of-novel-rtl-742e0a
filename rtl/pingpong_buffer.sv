// pingpong_buffer: serial-to-parallel buffer in front of a 1-D DCT.
//
// A chain of N-1 shift registers takes one word per accepted input
// (in_valid). When the N-th word of a group arrives, a bank of N output
// registers is loaded in one clock with the whole group: out[0] holds the
// oldest word of the group and out[N-1] the newest (the word on the input in
// that cycle). out_valid pulses for one clock with the load. While the output
// registers hold a group, the shift chain keeps accepting the next one, so
// the input never waits for the DCT. Structure (N-1 shift registers feeding N
// enabled output registers) follows the ping-pong buffer of the source; the
// group counter that makes the enable and the out_valid pulse are this
// design's own.
//
// Interface: in_valid/in_data (one word per clock at most);
//            out_valid (one-cycle pulse), out_data[N] (held until next load).
// Timing:    out_valid rises the clock after the N-th input of a group.
module pingpong_buffer #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data [N]
);

  logic signed [W-1:0]     shreg [N-1];
  logic [$clog2(N)-1:0]    cnt;
  logic                    enable;

  assign enable = in_valid && (cnt == ($clog2(N))'(N - 1));

  // shift chain: newest word enters shreg[N-2], oldest sits in shreg[0]
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < int'(N) - 2; i++) shreg[i] <= shreg[i+1];
      shreg[N-2] <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= enable;
      if (in_valid) cnt <= enable ? '0 : cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (enable) begin
      for (int i = 0; i < int'(N) - 1; i++) out_data[i] <= shreg[i];
      out_data[N-1] <= in_data;
    end
  end

endmodule
