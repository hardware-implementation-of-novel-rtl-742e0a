// tb_dct_1d: drives random 8-word vectors into the 1-D DCT, back to back
// (every 8 clocks) and with gaps, and compares y[0..7] with a DCT computed
// from floating-point cosines rounded to the same fixed point. Checks the
// output order (out_idx) and the latency: y[0] is on the outputs one clock
// after the edge that takes the vector. Driving and checking happen on the
// falling clock edge.
module tb_dct_1d;
  import jpeg_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [11:0] in_data [8];
  logic out_valid;
  logic [2:0] out_idx;
  logic signed [11:0] out_data;
  int checks = 0, failures = 0;
  int exp_q[$];
  int cyc = 0, t_in = 0, first_lat = -1;

  dct_1d #(.W(12)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int k_exp = 0;
  always @(negedge clk) if (rst_n && out_valid) begin
    if (first_lat < 0) first_lat = cyc - t_in;
    check(exp_q.size() > 0, "unexpected output");
    if (exp_q.size() > 0) begin
      int e;
      e = exp_q.pop_front();
      check(out_data == 12'(e), $sformatf("y: got %0d exp %0d", out_data, e));
      check(out_idx == 3'(k_exp), "out_idx order");
      k_exp = (k_exp + 1) % 8;
    end
  end

  initial begin
    longint s;
    for (int i = 0; i < 8; i++) in_data[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int v = 0; v < 60; v++) begin
      for (int i = 0; i < 8; i++)
        in_data[i] = (v < 2) ? ((v == 0) ? 12'sd127 : -12'sd128) : 12'($urandom_range(0, 255) - 128);
      for (int k = 0; k < 8; k++) begin
        s = 0;
        for (int n = 0; n < 8; n++) s += longint'(in_data[n]) * ref_c(k, n);
        exp_q.push_back(int'((s + 2048) >>> 12));
      end
      in_valid = 1;
      if (v == 0) t_in = cyc + 1;
      @(negedge clk);
      in_valid = 0;
      repeat (7 + ((v % 3 == 0) ? $urandom_range(5) : 0)) @(negedge clk);
    end
    repeat (12) @(posedge clk);
    check(exp_q.size() == 0, "all outputs seen");
    check(first_lat == 1, $sformatf("latency %0d", first_lat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
