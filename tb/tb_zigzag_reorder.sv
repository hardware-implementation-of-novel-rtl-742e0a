// tb_zigzag_reorder: writes blocks in raster order and checks that they come
// out in the JPEG zigzag order (compared with a reference that walks the
// block bouncing off its edges, and with the first ten positions of the scan
// written out by hand), with out_idx the zigzag index.
module tb_zigzag_reorder;
  import jpeg_tea_pkg::*;
  import jpeg_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  coef_t in_data = 0;
  logic out_valid;
  idx_t out_idx;
  coef_t out_data;
  int checks = 0, failures = 0, rd_i = 0;
  int exp_q[$];
  // raster positions of zigzag indices 0..9
  int first10 [10] = '{0, 1, 8, 16, 9, 2, 3, 10, 17, 24};

  zigzag_reorder dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n && out_valid) begin
    check(out_idx == idx_t'(rd_i), "out_idx");
    check(out_data == coef_t'(exp_q.pop_front()), $sformatf("zigzag %0d", rd_i));
    rd_i = (rd_i + 1) % 64;
  end

  initial begin
    blk_t b, z;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      for (int i = 0; i < 64; i++) b[i] = (n == 0) ? i : int'($urandom_range(4095)) - 2048;
      z = ref_zigzag(b);
      for (int i = 0; i < 10; i++) check(z[i] == b[first10[i]], "reference scan");
      for (int i = 0; i < 64; i++) exp_q.push_back(z[i]);
      for (int i = 0; i < 64; i++) begin
        if (n % 3 == 2) while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_data = coef_t'(b[i]);
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (70) @(negedge clk);
    check(exp_q.size() == 0, "all blocks out");
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
