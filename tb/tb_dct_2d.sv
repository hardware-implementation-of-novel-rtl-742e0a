// tb_dct_2d: sends 8x8 pixel blocks (extremes, flat, ramps and noise),
// back to back and with idle clocks, through the 2-D DCT and compares the
// 64 coefficients of every block (row-major, out_idx = 8u + v) with a
// reference DCT computed from floating-point cosines rounded to the same
// fixed point. Also checks that a block arriving at one pixel per clock
// leaves the unit within its stated latency and as one 64-clock burst.
module tb_dct_2d;
  import jpeg_tea_pkg::*;
  import jpeg_ref_pkg::*;
  logic clk = 0, rst_n = 0, pix_valid = 0;
  logic [7:0] pix = 0;
  logic out_valid;
  idx_t out_idx;
  coef_t out_data;
  int checks = 0, failures = 0, cyc = 0, rd_i = 0;
  int exp_q[$], t_first[$];
  int lat_max = 0;

  dct_2d dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (rd_i > 0) check(out_valid, "block leaves as one burst");
    if (out_valid) begin
      if (rd_i == 0) begin
        int l;
        l = cyc - t_first.pop_front();
        if (l > lat_max) lat_max = l;
      end
      check(exp_q.size() > 0, "unexpected output");
      check(out_idx == idx_t'(rd_i), "out_idx");
      check(out_data == coef_t'(exp_q.pop_front()), $sformatf("coef %0d", rd_i));
      rd_i = (rd_i + 1) % 64;
    end
  end

  initial begin
    blk_t b, z;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      for (int i = 0; i < 64; i++)
        case (n % 5)
          0: b[i] = (n == 0) ? 255 : (n == 5 ? 0 : 255 * ((i / 8 + i % 8) % 2));
          1: b[i] = 100;
          2: b[i] = 4 * i;
          3: b[i] = 30 * (i % 8);
          default: b[i] = $urandom_range(255);
        endcase
      z = ref_dct2(b);
      for (int i = 0; i < 64; i++) exp_q.push_back(z[i]);
      for (int i = 0; i < 64; i++) begin
        if (n >= 20) while ($urandom_range(3) == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1;
        pix = 8'(b[i]);
        if (i == 0) t_first.push_back(cyc + 1);
        @(negedge clk);
      end
    end
    pix_valid = 0;
    repeat (300) @(negedge clk);
    check(exp_q.size() == 0, "all blocks out");
    // without gaps a block leaves 2 x 64 + 20 clocks after its first pixel
    check(lat_max <= 2 * 64 + 80, $sformatf("latency %0d", lat_max));
    $display("latency (first pixel to first coefficient, max): %0d", lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
