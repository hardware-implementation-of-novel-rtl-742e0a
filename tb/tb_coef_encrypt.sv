// tb_coef_encrypt: streams zigzag-ordered blocks through the encryption unit
// in all three modes and checks every output word against a software model
// (TEA on the first six coefficients, low 11 bits of each selected cipher
// field as the new value), plus the reported index of the last non-zero AC
// coefficient. Blocks include all-zero AC parts (index 0), non-zero values
// only among AC1..AC5 and full random blocks; the stream is sent back to back
// and with idle clocks. Counts blocks per mode and fails if a mode is unused.
module tb_coef_encrypt;
  import jpeg_tea_pkg::*;
  import jpeg_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  enc_mode_e mode = ENC_OFF;
  logic [127:0] key = 128'hDEAD_BEEF_0BAD_F00D_1234_5678_9ABC_DEF0;
  idx_t in_idx = 0;
  coef_t in_data = 0;
  logic out_valid;
  idx_t out_idx, out_last_nz;
  coef_t out_data;
  int checks = 0, failures = 0, rd_i = 0;
  int exp_q[$], exp_lnz[$];
  int n_mode[3];
  int cur_lnz;

  coef_encrypt dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (rd_i > 0) check(out_valid, "64 consecutive words");
    if (out_valid) begin
      if (rd_i == 0) cur_lnz = exp_lnz.pop_front();
      check(out_idx == idx_t'(rd_i), "out_idx");
      check(out_data == coef_t'(exp_q.pop_front()), $sformatf("word %0d", rd_i));
      check(out_last_nz == idx_t'(cur_lnz), $sformatf("last_nz %0d exp %0d", out_last_nz, cur_lnz));
      rd_i = (rd_i + 1) % 64;
    end
  end

  initial begin
    blk_t b, e;
    int lnz, m;
    for (int i = 0; i < 3; i++) n_mode[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 36; n++) begin
      m = n % 3;
      for (int i = 0; i < 64; i++) begin
        case ((n / 3) % 4)
          0: b[i] = (i == 0) ? int'($urandom_range(200)) - 100 : 0;
          1: b[i] = (i < 6) ? int'($urandom_range(40)) - 20 : 0;
          2: b[i] = ($urandom_range(3) == 0) ? int'($urandom_range(200)) - 100 : 0;
          default: b[i] = (i == 0 || i == 63) ? 7 : 0;
        endcase
      end
      e = ref_encrypt(b, m, key);
      lnz = 0;
      for (int i = 1; i < 64; i++) if (e[i] != 0) lnz = i;
      for (int i = 0; i < 64; i++) exp_q.push_back(e[i]);
      exp_lnz.push_back(lnz);
      n_mode[m]++;
      for (int i = 0; i < 64; i++) begin
        if (n >= 24) while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_idx = idx_t'(i);
        in_data = coef_t'(b[i]);
        mode = enc_mode_e'(m);
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (80) @(negedge clk);
    check(exp_q.size() == 0, "all blocks out");
    for (int i = 0; i < 3; i++) check(n_mode[i] > 0, "mode used");
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
