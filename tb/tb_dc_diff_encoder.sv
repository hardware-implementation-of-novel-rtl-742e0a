// tb_dc_diff_encoder: streams blocks of coefficients, marking the last word
// of every fifth block as the end of an image, and checks that each DC
// coefficient is replaced by its difference from the previous block's DC,
// that the predictor restarts at 0 after an image end, that AC words,
// indices and the last-non-zero tag pass unchanged, and the one-clock
// latency.
module tb_dc_diff_encoder;
  import jpeg_tea_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0;
  idx_t in_idx = 0, in_last_nz = 0;
  coef_t in_data = 0;
  logic out_valid, out_last;
  idx_t out_idx, out_last_nz;
  coef_t out_data;
  int checks = 0, failures = 0, n_restart = 0;

  dc_diff_encoder dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int pred, v, e, lnz;
    pred = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      lnz = $urandom_range(63);
      for (int i = 0; i < 64; i++) begin
        if ($urandom_range(4) == 0) begin
          in_valid = 0; @(negedge clk); check(!out_valid, "idle");
        end
        v = int'($urandom_range(2047)) - 1024;
        in_valid = 1; in_idx = idx_t'(i); in_data = coef_t'(v);
        in_last_nz = idx_t'(lnz);
        in_last = (i == 63) && (n % 5 == 4);
        @(negedge clk);
        e = (i == 0) ? v - pred : v;
        check(out_valid && out_idx == idx_t'(i) && out_last_nz == idx_t'(lnz), "valid/idx/tag");
        check(out_data == coef_t'(e), $sformatf("block %0d word %0d", n, i));
        check(out_last == in_last, "last passes");
        if (i == 0) begin
          if (pred == 0 && n > 0) n_restart++;
          pred = v;
        end
        if (in_last) pred = 0;
      end
    end
    check(n_restart > 0, "predictor restart exercised");
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
