// tb_quantizer: sends blocks of 64 random DCT coefficients (full 12-bit
// range, with idle clocks) through the quantizer and checks each result
// against floor((z * round(65536 / Q) + 32768) / 65536) with Q from the JPEG
// luminance table, taken in row-major order, plus the index and the
// one-clock latency. Independently of that formula, every result must be
// within half a step of z / Q (out * Q - z at most Q/2 + 1 in size), and
// exact multiples of Q must give the exact quotient.
module tb_quantizer;
  import jpeg_tea_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  coef_t in_data = 0;
  logic out_valid;
  idx_t out_idx;
  coef_t out_data;
  int checks = 0, failures = 0;

  quantizer dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int z, q, e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++)
      for (int i = 0; i < 64; i++) begin
        while ($urandom_range(4) == 0) begin
          in_valid = 0; @(negedge clk); check(!out_valid, "no output when idle");
        end
        q = quant_q(i);
        if (n < 3) z = q * ($urandom_range(20) - 10);    // exact multiples
        else       z = $urandom_range(2047) - 1024;
        in_valid = 1;
        in_data  = coef_t'(z);
        @(negedge clk);
        e = int'((longint'(z) * ((65536 + q / 2) / q) + 32768) >>> 16);
        check(out_valid && out_idx == idx_t'(i), "valid and index");
        check(out_data == coef_t'(e), $sformatf("z=%0d q=%0d got %0d exp %0d", z, q, out_data, e));
        check(int'(out_data) * q - z <= q / 2 + 1 && z - int'(out_data) * q <= q / 2 + 1,
              $sformatf("z=%0d q=%0d: %0d not nearest", z, q, out_data));
        if (n < 3) check(int'(out_data) == z / q, "exact quotient");
      end
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
