// tb_tea_core: encrypts random 72-bit blocks under random keys (plus the
// all-zero block and key) and compares the ciphertext with a software TEA on
// 36-bit halves. Checks that done comes 32 clocks (64 Feistel rounds, two
// per clock) after start, that busy is high in between, that a start while
// busy is ignored, and that changing one plaintext bit changes the
// ciphertext in many bits.
module tb_tea_core;
  import jpeg_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [71:0]  pt = 0;
  logic [127:0] key = 0;
  logic busy, done;
  logic [71:0] ct;
  int checks = 0, failures = 0;

  tea_core dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic encrypt(logic [71:0] p, logic [127:0] k, output logic [71:0] c);
    int n;
    pt = p; key = k; start = 1;
    @(negedge clk);
    start = 0;
    n = 1;
    while (!done) begin
      check(busy, "busy while iterating");
      if (n == 5) begin start = 1; pt = ~p; end   // must be ignored
      @(negedge clk);
      start = 0; pt = p;
      n++;
    end
    check(n - 1 == 32, $sformatf("done %0d clocks after the start edge", n - 1));
    c = ct;
    check(ct == ref_tea(p, k), $sformatf("ciphertext %h exp %h", ct, ref_tea(p, k)));
    @(negedge clk);
    check(!busy && !done, "idle after done");
  endtask

  initial begin
    logic [71:0] p, c1, c2;
    logic [127:0] k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    encrypt('0, '0, c1);
    for (int i = 0; i < 30; i++) begin
      p = {$urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, c1);
      encrypt(p ^ (72'd1 << $urandom_range(71)), k, c2);
      check($countones(c1 ^ c2) > 12, "avalanche on one plaintext bit");
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
