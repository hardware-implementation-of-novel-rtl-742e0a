// tb_zrl_encoder: feeds blocks (with DC differences and sparse AC parts,
// including long zero runs of 16, 17, 32 and 48 zeros, blocks whose last
// coefficient is non-zero and blocks with no AC at all) and compares the
// symbols produced with the symbol list of the usual JPEG run-length loop
// (ZRL for each full 16 zeros before a non-zero value, EOB if the block ends
// in zeros). Counts ZRL and EOB symbols and fails if either never occurred.
module tb_zrl_encoder;
  import jpeg_tea_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0;
  idx_t in_idx = 0, in_last_nz = 0;
  coef_t in_data = 0;
  logic out_valid, out_last;
  sym_t out_sym;
  int checks = 0, failures = 0, n_zrl = 0, n_eob = 0;
  sym_t exp_q[$];

  zrl_encoder dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n && out_valid && out_sym.kind != SYM_NONE) begin
    sym_t e;
    check(exp_q.size() > 0, "unexpected symbol");
    e = exp_q.pop_front();
    check(out_sym == e, $sformatf("symbol kind %0d run %0d val %0d, exp kind %0d run %0d val %0d",
          out_sym.kind, out_sym.run, out_sym.value, e.kind, e.run, e.value));
  end

  initial begin
    int b [64];
    int lnz, run;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      for (int i = 0; i < 64; i++) b[i] = 0;
      b[0] = int'($urandom_range(400)) - 200;
      case (n % 6)
        0: ;                                            // no AC
        1: begin b[17] = 5; b[34] = -3; end             // runs 16, 16
        2: begin b[1] = 1; b[50] = 2; b[63] = -9; end   // run 48, ends non-zero
        3: begin b[33] = 4; end                         // run 32
        4: for (int i = 1; i < 64; i++) if ($urandom_range(5) == 0) b[i] = int'($urandom_range(60)) - 30;
        default: begin b[18] = 1; b[2] = 7; end         // run 15, ends in zeros
      endcase
      // reference symbol list
      lnz = 0;
      for (int i = 1; i < 64; i++) if (b[i] != 0) lnz = i;
      exp_q.push_back('{kind: SYM_DC, run: 4'd0, value: coef_t'(b[0])});
      run = 0;
      for (int i = 1; i < 64; i++) begin
        if (b[i] == 0) run++;
        else begin
          while (run > 15) begin
            exp_q.push_back('{kind: SYM_ZRL, run: 4'd15, value: '0}); run -= 16; n_zrl++;
          end
          exp_q.push_back('{kind: SYM_AC, run: 4'(run), value: coef_t'(b[i])});
          run = 0;
        end
      end
      if (run > 0) begin exp_q.push_back('{kind: SYM_EOB, run: 4'd0, value: '0}); n_eob++; end
      for (int i = 0; i < 64; i++) begin
        if (n >= 40) while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_idx = idx_t'(i); in_data = coef_t'(b[i]); in_last_nz = idx_t'(lnz);
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "all symbols produced");
    check(n_zrl > 0 && n_eob > 0, "ZRL and EOB exercised");
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
