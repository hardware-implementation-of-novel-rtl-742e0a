// tb_dual_ram: writes blocks of 64 random words, back to back and with
// gaps, into the three read orders of the dual RAM (linear, transpose,
// zigzag) and checks every output word against the expected permutation,
// the out_idx sequence, that a block's first word is on the outputs one
// clock after the edge that writes its last word, and that a block is read
// in 64 consecutive clocks. Driving and checking happen on the falling edge.
module tb_dual_ram;
  import jpeg_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [11:0] in_data = 0;
  logic        ov [3];
  logic [5:0]  oi [3];
  logic [11:0] od [3];
  int checks = 0, failures = 0;
  int cyc = 0;

  dual_ram #(.N(64), .W(12), .ORDER(0)) d0 (.clk, .rst_n, .in_valid, .in_data,
    .out_valid(ov[0]), .out_idx(oi[0]), .out_data(od[0]));
  dual_ram #(.N(64), .W(12), .ORDER(1)) d1 (.clk, .rst_n, .in_valid, .in_data,
    .out_valid(ov[1]), .out_idx(oi[1]), .out_data(od[1]));
  dual_ram #(.N(64), .W(12), .ORDER(2)) d2 (.clk, .rst_n, .in_valid, .in_data,
    .out_valid(ov[2]), .out_idx(oi[2]), .out_data(od[2]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int   exp_lin[$], exp_tr[$], exp_zz[$];
  int   t_last[$];
  int   rd_i = 0;
  int   t0;

  always @(negedge clk) if (rst_n) begin
    if (rd_i == 0 && ov[0]) begin
      t0 = t_last.pop_front();
      check(cyc - t0 == 1, $sformatf("block starts %0d clocks after last write", cyc - t0));
    end
    if (rd_i > 0) check(ov[0] && ov[1] && ov[2], "consecutive output");
    if (ov[0]) begin
      check(exp_lin.size() > 0, "unexpected output");
      check(oi[0] == 6'(rd_i) && oi[1] == 6'(rd_i) && oi[2] == 6'(rd_i), "out_idx");
      check(od[0] == 12'(exp_lin.pop_front()), "linear order");
      check(od[1] == 12'(exp_tr.pop_front()), "transposed order");
      check(od[2] == 12'(exp_zz.pop_front()), "zigzag order");
      rd_i = (rd_i + 1) % 64;
    end
  end

  initial begin
    blk_t b, z;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      for (int i = 0; i < 64; i++) b[i] = $urandom_range(4095);
      z = ref_zigzag(b);
      for (int i = 0; i < 64; i++) begin
        exp_lin.push_back(b[i]);
        exp_tr.push_back(b[(i % 8) * 8 + i / 8]);
        exp_zz.push_back(z[i]);
      end
      for (int i = 0; i < 64; i++) begin
        if (n % 2 == 1) while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_data  = 12'(b[i]);
        if (i == 63) t_last.push_back(cyc + 1);
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (80) @(negedge clk);
    check(exp_lin.size() == 0 && rd_i == 0, "all blocks read");
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
