// tb_bit_packer: sends random variable-length words (0 to 27 bits, with
// long runs of ones to provoke FFh bytes) with an end-of-image mark every
// few hundred words, and compares the byte stream with a software bit
// writer that stuffs 00h after FFh and pads the last byte with ones.
// Checks done after each end mark and counts stuffed bytes and padded
// endings, failing if either never occurred.
module tb_bit_packer;
  import jpeg_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0;
  logic [26:0] in_bits = 0;
  logic [4:0] in_len = 0;
  logic out_valid, done;
  logic [3:0] out_count;
  logic [9:0][7:0] out_bytes;
  int checks = 0, failures = 0, n_done = 0, n_pad = 0, n_stuff = 0;
  byte unsigned got[$];

  bit_packer dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (out_valid) for (int i = 0; i < int'(out_count); i++) got.push_back(out_bytes[i]);
    if (done) n_done++;
  end

  initial begin
    bit_writer w;
    int len, val;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int img = 0; img < 8; img++) begin
      w = new();
      got.delete();
      for (int n = 0; n < 300 + img; n++) begin
        if ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        len = $urandom_range(27);
        val = (n % 4 == 0) ? -1 : int'($urandom);
        val = val & ((1 << len) - 1);
        w.put(val, len);
        in_valid = 1; in_bits = 27'(val); in_len = 5'(len); in_last = (n == 299 + img);
        @(negedge clk);
      end
      if (w.bits.size() % 8 != 0) n_pad++;
      w.flush();
      n_stuff += w.stuffed;
      in_valid = 0; in_last = 0;
      @(negedge clk);
      check(n_done == img + 1, "done once per end mark");
      check(got.size() == w.bytes.size(), $sformatf("%0d bytes, exp %0d", got.size(), w.bytes.size()));
      for (int i = 0; i < got.size() && i < w.bytes.size(); i++)
        check(got[i] == w.bytes[i], $sformatf("image %0d byte %0d: %h exp %h", img, i, got[i], w.bytes[i]));
    end
    check(n_pad > 0 && n_stuff > 0, "padding and stuffing exercised");
    $display("padded endings %0d, stuffed bytes %0d", n_pad, n_stuff);
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
