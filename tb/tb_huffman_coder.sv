// tb_huffman_coder: checks the code tables against codes of the JPEG
// standard luminance tables written out by hand (DC categories 0, 1, 5 and
// 11; AC EOB, ZRL, 0/1, 1/1, 0/2 and F/A), then sends random DC, AC, ZRL and
// EOB symbols and compares {code, amplitude bits} and the length with a
// software coder (canonical codes built from BITS/HUFFVAL, size category
// and one's-complement amplitudes). One clock of latency.
module tb_huffman_coder;
  import jpeg_tea_pkg::*;
  import jpeg_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0;
  sym_t in_sym = '0;
  logic out_valid, out_last;
  logic [26:0] out_bits;
  logic [4:0] out_len;
  int checks = 0, failures = 0;

  huffman_coder dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(sym_t s, output logic [26:0] bits, output int len);
    in_valid = 1; in_sym = s; in_last = ($urandom_range(9) == 0);
    @(negedge clk);
    check(out_valid && out_last == in_last, "valid/last");
    bits = out_bits; len = int'(out_len);
    in_valid = 0;
  endtask

  // expected code of one symbol, by hand: {length, code}
  task automatic known(sym_kind_e k, int run, int val, int elen, int ebits);
    logic [26:0] b; int l;
    send('{kind: k, run: 4'(run), value: coef_t'(val)}, b, l);
    check(l == elen && b == 27'(ebits), $sformatf("known code kind %0d run %0d val %0d: %0d'b%b",
          k, run, val, l, b));
  endtask

  initial begin
    logic [26:0] b;
    int l, v, s, code, clen, amp, r;
    sym_kind_e k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    known(SYM_DC, 0, 0, 2, 'b00);
    known(SYM_DC, 0, 1, 4, 'b010_1);          // cat 1 = 010, amp 1
    known(SYM_DC, 0, -1, 4, 'b010_0);         // amp of -1 is 0
    known(SYM_DC, 0, 20, 8, 'b110_10100);     // cat 5 = 110
    known(SYM_DC, 0, -1024, 20, 'b111111110_01111111111);
    known(SYM_EOB, 0, 0, 4, 'b1010);
    known(SYM_ZRL, 15, 0, 11, 'b11111111001);
    known(SYM_AC, 0, 1, 3, 'b00_1);
    known(SYM_AC, 0, -3, 4, 'b01_00);
    known(SYM_AC, 1, 1, 5, 'b1100_1);
    known(SYM_AC, 15, 1000, 26, {16'hFFFE, 10'd1000});
    for (int n = 0; n < 3000; n++) begin
      r = $urandom_range(15);
      case ($urandom_range(3))
        0: begin k = SYM_DC; r = 0; v = int'($urandom_range(4094)) - 2047; end
        1: begin k = SYM_AC; v = int'($urandom_range(2046)) - 1023; if (v == 0) v = 1; end
        2: begin k = SYM_ZRL; r = 15; v = 0; end
        default: begin k = SYM_EOB; r = 0; v = 0; end
      endcase
      // a range of magnitudes, not only large ones
      if (k == SYM_DC || k == SYM_AC) begin
        v = v >>> $urandom_range(10);
        if (k == SYM_AC && v == 0) v = -1;
      end
      send('{kind: k, run: 4'(r), value: coef_t'(v)}, b, l);
      s = (k == SYM_DC || k == SYM_AC) ? ref_cat(v) : 0;
      case (k)
        SYM_DC:  clen = ref_huff(0, s, code);
        SYM_AC:  clen = ref_huff(1, r * 16 + s, code);
        SYM_ZRL: clen = ref_huff(1, 'hF0, code);
        default: clen = ref_huff(1, 0, code);
      endcase
      amp = (v < 0) ? v - 1 : v;
      amp = amp & ((1 << s) - 1);
      check(l == clen + s, $sformatf("length kind %0d run %0d v %0d: %0d exp %0d", k, r, v, l, clen + s));
      check(b == 27'((code << s) | amp), $sformatf("bits kind %0d run %0d v %0d", k, r, v));
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
