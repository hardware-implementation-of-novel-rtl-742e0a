// tb_jpeg_tea_full: the encoder at its default size, a 288x288 image
// (1296 blocks), encoded without encryption, with method 1 and with method 2.
// The image is synthetic: smooth shading with a few sharp-edged discs and a
// band of fine texture, so that it has flat, smooth and detailed regions.
// Each byte stream is compared with the reference model of jpeg_ref_pkg,
// and the compressed sizes of the three runs are printed, so that the cost
// of each encryption method in compression can be read off. Pixels are fed
// one per clock with no gaps; the test also checks that `done` pulses once
// per image and the latency from the last pixel to `done`.
// For each mode it also decodes the reference coefficients as a standard
// JPEG decoder would (without the key) and prints PSNR and RMSE against the
// original pixels: plain JPEG must stay close to the original, and both
// encryption methods must destroy it (PSNR far below that of plain JPEG,
// method 2 no higher than method 1).
module tb_jpeg_tea_full;
  import jpeg_tea_pkg::*;
  import jpeg_ref_pkg::*;

  localparam int W = 288, H = 288, NB = (W / 8) * (H / 8);
  localparam int MAX_LAT = 400;

  logic            clk = 0, rst_n = 0;
  logic            pix_valid = 0;
  logic [7:0]      pix = 0;
  logic [127:0]    key = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;
  enc_mode_e       mode = ENC_OFF;
  logic            out_valid;
  logic [3:0]      out_count;
  logic [9:0][7:0] out_bytes;
  logic            done;

  int checks = 0, failures = 0;
  int n_done = 0, n_gaps = 0, n_modes[3], n_stuff = 0;
  int cycle = 0, last_pix_cycle = 0, done_cycle = 0;
  byte unsigned got[$];
  real psnr[3], rmse[3];

  jpeg_tea_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    if (out_valid)
      for (int i = 0; i < int'(out_count); i++) got.push_back(out_bytes[i]);
    if (done) begin n_done++; done_cycle = cycle; end
  end

  function automatic int pixel(int img, int b, int r, int c);
    int x, y, v;
    real d;
    x = (b % (W / 8)) * 8 + c;
    y = (b / (W / 8)) * 8 + r;
    v = 110 + int'(60.0 * $sin(x / 23.0) * $cos(y / 31.0)) + (x + y) / 12;
    d = $sqrt((x - 90.0) * (x - 90.0) + (y - 100.0) * (y - 100.0));
    if (d < 40.0) v = 220 - int'(d);
    d = $sqrt((x - 200.0) * (x - 200.0) + (y - 190.0) * (y - 190.0));
    if (d < 55.0) v = 30 + int'(d / 2.0);
    if (y > 240 && y < 260) v = v + (((x / 2) % 2 == 0) ? 25 : -25) + img;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_image(int img, enc_mode_e m, bit gaps);
    int px [NB][64];
    blk_t blk, zz;
    int pred;
    bit_writer w;
    int nd0;
    blk_t dec;
    real se;
    mode = m;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 64; i++) px[b][i] = pixel(img, b, i / 8, i % 8);
    // reference
    w = new();
    pred = 0;
    se = 0.0;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 64; i++) blk[i] = px[b][i];
      zz = ref_encrypt(ref_zigzag(ref_quant(ref_dct2(blk))), int'(m), key);
      ref_code_block(w, zz, pred);
      dec = ref_decode(zz);
      for (int i = 0; i < 64; i++) se += real'((dec[i] - blk[i]) * (dec[i] - blk[i]));
    end
    rmse[int'(m)] = $sqrt(se / (W * H));
    psnr[int'(m)] = 20.0 * $log10(255.0 / rmse[int'(m)]);
    w.flush();
    n_stuff += w.stuffed;
    // stimulus
    got.delete();
    nd0 = n_done;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 64; i++) begin
        if (gaps) while ($urandom_range(3) == 0) begin
          pix_valid <= 0; n_gaps++; @(posedge clk);
        end
        pix_valid <= 1;
        pix <= 8'(px[b][i]);
        @(posedge clk);
      end
    pix_valid <= 0;
    last_pix_cycle = cycle;
    while (n_done == nd0) @(posedge clk);
    repeat (3) @(posedge clk);
    check(n_done == nd0 + 1, "done pulses once per image");
    check(done_cycle - last_pix_cycle <= MAX_LAT, $sformatf("latency %0d", done_cycle - last_pix_cycle));
    check(got.size() == w.bytes.size(), $sformatf("image %0d: %0d bytes, expected %0d",
          img, got.size(), w.bytes.size()));
    for (int i = 0; i < w.bytes.size() && i < got.size(); i++)
      if (got[i] != w.bytes[i]) begin
        check(0, $sformatf("image %0d byte %0d: %02h expected %02h", img, i, got[i], w.bytes[i]));
        break;
      end
    check(1, "stream compared");
    n_modes[int'(m)]++;
    $display("image %0d mode %0d: %0d bytes, latency %0d, PSNR %0.2f dB, RMSE %0.2f", img,
             int'(m), got.size(), done_cycle - last_pix_cycle, psnr[int'(m)], rmse[int'(m)]);
  endtask

  initial begin
    n_zrl = 0; n_eob = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_image(0, ENC_OFF, 0);
    run_image(0, ENC_DC, 0);
    run_image(0, ENC_DC_AC, 0);
    check(psnr[0] > 28.0, "plain JPEG decodes close to the original");
    check(psnr[1] < psnr[0] - 15.0, "method 1 destroys the image");
    check(psnr[2] < psnr[0] - 15.0, "method 2 destroys the image");
    check(psnr[2] <= psnr[1] + 0.5, "method 2 hides at least as much as method 1");
    $display("coverage: zrl=%0d eob=%0d stuffed=%0d gaps=%0d", n_zrl, n_eob, n_stuff, n_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
