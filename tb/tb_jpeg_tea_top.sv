// tb_jpeg_tea_top: end-to-end test of the JPEG + TEA encoder on small images.
//
// A 32x24 image (12 blocks) is encoded three times, once per encryption
// mode (off, method 1, method 2), and the byte stream is compared with the
// reference model of jpeg_ref_pkg. The blocks mix smooth ramps, noise, a
// horizontal DCT basis pattern (energy only at frequency (0,7), zigzag
// index 28, forcing a ZRL symbol)
// and flat areas (EOB right after DC); the pixel stream has random idle
// clocks in the second image and none in the others. The test counts how
// often each mechanism occurred (ZRL, EOB, FFh byte stuffing, every mode,
// input gaps, DC predictor restart) and fails for one that never did.
// It also checks that `done` pulses once per image and that the last byte
// of an image follows its last pixel within a fixed latency bound.
module tb_jpeg_tea_top;
  import jpeg_tea_pkg::*;
  import jpeg_ref_pkg::*;

  localparam int W = 32, H = 24, NB = (W / 8) * (H / 8);
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

  jpeg_tea_top #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    if (out_valid)
      for (int i = 0; i < int'(out_count); i++) got.push_back(out_bytes[i]);
    if (done) begin n_done++; done_cycle = cycle; end
  end

  function automatic int pixel(int img, int b, int r, int c);
    case (b % 4)
      0: return (16 * r + 8 * c + 20 * img + b) % 256;          // ramp
      1: return int'($urandom_range(255));                      // noise
      2: return 128 + int'($floor(100.0 * $cos((2 * c + 1) * 7 * 3.14159265 / 16.0) + 0.5));
                                                                // basis (0,7)
      default: return 90 + 10 * img;                            // flat
    endcase
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
    mode = m;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 64; i++) px[b][i] = pixel(img, b, i / 8, i % 8);
    // reference
    w = new();
    pred = 0;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 64; i++) blk[i] = px[b][i];
      zz = ref_encrypt(ref_zigzag(ref_quant(ref_dct2(blk))), int'(m), key);
      ref_code_block(w, zz, pred);
    end
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
    $display("image %0d mode %0d: %0d bytes, latency %0d", img, int'(m), got.size(),
             done_cycle - last_pix_cycle);
  endtask

  initial begin
    n_zrl = 0; n_eob = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_image(0, ENC_OFF, 0);
    run_image(1, ENC_DC, 1);
    run_image(2, ENC_DC_AC, 0);
    run_image(3, ENC_DC_AC, 0);  // same predictor restart again
    // mechanism coverage
    check(n_zrl > 0,   "ZRL symbols occurred");
    check(n_eob > 0,   "EOB symbols occurred");
    check(n_stuff > 0, "byte stuffing occurred");
    check(n_gaps > 0,  "input gaps occurred");
    for (int i = 0; i < 3; i++) check(n_modes[i] > 0, $sformatf("mode %0d used", i));
    $display("coverage: zrl=%0d eob=%0d stuffed=%0d gaps=%0d", n_zrl, n_eob, n_stuff, n_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
