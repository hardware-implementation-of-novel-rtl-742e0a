// jpeg_ref_pkg: behavioural reference model of the JPEG + TEA encoder, for
// the testbenches. Written in the textbook form of each step (floating point
// cosines rounded to the fixed-point matrix, zigzag by a bouncing walk, JPEG
// entropy coding with the usual "emit ZRLs when a non-zero arrives" loop, a
// bit writer with byte stuffing) so that it does not share structure with
// the RTL. Only the standard tables (quantization, Huffman BITS/HUFFVAL)
// are taken from the design package.
package jpeg_ref_pkg;
  import jpeg_tea_pkg::*;

  typedef int blk_t [64];

  // fixed-point DCT matrix entry, rounded symmetrically
  function automatic int ref_c(int k, int n);
    real pi, ck, v;
    pi = 3.14159265358979;
    ck = (k == 0) ? 1.0 / $sqrt(8.0) : 0.5;
    v  = 4096.0 * ck * $cos((2.0 * n + 1.0) * k * pi / 16.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int rshift_round(longint s);
    return int'((s + 2048) >>> 12);
  endfunction

  // 2-D DCT of a level-shifted block, row pass then column pass
  function automatic blk_t ref_dct2(blk_t px);
    blk_t y, z;
    longint s;
    for (int r = 0; r < 8; r++)
      for (int k = 0; k < 8; k++) begin
        s = 0;
        for (int n = 0; n < 8; n++) s += longint'(px[r*8+n] - 128) * ref_c(k, n);
        y[r*8+k] = rshift_round(s);
      end
    for (int u = 0; u < 8; u++)
      for (int k = 0; k < 8; k++) begin
        s = 0;
        for (int r = 0; r < 8; r++) s += longint'(y[r*8+k]) * ref_c(u, r);
        z[u*8+k] = rshift_round(s);
      end
    return z;
  endfunction

  function automatic blk_t ref_quant(blk_t z);
    blk_t q;
    int r;
    for (int i = 0; i < 64; i++) begin
      r = (65536 + quant_q(i) / 2) / quant_q(i);
      q[i] = int'((longint'(z[i]) * r + 32768) >>> 16);
    end
    return q;
  endfunction

  // zigzag: walk the block, bouncing off the edges
  function automatic blk_t ref_zigzag(blk_t q);
    blk_t o;
    int r, c;
    bit up;
    r = 0; c = 0; up = 1;
    for (int i = 0; i < 64; i++) begin
      o[i] = q[r*8+c];
      if (up) begin
        if (c == 7)      begin r++; up = 0; end
        else if (r == 0) begin c++; up = 0; end
        else             begin r--; c++; end
      end else begin
        if (r == 7)      begin c++; up = 1; end
        else if (c == 0) begin r++; up = 1; end
        else             begin r++; c--; end
      end
    end
    return o;
  endfunction

  // TEA on a 72-bit block, two 36-bit halves, 64 Feistel rounds
  function automatic logic [71:0] ref_tea(logic [71:0] pt, logic [127:0] key);
    longint unsigned y, z, sum, m, k[4];
    m = (64'd1 << 36) - 1;
    y = pt[71:36];
    z = pt[35:0];
    sum = 0;
    for (int i = 0; i < 4; i++) k[i] = key[127 - 32*i -: 32];
    for (int i = 0; i < 32; i++) begin
      sum = (sum + 64'h9E3779B9) & m;
      y = (y + ((((z << 4) & m) + k[0]) ^ (z + sum) ^ ((z >> 5) + k[1]))) & m;
      z = (z + ((((y << 4) & m) + k[2]) ^ (y + sum) ^ ((y >> 5) + k[3]))) & m;
    end
    return {y[35:0], z[35:0]};
  endfunction

  // encryption of the first six zigzag coefficients
  function automatic blk_t ref_encrypt(blk_t zz, int mode, logic [127:0] key);
    logic [71:0] pt, ct;
    logic [11:0] f;
    blk_t o;
    o = zz;
    for (int i = 0; i < 6; i++) pt[71 - 12*i -: 12] = 12'(zz[i]);
    ct = ref_tea(pt, key);
    for (int i = 0; i < 6; i++) begin
      f = ct[71 - 12*i -: 12];
      if (mode == 2 || (mode == 1 && i == 0))
        o[i] = f[10] ? int'(f[10:0]) - 2048 : int'(f[10:0]);
    end
    return o;
  endfunction

  // canonical Huffman code from BITS/HUFFVAL: returns length, sets code
  function automatic int ref_huff(bit ac, int sym, output int code);
    int c, k, n;
    c = 0; k = 0;
    for (int l = 1; l <= 16; l++) begin
      n = ac ? ac_bits(l) : dc_bits(l);
      repeat (n) begin
        if ((ac ? ac_val(k) : dc_val(k)) == sym) begin code = c; return l; end
        c++; k++;
      end
      c <<= 1;
    end
    code = 0;
    return 0;
  endfunction

  function automatic int ref_cat(int v);
    int a, s;
    a = (v < 0) ? -v : v;
    s = 0;
    while (a > 0) begin s++; a >>= 1; end
    return s;
  endfunction

  class bit_writer;
    bit bits[$];
    byte unsigned bytes[$];
    int stuffed;
    function new(); stuffed = 0; endfunction
    function void put(int val, int n);
      for (int i = n - 1; i >= 0; i--) bits.push_back(val[i]);
      while (bits.size() >= 8) take_byte();
    endfunction
    function void take_byte();
      byte unsigned b;
      b = 0;
      for (int i = 0; i < 8; i++) b = {b[6:0], bits.pop_front()};
      bytes.push_back(b);
      if (b == 8'hFF) begin bytes.push_back(8'h00); stuffed++; end
    endfunction
    function void flush();
      while (bits.size() % 8 != 0) bits.push_back(1'b1);
      while (bits.size() >= 8) take_byte();
    endfunction
  endclass

  // statistics of the entropy coder
  int n_zrl, n_eob;

  function automatic void code_value(bit_writer w, bit ac, int sym_hi, int v);
    int s, code, len, amp;
    s = ref_cat(v);
    len = ref_huff(ac, ac ? (sym_hi << 4) | s : s, code);
    w.put(code, len);
    amp = (v < 0) ? v - 1 : v;
    if (s > 0) w.put(amp & ((1 << s) - 1), s);
  endfunction

  // encode one block (zigzag order, after encryption) given the DC predictor
  function automatic void ref_code_block(bit_writer w, blk_t zz, inout int pred);
    int run, code, len;
    code_value(w, 0, 0, zz[0] - pred);
    pred = zz[0];
    run = 0;
    for (int k = 1; k < 64; k++) begin
      if (zz[k] == 0) run++;
      else begin
        while (run > 15) begin
          len = ref_huff(1, 8'hF0, code); w.put(code, len); run -= 16; n_zrl++;
        end
        code_value(w, 1, run, zz[k]);
        run = 0;
      end
    end
    if (run > 0) begin len = ref_huff(1, 0, code); w.put(code, len); n_eob++; end
  endfunction

  // What a standard JPEG decoder shows for a block whose zigzag coefficients
  // (after encryption) are zz: inverse zigzag, multiply by Q, floating-point
  // inverse DCT, level shift back, round and clamp to 0..255.
  function automatic blk_t ref_decode(blk_t zz);
    blk_t q, z, o;
    real pi, s, cu, cv;
    int r, c, i;
    bit up;
    pi = 3.14159265358979;
    r = 0; c = 0; up = 1;
    for (i = 0; i < 64; i++) begin
      q[r*8+c] = zz[i];
      if (up) begin
        if (c == 7)      begin r++; up = 0; end
        else if (r == 0) begin c++; up = 0; end
        else             begin r--; c++; end
      end else begin
        if (r == 7)      begin c++; up = 1; end
        else if (c == 0) begin r++; up = 1; end
        else             begin r++; c--; end
      end
    end
    for (i = 0; i < 64; i++) z[i] = q[i] * quant_q(i);
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        s = 0.0;
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            cu = (u == 0) ? 1.0 / $sqrt(8.0) : 0.5;
            cv = (v == 0) ? 1.0 / $sqrt(8.0) : 0.5;
            s += cu * cv * z[u*8+v] * $cos((2.0 * y + 1.0) * u * pi / 16.0)
                                    * $cos((2.0 * x + 1.0) * v * pi / 16.0);
          end
        i = int'($floor(s + 128.5));
        o[y*8+x] = (i < 0) ? 0 : (i > 255) ? 255 : i;
      end
    return o;
  endfunction

endpackage
