// jpeg_tea_pkg: types, constants and constant functions shared by the
// JPEG compression / TEA encryption pipeline.
//
// Contents:
//  * word widths of the coefficient stream (12-bit two's complement values,
//    6-bit index inside an 8x8 block);
//  * the 8x8 DCT matrix C in fixed point (CFRAC fractional bits), derived from
//    the nine values c(k)*cos(m*pi/16), m = 0..8, by symmetry;
//  * the JPEG luminance quantization table Q (ISO/IEC 10918-1, Annex K.1) and
//    the reciprocal 65536/Q used by the multiplier-based quantizer;
//  * the zigzag scan, computed by walking the anti-diagonals of the block;
//  * the JPEG standard luminance Huffman tables (Annex K.3), given as the
//    BITS / HUFFVAL lists of the standard; the codes are generated by the
//    canonical Huffman construction of Annex C in a constant function.
//  * the encryption mode and the symbol types of the entropy coder.
// The tables are the JPEG baseline defaults; the choice of 12-bit words,
// the fixed-point scaling of C and the rounding are this design's own.
package jpeg_tea_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned CW    = 12;   // coefficient word (signed)
  localparam int unsigned CFRAC = 12;   // fractional bits of the DCT matrix
  localparam int unsigned NENC  = 6;    // coefficients per TEA block (DC + 5 AC)

  typedef logic signed [CW-1:0] coef_t;
  typedef logic        [5:0]    idx_t;

  // Encryption method: off (plain JPEG), method 1 (DC only),
  // method 2 (DC and the first five AC coefficients in zigzag order).
  typedef enum logic [1:0] {
    ENC_OFF   = 2'd0,
    ENC_DC    = 2'd1,
    ENC_DC_AC = 2'd2
  } enc_mode_e;

  // Entropy coder symbols
  typedef enum logic [2:0] {
    SYM_NONE = 3'd0,
    SYM_DC   = 3'd1,
    SYM_AC   = 3'd2,
    SYM_ZRL  = 3'd3,
    SYM_EOB  = 3'd4
  } sym_kind_e;

  typedef struct packed {
    sym_kind_e   kind;
    logic [3:0]  run;
    coef_t       value;
  } sym_t;

  // ------------------------------------------------------------ DCT matrix
  // COS_TAB[m] = round(2^CFRAC * s * cos(m*pi/16)), s = 1/2 (m > 0 uses 1/2;
  // row k = 0 uses 1/sqrt(8) which equals 1/2*cos(4*pi/16)).
  function automatic int dct_cos(input int m);
    case (m)
      0: return 2048;
      1: return 2009;
      2: return 1892;
      3: return 1703;
      4: return 1448;
      5: return 1138;
      6: return 784;
      7: return 400;
      default: return 0;
    endcase
  endfunction

  // C[k][n] = c(k) * cos((2n+1) k pi / 16) in fixed point.
  function automatic int dct_coef(input int k, input int n);
    int m;
    if (k == 0) return dct_cos(4);
    m = ((2 * n + 1) * k) % 32;
    if (m <= 8)       return  dct_cos(m);
    else if (m <= 16) return -dct_cos(16 - m);
    else if (m <= 24) return -dct_cos(m - 16);
    else              return  dct_cos(32 - m);
  endfunction

  // ------------------------------------------------------ quantization table
  // Luminance table of Annex K.1, row-major (row = vertical frequency).
  function automatic int quant_q(input int i);
    case (i / 8)
      0: case (i % 8) 0: return 16; 1: return 11; 2: return 10; 3: return 16;
                      4: return 24; 5: return 40; 6: return 51; default: return 61; endcase
      1: case (i % 8) 0: return 12; 1: return 12; 2: return 14; 3: return 19;
                      4: return 26; 5: return 58; 6: return 60; default: return 55; endcase
      2: case (i % 8) 0: return 14; 1: return 13; 2: return 16; 3: return 24;
                      4: return 40; 5: return 57; 6: return 69; default: return 56; endcase
      3: case (i % 8) 0: return 14; 1: return 17; 2: return 22; 3: return 29;
                      4: return 51; 5: return 87; 6: return 80; default: return 62; endcase
      4: case (i % 8) 0: return 18; 1: return 22; 2: return 37; 3: return 56;
                      4: return 68; 5: return 109; 6: return 103; default: return 77; endcase
      5: case (i % 8) 0: return 24; 1: return 35; 2: return 55; 3: return 64;
                      4: return 81; 5: return 104; 6: return 113; default: return 92; endcase
      6: case (i % 8) 0: return 49; 1: return 64; 2: return 78; 3: return 87;
                      4: return 103; 5: return 121; 6: return 120; default: return 101; endcase
      default:
         case (i % 8) 0: return 72; 1: return 92; 2: return 95; 3: return 98;
                      4: return 112; 5: return 100; 6: return 103; default: return 99; endcase
    endcase
  endfunction

  // Entry of the coefficient RAM: round(65536 / Q).
  function automatic int quant_recip(input int i);
    int q;
    q = quant_q(i);
    return (65536 + q / 2) / q;
  endfunction

  // ----------------------------------------------------------------- zigzag
  // Raster position (row*8 + col) of the i-th coefficient in zigzag order.
  function automatic int zigzag_pos(input int i);
    int cnt, s, r, c, len, first_r;
    cnt = 0;
    for (s = 0; s < 15; s++) begin
      len = (s < 8) ? s + 1 : 15 - s;
      first_r = (s < 8) ? 0 : s - 7;
      for (int j = 0; j < len; j++) begin
        // even diagonals run upwards (row decreasing), odd ones downwards
        if (s % 2 == 0) r = s - first_r - j;
        else            r = first_r + j;
        c = s - r;
        if (cnt == i) return r * 8 + c;
        cnt++;
      end
    end
    return 0;
  endfunction

  typedef logic [5:0] zztab_t [64];

  function automatic zztab_t zigzag_table();
    zztab_t t;
    for (int i = 0; i < 64; i++) t[i] = 6'(zigzag_pos(i));
    return t;
  endfunction

  // ---------------------------------------------------------- Huffman tables
  // Standard luminance DC table: BITS (codes of length 1..16) and HUFFVAL.
  function automatic int dc_bits(input int l);
    case (l)
      1: return 0; 2: return 1; 3: return 5; 4: return 1; 5: return 1;
      6: return 1; 7: return 1; 8: return 1; 9: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic int dc_val(input int i);
    return i;  // symbols 0..11 in order
  endfunction

  // Standard luminance AC table.
  function automatic int ac_bits(input int l);
    case (l)
      1: return 0;  2: return 2;  3: return 1;  4: return 3;
      5: return 3;  6: return 2;  7: return 4;  8: return 3;
      9: return 5;  10: return 5; 11: return 4; 12: return 4;
      13: return 0; 14: return 0; 15: return 1; 16: return 125;
      default: return 0;
    endcase
  endfunction

  function automatic int ac_val(input int i);
    case (i)
      0: return 'h01;  1: return 'h02;  2: return 'h03;  3: return 'h00;
      4: return 'h04;  5: return 'h11;  6: return 'h05;  7: return 'h12;
      8: return 'h21;  9: return 'h31;  10: return 'h41; 11: return 'h06;
      12: return 'h13; 13: return 'h51; 14: return 'h61; 15: return 'h07;
      16: return 'h22; 17: return 'h71; 18: return 'h14; 19: return 'h32;
      20: return 'h81; 21: return 'h91; 22: return 'ha1; 23: return 'h08;
      24: return 'h23; 25: return 'h42; 26: return 'hb1; 27: return 'hc1;
      28: return 'h15; 29: return 'h52; 30: return 'hd1; 31: return 'hf0;
      32: return 'h24; 33: return 'h33; 34: return 'h62; 35: return 'h72;
      36: return 'h82; 37: return 'h09; 38: return 'h0a; 39: return 'h16;
      40: return 'h17; 41: return 'h18; 42: return 'h19; 43: return 'h1a;
      44: return 'h25; 45: return 'h26; 46: return 'h27; 47: return 'h28;
      48: return 'h29; 49: return 'h2a; 50: return 'h34; 51: return 'h35;
      52: return 'h36; 53: return 'h37; 54: return 'h38; 55: return 'h39;
      56: return 'h3a; 57: return 'h43; 58: return 'h44; 59: return 'h45;
      60: return 'h46; 61: return 'h47; 62: return 'h48; 63: return 'h49;
      64: return 'h4a; 65: return 'h53; 66: return 'h54; 67: return 'h55;
      68: return 'h56; 69: return 'h57; 70: return 'h58; 71: return 'h59;
      72: return 'h5a; 73: return 'h63; 74: return 'h64; 75: return 'h65;
      76: return 'h66; 77: return 'h67; 78: return 'h68; 79: return 'h69;
      80: return 'h6a; 81: return 'h73; 82: return 'h74; 83: return 'h75;
      84: return 'h76; 85: return 'h77; 86: return 'h78; 87: return 'h79;
      88: return 'h7a; 89: return 'h83; 90: return 'h84; 91: return 'h85;
      92: return 'h86; 93: return 'h87; 94: return 'h88; 95: return 'h89;
      96: return 'h8a; 97: return 'h92; 98: return 'h93; 99: return 'h94;
      100: return 'h95; 101: return 'h96; 102: return 'h97; 103: return 'h98;
      104: return 'h99; 105: return 'h9a; 106: return 'ha2; 107: return 'ha3;
      108: return 'ha4; 109: return 'ha5; 110: return 'ha6; 111: return 'ha7;
      112: return 'ha8; 113: return 'ha9; 114: return 'haa; 115: return 'hb2;
      116: return 'hb3; 117: return 'hb4; 118: return 'hb5; 119: return 'hb6;
      120: return 'hb7; 121: return 'hb8; 122: return 'hb9; 123: return 'hba;
      124: return 'hc2; 125: return 'hc3; 126: return 'hc4; 127: return 'hc5;
      128: return 'hc6; 129: return 'hc7; 130: return 'hc8; 131: return 'hc9;
      132: return 'hca; 133: return 'hd2; 134: return 'hd3; 135: return 'hd4;
      136: return 'hd5; 137: return 'hd6; 138: return 'hd7; 139: return 'hd8;
      140: return 'hd9; 141: return 'hda; 142: return 'he1; 143: return 'he2;
      144: return 'he3; 145: return 'he4; 146: return 'he5; 147: return 'he6;
      148: return 'he7; 149: return 'he8; 150: return 'he9; 151: return 'hea;
      152: return 'hf1; 153: return 'hf2; 154: return 'hf3; 155: return 'hf4;
      156: return 'hf5; 157: return 'hf6; 158: return 'hf7; 159: return 'hf8;
      160: return 'hf9; 161: return 'hfa;
      default: return 0;
    endcase
  endfunction

  // Canonical code construction (Annex C): walking the lengths 1..16 and the
  // symbols in HUFFVAL order, each code is the previous one plus one, shifted
  // left whenever the length grows.
  // Code table indexed by symbol: {length[20:16], code[15:0]}, 0 = no code.
  typedef logic [20:0] hufftab_t [256];

  function automatic hufftab_t huff_table(input bit is_ac);
    hufftab_t t;
    int code, k, cnt;
    logic [7:0] sym;
    for (int i = 0; i < 256; i++) t[i] = '0;
    code = 0;
    k = 0;
    for (int l = 1; l <= 16; l++) begin
      cnt = is_ac ? ac_bits(l) : dc_bits(l);
      for (int j = 0; j < cnt; j++) begin
        sym = 8'(is_ac ? ac_val(k) : dc_val(k));
        t[sym] = 21'((l << 16) | code);
        code++;
        k++;
      end
      code = code << 1;
    end
    return t;
  endfunction

  // DCT matrix and quantizer reciprocal tables as constant arrays
  typedef logic signed [CFRAC+1:0] dctmat_t [64];  // index 8k + n

  function automatic dctmat_t dct_matrix();
    dctmat_t m;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        m[8*k+n] = (CFRAC+2)'(dct_coef(k, n));
    return m;
  endfunction

  typedef logic [12:0] qtab_t [64];

  function automatic qtab_t quant_table();
    qtab_t t;
    for (int i = 0; i < 64; i++) t[i] = 13'(quant_recip(i));
    return t;
  endfunction

  // JPEG size category: number of bits of |v|.
  function automatic logic [3:0] size_cat(input logic signed [CW:0] v);
    logic [CW:0] a;
    a = v[CW] ? -v : v;
    for (int b = CW; b >= 0; b--)
      if (a[b]) return 4'(b + 1);
    return 4'd0;
  endfunction

endpackage
