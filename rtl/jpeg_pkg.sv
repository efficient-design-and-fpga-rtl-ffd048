// jpeg_pkg: types and constants shared by the baseline JPEG encoder.
//
// Holds the fixed-point formats that pass between the pipeline stages, the
// zig-zag order of the reference design, the example
// quantisation tables and Huffman table specifications of the JPEG standard
// (ITU-T T.81 Annex K, the "baseline" tables), and constant functions that
// derive the per-compression-level quantiser steps and the zig-zag inverse.
// Everything here is evaluated at elaboration time; nothing in the package
// is a register.
package jpeg_pkg;

  // ---- pixel and coefficient formats ---------------------------------------
  localparam int SAMPLE_W   = 8;   // level-shifted sample, signed two's complement
  localparam int DCT_W      = 19;  // DCT result width (Result Width = 19)
  localparam int DCT_FRAC   = 7;   // fractional LSBs of a DCT result (12.7)
  localparam int QCOEF_W    = 12;  // quantised coefficient, signed (|v| <= 2047)

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [DCT_W-1:0]    dct_t;
  typedef logic signed [QCOEF_W-1:0]  qcoef_t;

  // Colour component being coded. Y uses table 0, Cb and Cr table 1.
  typedef enum logic [1:0] {COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2} comp_e;

  // A variable-length code ready for the bit packer: right-aligned bits, length.
  localparam int VLC_W = 32;
  typedef struct packed {
    logic [VLC_W-1:0] bits;
    logic [5:0]       len;
  } vlc_t;

  // ---- zig-zag order: ZIGZAG[row*8+col] = zig-zag index ---------
  localparam logic [5:0] ZIGZAG [64] = '{
     0,  1,  5,  6, 14, 15, 27, 28,
     2,  4,  7, 13, 16, 26, 29, 42,
     3,  8, 12, 17, 25, 30, 41, 43,
     9, 11, 18, 24, 31, 40, 44, 53,
    10, 19, 23, 32, 39, 45, 52, 54,
    20, 22, 33, 38, 46, 51, 55, 60,
    21, 34, 37, 47, 50, 56, 59, 61,
    35, 36, 48, 49, 57, 58, 62, 63};

  // Inverse: natural (row-major) position of zig-zag index k.
  function automatic logic [5:0] unzig(input int k);
    logic [5:0] r;
    r = '0;
    for (int i = 0; i < 64; i++) if (int'(ZIGZAG[i]) == k) r = 6'(i);
    return r;
  endfunction

  typedef logic [5:0] zz_t [64];
  function automatic zz_t make_unzig();
    zz_t u;
    for (int k = 0; k < 64; k++) u[k] = unzig(k);
    return u;
  endfunction
  localparam zz_t UNZIG = make_unzig();

  // ---- quantisation ----------------------------------------------------------
  // Annex K.1 example tables, natural (row-major) order.
  localparam logic [7:0] QTAB_LUMA [64] = '{
    16, 11, 10, 16, 24, 40, 51, 61,
    12, 12, 14, 19, 26, 58, 60, 55,
    14, 13, 16, 24, 40, 57, 69, 56,
    14, 17, 22, 29, 51, 87, 80, 62,
    18, 22, 37, 56, 68,109,103, 77,
    24, 35, 55, 64, 81,104,113, 92,
    49, 64, 78, 87,103,121,120,101,
    72, 92, 95, 98,112,100,103, 99};
  localparam logic [7:0] QTAB_CHROMA [64] = '{
    17, 18, 24, 47, 99, 99, 99, 99,
    18, 21, 26, 66, 99, 99, 99, 99,
    24, 26, 56, 99, 99, 99, 99, 99,
    47, 66, 99, 99, 99, 99, 99, 99,
    99, 99, 99, 99, 99, 99, 99, 99,
    99, 99, 99, 99, 99, 99, 99, 99,
    99, 99, 99, 99, 99, 99, 99, 99,
    99, 99, 99, 99, 99, 99, 99, 99};

  // The 2-bit Compression input scales both tables by 50 %, 100 %, 200 % or
  // 400 %: 0 gives the finest quantisation, 3 the strongest compression.
  localparam int QSCALE_PCT [4] = '{50, 100, 200, 400};

  // Quantiser step for compression level lvl, table t (0 luma, 1 chroma),
  // natural position pos: clamp((base*scale + 50) / 100, 1, 255).
  function automatic logic [7:0] qstep(input int lvl, input int t, input int pos);
    int v;
    v = ((t == 0 ? int'(QTAB_LUMA[pos]) : int'(QTAB_CHROMA[pos])) * QSCALE_PCT[lvl] + 50) / 100;
    if (v < 1)   v = 1;
    if (v > 255) v = 255;
    return 8'(v);
  endfunction

  // All quantiser steps as one ROM image, index {lvl[1:0], t, pos[5:0]}.
  typedef logic [7:0] qrom_t [512];
  function automatic qrom_t make_qrom();
    qrom_t q;
    for (int i = 0; i < 512; i++) q[i] = qstep(i / 128, (i / 64) % 2, i % 64);
    return q;
  endfunction
  localparam qrom_t QROM = make_qrom();

  // ---- Huffman table specifications (Annex K.3) ------------------------------
  // BITS[i] = number of codes of length i+1; HUFFVAL = symbols in code order.
  localparam logic [7:0] DCL_BITS [16] = '{0,1,5,1,1,1,1,1,1,0,0,0,0,0,0,0};
  localparam logic [7:0] DCC_BITS [16] = '{0,3,1,1,1,1,1,1,1,1,1,0,0,0,0,0};
  localparam logic [7:0] DC_VALS  [12] = '{0,1,2,3,4,5,6,7,8,9,10,11};
  localparam logic [7:0] ACL_BITS [16] = '{0,2,1,3,3,2,4,3,5,5,4,4,0,0,1,8'h7d};
  localparam logic [7:0] ACC_BITS [16] = '{0,2,1,2,4,4,3,4,7,5,4,4,0,1,2,8'h77};
  localparam logic [7:0] ACL_VALS [162] = '{
    8'h01, 8'h02, 8'h03, 8'h00, 8'h04, 8'h11, 8'h05, 8'h12, 8'h21, 8'h31, 8'h41, 8'h06, 8'h13, 8'h51, 8'h61, 8'h07, 8'h22, 8'h71, 8'h14, 8'h32, 8'h81, 8'h91, 8'ha1, 8'h08, 8'h23, 8'h42, 8'hb1, 8'hc1, 8'h15, 8'h52, 8'hd1, 8'hf0, 8'h24, 8'h33, 8'h62, 8'h72, 8'h82, 8'h09, 8'h0a, 8'h16, 8'h17, 8'h18, 8'h19, 8'h1a, 8'h25, 8'h26, 8'h27, 8'h28, 8'h29, 8'h2a, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39, 8'h3a, 8'h43, 8'h44, 8'h45, 8'h46, 8'h47, 8'h48, 8'h49, 8'h4a, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57, 8'h58, 8'h59, 8'h5a, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68, 8'h69, 8'h6a, 8'h73, 8'h74, 8'h75, 8'h76, 8'h77, 8'h78, 8'h79, 8'h7a, 8'h83, 8'h84, 8'h85, 8'h86, 8'h87, 8'h88, 8'h89, 8'h8a, 8'h92, 8'h93, 8'h94, 8'h95, 8'h96, 8'h97, 8'h98, 8'h99, 8'h9a, 8'ha2, 8'ha3, 8'ha4, 8'ha5, 8'ha6, 8'ha7, 8'ha8, 8'ha9, 8'haa, 8'hb2, 8'hb3, 8'hb4, 8'hb5, 8'hb6, 8'hb7, 8'hb8, 8'hb9, 8'hba, 8'hc2, 8'hc3, 8'hc4, 8'hc5, 8'hc6, 8'hc7, 8'hc8, 8'hc9, 8'hca, 8'hd2, 8'hd3, 8'hd4, 8'hd5, 8'hd6, 8'hd7, 8'hd8, 8'hd9, 8'hda, 8'he1, 8'he2, 8'he3, 8'he4, 8'he5, 8'he6, 8'he7, 8'he8, 8'he9, 8'hea, 8'hf1, 8'hf2, 8'hf3, 8'hf4, 8'hf5, 8'hf6, 8'hf7, 8'hf8, 8'hf9, 8'hfa};
  localparam logic [7:0] ACC_VALS [162] = '{
    8'h00, 8'h01, 8'h02, 8'h03, 8'h11, 8'h04, 8'h05, 8'h21, 8'h31, 8'h06, 8'h12, 8'h41, 8'h51, 8'h07, 8'h61, 8'h71, 8'h13, 8'h22, 8'h32, 8'h81, 8'h08, 8'h14, 8'h42, 8'h91, 8'ha1, 8'hb1, 8'hc1, 8'h09, 8'h23, 8'h33, 8'h52, 8'hf0, 8'h15, 8'h62, 8'h72, 8'hd1, 8'h0a, 8'h16, 8'h24, 8'h34, 8'he1, 8'h25, 8'hf1, 8'h17, 8'h18, 8'h19, 8'h1a, 8'h26, 8'h27, 8'h28, 8'h29, 8'h2a, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39, 8'h3a, 8'h43, 8'h44, 8'h45, 8'h46, 8'h47, 8'h48, 8'h49, 8'h4a, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57, 8'h58, 8'h59, 8'h5a, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68, 8'h69, 8'h6a, 8'h73, 8'h74, 8'h75, 8'h76, 8'h77, 8'h78, 8'h79, 8'h7a, 8'h82, 8'h83, 8'h84, 8'h85, 8'h86, 8'h87, 8'h88, 8'h89, 8'h8a, 8'h92, 8'h93, 8'h94, 8'h95, 8'h96, 8'h97, 8'h98, 8'h99, 8'h9a, 8'ha2, 8'ha3, 8'ha4, 8'ha5, 8'ha6, 8'ha7, 8'ha8, 8'ha9, 8'haa, 8'hb2, 8'hb3, 8'hb4, 8'hb5, 8'hb6, 8'hb7, 8'hb8, 8'hb9, 8'hba, 8'hc2, 8'hc3, 8'hc4, 8'hc5, 8'hc6, 8'hc7, 8'hc8, 8'hc9, 8'hca, 8'hd2, 8'hd3, 8'hd4, 8'hd5, 8'hd6, 8'hd7, 8'hd8, 8'hd9, 8'hda, 8'he2, 8'he3, 8'he4, 8'he5, 8'he6, 8'he7, 8'he8, 8'he9, 8'hea, 8'hf2, 8'hf3, 8'hf4, 8'hf5, 8'hf6, 8'hf7, 8'hf8, 8'hf9, 8'hfa};

  // Huffman table selector: {class, id}; class 0 = DC, 1 = AC; id 0 luma, 1 chroma.
  typedef enum logic [1:0] {HT_DC_L = 2'd0, HT_DC_C = 2'd1, HT_AC_L = 2'd2, HT_AC_C = 2'd3} htab_e;

  function automatic int hbits(input htab_e t, input int i);
    case (t)
      HT_DC_L: return int'(DCL_BITS[i]);
      HT_DC_C: return int'(DCC_BITS[i]);
      HT_AC_L: return int'(ACL_BITS[i]);
      default: return int'(ACC_BITS[i]);
    endcase
  endfunction

  function automatic int hval(input htab_e t, input int i);
    case (t)
      HT_DC_L, HT_DC_C: return (i < 12) ? int'(DC_VALS[i]) : 0;
      HT_AC_L: return int'(ACL_VALS[i]);
      default: return int'(ACC_VALS[i]);
    endcase
  endfunction

  function automatic int hnvals(input htab_e t);
    return (t == HT_DC_L || t == HT_DC_C) ? 12 : 162;
  endfunction

  // Magnitude category (SSSS) of a coefficient or DC difference:
  // the number of bits needed for |v|.
  function automatic logic [3:0] category(input logic signed [QCOEF_W:0] v);
    logic [QCOEF_W:0] a;
    logic [3:0] c;
    a = v[QCOEF_W] ? (QCOEF_W+1)'(-v) : v;
    c = '0;
    for (int b = 0; b < 12; b++) if (a[b]) c = 4'(b + 1);
    return c;
  endfunction

endpackage
