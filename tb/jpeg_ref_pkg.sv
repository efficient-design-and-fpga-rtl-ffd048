// jpeg_ref_pkg: reference routines for the testbenches.
//
// A baseline Huffman decoder written after the decoding procedure of the
// JPEG standard (MINCODE/MAXCODE/VALPTR tables, DECODE, RECEIVE, EXTEND),
// which is a different algorithm from the encoder's code lookup, plus
// real-arithmetic models of the colour conversion and the 2-D DCT. The
// testbenches decode what the encoder produced and compare it with these
// models.
package jpeg_ref_pkg;
  import jpeg_pkg::*;

  // Decoder state: derived tables, the bit string still to be decoded, the
  // DC predictors and counters of the ZRL and EOB symbols met so far.
  class huff_decoder;
    int maxcode [4][18];
    int mincode [4][18];
    int valptr  [4][18];
    int tvals   [4][256];
    bit q [$];
    int pred [3];
    int n_zrl, n_eob, err;

    // Load one table from a BITS/HUFFVAL specification (as in a DHT segment).
    function void load_table(input int t, input int bits [16], input int vals [256]);
      int code, k;
      tvals[t] = vals;
      code = 0; k = 0;
      for (int l = 1; l <= 16; l++) begin
        if (bits[l-1] == 0) begin
          maxcode[t][l] = -1;
        end else begin
          valptr[t][l]  = k;
          mincode[t][l] = code;
          code += bits[l-1];
          k    += bits[l-1];
          maxcode[t][l] = code - 1;
        end
        code = code << 1;
      end
      maxcode[t][17] = 32'h7fffffff;
    endfunction

    // Load the standard tables held in jpeg_pkg.
    function void load_standard();
      int b [16];
      int v [256];
      for (int t = 0; t < 4; t++) begin
        for (int i = 0; i < 16; i++) b[i] = hbits(htab_e'(t), i);
        for (int i = 0; i < 256; i++) v[i] = (i < hnvals(htab_e'(t))) ? hval(htab_e'(t), i) : 0;
        load_table(t, b, v);
      end
    endfunction

    function int nextbit();
      if (q.size() == 0) begin err++; return 0; end
      return int'(q.pop_front());
    endfunction

    function int decode(input int t);
      int code, l;
      code = nextbit();
      l = 1;
      while (l <= 16 && code > maxcode[t][l]) begin
        code = (code << 1) | nextbit();
        l++;
      end
      if (l > 16) begin err++; return 0; end
      return tvals[t][valptr[t][l] + code - mincode[t][l]];
    endfunction

    function int receive_extend(input int s);
      int v;
      v = 0;
      for (int i = 0; i < s; i++) v = (v << 1) | nextbit();
      if (s > 0 && v < (1 << (s - 1))) v = v - (1 << s) + 1;
      return v;
    endfunction

    // Decode one block of component c (0 = Y: tables 0/2, else 1/3);
    // zz[k] receives the coefficient of zig-zag index k. Returns the number
    // of decoding errors.
    function int decode_block(input int c, output int zz [64]);
      int s, k, rs, dc_t, ac_t;
      dc_t = (c == 0) ? 0 : 1;
      ac_t = (c == 0) ? 2 : 3;
      err = 0;
      for (int i = 0; i < 64; i++) zz[i] = 0;
      s = decode(dc_t);
      pred[c] = pred[c] + receive_extend(s);
      zz[0] = pred[c];
      k = 1;
      while (k < 64 && err == 0) begin
        rs = decode(ac_t);
        if (rs == 0) begin n_eob++; break; end
        if (rs == 'hF0) begin n_zrl++; k += 16; continue; end
        k += rs >> 4;
        if (k > 63) begin err++; break; end
        zz[k] = receive_extend(rs & 15);
        k++;
      end
      return err;
    endfunction
  endclass

  // Reference colour conversion followed by the level shift, real arithmetic.
  function automatic real ref_y(input int r, input int g, input int b);
    return 0.299 * r + 0.587 * g + 0.114 * b - 128.0;
  endfunction
  function automatic real ref_cb(input int r, input int g, input int b);
    return -0.1687 * r - 0.3313 * g + 0.5 * b;
  endfunction
  function automatic real ref_cr(input int r, input int g, input int b);
    return 0.5 * r - 0.4187 * g - 0.0813 * b;
  endfunction

  // Reference 2-D forward DCT of a row-major block.
  function automatic void ref_dct(input real s [64], output real f [64]);
    real cu, cv, acc;
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        acc = 0.0;
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            acc += s[y*8+x] * $cos((2*x+1)*u*3.14159265358979323846/16.0)
                            * $cos((2*y+1)*v*3.14159265358979323846/16.0);
        cu = (u == 0) ? 0.70710678118654752 : 1.0;
        cv = (v == 0) ? 0.70710678118654752 : 1.0;
        f[v*8+u] = 0.25 * cu * cv * acc;
      end
  endfunction

endpackage
