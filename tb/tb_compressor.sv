// tb_compressor: end-to-end test of the JPEG encoder at its default size.
//
// Encodes four generated images (32x32 colour at level 1, 32x16 mono at
// level 3, 48x24 colour at level 0, and a 1016x8 colour strip at level 3,
// the widest line the ports allow), feeding pixels whenever ProcessingRGB
// allows, with random gaps, and collects the bytes written through
// addr/din/we in a memory model. Each file is then parsed like a decoder
// would: SOI, APP0, DQT, SOF0, DHT and SOS are read, the Huffman tables are
// loaded from the file's DHT segment into an independent decoder, byte
// stuffing is removed and every block is decoded. The quantised
// coefficients must match a real-arithmetic reference (colour conversion,
// level shift, 2-D DCT, division by the file's own DQT steps, rounding)
// within one step, the padding must be 1-bits, and the file must end in
// EOI with nothing after it. Counts, and requires at least once: input
// stalls (ProcessingRGB low while a pixel waits), ZRL codes, EOB codes,
// blocks ending without EOB, stuffed 0x00 bytes, final padding bits, the
// mono and the colour mode.
module tb_compressor;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  logic clk = 0, reset = 1;
  logic [7:0] Red = 0, Green = 0, Blue = 0;
  logic ProcessRGB = 0, ProcessingRGB;
  logic CompressImage = 0;
  logic [1:0] Compression = 0;
  logic Mono = 0;
  logic [9:0] ImgColumns = 0;
  logic [8:0] ImgLines = 0;
  logic Compressing;
  logic [15:0] addr;
  logic [7:0] din;
  logic we;
  int checks = 0, failures = 0;

  compressor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- image memory ----
  logic [7:0] mem [65536];
  int nbytes;
  always @(posedge clk) if (!reset && we) begin
    mem[addr] <= din;
    if (int'(addr) + 1 > nbytes) nbytes <= int'(addr) + 1;
  end

  // ---- mechanism counters ----
  int n_stall = 0, n_zrl = 0, n_eob = 0, n_noeob = 0, n_stuff = 0, n_pad = 0;
  int n_mono = 0, n_color = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // generated test image: gradients, noise and a checkerboard block
  function automatic logic [23:0] pixel(input int img, input int x, input int y);
    int r, g, b;
    r = (x * 5 + y * 3 + img * 40) % 256;
    g = (255 - x * 4 + y * 6) % 256;
    b = (x * y + img * 17) % 256;
    if ((x / 8 + y / 8) % 3 == 1) begin       // noisy blocks
      r = (r + int'($urandom % 96)) % 256;
      g = (g + int'($urandom % 96)) % 256;
      b = (b + int'($urandom % 96)) % 256;
    end
    if (x / 8 == 1 && y / 8 == 0) begin       // checkerboard block
      r = ((x + y) % 2) ? 255 : 0;
      g = r; b = 255 - r;
    end
    return {8'(r), 8'(g), 8'(b)};
  endfunction

  logic [23:0] img_px [1024][512];

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int t_start, t_end;

  task automatic encode(input int img, input bit m, input int lvl, input int w, input int h);
    int x, y;
    nbytes = 0;
    for (int yy = 0; yy < h; yy++)
      for (int xx = 0; xx < w; xx++) img_px[xx][yy] = pixel(img, xx, yy);
    @(posedge clk); #1;
    Mono = m; Compression = 2'(lvl); ImgColumns = 10'(w); ImgLines = 9'(h);
    CompressImage = 1;
    t_start = cyc;
    @(posedge clk); #1;
    CompressImage = 0;
    check(Compressing, "Compressing after CompressImage");
    x = 0; y = 0;
    while (y < h) begin
      if ($urandom % 5 == 0) begin
        ProcessRGB = 0;
        @(posedge clk); #1;
        continue;
      end
      {Red, Green, Blue} = img_px[x][y];
      ProcessRGB = 1;
      #1;
      if (!ProcessingRGB) n_stall++;
      while (!ProcessingRGB) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      ProcessRGB = 0;
      x++;
      if (x == w) begin x = 0; y++; end
    end
    while (Compressing) begin @(posedge clk); #1; end
    t_end = cyc;
    repeat (3) @(posedge clk); #1;
    check_file(m, lvl, w, h);
  endtask

  task automatic check_file(input bit m, input int lvl, input int w, input int h);
    int p, len, nc, q [2][64], qsel [3], sos, sp, exact, near, total;
    int dc_id [3], ac_id [3];
    int zz [64];
    real blk [64];
    real f [64];
    jpeg_ref_pkg::huff_decoder hd = new();
    int bits [16], vals [256];
    bit seen_sos;

    check(mem[0] == 8'hFF && mem[1] == 8'hD8, "SOI");
    p = 2; seen_sos = 0; nc = 0; sos = 0;
    while (!seen_sos && p < nbytes) begin
      int mk;
      mk = int'(mem[p+1]);
      len = {mem[p+2], mem[p+3]};
      check(mem[p] == 8'hFF, $sformatf("marker expected at %0d", p));
      case (mk)
        'hDB: begin
          int s;
          s = p + 4;
          while (s < p + 2 + len) begin
            for (int k = 0; k < 64; k++) q[mem[s] & 1][UNZIG_REF(k)] = int'(mem[s+1+k]);
            s += 65;
          end
        end
        'hC0: begin
          check({mem[p+5], mem[p+6]} == 16'(h) && {mem[p+7], mem[p+8]} == 16'(w), "SOF size");
          nc = int'(mem[p+9]);
          check(nc == (m ? 1 : 3), "SOF component count");
          for (int c = 0; c < nc && c < 3; c++) qsel[c] = int'(mem[p+12+3*c]);
        end
        'hC4: begin
          int s, n, t;
          s = p + 4;
          while (s < p + 2 + len) begin
            t = int'(mem[s] >> 4) * 2 + int'(mem[s] & 15);
            n = 0;
            for (int i = 0; i < 16; i++) begin bits[i] = int'(mem[s+1+i]); n += bits[i]; end
            for (int i = 0; i < 256; i++) vals[i] = (i < n) ? int'(mem[s+17+i]) : 0;
            hd.load_table(t, bits, vals);
            s += 17 + n;
          end
        end
        'hDA: begin
          for (int c = 0; c < nc; c++) begin
            dc_id[c] = int'(mem[p+6+2*c] >> 4);
            ac_id[c] = int'(mem[p+6+2*c] & 15);
          end
          seen_sos = 1;
        end
        default: ;
      endcase
      p += 2 + len;
    end
    check(seen_sos, "SOS found");
    check(mem[nbytes-2] == 8'hFF && mem[nbytes-1] == 8'hD9, "EOI at end of file");
    // scan data with stuffing removed
    sp = p;
    while (sp < nbytes - 2) begin
      for (int b = 7; b >= 0; b--) hd.q.push_back(mem[sp][b]);
      if (mem[sp] == 8'hFF) begin
        check(mem[sp+1] == 8'h00, "0xFF in scan data is followed by 0x00");
        n_stuff++;
        sp++;
      end
      sp++;
    end
    // decode and compare
    hd.pred = '{0, 0, 0};
    exact = 0; near = 0; total = 0;
    for (int by = 0; by < h / 8; by++)
      for (int bx = 0; bx < w / 8; bx++)
        for (int c = 0; c < nc; c++) begin
          int err, neob0;
          neob0 = hd.n_eob;
          check(dc_id[c] == (c == 0 ? 0 : 1) && ac_id[c] == (c == 0 ? 0 : 1), "SOS table selectors");
          err = hd.decode_block(c, zz);
          check(err == 0, $sformatf("decode error in block %0d,%0d comp %0d", bx, by, c));
          if (hd.n_eob == neob0) n_noeob++;
          for (int i = 0; i < 64; i++) begin
            logic [23:0] px;
            px = img_px[bx*8 + i%8][by*8 + i/8];
            blk[i] = (c == 0) ? ref_y(px[23:16], px[15:8], px[7:0]) :
                     (c == 1) ? ref_cb(px[23:16], px[15:8], px[7:0]) :
                                ref_cr(px[23:16], px[15:8], px[7:0]);
          end
          ref_dct(blk, f);
          for (int k = 0; k < 64; k++) begin
            real x;
            int e, d, pos;
            pos = UNZIG_REF(k);
            x = f[pos] / real'(q[qsel[c]][pos]);
            e = (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
            d = zz[k] - e;
            total++;
            if (d == 0) exact++;
            else if (d == 1 || d == -1) near++;
            else check(0, $sformatf("block %0d,%0d comp %0d zz %0d: %0d, expected %0d",
                                    bx, by, c, k, zz[k], e));
          end
        end
    n_zrl += hd.n_zrl;
    n_eob += hd.n_eob;
    check(hd.q.size() < 8, $sformatf("%0d bits left after the last block", hd.q.size()));
    n_pad += hd.q.size();
    foreach (hd.q[i]) check(hd.q[i] == 1'b1, "padding bits are ones");
    check(exact * 100 >= total * 97, $sformatf("only %0d of %0d coefficients exact", exact, total));
    if (m) n_mono++; else n_color++;
    $display("image %0dx%0d %s level %0d: %0d bytes in %0d cycles, %0d/%0d coefficients exact, %0d off by one",
             w, h, m ? "mono" : "colour", lvl, nbytes, t_end - t_start, exact, total, near);
  endtask

  function automatic int UNZIG_REF(input int k);
    // natural position of zig-zag index k, by walking the anti-diagonals
    int n;
    n = 0;
    for (int s = 0; s < 15; s++)
      for (int i = 0; i < 8; i++) begin
        int rr, cc;
        rr = (s % 2 == 0) ? (s - i) : i;
        cc = s - rr;
        if (rr >= 0 && rr < 8 && cc >= 0 && cc < 8) begin
          if (n == k) return rr * 8 + cc;
          n++;
        end
      end
    return 0;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    repeat (2) @(posedge clk);
    encode(0, 0, 1, 32, 32);
    encode(1, 1, 3, 32, 16);
    encode(2, 0, 0, 48, 24);
    encode(3, 0, 3, 1016, 8);     // widest strip the ports allow
    $display("stalls %0d, ZRL %0d, EOB %0d, no-EOB blocks %0d, stuffed %0d, pad bits %0d, mono %0d, colour %0d",
             n_stall, n_zrl, n_eob, n_noeob, n_stuff, n_pad, n_mono, n_color);
    check(n_stall > 0, "input stall never happened");
    check(n_zrl > 0, "ZRL never happened");
    check(n_eob > 0, "EOB never happened");
    check(n_noeob > 0, "block without EOB never happened");
    check(n_stuff > 0, "byte stuffing never happened");
    check(n_pad > 0, "padding never happened");
    check(n_mono > 0 && n_color > 0, "both modes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
