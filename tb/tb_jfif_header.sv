// tb_jfif_header: self-checking test of the JFIF header generator.
// Produces headers for colour and mono images at several sizes and
// compression levels, with random stalls, and checks: total length (607 /
// 324 bytes), SOI and the JFIF APP0 identifier, that the segments chain
// correctly through their length fields in the order APP0, DQT, SOF0, DHT,
// SOS, the frame size and component count in SOF0, the first DQT entries
// against the standard luminance table read in zig-zag order (16 11 12 14
// 12 10 16 14 at 100 %), the DHT symbol counts (12 DC, 162 AC) and that
// `done` pulses once per header.
module tb_jfif_header;
  logic clk = 0, rst = 1;
  logic start = 0, mono = 0;
  logic [1:0] level = 0;
  logic [15:0] width = 0, height = 0;
  logic out_valid, out_ready = 0;
  logic [7:0] out_byte;
  logic done;
  int checks = 0, failures = 0;

  jfif_header dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] hdr [$];
  int ndone = 0;
  always @(posedge clk) if (!rst && out_valid && out_ready) hdr.push_back(out_byte);
  always @(posedge clk) if (!rst && done) ndone++;
  bit rdy_on = 0;
  always @(posedge clk) out_ready <= rdy_on && ($urandom % 5 != 0);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int be16(input int p);
    return {hdr[p], hdr[p+1]};
  endfunction

  task automatic run(input bit m, input int lvl, input int w, input int h);
    int p, len, nc, exp_mark [5], seg, tot, pct;
    int lum_zz [8] = '{16, 11, 12, 14, 12, 10, 16, 14};
    hdr.delete();
    ndone = 0;
    mono = m; level = 2'(lvl); width = 16'(w); height = 16'(h);
    @(posedge clk); #1;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    rdy_on = 1;
    repeat (3000) @(posedge clk);
    rdy_on = 0;
    @(posedge clk); #1;
    nc = m ? 1 : 3;
    check(hdr.size() == (m ? 324 : 607), $sformatf("header length %0d", hdr.size()));
    check(ndone == 1, "done pulses");
    if (hdr.size() < 20) return;
    check(hdr[0] == 8'hFF && hdr[1] == 8'hD8, "SOI");
    check(hdr[6] == "J" && hdr[7] == "F" && hdr[8] == "I" && hdr[9] == "F" && hdr[10] == 0, "JFIF id");
    exp_mark = '{8'hE0, 8'hDB, 8'hC0, 8'hC4, 8'hDA};
    p = 2;
    pct = (lvl == 0) ? 50 : (lvl == 1) ? 100 : (lvl == 2) ? 200 : 400;
    for (seg = 0; seg < 5 && p + 3 < hdr.size(); seg++) begin
      check(hdr[p] == 8'hFF && int'(hdr[p+1]) == exp_mark[seg], $sformatf("marker %0d", seg));
      len = be16(p + 2);
      case (seg)
        1: begin
          check(len == 2 + 65 * (m ? 1 : 2), "DQT length");
          check(hdr[p+4] == 0, "DQT table 0 id");
          for (int k = 0; k < 8; k++) begin
            int q;
            q = (lum_zz[k] * pct + 50) / 100;
            check(int'(hdr[p+5+k]) == q, $sformatf("DQT entry %0d = %0d, expected %0d", k, hdr[p+5+k], q));
          end
          if (!m) check(hdr[p+4+65] == 1, "DQT table 1 id");
        end
        2: begin
          check(len == 8 + 3 * nc, "SOF length");
          check(hdr[p+4] == 8, "precision");
          check(be16(p + 5) == h && be16(p + 7) == w, "frame size");
          check(int'(hdr[p+9]) == nc, "component count");
          for (int c = 0; c < nc; c++)
            check(int'(hdr[p+10+3*c]) == c + 1 && hdr[p+11+3*c] == 8'h11 &&
                  int'(hdr[p+12+3*c]) == (c == 0 ? 0 : 1), "component spec");
        end
        3: begin
          int q, n, cnt;
          q = p + 4;
          cnt = 0;
          while (q < p + 2 + len) begin
            n = 0;
            for (int i = 1; i <= 16; i++) n += int'(hdr[q+i]);
            check(n == ((hdr[q] >> 4) == 0 ? 12 : 162), "DHT symbol count");
            q += 17 + n;
            cnt++;
          end
          check(q == p + 2 + len, "DHT tables fill segment");
          check(cnt == (m ? 2 : 4), "DHT table count");
        end
        4: begin
          check(len == 6 + 2 * nc && int'(hdr[p+4]) == nc, "SOS length and count");
          check(hdr[p+2+len-3] == 0 && hdr[p+2+len-2] == 8'h3F && hdr[p+2+len-1] == 0, "SOS spectral range");
        end
        default: check(len == 16, "APP0 length");
      endcase
      p += 2 + len;
    end
    check(seg == 5 && p == hdr.size(), "segments end exactly at the header end");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    run(0, 1, 32, 32);
    run(1, 1, 640, 480);
    run(0, 0, 1008, 496);
    run(1, 3, 16, 16);
    run(0, 2, 8, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
