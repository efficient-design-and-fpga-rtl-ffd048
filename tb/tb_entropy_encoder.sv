// tb_entropy_encoder: self-checking test of the Huffman entropy coder.
// Sends blocks of zig-zag ordered coefficients for Y, Cb and Cr in turn:
// empty blocks, DC-only blocks, blocks whose last coefficient is nonzero (no
// EOB), blocks with zero runs of 16, 31 and 47 before a nonzero coefficient
// (ZRL codes), and random blocks with values up to +-1023, with random
// back-pressure on the output. The emitted codes are concatenated and
// decoded with an independent standard Huffman decoder; every coefficient
// must come back. One hand-worked block is also checked bit for bit: a luma
// block with DC difference 0 and no AC coefficients is "00" + "1010".
module tb_entropy_encoder;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic clear_pred = 0;
  comp_e comp = COMP_Y;
  logic in_valid = 0, in_ready;
  qcoef_t in_coef = 0;
  logic in_dc = 0, in_last = 0;
  logic out_valid, out_ready = 0;
  vlc_t out_vlc;
  logic blk_done, idle;
  int checks = 0, failures = 0;

  entropy_encoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  jpeg_ref_pkg::huff_decoder hd = new();
  int ncodes = 0;
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    for (int b = int'(out_vlc.len) - 1; b >= 0; b--) hd.q.push_back(out_vlc.bits[b]);
    ncodes++;
  end
  bit rdy_on = 0;
  always @(posedge clk) out_ready <= rdy_on && ($urandom % 4 != 0);

  int sent [$][64];
  int sent_comp [$];
  int done_cnt = 0;
  always @(posedge clk) if (!rst && blk_done) done_cnt++;

  task automatic send_block(input int c, input int zz [64]);
    comp = comp_e'(c);
    for (int k = 0; k < 64; k++) begin
      in_valid = 1; in_coef = qcoef_t'(zz[k]); in_dc = (k == 0); in_last = (k == 63);
      #1;   // let in_ready settle (it depends on the coefficient)
      while (!in_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    in_valid = 0; in_dc = 0; in_last = 0;
    sent.push_back(zz);
    sent_comp.push_back(c);
  endtask

  initial begin
    int zz [64];
    int dec [64];
    int err, c, nblk;
    hd.load_standard();
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    clear_pred = 1;
    @(posedge clk); #1;
    clear_pred = 0;
    rdy_on = 1;
    // hand-worked case: luma, DC 0, nothing else
    for (int k = 0; k < 64; k++) zz[k] = 0;
    send_block(0, zz);
    repeat (10) @(posedge clk); #1;
    checks++;
    if (hd.q.size() != 6 || {hd.q[0], hd.q[1], hd.q[2], hd.q[3], hd.q[4], hd.q[5]} != 6'b001010) begin
      failures++; $display("empty luma block coded wrongly (%0d bits)", hd.q.size());
    end
    nblk = 60;
    for (int b = 0; b < nblk; b++) begin
      c = b % 3;
      for (int k = 0; k < 64; k++) zz[k] = 0;
      case (b % 6)
        0: zz[0] = int'($urandom % 2047) - 1023;
        1: begin zz[0] = 5; zz[63] = -1; end
        2: begin zz[17] = 3; zz[49] = -700; zz[63] = 1; end             // runs of 16 and 31
        3: begin zz[1] = 1; zz[49] = 2; end                             // run of 47
        default: for (int k = 0; k < 64; k++)
                   if ($urandom % 3 == 0) zz[k] = int'($urandom % 2047) - 1023;
      endcase
      send_block(c, zz);
    end
    repeat (20) @(posedge clk); #1;
    checks++;
    if (done_cnt != nblk + 1) begin failures++; $display("blk_done %0d times", done_cnt); end
    // decode everything
    hd.pred = '{0, 0, 0};
    hd.n_zrl = 0; hd.n_eob = 0;
    foreach (sent[i]) begin
      c = sent_comp[i];
      err = hd.decode_block(c, dec);
      checks++;
      if (err != 0) begin failures++; $display("block %0d: decode error", i); end
      for (int k = 0; k < 64; k++) begin
        checks++;
        if (dec[k] != sent[i][k]) begin
          failures++;
          if (failures < 10) $display("block %0d k %0d got %0d exp %0d", i, k, dec[k], sent[i][k]);
        end
      end
    end
    checks++;
    if (hd.q.size() != 0) begin failures++; $display("%0d bits left over", hd.q.size()); end
    checks++;
    if (hd.n_zrl == 0) begin failures++; $display("no ZRL seen"); end
    $display("codes %0d, ZRL %0d, EOB %0d", ncodes, hd.n_zrl, hd.n_eob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
