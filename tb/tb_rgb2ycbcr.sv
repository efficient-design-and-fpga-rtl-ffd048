// tb_rgb2ycbcr: self-checking test of the colour converter.
// Drives corner colours and random RGB triples, one per cycle, and compares
// each output with the conversion equations evaluated in real arithmetic
// (allowing one LSB for fixed-point rounding), and checks that every
// result appears exactly two cycles after its input.
module tb_rgb2ycbcr;
  import jpeg_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [7:0] r = 0, g = 0, b = 0;
  logic out_valid;
  sample_t y, cb, cr;
  int checks = 0, failures = 0;

  rgb2ycbcr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_clamp(input real v);
    int i;
    i = $rtoi(v + 1000.5) - 1000;   // round half up
    if (i > 127) i = 127;
    if (i < -128) i = -128;
    return i;
  endfunction

  logic [7:0] qr [$], qg [$], qb [$];
  int sent = 0, got = 0;
  int lat_hist [$];
  int cyc = 0;
  int t_in [$];
  always @(posedge clk) cyc <= cyc + 1;
  // input monitor: sample what the DUT samples
  always @(posedge clk) if (!rst && in_valid) begin
    qr.push_back(r); qg.push_back(g); qb.push_back(b); t_in.push_back(cyc);
  end

  // scoreboard
  always @(posedge clk) if (!rst && out_valid) begin
    logic [7:0] rr, gg, bb;
    int ey, ecb, ecr, t0;
    rr = qr.pop_front(); gg = qg.pop_front(); bb = qb.pop_front(); t0 = t_in.pop_front();
    ey  = rnd_clamp(0.299*rr + 0.587*gg + 0.114*bb - 128.0);
    ecb = rnd_clamp(-0.1687*rr - 0.3313*gg + 0.5*bb);
    ecr = rnd_clamp(0.5*rr - 0.4187*gg - 0.0813*bb);
    checks++;
    if ((int'(y) - ey) > 1 || (ey - int'(y)) > 1 ||
        (int'(cb) - ecb) > 1 || (ecb - int'(cb)) > 1 ||
        (int'(cr) - ecr) > 1 || (ecr - int'(cr)) > 1) begin
      failures++;
      if (failures < 10) $display("mismatch rgb=%0d,%0d,%0d got %0d %0d %0d exp %0d %0d %0d",
                                  rr, gg, bb, y, cb, cr, ey, ecb, ecr);
    end
    checks++;
    if (cyc - t0 != 2) begin
      failures++;
      $display("latency %0d, expected 2", cyc - t0);
    end
    got++;
  end

  task automatic drive(input logic [7:0] rr, input logic [7:0] gg, input logic [7:0] bb);
    r <= rr; g <= gg; b <= bb; in_valid <= 1;
    sent++;
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    drive(0, 0, 0); drive(255, 255, 255); drive(255, 0, 0); drive(0, 255, 0);
    drive(0, 0, 255); drive(0, 0, 0); drive(128, 128, 128);
    for (int i = 0; i < 3000; i++) begin
      drive(8'($urandom), 8'($urandom), 8'($urandom));
      if ($urandom % 4 == 0) begin   // idle cycle in between
        in_valid <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != sent) begin failures++; $display("sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
