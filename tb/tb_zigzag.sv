// tb_zigzag: self-checking test of the zig-zag reorder buffer.
// Writes blocks whose coefficient at natural position p is a known tag in a
// random order, then reads them out with random back-pressure and checks
// that the k-th output is the coefficient of the natural position the
// zig-zag scan visits k-th. The expected order is produced here by walking
// the anti-diagonals of the 8x8 block, independently of the table in the RTL.
module tb_zigzag;
  import jpeg_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready;
  logic [5:0] in_pos = 0;
  qcoef_t in_coef = 0;
  logic out_valid, out_ready = 0, out_last;
  qcoef_t out_coef;
  logic [5:0] out_zz;
  int checks = 0, failures = 0;

  zigzag dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int order [64];   // order[k] = natural position visited k-th
  initial begin
    int k = 0;
    for (int s = 0; s < 15; s++) begin
      for (int i = 0; i < 8; i++) begin
        int rr, cc;
        // even diagonals run up-right (row decreasing), odd ones down-left
        rr = (s % 2 == 0) ? (s - i) : i;
        cc = s - rr;
        if (rr >= 0 && rr < 8 && cc >= 0 && cc < 8) begin
          order[k] = rr * 8 + cc;
          k++;
        end
      end
    end
  end

  initial begin
    int perm [64];
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int blk = 0; blk < 20; blk++) begin
      for (int i = 0; i < 64; i++) perm[i] = i;
      if (blk > 0) perm.shuffle();
      for (int i = 0; i < 64; i++) begin
        in_valid <= 1; in_pos <= 6'(perm[i]); in_coef <= qcoef_t'(blk * 64 + perm[i] - 600);
        @(posedge clk);
      end
      in_valid <= 0;
      for (int k = 0; k < 64; ) begin
        out_ready <= ($urandom % 3 != 0);
        @(posedge clk);
        if (out_valid && out_ready) begin
          checks++;
          if (out_coef != qcoef_t'(blk * 64 + order[k] - 600) || out_zz != 6'(k)
              || out_last != (k == 63)) begin
            failures++;
            if (failures < 10) $display("blk %0d k %0d got %0d exp %0d", blk, k, out_coef,
                                        blk * 64 + order[k] - 600);
          end
          k++;
        end
      end
      out_ready <= 0;
      @(posedge clk);
      checks++;
      if (out_valid || !in_ready) begin failures++; $display("buffer not empty after block"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
