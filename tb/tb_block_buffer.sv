// tb_block_buffer: self-checking test of the strip buffer.
// Writes strips of a 32-pixel-wide image (each component carries a tag
// derived from its line and column) with random gaps, checks that `full`
// rises exactly after the 8th line and blocks further writes, then reads
// every block of every component and compares the 64 samples, in row-major
// order, with the tags expected at those image positions. Also checks the
// read latency (first sample three edges after rd_start) and that the
// 64 samples are contiguous.
module tb_block_buffer;
  import jpeg_pkg::*;
  logic clk = 0, rst = 1;
  logic [9:0] cols = 10'd32;
  logic wr_valid = 0, wr_ready, full, release_strip = 0;
  sample_t wr_y = 0, wr_cb = 0, wr_cr = 0;
  logic rd_start = 0, rd_busy, rd_valid;
  logic [6:0] rd_bx = 0;
  comp_e rd_comp = COMP_Y;
  sample_t rd_data;
  int checks = 0, failures = 0;

  block_buffer #(.MAX_COLS(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t tag(input int strip, input int c, input int line, input int col);
    return sample_t'(strip * 37 + c * 91 + line * 13 + col * 5);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int strip = 0; strip < 3; strip++) begin
      for (int line = 0; line < 8; line++)
        for (int col = 0; col < 32; col++) begin
          while ($urandom % 4 == 0) begin wr_valid <= 0; @(posedge clk); end
          wr_valid <= 1;
          wr_y <= tag(strip, 0, line, col); wr_cb <= tag(strip, 1, line, col);
          wr_cr <= tag(strip, 2, line, col);
          @(posedge clk); #1;
          checks++;
          if (full != (line == 7 && col == 31)) begin failures++; $display("full wrong"); end
        end
      // one extra pixel must be refused
      wr_y <= 8'sd99;
      @(posedge clk);
      wr_valid <= 0;
      checks++;
      if (wr_ready) begin failures++; $display("accepting while full"); end
      for (int bx = 0; bx < 4; bx++)
        for (int c = 0; c < 3; c++) begin
          int n, t, first;
          rd_start <= 1; rd_bx <= 7'(bx); rd_comp <= comp_e'(c);
          @(posedge clk);
          rd_start <= 0;
          n = 0; first = -1;
          for (t = 1; t < 100 && n < 64; t++) begin
            @(posedge clk); #1;
            if (rd_valid) begin
              if (first < 0) first = t;
              checks++;
              if (rd_data != tag(strip, c, n / 8, bx * 8 + n % 8) || t != first + n) begin
                failures++;
                if (failures < 10) $display("strip %0d bx %0d c %0d n %0d got %0d", strip, bx, c, n, rd_data);
              end
              n++;
            end
          end
          checks++;
          if (first != 2) begin failures++; $display("first sample after %0d cycles", first); end
          while (rd_busy) @(posedge clk);
        end
      release_strip <= 1;
      @(posedge clk);
      release_strip <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
