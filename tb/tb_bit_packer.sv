// tb_bit_packer: self-checking test of the bit packer.
// Sends random codes of 1..27 bits (a share of them all ones, to provoke
// 0xFF bytes) with random stalls on both sides, then a flush. A reference
// model here keeps the bit string, pads it with ones, cuts it into bytes MSB
// first and inserts 0x00 after each 0xFF; the packer's output must equal
// it byte for byte. Repeated for several code streams.
module tb_bit_packer;
  import jpeg_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready;
  vlc_t in_vlc = '0;
  logic flush = 0;
  logic out_valid, out_ready = 0;
  logic [7:0] out_byte;
  logic idle;
  int checks = 0, failures = 0;
  int stuffed = 0;

  bit_packer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          bits_q [$];
  logic [7:0]  exp_q [$];
  logic [7:0]  got_q [$];

  always @(posedge clk) if (!rst && out_valid && out_ready) got_q.push_back(out_byte);
  bit ready_on = 0;
  always @(posedge clk) out_ready <= ready_on && ($urandom % 4 != 0);

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int run = 0; run < 8; run++) begin
      int ncodes;
      bits_q.delete(); exp_q.delete(); got_q.delete();
      ncodes = 50 + int'($urandom % 200);
      // a code is presented at 1 ns after an edge and taken at the next edge
      // where in_ready is 1 (in_ready depends only on registered state)
      ready_on = 1;
      #1;
      for (int i = 0; i < ncodes; i++) begin
        int len;
        logic [31:0] v;
        len = 1 + int'($urandom % 27);
        v = (($urandom % 3) == 0) ? 32'hFFFF_FFFF : $urandom;
        v = v & ((32'd1 << len) - 1);
        for (int b = len - 1; b >= 0; b--) bits_q.push_back(v[b]);
        in_valid = 1; in_vlc.bits = v; in_vlc.len = 6'(len);
        while (!in_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        in_valid = 0;
        while ($urandom % 3 == 0) begin @(posedge clk); #1; end
      end
      flush = 1;
      @(posedge clk); #1;
      flush = 0;
      @(posedge clk); #1;
      while (!idle) begin @(posedge clk); #1; end
      ready_on = 0;
      out_ready <= 0;
      // reference bytes
      while (bits_q.size() % 8 != 0) bits_q.push_back(1'b1);
      while (bits_q.size() > 0) begin
        logic [7:0] by;
        for (int b = 0; b < 8; b++) by = {by[6:0], bits_q.pop_front()};
        exp_q.push_back(by);
        if (by == 8'hFF) begin exp_q.push_back(8'h00); stuffed++; end
      end
      checks++;
      if (got_q.size() != exp_q.size()) begin
        failures++;
        $display("run %0d: %0d bytes, expected %0d", run, got_q.size(), exp_q.size());
      end
      for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
        checks++;
        if (got_q[i] != exp_q[i]) begin
          failures++;
          if (failures < 10) $display("run %0d byte %0d got %02h exp %02h", run, i, got_q[i], exp_q[i]);
        end
      end
    end
    checks++;
    if (stuffed == 0) begin failures++; $display("no 0xFF byte occurred"); end
    $display("bytes stuffed: %0d", stuffed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
