// tb_dct2d: self-checking test of the 8x8 forward DCT.
// Feeds blocks (all -128, all +127, a single impulse, random samples) and
// compares each of the 64 outputs with the 2-D DCT evaluated in real
// arithmetic; a result in 12.7 format may be off by at most 3 LSBs
// (0.023). Also checks the handshake timing: rfd falls after the 64th
// input, the first output follows 65 cycles after the last input, and the
// 64 outputs come on consecutive cycles.
module tb_dct2d;
  logic clk = 0, rst = 1;
  logic signed [7:0] din = 0;
  logic nd = 0;
  logic rfd, rdy;
  logic signed [18:0] dout;
  int checks = 0, failures = 0;

  dct2d dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979323846;
  int blk [64];
  real ref_f [64];

  function automatic real cc(input int k);
    return (k == 0) ? 0.70710678118654752 : 1.0;
  endfunction

  task automatic compute_ref();
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        real s;
        s = 0.0;
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            s += blk[y*8+x] * $cos((2*x+1)*u*PI/16.0) * $cos((2*y+1)*v*PI/16.0);
        ref_f[v*8+u] = 0.25 * cc(u) * cc(v) * s;
      end
  endtask

  task automatic run_block();
    int last_in, first_out, n;
    compute_ref();
    while (!rfd) @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      din <= 8'(blk[i]); nd <= 1;
      @(posedge clk);
    end
    nd <= 0;
    last_in = 0;
    // rfd must have fallen right after the 64th sample
    #1;
    checks++;
    if (rfd) begin failures++; $display("rfd still high after 64 samples"); end
    n = 0;
    first_out = -1;
    for (int t = 1; n < 64 && t < 400; t++) begin
      @(posedge clk); #1;
      if (rdy) begin
        real err;
        if (first_out < 0) first_out = t;
        checks++;
        if (t != first_out + n) begin failures++; $display("outputs not back to back"); end
        err = real'(dout) / 128.0 - ref_f[n];
        checks++;
        if (err > 0.0235 || err < -0.0235) begin
          failures++;
          if (failures < 10) $display("coef %0d got %f exp %f", n, real'(dout)/128.0, ref_f[n]);
        end
        n++;
      end
    end
    checks++;
    if (n != 64) begin failures++; $display("only %0d outputs", n); end
    checks++;
    if (first_out != 65) begin failures++; $display("first output after %0d cycles", first_out); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 64; i++) blk[i] = -128;
    run_block();
    for (int i = 0; i < 64; i++) blk[i] = 127;
    run_block();
    for (int i = 0; i < 64; i++) blk[i] = (i == 27) ? 100 : 0;
    run_block();
    for (int i = 0; i < 64; i++) blk[i] = ((i / 8 + i % 8) % 2) ? 127 : -128;   // checkerboard
    run_block();
    for (int b = 0; b < 20; b++) begin
      for (int i = 0; i < 64; i++) blk[i] = int'($urandom % 256) - 128;
      run_block();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
