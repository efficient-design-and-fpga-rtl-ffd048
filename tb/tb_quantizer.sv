// tb_quantizer: self-checking test of the uniform quantiser.
// Sends blocks of 64 coefficients (random values, exact half-way cases and
// extremes) for every compression level and both tables, and checks each
// result against round(S/Q) computed in real arithmetic (halves away from
// zero) with Q taken from the standard tables below, scaled by
// 50/100/200/400 % and clamped to 1..255. Also checks the one-cycle latency
// and the reported natural position.
module tb_quantizer;
  import jpeg_pkg::*;
  logic clk = 0, rst = 1;
  logic clear = 0;
  logic [1:0] level = 0;
  logic tsel = 0;
  logic in_valid = 0;
  dct_t in_coef = 0;
  logic out_valid;
  qcoef_t out_coef;
  logic [5:0] out_pos;
  int checks = 0, failures = 0;

  quantizer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lum [64] = '{16,11,10,16,24,40,51,61, 12,12,14,19,26,58,60,55,
                   14,13,16,24,40,57,69,56, 14,17,22,29,51,87,80,62,
                   18,22,37,56,68,109,103,77, 24,35,55,64,81,104,113,92,
                   49,64,78,87,103,121,120,101, 72,92,95,98,112,100,103,99};
  int chr [64];
  int pct [4] = '{50, 100, 200, 400};

  function automatic int qref(input int lvl, input int t, input int pos);
    int v;
    v = ((t ? chr[pos] : lum[pos]) * pct[lvl] + 50) / 100;
    return (v < 1) ? 1 : (v > 255) ? 255 : v;
  endfunction

  function automatic int round_div(input int s, input int q);
    real x;
    x = real'(s) / 128.0 / real'(q);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  int exp_q [$], exp_p [$];
  always @(posedge clk) if (!rst && out_valid) begin
    int e, p;
    e = exp_q.pop_front(); p = exp_p.pop_front();
    checks++;
    if (int'(out_coef) != e || int'(out_pos) != p) begin
      failures++;
      if (failures < 10) $display("pos %0d got %0d exp %0d (pos %0d)", p, out_coef, e, out_pos);
    end
  end

  initial begin
    for (int i = 0; i < 64; i++) chr[i] = 99;
    chr[0] = 17; chr[1] = 18; chr[2] = 24; chr[3] = 47;
    chr[8] = 18; chr[9] = 21; chr[10] = 26; chr[11] = 66;
    chr[16] = 24; chr[17] = 26; chr[18] = 56;
    chr[24] = 47; chr[25] = 66;
    repeat (3) @(posedge clk);
    rst <= 0;
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    for (int lvl = 0; lvl < 4; lvl++)
      for (int t = 0; t < 2; t++)
        for (int b = 0; b < 6; b++) begin
          level <= 2'(lvl); tsel <= t[0];
          for (int p = 0; p < 64; p++) begin
            int s, q;
            q = qref(lvl, t, p);
            case (b)
              0: s = (p % 2 ? 1 : -1) * q * 64;          // exactly x.5
              1: s = (p % 2 ? 1 : -1) * (q * 64 - 1);    // just below x.5
              2: s = (p % 2 ? 1024 : -1024) * 128;       // extremes
              default: s = int'($urandom % 262144) - 131072;
            endcase
            in_valid <= 1; in_coef <= dct_t'(s);
            exp_q.push_back(round_div(s, q)); exp_p.push_back(p);
            @(posedge clk);
          end
        end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
