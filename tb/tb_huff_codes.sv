// tb_huff_codes: self-checking test of the Huffman code tables.
// Compares a selection of codes with the code words printed in the JPEG
// standard's example tables (K.3 to K.6), checks that each table defines a
// code for exactly its 12 (DC) or 162 (AC) symbols, and that no code of a
// table is a prefix of another one (the code is decodable).
module tb_huff_codes;
  import jpeg_pkg::*;
  htab_e tab;
  logic [7:0] sym;
  logic [15:0] code;
  logic [4:0] size;
  int checks = 0, failures = 0;

  huff_codes dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_code(input htab_e t, input int s, input string bits);
    logic [15:0] c;
    tab = t; sym = 8'(s);
    #1;
    c = '0;
    for (int i = 0; i < bits.len(); i++) c = (c << 1) | 16'(bits[i] == "1");
    checks++;
    if (int'(size) != bits.len() || code != c) begin
      failures++;
      $display("table %0d sym %02h: got %0d'b%b expected %s", t, s, size, code, bits);
    end
  endtask

  logic [15:0] codes [256];
  logic [4:0]  sizes [256];

  initial begin
    // DC luminance (K.3)
    expect_code(HT_DC_L, 0, "00");        expect_code(HT_DC_L, 1, "010");
    expect_code(HT_DC_L, 2, "011");       expect_code(HT_DC_L, 5, "110");
    expect_code(HT_DC_L, 6, "1110");      expect_code(HT_DC_L, 7, "11110");
    expect_code(HT_DC_L, 11, "111111110");
    // DC chrominance (K.4)
    expect_code(HT_DC_C, 0, "00");        expect_code(HT_DC_C, 1, "01");
    expect_code(HT_DC_C, 2, "10");        expect_code(HT_DC_C, 3, "110");
    expect_code(HT_DC_C, 11, "11111111110");
    // AC luminance (K.5)
    expect_code(HT_AC_L, 8'h00, "1010");  expect_code(HT_AC_L, 8'h01, "00");
    expect_code(HT_AC_L, 8'h02, "01");    expect_code(HT_AC_L, 8'h03, "100");
    expect_code(HT_AC_L, 8'h04, "1011");  expect_code(HT_AC_L, 8'h05, "11010");
    expect_code(HT_AC_L, 8'h06, "1111000");
    expect_code(HT_AC_L, 8'h09, "1111111110000010");
    expect_code(HT_AC_L, 8'h11, "1100");  expect_code(HT_AC_L, 8'h12, "11011");
    expect_code(HT_AC_L, 8'h21, "11100"); expect_code(HT_AC_L, 8'h31, "111010");
    expect_code(HT_AC_L, 8'hF0, "11111111001");
    expect_code(HT_AC_L, 8'hFA, "1111111111111110");
    // AC chrominance (K.6)
    expect_code(HT_AC_C, 8'h00, "00");    expect_code(HT_AC_C, 8'h01, "01");
    expect_code(HT_AC_C, 8'h02, "100");   expect_code(HT_AC_C, 8'h03, "1010");
    expect_code(HT_AC_C, 8'h11, "1011");  expect_code(HT_AC_C, 8'h12, "111001");
    expect_code(HT_AC_C, 8'hF0, "1111111010");

    // completeness and prefix-freeness of every table
    for (int t = 0; t < 4; t++) begin
      int n;
      n = 0;
      for (int s = 0; s < 256; s++) begin
        tab = htab_e'(t); sym = 8'(s);
        #1;
        codes[s] = code; sizes[s] = size;
        if (size != 0) n++;
      end
      checks++;
      if (n != ((t < 2) ? 12 : 162)) begin failures++; $display("table %0d has %0d codes", t, n); end
      for (int a = 0; a < 256; a++) if (sizes[a] != 0)
        for (int b = 0; b < 256; b++) if (b != a && sizes[b] >= sizes[a]) begin
          if ((codes[b] >> (sizes[b] - sizes[a])) == codes[a]) begin
            failures++;
            $display("table %0d: code of %02h is a prefix of %02h", t, a, b);
          end
        end
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
