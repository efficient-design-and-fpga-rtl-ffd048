// huff_codes: Huffman code and code-length lookup for the four baseline tables.
//
// The tables are not stored as codes but derived from their specifications
// (BITS: number of codes of each length 1..16, HUFFVAL: symbols in code
// order) by the three procedures of the JPEG standard:
//   1. generate the table of code sizes (HUFFSIZE),
//   2. generate the codes themselves (HUFFCODE), counting up within a length
//      and shifting left when the length grows,
//   3. reorder both into symbol-value order (EHUFCO, EHUFSI).
// This runs in a constant function at elaboration; the result is a
// 4 x 256-entry ROM. Deriving the codes this way is the reference design's; the
// procedure details are those of the standard, the ROM form is this design's.
//
// Interface: purely combinational. `tab` selects DC-luma, DC-chroma, AC-luma
// or AC-chroma, `sym` is the symbol (DC: category, AC: run<<4 | size).
// `code` is right-aligned, `size` its length (0 for a symbol that has no code).
module huff_codes
  import jpeg_pkg::*;
(
  input  htab_e       tab,
  input  logic [7:0]  sym,
  output logic [15:0] code,
  output logic [4:0]  size
);

  typedef logic [20:0] hrom_t [1024];   // {size[4:0], code[15:0]}

  function automatic hrom_t build();
    hrom_t rom;
    int    huffsize [256];
    int    huffcode [256];
    int    k, c, si, lastk;
    for (int i = 0; i < 1024; i++) rom[i] = '0;
    for (int t = 0; t < 4; t++) begin
      // 1. code sizes
      k = 0;
      for (int l = 1; l <= 16; l++)
        for (int j = 0; j < hbits(htab_e'(t), l - 1); j++) begin
          huffsize[k] = l;
          k++;
        end
      lastk = k;
      // 2. codes
      c  = 0;
      si = huffsize[0];
      for (int i = 0; i < lastk; i++) begin
        while (huffsize[i] != si) begin
          c  = c << 1;
          si++;
        end
        huffcode[i] = c;
        c++;
      end
      // 3. symbol-value order
      for (int i = 0; i < lastk; i++)
        rom[t * 256 + hval(htab_e'(t), i)] = {5'(huffsize[i]), 16'(huffcode[i])};
    end
    return rom;
  endfunction

  localparam hrom_t HROM = build();

  assign {size, code} = HROM[{tab, sym}];

endmodule
