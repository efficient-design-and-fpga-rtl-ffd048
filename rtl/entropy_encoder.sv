// entropy_encoder: baseline Huffman coding of one 8x8 block.
//
// Takes the 64 quantised coefficients of a block in zig-zag order and emits
// the variable-length codes of the baseline sequential JPEG process:
//  * DC: DIFF = DC_i - PRED, PRED being the previous DC of the same colour
//    component; the Huffman code of its magnitude category SSSS is followed
//    by SSSS amplitude bits (DIFF, or DIFF-1 when negative).
//  * AC: zero coefficients are counted; a nonzero one is coded as the
//    Huffman code of the symbol (RUN<<4 | SSSS) plus its amplitude bits. A
//    run of 16 or more zeros before a nonzero coefficient first emits ZRL
//    (symbol 0xF0) codes; trailing zeros are replaced by one EOB (0x00).
// Luminance (comp = Y) uses the luma DC/AC tables, Cb and Cr the chroma ones.
// The DC differencing and the use of separate DC and AC tables are the
// reference design's; the run-length rules are those of the standard; the stream
// handshake is this design's.
//
// Interface: in_valid/in_ready stream of coefficients with in_last on the
// 64th. `comp` must be stable for the whole block. clear_pred resets all DC
// predictors to 0 (start of a scan). Output: out_valid/out_ready stream of
// vlc_t {bits right-aligned, len}, at most 27 bits. At most one code is
// produced per accepted coefficient; a ZRL holds the coefficient for a
// cycle. blk_done pulses when the last coefficient of a block is consumed;
// idle is 1 when no code is waiting in the output register.
module entropy_encoder
  import jpeg_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   clear_pred,
  input  comp_e  comp,
  input  logic   in_valid,
  output logic   in_ready,
  input  qcoef_t in_coef,
  input  logic   in_dc,        // coefficient is zig-zag index 0
  input  logic   in_last,      // coefficient is zig-zag index 63
  output logic   out_valid,
  input  logic   out_ready,
  output vlc_t   out_vlc,
  output logic   blk_done,
  output logic   idle
);

  qcoef_t pred [3];
  logic [5:0] run;

  // ---- symbol formation ----
  logic signed [QCOEF_W:0] val;        // DIFF for DC, coefficient for AC
  logic [3:0]  cat;
  logic [QCOEF_W:0] amp;
  logic        zrl, emit, consume, can_load;
  htab_e       tab;
  logic [7:0]  sym;
  logic [15:0] hcode;
  logic [4:0]  hsize;

  always_comb begin
    val = in_dc ? ((QCOEF_W+1)'(in_coef) - (QCOEF_W+1)'(pred[comp]))
                : (QCOEF_W+1)'(in_coef);
    cat = category(val);
    amp = val[QCOEF_W] ? (QCOEF_W+1)'(val - 1) : (QCOEF_W+1)'(val);
    zrl = !in_dc && (in_coef != '0) && (run >= 6'd16);
    if (in_dc) begin
      tab  = (comp == COMP_Y) ? HT_DC_L : HT_DC_C;
      sym  = {4'd0, cat};
      emit = 1'b1;
    end else begin
      tab = (comp == COMP_Y) ? HT_AC_L : HT_AC_C;
      if (zrl)                 sym = 8'hF0;
      else if (in_coef != '0)  sym = {run[3:0], cat};
      else                     sym = 8'h00;             // EOB
      emit = zrl || (in_coef != '0) || in_last;
    end
    consume = in_valid && can_load && !zrl;
  end

  huff_codes u_codes (.tab(tab), .sym(sym), .code(hcode), .size(hsize));

  // bits to emit: Huffman code, then cat amplitude bits (none for ZRL/EOB)
  logic [VLC_W-1:0] ebits;
  logic [5:0]       elen;
  logic             has_amp;
  always_comb begin
    has_amp = in_dc || (!zrl && in_coef != '0);
    if (has_amp) begin
      ebits = (VLC_W'(hcode) << cat) | (VLC_W'(amp) & ((VLC_W'(1) << cat) - VLC_W'(1)));
      elen  = 6'(hsize) + 6'(cat);
    end else begin
      ebits = VLC_W'(hcode);
      elen  = 6'(hsize);
    end
  end

  assign can_load = !out_valid || out_ready;
  assign in_ready = can_load && !zrl;    // a ZRL holds the coefficient
  assign idle     = !out_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_vlc   <= '0;
      run       <= '0;
      blk_done  <= 1'b0;
      for (int i = 0; i < 3; i++) pred[i] <= '0;
    end else begin
      blk_done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && can_load && emit) begin
        out_valid    <= 1'b1;
        out_vlc.bits <= ebits;
        out_vlc.len  <= elen;
      end
      if (in_valid && can_load) begin
        if (zrl)                              run <= run - 6'd16;
        else if (in_dc || in_coef != '0 || in_last) run <= '0;
        else                                  run <= run + 6'd1;
      end
      if (consume && in_dc) pred[comp] <= in_coef;
      if (consume && in_last) blk_done <= 1'b1;
      if (clear_pred) for (int i = 0; i < 3; i++) pred[i] <= '0;
    end
  end

endmodule
