// compressor: baseline JPEG encoder that turns an RGB image into a JFIF file.
//
// Data path, one 8x8 block at a time:
//   RGB pixels -> rgb2ycbcr (+ level shift) -> block_buffer (8 lines)
//   -> dct2d -> quantizer -> zigzag -> entropy_encoder (DC DIFF, AC run
//   length, Huffman) -> bit_packer -> byte output
// with jfif_header writing the file header first and the controller here
// appending the EOI marker at the end. The file is written into an external
// byte memory through addr/din/we, starting at address 0.
//
// The top-level port list is the reference design's. Their behaviour is
// this design's choice, as the reference design does not describe it:
//  * CompressImage (one-cycle pulse while Compressing = 0) latches
//    ImgColumns (width in pixels, multiple of 8), ImgLines (height, multiple
//    of 8), Compression (0 = finest quantisation .. 3 = strongest) and Mono
//    (1: code only Y as a grey-scale image) and starts a file.
//  * Compressing stays 1 until the last byte (EOI) has been written.
//  * ProcessingRGB = 1 means the encoder takes a pixel: the host presents
//    Red/Green/Blue with ProcessRGB = 1 in any cycle where ProcessingRGB is 1,
//    in raster order. It falls while a full 8-line strip is being coded.
//  * we = 1 writes din to addr; one byte per cycle at most.
// Colour images are coded 4:4:4 (one Y, one Cb and one Cr block per 8x8 area,
// interleaved), so any multiple of 8 works for width and height.
//
// Timing: blocks are coded strictly one after another: the next block is
// read from the strip buffer once the entropy coder has consumed the last
// coefficient of the previous one (about 200 + 64 cycles per block).
module compressor
  import jpeg_pkg::*;
#(
  parameter int MAX_COLS = 1024           // widest image line the strip buffer holds
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [7:0]  Red,
  input  logic [7:0]  Green,
  input  logic [7:0]  Blue,
  input  logic        ProcessRGB,
  output logic        ProcessingRGB,
  input  logic        CompressImage,
  input  logic [1:0]  Compression,
  input  logic        Mono,
  input  logic [9:0]  ImgColumns,
  input  logic [8:0]  ImgLines,
  output logic        Compressing,
  output logic [15:0] addr,
  output logic [7:0]  din,
  output logic        we
);

  typedef enum logic [3:0] {
    C_IDLE, C_HDR, C_WAIT_STRIP, C_BLK_START, C_BLK_WAIT,
    C_DRAIN, C_FLUSH, C_EOI0, C_EOI1
  } cstate_e;

  cstate_e    state;
  logic [9:0] cols;
  logic [8:0] lines;
  logic [1:0] level;
  logic       mono;
  logic [6:0] bx;
  logic [5:0] strip;
  comp_e      comp;
  logic [13:0] pix_in;     // pixels accepted into the current strip
  logic [15:0] wptr;

  logic [6:0] nbx;
  logic [5:0] nstrips;
  assign nbx     = cols[9:3];
  assign nstrips = lines[8:3];

  // ---------------- colour conversion ----------------
  logic    bb_full, bb_wr_ready, bb_release, bb_rd_start, bb_rd_busy, bb_rd_valid;
  sample_t bb_rd_data;
  logic    px_take;
  logic    cv_valid;
  sample_t cv_y, cv_cb, cv_cr;

  assign ProcessingRGB = (state == C_HDR || state == C_WAIT_STRIP)
                         && (pix_in != {1'b0, cols, 3'b000}) && bb_wr_ready;
  assign px_take = ProcessRGB && ProcessingRGB;

  rgb2ycbcr u_csc (
    .clk(clk), .rst(reset), .in_valid(px_take),
    .r(Red), .g(Green), .b(Blue),
    .out_valid(cv_valid), .y(cv_y), .cb(cv_cb), .cr(cv_cr)
  );

  // ---------------- strip buffer ----------------

  block_buffer #(.MAX_COLS(MAX_COLS)) u_buf (
    .clk(clk), .rst(reset), .cols(cols),
    .wr_valid(cv_valid), .wr_ready(bb_wr_ready),
    .wr_y(cv_y), .wr_cb(cv_cb), .wr_cr(cv_cr),
    .full(bb_full), .release_strip(bb_release),
    .rd_start(bb_rd_start), .rd_bx(bx), .rd_comp(comp),
    .rd_busy(bb_rd_busy), .rd_valid(bb_rd_valid), .rd_data(bb_rd_data)
  );

  // ---------------- DCT, quantiser, zig-zag ----------------
  logic dct_rfd, dct_rdy;
  dct_t dct_out;

  dct2d u_dct (
    .clk(clk), .rst(reset), .din(bb_rd_data), .nd(bb_rd_valid),
    .rfd(dct_rfd), .rdy(dct_rdy), .dout(dct_out)
  );

  logic       q_valid;
  qcoef_t     q_coef;
  logic [5:0] q_pos;
  logic       start_img;

  quantizer u_quant (
    .clk(clk), .rst(reset), .clear(start_img), .level(level),
    .tsel(comp != COMP_Y), .in_valid(dct_rdy), .in_coef(dct_out),
    .out_valid(q_valid), .out_coef(q_coef), .out_pos(q_pos)
  );

  logic       zz_in_ready, zz_valid, zz_ready, zz_last;
  qcoef_t     zz_coef;
  logic [5:0] zz_idx;

  zigzag u_zz (
    .clk(clk), .rst(reset), .in_valid(q_valid), .in_ready(zz_in_ready),
    .in_pos(q_pos), .in_coef(q_coef),
    .out_valid(zz_valid), .out_ready(zz_ready), .out_coef(zz_coef),
    .out_zz(zz_idx), .out_last(zz_last)
  );

  // ---------------- entropy coding, packing ----------------
  logic ec_valid, ec_ready, ec_done, ec_idle;
  vlc_t ec_vlc;

  entropy_encoder u_ec (
    .clk(clk), .rst(reset), .clear_pred(start_img), .comp(comp),
    .in_valid(zz_valid), .in_ready(zz_ready), .in_coef(zz_coef),
    .in_dc(zz_idx == 6'd0), .in_last(zz_last),
    .out_valid(ec_valid), .out_ready(ec_ready), .out_vlc(ec_vlc),
    .blk_done(ec_done), .idle(ec_idle)
  );

  logic       pk_valid, pk_idle, pk_flush;
  logic [7:0] pk_byte;

  bit_packer u_pack (
    .clk(clk), .rst(reset), .in_valid(ec_valid), .in_ready(ec_ready),
    .in_vlc(ec_vlc), .flush(pk_flush),
    .out_valid(pk_valid), .out_ready(1'b1), .out_byte(pk_byte), .idle(pk_idle)
  );

  // ---------------- header ----------------
  logic       hd_valid, hd_done;
  logic [7:0] hd_byte;

  jfif_header u_hdr (
    .clk(clk), .rst(reset), .start(start_img), .mono(mono), .level(level),
    .width({6'd0, cols}), .height({7'd0, lines}),
    .out_valid(hd_valid), .out_ready(1'b1), .out_byte(hd_byte), .done(hd_done)
  );

  // ---------------- control ----------------
  logic       last_comp, last_bx, last_strip;
  assign start_img   = (state == C_IDLE) && CompressImage;
  assign last_comp   = mono || comp == COMP_CR;
  assign last_bx     = (bx == nbx - 7'd1);
  assign last_strip  = (strip == nstrips - 6'd1);
  assign bb_rd_start = (state == C_BLK_START) && dct_rfd && !bb_rd_busy;
  assign bb_release  = (state == C_BLK_WAIT) && ec_done && last_comp && last_bx;
  assign pk_flush    = (state == C_DRAIN) && ec_idle;
  assign Compressing = (state != C_IDLE);

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= C_IDLE;
      cols   <= '0;
      lines  <= '0;
      level  <= '0;
      mono   <= 1'b0;
      bx     <= '0;
      strip  <= '0;
      comp   <= COMP_Y;
      pix_in <= '0;
    end else begin
      if (px_take) pix_in <= pix_in + 14'd1;
      if (bb_release) pix_in <= '0;
      unique case (state)
        C_IDLE: if (CompressImage) begin
          cols   <= ImgColumns;
          lines  <= ImgLines;
          level  <= Compression;
          mono   <= Mono;
          bx     <= '0;
          strip  <= '0;
          comp   <= COMP_Y;
          pix_in <= '0;
          state  <= C_HDR;
        end
        C_HDR:        if (hd_done) state <= C_WAIT_STRIP;
        C_WAIT_STRIP: if (bb_full) begin
          bx    <= '0;
          comp  <= COMP_Y;
          state <= C_BLK_START;
        end
        C_BLK_START:  if (bb_rd_start) state <= C_BLK_WAIT;
        C_BLK_WAIT:   if (ec_done) begin
          if (!last_comp) begin
            comp  <= comp_e'(comp + 2'd1);
            state <= C_BLK_START;
          end else begin
            comp <= COMP_Y;
            if (!last_bx) begin
              bx    <= bx + 7'd1;
              state <= C_BLK_START;
            end else if (!last_strip) begin
              strip <= strip + 6'd1;
              state <= C_WAIT_STRIP;
            end else begin
              state <= C_DRAIN;
            end
          end
        end
        C_DRAIN:  if (ec_idle) state <= C_FLUSH;
        C_FLUSH:  if (pk_idle && !pk_flush) state <= C_EOI0;
        C_EOI0:   state <= C_EOI1;
        C_EOI1:   state <= C_IDLE;
        default:  state <= C_IDLE;
      endcase
    end
  end

  // ---------------- byte output to the image memory ----------------
  logic       wr;
  logic [7:0] wbyte;
  always_comb begin
    wr    = 1'b0;
    wbyte = 8'h00;
    unique case (state)
      C_HDR:   begin wr = hd_valid; wbyte = hd_byte; end
      C_EOI0:  begin wr = 1'b1;     wbyte = 8'hFF;   end
      C_EOI1:  begin wr = 1'b1;     wbyte = 8'hD9;   end
      default: begin wr = pk_valid; wbyte = pk_byte; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wptr <= '0;
      we   <= 1'b0;
      din  <= '0;
      addr <= '0;
    end else begin
      we <= wr;
      if (start_img) wptr <= '0;
      if (wr) begin
        din  <= wbyte;
        addr <= wptr;
        wptr <= wptr + 16'd1;
      end
    end
  end

  // The zig-zag buffer must never see a coefficient while it still holds a block.
  always_ff @(posedge clk) begin
    if (!reset) assert (!(q_valid && !zz_in_ready))
      else $error("zig-zag buffer overrun");
  end

endmodule
