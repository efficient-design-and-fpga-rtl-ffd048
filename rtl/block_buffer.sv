// block_buffer: strip buffer that turns raster-order pixels into 8x8 blocks.
//
// The encoder codes 8x8 blocks left to right, block-row by block-row. Pixels
// arrive in raster order, so eight full image lines of each colour component
// are collected first (one "strip"). When the eighth line is complete, `full`
// rises and no more pixels are accepted until the controller has read every
// block of the strip and pulses `release_strip`. A single strip buffer (no
// double buffering) is this design's choice; the reference design only names the
// "8x8 block sample block input" step.
//
// Write side: wr_valid with wr_y/wr_cb/wr_cr, accepted while wr_ready is 1.
// `cols` is the image width in pixels (a multiple of 8) and must stay stable
// during the strip.
// Read side: a one-cycle rd_start pulse with rd_bx (block column) and rd_comp
// (component) streams the 64 samples of that block in row-major order, one
// per cycle, on rd_data/rd_valid; the first sample is valid three clock
// edges after the rd_start pulse (counter, registered address, registered
// memory read). There is no back-pressure: the consumer must be able to
// take 64 samples back to back. rd_busy is high from the edge after
// rd_start until the last sample has been delivered.
module block_buffer
  import jpeg_pkg::*;
#(
  parameter int MAX_COLS = 1024              // widest line held, in pixels
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [9:0]  cols,
  // write side
  input  logic        wr_valid,
  output logic        wr_ready,
  input  sample_t     wr_y,
  input  sample_t     wr_cb,
  input  sample_t     wr_cr,
  output logic        full,
  input  logic        release_strip,
  // read side
  input  logic        rd_start,
  input  logic [6:0]  rd_bx,
  input  comp_e       rd_comp,
  output logic        rd_busy,
  output logic        rd_valid,
  output sample_t     rd_data
);

  localparam int DEPTH = 8 * MAX_COLS;
  localparam int AW    = $clog2(DEPTH);

  sample_t mem_y  [DEPTH];
  sample_t mem_cb [DEPTH];
  sample_t mem_cr [DEPTH];

  // ---------------- write side ----------------
  logic [9:0] wcol;
  logic [2:0] wline;
  logic [AW-1:0] waddr;

  assign wr_ready = !full;
  assign waddr    = AW'(wline) * AW'(MAX_COLS) + AW'(wcol);

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) begin
      mem_y[waddr]  <= wr_y;
      mem_cb[waddr] <= wr_cb;
      mem_cr[waddr] <= wr_cr;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wcol  <= '0;
      wline <= '0;
      full  <= 1'b0;
    end else begin
      if (wr_valid && wr_ready) begin
        if (wcol == cols - 10'd1) begin
          wcol  <= '0;
          wline <= wline + 3'd1;
          if (wline == 3'd7) full <= 1'b1;
        end else begin
          wcol <= wcol + 10'd1;
        end
      end
      if (release_strip) full <= 1'b0;
    end
  end

  // ---------------- read side ----------------
  logic [5:0]    ridx;
  logic [6:0]    rbx;
  comp_e         rcomp;
  logic          ractive;
  logic          raddr_v;
  logic [AW-1:0] raddr;
  comp_e         raddr_comp;

  assign rd_busy = ractive || raddr_v || rd_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      ractive <= 1'b0;
      ridx    <= '0;
      rbx     <= '0;
      rcomp   <= COMP_Y;
      raddr_v <= 1'b0;
      raddr   <= '0;
      raddr_comp <= COMP_Y;
      rd_valid <= 1'b0;
    end else begin
      if (rd_start && !ractive) begin
        ractive <= 1'b1;
        ridx    <= '0;
        rbx     <= rd_bx;
        rcomp   <= rd_comp;
      end else if (ractive) begin
        ridx <= ridx + 6'd1;
        if (ridx == 6'd63) ractive <= 1'b0;
      end
      // stage 1: address
      raddr_v    <= ractive;
      raddr      <= AW'(ridx[5:3]) * AW'(MAX_COLS) + AW'({rbx, ridx[2:0]});
      raddr_comp <= rcomp;
      // stage 2: data
      rd_valid <= raddr_v;
    end
  end

  always_ff @(posedge clk) begin
    unique case (raddr_comp)
      COMP_CB: rd_data <= mem_cb[raddr];
      COMP_CR: rd_data <= mem_cr[raddr];
      default: rd_data <= mem_y[raddr];
    endcase
  end

  // A new block read may only start when the previous one has finished.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(rd_start && ractive)) else $error("block read started while busy");
  end

endmodule
