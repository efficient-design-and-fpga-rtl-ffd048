// zigzag: reorders one block of 64 quantised coefficients into the zig-zag
// sequence of the JPEG standard (as tabulated by the reference design).
//
// Coefficients are written in any order, each with its natural row-major
// position in_pos; the buffer stores coefficient pos at address ZIGZAG[pos].
// After the 64th write the block is read out at addresses 0..63, i.e. in
// zig-zag order, starting with the DC coefficient. The order table is the
// reference design's; the single 64-entry buffer and the handshake are this design's
// choice.
//
// Interface: in_valid/in_pos/in_coef, one per cycle; writes are ignored
// while a block is waiting to be read (in_ready = 0). out_valid/out_ready is a
// standard valid-ready stream; out_zz is the zig-zag index (0 = DC) and
// out_last marks index 63. The first coefficient is offered on the cycle
// after the 64th write.
module zigzag
  import jpeg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [5:0] in_pos,
  input  qcoef_t     in_coef,
  output logic       out_valid,
  input  logic       out_ready,
  output qcoef_t     out_coef,
  output logic [5:0] out_zz,
  output logic       out_last
);

  qcoef_t     mem [64];
  logic [6:0] wcnt;       // coefficients written, 64 = block complete
  logic [5:0] rcnt;

  assign in_ready  = (wcnt != 7'd64);
  assign out_valid = (wcnt == 7'd64);
  assign out_coef  = mem[rcnt];
  assign out_zz    = rcnt;
  assign out_last  = (rcnt == 6'd63);

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[ZIGZAG[in_pos]] <= in_coef;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt <= '0;
      rcnt <= '0;
    end else begin
      if (in_valid && in_ready) wcnt <= wcnt + 7'd1;
      if (out_valid && out_ready) begin
        rcnt <= rcnt + 6'd1;
        if (rcnt == 6'd63) wcnt <= '0;
      end
    end
  end

endmodule
