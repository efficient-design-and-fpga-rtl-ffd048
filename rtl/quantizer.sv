// quantizer: uniform quantiser for DCT coefficients.
//
//   Sq(v,u) = round( S(v,u) / Q(v,u) )
//
// with rounding to the nearest integer, halves away from zero. S arrives in
// the DCT's 12.7 fixed-point format, so the quotient is formed exactly as
// sign(S) * floor((|S| + 64 Q) / (128 Q)) by one combinational divider; no
// reciprocal approximation is used. Q comes from the step ROM of jpeg_pkg:
// the standard luminance or chrominance table (tsel), scaled by the
// compression level (level). The equation is the reference design's; the divider,
// the table scaling and the timing are this design's choice.
//
// Timing: one coefficient per cycle on in_valid, in row-major order. An
// internal position counter (cleared by `clear`, wrapping after 64) tells
// which table entry applies. out_valid/out_coef/out_pos follow one cycle
// later. out_pos is the natural (row-major) position of the coefficient.
module quantizer
  import jpeg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic [1:0] level,
  input  logic       tsel,        // 0: luminance table, 1: chrominance table
  input  logic       in_valid,
  input  dct_t       in_coef,
  output logic       out_valid,
  output qcoef_t     out_coef,
  output logic [5:0] out_pos
);

  logic [5:0] pos;
  logic [7:0] q;
  logic [DCT_W-1:0] mag;
  logic [DCT_W+1:0] quot;

  assign q    = QROM[{level, tsel, pos}];
  assign mag  = in_coef[DCT_W-1] ? DCT_W'(-in_coef) : DCT_W'(in_coef);
  assign quot = ((DCT_W+2)'(mag) + ((DCT_W+2)'(q) << (DCT_FRAC - 1))) / ((DCT_W+2)'(q) << DCT_FRAC);

  always_ff @(posedge clk) begin
    if (rst) begin
      pos       <= '0;
      out_valid <= 1'b0;
      out_coef  <= '0;
      out_pos   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_coef <= in_coef[DCT_W-1] ? -QCOEF_W'(quot) : QCOEF_W'(quot);
        out_pos  <= pos;
        pos      <= pos + 6'd1;
      end
      if (clear) pos <= '0;
    end
  end

endmodule
