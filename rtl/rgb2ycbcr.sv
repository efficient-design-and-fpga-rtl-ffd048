// rgb2ycbcr: colour conversion from 8-bit RGB to level-shifted YCbCr.
//
// Computes
//   Y  =  0.299 R + 0.587 G + 0.114 B
//   Cb = -0.1687 R - 0.3313 G + 0.5 B      (+128 offset)
//   Cr =  0.5 R - 0.4187 G - 0.0813 B      (+128 offset)
// and then applies the JPEG level shift (subtract 2^(P-1) = 128 for P = 8), so
// that all three outputs are signed 8-bit samples ready for the forward DCT.
// For Cb and Cr the +128 offset and the -128 level shift cancel and are left out.
// The coefficients are the reference design's; the 16-bit fixed-point constants
// (coefficient * 65536, rounded), round-half-up and saturation to
// [-128, 127] are this design's choice.
//
// Interface: in_valid qualifies r/g/b. Two register stages: the products are
// summed in stage 1, rounded, shifted and clamped in stage 2. out_valid
// follows in_valid by exactly 2 clock cycles. No back-pressure.
module rgb2ycbcr
  import jpeg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [7:0] r,
  input  logic [7:0] g,
  input  logic [7:0] b,
  output logic       out_valid,
  output sample_t    y,
  output sample_t    cb,
  output sample_t    cr
);

  // coefficient * 2^16, rounded
  localparam int signed KYR  =  19595, KYG  =  38470, KYB  =   7471;
  localparam int signed KCBR = -11056, KCBG = -21712, KCBB =  32768;
  localparam int signed KCRR =  32768, KCRG = -27440, KCRB =  -5328;

  logic              v1;
  logic signed [25:0] sy, scb, scr;

  function automatic sample_t sat(input logic signed [25:0] acc, input logic signed [25:0] off);
    logic signed [25:0] t;
    t = (acc + 26'sd32768) >>> 16;   // round half up
    t = t + off;
    if (t > 26'sd127)  return 8'sd127;
    if (t < -26'sd128) return -8'sd128;
    return t[7:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      out_valid <= 1'b0;
      sy <= '0; scb <= '0; scr <= '0;
      y <= '0; cb <= '0; cr <= '0;
    end else begin
      v1 <= in_valid;
      sy  <= 26'(KYR  * $signed({1'b0, r}) + KYG  * $signed({1'b0, g}) + KYB  * $signed({1'b0, b}));
      scb <= 26'(KCBR * $signed({1'b0, r}) + KCBG * $signed({1'b0, g}) + KCBB * $signed({1'b0, b}));
      scr <= 26'(KCRR * $signed({1'b0, r}) + KCRG * $signed({1'b0, g}) + KCRB * $signed({1'b0, b}));
      out_valid <= v1;
      y  <= sat(sy, -26'sd128);
      cb <= sat(scb, 26'sd0);
      cr <= sat(scr, 26'sd0);
    end
  end

endmodule
