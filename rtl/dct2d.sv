// dct2d: 8x8 forward two-dimensional DCT, row-column decomposition.
//
//   F(v,u) = 1/4 C(v) C(u) sum_y sum_x s(y,x) cos((2x+1)u pi/16) cos((2y+1)v pi/16)
//
// computed as a 1-D DCT over the rows into a transpose memory followed by a
// 1-D DCT over the columns. Each 1-D output is one 8-term dot product formed
// in a single cycle with eight constant-coefficient multipliers.
// The port names (din, nd, rfd, rdy, dout, clk), the 8-bit signed input, the
// 24-bit coefficients, the 19-bit internal and result widths, rounding, and
// the 19-bit signed result with fractional LSBs follow the reference design's DCT
// core. How it computes, the format 12.7 of the result (7 fractional bits)
// and the timing below are this design's own: the reference design's core takes 9
// (or 5) clocks per input sample and has a 95-cycle latency.
//
// Timing: while rfd is 1 the block accepts one sample per cycle with nd=1,
// row-major (s(0,0), s(0,1), ...). After the 64th sample rfd falls; 64 cycles
// of row transforms follow, then 64 cycles in which rdy=1 and dout carries
// F(v,u) in row-major order (v = vertical frequency). rfd rises again on
// the cycle after the last output, so one block takes 192 cycles plus the
// time spent waiting for input. The first output appears 65 cycles after
// the last input sample.
module dct2d #(
  parameter int DATA_W   = 8,    // input sample width, signed
  parameter int COEF_W   = 24,   // cosine coefficient width, signed
  parameter int INT_W    = 19,   // transpose-memory word width
  parameter int INT_FRAC = 8,    // fractional bits kept after the row pass
  parameter int RES_W    = 19,   // result width
  parameter int RES_FRAC = 7     // fractional bits of the result
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] din,
  input  logic                     nd,
  output logic                     rfd,
  output logic                     rdy,
  output logic signed [RES_W-1:0]  dout
);

  localparam int COEF_FRAC = COEF_W - 2;   // |coef| <= 0.5

  // cos(m pi / 16) * 2^30, m = 0..8, rounded
  localparam longint COS30 [9] = '{1073741824, 1053110176, 992008094, 892783698,
                                   759250125,  596538995,  410903207, 209476638, 0};

  // c(k,n) = C(k)/2 cos((2n+1) k pi / 16), scaled by 2^COEF_FRAC, where
  // C(0) = 1/sqrt(2) (so c(0,n) = cos(pi/4)/2) and C(k) = 1 otherwise.
  typedef logic signed [COEF_W-1:0] coef_t;
  function automatic coef_t coef(input int k, input int n);
    int     m;
    longint v;
    m = ((2*n+1) * k) % 32;              // cos has period 32 in units of pi/16
    if (m > 16) m = 32 - m;              // cos(-x) = cos(x)
    if (k == 0)     v = COS30[4];
    else if (m > 8) v = -COS30[16 - m];  // cos(pi - x) = -cos(x)
    else            v = COS30[m];
    // halve and rescale from 2^30 to 2^COEF_FRAC with rounding
    v = (v + (64'sd1 <<< (30 - COEF_FRAC))) >>> (31 - COEF_FRAC);
    return coef_t'(v);
  endfunction

  typedef enum logic [1:0] {S_LOAD, S_ROW, S_COL} state_e;
  state_e state;
  logic [5:0] cnt;

  logic signed [DATA_W-1:0] x    [64];   // input block
  logic signed [INT_W-1:0]  tmem [64];   // transpose memory, tmem[row*8+k]

  localparam int PW = DATA_W + COEF_W + 3;
  localparam int QW = INT_W + COEF_W + 3;

  // row pass: t(r,k) = sum_n x(r,n) c(k,n)
  logic signed [PW-1:0] row_acc;
  logic signed [PW-1:0] row_rnd;
  always_comb begin
    row_acc = '0;
    for (int n = 0; n < 8; n++)
      row_acc += PW'(x[{cnt[5:3], 3'(n)}]) * PW'(coef(int'(cnt[2:0]), n));
    row_rnd = (row_acc + (PW'(1) <<< (COEF_FRAC - INT_FRAC - 1))) >>> (COEF_FRAC - INT_FRAC);
  end

  // column pass: F(v,u) = sum_r t(r,u) c(v,r)
  logic signed [QW-1:0] col_acc;
  logic signed [QW-1:0] col_rnd;
  always_comb begin
    col_acc = '0;
    for (int r = 0; r < 8; r++)
      col_acc += QW'(tmem[{3'(r), cnt[2:0]}]) * QW'(coef(int'(cnt[5:3]), r));
    col_rnd = (col_acc + (QW'(1) <<< (COEF_FRAC + INT_FRAC - RES_FRAC - 1)))
              >>> (COEF_FRAC + INT_FRAC - RES_FRAC);
  end

  assign rfd = (state == S_LOAD);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_LOAD;
      cnt   <= '0;
      rdy   <= 1'b0;
      dout  <= '0;
    end else begin
      rdy <= 1'b0;
      unique case (state)
        S_LOAD: if (nd) begin
          x[cnt] <= din;
          cnt    <= cnt + 6'd1;
          if (cnt == 6'd63) state <= S_ROW;
        end
        S_ROW: begin
          tmem[cnt] <= INT_W'(row_rnd);
          cnt       <= cnt + 6'd1;
          if (cnt == 6'd63) state <= S_COL;
        end
        S_COL: begin
          dout <= RES_W'(col_rnd);
          rdy  <= 1'b1;
          cnt  <= cnt + 6'd1;
          if (cnt == 6'd63) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // Input samples are only allowed while rfd is high.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(nd && !rfd)) else $error("sample offered while rfd is low");
  end

endmodule
