// jfif_header: produces the header of a baseline JFIF file, byte by byte.
//
// After a `start` pulse the following segments are streamed out:
//   SOI, APP0 (JFIF 1.01, no thumbnail, 1:1 aspect),
//   DQT  with the quantisation table(s) of the selected compression level,
//        in zig-zag order (table 0 luma, table 1 chroma),
//   SOF0 baseline, 8-bit precision, image height and width, one component
//        (mono) or three (Y, Cb, Cr), all with sampling factors 1x1,
//   DHT  with the standard DC/AC Huffman table specifications (two tables
//        for mono, four for colour),
//   SOS  covering all components, spectral range 0..63.
// The header is 324 bytes for mono and 607 bytes for colour. The reference design
// names the JFIF header and says the tables travel in the frame and scan
// headers; the segment layout is that of the JPEG/JFIF standards and the 1x1
// sampling (no chroma subsampling) is this design's choice.
//
// Interface: inputs mono, level, width and height must be stable from
// `start` to `done`. Bytes leave on the out_valid/out_ready stream, one per
// cycle while out_ready is 1. `done` pulses in the cycle after the last byte is
// accepted.
module jfif_header
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        mono,
  input  logic [1:0]  level,
  input  logic [15:0] width,
  input  logic [15:0] height,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_byte,
  output logic        done
);

  typedef enum logic [3:0] {
    I_IDLE, I_APP, I_DQH, I_QT0, I_QT1, I_SOF, I_DHH,
    I_HT_DCL, I_HT_ACL, I_HT_DCC, I_HT_ACC, I_SOS
  } item_e;

  item_e      item;
  logic [7:0] idx;
  logic [7:0] ilen;
  logic [7:0] nc;
  logic [15:0] dqt_len, dht_len;

  localparam logic [7:0] APP [20] = '{
    8'hFF, 8'hD8,                                   // SOI
    8'hFF, 8'hE0, 8'h00, 8'h10,                     // APP0, length 16
    8'h4A, 8'h46, 8'h49, 8'h46, 8'h00,              // "JFIF\0"
    8'h01, 8'h01, 8'h00,                            // version 1.01, no units
    8'h00, 8'h01, 8'h00, 8'h01,                     // density 1:1
    8'h00, 8'h00};                                  // no thumbnail

  assign nc      = mono ? 8'd1 : 8'd3;
  assign dqt_len = mono ? 16'd67 : 16'd132;
  assign dht_len = mono ? 16'd210 : 16'd418;

  // length of each item in bytes
  always_comb begin
    unique case (item)
      I_APP:              ilen = 8'd20;
      I_DQH, I_DHH:       ilen = 8'd4;
      I_QT0, I_QT1:       ilen = 8'd65;
      I_SOF:              ilen = 8'd10 + 8'd3 * nc;
      I_HT_DCL, I_HT_DCC: ilen = 8'd29;
      I_HT_ACL, I_HT_ACC: ilen = 8'd179;
      I_SOS:              ilen = 8'd8 + 8'd2 * nc;
      default:            ilen = 8'd1;
    endcase
  end

  function automatic logic [7:0] ht_byte(input htab_e t, input logic [7:0] i);
    logic [7:0] tc;
    tc = {3'b000, t[1], 3'b000, t[0]};   // Tc (0 DC, 1 AC) and Th
    if (i == 8'd0)  return tc;
    if (i <= 8'd16) return 8'(hbits(t, int'(i) - 1));
    return 8'(hval(t, int'(i) - 17));
  endfunction

  // byte at position idx of the current item
  always_comb begin
    out_byte = 8'h00;
    unique case (item)
      I_APP: out_byte = APP[idx[4:0]];
      I_DQH: case (idx[1:0])
               2'd0: out_byte = 8'hFF;
               2'd1: out_byte = 8'hDB;
               2'd2: out_byte = dqt_len[15:8];
               default: out_byte = dqt_len[7:0];
             endcase
      I_QT0: out_byte = (idx == 8'd0) ? 8'h00 : QROM[{level, 1'b0, UNZIG[6'(idx - 8'd1)]}];
      I_QT1: out_byte = (idx == 8'd0) ? 8'h01 : QROM[{level, 1'b1, UNZIG[6'(idx - 8'd1)]}];
      I_SOF: case (idx)
               8'd0: out_byte = 8'hFF;
               8'd1: out_byte = 8'hC0;
               8'd2: out_byte = 8'h00;
               8'd3: out_byte = 8'd8 + 8'd3 * nc;
               8'd4: out_byte = 8'd8;               // sample precision
               8'd5: out_byte = height[15:8];
               8'd6: out_byte = height[7:0];
               8'd7: out_byte = width[15:8];
               8'd8: out_byte = width[7:0];
               8'd9: out_byte = nc;
               default: begin
                 // component specs: id, sampling 1x1, quant table
                 case ((idx - 8'd10) % 8'd3)
                   8'd0:    out_byte = (idx - 8'd10) / 8'd3 + 8'd1;
                   8'd1:    out_byte = 8'h11;
                   default: out_byte = (idx < 8'd13) ? 8'h00 : 8'h01;
                 endcase
               end
             endcase
      I_DHH: case (idx[1:0])
               2'd0: out_byte = 8'hFF;
               2'd1: out_byte = 8'hC4;
               2'd2: out_byte = dht_len[15:8];
               default: out_byte = dht_len[7:0];
             endcase
      I_HT_DCL: out_byte = ht_byte(HT_DC_L, idx);
      I_HT_ACL: out_byte = ht_byte(HT_AC_L, idx);
      I_HT_DCC: out_byte = ht_byte(HT_DC_C, idx);
      I_HT_ACC: out_byte = ht_byte(HT_AC_C, idx);
      I_SOS: begin
        if (idx == 8'd0)                 out_byte = 8'hFF;
        else if (idx == 8'd1)            out_byte = 8'hDA;
        else if (idx == 8'd2)            out_byte = 8'h00;
        else if (idx == 8'd3)            out_byte = 8'd6 + 8'd2 * nc;
        else if (idx == 8'd4)            out_byte = nc;
        else if (idx < 8'd5 + 8'd2 * nc) begin
          // component selector, then DC/AC table selectors
          if (idx[0])                    out_byte = (idx - 8'd5) / 8'd2 + 8'd1;
          else                           out_byte = (idx < 8'd7) ? 8'h00 : 8'h11;
        end
        else if (idx == 8'd5 + 8'd2 * nc + 8'd1) out_byte = 8'h3F;  // Se = 63
        else                             out_byte = 8'h00;          // Ss, Ah/Al
      end
      default: out_byte = 8'h00;
    endcase
  end

  function automatic item_e next_item(input item_e it, input logic m);
    unique case (it)
      I_APP:    return I_DQH;
      I_DQH:    return I_QT0;
      I_QT0:    return m ? I_SOF : I_QT1;
      I_QT1:    return I_SOF;
      I_SOF:    return I_DHH;
      I_DHH:    return I_HT_DCL;
      I_HT_DCL: return I_HT_ACL;
      I_HT_ACL: return m ? I_SOS : I_HT_DCC;
      I_HT_DCC: return I_HT_ACC;
      I_HT_ACC: return I_SOS;
      default:  return I_IDLE;
    endcase
  endfunction

  assign out_valid = (item != I_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      item <= I_IDLE;
      idx  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (item == I_IDLE) begin
        if (start) begin
          item <= I_APP;
          idx  <= '0;
        end
      end else if (out_ready) begin
        if (idx == ilen - 8'd1) begin
          idx  <= '0;
          item <= next_item(item, mono);
          if (item == I_SOS) done <= 1'b1;
        end else begin
          idx <= idx + 8'd1;
        end
      end
    end
  end

endmodule
