// bit_packer: packs variable-length codes into the bytes of the JPEG scan.
//
// Codes are appended most-significant bit first: the root of each Huffman
// code goes toward the MSB of a byte and later bits follow toward the LSB,
// as the reference design prescribes. Whenever a 0xFF byte is produced a 0x00 byte is
// stuffed after it, so that the scan data cannot be mistaken for a marker.
// A flush pads the last partial byte with 1-bits. Stuffing and padding are
// the JPEG standard's rules; the accumulator structure is this design's.
//
// Interface: in_valid/in_ready stream of vlc_t (right-aligned bits, length
// 0..27). A code is accepted only while fewer than 8 bits are pending, then
// whole bytes are emitted one per cycle on the out_valid/out_ready stream
// (a stuffed 0x00 costs one more cycle). A one-cycle `flush` pulse, given when
// no more codes will come, pads and drains the accumulator; idle is 1 when
// nothing is pending, no byte is waiting and no flush is in progress.
module bit_packer
  import jpeg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  output logic       in_ready,
  input  vlc_t       in_vlc,
  input  logic       flush,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_byte,
  output logic       idle
);

  localparam int ACC_W = 40;

  logic [ACC_W-1:0] acc;       // pending bits, right-aligned, oldest = acc[cnt-1]
  logic [5:0]       cnt;
  logic             stuff;     // a 0x00 must follow the byte just emitted
  logic             flushing;
  logic             can_out;
  logic [7:0]       nbyte;

  assign can_out  = !out_valid || out_ready;
  assign in_ready = (cnt < 6'd8) && !flushing;
  assign nbyte    = 8'(acc >> (cnt - 6'd8));
  assign idle     = (cnt == 6'd0) && !stuff && !out_valid && !flushing;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      cnt       <= '0;
      stuff     <= 1'b0;
      flushing  <= 1'b0;
      out_valid <= 1'b0;
      out_byte  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (flush) flushing <= 1'b1;

      if (in_valid && in_ready) begin
        acc <= (acc << in_vlc.len) | ACC_W'(in_vlc.bits);
        cnt <= cnt + in_vlc.len;
      end else if (can_out && stuff) begin
        out_valid <= 1'b1;
        out_byte  <= 8'h00;
        stuff     <= 1'b0;
      end else if (can_out && cnt >= 6'd8) begin
        out_valid <= 1'b1;
        out_byte  <= nbyte;
        stuff     <= (nbyte == 8'hFF);
        cnt       <= cnt - 6'd8;
      end else if (flushing && cnt != 6'd0 && cnt < 6'd8) begin
        // pad with 1-bits up to the next byte boundary
        acc <= (acc << (6'd8 - cnt)) | ((ACC_W'(1) << (6'd8 - cnt)) - ACC_W'(1));
        cnt <= 6'd8;
      end else if (flushing && cnt == 6'd0 && !stuff) begin
        flushing <= 1'b0;
      end
    end
  end

  // A code never exceeds 16 Huffman bits plus 11 amplitude bits.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(in_valid && in_vlc.len > 6'd27))
      else $error("code longer than 27 bits");
  end

endmodule
