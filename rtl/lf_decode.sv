// lf_decode: timing-reference decoder for an 8-bit 4:2:2 YCbCr byte stream
// with embedded sync codes (ITU-R BT.656 style), as delivered by the video
// decoder board one byte per line-locked clock.
//
// A timing code is the byte sequence FF 00 00 XY. In XY, bit 6 is the field
// bit F, bit 5 the vertical-blanking bit V and bit 4 the H bit (0 = start of
// active video, SAV; 1 = end of active video, EAV). The decoder keeps the
// last three bytes, recognises the code when the fourth arrives and updates
// F and V from it. Between an SAV with V = 0 and the next EAV every byte is
// video data and is passed on with byte_valid. The values 00 and FF never
// occur as video data in this format, so the three preamble bytes of the
// closing EAV are dropped by value. The protection bits of XY are not
// checked.
//
// Outputs are registered: byte_valid/byte_data, sav/eav pulses and the F, V
// and H levels appear one clock after the byte that caused them. sav is only
// pulsed for active (V = 0) lines. The document names this block and says it
// extracts the syncs and the interlace field; the code format, the dropping
// of reserved values and the timing are this design's choices.
module lf_decode (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic [7:0] din,
  output logic       byte_valid, // din of the previous clock was active video
  output logic [7:0] byte_data,
  output logic       sav,        // start of an active line
  output logic       eav,        // end of active video of any line
  output logic       f,          // field bit
  output logic       v,          // vertical blanking
  output logic       h           // horizontal blanking
);

  logic [7:0] b1, b2, b3;  // b1 = previous byte, b3 = three bytes ago
  logic       active;
  logic       is_code;

  assign is_code = (b3 == 8'hFF) && (b2 == 8'h00) && (b1 == 8'h00) && din[7];

  always_ff @(posedge clk) begin
    if (rst) begin
      b1 <= '0; b2 <= '0; b3 <= '0;
      active <= 1'b0;
      byte_valid <= 1'b0;
      byte_data <= '0;
      sav <= 1'b0; eav <= 1'b0;
      f <= 1'b0; v <= 1'b1; h <= 1'b1;
    end else begin
      b3 <= b2; b2 <= b1; b1 <= din;
      sav <= 1'b0;
      eav <= 1'b0;
      byte_valid <= 1'b0;
      if (is_code) begin
        f <= din[6];
        v <= din[5];
        h <= din[4];
        if (din[4]) begin
          active <= 1'b0;
          eav    <= 1'b1;
        end else begin
          active <= !din[5];
          sav    <= !din[5];
        end
      end else if (active && din != 8'h00 && din != 8'hFF) begin
        byte_valid <= 1'b1;
        byte_data  <= din;
      end
    end
  end

endmodule
