// vp422_444_dup: 4:2:2 to 4:4:4 upsampler by chroma duplication.
//
// Active video bytes arrive in the order Cb0 Y0 Cr0 Y1 Cb2 Y2 Cr2 Y3 ...; a
// line_start pulse (SAV) resets the byte phase to Cb. Each pair of pixels
// shares one Cb and one Cr sample, and both pixels of the pair get the same
// chroma, as the document describes. The first pixel of a pair is emitted
// when its Cr byte arrives, the second when its Y byte arrives, so one pixel
// leaves every two valid bytes. Output is registered: pix_valid/pix follow
// the completing byte by one clock.
module vp422_444_dup
  import idio_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       line_start,
  input  logic       byte_valid,
  input  logic [7:0] byte_data,
  output logic       pix_valid,
  output ycbcr_t     pix
);

  logic [1:0] phase;   // 0 Cb, 1 Y(even), 2 Cr, 3 Y(odd)
  logic [7:0] cb_q, y0_q, cr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      cb_q <= '0; y0_q <= '0; cr_q <= '0;
      pix_valid <= 1'b0;
      pix <= '0;
    end else begin
      pix_valid <= 1'b0;
      if (line_start) begin
        phase <= '0;
      end else if (byte_valid) begin
        phase <= phase + 2'd1;
        unique case (phase)
          2'd0: cb_q <= byte_data;
          2'd1: y0_q <= byte_data;
          2'd2: begin
            cr_q      <= byte_data;
            pix_valid <= 1'b1;
            pix       <= '{y: y0_q, cb: cb_q, cr: byte_data};
          end
          2'd3: begin
            pix_valid <= 1'b1;
            pix       <= '{y: byte_data, cb: cb_q, cr: cr_q};
          end
        endcase
      end
    end
  end

endmodule
