// ycrcb2rgb: YCbCr (studio range) to 8-bit RGB colour-space converter.
//
// Uses the ITU-R BT.601 equations
//   R = 1.164(Y-16) + 1.596(Cr-128)
//   G = 1.164(Y-16) - 0.813(Cr-128) - 0.391(Cb-128)
//   B = 1.164(Y-16) + 2.018(Cb-128)
// with coefficients scaled by 1024 and rounded (1192, 1634, 833, 400, 2066).
// Results are rounded and clamped to 0..255. Two pipeline stages: the
// products are registered, then the sums are formed, clamped and
// registered, so out_valid/rgb follow in_valid/ycc by two clocks. The
// document only says that this block converts the upsampled stream to RGB;
// the coefficients and the pipeline are this design's own choices.
module ycrcb2rgb
  import idio_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  ycbcr_t ycc,
  output logic   out_valid,
  output rgb_t   rgb
);

  localparam int signed K_Y   = 1192;
  localparam int signed K_RCR = 1634;
  localparam int signed K_GCR = 833;
  localparam int signed K_GCB = 400;
  localparam int signed K_BCB = 2066;

  logic               v1;
  logic signed [20:0] py, prcr, pgcr, pgcb, pbcb;

  logic signed [8:0] y_off, cb_off, cr_off;
  assign y_off  = $signed({1'b0, ycc.y})  - 9'sd16;
  assign cb_off = $signed({1'b0, ycc.cb}) - 9'sd128;
  assign cr_off = $signed({1'b0, ycc.cr}) - 9'sd128;

  function automatic logic [7:0] clamp8(input logic signed [22:0] s);
    logic signed [22:0] r;
    r = (s + 23'sd512) >>> 10;
    if (r < 0)        return 8'd0;
    else if (r > 255) return 8'd255;
    else              return r[7:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      py <= '0; prcr <= '0; pgcr <= '0; pgcb <= '0; pbcb <= '0;
      out_valid <= 1'b0;
      rgb <= '0;
    end else begin
      v1   <= in_valid;
      py   <= 21'(y_off  * K_Y);
      prcr <= 21'(cr_off * K_RCR);
      pgcr <= 21'(cr_off * K_GCR);
      pgcb <= 21'(cb_off * K_GCB);
      pbcb <= 21'(cb_off * K_BCB);
      out_valid <= v1;
      rgb.r <= clamp8(23'(py) + 23'(prcr));
      rgb.g <= clamp8(23'(py) - 23'(pgcr) - 23'(pgcb));
      rgb.b <= clamp8(23'(py) + 23'(pbcb));
    end
  end

endmodule
