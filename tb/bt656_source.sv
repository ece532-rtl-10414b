// bt656_source: test-only model of the video decoder board's digital output.
//
// Produces an interlaced 8-bit 4:2:2 YCbCr byte stream with embedded timing
// codes, one byte per clock. Each frame is field 0 then field 1; each field
// has V_BLANK blanking lines (V = 1) then V_ACTIVE active lines. A line is
// EAV, H_BLANK blanking bytes, SAV, then 2*H_ACTIVE bytes (Cb Y Cr Y ...).
// The picture is a background of one colour with a wand rectangle
// (wx0..wx1, wy0..wy1 in frame coordinates, y = 2*line + field) and a short
// speck run (sx, sy, slen pixels) of the wand colour. Rectangle and speck
// edges should be pixel-pair aligned (even start, odd end) so that the
// shared chroma of a pair is uniform. frame_cnt counts completed frames.
module bt656_source #(
  parameter int H_ACTIVE = 16,
  parameter int H_BLANK  = 12,
  parameter int V_BLANK  = 2,
  parameter int V_ACTIVE = 4
) (
  input  logic       clk,
  input  logic       en,
  input  logic [23:0] bg_ycc,    // {Y, Cb, Cr}
  input  logic [23:0] fg_ycc,
  input  int         wx0, wx1, wy0, wy1,
  input  int         sx, sy, slen,
  output logic [7:0] dout,
  output int         frame_cnt
);

  function automatic logic [7:0] xy_code(input bit f, input bit v, input bit h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h};
  endfunction

  function automatic bit in_wand(input int x, input int y);
    return (x >= wx0 && x <= wx1 && y >= wy0 && y <= wy1) ||
           (y == sy && x >= sx && x < sx + slen);
  endfunction

  task automatic put(input logic [7:0] b);
    dout <= b;
    @(posedge clk);
  endtask

  task automatic put_code(input bit f, input bit v, input bit h);
    put(8'hFF); put(8'h00); put(8'h00); put(xy_code(f, v, h));
  endtask

  initial begin
    dout = 8'h10;
    frame_cnt = 0;
    @(posedge clk);
    wait (en);
    @(posedge clk);
    forever begin
      for (int f = 0; f < 2; f++) begin
        for (int l = 0; l < V_BLANK + V_ACTIVE; l++) begin
          bit vb;
          vb = (l < V_BLANK);
          put_code(f[0], vb, 1'b1);
          for (int i = 0; i < H_BLANK; i++) put(i[0] ? 8'h10 : 8'h80);
          put_code(f[0], vb, 1'b0);
          for (int p = 0; p < H_ACTIVE; p += 2) begin
            logic [23:0] c;
            if (vb) begin
              put(8'h80); put(8'h10); put(8'h80); put(8'h10);
            end else begin
              int y;
              y = 2 * (l - V_BLANK) + f;
              c = in_wand(p, y) ? fg_ycc : bg_ycc;
              put(c[15:8]); put(c[23:16]); put(c[7:0]);
              c = in_wand(p + 1, y) ? fg_ycc : bg_ycc;
              put(c[23:16]);
            end
          end
        end
      end
      frame_cnt++;
    end
  end

endmodule
