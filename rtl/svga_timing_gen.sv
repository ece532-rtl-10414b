// svga_timing_gen: pixel and line numbering for interlaced video.
//
// Counts pixels within an active line and active lines within a field, and
// turns them into frame coordinates. An interlaced frame is sent as two
// fields; the field bit F tells which one a line belongs to. The frame line
// number is y = 2 * (line within field) + F, so the lines of both fields
// interleave into one progressive frame. The line counter restarts at the
// first active line after vertical blanking (V = 1); the pixel counter
// restarts at each start of active line and advances after every pixel.
//
// x and y are combinational views of the counters and are valid together
// with pix_valid. The document says only that this block handles interlaced
// video and outputs line numbers; the numbering rule is this design's.
module svga_timing_gen
  import idio_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   line_start,  // SAV of an active line
  input  logic   v,           // vertical blanking level
  input  logic   f,           // field bit
  input  logic   pix_valid,
  output coord_t x,
  output coord_t y
);

  logic [COORD_W-2:0] line_cnt;
  logic               first_line;
  coord_t             pix_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      line_cnt   <= '0;
      first_line <= 1'b1;
      pix_cnt    <= '0;
    end else begin
      if (v) first_line <= 1'b1;
      if (line_start) begin
        pix_cnt    <= '0;
        first_line <= 1'b0;
        line_cnt   <= first_line ? '0 : line_cnt + 1'b1;
      end else if (pix_valid) begin
        pix_cnt <= pix_cnt + 1'b1;
      end
    end
  end

  assign x = pix_cnt;
  assign y = {line_cnt, f};

endmodule
