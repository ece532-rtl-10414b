// video_to_ram: video decoder stream to RGB pixels and to the input frame in
// memory.
//
// Video side (line-locked clock clk_llc, one byte per clock): lf_decode finds
// the timing codes and the active bytes, vp422_444_dup rebuilds full YCbCr
// pixels, ycrcb2rgb converts them to RGB and svga_timing_gen numbers them
// (x within the line, y within the interlaced frame). neg_edge_detect turns
// the falling edge of the field bit into a frame_start pulse. The RGB
// stream, its coordinates and frame_start are brought out for the wand
// locator, so it can watch the same pixels that go to memory.
//
// Each pixel is also written into line_buffer at {slot, x}. At the end of
// every active line (EAV) the line number, its pixel count and its slot are
// frozen in hand-off registers, a toggle flips and the next line goes into
// the other slot. The line number is the one of the line's first pixel.
// Bus side (clk_bus): the toggle passes two flip-flops; its
// change enables the capture of the hand-off registers, which are stable for
// a whole line time. A small state machine then reads the line out of the
// buffer and writes it word by word to the memory port, one pixel per
// 32-bit word 0x00RRGGBB, at FRAME_BASE + 4*(y*LINE_STRIDE + x). A
// transfer happens on a clock where mem_req and mem_ack are both high;
// mem_req, mem_addr and mem_wdata hold until then. Each pixel takes at least
// two bus clocks. A line must be written within two line times, or a later
// line replaces it before it is sent (lines_dropped counts those).
//
// The document gives this block's purpose and its Xilinx sub-blocks; the
// memory-port handshake, the pixel word format, the frame layout and the
// two-slot buffer are this design's own choices. The document clocks the
// pixel logic from a generated 13 MHz clock; here the 27 MHz line-locked
// clock is used directly and a pixel arrives every second clock.
module video_to_ram
  import idio_pkg::*;
#(
  parameter int unsigned LINE_ADDR_W = 10,        // pixels per slot = 2**LINE_ADDR_W
  parameter int unsigned LINE_STRIDE = 1024,      // words between frame lines
  parameter logic [31:0] FRAME_BASE  = 32'h0000_0000
) (
  input  logic        clk_llc,
  input  logic        rst_llc,
  input  logic [7:0]  vid_data,
  // RGB stream for the wand locator (clk_llc)
  output logic        pix_valid,
  output rgb_t        pix_rgb,
  output coord_t      pix_x,
  output coord_t      pix_y,
  output logic        frame_start,
  // memory write port (clk_bus)
  input  logic        clk_bus,
  input  logic        rst_bus,
  output logic        mem_req,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic        mem_ack,
  output logic [15:0] lines_dropped
);

  // ---------------- video clock domain ----------------
  logic       byte_valid, sav, eav, fld, vbl;
  logic [7:0] byte_data;
  logic       ycc_valid;
  ycbcr_t     ycc;

  lf_decode u_dec (
    .clk(clk_llc), .rst(rst_llc), .din(vid_data),
    .byte_valid, .byte_data, .sav, .eav, .f(fld), .v(vbl), .h()
  );

  vp422_444_dup u_dup (
    .clk(clk_llc), .rst(rst_llc), .line_start(sav),
    .byte_valid, .byte_data, .pix_valid(ycc_valid), .pix(ycc)
  );

  ycrcb2rgb u_csc (
    .clk(clk_llc), .rst(rst_llc), .in_valid(ycc_valid), .ycc,
    .out_valid(pix_valid), .rgb(pix_rgb)
  );

  svga_timing_gen u_tim (
    .clk(clk_llc), .rst(rst_llc), .line_start(sav), .v(vbl), .f(fld),
    .pix_valid, .x(pix_x), .y(pix_y)
  );

  neg_edge_detect u_ned (
    .clk(clk_llc), .rst(rst_llc), .sig(fld), .fall(frame_start)
  );

  logic                 wslot;
  logic                 line_has_pix;
  logic                 ho_tog;
  logic                 ho_slot;
  coord_t               ho_y;
  coord_t               line_y;
  logic [LINE_ADDR_W:0] ho_cnt;
  logic                 buf_we;

  assign buf_we = pix_valid && (pix_x < coord_t'(2**LINE_ADDR_W));

  always_ff @(posedge clk_llc) begin
    if (rst_llc) begin
      wslot        <= 1'b0;
      line_has_pix <= 1'b0;
      ho_tog       <= 1'b0;
      ho_slot      <= 1'b0;
      ho_y         <= '0;
      ho_cnt       <= '0;
      line_y       <= '0;
    end else begin
      if (buf_we) line_has_pix <= 1'b1;
      // the line number is taken from the first pixel: the EAV closing the
      // last line of a field already carries the next field's F bit
      if (buf_we && !line_has_pix) line_y <= pix_y;
      if (eav && line_has_pix) begin
        ho_slot      <= wslot;
        ho_y         <= line_y;
        ho_cnt       <= (pix_x > coord_t'(2**LINE_ADDR_W)) ?
                        (LINE_ADDR_W+1)'(2**LINE_ADDR_W) : pix_x[LINE_ADDR_W:0];
        ho_tog       <= !ho_tog;
        wslot        <= !wslot;
        line_has_pix <= 1'b0;
      end
    end
  end

  logic [LINE_ADDR_W:0]   raddr;
  logic [23:0]            rdata;

  line_buffer #(.ADDR_W(LINE_ADDR_W + 1), .DATA_W(24)) u_lbuf (
    .wclk(clk_llc), .we(buf_we), .waddr({wslot, pix_x[LINE_ADDR_W-1:0]}), .wdata(pix_rgb),
    .rclk(clk_bus), .raddr, .rdata
  );

  // ---------------- bus clock domain ----------------
  typedef enum logic [1:0] {S_IDLE, S_READ, S_REQ} wr_state_e;
  wr_state_e state;

  logic [2:0]             tog_sync;
  logic                   pend;
  logic                   cap_slot, cur_slot;
  coord_t                 cap_y, cur_y;
  logic [LINE_ADDR_W:0]   cap_cnt, cur_cnt;
  logic [LINE_ADDR_W-1:0] idx;
  logic                   new_line;

  assign new_line = tog_sync[2] ^ tog_sync[1];

  always_ff @(posedge clk_bus) begin
    if (rst_bus) begin
      tog_sync      <= '0;
      pend          <= 1'b0;
      cap_slot      <= 1'b0; cap_y <= '0; cap_cnt <= '0;
      cur_slot      <= 1'b0; cur_y <= '0; cur_cnt <= '0;
      idx           <= '0;
      state         <= S_IDLE;
      lines_dropped <= '0;
    end else begin
      tog_sync <= {tog_sync[1:0], ho_tog};
      if (new_line) begin
        // mux-enable capture: hand-off registers are stable by now
        cap_slot <= ho_slot;
        cap_y    <= ho_y;
        cap_cnt  <= ho_cnt;
        pend     <= 1'b1;
        if (pend) lines_dropped <= lines_dropped + 1'b1;
      end
      unique case (state)
        S_IDLE: if (pend && !new_line) begin
          pend     <= 1'b0;
          cur_slot <= cap_slot;
          cur_y    <= cap_y;
          cur_cnt  <= cap_cnt;
          idx      <= '0;
          state    <= S_READ;
        end
        S_READ: state <= S_REQ;
        S_REQ: if (mem_ack) begin
          if ((LINE_ADDR_W+1)'(idx) + 1'b1 >= cur_cnt) begin
            state <= S_IDLE;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign raddr     = {cur_slot, idx};
  assign mem_req   = (state == S_REQ);
  assign mem_wdata = {8'h00, rdata};
  assign mem_addr  = FRAME_BASE + ((32'(cur_y) * LINE_STRIDE + 32'(idx)) << 2);

  // Handshake rule: a request holds its address and data until accepted
  a_req_hold: assert property (@(posedge clk_bus) disable iff (rst_bus)
    mem_req && !mem_ack |=> mem_req && $stable(mem_addr) && $stable(mem_wdata));

endmodule
