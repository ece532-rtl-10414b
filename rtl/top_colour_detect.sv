// top_colour_detect: wand-tracking video peripheral.
//
// Wraps the four custom parts of the wand tracker. video_to_ram decodes the
// 8-bit YCbCr stream from the video decoder board (clk_llc, 27 MHz), writes
// every active line as RGB words to the input frame through the memory
// write port (clk_bus), and brings out the RGB pixel stream with its frame
// coordinates and a frame-start pulse. locate_wand watches that stream in
// the video clock domain and, when started, measures one whole frame and
// returns the wand's bounding box and centre. control_registers is the
// processor's view (five 32-bit registers on the register port, clk_bus),
// and clock_synchronizer carries Go plus the configuration into the video
// domain and Done plus the results back.
//
// Software sequence: write WAND_IGNORE (colour, minimum cluster), write
// STATUS_NORM with Go = 1 and the normalisation value, poll until Done = 1,
// read LEFT_RIGHT, TOP_BOTTOM and CENTRE. Done appears at the second frame
// start after Go has crossed into the video domain, i.e. one to two frame
// times after the write, plus a few clocks of each synchronizer.
//
// Resets are synchronous and active high, one per clock domain. The
// partitioning follows the document; the port protocols are this design's
// own stand-ins for the processor bus and the memory controller port.
module top_colour_detect
  import idio_pkg::*;
#(
  parameter int unsigned LINE_ADDR_W = 10,
  parameter int unsigned LINE_STRIDE = 1024,
  parameter logic [31:0] FRAME_BASE  = 32'h0000_0000
) (
  // bus clock domain (100 MHz)
  input  logic        clk_bus,
  input  logic        rst_bus,
  input  logic        reg_cs,
  input  logic        reg_we,
  input  logic [4:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic        reg_ack,
  output logic        mem_req,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic        mem_ack,
  output logic [15:0] lines_dropped,
  // video clock domain (27 MHz line-locked clock from the decoder)
  input  logic        clk_llc,
  input  logic        rst_llc,
  input  logic [7:0]  vid_data,
  output logic        frame_start,
  output logic        wand_busy
);

  logic         pix_valid;
  rgb_t         pix_rgb;
  coord_t       pix_x, pix_y;

  logic         go_bus, go_pix, done_bus, done_pix;
  wand_cfg_t    cfg_bus, cfg_pix;
  wand_result_t res_bus, res_pix;

  video_to_ram #(
    .LINE_ADDR_W(LINE_ADDR_W), .LINE_STRIDE(LINE_STRIDE), .FRAME_BASE(FRAME_BASE)
  ) u_v2r (
    .clk_llc, .rst_llc, .vid_data,
    .pix_valid, .pix_rgb, .pix_x, .pix_y, .frame_start,
    .clk_bus, .rst_bus, .mem_req, .mem_addr, .mem_wdata, .mem_ack, .lines_dropped
  );

  locate_wand u_lw (
    .clk(clk_llc), .rst(rst_llc), .start(go_pix), .cfg(cfg_pix), .frame_start,
    .pix_valid, .pix_rgb, .pix_x, .pix_y,
    .busy(wand_busy), .done(done_pix), .result(res_pix)
  );

  clock_synchronizer u_sync (
    .clk_bus, .rst_bus, .go_bus, .cfg_bus, .done_bus, .res_bus,
    .clk_pix(clk_llc), .rst_pix(rst_llc), .go_pix, .cfg_pix, .done_pix, .res_pix
  );

  control_registers u_regs (
    .clk(clk_bus), .rst(rst_bus), .reg_cs, .reg_we, .reg_addr, .reg_wdata,
    .reg_rdata, .reg_ack, .go(go_bus), .cfg(cfg_bus), .done_in(done_bus), .result(res_bus)
  );

endmodule
