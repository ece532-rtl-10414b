// clock_synchronizer: mux-enable crossing between the bus clock and the
// pixel clock.
//
// Two crossings, each made of one enable signal and the data it qualifies.
// Bus to pixel: a Go pulse (go_bus) copies the configuration into a holding
// register and flips a toggle. The toggle passes a two-flip-flop
// synchronizer in the pixel domain; its change is the enable of a mux that
// loads the (now stable) configuration into pixel-domain registers, and the
// same clock raises go_pix for one cycle, so cfg_pix is valid when go_pix is
// seen. Pixel to bus: a Done pulse (done_pix) with its result record works
// the same way in the other direction and gives done_bus with res_bus.
//
// Latency is three to four clocks of the receiving domain. The data side of
// each crossing is only sampled after the enable has been synchronized, so
// the sender must not issue two pulses closer than about four receiving
// clocks; Go and Done are at least a frame apart in this design. The
// document names the mux-enable scheme and the Go and Done enables; the
// toggle encoding, the holding register and the latency are this design's.
module clock_synchronizer
  import idio_pkg::*;
(
  // bus clock domain
  input  logic         clk_bus,
  input  logic         rst_bus,
  input  logic         go_bus,
  input  wand_cfg_t    cfg_bus,
  output logic         done_bus,
  output wand_result_t res_bus,
  // pixel clock domain
  input  logic         clk_pix,
  input  logic         rst_pix,
  output logic         go_pix,
  output wand_cfg_t    cfg_pix,
  input  logic         done_pix,
  input  wand_result_t res_pix
);

  // ---- bus -> pixel: Go and configuration ----
  logic      go_tog;
  wand_cfg_t cfg_hold;
  logic [2:0] go_sync;

  always_ff @(posedge clk_bus) begin
    if (rst_bus) begin
      go_tog   <= 1'b0;
      cfg_hold <= '0;
    end else if (go_bus) begin
      go_tog   <= !go_tog;
      cfg_hold <= cfg_bus;
    end
  end

  always_ff @(posedge clk_pix) begin
    if (rst_pix) begin
      go_sync <= '0;
      go_pix  <= 1'b0;
      cfg_pix <= '0;
    end else begin
      go_sync <= {go_sync[1:0], go_tog};
      go_pix  <= go_sync[2] ^ go_sync[1];
      if (go_sync[2] ^ go_sync[1]) cfg_pix <= cfg_hold;
    end
  end

  // ---- pixel -> bus: Done and result ----
  logic         done_tog;
  wand_result_t res_hold;
  logic [2:0]   done_sync;

  always_ff @(posedge clk_pix) begin
    if (rst_pix) begin
      done_tog <= 1'b0;
      res_hold <= '0;
    end else if (done_pix) begin
      done_tog <= !done_tog;
      res_hold <= res_pix;
    end
  end

  always_ff @(posedge clk_bus) begin
    if (rst_bus) begin
      done_sync <= '0;
      done_bus  <= 1'b0;
      res_bus   <= '0;
    end else begin
      done_sync <= {done_sync[1:0], done_tog};
      done_bus  <= done_sync[2] ^ done_sync[1];
      if (done_sync[2] ^ done_sync[1]) res_bus <= res_hold;
    end
  end

endmodule
