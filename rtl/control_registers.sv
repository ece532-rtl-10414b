// control_registers: the five 32-bit software registers of the wand locator.
//
//   offset 0x00 STATUS_NORM  [31] Go (write 1 starts a search, reads 0)
//                            [30] Done (read only; set when results arrive,
//                                 cleared when 1 is written to Go)
//                            [15:0] Colour_Norm (R/W), other bits read 0
//   offset 0x04 WAND_IGNORE  [17:16] Wand_Colour (0 red, 1 green, 2 blue)
//                            [15:0]  Ignore_Pixels (R/W), other bits read 0
//   offset 0x08 LEFT_RIGHT   [31:16] Left,  [15:0] Right   (read only)
//   offset 0x0C TOP_BOTTOM   [31:16] Top,   [15:0] Bottom  (read only)
//   offset 0x10 CENTRE       [31:16] X,     [15:0] Y       (read only)
//
// Bus: a single-beat register port standing in for the processor bus slave.
// An access is presented with reg_cs high for one clock (reg_we selects a
// write; reg_addr is the byte offset, bits [4:2] pick the register). The
// block answers on the next clock with reg_ack and, for reads, reg_rdata.
// Writes to read-only registers and unknown offsets are ignored; reads of
// unknown offsets return 0. A Go write pulses go for one clock with the
// configuration registers as they stand after that write. done_in (one
// clock) sets Done; the result fields are read straight from the result
// input, which holds still between Done pulses.
//
// The fields, their positions and access rules follow the document's
// register tables. The register order and offsets and the simple bus
// handshake are this design's own choices.
module control_registers
  import idio_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         reg_cs,
  input  logic         reg_we,
  input  logic [4:0]   reg_addr,
  input  logic [31:0]  reg_wdata,
  output logic [31:0]  reg_rdata,
  output logic         reg_ack,
  output logic         go,
  output wand_cfg_t    cfg,
  input  logic         done_in,
  input  wand_result_t result
);

  logic [NORM_W-1:0] colour_norm;
  logic [1:0]        wand_colour;
  logic [IGN_W-1:0]  ignore_pixels;
  logic              done_flag;
  logic [2:0]        widx;

  assign widx = reg_addr[4:2];

  always_ff @(posedge clk) begin
    if (rst) begin
      colour_norm   <= '0;
      wand_colour   <= '0;
      ignore_pixels <= '0;
      done_flag     <= 1'b0;
      go            <= 1'b0;
      reg_ack       <= 1'b0;
      reg_rdata     <= '0;
    end else begin
      go      <= 1'b0;
      reg_ack <= reg_cs;
      if (done_in) done_flag <= 1'b1;
      if (reg_cs && reg_we) begin
        unique case (widx)
          REG_STATUS_NORM: begin
            colour_norm <= reg_wdata[15:0];
            if (reg_wdata[GO_BIT]) begin
              go        <= 1'b1;
              done_flag <= 1'b0;
            end
          end
          REG_WAND_IGNORE: begin
            wand_colour   <= reg_wdata[17:16];
            ignore_pixels <= reg_wdata[15:0];
          end
          default: ;
        endcase
      end
      if (reg_cs && !reg_we) begin
        unique case (widx)
          REG_STATUS_NORM: reg_rdata <= {1'b0, done_flag, 14'b0, colour_norm};
          REG_WAND_IGNORE: reg_rdata <= {14'b0, wand_colour, ignore_pixels};
          REG_LEFT_RIGHT:  reg_rdata <= {result.left, result.right};
          REG_TOP_BOTTOM:  reg_rdata <= {result.top, result.bottom};
          REG_CENTRE:      reg_rdata <= {result.x, result.y};
          default:         reg_rdata <= '0;
        endcase
      end
    end
  end

  assign cfg = '{colour_norm: colour_norm, colour: wand_colour, ignore_pixels: ignore_pixels};

  // A bus access is a single-clock request
  a_single_beat: assert property (@(posedge clk) disable iff (rst) reg_cs |=> !reg_cs);

endmodule
