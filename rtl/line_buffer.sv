// line_buffer: simple dual-port RAM with independent write and read clocks.
//
// Holds RGB pixels of video lines between the line-locked video clock (write
// side) and the bus clock (read side). The write port stores data at waddr
// when we is high; the read port returns the word at raddr one read clock
// later (registered output, as a block RAM does). The depth defaults to two
// 1024-pixel lines so one line can be written while the previous one is
// read out; the document describes a single line, the second half is this
// design's choice. Written as an array so synthesis maps it to block RAM.
module line_buffer #(
  parameter int unsigned ADDR_W = 11,
  parameter int unsigned DATA_W = 24
) (
  input  logic              wclk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              rclk,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end

endmodule
