// tb_top_colour_detect: end-to-end test of the wand-tracking peripheral at
// reduced frame size (32 pixels x 8 lines per field). A stream model plays
// the video decoder, a memory model with random stalls takes the frame
// writes, and register reads and writes play the processor's software:
// set colour and minimum cluster, write Go with Colour_Norm, poll Done,
// read the three result registers.
//
// Cases: a red wand with a two-pixel speck that the cluster filter must
// drop; the same with the filter at 1 so the speck widens the box; a green
// and a blue wand (colour switch). Each search is checked against the
// rectangle placed in the picture, its centre, Done clearing on Go and the
// Go-to-Done time (more than one frame, less than two frames plus
// synchronizer latency). Every memory write is checked for address range
// and colour. Finally the memory is held off to force dropped lines. Each
// mechanism is counted and one that never happened is a failure.
module tb_top_colour_detect;
  import idio_pkg::*;
  localparam int HA = 32, HB = 16, VB = 2, VA = 8;
  localparam int STRIDE = 64;
  localparam logic [31:0] BASE = 32'h0010_0000;
  localparam int FRAME_CLKS = 2 * (VB + VA) * (8 + HB + 2 * HA);   // llc clocks
  localparam logic [23:0] BG    = {8'd180, 8'd128, 8'd128};
  localparam logic [23:0] RED   = {8'd81,  8'd90,  8'd240};
  localparam logic [23:0] GREEN = {8'd145, 8'd54,  8'd34};
  localparam logic [23:0] BLUE  = {8'd41,  8'd240, 8'd110};

  logic clk_bus = 0, clk_llc = 0, rst_bus = 1, rst_llc = 1, en = 0;
  logic reg_cs = 0, reg_we = 0, reg_ack;
  logic [4:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic mem_req, mem_ack = 0;
  logic [31:0] mem_addr, mem_wdata;
  logic [15:0] lines_dropped;
  logic [7:0] vid_data;
  logic frame_start, wand_busy;
  logic [23:0] fg = RED;
  int frame_cnt;
  int wx0 = 10, wx1 = 17, wy0 = 4, wy1 = 9, sx = 24, sy = 13, slen = 2;

  int checks = 0, failures = 0;
  int n_go = 0, n_done = 0, n_fs = 0, n_wr = 0, n_stall = 0, n_speck_drop = 0, n_speck_keep = 0;
  int n_red = 0, n_green = 0, n_blue = 0;
  bit stall_all = 0;

  bt656_source #(.H_ACTIVE(HA), .H_BLANK(HB), .V_BLANK(VB), .V_ACTIVE(VA)) src (
    .clk(clk_llc), .en, .bg_ycc(BG), .fg_ycc(fg), .wx0, .wx1, .wy0, .wy1, .sx, .sy, .slen,
    .dout(vid_data), .frame_cnt
  );

  top_colour_detect #(.LINE_ADDR_W(5), .LINE_STRIDE(STRIDE), .FRAME_BASE(BASE)) dut (.*);

  always #5 clk_bus = !clk_bus;
  always #18.5 clk_llc = !clk_llc;

  longint llc_cyc = 0;
  always @(posedge clk_llc) begin
    llc_cyc++;
    if (!rst_llc && frame_start) n_fs++;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // grey background converts to 0xBFBFBF; the wand colours to saturated RGB
  function automatic bit colour_ok(input logic [23:0] c);
    return (c == 24'hBFBFBF) || (c[23:16] >= 8'hFD && c[15:0] <= 16'h0101) ||
           (c[15:8] >= 8'hFD && c[23:16] <= 8'h01 && c[7:0] <= 8'h01) ||
           (c[7:0] >= 8'hFD && c[23:8] <= 16'h0101);
  endfunction

  always @(posedge clk_bus) begin
    mem_ack <= !stall_all && ($urandom_range(0, 2) != 0);
    if (!rst_bus && mem_req && !mem_ack) n_stall++;
    if (!rst_bus && mem_req && mem_ack) begin
      int off;
      off = int'((mem_addr - BASE) >> 2);
      n_wr++;
      checks++;
      if (off / STRIDE >= 2 * VA || off % STRIDE >= HA || mem_wdata[31:24] != 0 ||
          !colour_ok(mem_wdata[23:0])) begin
        failures++;
        $display("FAIL: write %h <= %h", mem_addr, mem_wdata);
      end
    end
  end

  task automatic reg_write(input logic [4:0] a, input logic [31:0] d);
    @(posedge clk_bus);
    reg_cs <= 1; reg_we <= 1; reg_addr <= a; reg_wdata <= d;
    @(posedge clk_bus);
    reg_cs <= 0; reg_we <= 0;
    @(posedge clk_bus);
  endtask

  task automatic reg_read(input logic [4:0] a, output logic [31:0] d);
    @(posedge clk_bus);
    reg_cs <= 1; reg_we <= 0; reg_addr <= a;
    @(posedge clk_bus);
    reg_cs <= 0;
    @(posedge clk_bus); #1;
    d = reg_rdata;
  endtask

  task automatic search(input int colour, input int norm, input int ign,
                        input int el, input int er, input int et, input int eb);
    logic [31:0] d;
    longint t0, dt;
    reg_write(5'h04, {14'b0, 2'(colour), 16'(ign)});
    reg_write(5'h00, {1'b1, 15'b0, 16'(norm)});
    t0 = llc_cyc;
    n_go++;
    reg_read(5'h00, d);
    check(!d[30] && !d[31], $sformatf("Done cleared and Go reads 0 after Go (%h)", d));
    check(d[15:0] == 16'(norm), "Colour_Norm read back");
    do reg_read(5'h00, d); while (!d[30]);
    dt = llc_cyc - t0;
    n_done++;
    check(dt > FRAME_CLKS && dt < 2 * FRAME_CLKS + 20,
          $sformatf("Go to Done time %0d video clocks, frame %0d", dt, FRAME_CLKS));
    reg_read(5'h08, d);
    check(d == {16'(el), 16'(er)}, $sformatf("LEFT_RIGHT %h exp %0d %0d", d, el, er));
    reg_read(5'h0C, d);
    check(d == {16'(et), 16'(eb)}, $sformatf("TOP_BOTTOM %h exp %0d %0d", d, et, eb));
    reg_read(5'h10, d);
    check(d == {16'((el + er) / 2), 16'((et + eb) / 2)}, $sformatf("CENTRE %h", d));
  endtask

  initial begin
    repeat (4) @(posedge clk_llc);
    rst_llc <= 0; rst_bus <= 0;
    en <= 1;
    wait (frame_cnt == 1);
    // red wand, speck (2 pixels) below the 3-pixel cluster limit: dropped
    search(0, 16'h1000, 3, wx0, wx1, wy0, wy1);
    n_red++; n_speck_drop++;
    // same picture, every pixel counts: the speck widens the box
    search(0, 16'h1000, 1, wx0, sx + slen - 1, wy0, sy);
    n_red++; n_speck_keep++;
    // colour switch to green, then blue
    fg = GREEN;
    search(1, 16'h2000, 3, wx0, wx1, wy0, wy1);
    n_green++; n_speck_drop++;
    fg = BLUE;
    wx0 = 2; wx1 = 5; wy0 = 0; wy1 = 3;
    search(2, 16'h0800, 2, wx0, sx + slen - 1, wy0, sy);
    n_blue++; n_speck_keep++;
    // overflow: hold the memory off for a frame
    stall_all = 1;
    begin
      int f0;
      f0 = frame_cnt;
      wait (frame_cnt == f0 + 1);
    end
    stall_all = 0;
    repeat (2000) @(posedge clk_bus);
    $display("go=%0d done=%0d frame_starts=%0d writes=%0d stalls=%0d dropped=%0d speck_drop=%0d speck_keep=%0d red=%0d green=%0d blue=%0d",
             n_go, n_done, n_fs, n_wr, n_stall, lines_dropped, n_speck_drop, n_speck_keep, n_red, n_green, n_blue);
    check(n_go == 4 && n_done == 4, "every Go ended in Done");
    check(n_fs >= 6, "frame starts seen");
    check(n_wr >= 4 * 2 * VA * HA, "frames written to memory");
    check(n_stall > 0, "memory stall happened");
    check(lines_dropped > 0, "line overflow happened");
    check(n_speck_drop > 0 && n_speck_keep > 0, "cluster filter both ways");
    check(n_red > 0 && n_green > 0 && n_blue > 0, "all three wand colours");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * FRAME_CLKS) @(posedge clk_llc);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
