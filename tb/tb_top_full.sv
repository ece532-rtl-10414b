// tb_top_full: one complete wand search with the peripheral at its default
// sizes and a full-size interlaced stream: 720 active pixels per line, 1716
// clocks per line, 262 lines per field of which 240 are active (480-line
// frames). A red 40 x 32 pixel wand and a two-pixel speck are placed on a
// grey background. Software writes the colour (red), the minimum cluster
// (3 pixels) and Go with Colour_Norm, polls Done and reads the results,
// which must give the rectangle and its centre. Every memory write of the
// second and third frames is checked for address and colour, and each
// pixel must be written exactly once per frame.
module tb_top_full;
  localparam int HA = 720, HB = 268, VB = 22, VA = 240;
  localparam int FRAME_CLKS = 2 * (VB + VA) * (8 + HB + 2 * HA);
  localparam logic [23:0] BG  = {8'd180, 8'd128, 8'd128};
  localparam logic [23:0] RED = {8'd81,  8'd90,  8'd240};

  logic clk_bus = 0, clk_llc = 0, rst_bus = 1, rst_llc = 1, en = 0;
  logic reg_cs = 0, reg_we = 0, reg_ack;
  logic [4:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic mem_req, mem_ack = 0;
  logic [31:0] mem_addr, mem_wdata;
  logic [15:0] lines_dropped;
  logic [7:0] vid_data;
  logic frame_start, wand_busy;
  int frame_cnt;
  int wx0 = 300, wx1 = 339, wy0 = 200, wy1 = 231, sx = 100, sy = 400, slen = 2;
  int checks = 0, failures = 0, n_wr = 0;
  bit counting = 0;
  byte written [2*VA][HA];

  bt656_source #(.H_ACTIVE(HA), .H_BLANK(HB), .V_BLANK(VB), .V_ACTIVE(VA)) src (
    .clk(clk_llc), .en, .bg_ycc(BG), .fg_ycc(RED), .wx0, .wx1, .wy0, .wy1, .sx, .sy, .slen,
    .dout(vid_data), .frame_cnt
  );

  top_colour_detect dut (.*);

  always #5 clk_bus = !clk_bus;
  always #18.5 clk_llc = !clk_llc;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk_bus) begin
    mem_ack <= ($urandom_range(0, 3) != 0);
    if (!rst_bus && mem_req && mem_ack && counting) begin
      int off, x, y;
      bit w, ok;
      off = int'(mem_addr >> 2);
      y = off / 1024; x = off % 1024;
      w = (x >= wx0 && x <= wx1 && y >= wy0 && y <= wy1) || (y == sy && x >= sx && x < sx + slen);
      ok = (y < 2 * VA) && (x < HA) && (mem_wdata[31:24] == 0) &&
           (w ? (mem_wdata[23:16] >= 8'hFD && mem_wdata[15:0] <= 16'h0101)
              : (mem_wdata[23:0] == 24'hBFBFBF));
      n_wr++;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL: write %h <= %h", mem_addr, mem_wdata);
      end else written[y][x]++;
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

  initial begin
    logic [31:0] d;
    int polls;
    repeat (4) @(posedge clk_llc);
    rst_llc <= 0; rst_bus <= 0;
    en <= 1;
    wait (frame_cnt == 1);
    counting = 1;
    reg_write(5'h04, 32'h0000_0003);          // red, clusters under 3 pixels ignored
    reg_write(5'h00, 32'h8000_1000);          // Go, Colour_Norm 0x1000
    polls = 0;
    do begin
      repeat (100) @(posedge clk_bus);
      reg_read(5'h00, d);
      polls++;
    end while (!d[30] && polls < 100000);
    check(d[30], "Done");
    reg_read(5'h08, d);
    check(d == {16'(wx0), 16'(wx1)}, $sformatf("LEFT_RIGHT %h", d));
    reg_read(5'h0C, d);
    check(d == {16'(wy0), 16'(wy1)}, $sformatf("TOP_BOTTOM %h", d));
    reg_read(5'h10, d);
    check(d == {16'((wx0 + wx1) / 2), 16'((wy0 + wy1) / 2)}, $sformatf("CENTRE %h", d));
    wait (frame_cnt == 3);
    counting = 0;
    repeat (5000) @(posedge clk_bus);
    begin
      int missing;
      missing = 0;
      for (int y = 0; y < 2 * VA; y++)
        for (int x = 0; x < HA; x++)
          if (written[y][x] != 2) missing++;
      check(missing == 0, $sformatf("%0d pixels not written exactly once per frame", missing));
    end
    check(lines_dropped == 0, "no dropped lines");
    $display("writes=%0d", n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * FRAME_CLKS) @(posedge clk_llc);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
