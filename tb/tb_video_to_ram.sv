// tb_video_to_ram: feeds two interlaced frames (16 pixels x 4 lines per
// field, a wand-red rectangle and a speck on a grey background) from the
// stream model into video_to_ram, with a memory port that stalls at random.
// Checks: every pixel of the RGB stream has the colour its coordinates
// should have (BT.601 in floating point, one code of tolerance); every
// memory write lands at FRAME_BASE + 4*(y*LINE_STRIDE + x) with that
// colour as 0x00RRGGBB; every pixel of both frames is written exactly once
// per frame; one frame_start between the two frames. Finally the port is
// held off for several line times and lines_dropped must count the lost
// lines.
module tb_video_to_ram;
  import idio_pkg::*;
  localparam int HA = 16, HB = 12, VB = 2, VA = 4;
  localparam int STRIDE = 32;
  localparam logic [31:0] BASE = 32'h0001_0000;
  localparam logic [23:0] BG = {8'd180, 8'd128, 8'd128};   // Y Cb Cr grey
  localparam logic [23:0] FG = {8'd81, 8'd90, 8'd240};     // Y Cb Cr red

  logic clk_llc = 0, clk_bus = 0, rst_llc = 1, rst_bus = 1, en = 0;
  logic [7:0] vid_data;
  logic pix_valid, frame_start, mem_req, mem_ack = 0;
  rgb_t pix_rgb;
  coord_t pix_x, pix_y;
  logic [31:0] mem_addr, mem_wdata;
  logic [15:0] lines_dropped;
  int frame_cnt;
  int checks = 0, failures = 0, n_fs = 0, n_stall = 0, n_wr = 0;
  int wcount [2*VA][HA];
  bit stall_all = 0;
  int wx0 = 4, wx1 = 9, wy0 = 2, wy1 = 5, sx = 12, sy = 6, slen = 2;

  bt656_source #(.H_ACTIVE(HA), .H_BLANK(HB), .V_BLANK(VB), .V_ACTIVE(VA)) src (
    .clk(clk_llc), .en, .bg_ycc(BG), .fg_ycc(FG), .wx0, .wx1, .wy0, .wy1, .sx, .sy, .slen,
    .dout(vid_data), .frame_cnt
  );

  video_to_ram #(.LINE_ADDR_W(4), .LINE_STRIDE(STRIDE), .FRAME_BASE(BASE)) dut (.*);

  always #18.5 clk_llc = !clk_llc;
  always #5 clk_bus = !clk_bus;

  function automatic int clampi(input real v);
    int r;
    r = $rtoi(v + 0.5 + 1000.0) - 1000;
    return r < 0 ? 0 : (r > 255 ? 255 : r);
  endfunction

  function automatic logic [23:0] to_rgb(input logic [23:0] c);
    real yy, cb, cr;
    int r, g, b;
    yy = 1.164 * (real'(c[23:16]) - 16.0);
    cb = real'(c[15:8]) - 128.0; cr = real'(c[7:0]) - 128.0;
    r = clampi(yy + 1.596 * cr); g = clampi(yy - 0.813 * cr - 0.391 * cb); b = clampi(yy + 2.018 * cb);
    return {r[7:0], g[7:0], b[7:0]};
  endfunction

  function automatic bit near(input logic [23:0] a, input logic [23:0] b);
    for (int i = 0; i < 3; i++) begin
      int d;
      d = int'(a[8*i +: 8]) - int'(b[8*i +: 8]);
      if (d > 1 || d < -1) return 0;
    end
    return 1;
  endfunction

  function automatic logic [23:0] exp_rgb(input int x, input int y);
    bit w;
    w = (x >= wx0 && x <= wx1 && y >= wy0 && y <= wy1) || (y == sy && x >= sx && x < sx + slen);
    return to_rgb(w ? FG : BG);
  endfunction

  always @(posedge clk_llc) if (!rst_llc) begin
    if (frame_start) n_fs++;
    if (pix_valid) begin
      checks++;
      if (!(pix_x < HA && pix_y < 2 * VA && near(pix_rgb, exp_rgb(pix_x, pix_y)))) begin
        failures++;
        $display("FAIL: stream pixel (%0d,%0d) = %h", pix_x, pix_y, pix_rgb);
      end
    end
  end

  always @(posedge clk_bus) begin
    mem_ack <= !stall_all && ($urandom_range(0, 3) != 0);
    if (!rst_bus && mem_req && !mem_ack) n_stall++;
    if (!rst_bus && mem_req && mem_ack) begin
      int off, x, y;
      off = int'((mem_addr - BASE) >> 2);
      y = off / STRIDE; x = off % STRIDE;
      n_wr++;
      checks++;
      if (mem_addr[1:0] != 0 || x >= HA || y >= 2 * VA || mem_wdata[31:24] != 0 ||
          !near(mem_wdata[23:0], exp_rgb(x, y))) begin
        failures++;
        $display("FAIL: write %h <= %h", mem_addr, mem_wdata);
      end else wcount[y][x]++;
    end
  end

  initial begin
    repeat (4) @(posedge clk_llc);
    rst_llc <= 0; rst_bus <= 0;
    en <= 1;
    wait (frame_cnt == 2);
    checks++;
    if (n_fs != 1) begin failures++; $display("FAIL: frame_start count %0d", n_fs); end
    repeat (200) @(posedge clk_bus);
    for (int y = 0; y < 2 * VA; y++)
      for (int x = 0; x < HA; x++) begin
        checks++;
        if (wcount[y][x] != 2) begin failures++; $display("FAIL: pixel (%0d,%0d) written %0d times", x, y, wcount[y][x]); end
      end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: memory stall never exercised"); end
    // overflow: hold the memory port off for a field
    stall_all = 1;
    wait (frame_cnt == 3);
    stall_all = 0;
    checks++;
    if (lines_dropped == 0) begin failures++; $display("FAIL: no dropped line counted"); end
    $display("writes=%0d stalls=%0d dropped=%0d", n_wr, n_stall, lines_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_llc);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
