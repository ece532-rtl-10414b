// tb_locate_wand: drives synthetic frames (40 x 30 pixels, a pixel every
// second clock) with a wand rectangle, isolated specks of wand colour and
// random background, for each wand colour and several Colour_Norm and
// Ignore_Pixels settings. The expected bounding box is computed by scanning
// each line for runs of wand-coloured pixels and keeping runs at least
// Ignore_Pixels long. Checks the box, the centre, that pixels seen before
// the arming frame start do not count, that done comes exactly one clock
// after the frame_start that closes the measured frame and not earlier, and
// the empty-frame result.
module tb_locate_wand;
  import idio_pkg::*;
  localparam int W = 40, H = 30;
  logic clk = 0, rst = 1;
  logic start = 0, frame_start = 0, pix_valid = 0;
  wand_cfg_t cfg = '0;
  rgb_t pix_rgb = '0;
  coord_t pix_x = '0, pix_y = '0;
  logic busy, done;
  wand_result_t result;
  int checks = 0, failures = 0;
  int n_done = 0;
  rgb_t img [H][W];

  locate_wand dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) if (done) n_done++;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit ref_match(input rgb_t p, input int col, input int norm);
    int a, b, c;
    case (col)
      1: begin a = p.g; b = p.r; c = p.b; end
      2: begin a = p.b; b = p.r; c = p.g; end
      default: begin a = p.r; b = p.g; c = p.b; end
    endcase
    return (a * a - b * b - c * c - norm) > 0;
  endfunction

  function automatic rgb_t wand_px(input int col, input int lvl);
    rgb_t p;
    p = '{r: 8'($urandom_range(0, 40)), g: 8'($urandom_range(0, 40)), b: 8'($urandom_range(0, 40))};
    case (col)
      1: p.g = 8'(lvl);
      2: p.b = 8'(lvl);
      default: p.r = 8'(lvl);
    endcase
    return p;
  endfunction

  task automatic make_image(input int col, input bit with_wand);
    int x0, y0, w, h;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
      begin
        int base;
        base = $urandom_range(60, 200);
        img[y][x] = '{r: 8'(base + $urandom_range(0, 30)), g: 8'(base + $urandom_range(0, 30)),
                      b: 8'(base + $urandom_range(0, 30))};
      end
    if (!with_wand) return;
    x0 = $urandom_range(0, W - 10); y0 = $urandom_range(0, H - 8);
    w = $urandom_range(4, 9); h = $urandom_range(3, 7);
    for (int y = y0; y < y0 + h; y++)
      for (int x = x0; x < x0 + w; x++)
        img[y][x] = wand_px(col, $urandom_range(200, 255));
    for (int k = 0; k < 6; k++) begin   // specks of one or two pixels
      int sx, sy, sl;
      sx = $urandom_range(0, W - 2); sy = $urandom_range(0, H - 1); sl = $urandom_range(1, 2);
      for (int i = 0; i < sl; i++) img[sy][sx + i] = wand_px(col, 250);
    end
  endtask

  task automatic send_frame();
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        pix_valid <= 1; pix_rgb <= img[y][x]; pix_x <= coord_t'(x); pix_y <= coord_t'(y);
        @(posedge clk);
        pix_valid <= 0;
        @(posedge clk);
      end
      repeat (6) @(posedge clk);
    end
  endtask

  task automatic pulse_frame_start();
    frame_start <= 1; @(posedge clk); frame_start <= 0;
  endtask

  task automatic run_case(input int col, input int norm, input int ign, input bit with_wand);
    int l, r, t, b, nd;
    l = 'hFFFF; r = 0; t = 'hFFFF; b = 0;
    cfg <= '{colour_norm: 16'(norm), colour: 2'(col), ignore_pixels: 16'(ign)};
    start <= 1; @(posedge clk); start <= 0;
    cfg <= '0;   // configuration is latched at start
    // tail of a frame before the arming frame start: must not count
    make_image(col, 1'b1);
    for (int x = 0; x < W; x++) img[0][x] = wand_px(col, 255);
    send_frame();
    make_image(col, with_wand);
    for (int y = 0; y < H; y++) begin
      int s;
      s = -1;
      for (int x = 0; x <= W; x++) begin
        bit m;
        m = (x < W) && ref_match(img[y][x], col, norm);
        if (m && s < 0) s = x;
        if (!m && s >= 0) begin
          if (x - s >= ign && x - s >= 1) begin
            if (s < l) l = s;
            if (x - 1 > r) r = x - 1;
            if (y < t) t = y;
            if (y > b) b = y;
          end
          s = -1;
        end
      end
    end
    pulse_frame_start();
    send_frame();
    nd = n_done;
    check(busy, "busy while measuring");
    check(n_done == nd && !done, "no done before the closing frame start");
    frame_start <= 1; @(posedge clk); frame_start <= 0;
    #1 check(done, "done one clock after the closing frame start");
    @(posedge clk); #1;
    check(!done, "done lasts one clock");
    check(result.left == coord_t'(l) && result.right == coord_t'(r) &&
          result.top == coord_t'(t) && result.bottom == coord_t'(b),
          $sformatf("col %0d norm %0d ign %0d: box %0d..%0d x %0d..%0d exp %0d..%0d x %0d..%0d",
                    col, norm, ign, result.left, result.right, result.top, result.bottom, l, r, t, b));
    check(result.x == coord_t'((l + r) / 2) && result.y == coord_t'((t + b) / 2),
          $sformatf("centre %0d,%0d", result.x, result.y));
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run_case(0, 16'h1000, 3, 1);
    run_case(1, 16'h2000, 3, 1);
    run_case(2, 16'h0800, 3, 1);
    run_case(0, 0, 0, 1);
    run_case(0, 16'h4000, 1, 1);
    run_case(1, 16'h1000, 2, 1);
    run_case(2, 16'hFFFF, 4, 1);
    run_case(0, 16'h1000, 3, 0);
    check(result.x == 16'h7FFF && result.left == 16'hFFFF, "empty frame result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
