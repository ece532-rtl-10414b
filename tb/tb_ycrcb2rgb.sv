// tb_ycrcb2rgb: checks the colour-space conversion against the BT.601
// equations evaluated in floating point (rounded, clamped), allowing one
// code of difference for the fixed-point coefficients, and checks the
// two-clock latency.
module tb_ycrcb2rgb;
  import idio_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  ycbcr_t ycc = '0;
  logic out_valid;
  rgb_t rgb;
  int checks = 0, failures = 0;
  int cyc = 0;
  ycbcr_t in_q[$];
  int t_q[$];

  ycrcb2rgb dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  function automatic int clampi(input real v);
    int r;
    r = $rtoi(v + 0.5 + 1000.0) - 1000;
    return r < 0 ? 0 : (r > 255 ? 255 : r);
  endfunction

  function automatic bit near(input int a, input int b);
    return (a - b <= 1) && (b - a <= 1);
  endfunction

  always @(posedge clk) if (!rst) begin
    if (in_valid) begin in_q.push_back(ycc); t_q.push_back(cyc); end
    if (out_valid) begin
      ycbcr_t c; int t; real yy, cb, cr; int er, eg, eb;
      c = in_q.pop_front(); t = t_q.pop_front();
      yy = 1.164 * (real'(c.y) - 16.0);
      cb = real'(c.cb) - 128.0; cr = real'(c.cr) - 128.0;
      er = clampi(yy + 1.596 * cr);
      eg = clampi(yy - 0.813 * cr - 0.391 * cb);
      eb = clampi(yy + 2.018 * cb);
      checks += 2;
      if (!(near(rgb.r, er) && near(rgb.g, eg) && near(rgb.b, eb))) begin
        failures++;
        $display("FAIL: ycc %h -> %h exp %02h%02h%02h", c, rgb, er[7:0], eg[7:0], eb[7:0]);
      end
      if (cyc - t != 2) begin failures++; $display("FAIL: latency %0d", cyc - t); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // corner values first, then random
    for (int i = 0; i < 600; i++) begin
      in_valid <= ($urandom_range(0, 3) != 0);
      if (i < 8) ycc <= '{y: (i[0] ? 8'd235 : 8'd16), cb: (i[1] ? 8'd240 : 8'd16), cr: (i[2] ? 8'd240 : 8'd16)};
      else ycc <= 24'($urandom);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (in_q.size() != 0) begin failures++; $display("FAIL: outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
