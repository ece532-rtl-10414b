// tb_vp422_444_dup: checks chroma duplication. Random Cb Y Cr Y byte groups
// are fed, with idle gaps; each group must produce two pixels carrying the
// group's Cb and Cr and their own Y, one clock after the completing byte.
module tb_vp422_444_dup;
  import idio_pkg::*;
  logic clk = 0, rst = 1;
  logic line_start = 0, byte_valid = 0;
  logic [7:0] byte_data = 0;
  logic pix_valid;
  ycbcr_t pix;
  int checks = 0, failures = 0;
  ycbcr_t exp_q[$];

  vp422_444_dup dut (.*);
  always #5 clk = !clk;

  always @(posedge clk) if (!rst && pix_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected pixel"); end
    else begin
      ycbcr_t e;
      e = exp_q.pop_front();
      if (pix !== e) begin failures++; $display("FAIL: pixel %h exp %h", pix, e); end
    end
  end

  task automatic put(input logic [7:0] b, input bit gap);
    byte_valid <= 1; byte_data <= b; @(posedge clk);
    if (gap) begin
      byte_valid <= 0; @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int line = 0; line < 3; line++) begin
      byte_valid <= 0;
      line_start <= 1; @(posedge clk); line_start <= 0;
      // a stray byte from a previous phase must not matter after line_start
      for (int p = 0; p < 10; p++) begin
        logic [7:0] cb, y0, cr, y1;
        cb = 8'($urandom_range(1, 254)); y0 = 8'($urandom_range(1, 254));
        cr = 8'($urandom_range(1, 254)); y1 = 8'($urandom_range(1, 254));
        exp_q.push_back('{y: y0, cb: cb, cr: cr});
        exp_q.push_back('{y: y1, cb: cb, cr: cr});
        put(cb, 1'($urandom)); put(y0, 1'($urandom)); put(cr, 1'($urandom)); put(y1, 1'($urandom));
      end
      // one odd byte left over before the next line start
      put(8'h33, 1'b1);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d pixels missing", exp_q.size()); end
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
