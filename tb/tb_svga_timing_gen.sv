// tb_svga_timing_gen: runs two fields of short lines through the counter and
// checks that every pixel gets x = index in line and y = 2*line + field,
// with the line count restarting after vertical blanking.
module tb_svga_timing_gen;
  import idio_pkg::*;
  logic clk = 0, rst = 1;
  logic line_start = 0, v = 1, f = 0, pix_valid = 0;
  coord_t x, y;
  int checks = 0, failures = 0;

  svga_timing_gen dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int frame = 0; frame < 2; frame++)
      for (int fld = 0; fld < 2; fld++) begin
        v <= 1; f <= fld[0];
        repeat (5) @(posedge clk);
        v <= 0;
        for (int l = 0; l < 5; l++) begin
          repeat (2) @(posedge clk);
          line_start <= 1; @(posedge clk); line_start <= 0;
          repeat (3) @(posedge clk);
          for (int p = 0; p < 7; p++) begin
            pix_valid <= 1;
            #1;
            checks++;
            if (x != coord_t'(p) || y != coord_t'(2 * l + fld)) begin
              failures++;
              $display("FAIL: f%0d l%0d p%0d got x=%0d y=%0d", fld, l, p, x, y);
            end
            @(posedge clk);
            pix_valid <= 0;
            @(posedge clk);
          end
        end
      end
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
