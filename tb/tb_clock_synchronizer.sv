// tb_clock_synchronizer: a 100 MHz bus clock and a 27 MHz pixel clock.
// Each Go with a random configuration must give exactly one go_pix pulse
// carrying that configuration within 5 pixel clocks; each Done with a
// random result must give one done_bus pulse carrying that result within 5
// bus clocks. Also checks that go_pix never fires without a Go.
module tb_clock_synchronizer;
  import idio_pkg::*;
  logic clk_bus = 0, clk_pix = 0, rst_bus = 1, rst_pix = 1;
  logic go_bus = 0, done_pix = 0;
  wand_cfg_t cfg_bus = '0, cfg_pix;
  wand_result_t res_pix = '0, res_bus;
  logic go_pix, done_bus;
  int checks = 0, failures = 0;
  int n_go_pix = 0, n_done_bus = 0;
  wand_cfg_t last_cfg;
  wand_result_t last_res;

  clock_synchronizer dut (.*);
  always #5 clk_bus = !clk_bus;
  always #18.5 clk_pix = !clk_pix;

  always @(posedge clk_pix) if (!rst_pix && go_pix) begin n_go_pix++; last_cfg = cfg_pix; end
  always @(posedge clk_bus) if (!rst_bus && done_bus) begin n_done_bus++; last_res = res_bus; end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (4) @(posedge clk_pix);
    rst_bus <= 0; rst_pix <= 0;
    repeat (3) @(posedge clk_pix);
    for (int i = 0; i < 20; i++) begin
      wand_cfg_t c; wand_result_t r; int n0;
      c = wand_cfg_t'({$urandom, $urandom});
      n0 = n_go_pix;
      @(posedge clk_bus); go_bus <= 1; cfg_bus <= c;
      @(posedge clk_bus); go_bus <= 0; cfg_bus <= wand_cfg_t'({$urandom, $urandom});
      repeat (5) @(posedge clk_pix);
      check(n_go_pix == n0 + 1, $sformatf("go %0d: pulses %0d", i, n_go_pix - n0));
      check(last_cfg == c, $sformatf("go %0d: configuration %h exp %h", i, last_cfg, c));
      r = wand_result_t'({$urandom, $urandom, $urandom});
      n0 = n_done_bus;
      @(posedge clk_pix); done_pix <= 1; res_pix <= r;
      @(posedge clk_pix); done_pix <= 0; res_pix <= wand_result_t'({$urandom, $urandom, $urandom});
      repeat (5) @(posedge clk_bus);
      check(n_done_bus == n0 + 1, $sformatf("done %0d: pulses %0d", i, n_done_bus - n0));
      check(last_res == r, $sformatf("done %0d: result mismatch", i));
    end
    repeat (20) @(posedge clk_pix);
    check(n_go_pix == 20 && n_done_bus == 20, "total pulse counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk_pix);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
