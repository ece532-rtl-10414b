// tb_control_registers: register-map test. Checks reset values, read/write
// fields, reserved bits reading zero, Go reading zero and pulsing go once
// with the configuration, Done set by done_in and cleared by a Go write,
// read-only result registers, ignored writes to them and the one-clock
// acknowledge.
module tb_control_registers;
  import idio_pkg::*;
  logic clk = 0, rst = 1;
  logic reg_cs = 0, reg_we = 0;
  logic [4:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic reg_ack, go, done_in = 0;
  wand_cfg_t cfg;
  wand_result_t result = '0;
  int checks = 0, failures = 0, n_go = 0;
  wand_cfg_t cfg_at_go;

  control_registers dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) if (!rst && go) begin n_go++; cfg_at_go = cfg; end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    reg_cs <= 1; reg_we <= 1; reg_addr <= a; reg_wdata <= d;
    @(posedge clk);
    reg_cs <= 0; reg_we <= 0;
    @(posedge clk);
    check(reg_ack, "write ack");
  endtask

  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    reg_cs <= 1; reg_we <= 0; reg_addr <= a;
    @(posedge clk);
    reg_cs <= 0;
    @(posedge clk);
    check(reg_ack, "read ack");
    d = reg_rdata;
  endtask

  logic [31:0] d;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    rd(5'h00, d); check(d == 32'h0, $sformatf("STATUS reset %h", d));
    wr(5'h04, 32'hFFFF_1234 & 32'hFFFE_FFFF | 32'h0002_0000);  // blue, ignore 0x1234
    rd(5'h04, d); check(d == 32'h0002_1234, $sformatf("WAND_IGNORE %h", d));
    wr(5'h00, 32'h3FFF_ABCD);  // no Go, reserved bits written as ones
    rd(5'h00, d); check(d == 32'h0000_ABCD, $sformatf("STATUS_NORM %h", d));
    check(n_go == 0, "no go without bit 31");
    // result input and read-only registers
    result = '{left: 16'd10, right: 16'd20, top: 16'd30, bottom: 16'd44, x: 16'd15, y: 16'd37};
    done_in <= 1; @(posedge clk); done_in <= 0;
    rd(5'h00, d); check(d == 32'h4000_ABCD, $sformatf("Done set %h", d));
    rd(5'h08, d); check(d == {16'd10, 16'd20}, $sformatf("LEFT_RIGHT %h", d));
    rd(5'h0C, d); check(d == {16'd30, 16'd44}, $sformatf("TOP_BOTTOM %h", d));
    rd(5'h10, d); check(d == {16'd15, 16'd37}, $sformatf("CENTRE %h", d));
    wr(5'h08, 32'hDEAD_BEEF);
    rd(5'h08, d); check(d == {16'd10, 16'd20}, "LEFT_RIGHT is read only");
    rd(5'h14, d); check(d == 32'h0, "unknown offset reads 0");
    // Go: pulses once, carries configuration, clears Done, reads as 0
    wr(5'h00, 32'hC000_0100);
    @(posedge clk);
    check(n_go == 1, $sformatf("go pulses %0d", n_go));
    check(cfg_at_go.colour_norm == 16'h0100 && cfg_at_go.colour == 2'd2 &&
          cfg_at_go.ignore_pixels == 16'h1234, "configuration at go");
    rd(5'h00, d); check(d == 32'h0000_0100, $sformatf("after Go %h", d));
    done_in <= 1; @(posedge clk); done_in <= 0;
    rd(5'h00, d); check(d[30] && !d[31], "Done again, Go reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
