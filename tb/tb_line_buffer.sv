// tb_line_buffer: writes random words on one clock, reads them back on an
// unrelated clock and checks each read word, one read clock after its
// address.
module tb_line_buffer;
  localparam int AW = 6;
  logic wclk = 0, rclk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [23:0] wdata = 0, rdata;
  logic [23:0] model [2**AW];
  int checks = 0, failures = 0;

  line_buffer #(.ADDR_W(AW), .DATA_W(24)) dut (.*);
  always #7 wclk = !wclk;
  always #3 rclk = !rclk;

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      @(posedge wclk);
      we <= 1; waddr <= AW'(i); wdata <= 24'($urandom);
      #1 model[i] = wdata;
    end
    @(posedge wclk); we <= 0;
    // overwrite a few entries
    for (int i = 0; i < 10; i++) begin
      @(posedge wclk);
      we <= 1; waddr <= AW'($urandom); wdata <= 24'($urandom);
      #1 model[waddr] = wdata;
    end
    @(posedge wclk); we <= 0;
    for (int i = 0; i < 200; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      @(posedge rclk); raddr <= a;
      @(posedge rclk); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL: addr %0d got %h exp %h", a, rdata, model[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
