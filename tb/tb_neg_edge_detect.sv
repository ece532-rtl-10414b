// tb_neg_edge_detect: drives a random level and checks that fall pulses
// exactly one clock after each high-to-low change and at no other time.
module tb_neg_edge_detect;
  logic clk = 0, rst = 1, sig = 0, fall;
  logic prev = 0, prev2 = 0;
  int checks = 0, failures = 0, n_fall = 0;

  neg_edge_detect dut (.*);
  always #5 clk = !clk;

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (fall !== (prev2 && !prev)) begin failures++; $display("FAIL: fall=%b", fall); end
      if (fall) n_fall++;
    end
    prev2 <= rst ? 1'b0 : prev;
    prev  <= rst ? 1'b0 : sig;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 400; i++) begin
      sig <= 1'($urandom);
      @(posedge clk);
    end
    checks++;
    if (n_fall < 20) begin failures++; $display("FAIL: too few edges %0d", n_fall); end
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
