// tb_lf_decode: checks the timing-code decoder on a hand-built byte stream.
// An active line (SAV with V = 0) must yield exactly its video bytes, in
// order, one clock after each input byte; a blanking line (V = 1) must yield
// none. SAV/EAV pulse counts and the decoded F and V levels are checked.
module tb_lf_decode;
  logic clk = 0, rst = 1;
  logic [7:0] din;
  logic byte_valid, sav, eav, f, v, h;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;
  int n_sav = 0, n_eav = 0;
  logic [7:0] got[$];
  logic [7:0] exp_q[$];

  lf_decode dut (.*);

  always #5 clk = !clk;

  always @(posedge clk) if (!rst) begin
    if (byte_valid) got.push_back(byte_data);
    if (sav) n_sav++;
    if (eav) n_eav++;
  end

  function automatic logic [7:0] xy(input bit ff, input bit vv, input bit hh);
    return {1'b1, ff, vv, hh, vv ^ hh, ff ^ hh, ff ^ vv, ff ^ vv ^ hh};
  endfunction

  task automatic put(input logic [7:0] b);
    din <= b; @(posedge clk);
  endtask
  task automatic code(input bit ff, input bit vv, input bit hh);
    put(8'hFF); put(8'h00); put(8'h00); put(xy(ff, vv, hh));
  endtask

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    din = 8'h10;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // blanking line in vertical blanking: no data expected
    code(1'b0, 1'b1, 1'b1);
    repeat (4) put(8'h80);
    code(1'b0, 1'b1, 1'b0);
    repeat (8) put(8'h55);
    // active line in field 1
    code(1'b1, 1'b0, 1'b1);
    repeat (4) put(8'h80);
    code(1'b1, 1'b0, 1'b0);
    for (int i = 0; i < 12; i++) begin
      logic [7:0] b;
      b = 8'(8'h20 + 7 * i);
      exp_q.push_back(b);
      put(b);
    end
    code(1'b1, 1'b0, 1'b1);
    repeat (3) put(8'h80);
    @(posedge clk);
    check(got.size() == exp_q.size(), $sformatf("byte count %0d vs %0d", got.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got.size(); i++)
      check(got[i] == exp_q[i], $sformatf("byte %0d got %h exp %h", i, got[i], exp_q[i]));
    check(n_sav == 1, $sformatf("sav count %0d", n_sav));
    check(n_eav == 3, $sformatf("eav count %0d", n_eav));
    check(f == 1'b1, "field bit");
    check(v == 1'b0, "vertical blanking bit");
    check(h == 1'b1, "h bit after EAV");
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
