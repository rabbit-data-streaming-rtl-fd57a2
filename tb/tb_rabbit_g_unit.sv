// tb_rabbit_g_unit -- checks g = LSW(u^2) ^ MSW(u^2), u = x + c mod 2^32,
// against the reference model for random and corner operands, one result
// per cycle with a one-cycle latency, and that g holds while en is low.
module tb_rabbit_g_unit;
  import rabbit_pkg::*;
  import rabbit_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  word_t x_word = '0, c_word = '0, g;
  int    checks = 0, failures = 0;

  rabbit_g_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    word_t exp, prev;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      x_word = $urandom; c_word = $urandom;
      if (i == 0) begin x_word = 32'hFFFF_FFFF; c_word = 32'h0; end
      if (i == 1) begin x_word = 32'hFFFF_FFFF; c_word = 32'h1; end
      if (i == 2) begin x_word = 32'h0001_0000; c_word = 32'h0; end
      en = (i % 5) != 4;
      prev = g;
      exp = en ? ref_g(x_word + c_word) : prev;
      if (i == 1 && en) check(exp == 32'h0, "u = 0");
      if (i == 2 && en) check(exp == 32'h1, "u = 2^16");
      @(negedge clk);
      check(g == exp, $sformatf("g(%h,%h)=%h exp %h", x_word, c_word, g, exp));
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
