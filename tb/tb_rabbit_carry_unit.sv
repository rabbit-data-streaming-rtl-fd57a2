// tb_rabbit_carry_unit -- checks the counter carry bit: f_next against
// (c + a + f_prev) >= 2^32 worked out with 64-bit integers, the stored carry
// after each step, hold without step, clear, and the boundary sums 2^32 - 1
// and 2^32.
module tb_rabbit_carry_unit;
  import rabbit_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, clear = 1'b0, step = 1'b0;
  word_t c_word = '0, a_word = '0;
  logic  f_prev, f_next;
  int    checks = 0, failures = 0;
  bit    model_f = 1'b0;

  rabbit_carry_unit dut (.*);

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

  task automatic apply(word_t c, word_t a, bit do_step);
    longint unsigned sum;
    bit exp_next;
    @(negedge clk);
    c_word = c; a_word = a; step = do_step;
    #1;
    sum = longint'(c) + longint'(a) + longint'(model_f);
    exp_next = (sum >= 64'h1_0000_0000);
    check(f_prev == model_f, "stored carry");
    check(f_next == exp_next, $sformatf("carry of %h+%h+%0d", c, a, model_f));
    @(posedge clk);
    if (do_step) model_f = exp_next;
    #1 step = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // boundaries with carry in 0, then 1
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1);   // 2^32-1, no carry
    apply(32'hFFFF_FFFF, 32'h0000_0001, 1);   // 2^32, carry
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1);   // 2^32-1 + 1 = 2^32, carry
    apply(32'h8000_0000, 32'h7FFF_FFFE, 1);   // 2^32-2 + 1, no carry
    for (int i = 0; i < 400; i++) apply($urandom, $urandom, ($urandom % 4) != 0);
    // clear
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1);
    @(negedge clk) clear = 1'b1;
    @(posedge clk) model_f = 1'b0;
    #1 clear = 1'b0;
    apply(32'h0, 32'h0, 0);
    check(f_prev == 1'b0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
