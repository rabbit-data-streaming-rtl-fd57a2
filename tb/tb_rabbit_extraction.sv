// tb_rabbit_extraction -- checks the 128-bit extracted block against the
// reference extraction for random states, its one-cycle register, and that
// s holds while en is low.
module tb_rabbit_extraction;
  import rabbit_pkg::*;
  import rabbit_ref_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  state_t x = '0;
  block_t s;
  int     checks = 0, failures = 0;

  rabbit_extraction dut (.*);

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
    w8_t xv;
    block_t exp;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    exp = s;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int j = 0; j < 8; j++) begin xv[j] = $urandom; x[j] = xv[j]; end
      en = (i % 4) != 3;
      if (en) exp = ref_extract(xv);
      @(negedge clk);
      check(s == exp, $sformatf("s=%h exp %h", s, exp));
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
