// tb_rabbit_constants_unit -- checks that after a load the output is the
// upper 32 bits of 0xD34D34D34 and that after j + 2 rotations it equals the
// Rabbit counter constant a[j] (j = 0..7, constants written out below), over
// several reloads; also that the output holds without rotate.
module tb_rabbit_constants_unit;
  import rabbit_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, load = 1'b0, rotate = 1'b0;
  word_t a_word;
  int    checks = 0, failures = 0;

  localparam word_t A [8] = '{32'h4D34D34D, 32'hD34D34D3, 32'h34D34D34,
                              32'h4D34D34D, 32'hD34D34D3, 32'h34D34D34,
                              32'h4D34D34D, 32'hD34D34D3};

  rabbit_constants_unit dut (.*);

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
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      @(negedge clk) load = 1'b1;
      @(negedge clk) load = 1'b0;
      check(a_word == 32'hD34D34D3, "after load");
      rotate = 1'b1;
      @(negedge clk);
      check(a_word == 32'h34D34D34, "after one rotation");
      for (int j = 0; j < 8; j++) begin
        @(negedge clk);
        check(a_word == A[j], $sformatf("a[%0d]=%h", j, a_word));
      end
      rotate = 1'b0;
      repeat (3 + r) @(negedge clk);
      check(a_word == A[7], "hold");
      rotate = 1'b1;
      repeat (r + 1) @(negedge clk);
      rotate = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
