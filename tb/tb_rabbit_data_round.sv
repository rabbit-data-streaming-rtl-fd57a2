// tb_rabbit_data_round -- checks C = P ^ S on random 128-bit blocks, that
// applying the same S twice restores P (decryption), the one-cycle
// out_valid pulse and that d_out holds while en is low.
module tb_rabbit_data_round;
  import rabbit_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  block_t d_in = '0, s = '0, d_out;
  logic   out_valid;
  int     checks = 0, failures = 0;

  rabbit_data_round dut (.*);

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
    block_t p, k, c;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 128; b++) c[b] = (p[b] != k[b]);
      d_in = p; s = k; en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      check(out_valid, "valid pulse");
      check(d_out == c, "encrypt");
      d_in = d_out;
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      check(d_out == p, "decrypt");
      @(negedge clk);
      check(!out_valid, "valid is a pulse");
      check(d_out == p, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
