// tb_rabbit_counter_system -- checks the counters: the key mapping
// (even j: k(j+4)||k(j+5), odd j: k(j)||k(j+1)), the update
// c[idx] + a + f mod 2^32 on random words, and the modification
// c[j] ^= x[(j+4) mod 8]. Expected values are computed in the testbench.
module tb_rabbit_counter_system;
  import rabbit_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   load_key = 1'b0, modify = 1'b0, step = 1'b0, f_in = 1'b0;
  key_t   key = '0;
  state_t x = '0;
  idx_t   idx = '0;
  word_t  a_word = '0;
  word_t  c_sel;
  state_t c;
  logic [31:0] m [8];
  int     checks = 0, failures = 0;

  rabbit_counter_system dut (.*);

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

  task automatic compare(string what);
    for (int j = 0; j < 8; j++) check(c[j] == m[j], $sformatf("%s c[%0d]=%h exp %h", what, j, c[j], m[j]));
  endtask

  initial begin
    logic [15:0] k [8];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      key = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 8; i++) k[i] = key[16*i +: 16];
      m[0] = {k[4], k[5]}; m[1] = {k[1], k[2]}; m[2] = {k[6], k[7]}; m[3] = {k[3], k[4]};
      m[4] = {k[0], k[1]}; m[5] = {k[5], k[6]}; m[6] = {k[2], k[3]}; m[7] = {k[7], k[0]};
      load_key = 1'b1;
      @(negedge clk) load_key = 1'b0;
      compare("key");
      for (int s = 0; s < 40; s++) begin
        idx = idx_t'($urandom); a_word = $urandom; f_in = 1'($urandom);
        if (s < 2) a_word = 32'hFFFF_FFFF;       // wrap-around
        #1 check(c_sel == m[idx], "c_sel");
        step = 1'b1;
        m[idx] = m[idx] + a_word + 32'(f_in);
        @(negedge clk) step = 1'b0;
        compare("step");
      end
      for (int j = 0; j < 8; j++) x[j] = $urandom;
      modify = 1'b1;
      for (int j = 0; j < 8; j++) m[j] ^= x[(j + 4) % 8];
      @(negedge clk) modify = 1'b0;
      compare("modify");
      @(negedge clk);
      compare("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
