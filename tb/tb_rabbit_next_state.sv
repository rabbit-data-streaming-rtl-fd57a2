// tb_rabbit_next_state -- fills the g registers the way the engine does
// (g_in presents g[0..7] on consecutive cycles, g_shift from the second
// value on) and checks x after update against the reference next-state
// function; also the key mapping of x (even j: k(j+1)||k(j), odd j:
// k(j+5)||k(j+4)) and that x holds without update.
module tb_rabbit_next_state;
  import rabbit_pkg::*;
  import rabbit_ref_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, load_key = 1'b0, g_shift = 1'b0, update = 1'b0;
  key_t   key = '0;
  word_t  g_in = '0;
  state_t x, g_regs;
  int     checks = 0, failures = 0;

  rabbit_next_state dut (.*);

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
    w8_t gv, xe;
    logic [15:0] k [8];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 30; r++) begin
      if (r % 10 == 0) begin
        @(negedge clk);
        key = {$urandom, $urandom, $urandom, $urandom};
        for (int i = 0; i < 8; i++) k[i] = key[16*i +: 16];
        load_key = 1'b1;
        @(negedge clk) load_key = 1'b0;
        check(x[0] == {k[1], k[0]}, "x0 = k1||k0");
        check(x[1] == {k[6], k[5]}, "x1 = k6||k5");
        check(x[6] == {k[7], k[6]}, "x6 = k7||k6");
        check(x[7] == {k[4], k[3]}, "x7 = k4||k3");
      end
      for (int j = 0; j < 8; j++) gv[j] = $urandom;
      for (int j = 0; j < 8; j++) begin
        @(negedge clk);
        g_in = gv[j];
        g_shift = 1'b0;
        if (j < 7) begin
          @(negedge clk);
          g_shift = 1'b1;     // shifts g[j] into the chain
          #1;
        end
      end
      // last value stays on g_in (the G register), shift chain done
      @(negedge clk);
      g_shift = 1'b0;
      for (int j = 0; j < 8; j++) check(g_regs[j] == gv[j], $sformatf("Reg %0d", j));
      xe = ref_nsf(gv);
      update = 1'b1;
      @(negedge clk) update = 1'b0;
      for (int j = 0; j < 8; j++) check(x[j] == xe[j], $sformatf("x[%0d]=%h exp %h", j, x[j], xe[j]));
      @(negedge clk);
      check(x[3] == xe[3], "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
