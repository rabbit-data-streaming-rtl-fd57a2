// tb_rabbit_controller -- checks the schedule: after key_load, four setup
// iterations of 12 cycles (one next-state update each), the counter
// modification on the 49th cycle, counter steps with indices 0..7 on
// iteration cycles 2..9 preceded by exactly two constant rotations, G steps
// 0..7 one cycle behind, seven g shifts, a keystream block every 12 cycles
// when data is available (extraction then data round on the next cycle),
// stalling while no data block is available, and restart on a new key_load.
module tb_rabbit_controller;
  import rabbit_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, key_load = 1'b0, p_valid = 1'b0;
  logic init, const_load, const_rotate, cnt_step, g_en, g_shift;
  logic nsf_update, c_modify, ext_en, dtr_en, keyed, stall;
  idx_t cnt_idx, g_idx;
  int   checks = 0, failures = 0;

  rabbit_controller dut (.*);

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

  // Records one cycle's strobes.
  int n_upd, n_mod, n_ext, n_dtr, n_stall, n_rot_since_load, n_cnt, n_g, n_shift;
  int last_cnt, last_g;
  int cyc;
  bit ext_prev;
  task automatic tick();
    #1;
    cyc++;
    if (nsf_update) n_upd++;
    if (c_modify) n_mod++;
    if (stall) n_stall++;
    if (ext_en) n_ext++;
    if (dtr_en) begin
      n_dtr++;
      check(ext_prev, "data round follows extraction");
    end
    ext_prev = ext_en;
    if (cnt_step) begin
      if (int'(cnt_idx) == 0) begin
        check(n_rot_since_load == 2, $sformatf("rotations before a[0]: %0d", n_rot_since_load));
        last_cnt = -1;
      end
      check(int'(cnt_idx) == last_cnt + 1, "counter index order");
      last_cnt = int'(cnt_idx);
      n_cnt++;
    end
    if (g_en) begin
      if (int'(g_idx) == 0) last_g = -1;
      check(int'(g_idx) == last_g + 1, "G index order");
      check(!cnt_step || int'(cnt_idx) == int'(g_idx) + 1, "G one step behind counters");
      last_g = int'(g_idx);
      n_g++;
    end
    if (g_shift) n_shift++;
    if (const_load) n_rot_since_load = 0;
    else if (const_rotate) n_rot_since_load++;
    @(negedge clk);
  endtask

  task automatic clear_counts();
    n_upd = 0; n_mod = 0; n_ext = 0; n_dtr = 0; n_stall = 0; n_cnt = 0; n_g = 0; n_shift = 0;
    cyc = 0;
  endtask

  initial begin
    int t_first_ext, t_prev_ext;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 2; r++) begin
      @(negedge clk);
      key_load = 1'b1;
      #1 check(init && const_load, "init and constants load on key_load");
      @(negedge clk);
      key_load = 1'b0;
      clear_counts();
      n_rot_since_load = 0;
      ext_prev = 1'b0;
      // 4 setup iterations
      repeat (48) tick();
      check(n_upd == 4, $sformatf("setup updates %0d", n_upd));
      check(n_cnt == 32 && n_g == 32 && n_shift == 28, "setup steps");
      check(n_mod == 0 && !keyed, "no modification during setup");
      tick();
      check(n_mod == 1, "counter modification after four iterations");
      // first keystream iteration
      repeat (12) tick();
      check(keyed, "keyed");
      check(n_upd == 5, "first keystream iteration");
      // no data: stalls
      repeat (20) tick();
      check(n_stall == 20 && n_ext == 0 && n_upd == 5, "stalls without data");
      // data available: one block per 12 cycles
      p_valid = 1'b1;
      t_prev_ext = -1;
      clear_counts();
      for (int i = 0; i < 12 * 5; i++) begin
        tick();
        if (ext_en) begin
          if (t_prev_ext >= 0) check(cyc - t_prev_ext == ITER_CYCLES, "12 cycles per block");
          t_prev_ext = cyc;
        end
      end
      check(n_ext == 5 && n_dtr == 5 && n_stall == 0, $sformatf("five blocks in 60 cycles: %0d", n_ext));
      p_valid = 1'b0;
      repeat (30) tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
