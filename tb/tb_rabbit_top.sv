// tb_rabbit_top -- end-to-end test of the Rabbit engine at its default size.
//
// Drives keys and data through the 16-bit ports and compares every output
// word with the reference model in rabbit_ref_pkg. Scenarios:
//   1. all-zero key, zero data: output must equal the published zero-key
//      keystream blocks (known-answer test);
//   2. random key, continuous random data: checks results and that blocks
//      come out every 12 cycles (128 bits / 12 cycles = 586.7 Mbit/s at 55 MHz);
//   3. the same with gaps in the input, so the engine stalls;
//   4. a key load in the middle of a data block (the partial block is
//      dropped) followed by data under the new key;
//   5. decryption: the ciphertext of scenario 2 fed back under the same key
//      must give the plaintext back.
// Mechanism counters (key setups, counter modifications, stalls, carries
// 0 and 1, rekey with dropped data, decryption) must all be non-zero.
module tb_rabbit_top;
  import rabbit_pkg::*;
  import rabbit_ref_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     key_valid = 1'b0;
  io_word_t key_word = '0;
  logic     din_valid = 1'b0;
  io_word_t din = '0;
  logic     din_ready, dout_valid, keyed, stall;
  io_word_t dout;

  int checks = 0, failures = 0;
  longint cycle = 0;

  rabbit_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- mechanism counters --------------------------------------------------
  int n_setup = 0, n_cmod = 0, n_stall = 0, n_carry1 = 0, n_carry0 = 0;
  int n_rekey_drop = 0, n_decrypt = 0;
  longint t_key = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.init) begin
      n_setup++;
      t_key = cycle;
    end
    if (dut.c_modify) n_cmod++;
    if (stall) n_stall++;
    if (dut.u_io.key_last && dut.u_io.coll_cnt != 0) n_rekey_drop++;
    if (dut.cnt_step && dut.f_next) n_carry1++;
    if (dut.cnt_step && !dut.f_next) n_carry0++;
  end

  // ---- output monitor --------------------------------------------------------
  io_word_t exp_q [$];
  longint   blk_start [$];
  int       word_in_blk = 0;
  logic [127:0] out_blk;
  logic [127:0] out_blocks [$];

  always @(posedge clk) if (rst_n && dout_valid) begin
    if (word_in_blk == 0) blk_start.push_back(cycle);
    out_blk[16*word_in_blk +: 16] = dout;
    word_in_blk = (word_in_blk + 1) % 8;
    if (word_in_blk == 0) out_blocks.push_back(out_blk);
    if (exp_q.size() == 0) begin
      checks++; failures++;
      $display("FAIL unexpected output word %h", dout);
    end else begin
      io_word_t e;
      e = exp_q.pop_front();
      check(dout == e, $sformatf("dout %h expected %h", dout, e));
    end
  end

  // ---- drivers ---------------------------------------------------------------
  task automatic send_key(logic [127:0] k);
    for (int i = 0; i < 8; i++) begin
      key_valid <= 1'b1;
      key_word  <= k[16*i +: 16];
      @(posedge clk);
    end
    key_valid <= 1'b0;
  endtask

  // Sends data words; gap > 0 inserts that many idle cycles between blocks.
  task automatic send_words(io_word_t w [$], int gap);
    int i = 0;
    bit acc;
    while (i < w.size()) begin
      din_valid <= 1'b1;
      din       <= w[i];
      @(negedge clk);
      acc = din_ready;
      @(posedge clk);
      if (acc) begin
        i++;
        if (gap > 0 && i % 8 == 0) begin
          din_valid <= 1'b0;
          repeat (gap) @(posedge clk);
        end
      end
    end
    din_valid <= 1'b0;
  endtask

  task automatic wait_idle();
    int guard = 0;
    while ((exp_q.size() != 0) && guard < 2000) begin
      @(posedge clk);
      guard++;
    end
    repeat (4) @(posedge clk);
    check(exp_q.size() == 0, "all expected words received");
  endtask

  // Builds plaintext words and pushes the expected output words.
  function automatic void expect_blocks(logic [127:0] key, io_word_t pt [$]);
    ref_state_t st;
    logic [127:0] s;
    st = ref_setup(key);
    for (int b = 0; b < pt.size() / 8; b++) begin
      s = ref_next_block(st);
      for (int i = 0; i < 8; i++) exp_q.push_back(pt[8*b + i] ^ s[16*i +: 16]);
    end
  endfunction

  localparam logic [127:0] KAT_S [3] = '{
    128'hB15754F036A5D6ECF56B45261C4AF702,
    128'h88E8D815C59C0C397B696C4789C68AA7,
    128'hF416A1C3700CD451DA68D1881673D696
  };

  io_word_t pt [$], ct [$], pt2 [$];
  logic [127:0] key1, key2;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. known answer, zero key and zero data
    pt = {};
    for (int i = 0; i < 24; i++) pt.push_back(16'h0);
    expect_blocks('0, pt);
    for (int b = 0; b < 3; b++)
      for (int i = 0; i < 8; i++)
        check(exp_q[8*b + i] == KAT_S[b][16*i +: 16], "reference model vs known answer");
    out_blocks = {};
    send_key('0);
    send_words(pt, 0);
    wait_idle();
    check(out_blocks.size() == 3, "three known-answer blocks");
    for (int b = 0; b < 3 && b < out_blocks.size(); b++)
      check(out_blocks[b] == KAT_S[b], $sformatf("known-answer block %0d", b));
    check(keyed, "keyed after setup");

    // 2. random key, continuous data: one block per 12 cycles
    key1 = {$urandom, $urandom, $urandom, $urandom};
    pt = {};
    for (int i = 0; i < 8 * 10; i++) pt.push_back(16'($urandom));
    blk_start = {};
    out_blocks = {};
    expect_blocks(key1, pt);
    send_key(key1);
    send_words(pt, 0);
    wait_idle();
    check(blk_start.size() == 10, "ten blocks out");
    // From the key_load cycle: 4 setup iterations, the counter modification
    // cycle, the first keystream iteration, extraction (t0), data round (t1),
    // output register load, then the first word.
    check(blk_start[0] - t_key == 4 * ITER_CYCLES + 1 + ITER_CYCLES + 4,
          $sformatf("first block latency %0d", blk_start[0] - t_key));
    for (int b = 1; b < blk_start.size(); b++)
      check(blk_start[b] - blk_start[b-1] == ITER_CYCLES,
            $sformatf("block spacing %0d", blk_start[b] - blk_start[b-1]));
    pt2 = pt;
    ct = {};
    foreach (out_blocks[b]) for (int i = 0; i < 8; i++) ct.push_back(out_blocks[b][16*i +: 16]);

    // 3. data with gaps: the engine stalls waiting for blocks
    key2 = {$urandom, $urandom, $urandom, $urandom};
    pt = {};
    for (int i = 0; i < 8 * 6; i++) pt.push_back(16'($urandom));
    expect_blocks(key2, pt);
    send_key(key2);
    send_words(pt, 23);
    wait_idle();

    // 4. key load in the middle of a data block: partial block dropped
    begin
      io_word_t part [$];
      for (int i = 0; i < 3; i++) part.push_back(16'($urandom));
      send_words(part, 0);
      pt = {};
      for (int i = 0; i < 8 * 4; i++) pt.push_back(16'($urandom));
      expect_blocks(key1 ^ key2, pt);
      send_key(key1 ^ key2);
      send_words(pt, 0);
      wait_idle();
    end

    // 5. decryption of scenario 2's ciphertext
    out_blocks = {};
    expect_blocks(key1, ct);
    send_key(key1);
    send_words(ct, 0);
    wait_idle();
    check(out_blocks.size() == 10, "ten decrypted blocks");
    foreach (out_blocks[b]) begin
      for (int i = 0; i < 8; i++)
        check(out_blocks[b][16*i +: 16] == pt2[8*b + i], "decryption restores plaintext");
      n_decrypt++;
    end

    // mechanisms
    check(n_setup >= 5, $sformatf("key setups %0d", n_setup));
    check(n_cmod == n_setup, $sformatf("counter modifications %0d", n_cmod));
    check(n_stall > 0, $sformatf("stall cycles %0d", n_stall));
    check(n_carry1 > 0 && n_carry0 > 0,
          $sformatf("carries 1:%0d 0:%0d", n_carry1, n_carry0));
    check(n_rekey_drop > 0 && n_decrypt > 0, "rekey and decryption ran");
    $display("mechanisms: setups=%0d cmods=%0d stall_cycles=%0d carry1=%0d carry0=%0d rekey_drop=%0d decrypt=%0d",
             n_setup, n_cmod, n_stall, n_carry1, n_carry0, n_rekey_drop, n_decrypt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
