// tb_rabbit_io_interface -- checks the 16-bit interface: key assembly from
// eight subkeys (k0 first) with a one-cycle key_load pulse, data collection
// into 128-bit blocks (first word = bits 15:0) with the holding register and
// din_ready back-pressure, p_consume, the flush of a partial block by a new
// key, and the output serializer (eight consecutive words, bits 15:0 first).
module tb_rabbit_io_interface;
  import rabbit_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     key_valid = 1'b0, din_valid = 1'b0, p_consume = 1'b0, c_valid = 1'b0;
  io_word_t key_word = '0, din = '0;
  key_t     key;
  logic     key_load, din_ready, p_valid, dout_valid;
  block_t   p_block, c_block = '0;
  io_word_t dout;
  int       checks = 0, failures = 0;

  rabbit_io_interface dut (.*);

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

  task automatic send_key(key_t k);
    int loads = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      key_valid = 1'b1; key_word = k[16*i +: 16];
      if (key_load) loads++;
    end
    @(negedge clk);
    key_valid = 1'b0;
    check(key_load, "key_load after eighth word");
    check(loads == 0, "no early key_load");
    check(key == k, "assembled key");
    @(negedge clk);
    check(!key_load, "key_load is one cycle");
  endtask

  // Offers words; returns how many were accepted.
  task automatic send_words(block_t blk, int n, output int accepted);
    accepted = 0;
    while (accepted < n) begin
      @(negedge clk);
      din_valid = 1'b1; din = blk[16*accepted +: 16];
      if (din_ready) accepted++;
      @(posedge clk);
    end
    @(negedge clk) din_valid = 1'b0;
  endtask

  initial begin
    block_t b1, b2, b3, cb;
    int acc;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    send_key({$urandom, $urandom, $urandom, $urandom});
    b1 = {$urandom, $urandom, $urandom, $urandom};
    b2 = {$urandom, $urandom, $urandom, $urandom};
    b3 = {$urandom, $urandom, $urandom, $urandom};
    send_words(b1, 8, acc);
    @(negedge clk);
    check(p_valid && p_block == b1, "first block held");
    send_words(b2, 8, acc);
    @(negedge clk);
    check(!din_ready, "collector full, holding register full: not ready");
    check(p_block == b1, "holding register unchanged");
    // consume b1: b2 moves up
    p_consume = 1'b1;
    @(negedge clk) p_consume = 1'b0;
    check(p_valid && p_block == b2, "second block moved up");
    check(din_ready, "ready again");
    p_consume = 1'b1;
    @(negedge clk) p_consume = 1'b0;
    check(!p_valid, "empty after consume");
    // partial block, then a new key flushes it
    send_words(b3, 5, acc);
    send_key({$urandom, $urandom, $urandom, $urandom});
    send_words(b3, 8, acc);
    @(negedge clk);
    check(p_valid && p_block == b3, "block after flush is complete and aligned");
    p_consume = 1'b1;
    @(negedge clk) p_consume = 1'b0;

    // output serializer
    for (int r = 0; r < 3; r++) begin
      cb = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      c_block = cb; c_valid = 1'b1;
      @(negedge clk);
      c_valid = 1'b0; c_block = '0;
      for (int i = 0; i < 8; i++) begin
        check(dout_valid && dout == cb[16*i +: 16], $sformatf("out word %0d", i));
        @(negedge clk);
      end
      check(!dout_valid, "eight words only");
      repeat (r) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
