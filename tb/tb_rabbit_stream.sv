// tb_rabbit_stream -- sustained-rate run of the Rabbit engine: one random
// key, 256 blocks (4 KiB) of random data sent without gaps. Every output word
// is compared with the reference model, and the throughput is measured from
// the first to the last output block: it must be 128 bits per 12 cycles,
// i.e. 586.7 Mbit/s at a 55 MHz clock.
module tb_rabbit_stream;
  import rabbit_pkg::*;
  import rabbit_ref_pkg::*;

  localparam int NBLK = 256;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     key_valid = 1'b0, din_valid = 1'b0;
  io_word_t key_word = '0, din = '0;
  logic     din_ready, dout_valid, keyed, stall;
  io_word_t dout;
  int       checks = 0, failures = 0;
  longint   cycle = 0;

  rabbit_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NBLK * ITER_CYCLES + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  io_word_t exp_q [$];
  int       nwords = 0;
  longint   first_word = -1, last_word = -1;
  int       stall_after_first = 0;

  always @(posedge clk) if (rst_n) begin
    if (dout_valid) begin
      io_word_t e;
      if (first_word < 0) first_word = cycle;
      last_word = cycle;
      nwords++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected word");
      end else begin
        e = exp_q.pop_front();
        if (dout != e) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d: %h expected %h", nwords, dout, e);
        end
      end
    end
    if (stall && first_word >= 0 && nwords < 8 * NBLK) stall_after_first++;
  end

  initial begin
    logic [127:0] key, s;
    io_word_t pt [$];
    ref_state_t st;
    int i;
    real bits_per_cycle;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    key = {$urandom, $urandom, $urandom, $urandom};
    for (int w = 0; w < 8 * NBLK; w++) pt.push_back(16'($urandom));
    st = ref_setup(key);
    for (int b = 0; b < NBLK; b++) begin
      s = ref_next_block(st);
      for (int w = 0; w < 8; w++) exp_q.push_back(pt[8*b + w] ^ s[16*w +: 16]);
    end
    @(posedge clk);
    for (int w = 0; w < 8; w++) begin
      key_valid <= 1'b1;
      key_word  <= key[16*w +: 16];
      @(posedge clk);
    end
    key_valid <= 1'b0;
    i = 0;
    while (i < pt.size()) begin
      bit acc;
      din_valid <= 1'b1;
      din       <= pt[i];
      @(negedge clk);
      acc = din_ready;
      @(posedge clk);
      if (acc) i++;
    end
    din_valid <= 1'b0;
    while (nwords < 8 * NBLK) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (nwords != 8 * NBLK || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d words received", nwords);
    end
    // first word of block 0 to last word of the last block
    checks++;
    if (last_word - first_word != longint'((NBLK - 1) * ITER_CYCLES + 7)) begin
      failures++;
      $display("FAIL stream took %0d cycles", last_word - first_word);
    end
    checks++;
    if (stall_after_first != 0) begin
      failures++;
      $display("FAIL engine stalled %0d cycles with data always available", stall_after_first);
    end
    bits_per_cycle = real'(128 * (NBLK - 1)) / real'(last_word - first_word - 7);
    $display("throughput %0.3f bits/cycle = %0.1f Mbit/s at 55 MHz", bits_per_cycle, bits_per_cycle * 55.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
