// rabbit_io_interface -- 16-bit external interface of the Rabbit engine.
//
// Key input: key_valid/key_word deliver the 128-bit key as eight 16-bit
// subkeys, k0 (K[15:0]) first. When the eighth word arrives the assembled key
// appears on key and key_load pulses for one cycle. The last key word also
// discards any data block in progress or waiting, including a data word
// accepted in the same cycle: a new key starts a new message. Data words may
// follow from the next cycle on.
//
// Data input: din_valid/din_ready handshake, one 16-bit word per cycle, first
// word = bits 15:0 of a 128-bit block. Words are collected in an input
// register; a complete block moves to the holding register (p_block,
// p_valid) as soon as that is free, so one block can be collected while the
// previous one waits for its keystream. p_consume empties the holding
// register.
//
// Data output: a c_valid pulse loads the 128-bit result block; it leaves on
// dout/dout_valid as eight consecutive 16-bit words, bits 15:0 first. There
// is no output back-pressure: blocks arrive at most every 12 cycles and take
// 8 to send.
//
// The document gives the 16-bit width of this unit's data path and its
// place in the architecture; the protocol is this design's own.
module rabbit_io_interface
  import rabbit_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // key
  input  logic     key_valid,
  input  io_word_t key_word,
  output key_t     key,
  output logic     key_load,
  // data in
  input  logic     din_valid,
  input  io_word_t din,
  output logic     din_ready,
  output block_t   p_block,
  output logic     p_valid,
  input  logic     p_consume,
  // data out
  input  logic     c_valid,
  input  block_t   c_block,
  output io_word_t dout,
  output logic     dout_valid
);

  localparam int unsigned WPB = BLOCK_W / IO_W;   // words per block

  logic [2:0] key_cnt;
  logic       key_last;
  block_t     coll;
  logic [3:0] coll_cnt;
  logic       coll_full;
  block_t     out_sr;
  logic [3:0] out_cnt;

  assign coll_full = (coll_cnt == 4'(WPB));
  assign key_last  = key_valid && (key_cnt == 3'(WPB - 1));
  assign din_ready = !coll_full;

  // Key assembly.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key      <= '0;
      key_cnt  <= '0;
      key_load <= 1'b0;
    end else begin
      key_load <= 1'b0;
      if (key_valid) begin
        key     <= {key_word, key[KEY_W-1:IO_W]};
        key_cnt <= key_cnt + 3'd1;
        if (key_last) key_load <= 1'b1;
      end
    end
  end

  // Data input: collector and holding register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coll     <= '0;
      coll_cnt <= '0;
      p_block  <= '0;
      p_valid  <= 1'b0;
    end else if (key_last) begin
      coll_cnt <= '0;
      p_valid  <= 1'b0;
    end else begin
      if (p_consume) p_valid <= 1'b0;
      if (din_valid && din_ready) begin
        coll     <= {din, coll[BLOCK_W-1:IO_W]};
        coll_cnt <= coll_cnt + 4'd1;
      end
      if (coll_full && (!p_valid || p_consume)) begin
        p_block  <= coll;
        p_valid  <= 1'b1;
        coll_cnt <= '0;
      end
    end
  end

  // Data output serializer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_sr  <= '0;
      out_cnt <= '0;
    end else if (c_valid) begin
      out_sr  <= c_block;
      out_cnt <= 4'(WPB);
    end else if (out_cnt != 0) begin
      out_sr  <= {{IO_W{1'b0}}, out_sr[BLOCK_W-1:IO_W]};
      out_cnt <= out_cnt - 4'd1;
    end
  end

  assign dout       = out_sr[IO_W-1:0];
  assign dout_valid = (out_cnt != 0);

  a_out_free: assert property (@(posedge clk) disable iff (!rst_n)
    c_valid |-> (out_cnt <= 4'd1));
  a_consume_valid: assert property (@(posedge clk) disable iff (!rst_n)
    p_consume |-> p_valid);

endmodule
