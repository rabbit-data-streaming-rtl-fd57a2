// rabbit_top -- Rabbit stream cipher engine.
//
// Encrypts or decrypts a stream of 16-bit words with the Rabbit keystream of
// a 128-bit key. The units follow the published architecture: constants
// unit, carry unit and counter system (the eight counters), one shared G
// transformation unit, the next-state function with its g registers, the
// extraction scheme, the data transformation round and a 16-bit I/O
// interface, sequenced by a controller.
//
// Use: send the key as eight 16-bit words on key_valid/key_word (k0 =
// K[15:0] first). Key setup then takes 4 iterations of 12 cycles plus one
// cycle. Afterwards send data words on din_valid/din (ready: din_ready);
// every eight words form a 128-bit block (first word = bits 15:0) that is
// XORed with the next keystream block and returned as eight words on
// dout_valid/dout. With data always available a block is produced every 12
// cycles. keyed is high once key setup is complete; stall is high while the
// engine waits for a data block. A new key may be sent at any time and
// restarts key setup; data in flight is dropped.
module rabbit_top
  import rabbit_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     key_valid,
  input  io_word_t key_word,
  input  logic     din_valid,
  input  io_word_t din,
  output logic     din_ready,
  output logic     dout_valid,
  output io_word_t dout,
  output logic     keyed,
  output logic     stall
);

  key_t   key;
  logic   key_load;
  block_t p_block;
  logic   p_valid;
  block_t c_block;
  logic   c_valid;

  logic init, const_load, const_rotate, cnt_step, g_en, g_shift;
  logic nsf_update, c_modify, ext_en, dtr_en;
  idx_t cnt_idx, g_idx;

  word_t  a_word, c_sel, g_word;
  logic   f_prev, f_next;
  state_t c_all, x_all, g_regs;
  block_t s_block;

  rabbit_io_interface u_io (
    .clk, .rst_n,
    .key_valid, .key_word, .key, .key_load,
    .din_valid, .din, .din_ready, .p_block, .p_valid, .p_consume(dtr_en),
    .c_valid, .c_block, .dout, .dout_valid
  );

  rabbit_controller u_ctrl (
    .clk, .rst_n, .key_load, .p_valid,
    .init, .const_load, .const_rotate, .cnt_step, .cnt_idx,
    .g_en, .g_idx, .g_shift, .nsf_update, .c_modify,
    .ext_en, .dtr_en, .keyed, .stall
  );

  rabbit_constants_unit u_const (
    .clk, .rst_n, .load(const_load), .rotate(const_rotate), .a_word
  );

  rabbit_carry_unit u_carry (
    .clk, .rst_n, .clear(init), .step(cnt_step),
    .c_word(c_sel), .a_word, .f_prev, .f_next
  );

  rabbit_counter_system u_cnt (
    .clk, .rst_n, .load_key(init), .key, .modify(c_modify), .x(x_all),
    .step(cnt_step), .idx(cnt_idx), .a_word, .f_in(f_prev),
    .c_sel, .c(c_all)
  );

  rabbit_g_unit u_g (
    .clk, .rst_n, .en(g_en), .x_word(x_all[g_idx]), .c_word(c_all[g_idx]),
    .g(g_word)
  );

  rabbit_next_state u_nsf (
    .clk, .rst_n, .load_key(init), .key, .g_in(g_word), .g_shift,
    .update(nsf_update), .x(x_all), .g_regs
  );

  rabbit_extraction u_ext (
    .clk, .rst_n, .en(ext_en), .x(x_all), .s(s_block)
  );

  rabbit_data_round u_dtr (
    .clk, .rst_n, .en(dtr_en), .d_in(p_block), .s(s_block),
    .d_out(c_block), .out_valid(c_valid)
  );

endmodule
