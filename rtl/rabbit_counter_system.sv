// rabbit_counter_system -- the eight 32-bit counters c[0..7] of Rabbit.
//
// One counter word is updated per step: c[idx] <= c[idx] + a + f (mod 2^32),
// where a is the constant from the constants unit and f the carry bit from
// the carry unit. Stepping idx = 0..7 on consecutive cycles performs the full
// counter update of one iteration.
//
// Other operations (one per cycle, in priority order):
//   load_key : counters take their initial values from the 128-bit key;
//   modify   : after key setup, c[j] <= c[j] XOR x[(j+4) mod 8];
//   step     : the update above.
// Outputs: all counters (c) and the word being updated (c_sel) for the carry
// unit.
//
// The modulo-2^32 update follows the published counter system unit; the key
// mapping and the modification after setup come from the Rabbit
// specification. Register organisation and controls are this design's own.
module rabbit_counter_system
  import rabbit_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load_key,
  input  key_t   key,
  input  logic   modify,
  input  state_t x,
  input  logic   step,
  input  idx_t   idx,
  input  word_t  a_word,
  input  logic   f_in,
  output word_t  c_sel,
  output state_t c
);

  assign c_sel = c[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0;
    end else if (load_key) begin
      c <= key_to_c(key);
    end else if (modify) begin
      for (int j = 0; j < NWORDS; j++) c[j] <= c[j] ^ x[(j + 4) % NWORDS];
    end else if (step) begin
      c[idx] <= c[idx] + a_word + {{(WORD_W-1){1'b0}}, f_in};
    end
  end

endmodule
