// rabbit_pkg -- types and constants shared by the Rabbit stream cipher engine.
//
// Rabbit keeps 513 bits of state: eight 32-bit state words x[0..7], eight
// 32-bit counters c[0..7] and one counter carry bit. Every iteration yields a
// 128-bit keystream block. The engine moves data in 32-bit words internally
// and 16-bit words at its external interface.
//
// The widths, the 36-bit constant vector 0xD34D34D34 and the key split into
// eight 16-bit subkeys follow the published architecture. The number of key
// setup iterations (four), the key-to-state mapping beyond x[0] = k1||k0 and
// the counter modification after setup follow the Rabbit cipher specification
// the architecture implements. The 12-cycle iteration is this design's
// schedule, chosen to match the reported 586 Mbit/s at 55 MHz (128 bits / 12
// cycles x 55 MHz).
package rabbit_pkg;

  localparam int unsigned WORD_W      = 32;   // internal bus width n
  localparam int unsigned NWORDS      = 8;    // state / counter words
  localparam int unsigned IO_W        = 16;   // external data bus
  localparam int unsigned BLOCK_W     = 128;  // keystream block
  localparam int unsigned KEY_W       = 128;
  localparam int unsigned SETUP_ITERS = 4;    // iterations during key setup
  localparam int unsigned ITER_CYCLES = 12;   // clock cycles per iteration

  // Initial vector of the constants unit: nine 4-bit groups.
  localparam logic [35:0] CONST_IV = 36'hD34D34D34;

  typedef logic [WORD_W-1:0]   word_t;
  typedef word_t [NWORDS-1:0]  state_t;   // state_t[j] is word j
  typedef logic [BLOCK_W-1:0]  block_t;
  typedef logic [KEY_W-1:0]    key_t;
  typedef logic [IO_W-1:0]     io_word_t;
  typedef logic [2:0]          idx_t;

  function automatic word_t rotl(word_t v, int unsigned n);
    return (v << n) | (v >> (WORD_W - n));
  endfunction

  // 16-bit subkey k_i = K[16i+15 : 16i].
  function automatic logic [15:0] subkey(key_t k, int unsigned i);
    return k[16*i +: 16];
  endfunction

  // Initial state words: even j: k(j+1)||k(j); odd j: k(j+5)||k(j+4).
  function automatic state_t key_to_x(key_t k);
    state_t x;
    for (int unsigned j = 0; j < NWORDS; j++) begin
      if (j % 2 == 0) x[j] = {subkey(k, (j + 1) % 8), subkey(k, j)};
      else            x[j] = {subkey(k, (j + 5) % 8), subkey(k, (j + 4) % 8)};
    end
    return x;
  endfunction

  // Initial counters: even j: k(j+4)||k(j+5); odd j: k(j)||k(j+1).
  function automatic state_t key_to_c(key_t k);
    state_t c;
    for (int unsigned j = 0; j < NWORDS; j++) begin
      if (j % 2 == 0) c[j] = {subkey(k, (j + 4) % 8), subkey(k, (j + 5) % 8)};
      else            c[j] = {subkey(k, j), subkey(k, (j + 1) % 8)};
    end
    return c;
  endfunction

endpackage
