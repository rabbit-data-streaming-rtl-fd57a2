// rabbit_g_unit -- the G transformation of Rabbit.
//
// g = LSW(u^2) XOR MSW(u^2), u = (x + c) mod 2^32: a 32-bit modular adder, a
// 32x32 -> 64-bit squarer, an XOR of the two 32-bit halves of the square and
// a 32-bit output register. One unit is shared by all eight state words: the
// controller presents x[j], c[j] for j = 0..7 on consecutive cycles with en
// high, and g holds g[j] from the following cycle on.
//
// Datapath (adder, squarer, half-XOR, output register) follows the published
// G transformation unit. Sharing one unit across the eight words is this
// design's choice, consistent with the single 32-bit c[i]/x[i] buses of the
// architecture and the 12-cycle iteration.
module rabbit_g_unit
  import rabbit_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t x_word,
  input  word_t c_word,
  output word_t g
);

  word_t              u;
  logic [2*WORD_W-1:0] sq;
  word_t              g_next;

  always_comb begin
    u      = x_word + c_word;
    sq     = {{WORD_W{1'b0}}, u} * {{WORD_W{1'b0}}, u};
    g_next = sq[WORD_W-1:0] ^ sq[2*WORD_W-1:WORD_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  g <= '0;
    else if (en) g <= g_next;
  end

endmodule
