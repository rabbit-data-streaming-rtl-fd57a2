// rabbit_next_state -- g registers and next-state function of Rabbit.
//
// Holds the eight state words x[0..7] and the g registers Reg 0..Reg 7.
// Reg 7 is the output register of the G unit (input g_in); Reg 0..6 form a
// shift chain fed from it: each g_shift moves Reg 6 <- g_in and
// Reg k <- Reg k+1. With the G unit producing g[0..7] on consecutive cycles
// and g_shift following one cycle behind, Reg j holds g[j] once g[7] is in the
// G register.
//
// update computes all eight words in one cycle with eight basic cells of two
// adders each and applies them to x:
//   x[j] = g[j] + (g[j-1] <<< 16) + (g[j-2] <<< 16)   for even j
//   x[j] = g[j] + (g[j-1] <<< 8)  +  g[j-2]           for odd j
// (indices mod 8, <<< is a left rotation). load_key sets x from the key.
//
// The eight-cell chain of two adders and rotators, and the rotation amounts,
// follow the published next-state function and operation graph. The shift
// chain that fills the g registers is this design's choice.
module rabbit_next_state
  import rabbit_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load_key,
  input  key_t   key,
  input  word_t  g_in,
  input  logic   g_shift,
  input  logic   update,
  output state_t x,
  output state_t g_regs
);

  word_t  chain [7];
  state_t x_next;

  always_comb begin
    for (int j = 0; j < 7; j++) g_regs[j] = chain[j];
    g_regs[7] = g_in;
  end

  // Eight basic cells.
  always_comb begin
    for (int j = 0; j < NWORDS; j++) begin
      word_t g1, g2, g3, sum1;
      g1 = g_regs[j];
      if (j % 2 == 0) begin
        g2 = rotl(g_regs[(j + 7) % NWORDS], 16);
        g3 = rotl(g_regs[(j + 6) % NWORDS], 16);
      end else begin
        g2 = rotl(g_regs[(j + 7) % NWORDS], 8);
        g3 = g_regs[(j + 6) % NWORDS];
      end
      sum1      = g1 + g2;
      x_next[j] = sum1 + g3;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 7; j++) chain[j] <= '0;
    end else if (g_shift) begin
      chain[6] <= g_in;
      for (int j = 0; j < 6; j++) chain[j] <= chain[j+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        x <= '0;
    else if (load_key) x <= key_to_x(key);
    else if (update)   x <= x_next;
  end

endmodule
