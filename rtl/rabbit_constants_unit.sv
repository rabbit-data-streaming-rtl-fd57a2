// rabbit_constants_unit -- supplies the counter constants a[0..7].
//
// The eight Rabbit counter constants are all 32-bit windows of the repeating
// nibble pattern ...D34D34D34... . Instead of eight 32-bit registers the unit
// keeps a 36-bit initial vector (nine 4-bit groups, 0xD34D34D34) and a ring of
// nine 4-bit flip-flop groups. load copies the initial vector into the ring;
// rotate moves the ring one group to the left (the top group wraps to the
// bottom). a_word is the upper eight groups of the ring.
//
// Sequence after a load: D34D34D3, 34D34D34, 4D34D34D, D34D34D3, ... with
// period three. The counter constants are a[0] = 4D34D34D, a[1] = D34D34D3,
// a[2] = 34D34D34, a[j] = a[j mod 3], so a[j] appears after j+2 rotations; the
// controller rotates twice before the first counter step.
//
// The initial vector, the nine 4-bit groups and the wrap-around path follow
// the published constants unit. Which eight groups drive a[i] (the upper
// ones) and the load/rotate timing are this design's reading of it.
module rabbit_constants_unit
  import rabbit_pkg::*;
#(
  parameter logic [35:0] IV = CONST_IV
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  logic  rotate,
  output word_t a_word
);

  logic [3:0] ring [9];   // ring[8] is the leftmost group

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < 9; g++) ring[g] <= IV[4*g +: 4];
    end else if (load) begin
      for (int g = 0; g < 9; g++) ring[g] <= IV[4*g +: 4];
    end else if (rotate) begin
      ring[0] <= ring[8];
      for (int g = 1; g < 9; g++) ring[g] <= ring[g-1];
    end
  end

  always_comb begin
    for (int g = 0; g < 8; g++) a_word[4*g +: 4] = ring[g+1];
  end

endmodule
