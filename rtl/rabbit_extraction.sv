// rabbit_extraction -- extraction scheme: 128-bit keystream block from x.
//
// Eight 16-bit XORs of halves of the state words, captured in a 128-bit
// output register when en is high (s is valid the cycle after):
//   s[ 15:  0] = x0[15:0]  ^ x5[31:16]    s[ 31: 16] = x0[31:16] ^ x3[15:0]
//   s[ 47: 32] = x2[15:0]  ^ x7[31:16]    s[ 63: 48] = x2[31:16] ^ x5[15:0]
//   s[ 79: 64] = x4[15:0]  ^ x1[31:16]    s[ 95: 80] = x4[31:16] ^ x7[15:0]
//   s[111: 96] = x6[15:0]  ^ x3[31:16]    s[127:112] = x6[31:16] ^ x1[15:0]
// The operand pairs and the output register follow the published extraction
// scheme; the enable is this design's.
module rabbit_extraction
  import rabbit_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  state_t x,
  output block_t s
);

  block_t s_next;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      // Pair k uses x[2k] with x[2k+5] and x[2k+3] (indices mod 8).
      s_next[32*k      +: 16] = x[2*k][15:0]  ^ x[(2*k + 5) % NWORDS][31:16];
      s_next[32*k + 16 +: 16] = x[2*k][31:16] ^ x[(2*k + 3) % NWORDS][15:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s <= '0;
    else if (en) s <= s_next;
  end

endmodule
