// rabbit_data_round -- data transformation round: C = P XOR S.
//
// Eight 16-bit XOR gates combine a 128-bit data block d_in with the 128-bit
// keystream block s in one clock cycle; the result is registered in d_out
// when en is high, and out_valid pulses in the cycle d_out is new.
// Encryption (plaintext in) and decryption (ciphertext in) are the same
// operation. The XOR structure follows the published data transformation
// round; the output register and valid pulse are this design's.
module rabbit_data_round
  import rabbit_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  block_t d_in,
  input  block_t s,
  output block_t d_out,
  output logic   out_valid
);

  block_t d_next;

  always_comb begin
    for (int k = 0; k < BLOCK_W / IO_W; k++)
      d_next[IO_W*k +: IO_W] = d_in[IO_W*k +: IO_W] ^ s[IO_W*k +: IO_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) d_out <= d_next;
    end
  end

endmodule
