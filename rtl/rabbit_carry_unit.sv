// rabbit_carry_unit -- counter carry bit of the Rabbit counter system.
//
// The counters are updated one word per clock, c[0] first. For each word the
// unit adds c[i] + a[i] + f(i-1) in a 33-bit full adder, compares the sum with
// 2^32 and selects 1 or 0 through a 2:1 multiplexer; that is the carry f(i)
// into the next counter word. The carry is held in a flip-flop (the 513th bit
// of the cipher state), so the carry out of c[7] feeds c[0] of the next
// iteration, as the counter recurrence requires.
//
// Interface: clear resets the carry to 0 (key setup), step samples f(i) at the
// clock edge. f_prev is the stored carry f(i-1) that the counter system adds in
// the same cycle; f_next is the combinational carry out.
//
// Adder, comparator and multiplexer follow the published carry unit; the
// comparison is "greater or equal" as in the carry equation (a 33-bit sum of
// exactly 2^32 is a carry). Storing the carry and the clear/step controls are
// this design's choices.
module rabbit_carry_unit
  import rabbit_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  step,
  input  word_t c_word,
  input  word_t a_word,
  output logic  f_prev,
  output logic  f_next
);

  logic [WORD_W:0] sum;
  logic            ge;

  always_comb begin
    sum    = {1'b0, c_word} + {1'b0, a_word} + {{WORD_W{1'b0}}, f_prev};
    ge     = (sum >= {1'b1, {WORD_W{1'b0}}});
    f_next = ge ? 1'b1 : 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      f_prev <= 1'b0;
    else if (clear)  f_prev <= 1'b0;
    else if (step)   f_prev <= f_next;
  end

endmodule
