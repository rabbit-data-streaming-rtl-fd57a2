// rabbit_controller -- sequences key setup and the 12-cycle Rabbit iteration.
//
// One iteration (next-state step of the cipher) takes 12 clock cycles,
// numbered t = 0..11:
//   t0      extraction of the previous keystream block (keystream mode)
//   t1      data transformation round on that block
//   t0..t1  constants ring rotates twice, so that a[0] is ready at t2
//   t2..t9  counter system updates c[t-2], carry unit steps
//   t3..t10 G unit computes g[t-3] from x[t-3] and the new c[t-3]
//   t4..t10 g shift chain moves (Reg 0..6 fill behind the G register)
//   t11     next-state function updates x[0..7]; constants ring reloads
// A 128-bit keystream block every 12 cycles gives 128/12 bits per cycle,
// 586.7 Mbit/s at 55 MHz.
//
// Key setup: key_load (a pulse when a complete key has arrived) loads x and c
// from the key, clears the carry and starts four iterations; one more cycle
// (CMOD) applies c[j] ^= x[(j+4) mod 8]. Then the engine iterates in
// keystream mode. After each keystream iteration a block is pending; at the
// next t0 the engine waits (stall) until the I/O interface holds a data block
// (p_valid), then extracts (t0) and combines (t1, p_consume). A new key_load
// at any time restarts key setup (the engine is key agile).
//
// The 12-cycle figure is derived from the reported throughput and frequency;
// the schedule, the stall rule and the signal names are this design's own.
// Four setup iterations and the counter modification follow the Rabbit
// specification.
module rabbit_controller
  import rabbit_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic key_load,
  input  logic p_valid,
  output logic init,          // load x, c from key, clear carry
  output logic const_load,
  output logic const_rotate,
  output logic cnt_step,      // counter + carry step
  output idx_t cnt_idx,
  output logic g_en,
  output idx_t g_idx,
  output logic g_shift,
  output logic nsf_update,
  output logic c_modify,
  output logic ext_en,
  output logic dtr_en,        // also consumes the data block
  output logic keyed,         // keystream mode
  output logic stall
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_CMOD} state_e;

  state_e     state;
  logic [3:0] t;
  logic [1:0] setup_cnt;
  logic       blk_pending;
  logic       in_iter;
  logic       advance;

  always_comb begin
    in_iter      = (state == S_ITER) && !key_load;
    stall        = in_iter && t == 4'd0 && blk_pending && !p_valid;
    advance      = in_iter && !stall;
    init         = key_load;
    const_load   = key_load || (in_iter && t == 4'd11);
    const_rotate = advance && t <= 4'd10;
    cnt_step     = in_iter && t >= 4'd2 && t <= 4'd9;
    cnt_idx      = idx_t'(t - 4'd2);
    g_en         = in_iter && t >= 4'd3 && t <= 4'd10;
    g_idx        = idx_t'(t - 4'd3);
    g_shift      = in_iter && t >= 4'd4 && t <= 4'd10;
    nsf_update   = in_iter && t == 4'd11;
    c_modify     = (state == S_CMOD) && !key_load;
    ext_en       = in_iter && t == 4'd0 && blk_pending && p_valid;
    dtr_en       = in_iter && t == 4'd1 && blk_pending;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      t           <= '0;
      setup_cnt   <= '0;
      blk_pending <= 1'b0;
      keyed       <= 1'b0;
    end else if (key_load) begin
      state       <= S_ITER;
      t           <= '0;
      setup_cnt   <= '0;
      blk_pending <= 1'b0;
      keyed       <= 1'b0;
    end else begin
      case (state)
        S_ITER: if (advance) begin
          if (t == 4'd1) blk_pending <= 1'b0;
          if (t == 4'd11) begin
            t <= '0;
            if (keyed) begin
              blk_pending <= 1'b1;
            end else if (setup_cnt == 2'(SETUP_ITERS - 1)) begin
              state <= S_CMOD;
            end else begin
              setup_cnt <= setup_cnt + 2'd1;
            end
          end else begin
            t <= t + 4'd1;
          end
        end
        S_CMOD: begin
          state <= S_ITER;
          keyed <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  // The engine never holds more than one block: a new block is only made
  // pending once the previous one has been combined at t1.
  a_one_block: assert property (@(posedge clk) disable iff (!rst_n)
    (in_iter && t == 4'd11 && keyed) |-> !blk_pending);

endmodule
