# Rabbit stream cipher engine

This is a hardware engine for the Rabbit stream cipher. It takes a 128-bit key and turns a
stream of 16-bit words into ciphertext, or ciphertext back into plaintext. Rabbit keeps 513 bits
of state: eight 32-bit state words `x[0..7]`, eight 32-bit counters `c[0..7]` and one counter
carry bit. Each iteration of the state yields a 128-bit keystream block. The keystream is XORed
with the data, so encryption and decryption are the same operation.

The engine follows a published FPGA architecture for Rabbit (a Xilinx Virtex implementation
reported at 55 MHz and 586 Mbit/s). That architecture splits the cipher into these units:

- a constants unit;
- a carry unit and a counter system;
- a G transformation unit;
- the next-state function;
- an extraction scheme;
- a data transformation round;
- a 16-bit I/O interface.

All internal buses are 32 bits wide. This RTL keeps the units and their insides where the
architecture gives them. It adds a controller and a concrete I/O protocol of its own.

## The iteration: 12 clock cycles per 128-bit block

The reported figures fix the rate: 586 Mbit/s at 55 MHz is 10.67 bits per cycle, which is 128
bits every 12 cycles. The engine therefore runs one cipher iteration every 12 cycles. It has one
G unit and one counter adder, each shared over the eight words. One iteration, with cycles
numbered t0 to t11:

| cycle   | what happens |
|---------|--------------|
| t0      | extraction: the 128-bit block `S` is taken from the current `x` (keystream mode only) |
| t1      | data round: `C = P ^ S` on the waiting 128-bit data block |
| t0, t1  | the constants ring rotates twice, so `a[0]` is ready at t2 |
| t2–t9   | counter step `j = t-2`: `c[j] <= c[j] + a[j] + carry`, then the carry is updated |
| t3–t10  | G step `j = t-3`: `g[j] = LSW(u²) ^ MSW(u²)` with `u = x[j] + c[j]`. It uses the new `c[j]` from the cycle before |
| t4–t10  | the g shift chain moves one place (Reg 6 takes the G register, Reg k takes Reg k+1) |
| t11     | next-state update of all eight `x` words in one cycle; the constants ring is reloaded |

Three parts of this schedule need explaining:

**Counter carry chain.** The counters form one 256-bit counter that advances by a fixed
constant each iteration. The carry out of `c[j]` goes into `c[j+1]`, and the carry out of `c[7]` goes into `c[0]` of the
next iteration. The carry unit (`rabbit_carry_unit`) has a 33-bit full adder
`c[i] + a[i] + f(i-1)`, a comparison with 2^32 (greater or equal) and a 2:1 select of 1 or 0.
One flip-flop holds the carry. Processing one counter word per cycle makes that single flip-flop
the whole carry chain, including the wrap from `c[7]` to `c[0]`.

**Constants from a 36-bit ring.** The eight counter constants are `4D34D34D`, `D34D34D3`,
`34D34D34`, and then the same three again in that order. Each is a 32-bit window of the repeating
nibble pattern `D34`. The constants unit does not store eight words. It keeps a 36-bit initial
vector `0xD34D34D34` and a ring of nine 4-bit groups. `a[i]` is the upper eight groups of the
ring. Each rotation moves the ring one group left, and the top group wraps to the bottom. After a
load the ring gives `D34D34D3`, `34D34D34`, `4D34D34D`, and so on. `a[j]` appears after `j+2`
rotations, which is why the ring rotates at t0 and t1 before the first counter step. The ring is
reloaded at t11. Because 12 is a multiple of 3, a free-running ring would also stay in phase;
the reload keeps it correct across stalls.

**g registers as a shift chain.** The next-state function needs all eight `g` values at once.
The G unit's output register acts as Reg 7. Reg 0 to Reg 6 form a shift chain behind it, and
each shift happens one cycle after the G register captures a value. At the end of t10, Reg `j`
holds `g[j]` for every `j`. At t11 the eight basic cells compute the new state. Each cell has
two adders and up to two rotators:

    x[j] = g[j] + (g[j-1] <<< 16) + (g[j-2] <<< 16)    even j
    x[j] = g[j] + (g[j-1] <<< 8)  +  g[j-2]            odd j      (indices mod 8)

The extraction at t0 reads `x` before the next update at t11. The G steps read the old `x`,
which is also unchanged until t11.

## Key setup

Key words arrive as the eight 16-bit subkeys `k0 = K[15:0]` to `k7 = K[127:112]`. When the
eighth word arrives, the I/O interface pulses `key_load`. The engine then does the following:

1. Loads the initial state. For even `j`: `x[j] = k(j+1)||k(j)` and `c[j] = k(j+4)||k(j+5)`.
   For odd `j`: `x[j] = k(j+5)||k(j+4)` and `c[j] = k(j)||k(j+1)`. The carry is cleared.
2. Runs four iterations (48 cycles).
3. Spends one cycle on `c[j] ^= x[(j+4) mod 8]`.
4. Enters keystream mode.

The mapping, the four iterations and the counter modification are those of the Rabbit
specification (RFC 4503, key setup without an IV). Only `x[0] = k1||k0` comes from the
architecture description. IV setup is not implemented.

## Streaming interface (`rabbit_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `key_valid`, `key_word[15:0]` | in | eight key words, `k0` first |
| `din_valid`, `din[15:0]`, `din_ready` | in/in/out | data words; a word is taken when `din_valid && din_ready` |
| `dout_valid`, `dout[15:0]` | out | result words; no back-pressure |
| `keyed` | out | key setup is complete |
| `stall` | out | the engine is waiting for a data block |

**Word order.** Eight consecutive data words form a 128-bit block, and the first word is bits
15:0. Output blocks leave in the same order: eight words on consecutive cycles.

**Buffering.** The I/O interface has a collecting register and one holding register. A second
block can therefore be collected while the first waits for its keystream.

**Flow control.** The engine never runs more than one block ahead. After each keystream
iteration it waits at t0 (`stall` high) until a full data block is held. The data block is
consumed at t1.

**Rate and latency.** With data always available, output blocks start exactly 12 cycles apart.
The first output word appears 65 cycles after the `key_load` pulse. That is 48 cycles of setup
iterations, the modification cycle, one 12-cycle keystream iteration, t0, t1 and two cycles to
load the output register.

**Changing the key.** A new key may be sent at any time. The last key word discards any partly
collected or waiting data block, including a data word accepted in the same cycle. It then
restarts key setup. Data for the new key may follow on the next cycle.

**Output.** There is no output back-pressure. A block takes 8 cycles to send, and blocks are at
least 12 cycles apart.

## Files

| file | unit |
|------|------|
| `rtl/rabbit_pkg.sv` | widths, types, the constant vector, key-to-state mapping functions |
| `rtl/rabbit_constants_unit.sv` | 36-bit initial vector and 9×4-bit ring |
| `rtl/rabbit_carry_unit.sv` | full adder, comparator, select, carry flip-flop |
| `rtl/rabbit_counter_system.sv` | eight counters, key load, modification, modular update |
| `rtl/rabbit_g_unit.sv` | adder, squarer, half XOR, output register |
| `rtl/rabbit_next_state.sv` | `x` registers, g shift chain, eight basic cells |
| `rtl/rabbit_extraction.sv` | eight 16-bit XORs, 128-bit output register |
| `rtl/rabbit_data_round.sv` | eight 16-bit XORs, result register |
| `rtl/rabbit_io_interface.sv` | key assembly, input collector and holding register, output serializer |
| `rtl/rabbit_controller.sv` | key setup and the 12-cycle schedule |
| `rtl/rabbit_top.sv` | the engine |

The block of `S` bits is built from these operand pairs:

    S[15:0]   = x0[15:0]  ^ x5[31:16]     S[31:16]   = x0[31:16] ^ x3[15:0]
    S[47:32]  = x2[15:0]  ^ x7[31:16]     S[63:48]   = x2[31:16] ^ x5[15:0]
    S[79:64]  = x4[15:0]  ^ x1[31:16]     S[95:80]   = x4[31:16] ^ x7[15:0]
    S[111:96] = x6[15:0]  ^ x3[31:16]     S[127:112] = x6[31:16] ^ x1[15:0]

## Departures from the published architecture and choices made here

**Choices made here:**

- **One G unit.** A single G unit is time-shared over the eight words. This fits the single
  32-bit `c[i]`/`x[i]` buses of the architecture and the 12-cycle rate, but the architecture
  does not say how many G units there are.
- **Own control and interface.** The controller, the stall rule, the valid/ready input, the
  separate key port and the word order are all this design's own. The architecture names the
  I/O unit and its 16-bit data width, but gives no protocol.
- **Comparison in the carry unit.** The carry unit compares with "greater or equal" 2^32, as in
  the cipher's carry equation. A sum of exactly 2^32 must carry. One drawing of the unit labels
  the comparator "> 2^32"; that reading would be wrong on this boundary.
- **128-bit data round.** The data round works on a full 128-bit block per cycle, as the
  architecture's text describes. Its data reaches the engine through the 16-bit interface.

**Not implemented:**

- IV setup.

**Size:**

- After coarse synthesis the engine has 1598 flip-flop bits. The reported Virtex design used
  6928 flip-flops and 1731 slices. That implementation is not available, so its extra registers
  (for example pipelining) cannot be reproduced.

## Verification

Every unit has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. `tb/rabbit_ref_pkg.sv` is a word-level reference model of the
cipher. It is written straight from the cipher equations and is independent of the RTL schedule.

The end-to-end test `tb/tb_rabbit_top.sv` runs the engine at its default size and covers:

- the RFC 4503 known-answer test for the all-zero key (first three blocks);
- ten random blocks at full rate, checking 12 cycles between blocks and the 65-cycle first-block
  latency;
- input with gaps, so the engine stalls;
- a key change in the middle of a data block;
- decryption of earlier ciphertext back to its plaintext.

`tb/tb_rabbit_stream.sv` streams 256 blocks (4 KiB) under one key without gaps. It checks every
word and measures the sustained rate: 10.667 bits per cycle, which is 586.7 Mbit/s at 55 MHz.

It also counts key setups, counter modifications, stalls, carries of 0 and 1, dropped partial
blocks and decrypted blocks, and fails if any of them never happened.

To run a testbench with Verilator (5.x), from the project root:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/rabbit_pkg.sv tb/rabbit_ref_pkg.sv tb/tb_rabbit_top.sv \
        --top-module tb_rabbit_top -o sim
    ./obj_dir/sim

Replace `tb_rabbit_top` with `tb_rabbit_<unit>` for a unit test. Lint a unit with
`verilator --lint-only -Wall -y rtl rtl/rabbit_pkg.sv rtl/<file>.sv`.

Lint reports a few warnings that are left as they are:

- `rst_n` is used both as the asynchronous reset and in the `disable iff` of the assertions.
- Unused package constants.
- Two debug outputs that are unused at the top: the carry-out and the g registers.

Assertions check that the engine never holds two keystream blocks at once and that the output
serializer is free when a result arrives.
