# SHA-256 with an unfolded round loop

A plain SHA-256 core performs one of the 64 compression rounds per clock,
so a 512-bit block takes at least 64 clocks. This core *unfolds* the round
loop by a factor J: one clock evaluates J rounds in series and the message
schedule supplies J new words, so a block needs only 64/J round clocks. The
combinational path gets longer and the clock therefore slower, but for
J = 2 and J = 4 throughput still rises, because the clock count falls faster
than the clock rate.

J is a parameter. **J = 4 is the default and the main configuration.** J = 2
is the smaller alternative. J = 1 gives the conventional one-round-per-clock
core for comparison. Any power of two from 1 to 16 elaborates.

| J | round clocks | clocks per block | throughput at f MHz |
|---|--------------|------------------|---------------------|
| 1 | 64 | 66 | 512·f/66 Mbit/s |
| 2 | 32 | 34 | 512·f/34 Mbit/s |
| 4 | 16 | 18 | 512·f/18 Mbit/s |

Published FPGA results for this architecture on an Arria II GX are
228 MHz for J = 1, 251 MHz for J = 2 and 160 MHz for J = 4. The cycle counts
measured there were 66.5, 35.5 and 19.5 per block, which is 0.5 to 1.5
clocks more than this RTL's. Neither the clock rates nor the area have been
reproduced with this RTL.

## The unfolded round

`sha256_round` is one standard round:

    T1 = h + Σ1(e) + Ch(e,f,g) + K_t + W_t
    T2 = Σ0(a) + Maj(a,b,c)
    a' = T1 + T2,   e' = d + T1,   b'..d' = a..c,   f'..h' = e..g

`sha256_compress` chains J copies of it between the 256-bit register of the
working variables a..h and itself. Only a and e are newly computed in each
round; the other six variables are the previous ones moved down by one
place. So within a clock, cell j only produces a new a and a new e, and all
its other inputs are wires:

- Ch and Maj of cell j take the new e (or a) values of cells j-1 and j-2,
  and the register contents beyond them.
- The d that cell j adds to T1 is the register's c for j = 1 and its b for
  j = 2.

For J = 4 the four new (a, e) pairs are what the unfolded datapath calls
next_a0/next_e0 to next_a3/next_e3. That datapath names the register words
next_a, a, b, c and next_e, e, f, g; in those names, cell 0 computes
`next_e0 = c + Temp1_0` and cell 2 computes `next_e2 = a + Temp1_2`.

Six of the eight output words of a round are only moved inputs, so the synthesis
statistics list 192 of `sha256_round`'s 256 output bits as "wired to an
input". That is a property of SHA-256, not a defect.

## The unfolded message schedule

`sha256_msg_sched` has to produce J schedule words per clock. It does this
with two sets of registers:

- `w_q`: the J words W[t]..W[t+J-1] that the rounds use in the current clock.
- `hist_q`: the sixteen words before them, W[t-16]..W[t-1].

In each round clock the next J words are prepared and registered:

- While the block is still arriving, they come from the message input.
- After that, they come from the recurrence
  `W[i] = σ1(W[i-2]) + W[i-7] + σ0(W[i-15]) + W[i-16]`.

The J new words of one clock depend on each other. From the third word on,
the σ1 input W[i-2] is a word computed in the same clock: with J = 4 the
third word uses the first and the fourth uses the second. The chain is
therefore two words deep for J = 4, not four.

Because the schedule words are computed one clock ahead and registered,
the message expansion never sits in series with the J rounds. The K
constants are handled the same way: `sha256_k_rom` is a 64 × 32-bit ROM
read as 64/J rows of J words, with a registered output, and the sequencer
addresses it one row ahead. These two registers are this design's reading
of "inner pipelining".

## Sequencing and timing

`sha256_counter` is a three-state sequencer (IDLE, ROUND, FINAL) with a
64/J-step round counter. For J = 4:

    clock       0      1 .. 16        17       18
    phase       IDLE   ROUND          FINAL    IDLE
    start_i     1                              (next start may come here)
    msg_take_o  1      1 1 1 0 .. 0   0        1 if started
    msg_i       W0-3   W4-7 .. W12-15
    done_o                                     1, digest_o valid

- **Clock 0** (`start_i` while `ready_o`): the message schedule takes
  W0..W3. The working variables and the output stage take the initial hash
  value.
- **Clocks 1..16:** each applies four rounds. During the first three of
  them the schedule takes the rest of the message, four words per clock.
- **Clock 17:** the output stage adds the initial hash value to a..h,
  word by word modulo 2^32.
- **Clock 18:** the digest is on `digest_o` and `done_o` is high. In this
  same clock the core is idle again and accepts the next start, so blocks
  can follow each other every 64/J + 2 clocks.

A start while the core is busy is ignored. The sequencer checks with
assertions that exactly one of idle/round/final is active and that a load
is followed by a round clock.

### Messages longer than one block

`sha256_init_mux` chooses the initial hash value of a block:

- the standard IV when `first_i` is 1 with `start_i`;
- otherwise the digest of the previous block, which `sha256_output` keeps
  on `digest_o`.

A message of n blocks is n starts, the first with `first_i = 1`, the others
with `first_i = 0`. Its hash is the digest after the last block. Padding
(0x80, zeros, 64-bit bit length) is the user's job.

## Interface of `sha256_unfold_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| start_i | in | 1 | begin a block (taken when `ready_o`) |
| first_i | in | 1 | with `start_i`: 1 = first block of a message |
| msg_i | in | J×32 | next J message words, `msg_i[0]` the earliest |
| msg_take_o | out | 1 | `msg_i` is consumed at the end of this clock |
| ready_o | out | 1 | idle; a start is accepted |
| done_o | out | 1 | one-clock pulse: `digest_o` valid |
| digest_o | out | 256 | H0..H7, H0 in bits 255:224 |

The core has no back-pressure. The message source must have the next J
words on `msg_i` in every clock in which `msg_take_o` is high: the start
clock and the 16/J − 1 clocks after it. `msg_take_o` depends combinationally
on `start_i` in the start clock. Only the sequencer and the output stage are
reset. The datapath registers (schedule words, working variables, ROM
output) are always loaded before they are read.

`sha256_pkg` holds the shared types (`word_t`, `state_t` of eight words,
`block_t` of sixteen), the K table, the IV and the SHA-256 word functions.
`state_t` and `block_t` are packed with ascending ranges so that word 0 is
the most significant. A digest then prints in the usual order, and
Verilator's ASCRANGE warnings about those two typedefs are expected.

## Where this RTL goes beyond, or reads into, the published description

- **Handshake, reset and chaining.** The start/ready/done handshake,
  `msg_take_o`, the reset style and the chaining input of the multiplexer
  are this design's own. The published design hashes one block, and its
  multiplexer only supplies the initial value.
- **The h term.** Temp1 of every round includes the working variable h, as
  SHA-256 requires. The published list of Temp1's terms names Σ1, Ch, W
  and K only.
- **XOR in σ0 and σ1.** The small sigmas combine their rotations and shift
  with XOR, as SHA-256 defines them.
- **Rotation amounts.** The Σ0/Σ1 rotation amounts (2/13/22 and 6/11/25)
  are the standard's.
- **Register placement.** Where the pipeline registers sit (registered K
  ROM output, schedule words one clock ahead) is this design's choice.
- **Cycle counts.** The clocks per block (66/34/18) differ from the
  published 66.5/35.5/19.5 by this design's own overhead: one load clock
  and one final-add clock.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. All of them
compare against `sha256_ref_pkg`, a reference model written separately
from the RTL:

- Its K and IV values are not copied from a table. They are computed
  exactly with integer arithmetic: K_i = ⌊∛(p_i·2^96)⌋ mod 2^32 and
  H_i = ⌊√(p_i·2^64)⌋ mod 2^32, where p_i is the i-th prime.
- Its compression is the textbook one-round loop.

The end-to-end testbenches cover the full core:

- `tb_sha256_unfold_top` (J = 4, all defaults), `tb_sha256_unfold_top_j2`
  and `tb_sha256_unfold_top_j1` share `sha256_top_tb_body.svh`.
- They hash "abc", the empty string and the 448-bit two-block message
  against their published digests.
- They then hash 40 random messages of 0–300 bytes against the model.
  Most follow each other back to back.
- They check the clocks per block, that the message is taken in 16/J
  clocks, and that a start while busy is ignored.
- They count how often the multiplexer chose the IV and the chaining value,
  how many back-to-back starts and ignored starts occurred, and fail if any
  of these never happened.

To run one with Verilator:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
      rtl/sha256_pkg.sv tb/sha256_ref_pkg.sv tb/tb_sha256_unfold_top.sv \
      --top-module tb_sha256_unfold_top -o sim
    ./obj_dir/sim

For a different unfolding factor, copy `tb_sha256_unfold_top_j2.sv` and
change its `J`; copies made that way for J = 8 (10 clocks per block) and
J = 16 (6 clocks per block) pass as well. The unit testbenches run their
blocks at J = 4. Every testbench finishes in well under a second.

## Files

| file | content |
|------|---------|
| `rtl/sha256_pkg.sv` | types, K, IV, Σ/σ/Ch/Maj |
| `rtl/sha256_unfold_top.sv` | the core |
| `rtl/sha256_counter.sv` | sequencer and round counter |
| `rtl/sha256_msg_sched.sv` | J-words-per-clock message schedule |
| `rtl/sha256_k_rom.sv` | K ROM, J words per read |
| `rtl/sha256_init_mux.sv` | IV / chaining-value multiplexer |
| `rtl/sha256_compress.sv` | a..h register and J chained rounds |
| `rtl/sha256_round.sv` | one round |
| `rtl/sha256_output.sv` | final addition and digest register |
| `tb/sha256_ref_pkg.sv` | reference model |
| `tb/sha256_top_tb_body.svh` | shared end-to-end test body |
| `tb/tb_*.sv` | testbenches |
