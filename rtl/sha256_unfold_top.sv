// sha256_unfold_top: SHA-256 hash core with unfolding factor J.
//
// The core hashes one padded 512-bit message block at a time. Unfolding
// the round loop J times makes each clock perform J of the 64 compression
// rounds and produce J message-schedule words, so a block needs 64/J round
// clocks instead of 64. J = 4 is the main configuration; J = 2 is the
// smaller alternative and J = 1 gives the conventional one-round-per-clock
// core. The six parts are the round counter/sequencer (sha256_counter), the
// message schedule (sha256_msg_sched), the K constant ROM (sha256_k_rom),
// the buffer-initialisation multiplexer (sha256_init_mux), the compression
// function (sha256_compress) and the output adder (sha256_output).
//
// The six-part structure, the unfolding and the J-words-per-clock message
// and constant inputs follow the published design; the handshake, the
// chaining of blocks and the exact clock count are this design's own.
//
// Interface: when ready_o is high, a start_i pulse begins a block; first_i
// (sampled with start_i) is 1 for the first block of a message, which then
// starts from the standard IV, and 0 for a later block, which continues from
// the digest of the previous one. The sixteen words of the padded block are
// streamed on msg_i, J words per clock (msg_i[0] being the earliest word),
// in the clocks where msg_take_o is high: the start clock and the 16/J - 1
// clocks after it. The core never waits for data, so the source must have
// the words ready in those clocks. Padding is done outside the core. done_o pulses for one clock when
// digest_o (H0..H7, H0 = first 32 bits of the hash) is valid; the digest then
// stays until the next block finishes.
// Timing: start clock + 64/J round clocks + 1 final clock; done_o and a new
// start can share the next clock, so one block every 64/J + 2 clocks
// (18 for J = 4, 34 for J = 2, 66 for J = 1).
module sha256_unfold_top
  import sha256_pkg::*;
#(
  parameter int unsigned J = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start_i,
  input  logic   first_i,
  input  word_t  [J-1:0] msg_i,
  output logic   msg_take_o,
  output logic   ready_o,
  output logic   done_o,
  output state_t digest_o
);

  localparam int unsigned ROWS = ROUNDS / J;
  localparam int unsigned AW   = (ROWS > 1) ? $clog2(ROWS) : 1;

  if (J == 0 || J > 16 || (ROUNDS % J) != 0 || (J & (J - 1)) != 0) begin : g_bad_j
    $error("J must be a power of two from 1 to 16");
  end

  logic            load, adv, fin;
  logic [AW-1:0]   rom_addr;
  word_t [J-1:0]   w, k;
  state_t          h_init, st;

  sha256_counter #(.J(J)) u_counter (
    .clk, .rst_n,
    .start_i, .ready_o,
    .load_o (load), .adv_o (adv), .final_o (fin), .msg_take_o,
    .rom_addr_o (rom_addr)
  );

  sha256_msg_sched #(.J(J)) u_msg_sched (
    .clk, .load_i (load), .adv_i (adv), .msg_take_i (msg_take_o),
    .msg_i, .w_o (w)
  );

  sha256_k_rom #(.J(J)) u_k_rom (
    .clk, .addr_i (rom_addr), .k_o (k)
  );

  sha256_init_mux u_init_mux (
    .first_i, .chain_i (digest_o), .h_o (h_init)
  );

  sha256_compress #(.J(J)) u_compress (
    .clk, .load_i (load), .h_init_i (h_init), .adv_i (adv),
    .w_i (w), .k_i (k), .st_o (st)
  );

  sha256_output u_output (
    .clk, .rst_n, .load_i (load), .h_init_i (h_init),
    .final_i (fin), .st_i (st), .digest_o, .done_o
  );

endmodule
