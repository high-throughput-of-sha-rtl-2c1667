// sha256_counter: round counter and sequencer of the unfolded SHA-256 core.
//
// A three-state sequencer (IDLE, ROUND, FINAL) with a round counter of
// 64/J steps. In IDLE ready_o is high; start_i then loads a block (load_o).
// The core spends 64/J clocks in ROUND with adv_o high, the counter
// stepping once per clock, then one clock in FINAL (final_o) in which the
// output stage adds the initial hash value. It then returns to IDLE and
// accepts the next block in the same clock as the digest appears.
//
// msg_take_o marks the clocks in which the message schedule takes the next
// J message words: the start clock and the first 16/J - 1 round clocks,
// 16/J clocks in all.
//
// rom_addr_o is the row of the constant ROM that the next ROUND clock needs:
// the ROM is registered, so its address runs one step ahead of the rounds
// (row 0 while idle, row n+1 during round clock n).
//
// Interface: start_i in; ready_o, load_o, adv_o, final_o, msg_take_o,
// rom_addr_o out.
//
// A counter that sequences the rounds is part of the published structure;
// the three phases, the handshake and the one-row-ahead ROM addressing are
// this design's own choices.
//
// Timing: a block takes 1 (start) + 64/J (ROUND) + 1 (FINAL) clocks,
// the digest being valid in the following clock, in which a new start is
// accepted: one block every 64/J + 2 clocks.
module sha256_counter
  import sha256_pkg::*;
#(
  parameter int unsigned J = 4,
  localparam int unsigned ROWS = ROUNDS / J,
  localparam int unsigned AW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned MSG_CLKS = 16 / J   // clocks to stream one block in
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  output logic          ready_o,
  output logic          load_o,
  output logic          adv_o,
  output logic          final_o,
  output logic          msg_take_o,
  output logic [AW-1:0] rom_addr_o
);

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FINAL} seq_state_e;

  seq_state_e    state_q;
  logic [AW-1:0] cnt_q;

  always_comb begin
    ready_o    = (state_q == S_IDLE);
    load_o     = ready_o && start_i;
    adv_o      = (state_q == S_ROUND);
    final_o    = (state_q == S_FINAL);
    msg_take_o = load_o || (adv_o && 32'(cnt_q) < MSG_CLKS - 1);
    // Wraps to row 0 after the last row (ROWS is a power of two).
    rom_addr_o = adv_o ? AW'(cnt_q + 1'b1) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          cnt_q <= '0;
          if (start_i) state_q <= S_ROUND;
        end
        S_ROUND: begin
          cnt_q <= AW'(cnt_q + 1'b1);
          if (cnt_q == AW'(ROWS - 1)) state_q <= S_FINAL;
        end
        S_FINAL: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Exactly one phase at a time; a load happens only from idle.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot({ready_o, adv_o, final_o}))
    else $error("sequencer phases overlap");
  assert property (@(posedge clk) disable iff (!rst_n) load_o |=> adv_o)
    else $error("load not followed by a round clock");

endmodule
