// sha256_compress: unfolded SHA-256 compression function, J rounds per clock.
//
// The working variables a..h live in one 256-bit register. J copies of the
// round cell (sha256_round) are chained combinationally, cell j taking the
// schedule word w_i[j] and constant k_i[j]; the output of the last cell is
// written back when adv_i is high. 64 rounds therefore take 64/J clocks.
// At load_i the register takes the initial hash value h_init_i.
//
// The J-fold chain of rounds is the published unfolded compression
// function; the load/advance control is this design's.
//
// Interface: load_i/h_init_i, adv_i, w_i[J], k_i[J]; st_o = a..h.
// Timing: st_o is registered; each advancing clock applies J rounds.
module sha256_compress
  import sha256_pkg::*;
#(
  parameter int unsigned J = 4
) (
  input  logic           clk,
  input  logic           load_i,
  input  state_t         h_init_i,
  input  logic           adv_i,
  input  word_t  [J-1:0] w_i,
  input  word_t  [J-1:0] k_i,
  output state_t         st_o
);

  state_t chain [J + 1];

  assign chain[0] = st_o;

  for (genvar j = 0; j < J; j++) begin : g_round
    sha256_round u_round (
      .st_i (chain[j]),
      .w_i  (w_i[j]),
      .k_i  (k_i[j]),
      .st_o (chain[j + 1])
    );
  end

  always_ff @(posedge clk) begin
    if (load_i)     st_o <= h_init_i;
    else if (adv_i) st_o <= chain[J];
  end

endmodule
