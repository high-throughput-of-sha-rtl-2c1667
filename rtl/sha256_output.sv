// sha256_output: final addition that turns the compressed state into the
// digest.
//
// At load_i the stage keeps the initial hash value the block started from.
// When the last round has finished (final_i) it adds, word by word modulo
// 2^32, that value to the working variables a..h and registers the sum as the
// 256-bit digest, raising done_o for one clock. The digest is held until the
// next block finishes, so it can serve as the chaining value of a following
// block.
//
// The final addition follows the published output module; keeping the
// initial value in a register of this stage is this design's choice.
//
// Interface: load_i/h_init_i (start of block), final_i/st_i (end of rounds),
// digest_o (H0..H7, H0 = first 32 bits of the hash), done_o (1-clock pulse).
// Timing: digest_o and done_o change one clock after final_i.
module sha256_output
  import sha256_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load_i,
  input  state_t h_init_i,
  input  logic   final_i,
  input  state_t st_i,
  output state_t digest_o,
  output logic   done_o
);

  state_t h_init_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_init_q <= '0;
      digest_o <= '0;
      done_o   <= 1'b0;
    end else begin
      done_o <= final_i;
      if (load_i) h_init_q <= h_init_i;
      if (final_i)
        for (int i = 0; i < 8; i++)
          digest_o[i] <= h_init_q[i] + st_i[i];
    end
  end

endmodule
