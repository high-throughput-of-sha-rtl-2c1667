// sha256_init_mux: selects the eight buffer-initialisation words H0..H7.
//
// Before a block is compressed the working variables a..h are loaded with
// an initial hash value. For the first block of a message this is the
// SHA-256 constant IV; for every later block of the same message it is the
// chaining value, the digest the output stage produced for the previous
// block. first_i chooses between them.
//
// The multiplexer that supplies the initial value is part of the published
// structure; its second input, the chaining value for multi-block
// messages, is this design's addition.
//
// Interface: first_i (1 = IV), chain_i (previous digest), h_o (selected).
// Timing: combinational.
module sha256_init_mux
  import sha256_pkg::*;
(
  input  logic   first_i,
  input  state_t chain_i,
  output state_t h_o
);

  always_comb h_o = first_i ? IV : chain_i;

endmodule
