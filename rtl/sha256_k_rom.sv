// sha256_k_rom: round-constant ROM with J parallel registered read ports.
//
// Holds the 64 x 32-bit SHA-256 constants K_0..K_63. An unfolded core with
// factor J consumes J constants per clock, so the ROM is read as 64/J rows of
// J words: row r returns K[r*J] .. K[r*J+J-1]. The read is synchronous (the
// output register is the one of an FPGA block ROM), so the row address is
// presented one clock ahead of the round that uses it.
//
// A 64 x 32-bit ROM read J words at a time follows the published design;
// the registered (synchronous) read is this design's choice.
//
// Interface: addr_i row address (0 .. 64/J-1), k_o[j] = K[addr*J + j].
// Timing: one clock from addr_i to k_o.
module sha256_k_rom
  import sha256_pkg::*;
#(
  parameter int unsigned J = 4,
  localparam int unsigned ROWS = ROUNDS / J,
  localparam int unsigned AW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr_i,
  output word_t  [J-1:0]   k_o
);

  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < J; j++)
      k_o[j] <= K[addr_i * J + j];
  end

endmodule
