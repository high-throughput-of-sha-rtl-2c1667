// sha256_round: one SHA-256 compression round, purely combinational.
//
// This is the cell that the unfolded compression function repeats J times
// per clock. From the working variables a..h, the schedule word W_t and the
// round constant K_t it forms
//   Temp1 = h + Sigma1(e) + Ch(e,f,g) + K_t + W_t
//   Temp2 = Sigma0(a) + Maj(a,b,c)
//   new e = d + Temp1,  new a = Temp1 + Temp2
// and shifts the other six variables down by one place (b<=a, c<=b, d<=c,
// f<=e, g<=f, h<=g). In an unfolded chain the "d" of round j is the "c" of
// round j-1, the "b" of round j-2 and so on, so cell j reads the new a/e
// values of the cells before it; Ch and Maj of the later cells thereby take
// next_e/next_a values of earlier cells, exactly as in the unfolded datapath
// this design follows. Including h in Temp1 is the SHA-256 standard's rule.
//
// Interface: st_i (a..h), w_i, k_i in; st_o (a..h after the round) out.
// Timing: no registers; latency 0.
module sha256_round
  import sha256_pkg::*;
(
  input  state_t st_i,
  input  word_t  w_i,
  input  word_t  k_i,
  output state_t st_o
);

  word_t a, b, c, d, e, f, g, h;
  word_t temp1, temp2;

  always_comb begin
    {a, b, c, d, e, f, g, h} = st_i;
    temp1 = h + big_sigma1(e) + ch(e, f, g) + k_i + w_i;
    temp2 = big_sigma0(a) + maj(a, b, c);
    st_o  = {temp1 + temp2, a, b, c, d + temp1, e, f, g};
  end

endmodule
