// sha256_msg_sched: unfolded SHA-256 message schedule, J words per clock.
//
// The message enters J parallel 32-bit words per clock (W0..W(J-1) in the
// start clock, the next J words in each following clock, until all sixteen
// words of the padded 512-bit block are in), and the schedule hands J
// words per clock to the compression rounds.
//
// Two register sets: w_q holds the J words W[t] .. W[t+J-1] the rounds use
// in the current clock, and hist_q the sixteen words before them,
// W[t-16] .. W[t-1]. Each advancing clock the history moves by J places
// and w_q takes the next J words: from msg_i while the block is still
// streaming in (msg_take_i), afterwards from the recurrence
//   W[i] = sigma1(W[i-2]) + W[i-7] + sigma0(W[i-15]) + W[i-16].
// The J new words of one clock form a chain: from the third one on, the
// sigma1 input W[i-2] is itself computed in the same clock (with J = 4 the
// third new word uses the first and the fourth uses the second). Because
// the words are computed one clock ahead and registered, the message
// expansion is not in series with the compression rounds.
//
// Taking the message J words per clock and chaining the new words follows
// the published unfolded schedule; where the registers sit is this design's
// choice.
//
// Interface: load_i (start clock: w_q <= msg_i), adv_i (round clock),
// msg_take_i (msg_i holds the next J message words), w_o[j] = W[t+j].
// Timing: w_o is registered; words given on msg_i are used one clock later.
module sha256_msg_sched
  import sha256_pkg::*;
#(
  parameter int unsigned J = 4
) (
  input  logic           clk,
  input  logic           load_i,
  input  logic           adv_i,
  input  logic           msg_take_i,
  input  word_t  [J-1:0] msg_i,
  output word_t  [J-1:0] w_o
);

  word_t hist_q [16];
  word_t w_q    [J];
  word_t ext    [16 + 2 * J];   // history, current words, next words

  always_comb begin
    for (int i = 0; i < 16; i++) ext[i] = hist_q[i];
    for (int j = 0; j < J; j++)  ext[16 + j] = w_q[j];
    for (int i = 16 + J; i < 16 + 2 * J; i++)
      ext[i] = small_sigma1(ext[i - 2]) + ext[i - 7]
             + small_sigma0(ext[i - 15]) + ext[i - 16];
    for (int j = 0; j < J; j++) w_o[j] = w_q[j];
  end

  always_ff @(posedge clk) begin
    if (load_i) begin
      for (int j = 0; j < J; j++) w_q[j] <= msg_i[j];
    end else if (adv_i) begin
      for (int i = 0; i < 16; i++) hist_q[i] <= ext[i + J];
      for (int j = 0; j < J; j++)
        w_q[j] <= msg_take_i ? msg_i[j] : ext[16 + J + j];
    end
  end

endmodule
