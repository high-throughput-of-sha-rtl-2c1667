// Body shared by the end-to-end testbenches of sha256_unfold_top. The
// including module declares localparam J (the core's unfolding factor) and
// instantiates the core as "dut" on the signals declared here.
//
// It hashes three standard test messages ("abc", the empty string and the
// two-block 448-bit message) against their published digests, then random
// messages of 0..300 bytes against the reference model, feeding blocks back
// to back (a new start in the clock the digest appears). It checks the
// clocks per block (64/J + 2), the 16/J clocks in which the block is
// streamed in J words at a time, that a start while busy is ignored, and
// counts how often each mechanism happened: J rounds per clock, the
// multiplexer choosing the IV, the multiplexer choosing the chaining value,
// back-to-back starts and starts ignored while busy.

  import sha256_pkg::word_t;
  import sha256_pkg::state_t;
  import sha256_ref_pkg::*;

  localparam int unsigned CPB = 64 / J + 2;   // clocks per block

  logic   clk = 0, rst_n = 0;
  logic   start_i = 0, first_i = 0;
  word_t  [J-1:0] msg_i;
  logic   msg_take_o, ready_o, done_o;
  state_t digest_o;

  int checks = 0, failures = 0;
  int n_iv = 0, n_chain = 0, n_b2b = 0, n_ignored = 0, n_adv = 0;
  longint cyc = 0;

  always #5 clk = ~clk;

  // Message source: streams cur_blk J words at a time, stepping whenever
  // the core takes them; outside a block it drives random words, which
  // the core must not use.
  blk_t  cur_blk = '0;
  int    widx = 16;
  int    n_take = 0;
  word_t [J-1:0] junk;
  always @(posedge clk) begin
    for (int j = 0; j < J; j++) junk[j] <= $urandom;
    if (msg_take_o) begin
      widx   <= widx + J;
      n_take <= n_take + 1;
    end
  end
  always_comb
    for (int j = 0; j < J; j++)
      msg_i[j] = (widx + j < 16) ? cur_blk[widx + j] : junk[j];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !ready_o) n_adv <= n_adv + 1;   // busy clocks
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Hash one message; the first block starts in the current clock (which
  // must have ready_o high). Returns the clock count of every block.
  task automatic hash_msg(byte_q_t msg, output st_t dig);
    blk_t   blocks [$];
    longint t0;
    int     t_take;
    ref_pad(msg, blocks);
    for (int n = 0; n < blocks.size(); n++) begin
      check(ready_o === 1'b1, "ready at block start");
      start_i <= 1'b1;
      first_i <= (n == 0);
      cur_blk <= blocks[n];
      widx    <= 0;
      if (n == 0) n_iv++; else n_chain++;
      t0 = cyc;
      t_take = n_take;
      @(posedge clk); #1;
      start_i <= 1'b0;
      // A start request in the middle of the block must be ignored.
      if (n % 2 == 1) begin
        repeat (3) @(posedge clk);
        #1;
        start_i <= 1'b1; first_i <= 1'b1;
        @(posedge clk); #1;
        start_i <= 1'b0;
        n_ignored++;
      end
      while (done_o !== 1'b1) begin @(posedge clk); #1; end
      check(cyc - t0 == longint'(CPB), $sformatf("clocks per block %0d, expected %0d", cyc - t0, CPB));
      check(n_take - t_take == 16 / J, $sformatf("message clocks %0d", n_take - t_take));
      if (n + 1 < blocks.size()) n_b2b++;
    end
    dig = digest_o;
  endtask

  initial begin
    st_t    dig, expd;
    byte_q_t msg;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;

    hash_msg(str_bytes("abc"), dig);
    check(dig == 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, "abc digest");
    n_b2b++;  // next message starts in the done clock
    hash_msg(str_bytes(""), dig);
    check(dig == 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855, "empty digest");
    n_b2b++;
    hash_msg(str_bytes("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"), dig);
    check(dig == 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1, "two-block digest");

    for (int m = 0; m < 40; m++) begin
      blk_t blocks [$];
      msg.delete();
      repeat ($urandom_range(300)) msg.push_back(8'($urandom));
      if (m % 3 == 2) begin @(posedge clk); #1; end   // idle gap now and then
      else n_b2b++;
      hash_msg(msg, dig);
      ref_pad(msg, blocks);
      expd = ref_iv_state();
      foreach (blocks[i]) expd = ref_compress(expd, blocks[i]);
      check(dig == expd, $sformatf("random message %0d (%0d bytes)", m, msg.size()));
    end

    // Every mechanism must have happened.
    check(n_adv > 0,     "busy clocks");
    check(n_iv > 0,      "IV selected");
    check(n_chain > 0,   "chaining value selected");
    check(n_b2b > 0,     "back-to-back start");
    check(n_ignored > 0, "start ignored while busy");
    $display("J=%0d clocks/block=%0d busy clocks=%0d IV=%0d chain=%0d back-to-back=%0d ignored=%0d",
             J, CPB, n_adv, n_iv, n_chain, n_b2b, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

