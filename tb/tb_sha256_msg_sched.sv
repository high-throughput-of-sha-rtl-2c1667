// tb_sha256_msg_sched: streams random blocks into the J = 4 schedule, four
// words per clock in the start clock and the three clocks after it (other
// clocks carry random words that must be ignored), and checks the four
// words it presents in each of the 16 advancing clocks against a full
// 64-word reference schedule; a clock without adv_i must hold them.
module tb_sha256_msg_sched;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  localparam int unsigned J = 4;
  logic   clk = 0, load_i = 0, adv_i = 0, msg_take_i = 0;
  word_t [J-1:0] msg_i = '0, w_o;
  int checks = 0, failures = 0;

  sha256_msg_sched dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t [J-1:0] words(blk_t b, int r);
    word_t [J-1:0] v;
    for (int j = 0; j < J; j++) v[j] = b[r * J + j];
    return v;
  endfunction

  initial begin
    w32_t w [64];
    for (int n = 0; n < 20; n++) begin
      blk_t b;
      for (int i = 0; i < 16; i++) b[i] = $urandom;
      ref_schedule(b, w);
      @(negedge clk); load_i = 1; msg_i = words(b, 0);
      for (int r = 0; r < 64 / J; r++) begin
        @(negedge clk);
        load_i = 0; adv_i = 0; msg_take_i = 0;
        for (int j = 0; j < J; j++) msg_i[j] = $urandom;
        for (int j = 0; j < J; j++) begin
          checks++;
          if (w_o[j] !== w[r * J + j]) begin
            failures++;
            $display("FAIL: block %0d W[%0d] got %h expected %h", n, r * J + j, w_o[j], w[r * J + j]);
          end
        end
        if (r == 2) begin   // one stalled clock
          @(negedge clk);
          checks++;
          if (w_o[0] !== w[r * J]) begin failures++; $display("FAIL: hold"); end
        end
        adv_i = 1;
        if (r < 16 / J - 1) begin
          msg_take_i = 1;
          msg_i = words(b, r + 1);
        end
      end
      @(negedge clk); adv_i = 0; msg_take_i = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
