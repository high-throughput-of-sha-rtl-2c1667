// tb_sha256_unfold_top: end-to-end test of the SHA-256 core at its default
// unfolding factor (J = 4): known-answer digests, random messages against
// a reference model, 18 clocks per block, back-to-back and multi-block
// messages. The stimulus and checks are in sha256_top_tb_body.svh.
module tb_sha256_unfold_top;
  localparam int unsigned J = 4;
  `include "sha256_top_tb_body.svh"
  sha256_unfold_top dut (.*);
  // Watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
