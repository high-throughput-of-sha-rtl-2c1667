// tb_sha256_unfold_top_j1: the same end-to-end test as tb_sha256_unfold_top
// with the core built for unfolding factor 1, the conventional one-round-per-clock core (66 clocks per block).
module tb_sha256_unfold_top_j1;
  localparam int unsigned J = 1;
  `include "sha256_top_tb_body.svh"
  sha256_unfold_top #(.J(J)) dut (.*);
  // Watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
