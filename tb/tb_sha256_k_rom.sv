// tb_sha256_k_rom: reads every row of the J = 4 constant ROM and compares the
// four words with constants computed from the cube roots of the first 64
// primes; also checks that the read takes exactly one clock.
module tb_sha256_k_rom;
  import sha256_pkg::word_t;
  import sha256_ref_pkg::*;

  localparam int unsigned J = 4;
  logic clk = 0;
  logic [3:0] addr_i = '0;
  word_t [J-1:0] k_o;
  int checks = 0, failures = 0;

  sha256_k_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int r = 0; r < 16; r++) begin
      addr_i = 4'(r);
      @(posedge clk); #1;
      for (int j = 0; j < J; j++)
        chk(k_o[j] == ref_k(r * J + j), $sformatf("K[%0d] = %h", r * J + j, k_o[j]));
      // Changing the address alone must not change the output before a clock.
      addr_i = 4'(r + 1); #1;
      chk(k_o[0] == ref_k(r * J), "output held until the clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
