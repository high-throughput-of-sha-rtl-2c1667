// tb_sha256_init_mux: checks that the multiplexer gives the standard initial
// hash value (computed from square roots of the first 8 primes) for a first
// block and passes the chaining value through otherwise.
module tb_sha256_init_mux;
  import sha256_pkg::state_t;
  import sha256_ref_pkg::*;

  logic   first_i;
  state_t chain_i, h_o;
  int checks = 0, failures = 0;

  sha256_init_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < 8; i++) chain_i[i] = $urandom;
      first_i = n[0];
      #1;
      checks++;
      if (h_o !== (first_i ? ref_iv_state() : chain_i)) begin
        failures++;
        $display("FAIL: vector %0d first=%0d got %h", n, first_i, h_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
