// tb_sha256_round: checks one compression round against the reference
// model on 500 random working-variable sets, words and constants.
module tb_sha256_round;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  state_t st_i, st_o;
  word_t  w_i, k_i;
  int checks = 0, failures = 0;

  sha256_round dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t expd;
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 8; i++) st_i[i] = $urandom;
      w_i = $urandom;
      k_i = (n < 64) ? ref_k(n) : $urandom;
      #1;
      expd = ref_round(st_i, w_i, k_i);
      checks++;
      if (st_o !== expd) begin
        failures++;
        if (failures < 5) $display("FAIL: vector %0d got %h expected %h", n, st_o, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
