// tb_sha256_compress: loads a random initial state into the J = 4
// compression register and applies 16 clocks of four random words and
// constants, checking after every clock that the register equals four
// reference rounds; one clock without adv_i must leave it unchanged.
module tb_sha256_compress;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  localparam int unsigned J = 4;
  logic   clk = 0, load_i = 0, adv_i = 0;
  state_t h_init_i = '0, st_o;
  word_t [J-1:0] w_i = '0, k_i = '0;
  int checks = 0, failures = 0;

  sha256_compress dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t s;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 8; i++) s[i] = $urandom;
      @(negedge clk); load_i = 1; h_init_i = s;
      @(negedge clk); load_i = 0;
      for (int r = 0; r < 64 / J; r++) begin
        for (int j = 0; j < J; j++) begin
          w_i[j] = $urandom;
          k_i[j] = ref_k(r * J + j);
          s = ref_round(s, w_i[j], k_i[j]);
        end
        adv_i = 1;
        @(negedge clk); adv_i = 0;
        checks++;
        if (st_o !== s) begin
          failures++;
          $display("FAIL: block %0d clock %0d got %h expected %h", n, r, st_o, s);
        end
        if (r == 3) begin
          @(negedge clk);
          checks++;
          if (st_o !== s) begin failures++; $display("FAIL: hold"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
