// tb_sha256_output: loads an initial hash value, lets it be overwritten on
// the input without load, then applies final_i and checks the word-wise
// modulo-2^32 sum, the one-clock done pulse and that the digest is held.
module tb_sha256_output;
  import sha256_pkg::state_t;

  logic   clk = 0, rst_n = 0;
  logic   load_i = 0, final_i = 0;
  state_t h_init_i = '0, st_i = '0, digest_o;
  logic   done_o;
  int checks = 0, failures = 0;

  sha256_output dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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
    state_t h, s, sum;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < 8; i++) begin h[i] = $urandom; s[i] = $urandom; end
      if (n % 4 == 0) h[0] = 32'hffff_ffff;   // force a carry out of a word
      for (int i = 0; i < 8; i++) sum[i] = h[i] + s[i];
      @(negedge clk); load_i = 1; h_init_i = h;
      @(negedge clk); load_i = 0; h_init_i = ~h;   // must be ignored
      repeat (3) @(negedge clk);
      chk(done_o == 0, "no done before final");
      final_i = 1; st_i = s;
      @(negedge clk); final_i = 0; st_i = '0;
      chk(done_o == 1, "done one clock after final");
      chk(digest_o == sum, $sformatf("digest %0d", n));
      @(negedge clk);
      chk(done_o == 0, "done is a single pulse");
      chk(digest_o == sum, "digest held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
