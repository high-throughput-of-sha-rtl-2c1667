// tb_sha256_counter: runs the J = 4 sequencer through several blocks and
// checks, clock by clock, ready/load in idle, 16 round clocks whose ROM
// address runs one row ahead (1, 2, .. 15, 0), one final clock, the return
// to idle, the message-take clocks (start clock and round clocks 0..2),
// and that start requests during a block are ignored.
module tb_sha256_counter;
  localparam int unsigned J = 4;
  localparam int unsigned ROWS = 64 / J;

  logic clk = 0, rst_n = 0, start_i = 0;
  logic ready_o, load_o, adv_o, final_o, msg_take_o;
  logic [3:0] rom_addr_o;
  int checks = 0, failures = 0;

  sha256_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      // idle clocks (none between some blocks)
      repeat (n % 3) begin
        @(negedge clk);
        chk(ready_o && !load_o && !adv_o && !final_o && !msg_take_o && rom_addr_o == 0, "idle");
      end
      start_i = 1; #1;
      chk(ready_o && load_o && msg_take_o && rom_addr_o == 0, "load on start");
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        start_i = (r % 5 == 2);   // requests while busy
        #1;
        chk(adv_o && !ready_o && !load_o && !final_o, $sformatf("round clock %0d", r));
        chk(rom_addr_o == 4'((r + 1) % ROWS), $sformatf("rom address in round clock %0d", r));
        chk(msg_take_o == (r < 16 / J - 1), $sformatf("message take in round clock %0d", r));
      end
      @(negedge clk); start_i = 1; #1;
      chk(final_o && !adv_o && !ready_o && !load_o && !msg_take_o, "final clock");
      @(negedge clk); start_i = 0; #1;
      chk(ready_o && !adv_o && !final_o, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
