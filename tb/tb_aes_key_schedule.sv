// tb_aes_key_schedule: self-checking testbench for aes_key_schedule.
//
// Checks all eleven round keys on the published example key and on random keys.
// Expected values come from the behavioural model in aes_ref_pkg and from
// published AES-128 worked examples. The DUT is combinational: inputs are
// applied on the falling edge of a testbench clock and outputs compared on the
// next rising edge. A watchdog ends the run with a failure after
// WATCHDOG_CYCLES clock cycles.
module tb_aes_key_schedule;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int WATCHDOG_CYCLES = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired after %0d cycles", WATCHDOG_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  block_t key;
  block_t rk [AES_NR+1];
  aes_key_schedule u_dut (.key(key), .round_keys(rk));

  initial begin
    ref_init();
    @(negedge clk); key = 128'h2b7e151628aed2a6abf7158809cf4f3c; @(posedge clk);
    check("round key 0", rk[0], key);
    check("round key 1", rk[1], 128'ha0fafe1788542cb123a339392a6c7605);
    check("round key 10", rk[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      key = rand_block();
      @(posedge clk);
      for (int r = 0; r <= AES_NR; r++) check($sformatf("round key %0d", r), rk[r], ref_round_key(key, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
