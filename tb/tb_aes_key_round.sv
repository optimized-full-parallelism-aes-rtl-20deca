// tb_aes_key_round: self-checking testbench for aes_key_round.
//
// Checks the first and last expansion rounds on the published example key and
// on random keys.
// Expected values come from the behavioural model in aes_ref_pkg and from
// published AES-128 worked examples. The DUT is combinational: inputs are
// applied on the falling edge of a testbench clock and outputs compared on the
// next rising edge. A watchdog ends the run with a failure after
// WATCHDOG_CYCLES clock cycles.
module tb_aes_key_round;
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

  block_t kin, o1, o10;
  aes_key_round #(.RCON(8'h01)) u_r1  (.key_in(kin), .key_out(o1));
  aes_key_round #(.RCON(8'h36)) u_r10 (.key_in(kin), .key_out(o10));

  initial begin
    ref_init();
    @(negedge clk); kin = 128'h2b7e151628aed2a6abf7158809cf4f3c; @(posedge clk);
    check("key round 1 example", o1, 128'ha0fafe1788542cb123a339392a6c7605);
    // Round key 9 of the same key expands to round key 10 with Rcon 36.
    @(negedge clk); kin = 128'hac7766f319fadc2128d12941575c006e; @(posedge clk);
    check("key round 10 example", o10, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int i = 0; i < 200; i++) begin
      block_t key;
      key = rand_block();
      @(negedge clk);
      kin = key;
      @(posedge clk);
      check("key round 1", o1, ref_round_key(key, 1));
      kin = ref_round_key(key, 9);
      #1;
      check("key round 10", o10, ref_round_key(key, 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
