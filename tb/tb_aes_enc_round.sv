// tb_aes_enc_round: self-checking testbench for aes_enc_round.
//
// Checks a middle round (FINAL = 0) against round 1 of the published worked
// example and both round kinds against the reference on random data.
// Expected values come from the behavioural model in aes_ref_pkg and from
// published AES-128 worked examples. The DUT is combinational: inputs are
// applied on the falling edge of a testbench clock and outputs compared on the
// next rising edge. A watchdog ends the run with a failure after
// WATCHDOG_CYCLES clock cycles.
module tb_aes_enc_round;
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

  block_t s, k, o_mid, o_fin;
  aes_enc_round #(.FINAL(1'b0)) u_mid (.state_in(s), .round_key(k), .state_out(o_mid));
  aes_enc_round #(.FINAL(1'b1)) u_fin (.state_in(s), .round_key(k), .state_out(o_fin));

  initial begin
    ref_init();
    @(negedge clk);
    s = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    k = 128'ha0fafe1788542cb123a339392a6c7605;
    @(posedge clk);
    check("round 1 example", o_mid, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      s = rand_block();
      k = rand_block();
      @(posedge clk);
      check("middle round", o_mid, ref_enc_round(s, k, 1'b0));
      check("final round", o_fin, ref_enc_round(s, k, 1'b1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
