// tb_aes_dec_round: self-checking testbench for aes_dec_round.
//
// Checks that a middle decryption round undoes SubBytes and ShiftRows of one
// encryption round together with MixColumns and AddKey of the round before it,
// that a final decryption round undoes SubBytes and ShiftRows and adds its key,
// and compares the middle round with the reference on random data.
// Expected values come from the behavioural model in aes_ref_pkg. The DUT is combinational: inputs are
// applied on the falling edge of a testbench clock and outputs compared on the
// next rising edge. A watchdog ends the run with a failure after
// WATCHDOG_CYCLES clock cycles.
module tb_aes_dec_round;
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

  block_t s_mid, s_fin, k, o_mid, o_fin;
  aes_dec_round #(.FINAL(1'b0)) u_mid (.state_in(s_mid), .round_key(k), .state_out(o_mid));
  aes_dec_round #(.FINAL(1'b1)) u_fin (.state_in(s_fin), .round_key(k), .state_out(o_fin));

  initial begin
    ref_init();
    for (int i = 0; i < 300; i++) begin
      block_t y;
      y = rand_block();
      @(negedge clk);
      k = rand_block();
      // A decryption round undoes SubBytes and ShiftRows of one encryption
      // round and AddKey and MixColumns of the round before it.
      s_mid = ref_enc_round(ref_mix_columns(y, 1'b0) ^ k, '0, 1'b1);
      s_fin = ref_enc_round(y, '0, 1'b1);
      @(posedge clk);
      check("middle round undoes SubBytes..MixColumns+AddKey", o_mid, y);
      check("final round undoes SubBytes, ShiftRows", o_fin, y ^ k);
      check("middle round vs reference", o_mid,
            ref_mix_columns(ref_sub_bytes(ref_shift_rows(s_mid, 1'b1), 1'b1) ^ k, 1'b1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
