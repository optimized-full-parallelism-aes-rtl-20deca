// tb_aes_shift_rows: self-checking testbench for aes_shift_rows.
//
// Checks ShiftRows and InvShiftRows on a state of distinct bytes and on random
// states, and that the inverse undoes the forward shift.
// Expected values come from the behavioural model in aes_ref_pkg and from
// published AES-128 worked examples. The DUT is combinational: inputs are
// applied on the falling edge of a testbench clock and outputs compared on the
// next rising edge. A watchdog ends the run with a failure after
// WATCHDOG_CYCLES clock cycles.
module tb_aes_shift_rows;
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

  block_t s, o_fwd, o_inv, o_back;
  aes_shift_rows #(.INVERSE(1'b0)) u_fwd  (.state_in(s), .state_out(o_fwd));
  aes_shift_rows #(.INVERSE(1'b1)) u_inv  (.state_in(s), .state_out(o_inv));
  aes_shift_rows #(.INVERSE(1'b1)) u_back (.state_in(o_fwd), .state_out(o_back));

  initial begin
    ref_init();
    // Bytes 00..0f in order: row r of column c is byte 4c+r.
    @(negedge clk); s = 128'h000102030405060708090a0b0c0d0e0f; @(posedge clk);
    check("shift_rows index", o_fwd, 128'h00050a0f04090e03080d02070c01060b);
    check("inv_shift_rows index", o_inv, 128'h000d0a0704010e0b0805020f0c090603);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      s = rand_block();
      @(posedge clk);
      check("shift_rows", o_fwd, ref_shift_rows(s, 1'b0));
      check("inv_shift_rows", o_inv, ref_shift_rows(s, 1'b1));
      check("shift_rows round trip", o_back, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
