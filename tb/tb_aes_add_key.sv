// tb_aes_add_key: self-checking testbench for aes_add_key.
//
// Checks the XOR of random states and keys.
// Expected values come from the behavioural model in aes_ref_pkg and from
// published AES-128 worked examples. The DUT is combinational: inputs are
// applied on the falling edge of a testbench clock and outputs compared on the
// next rising edge. A watchdog ends the run with a failure after
// WATCHDOG_CYCLES clock cycles.
module tb_aes_add_key;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int WATCHDOG_CYCLES = 1000;

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

  block_t s, k, o;
  aes_add_key u_dut (.state_in(s), .round_key(k), .state_out(o));

  initial begin
    ref_init();
    @(negedge clk); s = '0; k = '1; @(posedge clk);
    check("add_key zeros", o, '1);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      s = rand_block();
      k = rand_block();
      @(posedge clk);
      check("add_key", o, s ^ k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
