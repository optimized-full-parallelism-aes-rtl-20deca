// tb_aes_sub4: self-checking testbench for aes_sub4.
//
// Applies random and edge words to a forward and an inverse Sub-4 unit.
// Expected values come from the behavioural model in aes_ref_pkg and from
// published AES-128 worked examples. The DUT is combinational: inputs are
// applied on the falling edge of a testbench clock and outputs compared on the
// next rising edge. A watchdog ends the run with a failure after
// WATCHDOG_CYCLES clock cycles.
module tb_aes_sub4;
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

  word_t w, o_fwd, o_inv;
  aes_sub4 #(.INVERSE(1'b0)) u_fwd (.word_in(w), .word_out(o_fwd));
  aes_sub4 #(.INVERSE(1'b1)) u_inv (.word_in(w), .word_out(o_inv));

  initial begin
    ref_init();
    @(negedge clk); w = 32'h00_53_ff_01; @(posedge clk);
    check("sub4 known", 128'(o_fwd), 128'h63_ed_16_7c);
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      w = $urandom();
      @(posedge clk);
      check("sub4", 128'(o_fwd), 128'(ref_sub_word(w, 1'b0)));
      check("inv_sub4", 128'(o_inv), 128'(ref_sub_word(w, 1'b1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
