// tb_aes_mix4: self-checking testbench for aes_mix4.
//
// Checks Mix-4 and inverse Mix-4 on the published test columns and on random
// columns, and that the inverse undoes the forward mix.
// Expected values come from the behavioural model in aes_ref_pkg and from
// published AES-128 worked examples. The DUT is combinational: inputs are
// applied on the falling edge of a testbench clock and outputs compared on the
// next rising edge. A watchdog ends the run with a failure after
// WATCHDOG_CYCLES clock cycles.
module tb_aes_mix4;
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

  word_t c, o_fwd, o_inv, o_back;
  aes_mix4 #(.INVERSE(1'b0)) u_fwd  (.col_in(c), .col_out(o_fwd));
  aes_mix4 #(.INVERSE(1'b1)) u_inv  (.col_in(c), .col_out(o_inv));
  aes_mix4 #(.INVERSE(1'b1)) u_back (.col_in(o_fwd), .col_out(o_back));

  initial begin
    ref_init();
    @(negedge clk); c = 32'hdb135345; @(posedge clk);
    check("mix4 db135345", 128'(o_fwd), 128'h8e4da1bc);
    @(negedge clk); c = 32'hf20a225c; @(posedge clk);
    check("mix4 f20a225c", 128'(o_fwd), 128'h9fdc589d);
    @(negedge clk); c = 32'h8e4da1bc; @(posedge clk);
    check("inv_mix4 8e4da1bc", 128'(o_inv), 128'hdb135345);
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      c = $urandom();
      @(posedge clk);
      check("mix4", 128'(o_fwd), 128'(ref_mix_col(c, 1'b0)));
      check("inv_mix4", 128'(o_inv), 128'(ref_mix_col(c, 1'b1)));
      check("mix4 round trip", 128'(o_back), 128'(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
