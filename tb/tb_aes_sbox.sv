// tb_aes_sbox: self-checking testbench for aes_sbox.
//
// Runs all 256 bytes through the forward and the inverse S-box and checks a few
// table entries printed in the AES standard.
// Expected values come from the behavioural model in aes_ref_pkg and from
// published AES-128 worked examples. The DUT is combinational: inputs are
// applied on the falling edge of a testbench clock and outputs compared on the
// next rising edge. A watchdog ends the run with a failure after
// WATCHDOG_CYCLES clock cycles.
module tb_aes_sbox;
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

  byte_t x, y_fwd, y_inv;
  aes_sbox #(.INVERSE(1'b0)) u_fwd (.in_byte(x), .out_byte(y_fwd));
  aes_sbox #(.INVERSE(1'b1)) u_inv (.in_byte(x), .out_byte(y_inv));

  initial begin
    ref_init();
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      x = byte_t'(i);
      @(posedge clk);
      check($sformatf("sbox[%02h]", i), 128'(y_fwd), 128'(sbox_t[i]));
      check($sformatf("inv_sbox[%02h]", i), 128'(y_inv), 128'(isbox_t[i]));
    end
    // Entries of the published tables.
    @(negedge clk); x = 8'h00; @(posedge clk); check("sbox[00]", 128'(y_fwd), 128'h63);
    @(negedge clk); x = 8'h53; @(posedge clk); check("sbox[53]", 128'(y_fwd), 128'hed);
    @(negedge clk); x = 8'hff; @(posedge clk); check("sbox[ff]", 128'(y_fwd), 128'h16);
    @(negedge clk); x = 8'h63; @(posedge clk); check("inv_sbox[63]", 128'(y_inv), 128'h00);
    @(negedge clk); x = 8'hed; @(posedge clk); check("inv_sbox[ed]", 128'(y_inv), 128'h53);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
