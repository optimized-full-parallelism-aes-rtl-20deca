// tb_aes_decrypt_fp: self-checking testbench for aes_decrypt_fp.
//
// Decrypts the published AES-128 examples, a further known-answer
// ciphertext (key 46df998d, zero-extended), and reference ciphertexts of random blocks.
// Expected values come from the behavioural model in aes_ref_pkg and from
// published AES-128 worked examples. The DUT is combinational: inputs are
// applied on the falling edge of a testbench clock and outputs compared on the
// next rising edge. A watchdog ends the run with a failure after
// WATCHDOG_CYCLES clock cycles.
module tb_aes_decrypt_fp;
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

  block_t ct, key, pt;
  aes_decrypt_fp u_dut (.ciphertext(ct), .key(key), .plaintext(pt));

  task automatic apply(input block_t k, input block_t c);
    @(negedge clk);
    key = k;
    ct  = c;
    @(posedge clk);
  endtask

  initial begin
    ref_init();
    apply(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    check("example C.1", pt, 128'h00112233445566778899aabbccddeeff);
    apply(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32);
    check("example B", pt, 128'h3243f6a8885a308d313198a2e0370734);
    apply(128'h46df998d, 128'hb92c02f154b6ed42cd5ae7eac66b3f26);
    check("known answer 46df998d", pt, 128'h06b97b0d);
    for (int i = 0; i < 200; i++) begin
      block_t k, p;
      k = rand_block();
      p = rand_block();
      apply(k, ref_encrypt(k, p));
      check("random", pt, p);
      check("reference decrypt", pt, ref_decrypt(k, ref_encrypt(k, p)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
