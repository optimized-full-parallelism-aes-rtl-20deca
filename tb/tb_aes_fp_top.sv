// tb_aes_fp_top: end-to-end testbench for the full-parallelism AES-128
// encryption/decryption unit at its default configuration.
//
// Streams blocks through aes_fp_top, one block per testbench clock cycle, and
// switches between encryption and decryption and between keys along the way:
//   - published AES-128 examples and a further known-answer pair
//     (key 46df998d, plaintext 06b97b0d), in both directions;
//   - random blocks under random keys compared with the behavioural model;
//   - round trips: a block is encrypted, its ciphertext is applied in the next
//     cycle with decrypt = 1, and the original block must come back.
// The unit is combinational, so every result is checked in the same cycle in
// which its input was applied (zero cycles of latency, one block per cycle).
// The run counts encryptions, decryptions, switches of mode and changes of key,
// and counts a failure for any of these that never happened. A watchdog ends the
// run with a failure after WATCHDOG_CYCLES cycles.
module tb_aes_fp_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int WATCHDOG_CYCLES = 5000;
  localparam int N_RANDOM        = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  int n_encrypt     = 0;
  int n_decrypt     = 0;
  int n_mode_switch = 0;
  int n_key_change  = 0;

  logic   decrypt;
  block_t key;
  block_t data_in;
  block_t data_out;

  aes_fp_top u_dut (
    .decrypt (decrypt),
    .key     (key),
    .data_in (data_in),
    .data_out(data_out)
  );

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Applies one block on the falling edge; the result is read on the rising edge.
  task automatic apply(input logic dec, input block_t k, input block_t d);
    @(negedge clk);
    if (dec != decrypt) n_mode_switch++;
    if (k != key)       n_key_change++;
    decrypt = dec;
    key     = k;
    data_in = d;
    if (dec) n_decrypt++;
    else     n_encrypt++;
    @(posedge clk);
  endtask

  task automatic check_seen(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired after %0d cycles", WATCHDOG_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t k, p, c;
    decrypt = 1'b0;
    key     = '0;
    data_in = '0;
    ref_init();

    apply(1'b0, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff);
    check("encrypt example C.1", data_out, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    apply(1'b1, 128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    check("decrypt example C.1", data_out, 128'h00112233445566778899aabbccddeeff);
    apply(1'b0, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734);
    check("encrypt example B", data_out, 128'h3925841d02dc09fbdc118597196a0b32);
    apply(1'b0, 128'h46df998d, 128'h06b97b0d);
    check("encrypt known answer 46df998d", data_out, 128'hb92c02f154b6ed42cd5ae7eac66b3f26);
    apply(1'b1, 128'h46df998d, 128'hb92c02f154b6ed42cd5ae7eac66b3f26);
    check("decrypt known answer 46df998d", data_out, 128'h06b97b0d);

    for (int i = 0; i < N_RANDOM; i++) begin
      // Random direction, key reused half of the time.
      if (i == 0 || $urandom_range(1)) k = rand_block();
      p = rand_block();
      if ($urandom_range(1)) begin
        apply(1'b0, k, p);
        check("random encrypt", data_out, ref_encrypt(k, p));
      end else begin
        apply(1'b1, k, p);
        check("random decrypt", data_out, ref_decrypt(k, p));
      end
      // Round trip through both cores in consecutive cycles.
      apply(1'b0, k, p);
      c = data_out;
      apply(1'b1, k, c);
      check("round trip", data_out, p);
    end

    check_seen("encryption", n_encrypt);
    check_seen("decryption", n_decrypt);
    check_seen("mode switch", n_mode_switch);
    check_seen("key change", n_key_change);
    $display("encryptions=%0d decryptions=%0d mode_switches=%0d key_changes=%0d",
             n_encrypt, n_decrypt, n_mode_switch, n_key_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
