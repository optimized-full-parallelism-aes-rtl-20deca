// aes_decrypt_fp: full-parallelism AES-128 decryption, the inverse cipher in
// the same unrolled form as the encryption core.
//
// The cipher key is expanded into all eleven round keys first (aes_key_schedule),
// because decryption uses them in reverse: AddKey with round key 10, then nine
// inverse loops using keys 9 down to 1 (InvShiftRows, four inverse Sub-4, AddKey,
// four inverse Mix-4), then a final inverse loop without inverse Mix-4 using
// key 0, the cipher key. Each loop works on the four columns in parallel.
// Interface: ciphertext and key in, plaintext out, 128 bits each, byte 0 in
// bits [127:120]. Combinational, no clock.
// The inverse operations and the reversed key order are those of AES
// decryption; building the inverse cipher in the same unrolled, column-parallel
// form as the encryption core is this design's choice.
module aes_decrypt_fp
  import aes_pkg::*;
#(
  parameter int unsigned NR = AES_NR
) (
  input  block_t ciphertext,
  input  block_t key,
  output block_t plaintext
);

  block_t rkey  [NR+1];
  block_t state [NR+1];   // state[i]: state after decryption step i

  aes_key_schedule #(.NR(NR)) u_key_schedule (
    .key       (key),
    .round_keys(rkey)
  );

  aes_add_key u_add_key_last (
    .state_in (ciphertext),
    .round_key(rkey[NR]),
    .state_out(state[0])
  );

  for (genvar i = 1; i <= NR; i++) begin : g_loop
    aes_dec_round #(.FINAL(i == NR)) u_round (
      .state_in (state[i-1]),
      .round_key(rkey[NR-i]),
      .state_out(state[i])
    );
  end

  assign plaintext = state[NR];

endmodule
