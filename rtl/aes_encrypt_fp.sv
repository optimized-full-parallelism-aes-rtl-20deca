// aes_encrypt_fp: full-parallelism AES-128 encryption.
//
// The whole cipher is one combinational network: an initial AddKey with the
// cipher key, NR-1 = 9 unrolled loops (four Sub-4, ShiftRows, four Mix-4,
// AddKey) and a final loop without Mix-4. Within every loop the four columns are
// processed by four parallel units (data parallelism) and, beside each loop, a
// key expansion round produces that loop's key on the fly from the previous one
// (task parallelism), so no round key is stored. Unrolling removes the feedback
// loop of an iterative core: a new block can be applied as soon as the previous
// result has been taken, and the delay from plaintext to ciphertext is one pass
// through the network.
// Interface: plaintext and key in, ciphertext out, 128 bits each, byte 0 in
// bits [127:120]. No clock; registering inputs or outputs is left to the user.
// NR is fixed at 10 by the 128-bit key; the parameter only names the count.
// The unrolled rounds, the four Sub-4 and four Mix-4 units per round and the
// key round beside each round follow the full-parallelism architecture; leaving
// the network unregistered is this design's choice.
module aes_encrypt_fp
  import aes_pkg::*;
#(
  parameter int unsigned NR = AES_NR
) (
  input  block_t plaintext,
  input  block_t key,
  output block_t ciphertext
);

  block_t state [NR+1];   // state[r]: state after round r (0 = initial AddKey)
  block_t rkey  [NR+1];   // rkey[r]:  round key r

  assign rkey[0] = key;

  aes_add_key u_add_key0 (
    .state_in (plaintext),
    .round_key(rkey[0]),
    .state_out(state[0])
  );

  for (genvar r = 1; r <= NR; r++) begin : g_loop
    aes_key_round #(.RCON(rcon(r))) u_key_round (
      .key_in (rkey[r-1]),
      .key_out(rkey[r])
    );
    aes_enc_round #(.FINAL(r == NR)) u_round (
      .state_in (state[r-1]),
      .round_key(rkey[r]),
      .state_out(state[r])
    );
  end

  assign ciphertext = state[NR];

endmodule
