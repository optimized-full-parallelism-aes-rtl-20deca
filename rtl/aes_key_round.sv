// aes_key_round: one round of AES-128 key expansion (Nk = 4 words per key).
//
// From the previous round key (w0, w1, w2, w3), w0 in bits [127:96]:
//   KeyRotWord : rotate w3 left by one byte, [a3,a2,a1,a0] -> [a2,a1,a0,a3]
//   KeySubWord : pass that word through a Sub-4 unit (four S-boxes)
//   round constant: XOR {RCON, 00, 00, 00} into it
//   KeyXOR     : n0 = w0 ^ t, n1 = w1 ^ n0, n2 = w2 ^ n1, n3 = w3 ^ n2,
// i.e. w[i] = w[i-1] ^ w[i-4], with the transformed word in place of w[i-1]
// for the first word. RCON is the round constant of this round
// (01, 02, 04, ... 36 for rounds 1..10), set when the round is instantiated.
// The round constant is the AES standard's. Combinational.
module aes_key_round
  import aes_pkg::*;
#(
  parameter byte_t RCON = 8'h01
) (
  input  block_t key_in,
  output block_t key_out
);

  word_t w [4];
  word_t rot_w;
  word_t sub_w;
  word_t t;
  word_t n [4];

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = key_in[127 - 32*i -: 32];
  end

  assign rot_w = {w[3][23:0], w[3][31:24]};

  aes_sub4 #(.INVERSE(1'b0)) u_key_sub (
    .word_in (rot_w),
    .word_out(sub_w)
  );

  assign t = sub_w ^ {RCON, 24'h0};

  always_comb begin
    n[0] = w[0] ^ t;
    for (int i = 1; i < 4; i++) n[i] = w[i] ^ n[i-1];
  end

  assign key_out = {n[0], n[1], n[2], n[3]};

endmodule
