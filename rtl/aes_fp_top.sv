// aes_fp_top: full-parallelism AES-128 encryption/decryption unit.
//
// The encryption core (unrolled rounds with on-the-fly key expansion) and the
// decryption core (full key expansion, then unrolled inverse rounds) sit side
// by side on the same key and data inputs; 'decrypt' selects which result
// drives data_out. Both cores are purely combinational, so data_out settles one
// network delay after any input changes and there is no clock, reset or
// handshake. Pairing a decryption core with the encryption core and selecting
// between them with a mode input is this design's choice.
// Interface: decrypt (0 = encrypt data_in, 1 = decrypt data_in), key, data_in,
// data_out; 128-bit blocks with byte 0 in bits [127:120].
module aes_fp_top
  import aes_pkg::*;
(
  input  logic   decrypt,
  input  block_t key,
  input  block_t data_in,
  output block_t data_out
);

  block_t enc_out;
  block_t dec_out;

  aes_encrypt_fp #(.NR(AES_NR)) u_encrypt (
    .plaintext (data_in),
    .key       (key),
    .ciphertext(enc_out)
  );

  aes_decrypt_fp #(.NR(AES_NR)) u_decrypt (
    .ciphertext(data_in),
    .key       (key),
    .plaintext (dec_out)
  );

  assign data_out = decrypt ? dec_out : enc_out;

endmodule
