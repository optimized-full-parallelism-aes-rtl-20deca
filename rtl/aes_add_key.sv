// aes_add_key: AddRoundKey, the bitwise XOR of the 128-bit state with a round
// key. It is its own inverse, so encryption and decryption share it.
// Combinational.
module aes_add_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
