// aes_sbox: the AES byte substitution (S-box) and, with INVERSE = 1, its inverse.
//
// The S-box maps a byte to the bitwise affine transform (constant 0x63) of its
// multiplicative inverse in GF(2^8), 0 mapping to 0x63. The 256 entries are
// computed from that definition when the design is elaborated
// (aes_pkg::make_sbox_table) and held as a constant 16x16-byte lookup table, so
// in hardware the box is a 256x8 ROM. The inverse box is the same mapping turned
// around. Combinational: out_byte follows in_byte with no clock.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t in_byte,
  output byte_t out_byte
);

  localparam sbox_table_t TABLE = make_sbox_table(INVERSE);

  assign out_byte = TABLE[in_byte];

endmodule
