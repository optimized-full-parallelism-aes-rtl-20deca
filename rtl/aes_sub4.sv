// aes_sub4: "Sub-4", the substitution of one 32-bit state column.
//
// Four S-boxes work side by side on the four bytes of a column, so four of
// these units cover the whole 16-byte state in one step (the data-parallel
// SubBytes of the full-parallelism core). The same unit serves as KeySubWord in
// key expansion. INVERSE = 1 uses inverse S-boxes for decryption.
// Interface: word_in / word_out, byte 0 in bits [31:24]. Combinational.
module aes_sub4
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  word_t word_in,
  output word_t word_out
);

  for (genvar b = 0; b < 4; b++) begin : g_byte
    aes_sbox #(.INVERSE(INVERSE)) u_sbox (
      .in_byte (word_in [31 - 8*b -: 8]),
      .out_byte(word_out[31 - 8*b -: 8])
    );
  end

endmodule
