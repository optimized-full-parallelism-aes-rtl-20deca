// aes_mix4: "Mix-4", MixColumns applied to one 32-bit state column.
//
// The column (s0, s1, s2, s3), s0 in bits [31:24], is read as a polynomial and
// multiplied modulo x^4 + 1 by a(x) = {03}x^3 + {01}x^2 + {01}x + {02}, i.e.
//   t_i = {02}s_i ^ {03}s_(i+1) ^ s_(i+2) ^ s_(i+3)       (indices mod 4).
// With INVERSE = 1 it multiplies by the inverse {0b}x^3 + {0d}x^2 + {09}x + {0e}:
//   t_i = {0e}s_i ^ {0b}s_(i+1) ^ {0d}s_(i+2) ^ {09}s_(i+3).
// Every product is built from repeated doubling (xtime), so the unit is XOR
// logic only. Four of these units process the four columns of the state at
// once. Combinational.
module aes_mix4
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  word_t col_in,
  output word_t col_out
);

  byte_t s  [4];
  byte_t x2 [4];   // {02}s
  byte_t x4 [4];   // {04}s
  byte_t x8 [4];   // {08}s
  byte_t t  [4];

  // Constant multiples from doublings: {09} = {08}^{01}, {0b} = {08}^{02}^{01},
  // {0d} = {08}^{04}^{01}, {0e} = {08}^{04}^{02}, {03} = {02}^{01}.
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s[i]  = col_in[31 - 8*i -: 8];
      x2[i] = xtime(s[i]);
      x4[i] = xtime(x2[i]);
      x8[i] = xtime(x4[i]);
    end
    for (int i = 0; i < 4; i++) begin
      if (INVERSE)
        t[i] = (x8[i] ^ x4[i] ^ x2[i])
             ^ (x8[(i+1)%4] ^ x2[(i+1)%4] ^ s[(i+1)%4])
             ^ (x8[(i+2)%4] ^ x4[(i+2)%4] ^ s[(i+2)%4])
             ^ (x8[(i+3)%4] ^ s[(i+3)%4]);
      else
        t[i] = x2[i] ^ (x2[(i+1)%4] ^ s[(i+1)%4]) ^ s[(i+2)%4] ^ s[(i+3)%4];
    end
    col_out = {t[0], t[1], t[2], t[3]};
  end

endmodule
