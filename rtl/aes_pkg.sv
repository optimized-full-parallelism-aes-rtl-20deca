// aes_pkg: types and GF(2^8) arithmetic shared by the AES-128 cores.
//
// A 128-bit state (or round key) holds 16 bytes; byte 0 is bits [127:120] and the
// bytes fill the 4x4 state column by column, so column c is bits
// [127-32*c -: 32] and row r of column c is byte 4*c+r. All arithmetic is in
// GF(2^8) with the AES field polynomial x^8 + x^4 + x^3 + x + 1 (0x11b).
// xtime and affine are plain combinational logic; rcon and make_sbox_table run
// at elaboration and yield constants.
package aes_pkg;

  localparam int unsigned AES_NR = 10;   // rounds of AES-128 (key of 4 words)

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Multiply by x (i.e. {02}) modulo 0x11b.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Forward affine transform of the S-box: b ^ rotl(b,1..4) ^ 0x63.
  function automatic byte_t affine(input byte_t b);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // 256-entry substitution table, entry i at bits [8*i +: 8].
  typedef logic [255:0][7:0] sbox_table_t;

  // Builds the S-box (inverse = 0) or inverse S-box (inverse = 1) table at
  // elaboration. p walks all non-zero field elements as powers of the generator
  // {03} while q walks the same powers of its inverse {f6}, so q = 1/p at every
  // step; the forward entry is affine(1/p), and the inverse table is the
  // forward one turned around. 0 has no inverse and maps to affine(0) = 0x63.
  function automatic sbox_table_t make_sbox_table(input bit inverse);
    sbox_table_t fwd;
    sbox_table_t inv;
    byte_t p;
    byte_t q;
    p = 8'h01;
    q = 8'h01;
    fwd[0] = affine(8'h00);
    for (int i = 0; i < 255; i++) begin
      fwd[p] = affine(q);
      p = p ^ xtime(p);                                  // p * {03}
      q = q ^ {q[6:0], 1'b0};                            // q * {f6}: divide by {03}
      q = q ^ {q[5:0], 2'b0};
      q = q ^ {q[3:0], 4'b0};
      if (q[7]) q = q ^ 8'h09;
    end
    for (int i = 0; i < 256; i++) inv[fwd[i]] = byte_t'(i);
    return inverse ? inv : fwd;
  endfunction

  // Round constant of key expansion round r (1..10): x^(r-1) in GF(2^8).
  function automatic byte_t rcon(input int unsigned r);
    byte_t c;
    c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

endpackage
