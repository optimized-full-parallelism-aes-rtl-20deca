// aes_ref_pkg: behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the field product is a carry-less multiply
// followed by polynomial reduction, the S-box is found by searching for each
// byte's inverse and applying the affine transform bit by bit, and the cipher
// works on a byte array in the textbook order. Call ref_init() once before using
// the S-box functions. Not synthesizable in intent; simulation only.
package aes_ref_pkg;

  typedef logic [7:0]   rbyte_t;
  typedef logic [31:0]  rword_t;
  typedef logic [127:0] rblock_t;

  rbyte_t sbox_t [256];
  rbyte_t isbox_t [256];

  function automatic rbyte_t ref_mul(input rbyte_t a, input rbyte_t b);
    logic [14:0] prod;
    prod = '0;
    for (int i = 0; i < 8; i++) if (a[i]) prod ^= 15'(b) << i;
    for (int i = 14; i >= 8; i--) if (prod[i]) prod ^= 15'(9'h11b) << (i - 8);
    return prod[7:0];
  endfunction

  function automatic void ref_init();
    for (int x = 0; x < 256; x++) begin
      rbyte_t inv;
      rbyte_t s;
      rbyte_t c;
      c   = 8'h63;
      inv = 8'h00;
      for (int y = 1; y < 256; y++)
        if (ref_mul(rbyte_t'(x), rbyte_t'(y)) == 8'h01) inv = rbyte_t'(y);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8]
             ^ c[i];
      sbox_t[x] = s;
    end
    for (int x = 0; x < 256; x++) isbox_t[sbox_t[x]] = rbyte_t'(x);
  endfunction

  function automatic rbyte_t bget(input rblock_t b, input int k);
    return b[127 - 8*k -: 8];
  endfunction

  function automatic rword_t ref_sub_word(input rword_t w, input bit inverse);
    rword_t o;
    for (int i = 0; i < 4; i++)
      o[31 - 8*i -: 8] = inverse ? isbox_t[w[31 - 8*i -: 8]] : sbox_t[w[31 - 8*i -: 8]];
    return o;
  endfunction

  function automatic rblock_t ref_sub_bytes(input rblock_t b, input bit inverse);
    rblock_t o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = ref_sub_word(b[127 - 32*c -: 32], inverse);
    return o;
  endfunction

  function automatic rblock_t ref_shift_rows(input rblock_t b, input bit inverse);
    rblock_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        int src;
        src = inverse ? (c + 4 - r) % 4 : (c + r) % 4;
        o[127 - 8*(4*c + r) -: 8] = bget(b, 4*src + r);
      end
    return o;
  endfunction

  function automatic rword_t ref_mix_col(input rword_t w, input bit inverse);
    rbyte_t a [4];
    rbyte_t m [4];
    rword_t o;
    for (int i = 0; i < 4; i++) a[i] = w[31 - 8*i -: 8];
    if (inverse) begin m[0] = 8'h0e; m[1] = 8'h0b; m[2] = 8'h0d; m[3] = 8'h09; end
    else         begin m[0] = 8'h02; m[1] = 8'h03; m[2] = 8'h01; m[3] = 8'h01; end
    for (int row = 0; row < 4; row++) begin
      rbyte_t acc;
      acc = '0;
      for (int k = 0; k < 4; k++) acc ^= ref_mul(m[(k - row + 4) % 4], a[k]);
      o[31 - 8*row -: 8] = acc;
    end
    return o;
  endfunction

  function automatic rblock_t ref_mix_columns(input rblock_t b, input bit inverse);
    rblock_t o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = ref_mix_col(b[127 - 32*c -: 32], inverse);
    return o;
  endfunction

  // Round key r (0..10) of the cipher key, by the word recurrence
  // w[i] = w[i-4] ^ f(w[i-1]).
  function automatic rblock_t ref_round_key(input rblock_t key, input int r);
    rword_t w [44];
    rbyte_t rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      rword_t t;
      t = w[i-1];
      if (i % 4 == 0) begin
        t = ref_sub_word({t[23:0], t[31:24]}, 1'b0) ^ {rc, 24'h0};
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic rblock_t ref_enc_round(input rblock_t s, input rblock_t k, input bit final_round);
    rblock_t t;
    t = ref_shift_rows(ref_sub_bytes(s, 1'b0), 1'b0);
    if (!final_round) t = ref_mix_columns(t, 1'b0);
    return t ^ k;
  endfunction

  function automatic rblock_t ref_encrypt(input rblock_t key, input rblock_t pt);
    rblock_t s;
    s = pt ^ key;
    for (int r = 1; r <= 10; r++) s = ref_enc_round(s, ref_round_key(key, r), r == 10);
    return s;
  endfunction

  function automatic rblock_t ref_decrypt(input rblock_t key, input rblock_t ct);
    rblock_t s;
    s = ct ^ ref_round_key(key, 10);
    for (int r = 9; r >= 0; r--) begin
      s = ref_sub_bytes(ref_shift_rows(s, 1'b1), 1'b1) ^ ref_round_key(key, r);
      if (r > 0) s = ref_mix_columns(s, 1'b1);
    end
    return s;
  endfunction

  function automatic rblock_t rand_block();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
