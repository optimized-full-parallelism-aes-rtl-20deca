// aes_dec_round: one unrolled decryption loop, the exact inverse of an
// encryption round.
//
// InvShiftRows rotates rows right, four inverse Sub-4 units substitute the four
// columns at once, AddKey XORs in the round key, and four inverse Mix-4 units
// unmix the four columns at once. With FINAL = 1 the inverse Mix-4 stage is left
// out (the round that undoes the first encryption round). InvShiftRows and
// inverse SubBytes commute, so their order here is one of two equal choices.
// Combinational.
module aes_dec_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t shift_s;
  block_t sub_s;
  block_t key_s;

  aes_shift_rows #(.INVERSE(1'b1)) u_inv_shift_rows (
    .state_in (state_in),
    .state_out(shift_s)
  );

  for (genvar c = 0; c < 4; c++) begin : g_sub
    aes_sub4 #(.INVERSE(1'b1)) u_inv_sub4 (
      .word_in (shift_s[127 - 32*c -: 32]),
      .word_out(sub_s  [127 - 32*c -: 32])
    );
  end

  aes_add_key u_add_key (
    .state_in (sub_s),
    .round_key(round_key),
    .state_out(key_s)
  );

  if (FINAL) begin : g_no_mix
    assign state_out = key_s;
  end else begin : g_mix
    for (genvar c = 0; c < 4; c++) begin : g_col
      aes_mix4 #(.INVERSE(1'b1)) u_inv_mix4 (
        .col_in (key_s    [127 - 32*c -: 32]),
        .col_out(state_out[127 - 32*c -: 32])
      );
    end
  end

endmodule
