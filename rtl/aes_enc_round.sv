// aes_enc_round: one unrolled encryption loop of the full-parallelism core.
//
// Four Sub-4 units substitute the four columns at once, ShiftRows permutes the
// bytes, four Mix-4 units mix the four columns at once, and AddKey XORs in the
// round key. With FINAL = 1 the Mix-4 stage is left out, as in the last AES
// round. This is one loop of the full-parallelism dataflow. Combinational.
module aes_enc_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t sub_s;
  block_t shift_s;
  block_t mix_s;

  for (genvar c = 0; c < 4; c++) begin : g_sub
    aes_sub4 #(.INVERSE(1'b0)) u_sub4 (
      .word_in (state_in[127 - 32*c -: 32]),
      .word_out(sub_s   [127 - 32*c -: 32])
    );
  end

  aes_shift_rows #(.INVERSE(1'b0)) u_shift_rows (
    .state_in (sub_s),
    .state_out(shift_s)
  );

  if (FINAL) begin : g_no_mix
    assign mix_s = shift_s;
  end else begin : g_mix
    for (genvar c = 0; c < 4; c++) begin : g_col
      aes_mix4 #(.INVERSE(1'b0)) u_mix4 (
        .col_in (shift_s[127 - 32*c -: 32]),
        .col_out(mix_s  [127 - 32*c -: 32])
      );
    end
  end

  aes_add_key u_add_key (
    .state_in (mix_s),
    .round_key(round_key),
    .state_out(state_out)
  );

endmodule
