// aes_key_schedule: full AES-128 key expansion in one combinational pass.
//
// Ten aes_key_round units are chained; round_keys[0] is the cipher key itself
// and round_keys[r] the key of round r (1..NR). All eleven keys are available at
// once, which the decryption core needs because it uses round key 10 first.
// Combinational; nothing is stored.
module aes_key_schedule
  import aes_pkg::*;
#(
  parameter int unsigned NR = AES_NR
) (
  input  block_t key,
  output block_t round_keys [NR+1]
);

  assign round_keys[0] = key;

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_key_round #(.RCON(rcon(r))) u_key_round (
      .key_in (round_keys[r-1]),
      .key_out(round_keys[r])
    );
  end

endmodule
