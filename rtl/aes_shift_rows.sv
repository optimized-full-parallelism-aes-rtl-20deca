// aes_shift_rows: ShiftRows (INVERSE = 0) or InvShiftRows (INVERSE = 1).
//
// Row 0 of the 4x4 state stays in place; row r (1..3) rotates cyclically by r
// byte positions, to the left for encryption and to the right for decryption.
// With byte k = 4*c + r of the block at row r, column c, output byte (r, c)
// takes input byte (r, c + r mod 4) when shifting left and (r, c - r mod 4)
// when shifting right. Pure wiring, combinational.
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int SRC_COL = INVERSE ? (c - r + 4) % 4 : (c + r) % 4;
      assign state_out[127 - 8*(4*c + r) -: 8] = state_in[127 - 8*(4*SRC_COL + r) -: 8];
    end
  end

endmodule
