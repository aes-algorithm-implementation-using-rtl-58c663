// shift_rows_ark: ShiftRows (or InvShiftRows) followed by AddRoundKey.
//
// The 128-bit state holds the 4x4 byte matrix column by column: byte
// s[r][c] sits at bits [127 - 8*(4c + r) -: 8], so the first column occupies
// bits [127:96]. ShiftRows rotates row r left by r bytes, which is only
// wiring; InvShiftRows rotates right. AddRoundKey is a bitwise XOR with the
// 128-bit round key. Bundling the two steps into one unit follows the
// described "ShiftRow + AddRoundkey" hardware option; the inverse direction
// is added for decryption.
//
// Interface: state_in, round_key, inv (1 = InvShiftRows), do_shift
// (0 = AddRoundKey only), state_out. Combinational.
module shift_rows_ark (
  input  logic [127:0] state_in,
  input  logic [127:0] round_key,
  input  logic         inv,
  input  logic         do_shift,
  output logic [127:0] state_out
);

  logic [127:0] shifted;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        // destination (r, c) takes row r of column c+r (or c-r when inverse)
        if (inv) shifted[127 - 8*(4*c + r) -: 8] = state_in[127 - 8*(4*((c - r + 4) % 4) + r) -: 8];
        else     shifted[127 - 8*(4*c + r) -: 8] = state_in[127 - 8*(4*((c + r) % 4) + r) -: 8];
      end
    end
    state_out = (do_shift ? shifted : state_in) ^ round_key;
  end

endmodule
