// shift_rows -- ShiftRows: row r of the 4x4 state rotated left by r bytes.
//
// The state is stored column by column (byte r + 4c is row r, column c).
// Output (r, c) takes input (r, (c + r) mod 4): row 0 stays, row 1 moves one
// place left, row 2 two, row 3 three, so the four bytes of one column end up
// in four different columns. Pure wiring, no logic.
//
// The inverse rotations (right by 0..3) are given in the published
// description; this forward direction is the standard one that undoes them.
module shift_rows
  import aes_pkg::*;
(
  input  aes_block_t din,
  output aes_block_t dout
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign dout[127 - 8*(r + 4*c) -: 8] = din[127 - 8*(r + 4*((c + r) % 4)) -: 8];
    end
  end
endmodule
