// inv_shift_rows -- InvShiftRows: row r of the state rotated right by r bytes.
//
// Output (r, c) takes input (r, (c - r) mod 4): row 0 is unchanged, rows 1,
// 2 and 3 rotate right by 1, 2 and 3 bytes. This undoes shift_rows. Pure
// wiring, no logic.
module inv_shift_rows
  import aes_pkg::*;
(
  input  aes_block_t din,
  output aes_block_t dout
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign dout[127 - 8*(r + 4*c) -: 8] = din[127 - 8*(r + 4*((c + 4 - r) % 4)) -: 8];
    end
  end
endmodule
