// aes_shift_rows: the AES ShiftRows step.
//
// The state is a 4x4 byte matrix filled column by column (byte n is row n%4,
// column n/4, FIPS-197 order). Row r is rotated left by r positions: row 0
// stays, row 1 moves one byte, row 2 two and row 3 three, so output (r,c)
// takes input (r, (c+r) mod 4). Pure wiring, no clock.
module aes_shift_rows (
  input  aes_pkg::block_t state_in,
  output aes_pkg::block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c+r)%4)+r) -: 8];
    end
  end
endmodule
