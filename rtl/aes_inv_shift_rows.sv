// aes_inv_shift_rows: the AES InvShiftRows step, the inverse of aes_shift_rows.
//
// Row r of the column-major 4x4 state is rotated right by r positions
// (Nb - r to the left), so output (r,c) takes input (r, (c-r) mod 4).
// Pure wiring, no clock.
module aes_inv_shift_rows (
  input  aes_pkg::block_t state_in,
  output aes_pkg::block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c+4-r)%4)+r) -: 8];
    end
  end
endmodule
