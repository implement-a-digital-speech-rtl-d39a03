// aes_inv_sub_bytes: the AES InvSubBytes step on a whole 128-bit state.
//
// Each of the 16 bytes goes through its own inverse S-box ROM (aes_inv_sbox),
// undoing aes_sub_bytes. Table lookup follows the design description; sixteen
// parallel tables is this design's choice.
// Interface: state_in -> state_out, no clock, no latency.
module aes_inv_sub_bytes (
  input  aes_pkg::block_t state_in,
  output aes_pkg::block_t state_out
);
  for (genvar n = 0; n < 16; n++) begin : g_byte
    aes_inv_sbox u_inv_sbox (
      .a (state_in [127-8*n -: 8]),
      .y (state_out[127-8*n -: 8])
    );
  end
endmodule
