// aes_sub_bytes: the AES SubBytes step on a whole 128-bit state.
//
// Each of the 16 bytes goes through its own S-box ROM (aes_sbox), so the
// whole state is substituted in one combinational pass. The byte-wise table
// lookup follows the design description; sixteen parallel tables (one round
// per clock in the cipher) is this design's choice.
// Interface: state_in -> state_out, no clock, no latency.
module aes_sub_bytes (
  input  aes_pkg::block_t state_in,
  output aes_pkg::block_t state_out
);
  for (genvar n = 0; n < 16; n++) begin : g_byte
    aes_sbox u_sbox (
      .a (state_in [127-8*n -: 8]),
      .y (state_out[127-8*n -: 8])
    );
  end
endmodule
