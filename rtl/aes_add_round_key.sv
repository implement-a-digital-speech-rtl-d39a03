// aes_add_round_key: the AES AddRoundKey step, state XOR round key.
//
// Addition in GF(2^8) is exclusive OR, so the step is a 128-bit XOR of the
// state with the round key of the current round. Combinational.
module aes_add_round_key (
  input  aes_pkg::block_t state_in,
  input  aes_pkg::block_t round_key,
  output aes_pkg::block_t state_out
);
  assign state_out = state_in ^ round_key;
endmodule
