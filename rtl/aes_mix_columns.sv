// aes_mix_columns: the AES MixColumns step.
//
// Each column (s0..s3) is multiplied in GF(2^8) by the fixed matrix
//   | 02 03 01 01 |
//   | 01 02 03 01 |
//   | 01 01 02 03 |
//   | 03 01 01 02 |
// with XOR as addition. The products by {02} and {03} are read from two
// 256 x 8 ROMs (one pair per state byte) filled while elaborating from
// aes_pkg::gf_mul; building the step from look-up tables follows the design
// description. Combinational, no clock.
module aes_mix_columns (
  input  aes_pkg::block_t state_in,
  output aes_pkg::block_t state_out
);
  logic [7:0] mul2 [256];
  logic [7:0] mul3 [256];

  for (genvar i = 0; i < 256; i++) begin : g_rom
    localparam logic [7:0] M2 = aes_pkg::gf_mul(8'(i), 8'h02);
    localparam logic [7:0] M3 = aes_pkg::gf_mul(8'(i), 8'h03);
    assign mul2[i] = M2;
    assign mul3[i] = M3;
  end

  for (genvar c = 0; c < 4; c++) begin : g_col
    logic [7:0] s [4];
    for (genvar r = 0; r < 4; r++) begin : g_in
      assign s[r] = state_in[127-8*(4*c+r) -: 8];
    end
    // Row r: 02*s[r] ^ 03*s[r+1] ^ s[r+2] ^ s[r+3] (indices mod 4).
    for (genvar r = 0; r < 4; r++) begin : g_out
      assign state_out[127-8*(4*c+r) -: 8] =
          mul2[s[r]] ^ mul3[s[(r+1)%4]] ^ s[(r+2)%4] ^ s[(r+3)%4];
    end
  end
endmodule
