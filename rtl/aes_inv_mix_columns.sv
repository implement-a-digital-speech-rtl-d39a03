// aes_inv_mix_columns: the AES InvMixColumns step, inverse of aes_mix_columns.
//
// Each column is multiplied in GF(2^8) by
//   | 0e 0b 0d 09 |
//   | 09 0e 0b 0d |
//   | 0d 09 0e 0b |
//   | 0b 0d 09 0e |
// The products by {09}, {0b}, {0d} and {0e} come from four 256 x 8 ROMs filled
// while elaborating from aes_pkg::gf_mul; building the step from look-up
// tables follows the design description. Combinational, no clock.
module aes_inv_mix_columns (
  input  aes_pkg::block_t state_in,
  output aes_pkg::block_t state_out
);
  logic [7:0] mul9  [256];
  logic [7:0] mul11 [256];
  logic [7:0] mul13 [256];
  logic [7:0] mul14 [256];

  for (genvar i = 0; i < 256; i++) begin : g_rom
    localparam logic [7:0] M9  = aes_pkg::gf_mul(8'(i), 8'h09);
    localparam logic [7:0] M11 = aes_pkg::gf_mul(8'(i), 8'h0b);
    localparam logic [7:0] M13 = aes_pkg::gf_mul(8'(i), 8'h0d);
    localparam logic [7:0] M14 = aes_pkg::gf_mul(8'(i), 8'h0e);
    assign mul9[i]  = M9;
    assign mul11[i] = M11;
    assign mul13[i] = M13;
    assign mul14[i] = M14;
  end

  for (genvar c = 0; c < 4; c++) begin : g_col
    logic [7:0] s [4];
    for (genvar r = 0; r < 4; r++) begin : g_in
      assign s[r] = state_in[127-8*(4*c+r) -: 8];
    end
    // Row r: 0e*s[r] ^ 0b*s[r+1] ^ 0d*s[r+2] ^ 09*s[r+3] (indices mod 4).
    for (genvar r = 0; r < 4; r++) begin : g_out
      assign state_out[127-8*(4*c+r) -: 8] =
          mul14[s[r]] ^ mul11[s[(r+1)%4]] ^ mul13[s[(r+2)%4]] ^ mul9[s[(r+3)%4]];
    end
  end
endmodule
