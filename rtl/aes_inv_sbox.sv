// aes_inv_sbox: one AES inverse S-box (InvSubBytes) lookup, a 256 x 8 read-only table.
//
// The table is filled while elaborating from aes_pkg::inv_sbox_value, the FIPS-197
// definition, so the values are not typed in; each entry is a constant and a
// synthesis tool maps the array to a LUT ROM. Combinational: y follows a in
// the same cycle. Building the substitution as a ROM follows the design
// description; computing its contents is this design's own choice.
module aes_inv_sbox (
  input  logic [7:0] a,
  output logic [7:0] y
);
  logic [7:0] rom [256];

  for (genvar i = 0; i < 256; i++) begin : g_rom
    localparam logic [7:0] VALUE = aes_pkg::inv_sbox_value(8'(i));
    assign rom[i] = VALUE;
  end

  assign y = rom[a];
endmodule
