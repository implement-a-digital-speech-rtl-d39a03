// aes_pkg: types and constant functions shared by the AES-128 blocks.
//
// The 128-bit state is held as in FIPS-197: byte n of the input block sits in
// bits [127-8n -: 8], and the 4x4 state is filled column by column, so byte n
// is row n%4 of column n/4. The functions below are used only while
// elaborating, to fill the S-box, inverse S-box and GF(2^8) product ROMs from
// their mathematical definition; they are not meant to become logic.
// AES-128 (10 rounds, 128-bit key and block) follows the standard; computing
// the ROM contents instead of listing them is this design's own choice.
package aes_pkg;

  localparam int unsigned NR     = 10;   // rounds (AES-128)
  localparam int unsigned BLOCK_W = 128;

  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [3:0]         rnd_t;     // round number 0..10

  // Byte n (0..15) of a block, FIPS-197 numbering.
  function automatic logic [7:0] get_byte(block_t b, int unsigned n);
    return b[BLOCK_W-1-8*n -: 8];
  endfunction

  // Multiply by x ({02}) modulo x^8+x^4+x^3+x+1.
  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 = a^2 * a^4 * ... * a^128 (0 maps to 0).
  function automatic logic [7:0] gf_inv(logic [7:0] a);
    logic [7:0] r;
    logic [7:0] sq;
    r  = 8'h01;
    sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  // Affine map of the S-box: b ^ rotl(b,1..4) ^ 0x63.
  function automatic logic [7:0] affine(logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // Inverse affine map: rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^ 0x05.
  function automatic logic [7:0] inv_affine(logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

  function automatic logic [7:0] sbox_value(logic [7:0] a);
    return affine(gf_inv(a));
  endfunction

  function automatic logic [7:0] inv_sbox_value(logic [7:0] a);
    return gf_inv(inv_affine(a));
  endfunction

endpackage
