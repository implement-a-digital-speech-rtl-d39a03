// aes_key_expansion: AES-128 key schedule with a round-key register file.
//
// A pulse on key_load copies the cipher key into round key 0. Then one round
// key is derived per clock from the one before it, FIPS-197 style:
//   t  = SubWord(RotWord(w3)) ^ {Rcon, 24'h0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// RotWord rotates the last word by one byte, SubWord puts its four bytes
// through four S-box ROMs, and Rcon starts at 01 and is multiplied by {02}
// each step. After 10 more cycles all 11 round keys are in the register file
// and ready rises; it stays high until the next key_load.
// The round keys are read combinationally by number (rd_idx 0..10), so the
// encryptor can read them upwards and the decryptor downwards.
// SubWord, RotWord and Rcon follow the design description; computing one
// round key per clock and keeping all of them in registers is this design's
// choice. rd_idx above 10 returns round key 10.
module aes_key_expansion #(
  parameter int unsigned NR = aes_pkg::NR
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            key_load,
  input  aes_pkg::block_t key,
  output logic            ready,
  input  aes_pkg::rnd_t   rd_idx,
  output aes_pkg::block_t rd_key
);
  import aes_pkg::*;

  block_t     rk [NR+1];
  block_t     last_q;        // most recently derived round key
  logic [3:0] cnt_q;         // number of the round key being derived
  logic [7:0] rcon_q;
  logic       busy_q;

  logic [31:0] w3_rot, w3_sub, temp;
  block_t      next_key;

  assign w3_rot = {last_q[23:0], last_q[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (.a(w3_rot[31-8*b -: 8]), .y(w3_sub[31-8*b -: 8]));
  end

  assign temp = w3_sub ^ {rcon_q, 24'h000000};

  always_comb begin
    next_key[127:96] = last_q[127:96] ^ temp;
    next_key[95:64]  = last_q[95:64]  ^ next_key[127:96];
    next_key[63:32]  = last_q[63:32]  ^ next_key[95:64];
    next_key[31:0]   = last_q[31:0]   ^ next_key[63:32];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      ready  <= 1'b0;
      cnt_q  <= 4'd1;
      rcon_q <= 8'h01;
      last_q <= '0;
      for (int i = 0; i <= int'(NR); i++) rk[i] <= '0;
    end else if (key_load) begin
      rk[0]  <= key;
      last_q <= key;
      busy_q <= 1'b1;
      ready  <= 1'b0;
      cnt_q  <= 4'd1;
      rcon_q <= 8'h01;
    end else if (busy_q) begin
      rk[cnt_q] <= next_key;
      last_q    <= next_key;
      rcon_q    <= xtime(rcon_q);
      cnt_q     <= cnt_q + 4'd1;
      if (cnt_q == 4'(NR)) begin
        busy_q <= 1'b0;
        ready  <= 1'b1;
      end
    end
  end

  assign rd_key = (rd_idx > 4'(NR)) ? rk[NR] : rk[rd_idx];
endmodule
