// aes_encrypt: iterative AES-128 encryptor, one round per clock.
//
// On start the plaintext is XORed with round key 0 (the initial round) and
// registered. Each following clock applies one round to the state register:
// SubBytes, ShiftRows, MixColumns and AddRoundKey with round key r, for
// r = 1..10; round 10 leaves out MixColumns as FIPS-197 prescribes. The core
// asks for the round key it needs on rk_idx and expects it on rk in the same
// cycle (aes_key_expansion's combinational read port).
// Timing: start in cycle t, done is a one-cycle pulse in cycle t+11 and the
// ciphertext stays on its port until the next start. busy is high from t+1
// to t+10; start is ignored while busy. The round sequence follows the
// design description; the round-per-clock structure is this design's choice.
module aes_encrypt #(
  parameter int unsigned NR = aes_pkg::NR
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  aes_pkg::block_t plaintext,
  output logic            busy,
  output logic            done,
  output aes_pkg::block_t ciphertext,
  output aes_pkg::rnd_t   rk_idx,
  input  aes_pkg::block_t rk
);
  import aes_pkg::*;

  block_t state_q;
  rnd_t   round_q;
  logic   busy_q;

  block_t sb, sr, mc, mix_sel, ark;

  aes_sub_bytes     u_sub (.state_in(state_q), .state_out(sb));
  aes_shift_rows    u_shr (.state_in(sb),      .state_out(sr));
  aes_mix_columns   u_mix (.state_in(sr),      .state_out(mc));
  // The last round has no MixColumns.
  assign mix_sel = (round_q == 4'(NR)) ? sr : mc;
  aes_add_round_key u_ark (.state_in(mix_sel), .round_key(rk), .state_out(ark));

  assign rk_idx = busy_q ? round_q : 4'd0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      done    <= 1'b0;
      round_q <= 4'd1;
      state_q <= '0;
    end else begin
      done <= 1'b0;
      if (busy_q) begin
        state_q <= ark;
        round_q <= round_q + 4'd1;
        if (round_q == 4'(NR)) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
        end
      end else if (start) begin
        state_q <= plaintext ^ rk;       // initial round, rk_idx = 0
        round_q <= 4'd1;
        busy_q  <= 1'b1;
      end
    end
  end

  assign busy       = busy_q;
  assign ciphertext = state_q;
endmodule
