// aes_decrypt: iterative AES-128 decryptor (inverse cipher), one round per clock.
//
// On start the ciphertext is XORed with round key 10 and registered. Each
// following clock applies one inverse round with round key r, r = 9 down to
// 0: InvShiftRows, InvSubBytes, AddRoundKey and then InvMixColumns, which the
// last round (r = 0) leaves out. The round keys are thus used in reverse
// order; the core names the one it needs on rk_idx and takes it on rk in the
// same cycle.
// Timing: start in cycle t, done is a one-cycle pulse in cycle t+11, and the
// plaintext stays on its port until the next start. busy is high from t+1 to
// t+10; start is ignored while busy. The inverse steps follow the design
// description; their order within a round is FIPS-197's inverse cipher, and
// the round-per-clock structure is this design's choice.
module aes_decrypt #(
  parameter int unsigned NR = aes_pkg::NR
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  aes_pkg::block_t ciphertext,
  output logic            busy,
  output logic            done,
  output aes_pkg::block_t plaintext,
  output aes_pkg::rnd_t   rk_idx,
  input  aes_pkg::block_t rk
);
  import aes_pkg::*;

  block_t state_q;
  rnd_t   round_q;
  logic   busy_q;

  block_t isr, isb, ark, imc;

  aes_inv_shift_rows  u_ishr (.state_in(state_q), .state_out(isr));
  aes_inv_sub_bytes   u_isub (.state_in(isr),     .state_out(isb));
  aes_add_round_key   u_ark  (.state_in(isb), .round_key(rk), .state_out(ark));
  aes_inv_mix_columns u_imix (.state_in(ark),     .state_out(imc));

  assign rk_idx = busy_q ? round_q : 4'(NR);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      done    <= 1'b0;
      round_q <= 4'(NR - 1);
      state_q <= '0;
    end else begin
      done <= 1'b0;
      if (busy_q) begin
        // The last inverse round has no InvMixColumns.
        state_q <= (round_q == 4'd0) ? ark : imc;
        round_q <= round_q - 4'd1;
        if (round_q == 4'd0) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
        end
      end else if (start) begin
        state_q <= ciphertext ^ rk;      // rk_idx = NR
        round_q <= 4'(NR - 1);
        busy_q  <= 1'b1;
      end
    end
  end

  assign busy      = busy_q;
  assign plaintext = state_q;
endmodule
