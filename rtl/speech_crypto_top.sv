// speech_crypto_top: secure speech link, G.711 mu-law coding with AES-128.
//
// Transmit side: 14-bit PCM samples are compressed to 8-bit mu-law codes
// (mulaw_encoder); sixteen consecutive codes are packed into one 128-bit
// block, the first code in bits 127:120, and the block is encrypted
// (aes_encrypt, round keys from its own aes_key_expansion). The ciphertext is
// the link: it appears on cipher with a one-cycle cipher_valid pulse.
// Receive side: the ciphertext is decrypted (aes_decrypt with a second key
// schedule), unpacked one code per clock in the order it was packed, and
// expanded back to 14-bit PCM (mulaw_decoder) on out_sample/out_valid.
//
// Flow control: sample_valid/sample_ready on the input. The encoder stalls
// while the block buffer is full and the encryptor cannot take it (busy, key
// schedule not ready, or the previous ciphertext not yet taken by the
// decryptor). The decrypted block waits in the decryptor until the unpacker
// is empty. The output has no back-pressure; one sample per clock at most.
//
// Key: a key_valid pulse loads key into both schedules; key_ready rises 11
// clocks later. Load a key only while idle is high. Samples arrive in whole
// blocks of 16: a partial block waits in the packer for the rest.
//
// Latency: a block's first sample leaves 28 clocks after its last sample
// entered, when the receive side is free (encoder 1, packer 1, encrypt 11,
// link 1, decrypt 11, hand-off to the unpacker 2, decoder 1). Throughput is
// one 16-sample block per 17 clocks.
// The chain encoder -> encryption -> decryption -> decoder follows the design
// description; block packing, the handshakes and the two key schedules are
// this design's choices.
module speech_crypto_top #(
  parameter int unsigned SAMPLE_W = 14
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       key_valid,
  input  aes_pkg::block_t            key,
  output logic                       key_ready,
  input  logic                       sample_valid,
  output logic                       sample_ready,
  input  logic signed [SAMPLE_W-1:0] sample,
  output logic                       cipher_valid,
  output aes_pkg::block_t            cipher,
  output logic                       out_valid,
  output logic signed [SAMPLE_W-1:0] out_sample,
  output logic                       idle
);
  import aes_pkg::*;

  // ---------------- transmit: encoder and block packer ----------------
  logic       code_valid, code_ready;
  logic [7:0] code;

  mulaw_encoder #(.SAMPLE_W(SAMPLE_W)) u_encoder (
    .clk, .rst_n,
    .in_valid (sample_valid), .in_ready (sample_ready), .in_sample (sample),
    .out_valid(code_valid),   .out_ready(code_ready),   .out_code (code)
  );

  block_t     pk_buf;
  logic [4:0] pk_cnt;            // codes in the buffer, 0..16
  logic       pk_full;
  assign pk_full    = (pk_cnt == 5'd16);
  assign code_ready = !pk_full;

  // ---------------- key schedules ----------------
  logic   tx_key_ready, rx_key_ready;
  rnd_t   enc_rk_idx, dec_rk_idx;
  block_t enc_rk, dec_rk;

  aes_key_expansion u_tx_keys (
    .clk, .rst_n, .key_load(key_valid), .key,
    .ready(tx_key_ready), .rd_idx(enc_rk_idx), .rd_key(enc_rk)
  );
  aes_key_expansion u_rx_keys (
    .clk, .rst_n, .key_load(key_valid), .key,
    .ready(rx_key_ready), .rd_idx(dec_rk_idx), .rd_key(dec_rk)
  );
  assign key_ready = tx_key_ready && rx_key_ready;

  // ---------------- encryption ----------------
  logic   enc_start, enc_busy, enc_done;
  block_t enc_ct;
  logic   link_full;
  block_t link_q;

  assign enc_start = pk_full && !enc_busy && tx_key_ready && !link_full;

  aes_encrypt u_encrypt (
    .clk, .rst_n, .start(enc_start), .plaintext(pk_buf),
    .busy(enc_busy), .done(enc_done), .ciphertext(enc_ct),
    .rk_idx(enc_rk_idx), .rk(enc_rk)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pk_buf <= '0;
      pk_cnt <= '0;
    end else begin
      if (code_valid && code_ready) begin
        pk_buf <= {pk_buf[BLOCK_W-9:0], code};
        pk_cnt <= pk_cnt + 5'd1;
      end else if (enc_start) begin
        pk_cnt <= '0;
      end
    end
  end

  // ---------------- receive: decryption and unpacker ----------------
  logic   dec_start, dec_busy, dec_done;
  block_t dec_pt;
  logic   rx_pending;            // decrypted block not yet in the unpacker
  block_t up_buf;
  logic [4:0] up_cnt;            // codes left in the unpacker
  logic   up_load;

  assign dec_start = link_full && !dec_busy && !dec_done && !rx_pending && rx_key_ready;
  assign up_load   = rx_pending && (up_cnt == 5'd0);

  aes_decrypt u_decrypt (
    .clk, .rst_n, .start(dec_start), .ciphertext(link_q),
    .busy(dec_busy), .done(dec_done), .plaintext(dec_pt),
    .rk_idx(dec_rk_idx), .rk(dec_rk)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_full    <= 1'b0;
      link_q       <= '0;
      cipher_valid <= 1'b0;
      rx_pending   <= 1'b0;
      up_buf       <= '0;
      up_cnt       <= '0;
    end else begin
      cipher_valid <= enc_done;
      if (enc_done) begin
        link_q    <= enc_ct;
        link_full <= 1'b1;
      end else if (dec_start) begin
        link_full <= 1'b0;
      end

      if (dec_done)     rx_pending <= 1'b1;
      else if (up_load) rx_pending <= 1'b0;

      if (up_load) begin
        up_buf <= dec_pt;
        up_cnt <= 5'd16;
      end else if (up_cnt != 5'd0) begin
        up_buf <= {up_buf[BLOCK_W-9:0], 8'h00};
        up_cnt <= up_cnt - 5'd1;
      end
    end
  end

  assign cipher = link_q;

  logic dec_out_valid;
  mulaw_decoder #(.SAMPLE_W(SAMPLE_W)) u_decoder (
    .clk, .rst_n,
    .in_valid (up_cnt != 5'd0), .in_code(up_buf[BLOCK_W-1 -: 8]),
    .out_valid(dec_out_valid),  .out_sample(out_sample)
  );
  assign out_valid = dec_out_valid;

  assign idle = !code_valid && (pk_cnt == 5'd0) && !enc_busy && !enc_done && !link_full
             && !dec_busy && !dec_done && !rx_pending && (up_cnt == 5'd0) && !dec_out_valid;

  // A new ciphertext never lands on a link register the decryptor has not taken.
  a_link_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) enc_done |-> !link_full);
  // A decrypted block is never overwritten before the unpacker takes it.
  a_rx_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) dec_done |-> !rx_pending);
endmodule
