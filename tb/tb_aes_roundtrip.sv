// tb_aes_roundtrip: random-data encryption/decryption round trip.
//
// For random 128-bit keys and plaintext blocks, one key schedule feeds an
// encryptor and a second one a decryptor; the ciphertext of the encryptor is
// the decryptor's input. Each ciphertext is compared with the reference
// AES-128 and each recovered block with the original plaintext. The number of
// clocks from key load to recovered plaintext is checked too:
// 11 (key schedule) + 11 (encrypt) + 11 (decrypt).
module tb_aes_roundtrip;
  import ref_pkg::*;

  localparam int TRIALS = 100;

  logic         clk = 0, rst_n = 0;
  logic         key_load = 0, tx_ready, rx_ready;
  logic [127:0] key = '0, pt = '0;
  logic         enc_start = 0, enc_busy, enc_done;
  logic         dec_start = 0, dec_busy, dec_done;
  logic [127:0] ct, recovered, enc_rk, dec_rk;
  logic [3:0]   enc_idx, dec_idx;
  int checks = 0, failures = 0, cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  aes_key_expansion u_tx_keys (.clk, .rst_n, .key_load, .key, .ready(tx_ready), .rd_idx(enc_idx), .rd_key(enc_rk));
  aes_key_expansion u_rx_keys (.clk, .rst_n, .key_load, .key, .ready(rx_ready), .rd_idx(dec_idx), .rd_key(dec_rk));
  aes_encrypt u_enc (.clk, .rst_n, .start(enc_start), .plaintext(pt), .busy(enc_busy), .done(enc_done),
                     .ciphertext(ct), .rk_idx(enc_idx), .rk(enc_rk));
  aes_decrypt u_dec (.clk, .rst_n, .start(dec_start), .ciphertext(ct), .busy(dec_busy), .done(dec_done),
                     .plaintext(recovered), .rk_idx(dec_idx), .rk(dec_rk));

  initial begin
    int t0;
    build_tables();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < TRIALS; i++) begin
      @(negedge clk);
      key = {$urandom, $urandom, $urandom, $urandom};
      pt  = {$urandom, $urandom, $urandom, $urandom};
      key_load = 1;
      t0 = cycles;
      @(negedge clk);
      key_load = 0;
      while (!(tx_ready && rx_ready)) @(negedge clk);
      enc_start = 1;
      @(negedge clk);
      enc_start = 0;
      while (!enc_done) @(negedge clk);
      checks++;
      if (ct !== encrypt(pt, key)) begin failures++; $display("FAIL ciphertext %h", ct); end
      dec_start = 1;
      @(negedge clk);
      dec_start = 0;
      while (!dec_done) @(negedge clk);
      checks++;
      if (recovered !== pt) begin failures++; $display("FAIL recovered %h expected %h", recovered, pt); end
      checks++;
      if (cycles - t0 != 33) begin failures++; $display("FAIL round trip took %0d clocks", cycles - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
