// tb_speech_crypto_top: end-to-end testbench for speech_crypto_top.
//
// Loads a key, streams blocks of 14-bit speech-like samples (a sweep through
// every chord of both signs, clipped peaks and random values) into the link,
// partly at full rate and partly with gaps, then reloads a second key and
// streams again. Independently of the RTL it predicts every mu-law code,
// packs sixteen of them into a block, encrypts that block with the reference
// AES-128 and compares it with each ciphertext on the link; it also checks
// every reconstructed sample against decode(encode(x)), in order.
// Counted events, each of which must happen: input stalls (sample_valid high,
// sample_ready low), blocks encrypted, blocks decoded, key reloads, samples
// in every chord, negative samples and clipped samples. It also checks the
// 28-clock latency from the last sample of a block to its first output.
// The top runs with its default parameters.
module tb_speech_crypto_top;
  import ref_pkg::*;

  localparam int BLOCKS_PER_KEY = 24;

  logic               clk = 0, rst_n = 0;
  logic               key_valid = 0, key_ready;
  logic [127:0]       key = '0;
  logic               sample_valid = 0, sample_ready;
  logic signed [13:0] sample = '0;
  logic               cipher_valid, out_valid, idle;
  logic [127:0]       cipher;
  logic signed [13:0] out_sample;

  int checks = 0, failures = 0;
  int stalls = 0, blocks_enc = 0, samples_out = 0, rekeys = 0, clipped = 0, negatives = 0;
  int chord_seen[8];
  logic [127:0] cur_key;
  logic [127:0] exp_ct[$];
  int           exp_out[$];
  logic [127:0] pack;
  int           pack_n = 0;

  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  speech_crypto_top dut (
    .clk, .rst_n, .key_valid, .key, .key_ready,
    .sample_valid, .sample_ready, .sample,
    .cipher_valid, .cipher, .out_valid, .out_sample, .idle
  );

  always @(posedge clk) if (rst_n) begin
    if (sample_valid && !sample_ready) stalls++;
    if (cipher_valid) begin
      checks++;
      blocks_enc++;
      if (exp_ct.size() == 0) begin
        failures++; $display("FAIL unexpected ciphertext %h", cipher);
      end else begin
        logic [127:0] e;
        e = exp_ct.pop_front();
        if (cipher !== e) begin failures++; $display("FAIL cipher=%h expected=%h", cipher, e); end
      end
    end
    if (out_valid) begin
      checks++;
      samples_out++;
      if (exp_out.size() == 0) begin
        failures++; $display("FAIL unexpected sample %0d", out_sample);
      end else begin
        int e;
        e = exp_out.pop_front();
        if (int'(out_sample) != e) begin failures++; $display("FAIL out=%0d expected=%0d", out_sample, e); end
      end
    end
  end

  // Record a sample the link accepted: expected code, block and output.
  task automatic accepted(int x);
    logic [7:0] c = mulaw_encode(x);
    chord_seen[(~c >> 4) & 7]++;
    if (x < 0) negatives++;
    if (x > 8158 || x < -8158) clipped++;
    exp_out.push_back(mulaw_decode(c));
    pack = {pack[119:0], c};
    pack_n++;
    if (pack_n == 16) begin
      exp_ct.push_back(encrypt(pack, cur_key));
      pack_n = 0;
    end
  endtask

  task automatic send(int x, bit gaps);
    bit taken = 0;
    if (gaps) begin
      sample_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    while (!taken) begin
      sample_valid = 1;
      sample = 14'(x);
      #1;
      if (sample_ready) begin
        accepted(x);
        taken = 1;
      end
      @(negedge clk);
    end
    sample_valid = 0;
  endtask

  function automatic int speech(int n);
    // A sweep over all chords of both signs, with clipped peaks and noise.
    case (n % 4)
      0: return ((n / 4) % 2 ? -1 : 1) * ((32 << ((n / 8) % 8)) + int'($urandom_range(0, 31)));
      1: return int'($urandom_range(0, 16383)) - 8192;
      2: return (n % 8 == 2) ? 8191 : -8192;
      default: return int'($urandom_range(0, 200)) - 100;
    endcase
  endfunction

  task automatic load_key(logic [127:0] k);
    @(negedge clk);
    key = k; key_valid = 1; cur_key = k;
    @(negedge clk);
    key_valid = 0;
    rekeys++;
  endtask

  task automatic stream(int blocks);
    for (int n = 0; n < 16 * blocks; n++) send(speech(n), (n / 64) % 2 == 1);
  endtask

  task automatic drain();
    int guard = 0;
    while (!(idle && exp_ct.size() == 0 && exp_out.size() == 0) && guard < 2000) begin
      @(negedge clk);
      guard++;
    end
    checks++;
    if (guard >= 2000) begin failures++; $display("FAIL link did not drain"); end
  endtask

  initial begin
    build_tables();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!idle || key_ready) begin failures++; $display("FAIL not idle after reset"); end
    // Samples start right after the key load: the link must stall until the
    // key schedule is ready.
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    stream(BLOCKS_PER_KEY);
    drain();
    load_key({$urandom, $urandom, $urandom, $urandom});
    stream(BLOCKS_PER_KEY);
    drain();
    // Latency of one block sent at full rate into an empty link: clocks from
    // the edge that takes its last sample to the edge that raises out_valid.
    begin
      int t_last, t_out;
      for (int n = 0; n < 16; n++) send(speech(n), 0);
      t_last = cycles;                   // edge after the last send was counted
      while (!out_valid) @(negedge clk);
      t_out = cycles;
      checks++;
      if (t_out - t_last + 1 != 28) begin
        failures++; $display("FAIL block latency %0d clocks, expected 28", t_out - t_last + 1);
      end
      drain();
    end
    checks++;
    if (blocks_enc != 2 * BLOCKS_PER_KEY + 1 || samples_out != 32 * BLOCKS_PER_KEY + 16) begin
      failures++; $display("FAIL %0d blocks, %0d samples out", blocks_enc, samples_out);
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (chord_seen[s] == 0) begin failures++; $display("FAIL chord %0d never used", s); end
    end
    checks++;
    if (stalls == 0 || rekeys < 2 || clipped == 0 || negatives == 0) begin
      failures++; $display("FAIL an event never happened");
    end
    $display("events: stalls %0d, blocks %0d, samples %0d, key loads %0d, clipped %0d, negative %0d",
             stalls, blocks_enc, samples_out, rekeys, clipped, negatives);
    $display("chords: %0d %0d %0d %0d %0d %0d %0d %0d", chord_seen[0], chord_seen[1], chord_seen[2],
             chord_seen[3], chord_seen[4], chord_seen[5], chord_seen[6], chord_seen[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
