// tb_mulaw_encoder: self-checking testbench for mulaw_encoder.
//
// Sends every 14-bit sample value (-8192..8191) through the encoder with a
// randomly stalling consumer (out_ready) and compares each code, in order,
// with the reference G.711 encoder. Also checks a few printed G.711 codes,
// that a code appears one clock after its sample and that a code is held
// unchanged while out_ready is low. Counts how many codes fell in each of
// the 8 chords and how many were clipped; each must occur.
module tb_mulaw_encoder;
  import ref_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic              in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic signed [13:0] in_sample = 0;
  logic [7:0]        out_code;
  int checks = 0, failures = 0;
  int expq[$];
  int chord_seen[8];
  int clipped = 0, stalls = 0;
  logic [7:0] held;
  logic       was_stalled = 0;
  bit         taken;

  always #5 clk = ~clk;

  mulaw_encoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_sample, .out_valid, .out_ready, .out_code);

  // Scoreboard: a code is taken when out_valid && out_ready.
  always @(posedge clk) if (rst_n) begin
    if (was_stalled && out_valid) begin
      checks++;
      if (out_code !== held) begin failures++; $display("FAIL code changed during stall"); end
    end
    was_stalled <= out_valid && !out_ready;
    held        <= out_code;
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      int e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected code %h", out_code);
      end else begin
        e = expq.pop_front();
        if (out_code !== 8'(e)) begin
          failures++; $display("FAIL code=%h expected=%h", out_code, 8'(e));
        end
        chord_seen[(~out_code) >> 4 & 7]++;
      end
    end
  end

  task automatic directed(int x, logic [7:0] exp_v);
    @(negedge clk);
    out_ready = 1; in_valid = 1; in_sample = 14'(x);
    @(negedge clk);
    in_valid = 0;
    // One clock of latency: the code is on the output now.
    checks++;
    if (!out_valid || out_code !== exp_v) begin
      failures++; $display("FAIL directed x=%0d code=%h valid=%b expected=%h", x, out_code, out_valid, exp_v);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid after reset"); end
    // Printed G.711 values: silence, the largest codes, -1.
    expq.push_back(8'hFF); directed(0,     8'hFF);
    expq.push_back(8'h80); directed(8158,  8'h80);
    expq.push_back(8'h00); directed(-8159, 8'h00);
    expq.push_back(8'h7E); directed(-1,    8'h7E);
    expq.push_back(8'hF0); directed(30,    8'hF0);
    @(negedge clk);
    for (int x = -8192; x < 8192; x++) begin
      if (x > 8158 || x < -8158) clipped++;
      // Hold the sample until a clock edge takes it (in_ready high before the edge).
      taken = 0;
      while (!taken) begin
        in_valid  = 1;
        in_sample = 14'(x);
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (in_ready) begin
          expq.push_back(mulaw_encode(x));
          taken = 1;
        end
        @(negedge clk);
      end
    end
    in_valid  = 0;
    out_ready = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d codes missing", expq.size()); end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (chord_seen[s] == 0) begin failures++; $display("FAIL chord %0d never produced", s); end
    end
    checks++;
    if (clipped == 0 || stalls == 0) begin failures++; $display("FAIL clip or stall never happened"); end
    $display("chords: %0d %0d %0d %0d %0d %0d %0d %0d, clipped inputs %0d, stalls %0d",
             chord_seen[0], chord_seen[1], chord_seen[2], chord_seen[3],
             chord_seen[4], chord_seen[5], chord_seen[6], chord_seen[7], clipped, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
