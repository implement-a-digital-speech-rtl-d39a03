// tb_aes_encrypt: self-checking testbench for aes_encrypt.
//
// The testbench plays the key schedule: it answers rk_idx with the round key
// from the reference schedule in the same cycle. It checks the FIPS-197
// examples (Appendix B and C.1), then random blocks and keys against the
// reference model, and that done comes exactly 11 clocks after start, that
// busy covers the rounds and that a start while busy is ignored.
module tb_aes_encrypt;
  import ref_pkg::*;

  logic         clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] din, dout, rk;
  logic [3:0]   rk_idx;
  keys_t        ks;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  assign rk = (rk_idx <= 4'd10) ? ks[rk_idx] : '0;

  aes_encrypt dut (.clk, .rst_n, .start, .plaintext(din), .busy, .done, .ciphertext(dout), .rk_idx, .rk);

  task automatic run(logic [127:0] k, logic [127:0] blk, logic [127:0] exp_v, bit poke);
    int t0, lat;
    ks = key_schedule(k);
    @(negedge clk);
    din = blk; start = 1;
    @(negedge clk);
    start = 0;
    t0 = cycles;
    if (poke) begin
      // A second start while busy must not disturb the block in flight.
      repeat (3) @(negedge clk);
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low during rounds"); end
      din = ~blk; start = 1;
      @(negedge clk);
      start = 0;
    end
    while (!done) @(negedge clk);
    lat = cycles - t0 + 1;
    checks++;
    if (lat != 11) begin
      failures++;
      $display("FAIL done after %0d clocks, expected 11", lat);
    end
    checks++;
    if (dout !== exp_v) begin
      failures++;
      $display("FAIL key=%h in=%h out=%h expected=%h", k, blk, dout, exp_v);
    end
    @(negedge clk);
    checks++;
    if (done || busy || dout !== exp_v) begin
      failures++;
      $display("FAIL done/busy not cleared or output not held");
    end
  endtask

  initial begin
    logic [127:0] k, b;
    build_tables();
    ks = key_schedule('0);
    din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32, 1);
    for (int i = 0; i < 40; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      run(k, b, encrypt(b, k), i % 5 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
