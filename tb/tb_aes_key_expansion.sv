// tb_aes_key_expansion: self-checking testbench for aes_key_expansion.
//
// Loads the FIPS-197 Appendix A.1 key and random keys, checks that ready
// rises exactly 11 clocks after key_load (key 0 stored, then one round key
// per clock) and that all 11 round keys read back equal to the reference key
// schedule. Round key 10 of the FIPS key is also checked against its printed
// value. A second load in the middle of an expansion must restart it.
module tb_aes_key_expansion;
  import ref_pkg::*;

  logic         clk = 0, rst_n = 0, key_load = 0, ready;
  logic [127:0] key, rd_key;
  logic [3:0]   rd_idx = 0;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  aes_key_expansion dut (.clk, .rst_n, .key_load, .key, .ready, .rd_idx, .rd_key);

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s got=%h expected=%h", what, got, exp_v);
    end
  endtask

  task automatic load_and_check(logic [127:0] k);
    keys_t ref_k;
    int t0, lat;
    ref_k = key_schedule(k);
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    t0 = cycles;
    while (!ready) @(negedge clk);
    lat = cycles - t0 + 1;
    checks++;
    if (lat != 11) begin
      failures++;
      $display("FAIL ready after %0d clocks, expected 11", lat);
    end
    for (int r = 0; r <= 10; r++) begin
      rd_idx = 4'(r);
      #1;
      expect_eq($sformatf("round key %0d", r), rd_key, ref_k[r]);
    end
  endtask

  initial begin
    build_tables();
    key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (ready) begin failures++; $display("FAIL ready after reset"); end
    load_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c);
    rd_idx = 4'd10; #1;
    expect_eq("FIPS round key 10", rd_key, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    // Restart in the middle of an expansion.
    @(negedge clk);
    key = {$urandom, $urandom, $urandom, $urandom}; key_load = 1;
    @(negedge clk); key_load = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (ready) begin failures++; $display("FAIL ready during expansion"); end
    for (int i = 0; i < 20; i++) load_and_check({$urandom, $urandom, $urandom, $urandom});
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
