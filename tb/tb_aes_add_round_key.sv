// tb_aes_add_round_key: self-checking testbench for aes_add_round_key.
//
// Applies the FIPS-197 Appendix B round-1 key addition and random state/key
// pairs, comparing with a bytewise XOR computed in the testbench.
module tb_aes_add_round_key;
  logic [127:0] din, key, dout, expected;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.state_in(din), .round_key(key), .state_out(dout));

  task automatic check(logic [127:0] exp_v);
    #1;
    checks++;
    if (dout !== exp_v) begin
      failures++;
      $display("FAIL in=%h key=%h out=%h expected=%h", din, key, dout, exp_v);
    end
  endtask

  initial begin
    din = 128'h046681e5e0cb199a48f8d37a2806264c;
    key = 128'ha0fafe1788542cb123a339392a6c7605;
    check(128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 300; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      for (int n = 0; n < 16; n++) expected[8*n +: 8] = din[8*n +: 8] ^ key[8*n +: 8];
      check(expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
