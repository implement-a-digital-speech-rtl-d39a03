// tb_aes_sub_bytes: self-checking testbench for aes_sub_bytes.
//
// Drives the 128-bit state and compares the output with an independent reference model
// (ref_pkg::sub_bytes), first on the FIPS-197 Appendix B example and then on
// random states. A watchdog ends the run if it hangs.
module tb_aes_sub_bytes;
  import ref_pkg::*;

  logic [127:0] din, dout, expected;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.state_in(din), .state_out(dout));

  task automatic check(logic [127:0] exp_v);
    #1;
    checks++;
    if (dout !== exp_v) begin
      failures++;
      $display("FAIL in=%h out=%h expected=%h", din, dout, exp_v);
    end
  endtask

  initial begin
    build_tables();
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    check(128'hd42711aee0bf98f1b8b45de51e415230);
    // Every byte value in every byte position.
    for (int v = 0; v < 256; v++) begin
      din = {16{8'(v)}};
      check({16{SB[v]}});
      din = {16{8'(v)}} ^ 128'h000102030405060708090a0b0c0d0e0f;
      check(sub_bytes(din));
    end
    for (int i = 0; i < 300; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      check(sub_bytes(din));
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
