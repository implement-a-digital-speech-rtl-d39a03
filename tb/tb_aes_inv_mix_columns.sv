// tb_aes_inv_mix_columns: self-checking testbench for aes_inv_mix_columns.
//
// Drives the 128-bit state and compares the output with an independent reference model
// (ref_pkg::inv_mix_columns), first on the FIPS-197 Appendix B example and then on
// random states. A watchdog ends the run if it hangs.
module tb_aes_inv_mix_columns;
  import ref_pkg::*;

  logic [127:0] din, dout, expected;
  int checks = 0, failures = 0;

  aes_inv_mix_columns dut (.state_in(din), .state_out(dout));

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
    din = 128'h046681e5e0cb199a48f8d37a2806264c;
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int i = 0; i < 300; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      check(inv_mix_columns(din));
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
