// tb_aes_shift_rows: self-checking testbench for aes_shift_rows.
//
// Drives the 128-bit state and compares the output with an independent reference model
// (ref_pkg::shift_rows), first on the FIPS-197 Appendix B example and then on
// random states. A watchdog ends the run if it hangs.
module tb_aes_shift_rows;
  import ref_pkg::*;

  logic [127:0] din, dout, expected;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.state_in(din), .state_out(dout));

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
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int i = 0; i < 300; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      check(shift_rows(din));
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
