// tb_mulaw_decoder: self-checking testbench for mulaw_decoder.
//
// Decodes all 256 codes, in random order and with gaps, and compares with the
// reference expander (the biased table 1,step,1 shifted by the chord, minus
// 33). Checks printed end points (8'hFF is 0, 8'h80 is +8031, 8'h00 is
// -8031), the one-clock latency, and that encoding then decoding any 14-bit
// sample lands within half a quantization step of it.
module tb_mulaw_decoder;
  import ref_pkg::*;

  logic               clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [7:0]         in_code = 8'hFF;
  logic signed [13:0] out_sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mulaw_decoder dut (.clk, .rst_n, .in_valid, .in_code, .out_valid, .out_sample);

  task automatic apply(logic [7:0] c, int exp_v);
    @(negedge clk);
    in_valid = 1; in_code = c;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || int'(out_sample) != exp_v) begin
      failures++; $display("FAIL code=%h out=%0d valid=%b expected=%0d", c, out_sample, out_valid, exp_v);
    end
    if ($urandom_range(0, 1)) begin
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid without input"); end
    end
  endtask

  initial begin
    int order[256];
    int x, y, half;
    repeat (3) @(negedge clk);
    rst_n = 1;
    apply(8'hFF, 0);
    apply(8'h80, 8031);
    apply(8'h00, -8031);
    apply(8'h7F, 0);
    for (int i = 0; i < 256; i++) order[i] = i;
    order.shuffle();
    foreach (order[i]) apply(8'(order[i]), mulaw_decode(8'(order[i])));
    // Round trip through the reference encoder.
    for (int i = 0; i < 400; i++) begin
      logic [7:0] c;
      x = int'($urandom_range(0, 16316)) - 8158;
      c = mulaw_encode(x);
      half = 1 << ((~c >> 4) & 7);       // half of the step width
      apply(c, mulaw_decode(c));
      y = int'(out_sample);
      checks++;
      if (y - x > half || x - y > half) begin
        failures++; $display("FAIL round trip x=%0d y=%0d", x, y);
      end
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
