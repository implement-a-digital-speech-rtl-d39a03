// mulaw_decoder: G.711 mu-law expander, 8-bit code to 14-bit linear PCM.
//
// The received code is inverted back to {sign, chord, step}. The biased
// magnitude is the pattern 1,step,1 shifted left by the chord, so the
// leading one marks the segment and the trailing one puts the result in the
// middle of the interval whose low bits the encoder dropped:
//   chord 0: 0000000 1 abcd 1,  chord 7: 1 abcd 1 0000000.
// Removing the bias of 33 and applying the sign gives the sample.
// Interface: one register stage without back-pressure; a code taken in cycle
// t appears on out_sample in cycle t+1. The expansion table follows the design
// description; removing the bias and the handshake are this design's choices.
module mulaw_decoder #(
  parameter int unsigned SAMPLE_W = 14,
  parameter int unsigned BIAS     = 33
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [7:0]                 in_code,
  output logic                       out_valid,
  output logic signed [SAMPLE_W-1:0] out_sample
);
  logic [7:0]            u;
  logic [SAMPLE_W-2:0]   biased, mag;
  logic signed [SAMPLE_W-1:0] value;

  always_comb begin
    u      = ~in_code;
    biased = (SAMPLE_W-1)'({1'b1, u[3:0], 1'b1}) << u[6:4];
    mag    = biased - (SAMPLE_W-1)'(BIAS);
    value  = u[7] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_sample <= value;
    end
  end
endmodule
