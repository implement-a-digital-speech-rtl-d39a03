// mulaw_encoder: G.711 mu-law compressor, 14-bit linear PCM to an 8-bit code.
//
// The sample is split into sign and magnitude, the magnitude is limited to
// CLIP (8158) and the bias of 33 is added, giving a 13-bit value of at least
// 33. The chord (segment) is found by looking for the highest set bit from
// bit 12 down to bit 5: a leading one in bit 5+s gives chord s. The four bits
// below the leading one are the step; the bits under them are dropped. The
// code {sign, chord, step} is sent inverted, so silence becomes 8'hFF and
// positive samples have bit 7 set.
// Interface: one register stage with valid/ready; a sample taken in cycle t
// appears on out_code in cycle t+1 and is held while out_ready is low.
// Bias, chord search from the MSB and the inversion follow the design
// description; the clip level and the handshake are this design's choices
// (the clip level is the G.711 one).
module mulaw_encoder #(
  parameter int unsigned SAMPLE_W = 14,
  parameter int unsigned BIAS     = 33,
  parameter int unsigned CLIP     = 8158
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic signed [SAMPLE_W-1:0] in_sample,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [7:0]                 out_code
);
  logic              sign;
  logic [SAMPLE_W:0] mag, clipped, biased;   // one extra bit holds 2^(SAMPLE_W-1)
  logic [2:0]        chord;
  logic [3:0]        step;
  logic [7:0]        code;

  always_comb begin
    sign    = in_sample[SAMPLE_W-1];
    mag     = sign ? (SAMPLE_W+1)'(-$signed({in_sample[SAMPLE_W-1], in_sample}))
                   : (SAMPLE_W+1)'(in_sample);
    clipped = (mag > (SAMPLE_W+1)'(CLIP)) ? (SAMPLE_W+1)'(CLIP) : mag;
    biased  = clipped + (SAMPLE_W+1)'(BIAS);
    // Leading one among bits 12..5 of the biased magnitude.
    chord = 3'd0;
    for (int s = 1; s < 8; s++)
      if (biased[5+s]) chord = 3'(s);
    step = 4'(biased >> ({1'b0, chord} + 4'd1));
    code = ~{sign, chord, step};
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_code  <= 8'hFF;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_code <= code;
    end
  end
endmodule
