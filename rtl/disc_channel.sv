// disc_channel: one discriminator-gated latch channel.
//
// The comparator output passes through the delay-type differentiator
// (pulse_shaper), then through a three-input coincidence gate with the strobe
// gate and the complement of the CAMAC inhibit. The gate output is the
// channel's NIM output (coinc) and sets the channel latch. The latch is reset
// by latch_rst (fast NIM reset ORed with CAMAC C.S2, formed outside).
//
// Timing: coinc is combinational from the shaped pulse, so it follows the
// comparator input by one clock. The latch, a clocked set/reset flip-flop
// standing in for the original cross-coupled gates, shows the coincidence
// one clock later. If set and reset arrive in the same cycle, reset wins (this
// design's choice). b is the positive-true latch output that feeds the digital
// sum and the readout; a_n is the negative-true output that feeds the analog
// sum. rst_n is a power-up reset of this design's own.
module disc_channel #(
  parameter int unsigned PULSE_W = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic disc,       // comparator output
  input  logic gate,       // strobe gate, or 1 in strobe-off mode
  input  logic inhibit,    // CAMAC I: blocks the coincidence gate
  input  logic latch_rst,  // latch reset
  output logic coinc,      // coincidence pulse, to the NIM output
  output logic b,          // latch, positive true
  output logic a_n         // latch, negative true
);

  logic pulse;

  pulse_shaper #(.PULSE_W(PULSE_W)) u_shaper (
    .clk  (clk),
    .rst_n(rst_n),
    .in   (disc),
    .pulse(pulse)
  );

  always_comb coinc = pulse & gate & ~inhibit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         b <= 1'b0;
    else if (latch_rst) b <= 1'b0;
    else if (coinc)     b <= 1'b1;
  end

  always_comb a_n = ~b;

endmodule
