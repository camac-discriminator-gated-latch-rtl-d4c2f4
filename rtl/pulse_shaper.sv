// pulse_shaper: delay-type differentiator that follows each channel's
// comparator.
//
// The comparator level is registered once (stage 0) and then delayed by a
// shift register of PULSE_W further stages. The output is stage 0 AND NOT the
// delayed copy, so a leading edge gives a pulse of exactly PULSE_W cycles if
// the input stays true that long, and a pulse as long as the input otherwise.
// A level that stays true gives only one pulse: the discriminator is slope
// sensitive, as the original is.
//
// Timing: an input that is true before clock edge k gives pulse = 1 from edge
// k through edge k+PULSE_W-1. PULSE_W = 8 matches the document's ~8 ns pulse at
// the 1 ns clock this design assumes. Reset (rst_n low, asynchronous) clears
// the delay line; that reset is this design's own addition.
module pulse_shaper #(
  parameter int unsigned PULSE_W = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in,
  output logic pulse
);

  logic [PULSE_W:0] dly;  // dly[0] = sampled input, dly[PULSE_W] = delayed copy

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dly <= '0;
    else        dly <= {dly[PULSE_W-1:0], in};
  end

  always_comb pulse = dly[0] & ~dly[PULSE_W];

endmodule
