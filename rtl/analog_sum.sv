// analog_sum: behavioural model of the MC1035 summing amplifier and emitter
// follower that give one analog output per 8-channel half.
//
// This is a model of an analog circuit. Each negative-true latch output that
// is active adds one step of STEP_MV (the document's 100 mV per latch, at NIM
// polarity) to the output, so the output has one level per latch count. The
// offset adjustment, nonlinearity and the ~30 ns delay of the real circuit are
// not modelled. Output in signed millivolts, combinational.
module analog_sum
  import tito_pkg::*;
#(
  parameter int unsigned N_IN    = 8,
  parameter mv_t         STEP_MV = -16'sd100
) (
  input  logic [N_IN-1:0] a_n,     // negative-true latch outputs
  output mv_t             vout_mv  // analog sum, mV
);

  always_comb begin
    vout_mv = '0;
    for (int i = 0; i < N_IN; i++)
      if (!a_n[i]) vout_mv = vout_mv + STEP_MV;
  end

endmodule
