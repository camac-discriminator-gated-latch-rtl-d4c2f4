// disc_comparator: behavioural model of the tandem MC1020 comparator and
// level translator used at every analog or NIM input of the latch module.
//
// This is a behavioural model of an analog part, not synthesizable logic in
// the original: the input voltage is a signed millivolt number and the output
// is the logic level it translates to. The output is 1 while the input is more
// negative than the threshold THRESH_MV (negative-going phototube and NIM
// pulses). The model is instantaneous; the document gives the threshold range
// (-50 mV to -500 mV, -100 mV nominal for channels, a fixed -220 mV bias for
// the strobe) and the model has no hysteresis, slewing or delay.
module disc_comparator
  import tito_pkg::*;
#(
  parameter mv_t THRESH_MV = -16'sd100
) (
  input  mv_t  vin_mv,  // input voltage, mV
  output logic out      // 1 while vin_mv < THRESH_MV
);

  always_comb out = (vin_mv < THRESH_MV);

endmodule
