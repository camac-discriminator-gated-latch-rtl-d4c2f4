// analyzer: multiplicity logic of the analyzer (crate controller) module.
//
// The final sum from the last latch module is decoded into one line per
// multiplicity (mult_decoder). The "greater than" outputs ge[N-1] (m >= N,
// N = 1..8) are ORs of the decoded lines from N upward, with the overflow line
// counting as m >= 8. The rotary switch n_select picks one of them; positions
// outside 1..8 select nothing. The unique outputs and the selected output are
// strobed (ANDed) with the translated NIM strobe, the delayed master trigger,
// to give the strobed unique outputs and the streamer chamber trigger.
//
// All combinational: outputs follow the strobe within the same cycle. The
// structure follows the document; the gating of the greater-than logic is
// this design's own, and so is the -220 mV bias of the strobe translator.
module analyzer
  import tito_pkg::*;
#(
  parameter mv_t NIM_BIAS_MV = -16'sd220
) (
  input  msum_t      sum,        // final multiplicity lines
  input  mv_t        strobe_mv,  // delayed trigger, NIM level
  input  logic [3:0] n_select,   // rotary switch: required multiplicity N
  output logic [8:0] uniq,     // strobed unique outputs, m = 0..7, >= 8
  output logic [7:0] ge,         // ge[k]: m >= k+1, unstrobed
  output logic       trigger     // strobed m >= N
);

  logic [8:0] dec;
  logic       strobe;
  logic       selected;

  mult_decoder u_dec (.sum(sum), .uniq(dec));

  disc_comparator #(.THRESH_MV(NIM_BIAS_MV)) u_strobe_in (
    .vin_mv(strobe_mv), .out(strobe)
  );

  always_comb begin
    for (int k = 0; k < 8; k++) ge[k] = |(dec >> (k + 1));
    if (n_select >= 4'd1 && n_select <= 4'd8) selected = ge[3'(n_select - 4'd1)];
    else                                       selected = 1'b0;
    uniq  = dec & {9{strobe}};
    trigger = selected & strobe;
  end

endmodule
