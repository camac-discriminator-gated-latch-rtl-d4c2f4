// mult_decoder: unique-multiplicity decoder of the analyzer.
//
// The "1","2","4" sum lines are first gated with the complement of overflow,
// so that during overflow only the overflow output is true; then a 3-to-8
// decoder (the MC1043 of the original) gives one line per multiplicity 0..7.
// The gated lines read as zero during overflow, so the decoder's zero line is
// also disabled by overflow (this design's choice).
// uniq[8] is the overflow line (m >= 8). Exactly one output is true for any
// input. Combinational; structure as in the document.
module mult_decoder
  import tito_pkg::*;
(
  input  msum_t      sum,
  output logic [8:0] uniq   // uniq[k]: m == k for k < 8; uniq[8]: m >= 8
);

  logic [2:0] gated;
  logic [7:0] dec;

  always_comb begin
    gated = sum.sum & {3{~sum.ovf}};
    dec   = 8'h01 << gated;
    // gating leaves only the zero line of the decoder to suppress
    uniq  = {sum.ovf, dec[7:1], dec[0] & ~sum.ovf};
  end

endmodule
