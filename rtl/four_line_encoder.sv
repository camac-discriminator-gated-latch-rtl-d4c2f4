// four_line_encoder: gate-level count of four latch lines.
//
// The four inputs are taken as two pairs (A,B) and (C,D). The "1" bit is the
// parity of all four, the "2" bit is true for one in each pair or for two in
// exactly one pair, and the "4" bit only when all four are true. These are the
// document's equations; the OR in the "2" bit was a wired emitter OR.
// Combinational.
module four_line_encoder (
  input  logic [3:0] d,  // d[0]=A, d[1]=B, d[2]=C, d[3]=D
  output logic [2:0] s   // s[0]="1", s[1]="2", s[2]="4"
);

  logic x_ab, x_cd, n_ab, n_cd;

  always_comb begin
    x_ab = d[0] ^ d[1];
    x_cd = d[2] ^ d[3];
    n_ab = d[0] & d[1];
    n_cd = d[2] & d[3];
    s[0] = x_ab ^ x_cd;
    s[1] = (x_ab & x_cd) | (n_ab ^ n_cd);
    s[2] = n_ab & n_cd;
  end

endmodule
