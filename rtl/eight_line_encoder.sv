// eight_line_encoder: count of eight latch lines as "1","2","4","8" bits.
//
// Two four_line_encoder instances give counts x and y (0..4 each). They are
// combined with gates that exploit the fact that each is at most 4:
//   "1" = x1 ^ y1
//   "2" = x2 ^ y2 ^ (x1 & y1)
//   "4" = (x1 & y1 & (x2 | y2)) | (x2 & y2) | (x4 ^ y4)
//   "8" = x4 & y4
// The structure follows the document; the "single 4 input" term is read as
// exactly one of the two "4" lines, which makes 4+4 give only the "8" line.
// Combinational.
module eight_line_encoder (
  input  logic [7:0] d,
  output logic [3:0] s   // s[0]="1", s[1]="2", s[2]="4", s[3]="8"
);

  logic [2:0] x, y;

  four_line_encoder u_lo (.d(d[3:0]), .s(x));
  four_line_encoder u_hi (.d(d[7:4]), .s(y));

  always_comb begin
    s[0] = x[0] ^ y[0];
    s[1] = x[1] ^ y[1] ^ (x[0] & y[0]);
    s[2] = (x[0] & y[0] & (x[1] | y[1])) | (x[1] & y[1]) | (x[2] ^ y[2]);
    s[3] = x[2] & y[2];
  end

endmodule
