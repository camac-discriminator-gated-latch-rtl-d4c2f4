// ripple_adder: W-bit ripple-carry adder built from full_adder cells, as the
// MC1019 ranks of the addition logic are connected. Combinational; the carry
// ripples from bit 0 to bit W-1 and leaves as cout.
module ripple_adder #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end

  assign cout = c[W];

endmodule
