// addition_logic: digital multiplicity sum of one 16-channel latch module.
//
// Each 8-channel half is counted by an eight_line_encoder. The first-rank
// ripple adder adds the two "1","2","4" counts; its carry, both "8" lines,
// the second-rank carry and the previous module's overflow are ORed into the
// outgoing overflow (m > 7). The second-rank adder adds the module count to
// the 3-bit sum arriving from the previous module; the result goes to the
// next module (or the analyzer) together with the overflow and its
// complement. m_ge1 is true when this module alone holds at least one latch.
//
// All combinational, like the original MECL chain. The structure follows the
// document. m_ge1 here also includes the first-rank carry, so that it is true
// for the 4+4 case, which is what the document says the output indicates.
module addition_logic
  import tito_pkg::*;
(
  input  logic [15:0] b,           // positive-true latch outputs b-1..b-16
  input  msum_t       prev,        // accumulated sum from the previous module
  output msum_t       next,        // accumulated sum to the next module
  output logic        next_ovf_n,  // complement of next.ovf
  output logic        m_ge1        // this module has m >= 1
);

  logic [3:0] lo, hi;
  logic [2:0] mod_sum;
  logic       c1, c2;

  eight_line_encoder u_enc_lo (.d(b[7:0]),  .s(lo));
  eight_line_encoder u_enc_hi (.d(b[15:8]), .s(hi));

  ripple_adder #(.W(3)) u_rank1 (
    .a(lo[2:0]), .b(hi[2:0]), .cin(1'b0), .s(mod_sum), .cout(c1)
  );

  ripple_adder #(.W(3)) u_rank2 (
    .a(mod_sum), .b(prev.sum), .cin(1'b0), .s(next.sum), .cout(c2)
  );

  always_comb begin
    next.ovf   = lo[3] | hi[3] | c1 | c2 | prev.ovf;
    next_ovf_n = ~next.ovf;
    m_ge1      = (|mod_sum) | lo[3] | hi[3] | c1;
  end

endmodule
