// camac_readout: latch word readout onto the CAMAC dataway.
//
// When the module's station line N is asserted with the read function F(0)
// at subaddress A(0), the latch bits drive the read lines R1..R16 and the
// module answers Q = 1. Otherwise all outputs are 0, so the R lines of
// several modules can be ORed, like the open-collector gates of the original.
// Combinational. Readout under N control follows the document; the function
// code, subaddress and Q response are this design's choice.
module camac_readout
  import tito_pkg::*;
#(
  parameter int unsigned N_CH = 16
) (
  input  logic            n,      // station number line
  input  logic [3:0]      a,      // subaddress
  input  logic [4:0]      f,      // function code
  input  logic [N_CH-1:0] latch,  // latch states, positive true
  output logic [N_CH-1:0] r,      // read lines
  output logic            q       // Q response
);

  logic sel;

  always_comb begin
    sel = n && (f == CAMAC_F_READ) && (a == 4'd0);
    r   = sel ? latch : '0;
    q   = sel;
  end

endmodule
