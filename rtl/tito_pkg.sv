// tito_pkg: types and constants shared by the discriminator-gated latch
// modules and the multiplicity analyzer.
//
// Analog levels (phototube pulses, NIM logic levels, analog sum outputs) are
// carried as signed integers in millivolts so the behavioural models of the
// analog parts can sit in the same netlist as the logic. The multiplicity sum
// that travels from module to module is the four-line bundle of the original
// system: binary weights 1, 2, 4 plus an overflow line meaning m >= 8.
package tito_pkg;

  // Voltage in millivolts, signed (NIM logic "1" is about -800 mV).
  typedef logic signed [15:0] mv_t;

  // Accumulated multiplicity passed along the chain of latch modules.
  typedef struct packed {
    logic       ovf;  // m >= 8
    logic [2:0] sum;  // m modulo 8, binary "4","2","1"
  } msum_t;

  // Logic levels of the NIM standard, in millivolts.
  localparam mv_t NIM_ONE_MV  = -16'sd800;

  // CAMAC function code used to read the latch word (read group 1).
  localparam logic [4:0] CAMAC_F_READ = 5'd0;

endpackage
