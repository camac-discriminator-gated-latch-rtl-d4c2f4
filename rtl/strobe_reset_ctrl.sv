// strobe_reset_ctrl: strobe fan-out and latch reset of a latch module.
//
// The translated strobe is fanned out through four gates, each enabling a
// group of four coincidence gates. The strobe-off switch forces all four
// gates on, so the module then works as an ungated discriminator. The latch
// reset is the OR of the fast NIM reset and the CAMAC clear C gated by S2.
// All paths are combinational. The four-way grouping follows the document;
// with N_CH other than 16 the groups are N_CH/4 channels wide.
module strobe_reset_ctrl #(
  parameter int unsigned N_CH = 16
) (
  input  logic            strobe,      // translated NIM strobe
  input  logic            strobe_off,  // strobe mode switch in OFF position
  input  logic            fast_reset,  // translated NIM reset
  input  logic            camac_c,     // dataway clear C
  input  logic            camac_s2,    // dataway strobe S2
  output logic [N_CH-1:0] gate,        // per-channel coincidence enable
  output logic            latch_rst    // reset to all latches
);

  localparam int unsigned GROUP = N_CH / 4;

  logic [3:0] fanout;

  always_comb begin
    for (int g = 0; g < 4; g++) fanout[g] = strobe | strobe_off;
    for (int ch = 0; ch < N_CH; ch++) gate[ch] = fanout[ch / GROUP];
  end

  always_comb latch_rst = fast_reset | (camac_c & camac_s2);

  initial assert (N_CH % 4 == 0) else $error("N_CH must be a multiple of 4");

endmodule
