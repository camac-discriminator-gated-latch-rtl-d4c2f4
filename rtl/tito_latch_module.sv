// tito_latch_module: one 16-channel discriminator-gated latch module.
//
// Each channel input goes through a comparator at THRESH_MV, a delay-type
// differentiator and a coincidence gate with the strobe and CAMAC inhibit;
// the gate output is the channel's NIM output and sets its latch. The NIM
// strobe and fast reset inputs are translated with a fixed NIM_BIAS_MV bias.
// The strobe is fanned out to all channels (or forced on by strobe_off); the
// latches are reset by the fast reset or by CAMAC C.S2. The latch word is read
// over the dataway when the station line N is asserted with F(0).A(0).
// Each 8-channel half drives an analog sum output, and the addition logic
// adds this module's latch count to the sum from the previous module and
// passes it on, with overflow and an m >= 1 output.
//
// Timing at the assumed 1 ns clock: NIM output one cycle after the input
// crosses threshold, latch (and LED, digital sum, analog sum) one cycle later.
// The sum chain is combinational end to end, as in the original MECL chain.
// The structure follows the document; the clock, the power-up reset rst_n,
// the CAMAC read code and the reset-input bias are this design's choices.
module tito_latch_module
  import tito_pkg::*;
#(
  parameter int unsigned N_CH        = 16,
  parameter int unsigned PULSE_W     = 8,
  parameter mv_t         THRESH_MV   = -16'sd100,
  parameter mv_t         NIM_BIAS_MV = -16'sd220
) (
  input  logic            clk,
  input  logic            rst_n,
  // front panel
  input  mv_t             vin [N_CH],   // channel inputs, mV
  input  mv_t             strobe_mv,    // NIM strobe
  input  mv_t             reset_mv,     // NIM fast reset
  input  logic            strobe_off,   // strobe mode switch OFF
  output logic [N_CH-1:0] nim_out,      // discriminator / coincidence outputs
  output logic [N_CH-1:0] led,          // latch indicators
  output logic            m_ge1,        // this module has m >= 1
  output mv_t             asum_mv [2],  // analog sums of the two halves
  // CAMAC dataway
  input  logic            camac_n,
  input  logic [3:0]      camac_a,
  input  logic [4:0]      camac_f,
  input  logic            camac_s2,
  input  logic            camac_c,
  input  logic            camac_i,
  output logic [N_CH-1:0] camac_r,
  output logic            camac_q,
  // auxiliary connector: multiplicity chain
  input  msum_t           prev,
  output msum_t           next,
  output logic            next_ovf_n
);

  logic [N_CH-1:0] disc, gate, b, a_n;
  logic            strobe, fast_reset, latch_rst;

  for (genvar ch = 0; ch < N_CH; ch++) begin : g_ch
    disc_comparator #(.THRESH_MV(THRESH_MV)) u_cmp (
      .vin_mv(vin[ch]), .out(disc[ch])
    );
    disc_channel #(.PULSE_W(PULSE_W)) u_chan (
      .clk      (clk),
      .rst_n    (rst_n),
      .disc     (disc[ch]),
      .gate     (gate[ch]),
      .inhibit  (camac_i),
      .latch_rst(latch_rst),
      .coinc    (nim_out[ch]),
      .b        (b[ch]),
      .a_n      (a_n[ch])
    );
  end

  disc_comparator #(.THRESH_MV(NIM_BIAS_MV)) u_strobe_in (
    .vin_mv(strobe_mv), .out(strobe)
  );
  disc_comparator #(.THRESH_MV(NIM_BIAS_MV)) u_reset_in (
    .vin_mv(reset_mv), .out(fast_reset)
  );

  strobe_reset_ctrl #(.N_CH(N_CH)) u_ctrl (
    .strobe    (strobe),
    .strobe_off(strobe_off),
    .fast_reset(fast_reset),
    .camac_c   (camac_c),
    .camac_s2  (camac_s2),
    .gate      (gate),
    .latch_rst (latch_rst)
  );

  camac_readout #(.N_CH(N_CH)) u_read (
    .n(camac_n), .a(camac_a), .f(camac_f), .latch(b), .r(camac_r), .q(camac_q)
  );

  analog_sum #(.N_IN(N_CH/2)) u_asum_lo (.a_n(a_n[N_CH/2-1:0]),    .vout_mv(asum_mv[0]));
  analog_sum #(.N_IN(N_CH/2)) u_asum_hi (.a_n(a_n[N_CH-1:N_CH/2]), .vout_mv(asum_mv[1]));

  addition_logic u_add (
    .b(b), .prev(prev), .next(next), .next_ovf_n(next_ovf_n), .m_ge1(m_ge1)
  );

  always_comb led = b;

  initial assert (N_CH == 16) else $error("the addition logic counts exactly 16 channels");

endmodule
