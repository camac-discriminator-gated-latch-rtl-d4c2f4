// tito_top: hodoscope trigger electronics of N_MODULES discriminator-gated
// latch modules and one multiplicity analyzer.
//
// Every latch module discriminates, strobes and latches its 16 phototube
// channels and adds its latch count to the multiplicity sum arriving from the
// module before it; the first module starts from zero and the last one feeds
// the analyzer. The analyzer decodes the final sum into unique multiplicity
// outputs and, when the required multiplicity N set on its switch is reached,
// gives the streamer chamber trigger at its strobe. Rejected events are
// cleared with the fast NIM reset; accepted events are read over the CAMAC
// dataway, one 16-bit word per module selected by its N line, and cleared
// with C.S2.
//
// Timing (1 ns clock): channel input to latch 2 cycles; latch to analyzer
// outputs combinational. The modules share the dataway lines A, F, S2, C, I
// and have one N line each; the R lines and Q are ORed, as on the dataway.
// Five modules (80 channels) is the document's configuration.
module tito_top
  import tito_pkg::*;
#(
  parameter int unsigned N_MODULES   = 5,
  parameter int unsigned PULSE_W     = 8,
  parameter mv_t         THRESH_MV   = -16'sd100,
  parameter mv_t         NIM_BIAS_MV = -16'sd220
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mv_t                  vin       [N_MODULES*16],
  input  mv_t                  strobe_mv [N_MODULES],
  input  mv_t                  reset_mv  [N_MODULES],
  input  logic [N_MODULES-1:0] strobe_off,
  output logic [15:0]          nim_out   [N_MODULES],
  output logic [15:0]          led       [N_MODULES],
  output logic [N_MODULES-1:0] m_ge1,
  output mv_t                  asum_mv   [N_MODULES][2],
  input  logic [N_MODULES-1:0] camac_n,
  input  logic [3:0]           camac_a,
  input  logic [4:0]           camac_f,
  input  logic                 camac_s2,
  input  logic                 camac_c,
  input  logic                 camac_i,
  output logic [15:0]          camac_r,
  output logic                 camac_q,
  input  mv_t                  an_strobe_mv,
  input  logic [3:0]           n_select,
  output msum_t                sum,
  output logic                 sum_ovf_n,
  output logic [8:0]           uniq,
  output logic [7:0]           ge,
  output logic                 trigger
);

  msum_t           chain   [N_MODULES+1];
  logic            ovf_n   [N_MODULES];
  logic [15:0]     r_mod   [N_MODULES];
  logic [N_MODULES-1:0] q_mod;

  assign chain[0] = '0;

  for (genvar m = 0; m < N_MODULES; m++) begin : g_mod
    tito_latch_module #(
      .N_CH(16), .PULSE_W(PULSE_W), .THRESH_MV(THRESH_MV), .NIM_BIAS_MV(NIM_BIAS_MV)
    ) u_mod (
      .clk       (clk),
      .rst_n     (rst_n),
      .vin       (vin[m*16 +: 16]),
      .strobe_mv (strobe_mv[m]),
      .reset_mv  (reset_mv[m]),
      .strobe_off(strobe_off[m]),
      .nim_out   (nim_out[m]),
      .led       (led[m]),
      .m_ge1     (m_ge1[m]),
      .asum_mv   (asum_mv[m]),
      .camac_n   (camac_n[m]),
      .camac_a   (camac_a),
      .camac_f   (camac_f),
      .camac_s2  (camac_s2),
      .camac_c   (camac_c),
      .camac_i   (camac_i),
      .camac_r   (r_mod[m]),
      .camac_q   (q_mod[m]),
      .prev      (chain[m]),
      .next      (chain[m+1]),
      .next_ovf_n(ovf_n[m])
    );
  end

  always_comb begin
    camac_r = '0;
    for (int m = 0; m < N_MODULES; m++) camac_r = camac_r | r_mod[m];
    camac_q = |q_mod;
  end

  assign sum       = chain[N_MODULES];
  assign sum_ovf_n = ovf_n[N_MODULES-1];

  analyzer #(.NIM_BIAS_MV(NIM_BIAS_MV)) u_analyzer (
    .sum      (sum),
    .strobe_mv(an_strobe_mv),
    .n_select (n_select),
    .uniq     (uniq),
    .ge       (ge),
    .trigger  (trigger)
  );

endmodule
