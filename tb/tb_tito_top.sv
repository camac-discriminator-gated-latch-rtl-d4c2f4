// tb_tito_top: end-to-end run of the full system at its default size, five
// latch modules (80 channels) and the analyzer.
//
// Each event fires a random set of channels (multiplicity 0..16, so both
// sides of every switch setting and the overflow case occur) inside the
// 20-cycle strobe, plus, in some events, a stray pulse outside the strobe that
// must not be latched. The analyzer strobe then samples the decision. The
// testbench checks the final sum lines, the strobed unique outputs, all
// greater-than outputs, the trigger against the switch setting N, and the
// per-module m >= 1 and analog outputs. Accepted events (m >= N) are read out
// word by word over the CAMAC dataway and cleared with C.S2; rejected events
// are cleared with the fast NIM reset. Some events use strobe-off mode on one
// module or raise CAMAC inhibit. Each of these mechanisms is counted and must
// occur at least once.
module tb_tito_top;
  import tito_pkg::*;

  localparam int NM = 5;
  localparam int NCH = NM * 16;

  logic            clk = 1'b0, rst_n = 1'b0;
  mv_t             vin [NCH];
  mv_t             strobe_mv [NM];
  mv_t             reset_mv [NM];
  logic [NM-1:0]   strobe_off;
  logic [15:0]     nim_out [NM];
  logic [15:0]     led [NM];
  logic [NM-1:0]   m_ge1;
  mv_t             asum_mv [NM][2];
  logic [NM-1:0]   camac_n;
  logic [3:0]      camac_a;
  logic [4:0]      camac_f;
  logic            camac_s2, camac_c, camac_i;
  logic [15:0]     camac_r;
  logic            camac_q;
  mv_t             an_strobe_mv;
  logic [3:0]      n_select;
  msum_t           sum;
  logic            sum_ovf_n;
  logic [8:0]      uniq;
  logic [7:0]      ge;
  logic            trigger;

  int checks = 0, failures = 0;
  int n_accept = 0, n_reject = 0, n_ovf = 0, n_stray = 0, n_inhibit = 0;
  int n_strobe_off = 0, n_fast_reset = 0, n_camac_clear = 0, n_readout = 0;

  tito_top dut (
    .clk(clk), .rst_n(rst_n), .vin(vin), .strobe_mv(strobe_mv), .reset_mv(reset_mv),
    .strobe_off(strobe_off), .nim_out(nim_out), .led(led), .m_ge1(m_ge1), .asum_mv(asum_mv),
    .camac_n(camac_n), .camac_a(camac_a), .camac_f(camac_f), .camac_s2(camac_s2),
    .camac_c(camac_c), .camac_i(camac_i), .camac_r(camac_r), .camac_q(camac_q),
    .an_strobe_mv(an_strobe_mv), .n_select(n_select), .sum(sum), .sum_ovf_n(sum_ovf_n),
    .uniq(uniq), .ge(ge), .trigger(trigger));

  always #0.5 clk = ~clk;

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, want);
    end
  endtask

  // A random set of exactly k channels out of NCH.
  function automatic logic [NCH-1:0] pick(input int k);
    logic [NCH-1:0] m = '0;
    int placed = 0;
    while (placed < k) begin
      int c = $urandom_range(0, NCH - 1);
      if (!m[c]) begin m[c] = 1'b1; placed++; end
    end
    return m;
  endfunction

  initial begin
    logic [NCH-1:0] mask, stray, exp_latch;
    logic [NM-1:0]  off_sel;
    logic           inh, strobed_trig;
    logic [8:0]     uniq_before;
    int             m, n, k, stray_ch;
    logic [15:0]    w;

    for (int c = 0; c < NCH; c++) vin[c] = '0;
    for (int i = 0; i < NM; i++) begin strobe_mv[i] = '0; reset_mv[i] = '0; end
    strobe_off = '0; camac_n = '0; camac_a = '0; camac_f = '0;
    camac_s2 = 0; camac_c = 0; camac_i = 0; an_strobe_mv = '0; n_select = 4'd1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int ev = 0; ev < 60; ev++) begin
      k = (ev < 17) ? ev : $urandom_range(0, 16);
      mask = pick(k);
      n = $urandom_range(1, 8);
      n_select = 4'(n);
      inh = (ev % 13 == 7);
      off_sel = (ev % 11 == 5) ? NM'(1) << $urandom_range(0, NM - 1) : '0;
      strobe_off = off_sel;
      stray = '0;
      if (ev % 3 == 1) begin
        stray_ch = $urandom_range(0, NCH - 1);
        if (!off_sel[stray_ch / 16] && !mask[stray_ch]) stray[stray_ch] = 1'b1;
      end

      // expected latches: in-strobe pulses, unless inhibited
      exp_latch = inh ? '0 : mask;
      m = $countones(exp_latch);

      // the event: pulses 12..23 in strobe 10..29; stray pulse 40..51
      for (int t = 0; t < 64; t++) begin
        for (int c = 0; c < NCH; c++)
          vin[c] = ((mask[c] && t >= 12 && t < 24) || (stray[c] && t >= 40 && t < 52))
                   ? NIM_ONE_MV : mv_t'(0);
        for (int i = 0; i < NM; i++)
          strobe_mv[i] = (t >= 10 && t < 30) ? NIM_ONE_MV : mv_t'(0);
        camac_i = inh && t >= 5 && t < 35;
        @(negedge clk);
      end
      camac_i = 1'b0;
      strobe_off = '0;
      if (inh) n_inhibit++;
      if (off_sel != 0) n_strobe_off++;
      if (stray != 0) n_stray++;

      for (int i = 0; i < NM; i++) begin
        expect_eq($sformatf("ev%0d led[%0d]", ev, i), led[i], exp_latch[i*16 +: 16]);
        expect_eq($sformatf("ev%0d m_ge1[%0d]", ev, i), m_ge1[i], exp_latch[i*16 +: 16] != 0);
        expect_eq($sformatf("ev%0d asum[%0d]", ev, i), asum_mv[i][0] + asum_mv[i][1],
                  -100 * $countones(exp_latch[i*16 +: 16]));
      end

      // decision: sum lines and unstrobed greater-than outputs
      expect_eq($sformatf("ev%0d ovf", ev), sum.ovf, m >= 8);
      expect_eq($sformatf("ev%0d ovf_n", ev), sum_ovf_n, m < 8);
      if (m < 8) expect_eq($sformatf("ev%0d sum", ev), sum.sum, m);
      for (int j = 0; j < 8; j++) expect_eq($sformatf("ev%0d ge%0d", ev, j + 1), ge[j], m >= j + 1);
      if (m >= 8) n_ovf++;
      uniq_before = uniq;
      expect_eq($sformatf("ev%0d uniq unstrobed", ev), uniq_before, 0);
      expect_eq($sformatf("ev%0d trigger unstrobed", ev), trigger, 0);

      // delayed master trigger samples the analyzer
      an_strobe_mv = NIM_ONE_MV;
      #0.1;
      strobed_trig = trigger;
      expect_eq($sformatf("ev%0d trigger N=%0d m=%0d", ev, n, m), strobed_trig, m >= n);
      expect_eq($sformatf("ev%0d uniq", ev), uniq, 9'h1 << ((m >= 8) ? 8 : m));
      @(negedge clk);
      an_strobe_mv = '0;

      if (strobed_trig) begin
        // accepted: read every module's word, then clear via CAMAC C.S2
        n_accept++;
        for (int i = 0; i < NM; i++) begin
          camac_n = NM'(1) << i; camac_f = CAMAC_F_READ; camac_a = 4'd0;
          #0.1;
          w = camac_r;
          expect_eq($sformatf("ev%0d read word %0d", ev, i), w, exp_latch[i*16 +: 16]);
          expect_eq($sformatf("ev%0d Q %0d", ev, i), camac_q, 1);
          @(negedge clk);
          n_readout++;
        end
        camac_n = '0;
        camac_c = 1'b1; camac_s2 = 1'b1;
        @(negedge clk);
        camac_c = 1'b0; camac_s2 = 1'b0;
        n_camac_clear++;
      end else begin
        // rejected: fast reset on every module
        n_reject++;
        for (int i = 0; i < NM; i++) reset_mv[i] = NIM_ONE_MV;
        @(negedge clk);
        for (int i = 0; i < NM; i++) reset_mv[i] = '0;
        n_fast_reset++;
      end
      @(negedge clk);
      for (int i = 0; i < NM; i++) expect_eq($sformatf("ev%0d cleared %0d", ev, i), led[i], 0);
      expect_eq($sformatf("ev%0d sum after clear", ev), sum, 0);
    end

    $display("mechanisms: accept=%0d reject=%0d overflow=%0d stray=%0d inhibit=%0d strobe_off=%0d fast_reset=%0d camac_clear=%0d readout=%0d",
             n_accept, n_reject, n_ovf, n_stray, n_inhibit, n_strobe_off, n_fast_reset, n_camac_clear, n_readout);
    expect_eq("accept seen", n_accept > 0, 1);
    expect_eq("reject seen", n_reject > 0, 1);
    expect_eq("overflow seen", n_ovf > 0, 1);
    expect_eq("stray pulse seen", n_stray > 0, 1);
    expect_eq("inhibit seen", n_inhibit > 0, 1);
    expect_eq("strobe-off seen", n_strobe_off > 0, 1);
    expect_eq("fast reset seen", n_fast_reset > 0, 1);
    expect_eq("camac clear seen", n_camac_clear > 0, 1);
    expect_eq("readout seen", n_readout > 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
