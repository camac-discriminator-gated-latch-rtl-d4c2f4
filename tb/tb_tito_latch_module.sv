// tb_tito_latch_module: events on one 16-channel module. Each event fires a
// random set of channels with phototube-like pulses (-800 mV, or just above
// or below the -100 mV threshold) inside a 20-cycle NIM strobe. After each
// event the testbench checks the latch word (LEDs and CAMAC readout with Q),
// the NIM output of every fired channel, both analog sums (-100 mV per latch),
// m >= 1 and the outgoing sum against a random incoming sum. It then clears
// the latches with the fast NIM reset or with CAMAC C.S2, in turn. Also run:
// strobe-off mode with no strobe, CAMAC inhibit, pulses outside the strobe,
// readout with a wrong function code and with N low.
module tb_tito_latch_module;
  import tito_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  mv_t         vin [16];
  mv_t         strobe_mv, reset_mv;
  logic        strobe_off;
  logic [15:0] nim_out, led, camac_r;
  logic        m_ge1, camac_q, next_ovf_n;
  mv_t         asum_mv [2];
  logic        camac_n, camac_s2, camac_c, camac_i;
  logic [3:0]  camac_a;
  logic [4:0]  camac_f;
  msum_t       prev, next;
  int checks = 0, failures = 0;

  tito_latch_module dut (
    .clk(clk), .rst_n(rst_n), .vin(vin), .strobe_mv(strobe_mv), .reset_mv(reset_mv),
    .strobe_off(strobe_off), .nim_out(nim_out), .led(led), .m_ge1(m_ge1), .asum_mv(asum_mv),
    .camac_n(camac_n), .camac_a(camac_a), .camac_f(camac_f), .camac_s2(camac_s2),
    .camac_c(camac_c), .camac_i(camac_i), .camac_r(camac_r), .camac_q(camac_q),
    .prev(prev), .next(next), .next_ovf_n(next_ovf_n));

  always #0.5 clk = ~clk;

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, want);
    end
  endtask

  // One event: channels in `mask` see amplitude `amp` during cycles 12..23,
  // the strobe (if `strobed`) covers cycles 10..29, or cycles 40..59 if `late`.
  task automatic fire(input logic [15:0] mask, input mv_t amp, input logic strobed,
                      input logic late, output logic [15:0] nim_seen);
    nim_seen = '0;
    for (int t = 0; t < 64; t++) begin
      for (int ch = 0; ch < 16; ch++)
        vin[ch] = (mask[ch] && t >= 12 && t < 24) ? amp : mv_t'(0);
      strobe_mv = (strobed && (late ? (t >= 40 && t < 60) : (t >= 10 && t < 30))) ? NIM_ONE_MV : mv_t'(0);
      @(negedge clk);
      nim_seen |= nim_out;
    end
  endtask

  task automatic read_word(output logic [15:0] w, output logic q);
    camac_n = 1'b1; camac_a = 4'd0; camac_f = CAMAC_F_READ;
    #0.1;
    w = camac_r; q = camac_q;
    camac_n = 1'b0;
    #0.1;
  endtask

  task automatic check_state(input string tag, input logic [15:0] exp_latch);
    logic [15:0] w;
    logic q;
    int m, cnt_lo, cnt_hi;
    prev = msum_t'($urandom_range(0, 15));
    #0.1;
    cnt_lo = $countones(exp_latch[7:0]);
    cnt_hi = $countones(exp_latch[15:8]);
    m = cnt_lo + cnt_hi + int'(prev.sum);
    expect_eq({tag, " led"}, led, exp_latch);
    read_word(w, q);
    expect_eq({tag, " camac R"}, w, exp_latch);
    expect_eq({tag, " camac Q"}, q, 1);
    expect_eq({tag, " asum lo"}, asum_mv[0], -100 * cnt_lo);
    expect_eq({tag, " asum hi"}, asum_mv[1], -100 * cnt_hi);
    expect_eq({tag, " m_ge1"}, m_ge1, (cnt_lo + cnt_hi) >= 1);
    expect_eq({tag, " ovf"}, next.ovf, prev.ovf || m >= 8);
    expect_eq({tag, " ovf_n"}, next_ovf_n, !(prev.ovf || m >= 8));
    if (!(prev.ovf || m >= 8)) expect_eq({tag, " sum"}, next.sum, m);
  endtask

  int use_camac_clear = 0;
  task automatic clear();
    if (use_camac_clear) begin
      camac_c = 1'b1; camac_s2 = 1'b1;
      @(negedge clk);
      camac_c = 1'b0; camac_s2 = 1'b0;
    end else begin
      reset_mv = NIM_ONE_MV;
      @(negedge clk);
      reset_mv = '0;
    end
    @(negedge clk);
    use_camac_clear ^= 1;
    expect_eq("cleared", led, 0);
  endtask

  initial begin
    logic [15:0] mask, nim_seen, w;
    logic q;
    for (int ch = 0; ch < 16; ch++) vin[ch] = '0;
    strobe_mv = '0; reset_mv = '0; strobe_off = 1'b0;
    camac_n = 0; camac_a = 0; camac_f = 0; camac_s2 = 0; camac_c = 0; camac_i = 0;
    prev = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // directed patterns, then random ones
    for (int k = 0; k < 40; k++) begin
      case (k)
        0: mask = 16'h0000;
        1: mask = 16'hffff;
        2: mask = 16'h0f0f;
        3: mask = 16'h00ff;
        4: mask = 16'h8001;
        default: mask = 16'($urandom);
      endcase
      fire(mask, NIM_ONE_MV, 1'b1, 1'b0, nim_seen);
      expect_eq($sformatf("ev%0d nim", k), nim_seen, mask);
      check_state($sformatf("ev%0d", k), mask);
      clear();
    end

    // threshold: -90 mV is below threshold magnitude, -150 mV is above
    fire(16'h00f0, -16'sd90, 1'b1, 1'b0, nim_seen);
    expect_eq("weak pulse ignored", led, 0);
    fire(16'h00f0, -16'sd150, 1'b1, 1'b0, nim_seen);
    expect_eq("pulse over threshold latched", led, 16'h00f0);
    clear();

    // pulse outside the strobe is not latched and gives no NIM output
    fire(16'h1234, NIM_ONE_MV, 1'b1, 1'b1, nim_seen);
    expect_eq("late strobe: latch", led, 0);
    expect_eq("late strobe: nim", nim_seen, 0);

    // strobe-off mode: ungated discriminator
    strobe_off = 1'b1;
    fire(16'h4321, NIM_ONE_MV, 1'b0, 1'b0, nim_seen);
    expect_eq("strobe off: nim", nim_seen, 16'h4321);
    expect_eq("strobe off: latch", led, 16'h4321);
    strobe_off = 1'b0;
    clear();

    // inhibit
    camac_i = 1'b1;
    fire(16'hffff, NIM_ONE_MV, 1'b1, 1'b0, nim_seen);
    expect_eq("inhibit: latch", led, 0);
    expect_eq("inhibit: nim", nim_seen, 0);
    camac_i = 1'b0;

    // readout is only for N with F(0).A(0)
    fire(16'h5a5a, NIM_ONE_MV, 1'b1, 1'b0, nim_seen);
    camac_n = 1'b1; camac_f = 5'd2; #0.1;
    expect_eq("wrong F: R", camac_r, 0);
    expect_eq("wrong F: Q", camac_q, 0);
    camac_f = 5'd0; camac_n = 1'b0; #0.1;
    expect_eq("no N: R", camac_r, 0);
    read_word(w, q);
    expect_eq("read", w, 16'h5a5a);
    // C without S2 does not clear
    camac_c = 1'b1; @(negedge clk); camac_c = 1'b0; @(negedge clk);
    expect_eq("C alone keeps latches", led, 16'h5a5a);
    clear();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
