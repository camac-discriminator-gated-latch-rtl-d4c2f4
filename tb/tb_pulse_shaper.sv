// tb_pulse_shaper: drives input waveforms one clock at a time and measures
// the output pulses (start cycle and width) from the recorded trace.
// Checked: a long input gives one pulse of PULSE_W cycles starting one cycle
// after the input (the discriminator is slope sensitive, so a held level gives
// no second pulse); a 5-cycle input gives a 5-cycle pulse; a 50 MHz train of
// 10-cycle inputs gives one full-width pulse per input, 20 cycles apart.
module tb_pulse_shaper;
  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b0, in = 1'b0, pulse;
  int checks = 0, failures = 0;
  int cyc = 0;

  pulse_shaper #(.PULSE_W(W)) dut (.clk(clk), .rst_n(rst_n), .in(in), .pulse(pulse));

  always #0.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int starts[$], widths[$];

  // Drive `pattern` (one bit per cycle, applied at falling edges) and collect
  // the pulses seen at the following falling edges.
  task automatic run(input logic pattern[$], input int tail);
    int t0 = -1;
    int w = 0;
    logic prev = 1'b0;
    starts.delete(); widths.delete();
    for (int i = 0; i < pattern.size() + tail; i++) begin
      in = (i < pattern.size()) ? pattern[i] : 1'b0;
      @(negedge clk);
      if (pulse && !prev) begin t0 = i; w = 0; end
      if (pulse) w++;
      if (!pulse && prev) begin starts.push_back(t0); widths.push_back(w); end
      prev = pulse;
    end
    if (prev) begin starts.push_back(t0); widths.push_back(w); end
  endtask

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    logic pat[$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // long input: one standard pulse, 1 cycle latency
    pat.delete();
    for (int i = 0; i < 40; i++) pat.push_back(1'b1);
    run(pat, 12);
    expect_eq("long: pulses", starts.size(), 1);
    if (starts.size() >= 1) begin
      expect_eq("long: latency", starts[0], 0);
      expect_eq("long: width", widths[0], W);
    end

    // short input: pulse as long as the input
    pat.delete();
    for (int i = 0; i < 5; i++) pat.push_back(1'b1);
    run(pat, 12);
    expect_eq("short: pulses", starts.size(), 1);
    if (starts.size() >= 1) expect_eq("short: width", widths[0], 5);

    // 50 MHz: 10 high, 10 low, ten times
    pat.delete();
    for (int p = 0; p < 10; p++)
      for (int i = 0; i < 20; i++) pat.push_back(i < 10);
    run(pat, 12);
    expect_eq("50MHz: pulses", starts.size(), 10);
    for (int p = 0; p < starts.size(); p++) begin
      expect_eq($sformatf("50MHz: width %0d", p), widths[p], W);
      expect_eq($sformatf("50MHz: start %0d", p), starts[p], 20 * p);
    end

    // reset in the middle of a pulse clears it
    in = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b0;
    #0.1;
    expect_eq("reset clears", int'(pulse), 0);
    in = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
