// tb_disc_channel: one channel with a 20-cycle strobe gate (the document's
// 20 ns gate at 1 ns per cycle) and an input edge swept in time against it.
// The latch must be set exactly when the 8-cycle shaped pulse overlaps the
// gate, so the overlap range must be PULSE_W + 20 - 1 = 27 cycles (the
// document measures about 30 ns). Also checked: NIM output follows the input by
// one cycle and the latch one cycle later, inhibit blocks the coincidence,
// strobe-off (gate held true) latches ungated pulses, and reset clears the
// latch and wins over a simultaneous set.
module tb_disc_channel;
  localparam int W = 8;
  localparam int G = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic disc = 1'b0, gate = 1'b0, inhibit = 1'b0, latch_rst = 1'b0;
  logic coinc, b, a_n;
  int checks = 0, failures = 0;

  disc_channel #(.PULSE_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .disc(disc), .gate(gate), .inhibit(inhibit),
    .latch_rst(latch_rst), .coinc(coinc), .b(b), .a_n(a_n));

  always #0.5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  task automatic clear_latch();
    latch_rst = 1'b1;
    @(negedge clk);
    latch_rst = 1'b0;
    @(negedge clk);
  endtask

  // Gate opens at cycle 40 for G cycles; input rises at cycle 40+off for 12.
  task automatic event_at(input int off, output logic latched, output int nim_cycles);
    nim_cycles = 0;
    for (int t = 0; t < 100; t++) begin
      gate = (t >= 40 && t < 40 + G);
      disc = (t >= 40 + off && t < 40 + off + 12);
      @(negedge clk);
      if (coinc) nim_cycles++;
    end
    latched = b;
  endtask

  initial begin
    logic latched;
    int nimc, range_cnt, lo, hi;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    clear_latch();

    // sweep of input timing against the gate
    range_cnt = 0; lo = 1000; hi = -1000;
    for (int off = -20; off <= 30; off++) begin
      event_at(off, latched, nimc);
      // shaped pulse occupies cycles 40+off+1 .. 40+off+W; gate 40 .. 40+G-1
      checks++;
      if (latched != ((off + 1 <= G - 1) && (off + W >= 0))) begin
        failures++;
        $display("FAIL sweep off=%0d latched=%0d", off, latched);
      end
      if (latched) begin
        range_cnt++;
        if (off < lo) lo = off;
        if (off > hi) hi = off;
      end
      expect_eq($sformatf("a_n off=%0d", off), int'(a_n), int'(!latched));
      clear_latch();
    end
    expect_eq("overlap range (cycles)", range_cnt, W + G - 1);

    // latency: input rises -> NIM output at next cycle -> latch one later
    gate = 1'b1;
    disc = 1'b1;
    @(negedge clk);
    expect_eq("coinc 1 cycle after input", int'(coinc), 1);
    expect_eq("latch not yet set", int'(b), 0);
    @(negedge clk);
    expect_eq("latch 2 cycles after input", int'(b), 1);
    disc = 1'b0;
    repeat (W + 2) @(negedge clk);
    clear_latch();

    // inhibit blocks the coincidence gate
    inhibit = 1'b1;
    event_at(0, latched, nimc);
    expect_eq("inhibit: latch", int'(latched), 0);
    expect_eq("inhibit: nim", nimc, 0);
    inhibit = 1'b0;

    // strobe-off mode: gate held true, ungated pulse latched, NIM width W
    for (int t = 0; t < 40; t++) begin
      gate = 1'b1;
      disc = (t >= 5 && t < 17);
      @(negedge clk);
      if (t == 0) nimc = 0;
      if (coinc) nimc++;
    end
    expect_eq("strobe-off: latch", int'(b), 1);
    expect_eq("strobe-off: nim width", nimc, W);
    gate = 1'b0;

    // reset clears; reset wins over a simultaneous set
    clear_latch();
    expect_eq("reset clears", int'(b), 0);
    gate = 1'b1;
    disc = 1'b1;
    latch_rst = 1'b1;
    repeat (3) @(negedge clk);
    expect_eq("reset dominant", int'(b), 0);
    latch_rst = 1'b0;
    disc = 1'b0;
    gate = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
