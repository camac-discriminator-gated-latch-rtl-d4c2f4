// tb_strobe_reset_ctrl: all 32 input combinations. Every channel gate must
// equal strobe OR strobe_off, and the latch reset must equal fast_reset OR
// (C AND S2).
module tb_strobe_reset_ctrl;
  logic        strobe, strobe_off, fast_reset, c, s2, latch_rst;
  logic [15:0] gate;
  int checks = 0, failures = 0;

  strobe_reset_ctrl #(.N_CH(16)) dut (
    .strobe(strobe), .strobe_off(strobe_off), .fast_reset(fast_reset),
    .camac_c(c), .camac_s2(s2), .gate(gate), .latch_rst(latch_rst));

  initial begin
    for (int v = 0; v < 32; v++) begin
      {strobe, strobe_off, fast_reset, c, s2} = 5'(v);
      #1;
      checks++;
      if (gate != {16{strobe | strobe_off}} || latch_rst != (fast_reset | (c & s2))) begin
        failures++;
        $display("FAIL in=%b gate=%h rst=%0d", 5'(v), gate, latch_rst);
      end
    end
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
