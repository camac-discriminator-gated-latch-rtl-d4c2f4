// tb_analog_sum: all 256 latch patterns of one half; the output must be
// -100 mV times the number of active (low) negative-true inputs.
module tb_analog_sum;
  import tito_pkg::*;

  logic [7:0] a_n;
  mv_t        vout;
  int checks = 0, failures = 0;

  analog_sum dut (.a_n(a_n), .vout_mv(vout));

  initial begin
    for (int v = 0; v < 256; v++) begin
      a_n = 8'(v);
      #1;
      checks++;
      if (int'(vout) != -100 * (8 - $countones(a_n))) begin
        failures++;
        $display("FAIL a_n=%b vout=%0d", a_n, vout);
      end
    end
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
