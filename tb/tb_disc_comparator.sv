// tb_disc_comparator: sweeps the input from +100 mV to -1000 mV in 1 mV
// steps at two thresholds (-50 mV and -100 mV, the document's measured
// settings) and checks the output is true exactly below the threshold.
module tb_disc_comparator;
  import tito_pkg::*;

  mv_t  vin;
  logic o50, o100;
  int checks = 0, failures = 0;

  disc_comparator #(.THRESH_MV(-16'sd50))  u50  (.vin_mv(vin), .out(o50));
  disc_comparator #(.THRESH_MV(-16'sd100)) u100 (.vin_mv(vin), .out(o100));

  initial begin
    for (int v = 100; v >= -1000; v--) begin
      vin = mv_t'(v);
      #1;
      checks++;
      if (o50 != (v < -50) || o100 != (v < -100)) begin
        failures++;
        $display("FAIL v=%0d o50=%0d o100=%0d", v, o50, o100);
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
