// tb_eight_line_encoder: exhaustive check of the eight-line count: the
// "1","2","4","8" outputs must equal the number of true inputs, 0..8.
module tb_eight_line_encoder;
  logic [7:0] d;
  logic [3:0] s;
  int checks = 0, failures = 0;

  eight_line_encoder dut (.d(d), .s(s));

  initial begin
    for (int v = 0; v < 256; v++) begin
      d = 8'(v);
      #1;
      checks++;
      if (s != 4'($countones(d))) begin
        failures++;
        $display("FAIL d=%b s=%0d expected %0d", d, s, $countones(d));
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
