// tb_four_line_encoder: exhaustive check of the four-line count against a
// population count of the inputs.
module tb_four_line_encoder;
  logic [3:0] d;
  logic [2:0] s;
  int checks = 0, failures = 0;

  four_line_encoder dut (.d(d), .s(s));

  initial begin
    for (int v = 0; v < 16; v++) begin
      d = 4'(v);
      #1;
      checks++;
      if (s != 3'($countones(d))) begin
        failures++;
        $display("FAIL d=%b s=%0d expected %0d", d, s, $countones(d));
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
