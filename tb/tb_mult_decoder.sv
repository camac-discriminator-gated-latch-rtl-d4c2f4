// tb_mult_decoder: all 16 input codes. Without overflow exactly the line of
// the sum must be true; with overflow only line 8, whatever the sum lines say.
module tb_mult_decoder;
  import tito_pkg::*;

  msum_t      sum;
  logic [8:0] uniq;
  int checks = 0, failures = 0;

  mult_decoder dut (.sum(sum), .uniq(uniq));

  initial begin
    logic [8:0] expv;
    for (int v = 0; v < 16; v++) begin
      sum = msum_t'(v);
      #1;
      expv = sum.ovf ? 9'h100 : (9'h1 << sum.sum);
      checks++;
      if (uniq != expv) begin
        failures++;
        $display("FAIL ovf=%0d sum=%0d uniq=%b expected %b", sum.ovf, sum.sum, uniq, expv);
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
