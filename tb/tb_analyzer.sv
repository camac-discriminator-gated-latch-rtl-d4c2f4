// tb_analyzer: every sum code, every switch position and both strobe
// states. Expected values come from the multiplicity m (8 for overflow):
// ge[k] = m >= k+1, trigger = strobe and 1 <= N <= 8 and m >= N, and the
// strobed unique outputs are one-hot at m only while the strobe is true.
// A strobe just above the -220 mV bias must not count as a strobe.
module tb_analyzer;
  import tito_pkg::*;

  msum_t      sum;
  mv_t        strobe_mv;
  logic [3:0] n_select;
  logic [8:0] uniq;
  logic [7:0] ge;
  logic       trigger;
  int checks = 0, failures = 0;

  analyzer dut (.sum(sum), .strobe_mv(strobe_mv), .n_select(n_select),
                .uniq(uniq), .ge(ge), .trigger(trigger));

  initial begin
    int m;
    logic st, exp_trig;
    logic [7:0] exp_ge;
    logic [8:0] exp_u;
    for (int v = 0; v < 16; v++)
      for (int n = 0; n < 16; n++)
        for (int s = 0; s < 3; s++) begin
          sum = msum_t'(v);
          n_select = 4'(n);
          strobe_mv = (s == 0) ? 16'sd0 : (s == 1) ? -16'sd200 : NIM_ONE_MV;
          st = (s == 2);
          #1;
          m = sum.ovf ? 8 : int'(sum.sum);
          for (int k = 0; k < 8; k++) exp_ge[k] = (m >= k + 1);
          exp_trig = st && n >= 1 && n <= 8 && m >= n;
          exp_u = st ? (9'h1 << m) : 9'h0;
          checks++;
          if (ge != exp_ge || trigger != exp_trig || uniq != exp_u) begin
            failures++;
            $display("FAIL m=%0d N=%0d st=%0d ge=%b trig=%0d uniq=%b", m, n, st, ge, trigger, uniq);
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
