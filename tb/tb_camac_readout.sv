// tb_camac_readout: random dataway commands. The latch word and Q must
// appear only for N with F(0).A(0); any other command leaves R and Q at 0.
module tb_camac_readout;
  logic        n;
  logic [3:0]  a;
  logic [4:0]  f;
  logic [15:0] latch, r;
  logic        q;
  int checks = 0, failures = 0;

  camac_readout #(.N_CH(16)) dut (.n(n), .a(a), .f(f), .latch(latch), .r(r), .q(q));

  initial begin
    logic sel;
    for (int k = 0; k < 2000; k++) begin
      n = 1'($urandom);
      a = (k % 3 == 0) ? 4'($urandom) : 4'd0;
      f = (k % 4 == 0) ? 5'($urandom) : 5'd0;
      latch = 16'($urandom);
      #1;
      sel = n && a == 0 && f == 0;
      checks++;
      if (r != (sel ? latch : 16'h0) || q != sel) begin
        failures++;
        $display("FAIL n=%0d a=%0d f=%0d latch=%h r=%h q=%0d", n, a, f, latch, r, q);
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
