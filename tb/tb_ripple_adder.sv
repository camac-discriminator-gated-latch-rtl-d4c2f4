// tb_ripple_adder: exhaustive check of the 3-bit ripple adder against
// integer addition, carry included.
module tb_ripple_adder;
  logic [2:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  ripple_adder #(.W(3)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        for (int c = 0; c < 2; c++) begin
          a = 3'(i); b = 3'(j); cin = 1'(c);
          #1;
          checks++;
          if ({cout, s} != 4'(i + j + c)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d gave %0d", i, j, c, {cout, s});
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
