// tb_addition_logic: checks the per-module digital sum. For each pattern of
// 16 latch bits and each incoming sum, the expected multiplicity is the
// latch count plus the incoming value; overflow must be set exactly when that
// is 8 or more (or an overflow came in), the sum lines must be exact when there
// is no overflow, and m_ge1 must show a non-empty module. Directed cases
// include the 4+4 split, 8 in one half, all 16 and an incoming overflow.
module tb_addition_logic;
  import tito_pkg::*;

  logic [15:0] b;
  msum_t       prev, next;
  logic        next_ovf_n, m_ge1;
  int checks = 0, failures = 0;

  addition_logic dut (.b(b), .prev(prev), .next(next), .next_ovf_n(next_ovf_n), .m_ge1(m_ge1));

  task automatic check_one(input logic [15:0] bv, input msum_t pv);
    int m;
    logic exp_ovf;
    b = bv; prev = pv;
    #1;
    m = $countones(bv) + int'(pv.sum);
    exp_ovf = pv.ovf || (m >= 8);
    checks++;
    if (next.ovf != exp_ovf || next_ovf_n != ~exp_ovf ||
        (!exp_ovf && int'(next.sum) != m) || m_ge1 != ($countones(bv) >= 1)) begin
      failures++;
      $display("FAIL b=%b prev=%0d/%0d next=%0d/%0d ovf_n=%0d m_ge1=%0d (m=%0d)",
               bv, pv.ovf, pv.sum, next.ovf, next.sum, next_ovf_n, m_ge1, m);
    end
  endtask

  initial begin
    msum_t pv;
    // directed
    check_one(16'h0000, '0);
    check_one(16'h0f0f, '0);            // 4 + 4
    check_one(16'h00ff, '0);            // 8 in one half
    check_one(16'hffff, '0);            // all 16
    check_one(16'h0001, '{ovf: 1'b0, sum: 3'd7});
    check_one(16'h0000, '{ovf: 1'b1, sum: 3'd0});
    check_one(16'h0000, '{ovf: 1'b0, sum: 3'd5});
    // all single- and two-bit patterns with every incoming sum
    for (int i = 0; i < 16; i++)
      for (int j = i; j < 16; j++)
        for (int p = 0; p < 16; p++) begin
          pv = msum_t'(p);
          check_one((16'h1 << i) | (16'h1 << j), pv);
        end
    // random patterns
    for (int k = 0; k < 4000; k++) begin
      pv = msum_t'($urandom_range(0, 15));
      check_one(16'($urandom), pv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
