// tb_fs_primary_unit: for every pair of 4-bit words and both levels of the
// square wave, Q1 and Q2 must both follow the wave when the words are equal
// and both be low otherwise.
module tb_fs_primary_unit;
  logic [3:0] a, b;
  logic sq, q1, q2;
  int checks = 0, failures = 0;

  fs_primary_unit dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int s = 0; s < 2; s++) begin
          a = 4'(x); b = 4'(y); sq = 1'(s); #1;
          if (x == y) check(q1 == sq && q2 == sq, $sformatf("equal %0d: follows wave", x));
          else        check(!q1 && !q2, $sformatf("%0d/%0d: outputs low", x, y));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
