// tb_watchdog: regular kicks keep ok high; a gap longer than TIMEOUT clears
// it for good; disarmed periods do not count.
module tb_watchdog;
  localparam int T = 20;
  logic clk = 0, rst_n = 0, arm = 0, kick = 0, ok;
  int checks = 0, failures = 0;

  watchdog #(.TIMEOUT(T)) dut (.*);

  always #5 clk = !clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3 * T) @(negedge clk);
    check(ok, "disarmed: no timeout");
    arm = 1;
    for (int i = 0; i < 10; i++) begin
      repeat (T - 2) @(negedge clk);
      kick = 1; @(negedge clk); kick = 0;
      check(ok, "kicked in time");
    end
    n = 0;
    while (ok && n < 3 * T) begin @(negedge clk); n++; end
    check(!ok, "timeout detected");
    check(n >= T - 2 && n <= T + 1, $sformatf("timeout after %0d cycles", n));
    kick = 1; repeat (3) @(negedge clk); kick = 0;
    check(!ok, "error is sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
