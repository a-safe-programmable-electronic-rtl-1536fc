// tb_step_cycle_gen: checks that the step cycle signal is a one-cycle pulse
// every STEP_CYCLES clock cycles and that the cycle number counts.
module tb_step_cycle_gen;
  localparam int P = 37;
  logic clk = 0, rst_n = 0, tick;
  logic [15:0] cycle_no;
  int checks = 0, failures = 0;

  step_cycle_gen #(.STEP_CYCLES(P)) dut (.*);

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
    int cyc, last, n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cyc = 0; last = 0; n = 0;
    while (n < 10) begin
      @(posedge clk); #1; cyc++;
      if (tick) begin
        n++;
        if (n > 1) check(cyc - last == P, $sformatf("tick spacing %0d", cyc - last));
        check(cycle_no == 16'(n), "cycle number");
        last = cyc;
        @(posedge clk); #1; cyc++;
        check(!tick, "tick is one cycle wide");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
