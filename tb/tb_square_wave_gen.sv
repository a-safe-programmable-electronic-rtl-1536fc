// tb_square_wave_gen: at 10 MHz the wave must have a period of 100 clock
// cycles (100 kHz) and a 50 % duty cycle.
module tb_square_wave_gen;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, sq;
  int checks = 0, failures = 0;

  square_wave_gen #(.CLK_HZ(10_000_000), .SQ_HZ(100_000)) dut (.*);

  always #50 clk = !clk;   // 100 ns period

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hi, lo;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge sq);
    for (int p = 0; p < 20; p++) begin
      hi = 0; lo = 0;
      while (sq) begin @(posedge clk); #1; hi++; end
      while (!sq) begin @(posedge clk); #1; lo++; end
      check(hi == 50 && lo == 50, $sformatf("high %0d low %0d cycles", hi, lo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
