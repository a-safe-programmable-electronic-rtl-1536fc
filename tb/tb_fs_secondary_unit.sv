// tb_fs_secondary_unit: behaviour of the secondary unit model.
//  - VGL is low at power-on and rises only once RESET is applied with
//    coincident pulses on Q1 and Q2;
//  - it stays high after RESET falls as long as the pulses continue;
//  - one missing pulse drops VGL about 40 us after the last pulse, and it
//    stays low when the pulses return, until the next RESET;
//  - out-of-phase signals drop it as well.
module tb_fs_secondary_unit;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, RESET = 0, Q1, Q2, VGL;
  logic sq = 0;
  logic miss = 0, inv = 0;
  int checks = 0, failures = 0;

  fs_secondary_unit #(.CLK_HZ(10_000_000), .SQ_HZ(100_000), .DISCHARGE_US(40)) dut (.*);

  always #50 clk = !clk;              // 10 MHz
  always #5000 sq = !sq;              // 100 kHz
  assign Q1 = sq && !miss;
  assign Q2 = inv ? !sq : (sq && !miss);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic activate();
    RESET = 1; #50us; RESET = 0; #30us;
  endtask

  initial begin
    realtime t_miss, t_low;
    #200ns rst_n = 1;
    #100us;
    check(!VGL, "low at power-on without RESET");
    activate();
    check(VGL, "high after activation");
    #500us;
    check(VGL, "holds while pulses coincide");
    // one missing pulse
    @(negedge sq); miss = 1; t_miss = $realtime; @(negedge sq); miss = 0;
    @(negedge VGL); t_low = $realtime;
    check(t_low - t_miss >= 30us && t_low - t_miss <= 60us,
          $sformatf("drops %0t after the missing pulse", t_low - t_miss));
    #300us;
    check(!VGL, "stays low after pulses return");
    activate();
    check(VGL, "re-activated by RESET");
    // out of phase
    inv = 1; #100us;
    check(!VGL, "out-of-phase signals drop VGL");
    inv = 0; #200us;
    check(!VGL, "still low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
