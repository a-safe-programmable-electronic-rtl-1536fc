// tb_pes_inject: fault injection into channel 2 of the dual-channel system
// (step cycle 2000 clock cycles, FIFO depth 4, pressure regulation example),
// for the two checks that equal programs on equal hardware never trip:
//   1. from step cycle 5 on, slave 2 reads a corrupted input word (a faulty
//      input driver). The slave-to-master comparator must stop the system
//      as the first and only error source, and the actuators must show the
//      safe value.
//   2. After a reset and re-activation with init, the system must run again.
//      From step cycle 5 on, slave 2's writes to its output latch are
//      corrupted. The fail-safe comparator watching the two output latches
//      must stop the system within the cycle, before the next step cycle
//      signal could put the word out.
//   3. After another restart, slave 2's output latch is corrupted 30 clock
//      cycles (3 us) before a step cycle signal, too late for the fail-safe
//      comparator (10 us): the output comparator must stop the system at
//      that signal, and the word must not reach the actuators.
// Each stop, the restarts and the safe outputs are counted.
module tb_pes_inject;
  timeunit 1ns; timeprecision 1ns;
  import pes_pkg::*;

  localparam int SC = 2000;
  localparam word_t BAD_IN  = 16'hFFFF;
  localparam word_t BAD_OUT = 16'h0BAD;

  logic clk = 0, rst_n = 0, init = 1;
  word_t sensor_in [8];
  word_t act [8];
  logic  gok, gerr;
  logic [13:0] src;
  word_t sid;
  logic [15:0] cyc;
  int checks = 0, failures = 0;

  pes_top #(.STEP_CYCLES(SC), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .init, .sensor_in, .actuator_out(act), .global_ok(gok),
    .global_error(gerr), .error_source(src), .step_id(sid), .cycle_no(cyc));

  always #50 clk = !clk;    // 10 MHz

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(100ns * 60 * SC);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the corrupted output word must never become effective
  int n_bad_out = 0;
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < 8; i++) if (act[i] == BAD_OUT) n_bad_out++;

  task automatic start();
    rst_n = 0; init = 1;
    repeat (5) @(negedge clk);
    rst_n = 1;
    #60us;                  // activation of the fail-safe comparators
    @(negedge clk) init = 0;
    repeat (5) @(negedge clk);
  endtask

  // waits at most n step cycles for the stop; returns the clocks waited
  task automatic wait_stop(int n, output int clks);
    clks = 0;
    while (gok && clks < n * SC) begin @(negedge clk); clks++; end
  endtask

  int n_s2m_stop = 0, n_fs_stop = 0, n_out_stop = 0, n_restart = 0, n_safe = 0;

  initial begin
    int clks;
    logic s2m_first;
    for (int i = 0; i < 8; i++) sensor_in[i] = '0;
    sensor_in[0] = 16'd30000;        // X about -0.4: no alarm, non-zero output
    // ---- 1. corrupted input word ----
    start();
    check(gok && src == '0, "active after init");
    wait (cyc == 16'd4);
    repeat (3) @(negedge clk);
    check(gok && sid == 16'd1, "running step 1 before the injection");
    check(act[0] != '0, "regulating variable put out before the injection");
    wait (cyc == 16'd5);
    force dut.s_in_data[1] = BAD_IN;
    wait_stop(2, clks);
    s2m_first = !gok && src == 14'b00_0000_0000_0010;
    check(s2m_first, $sformatf("stopped by the slave-to-master comparator alone (sources %b)", src));
    check(gerr, "global error output set");
    check(clks < SC, $sformatf("stopped within the step cycle (%0d clocks)", clks));
    if (s2m_first) n_s2m_stop++;
    repeat (2 * SC) @(negedge clk);
    check(!gok && src == 14'b00_0000_0000_0010, "stop is held and the record unchanged");
    for (int i = 0; i < 8; i++) check(act[i] == '0, $sformatf("safe output %0d after the stop", i));
    if (act[0] == '0) n_safe++;
    release dut.s_in_data[1];

    // ---- 2. restart, then a corrupted output latch ----
    start();
    check(gok && !gerr && src == '0, "re-activated by reset and init");
    wait (cyc == 16'd4);
    repeat (3) @(negedge clk);
    if (gok && sid == 16'd1 && act[0] != '0) n_restart++;
    check(n_restart == 1, "runs normally again after the restart");
    wait (cyc == 16'd5);
    force dut.s_out_data[1] = BAD_OUT;
    wait_stop(2, clks);
    check(!gok && src == 14'b00_0000_0010_0000,
          $sformatf("stopped by the output fail-safe comparator alone (sources %b)", src));
    check(cyc == 16'd5, $sformatf("stopped before the next step cycle signal (cycle %0d)", cyc));
    if (!gok && src[5]) n_fs_stop++;
    for (int i = 0; i < 8; i++) check(act[i] == '0, $sformatf("safe output %0d after the stop", i));
    if (act[0] == '0) n_safe++;
    release dut.s_out_data[1];

    // ---- 3. restart, then a late corruption of the output latch ----
    start();
    check(gok && !gerr && src == '0, "re-activated a second time");
    wait (cyc == 16'd5);
    repeat (SC - 30) @(negedge clk);
    check(gok && cyc == 16'd5, "still running just before the step cycle signal");
    force dut.u_out_cmp.lb[0] = dut.u_out_cmp.la[0] ^ BAD_OUT;
    wait_stop(1, clks);
    check(!gok && src == 14'b00_0000_0000_0100,
          $sformatf("stopped by the output comparator alone (sources %b)", src));
    check(cyc == 16'd6 && clks <= 35, $sformatf("stopped at the step cycle signal (cycle %0d, %0d clocks)", cyc, clks));
    if (!gok && src[2]) n_out_stop++;
    for (int i = 0; i < 8; i++) check(act[i] == '0, $sformatf("safe output %0d after the stop", i));
    if (act[0] == '0) n_safe++;
    release dut.u_out_cmp.lb[0];
    check(n_bad_out == 0, "the corrupted word never reached the actuators");

    $display("mechanisms: s2m_stop=%0d fs_out_stop=%0d out_stop=%0d restart=%0d safe=%0d",
             n_s2m_stop, n_fs_stop, n_out_stop, n_restart, n_safe);
    check(n_s2m_stop > 0 && n_fs_stop > 0 && n_out_stop > 0 && n_restart > 0 && n_safe == 3,
          "every injected fault stopped the system");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
