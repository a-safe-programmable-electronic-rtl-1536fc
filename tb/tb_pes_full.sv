// tb_pes_full: the dual-channel system at its default sizes (10 MHz clock,
// step cycle of 100,000 clock cycles = 10 ms, FIFO depth 16) running the
// pressure regulation example for NCYC step cycles. Every step cycle a new
// sensor value is applied and the actuator outputs are compared with the
// reference model (regulating variable on channel 0, alarm records on
// channel 7). Step transition and repetition, FIFO EMPTY waits, comparator
// transfers, output transfers, input snapshots and alarm records are counted
// and must each occur.
module tb_pes_full;
  timeunit 1ns; timeprecision 1ns;
  import pes_pkg::*;
  // ---- reference model of the example program: X scaled to -5.0 .. 5.0
  // over the unsigned input word, PID with KP 1.5, TN 2.0, TV 0 in Q8.8 with
  // 16-bit saturation, alarm when X is above 3.0 or below -3.0 ----
  typedef struct {
    longint i_state;     // integral
    longint e_prev;
    bit     alarm_prev;
  } model_t;

  function automatic longint clip(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // returns Y; updates the state; alarm_rise tells whether a record is due
  function automatic longint step(ref model_t m, input longint raw, input longint kp,
                                  output bit alarm_rise, output longint x);
    longint i_new, d, sum, y;
    bit a;
    x = clip(-1280 + ((2560 * raw) >>> 16));
    i_new = clip(m.i_state + (x * 256) / 512);       // TN = 2.0
    d = 0;                                           // TV = 0
    sum = clip(x + i_new + d);
    y = clip((kp * sum) >>> 8);
    a = (x > 768) || (x < -768);
    alarm_rise = a && !m.alarm_prev;
    m.alarm_prev = a;
    m.i_state = i_new;
    m.e_prev = x;
    return y;
  endfunction

  localparam int SC = 100_000;
  localparam int NCYC = 8;
  logic clk = 0, rst_n = 0, init = 1;
  word_t sensor_in [8];
  word_t out_ok [8];
  logic  gok_ok, ge_ok;
  logic [13:0] src_ok;
  word_t sid_ok;
  logic [15:0] cyc_ok;
  int checks = 0, failures = 0;

  pes_top u_ok (
    .clk, .rst_n, .init, .sensor_in, .actuator_out(out_ok), .global_ok(gok_ok),
    .global_error(ge_ok), .error_source(src_ok), .step_id(sid_ok), .cycle_no(cyc_ok));

  always #50 clk = !clk;    // 10 MHz

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_transition = 0, n_repeat = 0, n_empty_wait = 0;
  int n_m2s = 0, n_s2m = 0, n_out = 0, n_snap = 0, n_alarm = 0;
  // clocks master 1 spends running a segment in the current step cycle, and
  // the longest such segment seen (must stay well inside the step cycle)
  int run_clks = 0, max_run = 0;
  always @(posedge clk) if (rst_n && gok_ok) begin
    if (u_ok.g_ch[0].u_master.step_done) begin
      if (u_ok.g_ch[0].u_master.pc == u_ok.g_ch[0].u_master.step_ia &&
          u_ok.g_ch[0].u_master.step_id == 16'd1 && cyc_ok > 2) n_repeat++;
    end
    if (u_ok.g_ch[0].u_master.src == REG_FIFO_RX && u_ok.min_empty[0] &&
        32'(u_ok.g_ch[0].u_master.state) == 1) n_empty_wait++;
    if (u_ok.m2s_xfer) n_m2s++;
    if (u_ok.s2m_xfer) n_s2m++;
    if (u_ok.out_xfer) n_out++;
    if (u_ok.tick) begin
      n_snap++;
      if (run_clks > max_run) max_run = run_clks;
      run_clks = 0;
    end else if (32'(u_ok.g_ch[0].u_master.state) == 1) run_clks++;
  end

  initial begin
    #(100ns * (NCYC + 3) * SC);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_t m;
    longint raw [NCYC + 2];
    longint x, exp_y;
    bit rise;
    word_t exp_alarm;
    m.i_state = 0; m.e_prev = 0; m.alarm_prev = 0;
    exp_alarm = '0;
    exp_y = 0;
    for (int i = 0; i < 8; i++) sensor_in[i] = '0;
    for (int k = 0; k < NCYC + 2; k++) begin
      case (k % 6)
        2:       raw[k] = 62000;
        4:       raw[k] = 3000;
        default: raw[k] = longint'($urandom_range(20000, 45000));
      endcase
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    #60us;
    @(negedge clk) init = 0;
    repeat (5) @(negedge clk);
    check(gok_ok, "active after init");
    for (int k = 1; k <= NCYC; k++) begin
      sensor_in[0] = word_t'(raw[k]);
      @(posedge u_ok.tick);
      repeat (3) @(negedge clk);
      sensor_in[0] = word_t'($urandom);
      if (k == 1) check(sid_ok == 16'd0, "step 0 (initialisation) runs in the first cycle");
      else begin
        check(sid_ok == 16'd1, $sformatf("cycle %0d: step 1", k));
        if (k == 2) n_transition++;
      end
      if (k >= 3) begin
        check(out_ok[0] == word_t'(exp_y), $sformatf("cycle %0d: Y %h want %h", k, out_ok[0], word_t'(exp_y)));
        check(out_ok[7] == exp_alarm, $sformatf("cycle %0d: alarm channel %h want %h", k, out_ok[7], exp_alarm));
      end
      if (k >= 2) begin
        exp_y = step(m, raw[k], 384, rise, x);
        if (rise) begin exp_alarm = {8'd14, 8'(k)}; n_alarm++; end
      end
      sensor_in[0] = word_t'(raw[k + 1]);
    end
    check(gok_ok && src_ok == '0, "never stopped");
    $display("mechanisms: transition=%0d repeat=%0d empty_wait=%0d m2s=%0d s2m=%0d out=%0d snapshot=%0d alarm=%0d",
             n_transition, n_repeat, n_empty_wait, n_m2s, n_s2m, n_out, n_snap, n_alarm);
    check(n_transition > 0 && n_repeat > 0, "step transition and repetition happened");
    check(n_empty_wait > 0, "FIFO EMPTY wait happened");
    check(n_m2s > 0 && n_s2m > 0 && n_out > 0, "transfers happened");
    $display("longest step segment: %0d clocks of a %0d-clock step cycle", max_run, SC);
    check(max_run > 64 && max_run < SC / 10, "segment length within the step cycle");
    check(n_snap > 0 && n_alarm > 0, "input snapshots and alarm records happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
