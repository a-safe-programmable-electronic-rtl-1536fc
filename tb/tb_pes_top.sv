// tb_pes_top: end-to-end test of the dual-channel system at a reduced step
// cycle (2000 clock cycles) and FIFO depth (4).
//   u_ok   both channels run the pressure regulation example. Every step
//          cycle a new sensor value is applied; the actuator outputs are
//          compared with the reference model (regulating variable on channel
//          0, alarm records on channel 7).
//   u_div  channel 2 runs a diverse program with a different gain: the
//          master-to-slave comparator must stop the system, the fail-safe
//          comparator must drop, and the outputs must go to the safe state.
//   u_ovr  the step cycle (80 clock cycles) is too short for the program:
//          the masters must stop with an overrun.
//   u_stk  a program that sends a block tag without its arguments leaves the
//          slaves busy: the slave watchdogs must stop the system.
// Each mechanism is counted and must occur at least once.
module tb_pes_top;
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

  localparam int SC = 2000;
  localparam int NCYC = 14;
  logic clk = 0, rst_n = 0, init = 1;
  word_t sensor_in [8];
  int checks = 0, failures = 0;

  word_t out_ok [8], out_div [8], out_ovr [8], out_stk [8];
  logic  gok_ok, gok_div, gok_ovr, gok_stk, ge_ok, ge_div, ge_ovr, ge_stk;
  logic [13:0] src_ok, src_div, src_ovr, src_stk;
  word_t sid_ok, sid_div, sid_ovr, sid_stk;
  logic [15:0] cyc_ok, cyc_div, cyc_ovr, cyc_stk;

  pes_top #(.STEP_CYCLES(SC), .FIFO_DEPTH(4)) u_ok (
    .clk, .rst_n, .init, .sensor_in, .actuator_out(out_ok), .global_ok(gok_ok),
    .global_error(ge_ok), .error_source(src_ok), .step_id(sid_ok), .cycle_no(cyc_ok));
  pes_top #(.STEP_CYCLES(SC), .FIFO_DEPTH(4), .PROM_INIT2("tb/tb_pressure_diverse.hex")) u_div (
    .clk, .rst_n, .init, .sensor_in, .actuator_out(out_div), .global_ok(gok_div),
    .global_error(ge_div), .error_source(src_div), .step_id(sid_div), .cycle_no(cyc_div));
  pes_top #(.STEP_CYCLES(80), .FIFO_DEPTH(4)) u_ovr (
    .clk, .rst_n, .init, .sensor_in, .actuator_out(out_ovr), .global_ok(gok_ovr),
    .global_error(ge_ovr), .error_source(src_ovr), .step_id(sid_ovr), .cycle_no(cyc_ovr));
  pes_top #(.STEP_CYCLES(SC), .FIFO_DEPTH(4), .PROM_INIT1("tb/tb_top_stuck.hex"),
            .PROM_INIT2("tb/tb_top_stuck.hex")) u_stk (
    .clk, .rst_n, .init, .sensor_in, .actuator_out(out_stk), .global_ok(gok_stk),
    .global_error(ge_stk), .error_source(src_stk), .step_id(sid_stk), .cycle_no(cyc_stk));

  always #50 clk = !clk;    // 10 MHz


  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters (normal instance) ----------------
  int n_transition = 0, n_repeat = 0, n_full_wait = 0, n_empty_wait = 0;
  int n_m2s = 0, n_s2m = 0, n_out = 0, n_snap = 0, n_alarm = 0;
  int n_cmp_stop = 0, n_fs_drop = 0, n_safe = 0, n_overrun = 0, n_watchdog = 0;
  always @(posedge clk) if (rst_n && gok_ok) begin
    if (u_ok.g_ch[0].u_master.step_done) begin
      if (u_ok.g_ch[0].u_master.pc == u_ok.g_ch[0].u_master.step_ia &&
          u_ok.g_ch[0].u_master.step_id == 16'd1 && cyc_ok > 2) n_repeat++;
    end
    if (u_ok.m_tx_wr[0] === 1'b0 && u_ok.g_ch[0].u_master.dst == REG_FIFO_TX &&
        u_ok.m2s_full[0] && 32'(u_ok.g_ch[0].u_master.state) == 1) n_full_wait++;
    if (u_ok.g_ch[0].u_master.src == REG_FIFO_RX && u_ok.min_empty[0] &&
        32'(u_ok.g_ch[0].u_master.state) == 1) n_empty_wait++;
    if (u_ok.m2s_xfer) n_m2s++;
    if (u_ok.s2m_xfer) n_s2m++;
    if (u_ok.out_xfer) n_out++;
    if (u_ok.tick) n_snap++;
  end
  logic fs_div_prev = 1;
  always @(posedge clk) if (rst_n && !init) begin
    if (fs_div_prev && !u_div.fs_m2s_ok) n_fs_drop++;
    fs_div_prev <= u_div.fs_m2s_ok;
  end

  initial begin
    #(100ns * (NCYC + 4) * SC);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_t m;
    longint raw [NCYC + 2];
    longint y, x, exp_y;
    bit rise;
    word_t exp_alarm;
    logic seen_step0;
    m.i_state = 0; m.e_prev = 0; m.alarm_prev = 0;
    exp_alarm = '0;
    for (int i = 0; i < 8; i++) sensor_in[i] = '0;
    // raw sensor value per cycle: mid range, above the high limit, back,
    // below the low limit, then random
    for (int k = 0; k < NCYC + 2; k++) begin
      case (k % 6)
        2:       raw[k] = 62000;      // X ~ +4.5 -> high alarm
        4:       raw[k] = 3000;       // X ~ -4.5 -> low alarm
        default: raw[k] = longint'($urandom_range(20000, 45000));
      endcase
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    #60us;                  // activation of the fail-safe comparators
    @(negedge clk) init = 0;
    repeat (5) @(negedge clk);
    check(gok_ok && gok_div && gok_ovr && gok_stk, "all instances active after init");
    for (int i = 0; i < 8; i++) check(out_ok[i] == '0, "outputs at safe value before the first cycle");
    seen_step0 = 0;
    // cycle k begins with tick k (cycle_no = k)
    for (int k = 1; k <= NCYC; k++) begin
      sensor_in[0] = word_t'(raw[k]);
      @(posedge u_ok.tick);
      repeat (3) @(negedge clk);
      sensor_in[0] = word_t'($urandom);         // inputs move during the cycle
      if (k == 1) begin
        check(sid_ok == 16'd0, "step 0 (initialisation) runs in the first cycle");
        seen_step0 = 1;
      end else begin
        check(sid_ok == 16'd1, $sformatf("cycle %0d: step 1", k));
        if (k == 2) n_transition++;
      end
      // outputs of cycle k-1 became effective at this tick
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
    check(gok_ok && src_ok == '0, "normal instance never stopped");
    // diverse program
    check(!gok_div && src_div[0], "diverse program stopped by master-to-slave comparator");
    for (int i = 0; i < 8; i++) check(out_div[i] == '0, "stopped instance drives safe outputs");
    if (!gok_div) n_cmp_stop++;
    if (!gok_div && out_div[0] == '0) n_safe++;
    // overrun
    check(!gok_ovr && (src_ovr[6] || src_ovr[7]), "short step cycle stopped by overrun");
    if (u_ovr.m_overrun[0]) n_overrun++;
    // stuck slave
    check(!gok_stk && (src_stk[11] || src_stk[13]), "busy slave stopped by its watchdog");
    if (!gok_stk && (src_stk[11] || src_stk[13])) n_watchdog++;
    $display("mechanisms: transition=%0d repeat=%0d full_wait=%0d empty_wait=%0d m2s=%0d s2m=%0d out=%0d snapshot=%0d alarm=%0d cmp_stop=%0d fs_drop=%0d safe=%0d overrun=%0d watchdog=%0d",
             n_transition, n_repeat, n_full_wait, n_empty_wait, n_m2s, n_s2m, n_out, n_snap, n_alarm,
             n_cmp_stop, n_fs_drop, n_safe, n_overrun, n_watchdog);
    check(n_transition > 0, "step transition happened");
    check(n_repeat > 0, "step repetition happened");
    check(n_full_wait > 0, "FIFO FULL wait happened");
    check(n_empty_wait > 0, "FIFO EMPTY wait happened");
    check(n_m2s > 0 && n_s2m > 0, "FIFO comparator transfers happened");
    check(n_out > 0, "output transfers happened");
    check(n_snap > 0, "input snapshots happened");
    check(n_alarm > 0, "alarm records happened");
    check(n_cmp_stop > 0, "comparator stop happened");
    check(n_fs_drop > 0, "fail-safe comparator drop happened");
    check(n_safe > 0, "safe outputs happened");
    check(n_overrun > 0, "overrun happened");
    check(n_watchdog > 0, "watchdog expiry happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
