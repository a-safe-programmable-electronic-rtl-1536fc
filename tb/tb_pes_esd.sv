// tb_pes_esd: the dual-channel system running an emergency shut-down diagram
// built from three Boolean blocks and an on-delay timer:
//   V = P1 OR P2                        valve open   -> actuator channel 1
//   L = TON(V, PT) AND NOT BLK          indicator    -> actuator channel 2
// P1 and P2 are two pressure switches and BLK inhibits the indicator. The
// three inputs are sensor words 1..3, read through IN_A with the range
// 0 .. 1.0, so that a word of 256 or more reads as true. PT = 500 step
// cycles, i.e. 5 s at a 10 ms step cycle; here the step cycle is shortened
// to 400 clock cycles so that the delay takes 200,000 clock cycles.
// Every step cycle the outputs are compared with a cycle model, and the
// indicator must light exactly PT - 1 step cycles after the valve opens.
module tb_pes_esd;
  timeunit 1ns; timeprecision 1ns;
  import pes_pkg::*;

  localparam int SC   = 400;
  localparam int PT   = 500;
  localparam int NCYC = 760;

  logic clk = 0, rst_n = 0, init = 1;
  word_t sensor_in [8];
  word_t act [8];
  logic  gok, gerr;
  logic [13:0] src;
  word_t sid;
  logic [15:0] cyc;
  int checks = 0, failures = 0;

  pes_top #(.STEP_CYCLES(SC), .PROM_INIT1("tb/tb_esd_program.hex"),
            .PROM_INIT2("tb/tb_esd_program.hex")) u_esd (
    .clk, .rst_n, .init, .sensor_in, .actuator_out(act), .global_ok(gok),
    .global_error(gerr), .error_source(src), .step_id(sid), .cycle_no(cyc));

  always #50 clk = !clk;    // 10 MHz

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(100ns * (NCYC + 20) * SC);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input pattern of step cycle k: {BLK, P2, P1}
  function automatic logic [2:0] pattern(int k);
    logic p1, p2, blk;
    p1  = k >= 10 && k < 620;
    p2  = (k >= 615 && k < 640) || (k >= 660 && k < 700);
    blk = k >= 580 && k < 590;
    return {blk, p2, p1};
  endfunction

  function automatic word_t bool_word(logic b);
    return b ? word_t'($urandom_range(256, 65535)) : word_t'($urandom_range(0, 255));
  endfunction

  initial begin
    logic [2:0] p;
    int cnt, v_rise, l_rise, n_l_on, n_v_on;
    logic exp_v, exp_l;
    cnt = 0; exp_v = 0; exp_l = 0;
    v_rise = -1; l_rise = -1; n_l_on = 0; n_v_on = 0;
    for (int i = 0; i < 8; i++) sensor_in[i] = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    #60us;
    @(negedge clk) init = 0;
    repeat (5) @(negedge clk);
    check(gok, "active after init");
    for (int k = 1; k <= NCYC; k++) begin
      p = pattern(k);
      for (int i = 0; i < 3; i++) sensor_in[i + 1] = bool_word(p[i]);
      @(posedge u_esd.tick);
      repeat (3) @(negedge clk);
      if (k == 1) check(sid == 16'd0, "initialisation step runs in the first cycle");
      else if (sid != 16'd1) check(0, $sformatf("cycle %0d: step 1", k));
      if (k >= 3) begin
        checks++;
        if (act[1] != word_t'(exp_v) || act[2] != word_t'(exp_l)) begin
          failures++;
          $display("FAIL: cycle %0d: valve %h indicator %h, want %0d %0d",
                   k, act[1], act[2], exp_v, exp_l);
        end
        if (act[1] == 16'd1 && v_rise < 0) v_rise = k;
        if (act[2] == 16'd1 && l_rise < 0) l_rise = k;
        if (act[1] == 16'd1) n_v_on++;
        if (act[2] == 16'd1) n_l_on++;
      end
      // model of cycle k, put out at the next step cycle signal
      if (k >= 2) begin
        exp_v = p[0] | p[1];
        cnt   = exp_v ? cnt + 1 : 0;
        exp_l = (cnt >= PT) && !p[2];
      end
      // change the input words inside the cycle: the snapshot must hold
      for (int i = 0; i < 3; i++) sensor_in[i + 1] = bool_word(!p[i]);
    end
    check(gok && src == '0, "never stopped");
    $display("valve opened at cycle %0d, indicator lit at cycle %0d", v_rise, l_rise);
    check(v_rise > 0 && l_rise - v_rise == PT - 1, "indicator delay of PT step cycles");
    check(n_v_on > PT && n_l_on > 0, "valve and indicator both driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
