// tb_master_processor: runs a small two-step program on the master.
//  step 0 (address 0): sets the step identifier to 5, sends 0xABCD, copies a
//     constant through two RAM cells and sends it, receives a word and sends
//     it back, receives the transition condition, STEP 9.
//  step 1 (address 9): sets the step identifier to 7, sends it, receives the
//     transition condition, STEP 0.
// The testbench plays the slave side through two real FIFO queues, checks
// every word, the FULL and EMPTY waits, the step repeat/transition decision,
// the one-MOVE-per-cycle rate, and the overrun stop. A second master whose
// program writes into its PROM must stop with an access error.
module tb_master_processor;
  import pes_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1, step_tick = 0;
  logic tx_wr, tx_full, rx_rd, rx_empty;
  word_t tx_data, rx_data;
  logic overrun, access_err, sco, step_done;
  word_t step_id;
  addr_t pc;
  // testbench side of the queues
  logic  tbq_rd = 0, tbq_wr = 0, tbq_empty, tbq_full;
  word_t tbq_data, tbq_wdata = '0;
  int checks = 0, failures = 0;
  int full_waits = 0, empty_waits = 0;

  master_processor #(.PROM_WORDS(64), .RAM_WORDS(16), .PROM_INIT("tb/tb_master_program.hex")) dut (
    .clk, .rst_n, .enable, .step_tick, .tx_wr, .tx_data, .tx_full,
    .rx_rd, .rx_data, .rx_empty, .overrun, .access_err,
    .step_clock_occurred(sco), .step_done, .step_id, .pc
  );
  fifo_queue #(.WIDTH(16), .DEPTH(2)) u_txq (
    .clk, .rst_n, .wr_en(tx_wr), .wr_data(tx_data), .rd_en(tbq_rd), .rd_data(tbq_data),
    .full(tx_full), .empty(tbq_empty)
  );
  fifo_queue #(.WIDTH(16), .DEPTH(2)) u_rxq (
    .clk, .rst_n, .wr_en(tbq_wr), .wr_data(tbq_wdata), .rd_en(rx_rd), .rd_data(rx_data),
    .full(tbq_full), .empty(rx_empty)
  );

  // second master: illegal write into the PROM
  logic b_tx_wr, b_rx_rd, b_over, b_acc, b_sco, b_done;
  word_t b_tx_data, b_sid;
  addr_t b_pc;
  master_processor #(.PROM_WORDS(64), .RAM_WORDS(16), .PROM_INIT("tb/tb_master_bad.hex")) dut_bad (
    .clk, .rst_n, .enable, .step_tick, .tx_wr(b_tx_wr), .tx_data(b_tx_data), .tx_full(1'b0),
    .rx_rd(b_rx_rd), .rx_data('0), .rx_empty(1'b1), .overrun(b_over), .access_err(b_acc),
    .step_clock_occurred(b_sco), .step_done(b_done), .step_id(b_sid), .pc(b_pc)
  );

  always #5 clk = !clk;

  always @(negedge clk) begin
    if (rst_n && 32'(dut.state) == 1 && dut.op == OP_MOVE) begin
      if (dut.dst == REG_FIFO_TX && tx_full) full_waits++;
      if (dut.src == REG_FIFO_RX && rx_empty) empty_waits++;
    end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick();
    @(negedge clk); step_tick = 1; @(negedge clk); step_tick = 0;
  endtask

  task automatic expect_word(word_t v, string what);
    int n = 0;
    while (tbq_empty && n < 200) begin @(negedge clk); n++; end
    check(!tbq_empty && tbq_data == v, $sformatf("%s: got %h want %h", what, tbq_data, v));
    tbq_rd = !tbq_empty; @(negedge clk); tbq_rd = 0;
  endtask

  task automatic send_word(word_t v);
    tbq_wdata = v; tbq_wr = 1; @(negedge clk); tbq_wr = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(pc == 0 && !tx_wr, "waits for the first step cycle");
    // ---- cycle 1: step 0, with rate check
    @(negedge clk); step_tick = 1; @(negedge clk); step_tick = 0;
    check(sco, "step clock occurred set at the tick");
    @(negedge clk);
    check(tx_wr && tx_data == 16'hABCD, "second MOVE sends in the 2nd cycle after the tick");
    repeat (6) @(negedge clk);     // let the queue fill: the 3rd word must wait (FULL)
    check(step_id == 16'd5, "step identifier written");
    send_word(16'h0055);             // echo word: its MOVE to the full queue must wait
    repeat (6) @(negedge clk);
    expect_word(16'hABCD, "constant to FIFO");
    expect_word(16'h1111, "RAM to RAM to FIFO");
    expect_word(16'h0055, "received word echoed");
    send_word(16'h0001);             // transition condition true
    repeat (5) @(negedge clk);
    check(32'(dut.state) == 0 && !sco, "waiting at STEP, step clock occurred cleared");
    // ---- cycle 2: transition to step 1
    tick();
    expect_word(16'h0007, "step 1 runs after transition");
    send_word(16'h0000);             // condition false: repeat step 1
    repeat (5) @(negedge clk);
    // ---- cycle 3: step 1 repeated
    tick();
    expect_word(16'h0007, "step 1 repeated");
    check(dut.step_ia == 12'd9, "step initial address = 9");
    send_word(16'h0001);             // condition true: go to step 0
    repeat (5) @(negedge clk);
    // ---- cycle 4: step 0 again, then overrun (no word sent)
    tick();
    expect_word(16'hABCD, "back in step 0");
    expect_word(16'h1111, "step 0 second word");
    repeat (10) @(negedge clk);
    check(!overrun, "no overrun while waiting inside the cycle");
    tick();
    repeat (2) @(negedge clk);
    check(overrun, "overrun detected when the cycle ends inside a segment");
    n = pc;
    send_word(16'h0001);
    repeat (5) @(negedge clk);
    check(pc == 12'(n) && !rx_empty, "stopped after overrun");
    check(full_waits > 0, $sformatf("FULL waits seen (%0d)", full_waits));
    check(empty_waits > 0, $sformatf("EMPTY waits seen (%0d)", empty_waits));
    check(b_acc && !b_over, "illegal PROM write stops with access error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
