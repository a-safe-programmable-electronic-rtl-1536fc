// tb_fifo_comparator: self-checking test of the FIFO comparator.
// Two upstream queues are modelled by the testbench. Equal words must reach
// both downstream queues in order, the comparator must wait for data on both
// sides and for space downstream, and a differing pair must set the sticky
// error and stop all transfers.
module tb_fifo_comparator;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, enable = 1;
  logic [W-1:0] a_data, b_data, o_data, latch_a, latch_b;
  logic a_empty, b_empty, a_rd, b_rd, o_wr, oa_full = 0, ob_full = 0, ok, transfer;
  int checks = 0, failures = 0;
  logic [W-1:0] qa [$], qb [$], got [$];

  fifo_comparator #(.WIDTH(W)) dut (.*);

  // upstream queue outputs, refreshed after every change of the queues
  task automatic refresh();
    a_empty = qa.size() == 0;
    b_empty = qb.size() == 0;
    a_data  = a_empty ? '0 : qa[0];
    b_data  = b_empty ? '0 : qb[0];
  endtask

  task automatic push(logic [W-1:0] va, logic [W-1:0] vb);
    qa.push_back(va); qb.push_back(vb); refresh();
  endtask

  always #5 clk = !clk;
  // queue model: sample the handshakes half a cycle before the edge that
  // acts on them, update the queues just after that edge
  always begin
    logic ra, rb, w;
    logic [W-1:0] d;
    @(negedge clk);
    #2;
    ra = rst_n && a_rd; rb = rst_n && b_rd; w = rst_n && o_wr; d = o_data;
    @(posedge clk);
    #1;
    if (ra) void'(qa.pop_front());
    if (rb) void'(qb.pop_front());
    if (w) got.push_back(d);
    refresh();
  end

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
    int t0;
    refresh();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // only channel A has data: nothing may move
    qa.push_back(16'h1234); refresh();
    repeat (5) @(negedge clk);
    check(got.size() == 0 && qa.size() == 1, "waits for both channels");
    qb.push_back(16'h1234); refresh();
    repeat (4) @(negedge clk);
    check(got.size() == 1 && got[0] == 16'h1234, $sformatf("equal pair forwarded (%0d words)", got.size()));
    // downstream full: hold the word
    oa_full = 1;
    push(16'h0042, 16'h0042);
    repeat (5) @(negedge clk);
    check(got.size() == 1, "holds while a downstream queue is FULL");
    check(latch_a == 16'h0042 && latch_b == 16'h0042, "latches show the pair");
    oa_full = 0;
    repeat (3) @(negedge clk);
    check(got.size() == 2 && got[1] == 16'h0042, "forwarded once space is free");
    // a burst of random equal words, with throughput check (2 cycles/word)
    for (int i = 0; i < 50; i++) begin
      logic [W-1:0] v = W'($urandom);
      push(v, v);
    end
    t0 = 0;
    while (got.size() < 52 && t0 < 400) begin @(negedge clk); t0++; end
    check(got.size() == 52, "burst forwarded");
    check(t0 <= 101, $sformatf("burst took %0d cycles (<= 2 per word)", t0));
    check(ok, "no error for equal data");
    // unequal pair: error stop
    push(16'h00F0, 16'h00F1);
    push(16'h0001, 16'h0001);
    repeat (10) @(negedge clk);
    check(!ok, "error on inequality");
    check(got.size() == 52, "unequal word not forwarded");
    check(qa.size() == 1 && qb.size() == 1, "stopped: no further words taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
