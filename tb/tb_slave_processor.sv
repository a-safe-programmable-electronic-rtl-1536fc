// tb_slave_processor: invokes every function block of the slave's library
// with random arguments through real FIFO queues and compares each result
// with a reference computed here. Also checks the I/O blocks (input buffer
// read by IN_A, output latch write by OUT_A and AM), the time one invocation
// takes (after the tag is taken: arguments + 1 + results cycles when the
// queues do not wait), and
// that an unknown identification tag stops the slave with a fault.
module tb_slave_processor;
  import pes_pkg::*;
  localparam int NI = 8, NO = 8;
  logic clk = 0, rst_n = 0, enable = 1;
  // queues
  logic  in_wr = 0, in_full, rx_empty, rx_rd;
  word_t in_wdata = '0, rx_data;
  logic  tx_wr, tx_full, out_rd = 0, out_empty;
  word_t tx_data, out_q;
  // I/O
  logic [2:0] in_addr;
  word_t      in_data;
  word_t      inbuf [NI];
  logic       out_we;
  logic [2:0] out_addr;
  word_t      out_data;
  word_t      outlatch [NO];
  logic [15:0] cycle_no = 16'h0123;
  logic idle, fault, fb_done;
  int checks = 0, failures = 0;

  slave_processor #(.NUM_IN(NI), .NUM_OUT(NO)) dut (.*);
  fifo_queue #(.WIDTH(16), .DEPTH(16)) u_inq (
    .clk, .rst_n, .wr_en(in_wr), .wr_data(in_wdata), .rd_en(rx_rd), .rd_data(rx_data),
    .full(in_full), .empty(rx_empty)
  );
  fifo_queue #(.WIDTH(16), .DEPTH(16)) u_outq (
    .clk, .rst_n, .wr_en(tx_wr), .wr_data(tx_data), .rd_en(out_rd), .rd_data(out_q),
    .full(tx_full), .empty(out_empty)
  );

  assign in_data = inbuf[in_addr];
  always @(posedge clk) if (rst_n && out_we) outlatch[out_addr] <= out_data;

  always #5 clk = !clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- reference model ----------------
  function automatic int clip(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  function automatic longint s16(word_t w);
    return longint'(signed'(w));
  endfunction

  // ---------------- invocation ----------------
  word_t res [$];
  int    cyc;

  task automatic invoke(fb_id_e id, word_t a [$], int nres);
    int t0;
    in_wdata = word_t'(id); in_wr = 1; @(negedge clk);
    foreach (a[i]) begin in_wdata = a[i]; @(negedge clk); end
    in_wr = 0;
    t0 = 0;
    res.delete();
    while (res.size() < nres && t0 < 100) begin
      if (!out_empty) begin
        res.push_back(out_q); out_rd = 1; @(negedge clk); out_rd = 0;
      end else @(negedge clk);
      t0++;
    end
    while (!idle && t0 < 100) begin @(negedge clk); t0++; end
    check(res.size() == nres, $sformatf("FB %s returned %0d words", id.name(), res.size()));
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // invocation length: count busy cycles of one invocation
  int busy = 0;
  always @(posedge clk) if (rst_n && !idle) busy++;

  initial begin
    word_t a [$];
    longint x, e, i_new, d, y, sum;
    for (int i = 0; i < NI; i++) inbuf[i] = word_t'($urandom);
    for (int i = 0; i < NO; i++) outlatch[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      word_t xmin, xmax, kp, tn, tv, i1, e1, s, v;
      int ch, b;
      // IN_A
      ch = $urandom_range(0, NI - 1);
      xmin = word_t'($urandom_range(0, 16'h7FFF)) - 16'h4000;
      xmax = word_t'($urandom_range(0, 16'h7FFF)) - 16'h4000;
      a = '{xmin, xmax, 16'd1, word_t'(ch)};
      busy = 0;
      invoke(FB_IN_A, a, 1);
      check(busy == 4 + 1 + 1, $sformatf("IN_A takes %0d cycles", busy));
      x = s16(xmin) + (((s16(xmax) - s16(xmin)) * longint'(inbuf[ch])) >>> 16);
      check(res[0] == word_t'(clip(x)), $sformatf("IN_A %h want %h", res[0], word_t'(clip(x))));
      // C (PID)
      x  = longint'($urandom_range(0, 2047)) - 1024;
      kp = word_t'($urandom_range(0, 1023));
      tn = (n % 4 == 0) ? 16'd0 : word_t'($urandom_range(64, 2047));
      tv = word_t'($urandom_range(0, 511));
      i1 = word_t'($urandom_range(0, 4095)) - 16'd2048;
      e1 = word_t'($urandom_range(0, 2047)) - 16'd1024;
      a = '{word_t'(x), kp, tn, tv, i1, e1, 16'h5555};
      invoke(FB_C, a, 4);
      e = x;
      i_new = s16(i1);
      if (tn != 0) i_new = clip(i_new + (e * 256) / s16(tn));
      d = clip((s16(tv) * clip(e - s16(e1))) >>> 8);
      sum = clip(e + i_new + d);
      y = clip((s16(kp) * sum) >>> 8);
      check(res[0] == word_t'(y), $sformatf("C: Y %h want %h", res[0], word_t'(y)));
      check(res[1] == word_t'(i_new), "C: new integral state");
      check(res[2] == word_t'(x) && res[3] == word_t'(y), "C: previous deviation and output states");
      // OUT_A
      ch = $urandom_range(0, NO - 2);
      v = word_t'($urandom);
      invoke(FB_OUT_A, '{v, word_t'(ch)}, 0);
      check(outlatch[ch] == v, "OUT_A writes the output latch");
      // SAM, both limit kinds
      x = longint'($urandom_range(0, 65535)) - 32768;
      s = word_t'($urandom);
      b = $urandom_range(0, 1);
      invoke(FB_SAM, '{word_t'(x), word_t'(b), s, 16'd0}, 2);
      v = (b == 0) ? word_t'(x > s16(s)) : word_t'(x < s16(s));
      check(res[0] == v && res[1] == v, $sformatf("SAM low=%0d", b));
      // Boolean
      for (int k = 0; k < 4; k++) begin
        word_t p, q;
        p = word_t'(k & 1); q = word_t'(k >> 1);
        invoke(FB_OR, '{p, q}, 1);  check(res[0] == word_t'((k & 1) | (k >> 1)), "OR");
        invoke(FB_AND, '{p, q}, 1); check(res[0] == word_t'((k & 1) & (k >> 1)), "AND");
      end
      invoke(FB_NOT, '{16'd0}, 1); check(res[0] == 16'd1, "NOT 0");
      invoke(FB_NOT, '{16'd7}, 1); check(res[0] == 16'd0, "NOT 7");
    end
    // TON: PT = 3 step cycles
    begin
      word_t el = 0;
      for (int k = 0; k < 6; k++) begin
        invoke(FB_TON, '{16'd1, 16'd3, el}, 2);
        el = res[1];
        check(res[1] == word_t'(k + 1) && res[0] == word_t'(k + 1 >= 3), $sformatf("TON step %0d", k));
      end
      invoke(FB_TON, '{16'd0, 16'd3, el}, 2);
      check(res[0] == 0 && res[1] == 0, "TON reset when IN false");
    end
    // AM: rising input with AON creates a record in the alarm channel
    outlatch[NO-1] = '0;
    invoke(FB_AM, '{16'd1, 16'd1, 16'd1, 16'd14, 16'd0}, 1);
    check(res[0] == 16'd1, "AM state = input");
    check(outlatch[NO-1] == {8'd14, 8'h23}, $sformatf("AM record %h", outlatch[NO-1]));
    outlatch[NO-1] = '0;
    invoke(FB_AM, '{16'd1, 16'd1, 16'd1, 16'd14, 16'd1}, 1);
    check(outlatch[NO-1] == '0, "AM: no record without a rising edge");
    // unknown tag
    in_wdata = 16'h00EE; in_wr = 1; @(negedge clk); in_wr = 0;
    repeat (3) @(negedge clk);
    check(fault && !idle, "unknown function block stops the slave");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
