// tb_output_comparator: output words written by two slaves appear on the port
// only at the next tick, and only when both banks agree; a disagreement sets
// the error and drives the safe value; `safe` forces the safe value too.
module tb_output_comparator;
  import pes_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, tick = 0, safe = 0;
  logic we_a = 0, we_b = 0;
  logic [1:0] addr_a = 0, addr_b = 0;
  word_t data_a = 0, data_b = 0;
  word_t port [N];
  logic [N*DATA_W-1:0] bank_a, bank_b;
  logic ok, transfer;
  word_t exp_port [N];
  int checks = 0, failures = 0;

  output_comparator #(.NUM_OUT(N), .SAFE_VALUE(16'h0000)) dut (.*);

  always #5 clk = !clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_both(int ch, word_t v);
    @(negedge clk);
    we_a = 1; we_b = 1; addr_a = 2'(ch); addr_b = 2'(ch); data_a = v; data_b = v;
    @(negedge clk);
    we_a = 0; we_b = 0;
  endtask

  task automatic do_tick();
    @(negedge clk); tick = 1; @(negedge clk); tick = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) exp_port[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 10; c++) begin
      for (int i = 0; i < N; i++) begin
        word_t v = word_t'($urandom);
        write_both(i, v);
        check(port[i] == exp_port[i], "not effective before the tick");
        exp_port[i] = v;
      end
      do_tick();
      for (int i = 0; i < N; i++) check(port[i] == exp_port[i], "transferred at tick");
      check(ok, "ok while equal");
    end
    safe = 1; #1;
    for (int i = 0; i < N; i++) check(port[i] == '0, "safe value under global error");
    safe = 0;
    // disagreement
    @(negedge clk); we_a = 1; addr_a = 2; data_a = 16'h1111;
    we_b = 1; addr_b = 2; data_b = 16'h2222; @(negedge clk); we_a = 0; we_b = 0;
    do_tick();
    check(!ok, "error on unequal outputs");
    for (int i = 0; i < N; i++) check(port[i] == '0, "safe value after disagreement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
