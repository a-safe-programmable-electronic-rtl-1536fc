// tb_global_comparator_unit: global_ok is low during initialisation, high
// while all inputs are high, and falls for good at the first low input,
// recording which inputs were low. A new initialisation re-activates it.
module tb_global_comparator_unit;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, init = 1;
  logic [N-1:0] ok_in = '0, first_error;
  logic global_ok, global_error;
  int checks = 0, failures = 0;

  global_comparator_unit #(.N_OK(N)) dut (.*);

  always #5 clk = !clk;

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(!global_ok && global_error, "not active during init");
    ok_in = '1;
    repeat (2) @(negedge clk);
    init = 0;
    repeat (2) @(negedge clk);
    check(global_ok && !global_error, "active after init");
    for (int b = 0; b < N; b++) begin
      ok_in = '1; ok_in[b] = 0;
      @(negedge clk);
      check(!global_ok, $sformatf("input %0d low stops the system", b));
      check(first_error == (N'(1) << b), "source recorded");
      ok_in = '1;
      repeat (3) @(negedge clk);
      check(!global_ok, "stays stopped after the input recovers");
      init = 1; @(negedge clk); init = 0; repeat (2) @(negedge clk);
      check(global_ok && first_error == '0, "re-activated by init");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
