// tb_input_buffer: the buffer must take a snapshot of all inputs at a tick
// and keep it unchanged while the inputs change during the cycle.
module tb_input_buffer;
  import pes_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, tick = 0;
  word_t sensor_in [N];
  word_t snap [N];
  logic [2:0] rd_addr = 0;
  word_t rd_data;
  int checks = 0, failures = 0;

  input_buffer #(.NUM_IN(N)) dut (.*);

  always #5 clk = !clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) sensor_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 20; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin sensor_in[i] = word_t'($urandom); snap[i] = sensor_in[i]; end
      tick = 1; @(negedge clk); tick = 0;
      for (int k = 0; k < 10; k++) begin
        for (int i = 0; i < N; i++) sensor_in[i] = word_t'($urandom);   // inputs move on
        rd_addr = 3'($urandom_range(0, N - 1));
        #1 check(rd_data == snap[rd_addr], "snapshot held during the cycle");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
