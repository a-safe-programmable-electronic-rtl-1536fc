// tb_data_ram: writes random words to random addresses and reads them back
// against a model.
module tb_data_ram;
  localparam int N = 64;
  logic clk = 0, we = 0;
  logic [5:0] addr = 0;
  logic [15:0] rdata, wdata = 0;
  logic [15:0] model [N];
  logic written [N];
  int checks = 0, failures = 0;

  data_ram #(.WORDS(N), .WIDTH(16)) dut (.*);

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
    for (int i = 0; i < N; i++) written[i] = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); we = 1; addr = 6'(i); wdata = 16'($urandom);
      model[i] = wdata; written[i] = 1;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr = 6'($urandom_range(0, N - 1));
      we = $urandom_range(0, 1) == 1;
      wdata = 16'($urandom);
      #1 check(rdata == model[addr], "read matches model");
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
