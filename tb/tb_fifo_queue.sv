// tb_fifo_queue: self-checking test of the fall-through FIFO.
// Pushes and pops random words against a queue model, checks fall-through
// (data visible one cycle after the first write), FULL at DEPTH words and
// EMPTY after the last pop.
module tb_fifo_queue;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  fifo_queue #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full, "empty after reset");
    // fall-through: one write, visible next cycle without a read
    wr_en = 1; wr_data = 16'hA5A5;
    @(negedge clk); wr_en = 0;
    check(!empty && rd_data == 16'hA5A5, "fall-through of first word");
    rd_en = 1; @(negedge clk); rd_en = 0;
    check(empty, "empty after single pop");
    // fill to FULL
    for (int i = 0; i < D; i++) begin
      wr_en = 1; wr_data = W'(i + 100); @(negedge clk);
    end
    wr_en = 0;
    check(full, "full after DEPTH writes");
    for (int i = 0; i < D; i++) begin
      check(rd_data == W'(i + 100), $sformatf("order word %0d", i));
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    check(empty && !full, "empty after draining");
    // random traffic against a model
    for (int n = 0; n < 3000; n++) begin
      wr_en = !full && ($urandom_range(0, 1) == 1);
      rd_en = !empty && ($urandom_range(0, 1) == 1);
      wr_data = W'($urandom);
      if (!empty) check(rd_data == model[0], "random: head word");
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
      check(empty == (model.size() == 0) && full == (model.size() == D), "random: flags");
    end
    wr_en = 0; rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
