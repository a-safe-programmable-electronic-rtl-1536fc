// tb_fs_comparator: a 16-bit fast fail-safe comparator built of four 4-bit
// units. Equal words keep `ok` high; a difference in any nibble that lasts a
// wave period drops it within about 40 us and for good; init re-activates.
module tb_fs_comparator;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, init = 0, sq, ok;
  logic [15:0] a = 0, b = 0;
  int checks = 0, failures = 0;

  square_wave_gen #(.CLK_HZ(10_000_000), .SQ_HZ(100_000)) u_sq (.clk(clk), .rst_n(rst_n), .sq(sq));
  fs_comparator #(.W(16), .CLK_HZ(10_000_000), .SQ_HZ(100_000)) dut (.*);

  always #50 clk = !clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ns rst_n = 1;
    #30us;
    check(!ok, "inactive before init");
    init = 1; #50us; init = 0; #20us;
    check(ok, "active after init");
    for (int i = 0; i < 20; i++) begin
      a = 16'($urandom); b = a; #37us;
      check(ok, "equal words keep ok");
    end
    for (int n = 0; n < 4; n++) begin
      b = a ^ (16'h1 << (4 * n + n));
      #60us;
      check(!ok, $sformatf("difference in nibble %0d detected", n));
      b = a; #60us;
      check(!ok, "stays low after the words agree again");
      init = 1; #50us; init = 0; #20us;
      check(ok, "re-activated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
