// tb_master_prom: checks that the PROM image is loaded, that words missing
// from the image read as zero, and that both read ports work independently.
module tb_master_prom;
  import pes_pkg::*;
  logic [5:0] addr_i, addr_d;
  instr_t data_i, data_d;
  int checks = 0, failures = 0;

  master_prom #(.WORDS(64), .INIT_FILE("tb/tb_prom_image.hex")) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_i = 0; addr_d = 6'h10; #1;
    check(data_i == 32'h10c02c02, "word 0");
    check(data_d == 32'h0000beef, "word 0x10 on data port");
    addr_i = 1; addr_d = 2; #1;
    check(data_i == 32'h00000007, "word 1");
    check(data_d == 32'h0, "unset word reads zero");
    for (int a = 17; a < 64; a++) begin
      addr_i = 6'(a); #1;
      check(data_i == 32'h0, "upper words zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
