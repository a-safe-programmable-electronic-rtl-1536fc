// fs_comparator: fast fail-safe comparator for words of W bits.
//
// The document's comparator handles 4 bits: a primary unit that turns the
// comparison into rectangular signals Q1/Q2 and a secondary unit that checks
// Q1/Q2 and holds its output VGL low after any disagreement or fault. For a
// W-bit word this design places W/4 such pairs side by side, all driven by one
// square wave, and `ok` is high only while every VGL is high. How the
// document's 4-bit comparator is widened to the word width is not described
// there; this side-by-side arrangement is this design's choice.
// Timing: a disagreement lasting at least one wave period pulls `ok` low about
// 40 us later, and it stays low until `init` re-activates the comparator.
module fs_comparator #(
  parameter int W      = 16,
  parameter int CLK_HZ = 10_000_000,
  parameter int SQ_HZ  = 100_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         sq,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         ok
);
  localparam int N = W / 4;
  logic [N-1:0] vgl;

  for (genvar i = 0; i < N; i++) begin : g_nib
    logic q1, q2;
    fs_primary_unit u_pri (
      .a(a[4*i +: 4]), .b(b[4*i +: 4]), .sq(sq), .q1(q1), .q2(q2)
    );
    fs_secondary_unit #(.CLK_HZ(CLK_HZ), .SQ_HZ(SQ_HZ)) u_sec (
      .clk(clk), .rst_n(rst_n), .RESET(init), .Q1(q1), .Q2(q2), .VGL(vgl[i])
    );
  end

  assign ok = &vgl;
endmodule
