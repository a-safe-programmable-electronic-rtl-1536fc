// step_cycle_gen: step cycle generator, the basic time reference of the
// programmable logic controller.
//
// Derives from the system clock a periodic step-cycle signal: `tick` is high
// for one clock cycle every STEP_CYCLES clock cycles. At a tick the input
// drivers latch their input data, the output comparator enables the output
// data, and the master processors leave their STEP wait. `cycle_no` counts
// step cycles (wrapping) and serves as a time stamp. The first tick comes
// STEP_CYCLES clock cycles after reset.
// The document gives the principle (a periodic signal made from the system
// clock, long enough for the slowest step) but no length; the default of
// 100,000 clock cycles (10 ms at 10 MHz) is this design's choice.
module step_cycle_gen #(
  parameter int STEP_CYCLES = 100_000
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        tick,
  output logic [15:0] cycle_no
);
  localparam int CW = $clog2(STEP_CYCLES + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      tick     <= 1'b0;
      cycle_no <= '0;
    end else begin
      if (32'(cnt) == STEP_CYCLES - 1) begin
        cnt      <= '0;
        tick     <= 1'b1;
        cycle_no <= cycle_no + 16'd1;
      end else begin
        cnt  <= cnt + 1'b1;
        tick <= 1'b0;
      end
    end
  end
endmodule
