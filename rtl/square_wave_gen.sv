// square_wave_gen: rectangular-wave generator of the fast fail-safe comparator.
//
// In the comparator's primary unit a 555 timer (U5) produces a 100 kHz
// rectangular wave that is fed into the cascade inputs of the comparator
// chips. Here the wave is derived digitally from the system clock: `sq`
// toggles every CLK_HZ/(2*SQ_HZ) clock cycles (50 at 10 MHz), giving SQ_HZ
// with a 50 % duty cycle. The 100 kHz frequency is the document's; the
// digital divider in place of the 555 and the 10 MHz system clock are this
// design's choice. `sq` is low after reset.
module square_wave_gen #(
  parameter int CLK_HZ = 10_000_000,
  parameter int SQ_HZ  = 100_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic sq
);
  localparam int HALF = CLK_HZ / (2 * SQ_HZ);
  localparam int CW   = $clog2(HALF + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      sq  <= 1'b0;
    end else if (32'(cnt) == HALF - 1) begin
      cnt <= '0;
      sq  <= !sq;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
