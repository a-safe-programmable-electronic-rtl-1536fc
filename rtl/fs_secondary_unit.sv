// fs_secondary_unit: behavioural model of the secondary unit of the fast
// fail-safe comparator (an analogue, transformer-coupled circuit that cannot
// be digital logic; this model is not meant for synthesis).
//
// The real unit passes the rectangular signals Q1 and Q2 through opto-couplers
// that are unblocked only while its own output VGL (or the initialisation
// relay, driven by RESET) supplies them. Coincident pulses of Q1 and Q2 start
// oscillations that keep a capacitor charged; its voltage is VGL. Once the
// pulses stop coinciding (a signal missing, out of phase, a device failed)
// the capacitor discharges, the opto-couplers block, and VGL stays low until
// RESET re-initialises the unit.
//
// The model samples Q1 and Q2 with `clk` (which has no counterpart in the
// circuit; it only measures time). A pulse is a rising edge of Q1 and Q2 in
// the same sample. If no pulse arrives within 1.5 wave periods the unit
// becomes blocked (one missed pulse is enough, as the document says); VGL then
// falls DISCHARGE_US (40 us in the document) after the last pulse and stays
// low. With RESET high the unit is unblocked and recharges on the next pulse.
// VGL is low at power-on (reset of the model's state through rst_n).
module fs_secondary_unit #(
  parameter int CLK_HZ       = 10_000_000,
  parameter int SQ_HZ        = 100_000,
  parameter int DISCHARGE_US = 40
) (
  input  logic clk,
  input  logic rst_n,      // power-on of the model
  input  logic RESET,      // initialisation signal (relay PK1)
  input  logic Q1,
  input  logic Q2,
  output logic VGL
);
  localparam int PERIOD    = CLK_HZ / SQ_HZ;
  localparam int MISS      = PERIOD + PERIOD / 2;
  localparam int DISCHARGE = (CLK_HZ / 1_000_000) * DISCHARGE_US;
  localparam int CW        = $clog2(DISCHARGE + 2);

  logic          q1_d, q2_d, pulse, blocked;
  logic [CW-1:0] since;     // clock cycles since the last coincident pulse

  assign pulse = Q1 && Q2 && !q1_d && !q2_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1_d    <= 1'b0;
      q2_d    <= 1'b0;
      blocked <= 1'b1;
      since   <= CW'(DISCHARGE);
    end else begin
      q1_d <= Q1;
      q2_d <= Q2;
      if (RESET) blocked <= 1'b0;
      else if (32'(since) >= MISS) blocked <= 1'b1;
      if (pulse && (!blocked || RESET)) since <= '0;
      else if (32'(since) < DISCHARGE) since <= since + 1'b1;
    end
  end

  assign VGL = 32'(since) < DISCHARGE;
endmodule
