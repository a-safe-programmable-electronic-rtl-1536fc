// output_comparator: output latches of both slaves, their comparison and the
// actuator output port.
//
// Each slave writes its output words into its own bank of latch registers
// during a step cycle. At the next step cycle signal (tick) the two banks are
// checked for equality; if they agree, all words are transferred to the
// actuator output port together and become effective; if any word differs,
// the sticky error flag is set (ok low) and nothing is transferred. While
// `safe` is high (global error), the port shows the safe state SAFE_VALUE in
// every channel. Port and latches reset to SAFE_VALUE.
// The compare-then-transfer at the cycle boundary follows the document; the
// safe value (all zero: de-energised) and the reset values are this design's.
// bank_a/bank_b bring the latch contents out for a fail-safe comparator.
module output_comparator
  import pes_pkg::*;
#(
  parameter int    NUM_OUT    = 8,
  parameter word_t SAFE_VALUE = '0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       tick,
  input  logic                       safe,
  input  logic                       we_a,
  input  logic [$clog2(NUM_OUT)-1:0] addr_a,
  input  word_t                      data_a,
  input  logic                       we_b,
  input  logic [$clog2(NUM_OUT)-1:0] addr_b,
  input  word_t                      data_b,
  output word_t                      port [NUM_OUT],
  output logic [NUM_OUT*DATA_W-1:0]  bank_a,
  output logic [NUM_OUT*DATA_W-1:0]  bank_b,
  output logic                       ok,
  output logic                       transfer    // pulse: port updated
);
  word_t la [NUM_OUT];
  word_t lb [NUM_OUT];
  word_t port_q [NUM_OUT];
  logic  equal;

  always_comb begin
    equal = 1'b1;
    for (int i = 0; i < NUM_OUT; i++) begin
      if (la[i] != lb[i]) equal = 1'b0;
      bank_a[i*DATA_W +: DATA_W] = la[i];
      bank_b[i*DATA_W +: DATA_W] = lb[i];
      port[i] = (safe || !ok) ? SAFE_VALUE : port_q[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_OUT; i++) begin
        la[i]     <= SAFE_VALUE;
        lb[i]     <= SAFE_VALUE;
        port_q[i] <= SAFE_VALUE;
      end
      ok       <= 1'b1;
      transfer <= 1'b0;
    end else begin
      transfer <= 1'b0;
      if (we_a) la[addr_a] <= data_a;
      if (we_b) lb[addr_b] <= data_b;
      if (tick && ok && !safe) begin
        if (equal) begin
          for (int i = 0; i < NUM_OUT; i++) port_q[i] <= la[i];
          transfer <= 1'b1;
        end else begin
          ok <= 1'b0;
        end
      end
    end
  end
endmodule
