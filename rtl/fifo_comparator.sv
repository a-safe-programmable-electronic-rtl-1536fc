// fifo_comparator: comparator placed into the FIFO queues between the two
// channels of the dual-channel system.
//
// Two upstream fall-through FIFOs (one per channel) feed the comparator. When
// both show data ("data available" of both, combined by an AND gate) the two
// head words are popped and captured in two latches in the same clock edge.
// The latched words are then compared: if they differ, the sticky error flag
// is set and the comparator stops (nothing is forwarded and nothing more is
// taken); otherwise the word is pushed into both downstream FIFOs as soon as
// neither of them is FULL, and the latches are free for the next pair.
// This follows the document's description of the FIFO data comparison.
//
// The latch contents are also brought out (latch_a, latch_b) so that a fast
// fail-safe comparator can watch the same pair; a word stays in the latches
// until the next pair arrives. `enable` is the global correctness signal: no
// transfer takes place while it is low. Reset clears the latches to equal
// values (zero) and the error flag; this reset behaviour is this design's own.
// Timing: pair latched in cycle n, forwarded in cycle n+1 at the earliest.
module fifo_comparator #(
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  // upstream FIFO of channel 1 and channel 2
  input  logic [WIDTH-1:0] a_data,
  input  logic             a_empty,
  output logic             a_rd,
  input  logic [WIDTH-1:0] b_data,
  input  logic             b_empty,
  output logic             b_rd,
  // both downstream FIFOs receive the same word
  output logic [WIDTH-1:0] o_data,
  output logic             o_wr,
  input  logic             oa_full,
  input  logic             ob_full,
  // latch contents and result
  output logic [WIDTH-1:0] latch_a,
  output logic [WIDTH-1:0] latch_b,
  output logic             ok,
  output logic             transfer   // one pulse per forwarded word
);
  logic latched;
  logic take;

  // latch enable: both queues hold data, latches are free, no error
  assign take = enable && ok && !latched && !a_empty && !b_empty;
  assign a_rd = take;
  assign b_rd = take;

  assign o_data   = latch_a;
  assign o_wr     = enable && ok && latched && (latch_a == latch_b) && !oa_full && !ob_full;
  assign transfer = o_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latched <= 1'b0;
      latch_a <= '0;
      latch_b <= '0;
      ok      <= 1'b1;
    end else begin
      if (take) begin
        latch_a <= a_data;
        latch_b <= b_data;
        latched <= 1'b1;
      end else if (latched && ok && (latch_a != latch_b)) begin
        ok <= 1'b0;                    // error stop on inequality
      end else if (o_wr) begin
        latched <= 1'b0;
      end
    end
  end

  a_forward_equal: assert property (@(posedge clk) disable iff (!rst_n) o_wr |-> latch_a == latch_b)
    else $error("fifo_comparator: unequal words forwarded");
endmodule
