// global_comparator_unit: collects all correctness signals of the system and
// forms the global correctness signal (the negated global error).
//
// Inputs are N_OK correctness signals (high = correct): FIFO and output
// comparators, fast fail-safe comparator outputs, processor watchdogs,
// processor and slave fault flags. While `init` is high (the initialisation
// signal held after switching on) the unit is being activated: global_ok is
// low and the inputs may still be settling. After `init` falls, global_ok is
// high as long as every input is high; the first low input clears it for
// good: only a new initialisation re-activates the system. `first_error`
// records which inputs were low at that moment.
// The function (AND of all signals, fed back to all units, error also an
// output) follows the document; the activation through `init` mirrors the
// initialisation of the fast comparators and is this design's choice.
module global_comparator_unit #(
  parameter int N_OK = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic [N_OK-1:0] ok_in,
  output logic            global_ok,
  output logic            global_error,
  output logic [N_OK-1:0] first_error
);
  logic tripped;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tripped     <= 1'b0;
      first_error <= '0;
      global_ok   <= 1'b0;
    end else if (init) begin
      tripped     <= 1'b0;
      first_error <= '0;
      global_ok   <= 1'b0;
    end else if (!tripped) begin
      if (!(&ok_in)) begin
        tripped     <= 1'b1;
        first_error <= ~ok_in;
        global_ok   <= 1'b0;
      end else begin
        global_ok <= 1'b1;
      end
    end
  end

  assign global_error = !global_ok;
endmodule
