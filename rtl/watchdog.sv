// watchdog: operation monitoring timer of one processor.
//
// The monitored processor must pulse `kick` at least once every TIMEOUT clock
// cycles while `arm` is high; otherwise `ok` goes low and stays low until
// reset. The counter restarts on every kick and holds while `arm` is low.
// The document names processor watch-dog timers as inputs of the global
// comparator unit without describing them; this counter is the simplest
// circuit with that function, and what kicks it is chosen in the top level.
module watchdog #(
  parameter int TIMEOUT = 200_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic arm,
  input  logic kick,
  output logic ok
);
  localparam int CW = $clog2(TIMEOUT + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      ok  <= 1'b1;
    end else if (kick || !arm) begin
      cnt <= '0;
    end else if (32'(cnt) >= TIMEOUT - 1) begin
      ok <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
