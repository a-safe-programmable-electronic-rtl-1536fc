// input_buffer: input driver buffer of one slave processor.
//
// At the beginning of every step cycle (tick) the driver reads all NUM_IN
// sensor input words en bloc and stores them in this buffer; during the rest
// of the cycle the slave reads them through the asynchronous read port, so
// every read within one cycle sees the same snapshot, whatever the inputs do
// meanwhile. Each slave has its own, independent buffer.
// The snapshot-at-cycle-start behaviour follows the document; width and
// number of inputs are this design's choice. The buffer is cleared by reset.
module input_buffer
  import pes_pkg::*;
#(
  parameter int NUM_IN = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tick,
  input  word_t                     sensor_in [NUM_IN],
  input  logic [$clog2(NUM_IN)-1:0] rd_addr,
  output word_t                     rd_data
);
  word_t buf_q [NUM_IN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_IN; i++) buf_q[i] <= '0;
    end else if (tick) begin
      for (int i = 0; i < NUM_IN; i++) buf_q[i] <= sensor_in[i];
    end
  end

  assign rd_data = buf_q[rd_addr];
endmodule
