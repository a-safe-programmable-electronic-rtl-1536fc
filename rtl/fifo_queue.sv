// fifo_queue: fall-through FIFO queue between a master and a slave processor.
//
// A word written into an empty queue appears at the output in the next clock
// cycle without a read request ("fall-through"): rd_data always shows the
// oldest word while EMPTY is low. FULL and EMPTY are the two single-bit status
// registers; they are set and cleared by the queue itself and are not visible
// to programs. A producer that sees FULL, or a consumer that sees EMPTY, waits.
//
// Interface: wr_en/wr_data push, rd_en pops the word shown on rd_data.
// A push while full or a pop while empty is ignored; assertions flag either.
// Depth and width are this design's choice; the structure (fall-through memory
// plus FULL and EMPTY registers) follows the document.
module fifo_queue #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;
  logic [PW:0]      count;
  logic             do_wr, do_rd;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rp];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      full  <= 1'b0;
      empty <= 1'b1;
    end else begin
      if (do_wr) wp <= next_ptr(wp);
      if (do_rd) rp <= next_ptr(rp);
      count <= count + (PW+1)'(do_wr) - (PW+1)'(do_rd);
      full  <= (32'(count) + 32'(do_wr) - 32'(do_rd)) == DEPTH;
      empty <= (32'(count) + 32'(do_wr) - 32'(do_rd)) == 0;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("fifo_queue: write while FULL");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("fifo_queue: read while EMPTY");
endmodule
