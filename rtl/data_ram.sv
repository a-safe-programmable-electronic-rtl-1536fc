// data_ram: data RAM of a processor.
//
// Single-port RAM with asynchronous read and synchronous write, WORDS words
// of WIDTH bits. The master keeps all variables, temporaries and the internal
// state variables of function block instances here; nothing is initialised
// by hardware, so a program must write every location before reading it.
// Size is this design's choice (the document gives none).
module data_ram #(
  parameter int WORDS = 1024,
  parameter int WIDTH = 16
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     we,
  input  logic [WIDTH-1:0]         wdata
);
  logic [WIDTH-1:0] mem [WORDS];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end
endmodule
