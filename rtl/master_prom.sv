// master_prom: application program PROM of a master processor.
//
// Read-only memory holding the master's object program (MOVE and STEP
// instructions) and its constants. Its contents come from a hex image named by
// INIT_FILE (one INSTR_W-bit word per line), standing for the (E)PROM that is
// programmed by the user and sealed into the target; words not in the image
// read as zero. There is no write port: programs cannot be changed at run
// time. Two asynchronous read ports: one fetches the instruction at the PC,
// one reads a constant operand of a MOVE.
// Size (2048 words) and word width are this design's choice.
module master_prom
  import pes_pkg::*;
#(
  parameter int    WORDS     = 2048,
  parameter string INIT_FILE = ""
) (
  input  logic [$clog2(WORDS)-1:0] addr_i,
  output instr_t                   data_i,
  input  logic [$clog2(WORDS)-1:0] addr_d,
  output instr_t                   data_d
);
  instr_t mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign data_i = mem[addr_i];
  assign data_d = mem[addr_d];
endmodule
