// master_processor: control flow processor of one channel.
//
// The master executes the application program, i.e. sequences of function
// block invocations, out of its PROM. It knows two instructions:
//   MOVE src,dst  copies one word between two locations of its address space
//                 (PROM constants, RAM, FIFO registers, step registers,
//                 transition condition register) and increments the PC.
//                 A read of the FIFO receive register waits while the queue
//                 from the slaves is EMPTY; a write to the FIFO transmit
//                 register waits while the queue to the slaves is FULL.
//   STEP next     ends the program segment of a step. The processor waits for
//                 the step cycle signal; when it comes, the step clock
//                 occurred register is set and the transition condition
//                 register decides: false -> PC is reloaded from the step
//                 initial address register (the segment runs again), true ->
//                 PC and step initial address are loaded with `next`.
// If the step cycle signal arrives while a segment is still running (the PC
// has not reached its STEP), the segment overran its step cycle: the
// processor stops and raises `overrun`. Any access the address map does not
// allow (writing the PROM, reading the transmit register, an unmapped address
// or an unknown opcode) stops it likewise and raises `access_err`.
// The PC and the step clock occurred register are not in the address space.
// While `enable` (the global correctness signal) is low the processor is
// frozen: it neither executes nor accepts the step cycle signal.
//
// Follows the document: the two instructions, the registers, FIFO waits, the
// STEP decision and the overrun error. This design's own choices: instruction
// encoding and address map (see pes_pkg), one MOVE per clock cycle when it
// does not wait, transition condition cleared after each step decision, the
// step clock occurred register cleared again when the next STEP is reached,
// and the processor waiting for the first step cycle signal after reset with
// PC and step initial address at 0.
module master_processor
  import pes_pkg::*;
#(
  parameter int    PROM_WORDS = 2048,
  parameter int    RAM_WORDS  = 1024,
  parameter string PROM_INIT  = ""
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,       // global correctness signal
  input  logic  step_tick,    // step cycle signal
  // to the slaves (transmit queue)
  output logic  tx_wr,
  output word_t tx_data,
  input  logic  tx_full,
  // from the slaves (receive queue)
  output logic  rx_rd,
  input  word_t rx_data,
  input  logic  rx_empty,
  // status
  output logic  overrun,
  output logic  access_err,
  output logic  step_clock_occurred,
  output logic  step_done,    // pulse: a step decision was taken
  output word_t step_id,
  output addr_t pc
);
  localparam int PAW = $clog2(PROM_WORDS);
  localparam int RAW = $clog2(RAM_WORDS);

  typedef enum logic [1:0] {S_WAIT, S_RUN, S_HALT} state_e;
  state_e state;

  instr_t instr, prom_d;
  word_t  ram_rdata;
  addr_t  step_ia;
  word_t  trans_cond;

  opcode_e op;
  addr_t   src, dst;
  assign op  = opcode_e'(instr[31:28]);
  assign src = instr[23:12];
  assign dst = instr[11:0];

  master_prom #(.WORDS(PROM_WORDS), .INIT_FILE(PROM_INIT)) u_prom (
    .addr_i(pc[PAW-1:0]), .data_i(instr),
    .addr_d(src[PAW-1:0]), .data_d(prom_d)
  );

  // address decoding
  function automatic logic in_prom(addr_t a);
    return a < addr_t'(PROM_WORDS);
  endfunction
  function automatic logic in_ram(addr_t a);
    return a >= RAM_BASE && a < RAM_BASE + addr_t'(RAM_WORDS);
  endfunction

  logic  src_ok, dst_ok, src_wait, dst_wait, mv_go;
  word_t src_val;
  logic  ram_we;
  addr_t ram_a;

  always_comb begin
    src_ok  = 1'b1;
    src_val = '0;
    if (in_prom(src))              src_val = prom_d[DATA_W-1:0];
    else if (in_ram(src))          src_val = ram_rdata;
    else if (src == REG_FIFO_RX)   src_val = rx_data;
    else if (src == REG_STEP_ID)   src_val = step_id;
    else if (src == REG_STEP_IA)   src_val = word_t'(step_ia);
    else if (src == REG_TRANS)     src_val = trans_cond;
    else                           src_ok  = 1'b0;
    dst_ok = in_ram(dst) || dst == REG_FIFO_TX || dst == REG_STEP_ID ||
             dst == REG_STEP_IA || dst == REG_TRANS;
  end

  assign src_wait = (src == REG_FIFO_RX) && rx_empty;
  assign dst_wait = (dst == REG_FIFO_TX) && tx_full;
  assign mv_go    = enable && state == S_RUN && op == OP_MOVE && src_ok && dst_ok &&
                    !src_wait && !dst_wait && !step_tick;

  assign ram_a   = in_ram(src) ? src - RAM_BASE : dst - RAM_BASE;
  assign ram_we  = mv_go && in_ram(dst);
  assign rx_rd   = mv_go && src == REG_FIFO_RX;
  assign tx_wr   = mv_go && dst == REG_FIFO_TX;
  assign tx_data = src_val;

  // RAM address: a RAM-to-RAM move reads first and writes in the same cycle;
  // the asynchronous read and the write port share one address, so such a
  // move is split: cycle 1 reads into a holding register, cycle 2 writes.
  logic  r2r, r2r_phase;
  word_t hold;
  assign r2r = in_ram(src) && in_ram(dst);

  data_ram #(.WORDS(RAM_WORDS), .WIDTH(DATA_W)) u_ram (
    .clk  (clk),
    .addr ((r2r && r2r_phase) ? RAW'(dst - RAM_BASE) : RAW'(ram_a)),
    .rdata(ram_rdata),
    .we   (ram_we && (!r2r || r2r_phase)),
    .wdata((r2r && r2r_phase) ? hold : src_val)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state               <= S_WAIT;
      pc                  <= '0;
      step_ia             <= '0;
      step_id             <= '0;
      trans_cond          <= '0;
      step_clock_occurred <= 1'b0;
      overrun             <= 1'b0;
      access_err          <= 1'b0;
      step_done           <= 1'b0;
      r2r_phase           <= 1'b0;
      hold                <= '0;
    end else begin
      step_done <= 1'b0;
      if (enable) begin
        case (state)
          S_WAIT: if (step_tick) begin
            step_clock_occurred <= 1'b1;
            step_done           <= 1'b1;
            trans_cond          <= '0;
            state               <= S_RUN;
            if (trans_cond != '0) begin
              pc      <= dst;
              step_ia <= dst;
            end else begin
              pc      <= step_ia;
            end
          end
          S_RUN: begin
            if (step_tick) begin
              overrun <= 1'b1;          // segment did not end within its step cycle
              state   <= S_HALT;
            end else if (op == OP_STEP) begin
              step_clock_occurred <= 1'b0;
              state               <= S_WAIT;
            end else if (op != OP_MOVE || !src_ok || !dst_ok) begin
              access_err <= 1'b1;
              state      <= S_HALT;
            end else if (mv_go) begin
              if (r2r && !r2r_phase) begin
                hold      <= src_val;
                r2r_phase <= 1'b1;
              end else begin
                r2r_phase <= 1'b0;
                pc        <= pc + 1'b1;
                if (dst == REG_STEP_ID) step_id    <= src_val;
                if (dst == REG_STEP_IA) step_ia    <= addr_t'(src_val);
                if (dst == REG_TRANS)   trans_cond <= src_val;
              end
            end
          end
          default: state <= S_HALT;
        endcase
      end
    end
  end

  a_no_move_while_waiting: assert property (@(posedge clk) disable iff (!rst_n)
      state != S_RUN |-> !(tx_wr || rx_rd))
    else $error("master_processor: FIFO access outside a running segment");
endmodule
