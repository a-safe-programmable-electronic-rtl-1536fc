// slave_processor: basic function block processor of one channel.
//
// The slave executes function blocks on request of its master and keeps no
// state of its own between requests: all parameters and internal state
// variables arrive through its input queue and all results and new internal
// states leave through its output queue. One invocation is
//   1. pop the identification tag of the function block,
//   2. pop as many argument words as that block takes (inputs, then internal
//      states, in the order of the block's description),
//   3. execute the block (one clock cycle),
//   4. push its results (outputs, then new internal states).
// An unknown tag stops the slave and raises `fault`.
//
// The slave also owns the process I/O: IN_A reads a word of the input buffer
// (filled by the input driver at the start of each step cycle) and OUT_A
// writes a channel of the output latch (checked and put out at the next step
// cycle). The alarm block AM writes its alarm record into output channel
// ALARM_CH.
//
// The document describes the slave as a processor running verified firmware
// out of a mask ROM and gives the interface of each block used in its example
// (arguments and results), but not how the blocks compute. Here the block
// library is hard-wired instead of firmware, and the arithmetic of every
// block is this design's own (Q8.8 signed fixed point, see pes_pkg):
//   IN_A  X = XMIN + (XMAX-XMIN)*raw/2^16, raw = input word HWADR (unsigned);
//         XUNIT is a unit tag and does not change the value.
//   C     PID on the deviation e = X: I' = I + e/TN (no integral if TN = 0),
//         D = TV*(e - e_prev), Y = KP*(e + I' + D); states I', e, Y.
//   OUT_A output channel HWADR <= Y.
//   SAM   QS = X > S if LOW = 0 (high limit), X < S otherwise; state = QS.
//   OR, AND, NOT  on Boolean words.
//   AM    state = I; on a rising I with AON true the record
//         {APRIO[7:0], step cycle number[7:0]} goes to channel ALARM_CH.
//   TON   on-delay timer counted in step cycles: state = number of
//         consecutive invocations with IN true, Q = state >= PT.
module slave_processor
  import pes_pkg::*;
#(
  parameter int NUM_IN   = 8,
  parameter int NUM_OUT  = 8,
  parameter int ALARM_CH = NUM_OUT - 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  // input queue (from the masters)
  input  word_t rx_data,
  input  logic  rx_empty,
  output logic  rx_rd,
  // output queue (to the masters)
  output word_t tx_data,
  output logic  tx_wr,
  input  logic  tx_full,
  // input buffer read port
  output logic [$clog2(NUM_IN)-1:0]  in_addr,
  input  word_t                      in_data,
  // output latch write port
  output logic                       out_we,
  output logic [$clog2(NUM_OUT)-1:0] out_addr,
  output word_t                      out_data,
  // time stamp for alarm records
  input  logic [15:0]                cycle_no,
  // status
  output logic  idle,
  output logic  fault,
  output logic  fb_done       // pulse: one function block finished
);
  typedef enum logic [2:0] {S_ID, S_ARGS, S_EXEC, S_RES, S_HALT} state_e;
  state_e state;

  logic [7:0] id;
  word_t      args [MAX_ARGS];
  word_t      res  [MAX_RES];
  logic [2:0] idx;
  int         nargs, nres;

  assign nargs = fb_num_args(id);
  assign nres  = fb_num_results(id);
  assign idle  = state == S_ID;

  // ---- fixed point helpers ----
  function automatic word_t sat(logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'h7FFF;
    else if (v < -48'sd32768) return 16'h8000;
    else                      return word_t'(v);
  endfunction
  function automatic logic signed [47:0] sx(word_t w);
    return 48'(signed'(w));
  endfunction
  function automatic word_t fmul(word_t a, word_t b);   // Q8.8 * Q8.8
    return sat((sx(a) * sx(b)) >>> FRAC_BITS);
  endfunction
  function automatic word_t bool_w(logic b);
    return word_t'(b);
  endfunction

  // ---- block execution (combinational) ----
  word_t r [MAX_RES];
  logic  ow;
  logic [$clog2(NUM_OUT)-1:0] oa;
  word_t od;

  assign in_addr = $clog2(NUM_IN)'(args[3]);

  always_comb begin
    logic signed [47:0] e, i_new, d, sum, raw, span;
    for (int k = 0; k < MAX_RES; k++) r[k] = '0;
    ow = 1'b0; oa = '0; od = '0;
    e = '0; i_new = '0; d = '0; sum = '0; raw = '0; span = '0;
    case (id)
      FB_IN_A: begin
        raw  = 48'(in_data);
        span = sx(args[1]) - sx(args[0]);
        r[0] = sat(sx(args[0]) + ((span * raw) >>> 16));
      end
      FB_C: begin
        e     = sx(args[0]);
        i_new = sx(args[4]);
        if (args[2] != '0) i_new = sx(sat(i_new + ((e <<< FRAC_BITS) / sx(args[2]))));
        d     = sx(fmul(args[3], sat(e - sx(args[5]))));
        sum   = sx(sat(e + i_new + d));
        r[0]  = fmul(args[1], word_t'(sum));
        r[1]  = word_t'(i_new);
        r[2]  = args[0];
        r[3]  = r[0];
      end
      FB_OUT_A: begin
        ow = 1'b1; oa = $clog2(NUM_OUT)'(args[1]); od = args[0];
      end
      FB_SAM: begin
        if (args[1] == '0) r[0] = bool_w(signed'(args[0]) > signed'(args[2]));
        else               r[0] = bool_w(signed'(args[0]) < signed'(args[2]));
        r[1] = r[0];
      end
      FB_OR:  r[0] = bool_w(args[0] != '0 || args[1] != '0);
      FB_AND: r[0] = bool_w(args[0] != '0 && args[1] != '0);
      FB_NOT: r[0] = bool_w(args[0] == '0);
      FB_AM: begin
        r[0] = bool_w(args[0] != '0);
        if (args[0] != '0 && args[4] == '0 && args[1] != '0) begin
          ow = 1'b1; oa = $clog2(NUM_OUT)'(ALARM_CH); od = {args[3][7:0], cycle_no[7:0]};
        end
      end
      FB_TON: begin
        if (args[0] == '0)          r[1] = '0;
        else if (args[2] == 16'h7FFF) r[1] = args[2];
        else                        r[1] = args[2] + 16'd1;
        r[0] = bool_w(r[1] >= args[1]);
      end
      default: ;
    endcase
  end

  assign rx_rd    = enable && !rx_empty && (state == S_ID || state == S_ARGS);
  assign tx_wr    = enable && !tx_full && state == S_RES;
  assign tx_data  = res[idx[1:0]];
  assign out_we   = enable && state == S_EXEC && ow;
  assign out_addr = oa;
  assign out_data = od;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_ID;
      id      <= '0;
      idx     <= '0;
      fault   <= 1'b0;
      fb_done <= 1'b0;
      for (int k = 0; k < MAX_ARGS; k++) args[k] <= '0;
      for (int k = 0; k < MAX_RES; k++)  res[k]  <= '0;
    end else begin
      fb_done <= 1'b0;
      if (enable) begin
        case (state)
          S_ID: if (!rx_empty) begin
            id  <= rx_data[7:0];
            idx <= '0;
            if (fb_num_args(rx_data[7:0]) == 0 || rx_data[15:8] != '0) begin
              fault <= 1'b1;
              state <= S_HALT;
            end else begin
              state <= S_ARGS;
            end
          end
          S_ARGS: if (!rx_empty) begin
            args[idx] <= rx_data;
            if (32'(idx) == nargs - 1) state <= S_EXEC;
            else                       idx   <= idx + 1'b1;
          end
          S_EXEC: begin
            for (int k = 0; k < MAX_RES; k++) res[k] <= r[k];
            idx <= '0;
            if (nres == 0) begin
              fb_done <= 1'b1;
              state   <= S_ID;
            end else begin
              state <= S_RES;
            end
          end
          S_RES: if (!tx_full) begin
            if (32'(idx) == nres - 1) begin
              fb_done <= 1'b1;
              state   <= S_ID;
            end else begin
              idx <= idx + 1'b1;
            end
          end
          default: state <= S_HALT;
        endcase
      end
    end
  end
endmodule
