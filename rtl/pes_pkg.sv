// pes_pkg: types and constants shared by the dual-channel programmable
// electronic system (PES).
//
// Data words: every value that travels through the master/slave FIFOs is a
// DATA_W-bit word. Analog quantities are signed fixed point with FRAC_BITS
// fractional bits (Q8.8); Boolean values are 0 (false) and 1 (true), any
// non-zero word reads as true. These formats are this design's choice.
//
// Master instruction word (INSTR_W bits, this design's encoding):
//   [31:28] opcode    (OP_MOVE or OP_STEP)
//   [23:12] source address          (MOVE only)
//   [11:0]  destination address     (MOVE) / next-step address (STEP)
// The master needs only the two instructions MOVE and STEP.
//
// Master address space (ADDR_W = 12 bits, this design's map):
//   0x000-0x7FF  PROM  (program and constants; data reads return the low
//                       DATA_W bits of the PROM word)
//   0x800-0xBFF  RAM   (variables, temporaries, internal states)
//   0xC00        FIFO transmit register  (write: word to the slaves)
//   0xC01        FIFO receive register   (read: word from the slaves)
//   0xC02        step identifier register
//   0xC03        step initial address register
//   0xC04        transition condition register
//
// Function block identification tags understood by the slave processor;
// each entry lists the words the slave pops and pushes for one invocation.
package pes_pkg;

  localparam int DATA_W    = 16;
  localparam int FRAC_BITS = 8;
  localparam int ADDR_W    = 12;
  localparam int INSTR_W   = 32;

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [INSTR_W-1:0] instr_t;

  typedef enum logic [3:0] {
    OP_MOVE = 4'h0,
    OP_STEP = 4'h1
  } opcode_e;

  localparam addr_t PROM_BASE   = 12'h000;
  localparam addr_t RAM_BASE    = 12'h800;
  localparam addr_t REG_FIFO_TX = 12'hC00;
  localparam addr_t REG_FIFO_RX = 12'hC01;
  localparam addr_t REG_STEP_ID = 12'hC02;
  localparam addr_t REG_STEP_IA = 12'hC03;
  localparam addr_t REG_TRANS   = 12'hC04;

  // Function block identification tags (values chosen by this design).
  typedef enum logic [7:0] {
    FB_IN_A  = 8'h01,  // analog input:   XMIN XMAX XUNIT HWADR          -> X
    FB_C     = 8'h02,  // PID controller: X KP TN TV isv1 isv2 isv3       -> Y isv1 isv2 isv3
    FB_OUT_A = 8'h03,  // analog output:  Y HWADR                         -> (nothing)
    FB_SAM   = 8'h04,  // limit switch:   X LOW S isv                     -> QS isv
    FB_OR    = 8'h05,  // Boolean or:     I1 I2                           -> Q
    FB_AM    = 8'h06,  // alarm/message:  I AON AMODE APRIO isv           -> isv
    FB_AND   = 8'h07,  // Boolean and:    I1 I2                           -> Q
    FB_NOT   = 8'h08,  // Boolean not:    I                               -> Q
    FB_TON   = 8'h09   // on-delay timer: IN PT isv                       -> Q isv
  } fb_id_e;

  localparam int MAX_ARGS = 7;
  localparam int MAX_RES  = 4;

  function automatic int fb_num_args(logic [7:0] id);
    case (id)
      FB_IN_A:  return 4;
      FB_C:     return 7;
      FB_OUT_A: return 2;
      FB_SAM:   return 4;
      FB_OR:    return 2;
      FB_AM:    return 5;
      FB_AND:   return 2;
      FB_NOT:   return 1;
      FB_TON:   return 3;
      default:  return 0;
    endcase
  endfunction

  function automatic int fb_num_results(logic [7:0] id);
    case (id)
      FB_IN_A:  return 1;
      FB_C:     return 4;
      FB_OUT_A: return 0;
      FB_SAM:   return 2;
      FB_OR:    return 1;
      FB_AM:    return 1;
      FB_AND:   return 1;
      FB_NOT:   return 1;
      FB_TON:   return 2;
      default:  return 0;
    endcase
  endfunction

  function automatic instr_t mk_move(addr_t src, addr_t dst);
    return {OP_MOVE, 4'h0, src, dst};
  endfunction

  function automatic instr_t mk_step(addr_t next);
    return {OP_STEP, 4'h0, 12'h000, next};
  endfunction

endpackage
