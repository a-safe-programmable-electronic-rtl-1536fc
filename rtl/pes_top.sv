// pes_top: fault-detecting dual-channel master-slave programmable electronic
// system.
//
// Two identical channels, each a master (control flow) processor and a slave
// (function block) processor, execute the same application program. Per
// channel there are four fall-through FIFO queues:
//   master -> [m2s FIFO] -> m2s comparator -> [slave input FIFO]  -> slave
//   slave  -> [s2m FIFO] -> s2m comparator -> [master input FIFO] -> master
// Each FIFO comparator takes one word from each channel, compares them and
// hands the word to both channels, so every word the masters send to the
// slaves, and every result the slaves return, is checked across channels.
// A fast fail-safe comparator watches each FIFO comparator's latches and the
// two slaves' output latches. A step cycle generator gives the common time
// base: at each step cycle signal the input buffers take a snapshot of the
// sensor inputs, the output comparator checks both slaves' output latches and
// puts them out, and the masters take their STEP decision.
// The global comparator unit ANDs all correctness signals (FIFO and output
// comparators, fail-safe comparators, processor errors, watchdogs) into the
// global correctness signal, which enables every unit; once it falls the
// system stops and the actuator outputs go to the safe state (zero).
//
// Start-up: release rst_n, hold `init` high for at least a few square-wave
// periods (50 us) so the fail-safe comparators activate, then lower it.
// The structure follows the document's block diagrams; the clock frequency
// (CLK_HZ), step cycle length, FIFO depth, memory sizes, word width and I/O
// counts are this design's choices. PROM_INIT1/2 name the program images of
// the two masters (the same program by default; the architecture allows
// diverse implementations).
module pes_top
  import pes_pkg::*;
#(
  parameter int    CLK_HZ      = 10_000_000,
  parameter int    STEP_CYCLES = 100_000,
  parameter int    FIFO_DEPTH  = 16,
  parameter int    PROM_WORDS  = 2048,
  parameter int    RAM_WORDS   = 1024,
  parameter int    NUM_IN      = 8,
  parameter int    NUM_OUT     = 8,
  parameter string PROM_INIT1  = "rtl/pressure_program.hex",
  parameter string PROM_INIT2  = "rtl/pressure_program.hex",
  localparam int   N_OK        = 14
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  word_t           sensor_in    [NUM_IN],
  output word_t           actuator_out [NUM_OUT],
  output logic            global_ok,
  output logic            global_error,
  output logic [N_OK-1:0] error_source,
  output word_t           step_id,
  output logic [15:0]     cycle_no
);
  logic tick, sq;

  step_cycle_gen #(.STEP_CYCLES(STEP_CYCLES)) u_step (
    .clk(clk), .rst_n(rst_n), .tick(tick), .cycle_no(cycle_no)
  );
  square_wave_gen #(.CLK_HZ(CLK_HZ)) u_sq (.clk(clk), .rst_n(rst_n), .sq(sq));

  // ---------------- per-channel signals ----------------
  word_t m_tx_data [2], s_tx_data [2];
  logic  m_tx_wr [2], m_rx_rd [2], s_tx_wr [2], s_rx_rd [2];
  // FIFO outputs / status
  word_t m2s_q [2], s2m_q [2], sin_q [2], min_q [2];
  logic  m2s_full [2], m2s_empty [2], s2m_full [2], s2m_empty [2];
  logic  sin_full [2], sin_empty [2], min_full [2], min_empty [2];
  logic  m2s_rd [2], s2m_rd [2];
  // comparator outputs
  word_t m2s_cmp_data, s2m_cmp_data;
  logic  m2s_cmp_wr, s2m_cmp_wr;
  word_t m2s_la, m2s_lb, s2m_la, s2m_lb;
  logic  m2s_ok, s2m_ok, m2s_xfer, s2m_xfer;
  // processor status
  logic  m_overrun [2], m_acc_err [2], m_sco [2], m_step_done [2];
  word_t m_step_id [2];
  addr_t m_pc [2];
  logic  s_idle [2], s_fault [2], s_done [2];
  // slave I/O
  logic [$clog2(NUM_IN)-1:0]  s_in_addr [2];
  word_t                      s_in_data [2];
  logic                       s_out_we [2];
  logic [$clog2(NUM_OUT)-1:0] s_out_addr [2];
  word_t                      s_out_data [2];
  logic                       wd_ok [4];

  for (genvar c = 0; c < 2; c++) begin : g_ch
    master_processor #(
      .PROM_WORDS(PROM_WORDS), .RAM_WORDS(RAM_WORDS),
      .PROM_INIT(c == 0 ? PROM_INIT1 : PROM_INIT2)
    ) u_master (
      .clk(clk), .rst_n(rst_n), .enable(global_ok), .step_tick(tick),
      .tx_wr(m_tx_wr[c]), .tx_data(m_tx_data[c]), .tx_full(m2s_full[c]),
      .rx_rd(m_rx_rd[c]), .rx_data(min_q[c]), .rx_empty(min_empty[c]),
      .overrun(m_overrun[c]), .access_err(m_acc_err[c]),
      .step_clock_occurred(m_sco[c]), .step_done(m_step_done[c]),
      .step_id(m_step_id[c]), .pc(m_pc[c])
    );

    fifo_queue #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_m2s_fifo (
      .clk(clk), .rst_n(rst_n), .wr_en(m_tx_wr[c]), .wr_data(m_tx_data[c]),
      .rd_en(m2s_rd[c]), .rd_data(m2s_q[c]), .full(m2s_full[c]), .empty(m2s_empty[c])
    );
    fifo_queue #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_sin_fifo (
      .clk(clk), .rst_n(rst_n), .wr_en(m2s_cmp_wr), .wr_data(m2s_cmp_data),
      .rd_en(s_rx_rd[c]), .rd_data(sin_q[c]), .full(sin_full[c]), .empty(sin_empty[c])
    );
    fifo_queue #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_s2m_fifo (
      .clk(clk), .rst_n(rst_n), .wr_en(s_tx_wr[c]), .wr_data(s_tx_data[c]),
      .rd_en(s2m_rd[c]), .rd_data(s2m_q[c]), .full(s2m_full[c]), .empty(s2m_empty[c])
    );
    fifo_queue #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_min_fifo (
      .clk(clk), .rst_n(rst_n), .wr_en(s2m_cmp_wr), .wr_data(s2m_cmp_data),
      .rd_en(m_rx_rd[c]), .rd_data(min_q[c]), .full(min_full[c]), .empty(min_empty[c])
    );

    slave_processor #(.NUM_IN(NUM_IN), .NUM_OUT(NUM_OUT)) u_slave (
      .clk(clk), .rst_n(rst_n), .enable(global_ok),
      .rx_data(sin_q[c]), .rx_empty(sin_empty[c]), .rx_rd(s_rx_rd[c]),
      .tx_data(s_tx_data[c]), .tx_wr(s_tx_wr[c]), .tx_full(s2m_full[c]),
      .in_addr(s_in_addr[c]), .in_data(s_in_data[c]),
      .out_we(s_out_we[c]), .out_addr(s_out_addr[c]), .out_data(s_out_data[c]),
      .cycle_no(cycle_no), .idle(s_idle[c]), .fault(s_fault[c]), .fb_done(s_done[c])
    );

    input_buffer #(.NUM_IN(NUM_IN)) u_inbuf (
      .clk(clk), .rst_n(rst_n), .tick(tick), .sensor_in(sensor_in),
      .rd_addr(s_in_addr[c]), .rd_data(s_in_data[c])
    );

    // master watchdog: a step decision at least every two step cycles
    watchdog #(.TIMEOUT(2 * STEP_CYCLES)) u_wd_m (
      .clk(clk), .rst_n(rst_n), .arm(global_ok), .kick(m_step_done[c]), .ok(wd_ok[2*c])
    );
    // slave watchdog: back to idle at least once per step cycle
    watchdog #(.TIMEOUT(STEP_CYCLES)) u_wd_s (
      .clk(clk), .rst_n(rst_n), .arm(global_ok), .kick(s_idle[c]), .ok(wd_ok[2*c+1])
    );
  end

  // ---------------- cross-channel comparators ----------------
  fifo_comparator #(.WIDTH(DATA_W)) u_m2s_cmp (
    .clk(clk), .rst_n(rst_n), .enable(global_ok),
    .a_data(m2s_q[0]), .a_empty(m2s_empty[0]), .a_rd(m2s_rd[0]),
    .b_data(m2s_q[1]), .b_empty(m2s_empty[1]), .b_rd(m2s_rd[1]),
    .o_data(m2s_cmp_data), .o_wr(m2s_cmp_wr), .oa_full(sin_full[0]), .ob_full(sin_full[1]),
    .latch_a(m2s_la), .latch_b(m2s_lb), .ok(m2s_ok), .transfer(m2s_xfer)
  );
  fifo_comparator #(.WIDTH(DATA_W)) u_s2m_cmp (
    .clk(clk), .rst_n(rst_n), .enable(global_ok),
    .a_data(s2m_q[0]), .a_empty(s2m_empty[0]), .a_rd(s2m_rd[0]),
    .b_data(s2m_q[1]), .b_empty(s2m_empty[1]), .b_rd(s2m_rd[1]),
    .o_data(s2m_cmp_data), .o_wr(s2m_cmp_wr), .oa_full(min_full[0]), .ob_full(min_full[1]),
    .latch_a(s2m_la), .latch_b(s2m_lb), .ok(s2m_ok), .transfer(s2m_xfer)
  );

  logic [NUM_OUT*DATA_W-1:0] bank_a, bank_b;
  logic out_ok, out_xfer;

  output_comparator #(.NUM_OUT(NUM_OUT)) u_out_cmp (
    .clk(clk), .rst_n(rst_n), .tick(tick), .safe(!global_ok),
    .we_a(s_out_we[0]), .addr_a(s_out_addr[0]), .data_a(s_out_data[0]),
    .we_b(s_out_we[1]), .addr_b(s_out_addr[1]), .data_b(s_out_data[1]),
    .port(actuator_out), .bank_a(bank_a), .bank_b(bank_b),
    .ok(out_ok), .transfer(out_xfer)
  );

  logic fs_m2s_ok, fs_s2m_ok, fs_out_ok;

  fs_comparator #(.W(DATA_W), .CLK_HZ(CLK_HZ)) u_fs_m2s (
    .clk(clk), .rst_n(rst_n), .init(init), .sq(sq), .a(m2s_la), .b(m2s_lb), .ok(fs_m2s_ok)
  );
  fs_comparator #(.W(DATA_W), .CLK_HZ(CLK_HZ)) u_fs_s2m (
    .clk(clk), .rst_n(rst_n), .init(init), .sq(sq), .a(s2m_la), .b(s2m_lb), .ok(fs_s2m_ok)
  );
  fs_comparator #(.W(NUM_OUT*DATA_W), .CLK_HZ(CLK_HZ)) u_fs_out (
    .clk(clk), .rst_n(rst_n), .init(init), .sq(sq), .a(bank_a), .b(bank_b), .ok(fs_out_ok)
  );

  // ---------------- global comparator unit ----------------
  logic [N_OK-1:0] ok_vec;
  assign ok_vec = {wd_ok[3], wd_ok[2], wd_ok[1], wd_ok[0],
                   !s_fault[1], !s_fault[0],
                   !(m_overrun[1] || m_acc_err[1]), !(m_overrun[0] || m_acc_err[0]),
                   fs_out_ok, fs_s2m_ok, fs_m2s_ok,
                   out_ok, s2m_ok, m2s_ok};

  global_comparator_unit #(.N_OK(N_OK)) u_gcu (
    .clk(clk), .rst_n(rst_n), .init(init), .ok_in(ok_vec),
    .global_ok(global_ok), .global_error(global_error), .first_error(error_source)
  );

  assign step_id = m_step_id[0];
endmodule
