// Non-volatile memory reliability and endurance tester, top level.
//
// One FPGA design that exercises a byte-wide non-volatile memory for a very
// long time and records every read that comes back wrong. Three switches set
// it up: run, test (0 = reliability, 1 = endurance) and memory (0 = parallel
// port, 1 = two-wire serial port). When run is switched on, the test and the
// memory are latched, the counters are cleared and the chosen sequencer starts:
//   reliability  MATS+ over the whole memory, looping on elements 2 and 3
//                (mats_plus_seq)
//   endurance    (W01010101; R; W10101010; R) forever on end_lo..end_hi
//                (endurance_seq)
// The sequencer's accesses go to parallel_mem_if (32K x 8 parallel FRAM or
// EEPROM) or to serial_mem_if (512 x 8 serial FRAM). error_logger counts
// cycles and errors and keeps the latest error; parallel_port_tx sends it to a
// PC and led_scroller shows it on one 7-segment digit. Switching run off lets
// the current access finish and stops the test; a new run can start only when
// no access is in flight.
//
// What follows the test-bed description: the two tests, their patterns and
// loop points, the choice of reliability or endurance test, the list of what
// is logged per error, and reporting to a PC over the parallel port or on an
// LED display. This design's own choices: the clock (10 MHz assumed by the
// timing defaults), the switch set, having both memory ports and both
// reporting paths in one design selected at run time (the original builds a
// separate configuration per memory and per reporting method), and all bus
// protocols and encodings.
//
// The memory-under-test data bus is split into dq_o/dq_oe/dq_i and the
// two-wire lines into open-drain enables; the pad drivers belong outside.
module nvm_tester_top
  import nvm_tester_pkg::*;
#(
  parameter int unsigned PAR_WORDS = 32768,     // parallel memory size (bytes)
  parameter int unsigned SER_WORDS = 512,       // serial memory size (bytes)
  parameter int unsigned T_ACT     = 2,
  parameter int unsigned T_PRE     = 1,
  parameter int unsigned T_WR      = 0,
  parameter int unsigned QDIV      = 25,
  parameter int unsigned DWELL     = 5_000_000,
  parameter int unsigned GAP       = 1_000_000,
  parameter int unsigned DEBOUNCE  = 100_000
) (
  input  logic             clk,
  input  logic             rst_n,
  // control switches
  input  logic             sw_run,
  input  logic             sw_test,      // 0 reliability, 1 endurance
  input  logic             sw_mem,       // 0 parallel, 1 serial
  input  addr_t            end_lo,       // endurance address range
  input  addr_t            end_hi,
  // parallel memory under test
  output addr_t            pm_addr,
  output data_t            pm_dq_o,
  output logic             pm_dq_oe,
  input  data_t            pm_dq_i,
  output logic             pm_ce_n,
  output logic             pm_oe_n,
  output logic             pm_we_n,
  // serial memory under test (open drain)
  output logic             sm_scl_oe,
  output logic             sm_sda_oe,
  input  logic             sm_sda_i,
  output logic             sm_nack_err,
  // PC parallel port
  output data_t            pp_data,
  output logic             pp_stb,
  input  logic             pp_ack,
  // 7-segment error display
  output logic [6:0]       seg,
  output logic [4:0]       led_char,     // character code being shown
  // status
  output logic             running,
  output test_t            test_sel,
  output mem_sel_t         mem_sel,
  output logic [CYC_W-1:0] cyc_count,
  output logic [ERR_W-1:0] err_count,
  output part_t            mats_part,    // current MATS+ element
  output logic             pp_busy,      // an error frame is being sent
  output logic             loop_done
);

  // ---------------------------------------------------------------- switches
  logic [2:0] sw;
  switch_sync #(.N(3), .DEBOUNCE(DEBOUNCE)) u_sw (
    .clk, .rst_n,
    .sw_raw({sw_mem, sw_test, sw_run}),
    .sw
  );

  logic mats_busy, end_busy, start;
  assign start = sw[0] && !running && !mats_busy && !end_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      test_sel <= TEST_RELIABILITY;
      mem_sel  <= MEM_PARALLEL;
    end else if (start) begin
      running  <= 1'b1;
      test_sel <= test_t'(sw[1]);
      mem_sel  <= mem_sel_t'(sw[2]);
    end else if (!sw[0]) begin
      running  <= 1'b0;
    end
  end

  addr_t last_addr;
  assign last_addr = (mem_sel == MEM_PARALLEL) ? addr_t'(PAR_WORDS - 1) : addr_t'(SER_WORDS - 1);

  // -------------------------------------------------------------- sequencers
  logic        m_cmd_valid, e_cmd_valid, m_ev_valid, e_ev_valid, m_loop, e_loop;
  mem_cmd_t    m_cmd, e_cmd;
  test_event_t m_ev, e_ev;
  logic        cmd_valid, cmd_ready, rsp_valid;
  mem_cmd_t    cmd;
  data_t       rsp_rdata;

  mats_plus_seq u_mats (
    .clk, .rst_n,
    .run       (running && test_sel == TEST_RELIABILITY),
    .last_addr,
    .cmd_valid (m_cmd_valid),
    .cmd_ready (cmd_ready && test_sel == TEST_RELIABILITY),
    .cmd       (m_cmd),
    .rsp_valid (rsp_valid && test_sel == TEST_RELIABILITY),
    .rsp_rdata,
    .ev_valid  (m_ev_valid),
    .ev        (m_ev),
    .part      (mats_part),
    .busy      (mats_busy),
    .loop_done (m_loop)
  );

  endurance_seq u_end (
    .clk, .rst_n,
    .run       (running && test_sel == TEST_ENDURANCE),
    .range_lo  (end_lo),
    .range_hi  (end_hi),
    .cmd_valid (e_cmd_valid),
    .cmd_ready (cmd_ready && test_sel == TEST_ENDURANCE),
    .cmd       (e_cmd),
    .rsp_valid (rsp_valid && test_sel == TEST_ENDURANCE),
    .rsp_rdata,
    .ev_valid  (e_ev_valid),
    .ev        (e_ev),
    .busy      (end_busy),
    .loop_done (e_loop)
  );

  assign cmd_valid = (test_sel == TEST_RELIABILITY) ? m_cmd_valid : e_cmd_valid;
  assign cmd       = (test_sel == TEST_RELIABILITY) ? m_cmd : e_cmd;
  assign loop_done = m_loop || e_loop;

  // ------------------------------------------------------------ memory ports
  logic  p_ready, p_rsp, s_ready, s_rsp;
  data_t p_rdata, s_rdata;

  parallel_mem_if #(.T_ACT(T_ACT), .T_PRE(T_PRE), .T_WR(T_WR)) u_pmem (
    .clk, .rst_n,
    .cmd_valid (cmd_valid && mem_sel == MEM_PARALLEL),
    .cmd_ready (p_ready),
    .cmd,
    .rsp_valid (p_rsp),
    .rsp_rdata (p_rdata),
    .mem_addr  (pm_addr),
    .mem_dq_o  (pm_dq_o),
    .mem_dq_oe (pm_dq_oe),
    .mem_dq_i  (pm_dq_i),
    .mem_ce_n  (pm_ce_n),
    .mem_oe_n  (pm_oe_n),
    .mem_we_n  (pm_we_n)
  );

  serial_mem_if #(.QDIV(QDIV)) u_smem (
    .clk, .rst_n,
    .cmd_valid (cmd_valid && mem_sel == MEM_SERIAL),
    .cmd_ready (s_ready),
    .cmd,
    .rsp_valid (s_rsp),
    .rsp_rdata (s_rdata),
    .nack_err  (sm_nack_err),
    .scl_oe    (sm_scl_oe),
    .sda_oe    (sm_sda_oe),
    .sda_i     (sm_sda_i)
  );

  assign cmd_ready = (mem_sel == MEM_PARALLEL) ? p_ready : s_ready;
  assign rsp_valid = (mem_sel == MEM_PARALLEL) ? p_rsp   : s_rsp;
  assign rsp_rdata = (mem_sel == MEM_PARALLEL) ? p_rdata : s_rdata;

  // ---------------------------------------------------------- error logging
  logic     rec_valid, rec_new;
  err_rec_t rec;

  error_logger u_log (
    .clk, .rst_n,
    .clear     (start),
    .ev_valid  (m_ev_valid || e_ev_valid),
    .ev        (m_ev_valid ? m_ev : e_ev),
    .cyc_count,
    .err_count,
    .rec,
    .rec_valid,
    .rec_new
  );

  logic pp_frame_done;
  parallel_port_tx u_pp (
    .clk, .rst_n,
    .rec_new,
    .rec,
    .pp_data,
    .pp_stb,
    .pp_ack,
    .busy       (pp_busy),
    .frame_done (pp_frame_done)
  );

  logic       led_pass;
  led_scroller #(.DWELL(DWELL), .GAP(GAP)) u_led (
    .clk, .rst_n,
    .rec_valid,
    .rec,
    .seg,
    .char_code (led_char),
    .pass_done (led_pass)
  );

  // Only one sequencer may be active at a time.
  a_one_seq: assert property (@(posedge clk) disable iff (!rst_n) !(mats_busy && end_busy));

endmodule
