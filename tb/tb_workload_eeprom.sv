// Workload testbench: a parallel EEPROM, whose every write is followed by an
// internal write time during which the part ignores new writes and answers
// reads with status bits instead of data.
//
// The write time is scaled down to 2 us (20 cycles at 10 MHz) so that the run
// stays short; the memory is 64 bytes. Two testers run side by side on
// identical EEPROM models:
//   good  T_WR = 20: waits out the write time after every write. A MATS+ pass
//         must see no access during a write, find exactly the injected fault
//         (two errors per pass), and take 2N x (6 + 20) + 2N x 6 cycles per
//         looped pass (elements 2 and 3). The endurance loop on three
//         addresses must then reach 10,000 read/write cycles, the endurance
//         rating of the rad-hard EEPROM, error free and never early.
//   bad   T_WR = 0: the FRAM setting. It must hit the part while busy and log
//         errors on a memory without any fault, which shows why T_WR must be
//         set to the write time of an EEPROM.
module tb_workload_eeprom;
  import nvm_tester_pkg::*;

  localparam int N = 64, FA = 'h2A, TWR = 20;

  logic             clk = 0, rst_n = 0;
  logic             sw_run = 0, sw_test = 0;
  int checks = 0, failures = 0;

  // good tester
  addr_t            g_addr;
  data_t            g_dq_o, g_dq_i, g_pp_data;
  logic             g_dq_oe, g_ce_n, g_oe_n, g_we_n;
  logic             g_scl_oe, g_sda_oe, g_nack, g_stb, g_ack, g_run, g_loop, g_ppb;
  logic [6:0]       g_seg;
  logic [4:0]       g_char;
  test_t            g_test;
  mem_sel_t         g_mem;
  logic [CYC_W-1:0] g_cyc;
  logic [ERR_W-1:0] g_err;
  part_t            g_part;

  nvm_tester_top #(.PAR_WORDS(N), .T_WR(TWR), .DWELL(50), .GAP(10), .DEBOUNCE(4)) good (
    .clk, .rst_n, .sw_run, .sw_test, .sw_mem(1'b0),
    .end_lo(addr_t'(5)), .end_hi(addr_t'(7)),
    .pm_addr(g_addr), .pm_dq_o(g_dq_o), .pm_dq_oe(g_dq_oe), .pm_dq_i(g_dq_i),
    .pm_ce_n(g_ce_n), .pm_oe_n(g_oe_n), .pm_we_n(g_we_n),
    .sm_scl_oe(g_scl_oe), .sm_sda_oe(g_sda_oe), .sm_sda_i(!g_sda_oe), .sm_nack_err(g_nack),
    .pp_data(g_pp_data), .pp_stb(g_stb), .pp_ack(g_ack), .seg(g_seg), .led_char(g_char),
    .running(g_run), .test_sel(g_test), .mem_sel(g_mem), .cyc_count(g_cyc), .err_count(g_err),
    .mats_part(g_part), .pp_busy(g_ppb), .loop_done(g_loop)
  );

  tb_async_mem_model #(.AW(ADDR_W), .WORDS(N), .WR_BUSY_NS(TWR * 100.0 - 50.0)) gmem (
    .addr(g_addr), .dq_o(g_dq_o), .dq_oe(g_dq_oe), .dq_i(g_dq_i),
    .ce_n(g_ce_n), .oe_n(g_oe_n), .we_n(g_we_n),
    .fault_en(1'b1), .fault_addr(addr_t'(FA)), .fault_xor(8'h10)
  );

  tb_pc_port_model gpc (.clk, .pp_data(g_pp_data), .pp_stb(g_stb), .pp_ack(g_ack));

  // bad tester
  addr_t            b_addr;
  data_t            b_dq_o, b_dq_i, b_pp_data;
  logic             b_dq_oe, b_ce_n, b_oe_n, b_we_n;
  logic             b_scl_oe, b_sda_oe, b_nack, b_stb, b_ack, b_run, b_loop, b_ppb;
  logic [6:0]       b_seg;
  logic [4:0]       b_char;
  test_t            b_test;
  mem_sel_t         b_mem;
  logic [CYC_W-1:0] b_cyc;
  logic [ERR_W-1:0] b_err;
  part_t            b_part;

  nvm_tester_top #(.PAR_WORDS(N), .T_WR(0), .DWELL(50), .GAP(10), .DEBOUNCE(4)) bad (
    .clk, .rst_n, .sw_run, .sw_test(1'b0), .sw_mem(1'b0),
    .end_lo(addr_t'(5)), .end_hi(addr_t'(7)),
    .pm_addr(b_addr), .pm_dq_o(b_dq_o), .pm_dq_oe(b_dq_oe), .pm_dq_i(b_dq_i),
    .pm_ce_n(b_ce_n), .pm_oe_n(b_oe_n), .pm_we_n(b_we_n),
    .sm_scl_oe(b_scl_oe), .sm_sda_oe(b_sda_oe), .sm_sda_i(!b_sda_oe), .sm_nack_err(b_nack),
    .pp_data(b_pp_data), .pp_stb(b_stb), .pp_ack(b_ack), .seg(b_seg), .led_char(b_char),
    .running(b_run), .test_sel(b_test), .mem_sel(b_mem), .cyc_count(b_cyc), .err_count(b_err),
    .mats_part(b_part), .pp_busy(b_ppb), .loop_done(b_loop)
  );

  tb_async_mem_model #(.AW(ADDR_W), .WORDS(N), .WR_BUSY_NS(TWR * 100.0 - 50.0)) bmem (
    .addr(b_addr), .dq_o(b_dq_o), .dq_oe(b_dq_oe), .dq_i(b_dq_i),
    .ce_n(b_ce_n), .oe_n(b_oe_n), .we_n(b_we_n),
    .fault_en(1'b0), .fault_addr('0), .fault_xor(8'h00)
  );

  tb_pc_port_model bpc (.clk, .pp_data(b_pp_data), .pp_stb(b_stb), .pp_ack(b_ack));

  always #50 clk = ~clk;   // 10 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    longint t0, t1;
    logic [ERR_W-1:0] e1, e2, be;
    logic [7:0] b [16];
    repeat (12) @(posedge clk);
    rst_n = 1;
    repeat (12) @(posedge clk);
    gmem.early_acc = 0; gmem.proto_err = 0; gmem.reads = 0; gmem.writes = 0;
    bmem.early_acc = 0; bmem.proto_err = 0;
    gpc.bytes_q.delete();
    bpc.bytes_q.delete();

    // MATS+ on both
    sw_run = 1;
    @(posedge clk iff g_loop);
    e1 = g_err;
    t0 = cyc;
    check(gmem.reads + gmem.writes == 5 * N, $sformatf("good: accesses in the first pass %0d", gmem.reads + gmem.writes));
    @(posedge clk iff g_loop);
    e2 = g_err;
    t1 = cyc;
    be = b_err;
    check(t1 - t0 == 2 * N * (6 + TWR) + 2 * N * 6,
          $sformatf("good: looped pass %0d cycles want %0d", t1 - t0, 2 * N * (6 + TWR) + 2 * N * 6));
    check(e1 == 2 && e2 == 4, $sformatf("good: errors %0d after one pass, %0d after two", e1, e2));
    check(gmem.early_acc == 0, $sformatf("good: %0d accesses while the EEPROM was busy", gmem.early_acc));
    check(gmem.proto_err == 0, "good: bus protocol");
    check(bmem.early_acc > 0, "bad: accesses made while the EEPROM was busy");
    check(be > 0, $sformatf("bad: false errors on a fault-free EEPROM (%0d)", be));
    $display("bad tester (T_WR = 0): %0d accesses while busy, %0d false errors", bmem.early_acc, be);
    sw_run = 0;
    repeat (20) @(posedge clk);
    wait (!g_run && !g_ppb);
    repeat (4000) @(posedge clk);

    // last good frame: the latest logged error, on the fault address
    check(gpc.bytes_q.size() >= 16, "good: frames received");
    while (gpc.bytes_q.size() > 16) void'(gpc.bytes_q.pop_front());
    for (int i = 0; i < 16; i++) b[i] = gpc.bytes_q.pop_front();
    check({b[12], b[13]} == 16'(FA) && (b[14] == (8'h55 ^ 8'h10) || b[14] == (8'hAA ^ 8'h10)),
          $sformatf("good: last frame address %02x%02x data %02x", b[12], b[13], b[14]));

    // endurance on the good tester
    gmem.early_acc = 0;
    sw_test = 1;
    repeat (20) @(posedge clk);
    sw_run = 1;
    t0 = cyc;
    wait (g_cyc >= 10_000);
    t1 = cyc;
    sw_run = 0;
    repeat (100) @(posedge clk);
    check(g_err == 0, $sformatf("good: endurance errors %0d", g_err));
    check(t1 - t0 >= 10_000 / 2 * (6 + TWR) + 10_000 / 2 * 6,
          $sformatf("good: 10,000 endurance cycles in %0d clock cycles", t1 - t0));
    $display("good tester: 10,000 endurance read/write cycles took %0d clock cycles", t1 - t0);
    check(gmem.early_acc == 0, "good: endurance never hit the busy EEPROM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
