// End-to-end testbench for nvm_tester_top at reduced sizes.
//
// The tester is connected to a behavioural parallel memory, a behavioural
// two-wire serial FRAM and a PC parallel-port model, each able to return a
// corrupted byte at one address. The testbench works the switches through
// four runs and checks the outcome of each against numbers worked out here:
//   1. MATS+ on the 16-byte parallel memory, bit 0 flipped at address 5:
//      two full loops, 4 errors, last one in element 3.
//   2. endurance on parallel addresses 2..3, bit 7 flipped at address 3:
//      three loops, 6 errors, last one on the read of 10101010.
//   3. MATS+ on the 8-byte serial memory, bit 1 flipped at address 6.
//   4. endurance on serial addresses 500..501, no fault.
// Each error record sent to the PC is decoded and the latest compared with the
// expected one. The mechanisms the design has are counted and each must occur:
// both tests, both memories, a change of test and of memory between runs, the
// downward march element, the loop back to element 2, the endurance range
// wrap, logged errors, frames on the parallel port, and full LED passes.
module tb_nvm_tester_top;
  import nvm_tester_pkg::*;

  localparam int PW = 16, SW = 8, QD = 2, DW = 4, GP = 2, DB = 4;

  logic             clk = 0, rst_n = 0;
  logic             sw_run = 0, sw_test = 0, sw_mem = 0;
  addr_t            end_lo = '0, end_hi = '0;
  addr_t            pm_addr;
  data_t            pm_dq_o, pm_dq_i, pp_data;
  logic             pm_dq_oe, pm_ce_n, pm_oe_n, pm_we_n;
  logic             sm_scl_oe, sm_sda_oe, sm_nack_err, s_sda_oe;
  logic             pp_stb, pp_ack, running, loop_done, pp_busy;
  logic [6:0]       seg;
  logic [4:0]       led_char;
  test_t            test_sel;
  mem_sel_t         mem_sel;
  logic [CYC_W-1:0] cyc_count;
  logic [ERR_W-1:0] err_count;
  part_t            mats_part;

  logic       pf_en = 0, sf_en = 0;
  addr_t      pf_addr = '0;
  logic [8:0] sf_addr = '0;
  data_t      pf_xor = '0, sf_xor = '0;

  int checks = 0, failures = 0;

  nvm_tester_top #(
    .PAR_WORDS(PW), .SER_WORDS(SW), .T_ACT(1), .T_PRE(1), .T_WR(0),
    .QDIV(QD), .DWELL(DW), .GAP(GP), .DEBOUNCE(DB)
  ) dut (
    .clk, .rst_n, .sw_run, .sw_test, .sw_mem, .end_lo, .end_hi,
    .pm_addr, .pm_dq_o, .pm_dq_oe, .pm_dq_i, .pm_ce_n, .pm_oe_n, .pm_we_n,
    .sm_scl_oe, .sm_sda_oe, .sm_sda_i(!(sm_sda_oe || s_sda_oe)), .sm_nack_err,
    .pp_data, .pp_stb, .pp_ack, .seg, .led_char,
    .running, .test_sel, .mem_sel, .cyc_count, .err_count, .mats_part, .pp_busy, .loop_done
  );

  tb_async_mem_model #(.AW(ADDR_W)) pmem (
    .addr(pm_addr), .dq_o(pm_dq_o), .dq_oe(pm_dq_oe), .dq_i(pm_dq_i),
    .ce_n(pm_ce_n), .oe_n(pm_oe_n), .we_n(pm_we_n),
    .fault_en(pf_en), .fault_addr(pf_addr), .fault_xor(pf_xor)
  );

  tb_i2c_fram_model smem (
    .scl(!sm_scl_oe), .sda(!(sm_sda_oe || s_sda_oe)), .sda_oe(s_sda_oe),
    .fault_en(sf_en), .fault_addr(sf_addr), .fault_xor(sf_xor)
  );

  tb_pc_port_model pc (.clk, .pp_data, .pp_stb, .pp_ack);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters
  int n_rel = 0, n_end = 0, n_par = 0, n_ser = 0, n_test_switch = 0, n_mem_switch = 0;
  int n_down = 0, n_loop_m = 0, n_loop_e = 0, n_err_ev = 0, n_frames = 0, n_led_pass = 0;
  int loops = 0;
  logic run_q = 0, m3_q = 0;
  test_t last_test = TEST_RELIABILITY; mem_sel_t last_mem = MEM_PARALLEL; bit first_run = 1;
  logic [ERR_W-1:0] err_q = 0;
  logic [4:0] led_q = 0;

  always @(posedge clk) if (rst_n) begin
    run_q <= running;
    if (running && !run_q) begin
      if (test_sel == TEST_RELIABILITY) n_rel++; else n_end++;
      if (mem_sel == MEM_PARALLEL) n_par++; else n_ser++;
      if (!first_run && test_sel != last_test) n_test_switch++;
      if (!first_run && mem_sel != last_mem) n_mem_switch++;
      first_run = 0; last_test = test_sel; last_mem = mem_sel;
    end
    m3_q <= running && test_sel == TEST_RELIABILITY && mats_part == PART_M3;
    if (running && test_sel == TEST_RELIABILITY && mats_part == PART_M3 && !m3_q) n_down++;
    if (loop_done) begin
      loops++;
      if (test_sel == TEST_RELIABILITY) n_loop_m++; else n_loop_e++;
    end
    err_q <= err_count;
    if (err_count > err_q) n_err_ev++;
    led_q <= led_char;
    if (led_q == 5'd20 && led_char != 5'd20) n_led_pass++;   // left the P field
  end

  // ---- helpers
  task automatic start_run(test_t t, mem_sel_t m);
    sw_test = t; sw_mem = m;
    repeat (DB + 8) @(posedge clk);
    sw_run = 1;
    wait (running);
    check(test_sel == t && mem_sel == m, "switch settings latched");
    @(posedge clk);
    check(err_count == 0 && cyc_count <= 1, "counters cleared at start");
  endtask

  task automatic stop_run();
    sw_run = 0;
    wait (!running);
    repeat (400) @(posedge clk);     // longest access in flight finishes
    wait (!pp_busy);
    repeat (20) @(posedge clk);
  endtask

  task automatic wait_loops(int n);
    int target = loops + n;
    wait (loops >= target);
  endtask

  // decode every complete frame the PC got; return the last one
  task automatic last_frame(output err_rec_t r, output bit ok);
    logic [7:0] b [16];
    ok = 0;
    r  = '0;
    while (pc.bytes_q.size() >= 16) begin
      longint unsigned c = 0;
      for (int i = 0; i < 16; i++) b[i] = pc.bytes_q.pop_front();
      n_frames++;
      ok = (b[0] == 8'hA5);
      r.err_count = {b[1], b[2], b[3], b[4]};
      for (int i = 5; i < 12; i++) c = (c << 8) | longint'(b[i]);
      r.cyc_count = CYC_W'(c);
      r.addr      = addr_t'({b[12], b[13]});
      r.rdata     = b[14];
      r.part      = part_t'(b[15][3:0]);
    end
    check(pc.bytes_q.size() == 0, "no partial frame left");
  endtask

  task automatic check_rec(err_rec_t r, int e, longint c, int a, int d, part_t p, string tag);
    check(r.err_count == ERR_W'(e) && r.cyc_count == CYC_W'(c) && r.addr == addr_t'(a) &&
          r.rdata == data_t'(d) && r.part == p,
          $sformatf("%s: record err=%0d cyc=%0d addr=%0d data=%h part=%0d, want %0d %0d %0d %h %0d",
                    tag, r.err_count, r.cyc_count, r.addr, r.rdata, r.part, e, c, a, d, p));
  endtask

  initial begin
    err_rec_t r;
    bit ok;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (12) @(posedge clk);
    pmem.proto_err = 0;
    smem.starts = 0; smem.stops = 0;
    pc.bytes_q.delete();   // anything the PC model saw before reset

    // 1. MATS+ on the parallel memory
    pf_en = 1; pf_addr = 5; pf_xor = 8'h01;
    start_run(TEST_RELIABILITY, MEM_PARALLEL);
    wait_loops(2);
    stop_run();
    check(err_count == 4, $sformatf("run 1 errors %0d want 4", err_count));
    last_frame(r, ok);
    check(ok, "run 1 frame marker");
    // last error: loop 2, element 3, address 5 (cycles: N + 4N + 2N + 2(N-1-5) + 1)
    check_rec(r, 4, PW + 4 * PW + 2 * PW + 2 * (PW - 1 - 5) + 1, 5, 8'hAB, PART_M3, "run 1");
    check(pmem.mem[0] == 8'h55 && pmem.mem[PW - 1] == 8'h55 || pmem.mem[0] == 8'hAA,
          "parallel memory holds a test pattern");
    pf_en = 0;

    // 2. endurance on parallel addresses 2..3
    pf_en = 1; pf_addr = 3; pf_xor = 8'h80;
    end_lo = 2; end_hi = 3;
    start_run(TEST_ENDURANCE, MEM_PARALLEL);
    wait_loops(3);
    stop_run();
    check(err_count == 6, $sformatf("run 2 errors %0d want 6", err_count));
    last_frame(r, ok);
    check(ok, "run 2 frame marker");
    check_rec(r, 6, 24, 3, 8'h2A, PART_E_RD2, "run 2");
    pf_en = 0;
    check(pmem.proto_err == 0, "parallel bus protocol");

    // 3. MATS+ on the serial memory
    sf_en = 1; sf_addr = 6; sf_xor = 8'h02;
    start_run(TEST_RELIABILITY, MEM_SERIAL);
    wait_loops(1);
    stop_run();
    check(err_count == 2, $sformatf("run 3 errors %0d want 2", err_count));
    last_frame(r, ok);
    check(ok, "run 3 frame marker");
    check_rec(r, 2, SW + 2 * SW + 2 * (SW - 1 - 6) + 1, 6, 8'hA8, PART_M3, "run 3");
    sf_en = 0;

    // 4. endurance on serial addresses 500..501, no fault
    end_lo = 500; end_hi = 501;
    start_run(TEST_ENDURANCE, MEM_SERIAL);
    wait_loops(2);
    stop_run();
    check(err_count == 0 && cyc_count >= 16, $sformatf("run 4 errors %0d cycles %0d", err_count, cyc_count));
    check(smem.mem[501] == 8'hAA && (smem.mem[500] == 8'hAA || smem.mem[500] == 8'h55),
          "serial memory holds the endurance patterns");
    check(!sm_nack_err, "serial memory acknowledged everything");
    check(smem.starts > 0 && smem.starts == smem.stops + smem.reads, "serial START/STOP balance");

    // LED: the record of run 3 was cleared by run 4; the display ends its pass
    // and returns to the dash
    repeat (40 * (DW + GP)) @(posedge clk);
    check(led_char == 5'd21, "dash once no error is logged");

    // mechanisms
    check(n_rel == 2 && n_end == 2, "both tests ran");
    check(n_par == 2 && n_ser == 2, "both memories tested");
    check(n_test_switch >= 3, "test switched between runs");
    check(n_mem_switch >= 1, "memory switched between runs");
    check(n_down >= 3, "downward element 3 entered");
    check(n_loop_m >= 3, "loop back to element 2");
    check(n_loop_e >= 5, "endurance range wrapped");
    check(n_err_ev >= 12, "errors logged");
    check(n_frames >= 3, "frames sent to the PC");
    check(n_led_pass >= 1, "full LED pass");
    $display("mechanisms: rel=%0d end=%0d par=%0d ser=%0d test_sw=%0d mem_sw=%0d down=%0d mloop=%0d eloop=%0d err=%0d frames=%0d led_pass=%0d",
             n_rel, n_end, n_par, n_ser, n_test_switch, n_mem_switch, n_down, n_loop_m, n_loop_e,
             n_err_ev, n_frames, n_led_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
