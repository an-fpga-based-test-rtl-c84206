// Full-size testbench: nvm_tester_top with every parameter at its default
// (32K x 8 parallel memory, 10 ms debounce, 0.5 s LED characters at 10 MHz).
//
// Runs one complete MATS+ pass (element 1, then elements 2 and 3 over all
// 32768 addresses) on the parallel memory with bit 0 of address 0x1234
// corrupted on reads, and checks at the loop back to element 2: two errors,
// 5 x 32768 accesses, one access every 6 cycles (setup, T_ACT = 2, T_PRE = 1,
// response, reissue). The run switch is then turned off, which takes effect
// after the 10 ms debounce, so the test runs on a little. Then it checks the
// frame of the second error (element 3 read of 0x1234, its cycle count), one
// frame per error, and that the display began its pass with the n symbol.
module tb_nvm_tester_full;
  import nvm_tester_pkg::*;

  localparam int N = 32768, FA = 'h1234;

  logic             clk = 0, rst_n = 0;
  logic             sw_run = 0;
  addr_t            pm_addr;
  data_t            pm_dq_o, pm_dq_i, pp_data;
  logic             pm_dq_oe, pm_ce_n, pm_oe_n, pm_we_n;
  logic             sm_scl_oe, sm_sda_oe, sm_nack_err;
  logic             pp_stb, pp_ack, running, loop_done, pp_busy;
  logic [6:0]       seg;
  logic [4:0]       led_char;
  test_t            test_sel;
  mem_sel_t         mem_sel;
  logic [CYC_W-1:0] cyc_count;
  logic [ERR_W-1:0] err_count;
  part_t            mats_part;

  int checks = 0, failures = 0;

  nvm_tester_top dut (
    .clk, .rst_n, .sw_run, .sw_test(1'b0), .sw_mem(1'b0), .end_lo('0), .end_hi('0),
    .pm_addr, .pm_dq_o, .pm_dq_oe, .pm_dq_i, .pm_ce_n, .pm_oe_n, .pm_we_n,
    .sm_scl_oe, .sm_sda_oe, .sm_sda_i(!sm_sda_oe), .sm_nack_err,
    .pp_data, .pp_stb, .pp_ack, .seg, .led_char,
    .running, .test_sel, .mem_sel, .cyc_count, .err_count, .mats_part, .pp_busy, .loop_done
  );

  tb_async_mem_model #(.AW(ADDR_W)) pmem (
    .addr(pm_addr), .dq_o(pm_dq_o), .dq_oe(pm_dq_oe), .dq_i(pm_dq_i),
    .ce_n(pm_ce_n), .oe_n(pm_oe_n), .we_n(pm_we_n),
    .fault_en(1'b1), .fault_addr(addr_t'(FA)), .fault_xor(8'h01)
  );

  tb_pc_port_model pc (.clk, .pp_data, .pp_stb, .pp_ack);

  always #50 clk = ~clk;   // 10 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint ce_falls = 0, first_ce = 0, last_ce = 0, cyc = 0;
  logic ce_q = 1;
  bit saw_n = 0;
  always @(posedge clk) begin
    cyc++;
    ce_q <= pm_ce_n;
    if (ce_q && !pm_ce_n) begin
      if (ce_falls == 0) first_ce = cyc;
      last_ce = cyc;
      ce_falls++;
    end
    if (led_char == 5'd16) saw_n = 1;
  end

  initial begin
    logic [7:0] b [16];
    longint c;
    logic [ERR_W-1:0] e_at_loop;
    longint unsigned want_cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (12) @(posedge clk);
    pmem.proto_err = 0; pmem.reads = 0; pmem.writes = 0; ce_falls = 0;
    pc.bytes_q.delete();   // anything the PC model saw before reset
    sw_run = 1;
    wait (loop_done);
    c = ce_falls;
    e_at_loop = err_count;
    sw_run = 0;
    wait (!running);
    repeat (20) @(posedge clk);
    wait (!pp_busy);
    repeat (20) @(posedge clk);
    check(e_at_loop == 2, $sformatf("errors in one pass %0d want 2", e_at_loop));
    check(c == 5 * N, $sformatf("accesses in one pass %0d want %0d", c, 5 * N));
    check(pmem.reads + pmem.writes == ce_falls, "every access reached the memory");
    check((last_ce - first_ce) == 6 * (ce_falls - 1), $sformatf("access spacing: %0d cycles for %0d accesses",
                                                             last_ce - first_ce, ce_falls));
    check(pmem.proto_err == 0, "parallel bus protocol");
    // one frame per error; the second frame is the element 3 error
    check(pc.bytes_q.size() == 16 * err_count, $sformatf("PC bytes %0d for %0d errors", pc.bytes_q.size(), err_count));
    for (int i = 0; i < 16; i++) void'(pc.bytes_q.pop_front());
    for (int i = 0; i < 16; i++) b[i] = pc.bytes_q.pop_front();
    want_cyc = N + 2 * N + 2 * (N - 1 - FA) + 1;
    begin
      longint unsigned got = 0;
      for (int i = 5; i < 12; i++) got = (got << 8) | longint'(b[i]);
      check(b[0] == 8'hA5 && {b[1], b[2], b[3], b[4]} == 32'd2, "frame marker and error count");
      check(got == want_cyc, $sformatf("cycle count %0d want %0d", got, want_cyc));
      check({b[12], b[13]} == 16'(FA) && b[14] == 8'hAB && b[15] == 8'(PART_M3), "address, data, part");
    end
    check(saw_n, "display began the error pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
