// Workload testbench: the 4 kbit two-wire serial FRAM (512 x 8) on
// nvm_tester_top with every parameter at its default (10 MHz clock assumed,
// 100 kHz SCL, 10 ms debounce).
//
// 1. One complete MATS+ pass over all 512 bytes, with bit 3 of address 0x1A5
//    (upper half, so address bit 8 matters) corrupted on reads: two errors,
//    and the frame of the element-3 error checked field by field.
// 2. The endurance loop on the single address 0x1FF: the time of one loop of
//    four accesses is measured and must equal 2 x (29 + 39) bit times of
//    100 cycles plus 2 cycles of turnaround per access; from it the access
//    rate per second is printed. No errors may occur.
module tb_workload_serial_fram;
  import nvm_tester_pkg::*;

  localparam int N = 512, FA = 'h1A5;

  logic             clk = 0, rst_n = 0;
  logic             sw_run = 0, sw_test = 0;
  addr_t            end_a = addr_t'('h1FF);
  addr_t            pm_addr;
  data_t            pm_dq_o, pp_data;
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

  int checks = 0, failures = 0;

  nvm_tester_top dut (
    .clk, .rst_n, .sw_run, .sw_test, .sw_mem(1'b1), .end_lo(end_a), .end_hi(end_a),
    .pm_addr, .pm_dq_o, .pm_dq_oe, .pm_dq_i(8'hFF), .pm_ce_n, .pm_oe_n, .pm_we_n,
    .sm_scl_oe, .sm_sda_oe, .sm_sda_i(!(sm_sda_oe || s_sda_oe)), .sm_nack_err,
    .pp_data, .pp_stb, .pp_ack, .seg, .led_char,
    .running, .test_sel, .mem_sel, .cyc_count, .err_count, .mats_part, .pp_busy, .loop_done
  );

  tb_i2c_fram_model smem (
    .scl(!sm_scl_oe), .sda(!(sm_sda_oe || s_sda_oe)), .sda_oe(s_sda_oe),
    .fault_en(1'b1), .fault_addr(9'(FA)), .fault_xor(8'h08)
  );

  tb_pc_port_model pc (.clk, .pp_data, .pp_stb, .pp_ack);

  always #50 clk = ~clk;   // 10 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    logic [7:0] b [16];
    logic [ERR_W-1:0] e_at_loop;
    longint t0, t1, per_loop, want_loop;
    longint unsigned got, want_cyc;
    repeat (12) @(posedge clk);
    rst_n = 1;
    repeat (12) @(posedge clk);
    pc.bytes_q.delete();
    smem.writes = 0; smem.reads = 0;

    // 1. MATS+ over the whole serial FRAM
    sw_run = 1;
    wait (loop_done);
    e_at_loop = err_count;
    check(smem.writes + smem.reads == 5 * N, $sformatf("accesses in one pass %0d", smem.writes + smem.reads));
    sw_run = 0;
    wait (!running);
    repeat (8000) @(posedge clk);
    wait (!pp_busy);
    check(e_at_loop == 2, $sformatf("errors in one pass %0d want 2", e_at_loop));
    check(!sm_nack_err, "every byte acknowledged");
    check(pc.bytes_q.size() >= 32, "two frames received");
    for (int i = 0; i < 16; i++) void'(pc.bytes_q.pop_front());
    for (int i = 0; i < 16; i++) b[i] = pc.bytes_q.pop_front();
    got = 0;
    for (int i = 5; i < 12; i++) got = (got << 8) | longint'(b[i]);
    want_cyc = N + 2 * N + 2 * (N - 1 - FA) + 1;
    check(b[0] == 8'hA5 && {b[1], b[2], b[3], b[4]} == 32'd2, "frame marker and error count");
    check(got == want_cyc, $sformatf("cycle count %0d want %0d", got, want_cyc));
    check({b[12], b[13]} == 16'(FA) && b[14] == (8'hAA ^ 8'h08) && b[15] == 8'(PART_M3),
          "address, data, part");

    // 2. endurance on 0x1FF: measure one loop
    sw_test = 1;
    repeat (100_010) @(posedge clk);
    sw_run = 1;
    @(posedge clk iff loop_done);
    t0 = cyc;
    @(posedge clk iff loop_done);
    t1 = cyc;
    per_loop  = t1 - t0;
    want_loop = 2 * (29 + 39) * 100 + 4 * 2;
    check(per_loop == want_loop, $sformatf("endurance loop %0d cycles want %0d", per_loop, want_loop));
    $display("endurance on the serial FRAM: %0d accesses/s at a 10 MHz clock, 1e10 read/write cycles take %0d days",
             4 * 10_000_000 / per_loop, 64'd10_000_000_000 * per_loop / 4 / 10_000_000 / 86400);
    check(err_count == 0, "no endurance errors on a good address");
    check(smem.mem['h1FF] == 8'hAA || smem.mem['h1FF] == 8'h55, "pattern stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
