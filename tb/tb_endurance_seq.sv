// Self-checking testbench for endurance_seq.
//
// A small memory answers each access after a random delay of 0-3 cycles;
// address 6 has bit 7 stuck at 0. The testbench runs the loop on the range
// 5..7, checks every issued access against the list (W55, R, WAA, R) per
// address built here, checks the flagged errors (only the read of 10101010 at
// address 6), loop_done, then a reversed range (single address) and the
// issue rate: with zero latency one access every 2 cycles.
module tb_endurance_seq;
  import nvm_tester_pkg::*;

  logic        clk = 0, rst_n = 0, run = 0;
  logic        cmd_valid, cmd_ready, rsp_valid, ev_valid, busy, loop_done;
  mem_cmd_t    cmd;
  data_t       rsp_rdata;
  test_event_t ev;
  addr_t       lo = 5, hi = 7;
  bit          zero_lat = 0;

  int checks = 0, failures = 0;

  endurance_seq dut (
    .clk, .rst_n, .run, .range_lo(lo), .range_hi(hi),
    .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp_rdata,
    .ev_valid, .ev, .busy, .loop_done
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  data_t mem [16];
  int    lat = 0;
  logic  pend = 0;
  mem_cmd_t pc;
  assign cmd_ready = !pend;
  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (!pend && cmd_valid) begin
      pend <= 1'b1; pc <= cmd; lat <= zero_lat ? 0 : $urandom_range(0, 3);
    end else if (pend) begin
      if (lat == 0) begin
        pend <= 1'b0;
        rsp_valid <= 1'b1;
        if (pc.we) mem[pc.addr[3:0]] <= pc.wdata;
        else rsp_rdata <= (pc.addr == 6) ? (mem[pc.addr[3:0]] & 8'h7F) : mem[pc.addr[3:0]];
      end else lat <= lat - 1;
    end
  end

  typedef struct { bit we; int addr; logic [7:0] d; } op_t;
  op_t exp_q [$];
  op_t cur_q [$];
  int  nops = 0, nerr = 0, nloops = 0, last_issue = 0, cyc = 0, min_gap = 1000;
  bit  track = 1;

  task automatic build(int l, int h, int loops);
    exp_q.delete();
    for (int k = 0; k < loops; k++)
      for (int a = l; a <= h; a++) begin
        exp_q.push_back('{1, a, 8'h55}); exp_q.push_back('{0, a, 8'h55});
        exp_q.push_back('{1, a, 8'hAA}); exp_q.push_back('{0, a, 8'hAA});
      end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n && cmd_valid && cmd_ready) begin
      if (nops > 0 && cyc - last_issue < min_gap) min_gap = cyc - last_issue;
      last_issue = cyc;
      if (track && nops < exp_q.size()) begin
        op_t e;
        e = exp_q[nops];
        check(cmd.we == e.we && int'(cmd.addr) == e.addr && (!e.we || cmd.wdata == e.d),
              $sformatf("op %0d: we=%0b a=%0d d=%h want we=%0b a=%0d d=%h",
                        nops, cmd.we, cmd.addr, cmd.wdata, e.we, e.addr, e.d));
        cur_q.push_back(e);
      end
      nops++;
    end
    if (rst_n && ev_valid && track && cur_q.size() > 0) begin
      op_t e;
      bit want;
      e = cur_q.pop_front();
      want = !e.we && e.addr == 6 && e.d == 8'hAA;
      check(ev.err == want, $sformatf("event at a=%0d err=%0b", e.addr, ev.err));
      if (!e.we) check(ev.part == (e.d == 8'h55 ? PART_E_RD1 : PART_E_RD2), "event part");
      if (ev.err) begin nerr++; check(ev.rdata == 8'h2A && ev.addr == 6, "error data/address"); end
    end
    if (rst_n && loop_done) nloops++;
  end

  initial begin
    build(5, 7, 3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run = 1;
    wait (nops == exp_q.size());
    run = 0;
    wait (!busy);
    repeat (3) @(posedge clk);
    check(nerr == 3, $sformatf("errors %0d want 3", nerr));
    check(nloops == 3, $sformatf("loops %0d want 3", nloops));
    // reversed range: single address lo
    lo = 9; hi = 2; nops = 0; nloops = 0; build(9, 9, 2);
    cur_q.delete();
    run = 1;
    wait (nops == exp_q.size());
    run = 0;
    wait (!busy);
    repeat (3) @(posedge clk);
    check(nloops == 2, "single-address loops");
    // issue rate with zero latency
    track = 0; zero_lat = 1; min_gap = 1000; nops = 0;
    run = 1;
    wait (nops == 20);
    run = 0;
    wait (!busy);
    check(min_gap == 3, $sformatf("issue interval %0d cycles, want 3 (accept, respond, issue)", min_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
