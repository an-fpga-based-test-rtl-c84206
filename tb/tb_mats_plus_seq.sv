// Self-checking testbench for mats_plus_seq.
//
// A small memory answers each access after a random delay of 0-3 cycles; one
// address has a stuck-at-1 bit. The testbench builds the MATS+ access list on
// its own (element 1 up writes, then elements 2 and 3 twice) and checks every
// access the sequencer issues against it, then checks which reads were
// flagged as errors, loop_done, the issue rate, and stop/restart via run.
module tb_mats_plus_seq;
  import nvm_tester_pkg::*;

  localparam int N     = 8;
  localparam int FAULT = 3;          // bit 0 stuck at 1 here

  logic        clk = 0, rst_n = 0, run = 0;
  logic        cmd_valid, cmd_ready, rsp_valid, ev_valid, busy, loop_done;
  mem_cmd_t    cmd;
  data_t       rsp_rdata;
  test_event_t ev;
  part_t       part;

  int checks = 0, failures = 0;

  mats_plus_seq dut (
    .clk, .rst_n, .run, .last_addr(addr_t'(N - 1)),
    .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp_rdata,
    .ev_valid, .ev, .part, .busy, .loop_done
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- memory with random latency
  data_t mem [N];
  int    lat = 0;
  logic  pend = 0;
  mem_cmd_t pc;
  assign cmd_ready = !pend;
  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (!pend && cmd_valid) begin
      pend <= 1'b1; pc <= cmd; lat <= $urandom_range(0, 3);
    end else if (pend) begin
      if (lat == 0) begin
        pend <= 1'b0;
        rsp_valid <= 1'b1;
        if (pc.we) mem[pc.addr] <= pc.wdata;
        else rsp_rdata <= (pc.addr == FAULT) ? (mem[pc.addr] | 8'h01) : mem[pc.addr];
      end else lat <= lat - 1;
    end
  end

  // ---- expected access list, built independently
  typedef struct { bit we; int addr; logic [7:0] d; int part; } op_t;
  op_t exp_q [$];
  initial begin
    for (int a = 0; a < N; a++) exp_q.push_back('{1, a, 8'h55, 1});
    for (int l = 0; l < 2; l++) begin
      for (int a = 0; a < N; a++) begin
        exp_q.push_back('{0, a, 8'h55, 2}); exp_q.push_back('{1, a, 8'hAA, 2});
      end
      for (int a = N - 1; a >= 0; a--) begin
        exp_q.push_back('{0, a, 8'hAA, 3}); exp_q.push_back('{1, a, 8'h55, 3});
      end
    end
  end

  int nops = 0, nerr = 0, nloops = 0, nev = 0;
  op_t cur_exp_q [$];
  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && cmd_ready && nops < exp_q.size()) begin
      op_t e;
      e = exp_q[nops];
      check(cmd.we == e.we && int'(cmd.addr) == e.addr && (!e.we || cmd.wdata == e.d),
            $sformatf("op %0d: got we=%0b a=%0d d=%h, want we=%0b a=%0d d=%h",
                      nops, cmd.we, cmd.addr, cmd.wdata, e.we, e.addr, e.d));
      check(int'(part) == e.part, $sformatf("op %0d part %0d want %0d", nops, part, e.part));
      cur_exp_q.push_back(e);
      nops++;
    end
    if (ev_valid) begin
      op_t e;
      bit want_err;
      e = cur_exp_q.pop_front();
      nev++;
      // a read at FAULT expecting bit 0 clear (10101010) must fail
      want_err = !e.we && e.addr == FAULT && e.d[0] == 1'b0;
      check(ev.err == want_err && ev.is_read == !e.we && int'(ev.addr) == e.addr &&
            int'(ev.part) == e.part, $sformatf("event %0d err=%0b", nev, ev.err));
      if (ev.err) begin
        nerr++;
        check(ev.rdata == 8'hAB, "error data");
      end
    end
    if (loop_done) nloops++;
  end


  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run = 1;
    wait (nops == exp_q.size());
    @(posedge clk);
    run = 0;
    repeat (10) @(posedge clk);
    check(!busy, "idle after run falls");
    check(nerr == 2, $sformatf("errors %0d, want 2 (element 3 reads of addr %0d)", nerr, FAULT));
    check(nloops == 2, $sformatf("loop_done %0d want 2", nloops));
    check(mem[0] == 8'h55 && mem[N-1] == 8'h55, "memory holds 01010101 after element 3");
    // restart: element 1 at address 0 again
    run = 1;
    wait (cmd_valid);
    check(cmd.we && cmd.addr == 0 && cmd.wdata == 8'h55 && part == PART_M1, "restart at element 1");
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
