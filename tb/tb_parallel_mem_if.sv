// Self-checking testbench for parallel_mem_if.
//
// Connects the port to a behavioural asynchronous memory and runs random
// writes and reads against a reference array kept here. Checks read data, the
// latency from acceptance to rsp_valid (1 + T_ACT + T_PRE, plus T_WR for
// writes; the testbench sees it one edge later), that CE is low exactly T_ACT cycles per access, that the model saw
// no address change under CE and no undriven write, and the injected fault.
module tb_parallel_mem_if;
  import nvm_tester_pkg::*;

  localparam int T_ACT = 3, T_PRE = 2, T_WR = 4;
  localparam int AWM   = 6;

  logic     clk = 0, rst_n = 0;
  logic     cmd_valid = 0, cmd_ready, rsp_valid;
  mem_cmd_t cmd;
  data_t    rsp_rdata;
  addr_t    mem_addr;
  data_t    mem_dq_o, mem_dq_i;
  logic     mem_dq_oe, mem_ce_n, mem_oe_n, mem_we_n;
  logic     fault_en = 0;

  int checks = 0, failures = 0;

  parallel_mem_if #(.T_ACT(T_ACT), .T_PRE(T_PRE), .T_WR(T_WR)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp_rdata,
    .mem_addr, .mem_dq_o, .mem_dq_oe, .mem_dq_i, .mem_ce_n, .mem_oe_n, .mem_we_n
  );

  tb_async_mem_model #(.AW(AWM)) mem (
    .addr(mem_addr[AWM-1:0]), .dq_o(mem_dq_o), .dq_oe(mem_dq_oe), .dq_i(mem_dq_i),
    .ce_n(mem_ce_n), .oe_n(mem_oe_n), .we_n(mem_we_n),
    .fault_en, .fault_addr(AWM'(9)), .fault_xor(8'h10)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ce_low = 0, ce_runs_bad = 0;
  always @(posedge clk) begin
    if (!rst_n) ce_low = 0;
    else if (!mem_ce_n) ce_low++;
    else if (ce_low != 0) begin
      if (ce_low != T_ACT) ce_runs_bad++;
      ce_low = 0;
    end
  end

  logic [7:0] ref_mem [1 << AWM];

  task automatic access(bit we, int a, logic [7:0] d, output logic [7:0] q, output int lat);
    cmd_valid <= 1'b1;
    cmd       <= '{we: we, addr: addr_t'(a), wdata: d};
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_valid <= 1'b0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!rsp_valid);
    q = rsp_rdata;
  endtask

  initial begin
    logic [7:0] q;
    int lat;
    for (int i = 0; i < (1 << AWM); i++) ref_mem[i] = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    mem.proto_err = 0; mem.reads = 0; mem.writes = 0;   // ignore what the model saw before reset
    for (int i = 0; i < 300; i++) begin
      automatic bit we = $urandom_range(0, 1);
      automatic int a  = $urandom_range(0, (1 << AWM) - 1);
      automatic logic [7:0] d = 8'($urandom);
      access(we, a, d, q, lat);
      check(lat == 2 + T_ACT + T_PRE + (we ? T_WR : 0),  // +1: sampled at the edge after
            $sformatf("latency %0d for we=%0b", lat, we));
      if (we) ref_mem[a] = d;
      else check(q == ref_mem[a], $sformatf("read a=%0d got %h want %h", a, q, ref_mem[a]));
    end
    // fault injection is visible through the port
    access(1, 9, 8'h55, q, lat);
    fault_en = 1;
    access(0, 9, 8'h00, q, lat);
    check(q == 8'h45, $sformatf("faulty read %h want 45", q));
    fault_en = 0;
    repeat (5) @(posedge clk);
    check(ce_runs_bad == 0, "CE low time");
    check(mem.proto_err == 0, $sformatf("memory protocol errors %0d", mem.proto_err));
    check(mem.writes + mem.reads == 302, $sformatf("accesses seen by memory %0d", mem.writes + mem.reads));
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
