// Self-checking testbench for serial_mem_if.
//
// Connects the port to a behavioural two-wire FRAM (open-drain lines modelled
// as wired-AND) and runs random byte writes and random reads over all 512
// addresses against a reference array. Checks read data, transfer lengths in
// cycles (29 bit times of 4*QDIV for a write, 39 for a read), that SDA never
// changes while SCL is high except for START and STOP, the count of STARTs and
// STOPs, no acknowledge error, then a wrong device address setting nack_err.
module tb_serial_mem_if;
  import nvm_tester_pkg::*;

  localparam int QDIV = 3;

  logic     clk = 0, rst_n = 0;
  logic     cmd_valid = 0, cmd_ready, rsp_valid, nack_err, nack_err2;
  mem_cmd_t cmd;
  data_t    rsp_rdata, rsp_rdata2;
  logic     scl_oe, sda_oe, s_sda_oe, scl, sda;
  logic     cmd_ready2, rsp_valid2, scl_oe2, sda_oe2;
  logic     use2 = 0;

  int checks = 0, failures = 0;

  serial_mem_if #(.QDIV(QDIV)) dut (
    .clk, .rst_n, .cmd_valid(cmd_valid && !use2), .cmd_ready, .cmd, .rsp_valid,
    .rsp_rdata, .nack_err, .scl_oe, .sda_oe, .sda_i(sda)
  );
  // a second port strapped to a device address no memory answers
  serial_mem_if #(.QDIV(QDIV), .DEV_A21(2'b11)) dut2 (
    .clk, .rst_n, .cmd_valid(cmd_valid && use2), .cmd_ready(cmd_ready2), .cmd,
    .rsp_valid(rsp_valid2), .rsp_rdata(rsp_rdata2), .nack_err(nack_err2),
    .scl_oe(scl_oe2), .sda_oe(sda_oe2), .sda_i(sda)
  );

  assign scl = !(scl_oe || scl_oe2);
  assign sda = !(sda_oe || sda_oe2 || s_sda_oe);

  tb_i2c_fram_model mem (.scl, .sda, .sda_oe(s_sda_oe),
                         .fault_en(1'b0), .fault_addr(9'd0), .fault_xor(8'h00));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // SDA may change while SCL is high only as START (fall) or STOP (rise).
  int high_changes = 0;
  logic sda_prev = 1, scl_prev = 1;
  always @(posedge clk) begin
    if (scl && scl_prev && sda != sda_prev) high_changes++;
    sda_prev <= sda;
    scl_prev <= scl;
  end

  logic [7:0] ref_mem [512];

  task automatic access(bit we, int a, logic [7:0] d, output logic [7:0] q, output int lat);
    cmd_valid <= 1'b1;
    cmd       <= '{we: we, addr: addr_t'(a), wdata: d};
    @(posedge clk);
    cmd_valid <= 1'b0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!(rsp_valid || rsp_valid2));
    q = use2 ? rsp_rdata2 : rsp_rdata;
  endtask

  initial begin
    logic [7:0] q;
    int lat, nw = 0, nr = 0;
    for (int i = 0; i < 512; i++) ref_mem[i] = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    mem.starts = 0; mem.stops = 0; high_changes = 0;   // forget pre-reset activity
    for (int i = 0; i < 120; i++) begin
      automatic bit we = (i < 40) ? 1 : $urandom_range(0, 1);
      automatic int a  = (i < 40) ? (i * 13) % 512 : $urandom_range(0, 511);
      automatic logic [7:0] d = 8'($urandom);
      access(we, a, d, q, lat);
      // +1: rsp_valid is seen at the edge after it rises
      check(lat == (we ? 29 : 39) * 4 * QDIV + 1, $sformatf("transfer length %0d we=%0b", lat, we));
      if (we) begin ref_mem[a] = d; nw++; end
      else begin
        nr++;
        check(q == ref_mem[a], $sformatf("read a=%0d got %h want %h", a, q, ref_mem[a]));
      end
    end
    check(mem.writes == nw && mem.reads == nr, "accesses seen by the memory");
    check(mem.starts == nw + 2 * nr && mem.stops == nw + nr,
          $sformatf("START/STOP count %0d/%0d want %0d/%0d", mem.starts, mem.stops, nw + 2 * nr, nw + nr));
    check(!nack_err, "no acknowledge error");
    check(high_changes == mem.starts + mem.stops,
          $sformatf("SDA changes under high SCL %0d, START+STOP %0d", high_changes, mem.starts + mem.stops));
    use2 = 1;
    access(1, 5, 8'h77, q, lat);
    check(nack_err2, "missing acknowledge flagged");
    check(ref_mem[5] == mem.mem[5], "unaddressed write ignored");
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
