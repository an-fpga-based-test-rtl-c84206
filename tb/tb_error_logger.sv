// Self-checking testbench for error_logger.
//
// Drives a random stream of read and write events, some reads flagged as
// errors, and keeps its own counts. Checks the cycle and error counters after
// every event, the captured record and the rec_new pulse on every error, that
// clear wins and zeroes everything, and that the record holds the latest error.
module tb_error_logger;
  import nvm_tester_pkg::*;

  logic             clk = 0, rst_n = 0, clear = 0, ev_valid = 0;
  test_event_t      ev;
  logic [CYC_W-1:0] cyc_count;
  logic [ERR_W-1:0] err_count;
  err_rec_t         rec;
  logic             rec_valid, rec_new;

  int checks = 0, failures = 0;

  error_logger dut (.clk, .rst_n, .clear, .ev_valid, .ev, .cyc_count, .err_count,
                    .rec, .rec_valid, .rec_new);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint m_cyc = 0, m_err = 0;

  initial begin
    ev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!rec_valid && cyc_count == 0 && err_count == 0, "reset state");
    for (int i = 0; i < 400; i++) begin
      test_event_t e;
      bit is_err;
      e.is_read = $urandom_range(0, 1);
      is_err    = e.is_read && ($urandom_range(0, 9) == 0);
      e.err     = is_err;
      e.addr    = addr_t'($urandom);
      e.rdata   = data_t'($urandom);
      e.part    = part_t'($urandom_range(1, 5));
      ev_valid <= 1'b1;
      ev       <= e;
      @(posedge clk);
      ev_valid <= 1'b0;
      m_cyc++;
      if (is_err) m_err++;
      #1;
      check(cyc_count == m_cyc && err_count == m_err,
            $sformatf("counts %0d/%0d want %0d/%0d", cyc_count, err_count, m_cyc, m_err));
      check(rec_new == is_err, "rec_new pulse");
      if (is_err)
        check(rec.err_count == m_err && rec.cyc_count == m_cyc && rec.addr == e.addr &&
              rec.rdata == e.rdata && rec.part == e.part && rec_valid, "record contents");
      // idle cycles in between
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    check(m_err > 10, "enough errors generated");
    // clear beats an event
    clear <= 1'b1; ev_valid <= 1'b1; ev.err <= 1'b1; ev.is_read <= 1'b1;
    @(posedge clk);
    clear <= 1'b0; ev_valid <= 1'b0;
    #1;
    check(cyc_count == 0 && err_count == 0 && !rec_valid && !rec_new, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
