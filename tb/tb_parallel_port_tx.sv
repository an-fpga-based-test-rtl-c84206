// Self-checking testbench for parallel_port_tx.
//
// A PC model acknowledges each strobe after random delays. Random error
// records are sent; each received 16-byte frame is compared with the layout
// assembled here field by field. Also checks that pp_data is stable while the
// strobe is high, and that of three records arriving during one frame only
// the latest is sent afterwards (rec, like the error logger's
// output, holds the latest record until the next one).
module tb_parallel_port_tx;
  import nvm_tester_pkg::*;

  logic     clk = 0, rst_n = 0, rec_new = 0;
  err_rec_t rec;
  data_t    pp_data;
  logic     pp_stb, pp_ack, busy, frame_done;

  int checks = 0, failures = 0;

  parallel_port_tx dut (.clk, .rst_n, .rec_new, .rec, .pp_data, .pp_stb, .pp_ack,
                        .busy, .frame_done);
  tb_pc_port_model pc (.clk, .pp_data, .pp_stb, .pp_ack);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unstable = 0;
  logic stb_q = 0; data_t d_q = 0;
  always @(posedge clk) begin
    if (stb_q && pp_stb && pp_data != d_q) unstable++;
    stb_q <= pp_stb; d_q <= pp_data;
  end

  function automatic void expect_frame(err_rec_t r, ref logic [7:0] q [$], input string tag);
    logic [7:0] e [16];
    longint unsigned c = r.cyc_count;
    e[0] = 8'hA5;
    for (int i = 0; i < 4; i++) e[1 + i] = r.err_count[8*(3 - i) +: 8];
    for (int i = 0; i < 7; i++) e[5 + i] = 8'(c >> (8 * (6 - i)));
    e[12] = 8'(r.addr >> 8);
    e[13] = r.addr[7:0];
    e[14] = r.rdata;
    e[15] = {4'h0, r.part};
    checks++;
    if (q.size() < 16) begin failures++; $display("FAIL: %s short frame", tag); return; end
    for (int i = 0; i < 16; i++) begin
      logic [7:0] b = q.pop_front();
      if (b != e[i]) begin
        failures++;
        $display("FAIL: %s byte %0d got %h want %h", tag, i, b, e[i]);
        return;
      end
    end
  endfunction

  function automatic err_rec_t rand_rec();
    err_rec_t r;
    r.err_count = ERR_W'($urandom);
    r.cyc_count = {18'($urandom), 32'($urandom)};
    r.addr      = addr_t'($urandom);
    r.rdata     = data_t'($urandom);
    r.part      = part_t'($urandom_range(1, 5));
    return r;
  endfunction

  task automatic send(err_rec_t r);
    rec <= r; rec_new <= 1'b1;
    @(posedge clk);
    rec_new <= 1'b0;
  endtask

  initial begin
    err_rec_t r, r2, r3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (12) @(posedge clk);
    pc.bytes_q.delete();   // anything the PC model saw before reset
    for (int n = 0; n < 20; n++) begin
      r = rand_rec();
      send(r);
      @(posedge frame_done);
      @(posedge clk);
      expect_frame(r, pc.bytes_q, $sformatf("frame %0d", n));
      check(pc.bytes_q.size() == 0, "no extra bytes");
    end
    // three records during one frame: the first is sent, then only the last
    r = rand_rec(); r2 = rand_rec(); r3 = rand_rec();
    send(r);
    repeat (20) @(posedge clk);
    send(r2);
    repeat (5) @(posedge clk);
    send(r3);
    @(posedge frame_done);
    @(posedge frame_done);
    repeat (50) @(posedge clk);
    check(!busy, "idle after the queued frame");
    expect_frame(r, pc.bytes_q, "first of burst");
    expect_frame(r3, pc.bytes_q, "latest of burst");
    check(pc.bytes_q.size() == 0, "older queued record dropped");
    check(unstable == 0, "data stable under strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
