// Self-checking testbench for switch_sync.
//
// Bounces each switch a few times, then holds it. Checks that the output never
// follows a level that lasted less than DEBOUNCE cycles, and that a level held
// steady is taken by sw on the 4 + DEBOUNCE-th clock edge after it was applied.
module tb_switch_sync;

  localparam int N = 3, DEB = 10;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] sw_raw = '0, sw;

  int checks = 0, failures = 0;

  switch_sync #(.N(N), .DEBOUNCE(DEB)) dut (.clk, .rst_n, .sw_raw, .sw);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 12; t++) begin
      automatic logic [N-1:0] target = N'($urandom) ^ sw;
      automatic logic [N-1:0] prev_lvl = sw;
      automatic int lat = 0;
      if (target == sw) target = ~sw;
      // bounce: short pulses, each shorter than DEBOUNCE
      for (int b = 0; b < 4; b++) begin
        sw_raw <= target;
        repeat ($urandom_range(1, DEB - 3)) @(posedge clk);
        sw_raw <= prev_lvl;
        repeat ($urandom_range(1, DEB - 3)) @(posedge clk);
        check(sw == prev_lvl, $sformatf("bounce passed through: %b", sw));
      end
      repeat (DEB + 4) @(posedge clk);
      check(sw == prev_lvl, "still the old level after the bounces");
      sw_raw <= target;
      do begin @(posedge clk); lat++; end while (sw != target && lat < 10 * DEB);
      check(lat == DEB + 5, $sformatf("latency %0d want %0d", lat, DEB + 5));  // seen one edge after the update
    end
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
