// Self-checking testbench for led_scroller.
//
// With DWELL = 5 and GAP = 3 it checks the dash before any error, then one
// full pass of a known record: the 33 characters in order (symbol n, 8 error
// count digits, c, 13 cycle count digits, L, 4 address digits, r, 2 data
// digits, P, part), each lit exactly DWELL cycles and followed by GAP dark
// cycles, the segment patterns of the symbols, and that a record changed in
// mid-pass shows up only in the next pass.
module tb_led_scroller;
  import nvm_tester_pkg::*;

  localparam int DWELL = 5, GAP = 3;

  logic       clk = 0, rst_n = 0, rec_valid = 0;
  err_rec_t   rec;
  logic [6:0] seg;
  logic [4:0] char_code;
  logic       pass_done;

  int checks = 0, failures = 0;

  led_scroller #(.DWELL(DWELL), .GAP(GAP)) dut (.clk, .rst_n, .rec_valid, .rec, .seg,
                                                .char_code, .pass_done);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // segments {g,f,e,d,c,b,a} of the characters used, written out here
  function automatic logic [6:0] seg_of(int c);
    case (c)
      0: return 7'b0111111;  1: return 7'b0000110;  2: return 7'b1011011;
      3: return 7'b1001111;  4: return 7'b1100110;  5: return 7'b1101101;
      6: return 7'b1111101;  7: return 7'b0000111;  8: return 7'b1111111;
      9: return 7'b1101111; 10: return 7'b1110111; 11: return 7'b1111100;
     12: return 7'b0111001; 13: return 7'b1011110; 14: return 7'b1111001;
     15: return 7'b1110001;
     16: return 7'b1010100;  // n
     17: return 7'b1011000;  // c
     18: return 7'b0111000;  // L
     19: return 7'b1010000;  // r
     20: return 7'b1110011;  // P
     21: return 7'b1000000;  // -
     default: return 7'b0000000;
    endcase
  endfunction

  int exp_chars [$];
  task automatic build(err_rec_t r);
    longint unsigned c = r.cyc_count;
    exp_chars.delete();
    exp_chars.push_back(16);
    for (int i = 7; i >= 0; i--) exp_chars.push_back(int'(r.err_count[4*i +: 4]));
    exp_chars.push_back(17);
    for (int i = 12; i >= 0; i--) exp_chars.push_back(int'((c >> (4 * i)) & 15));
    exp_chars.push_back(18);
    for (int i = 3; i >= 0; i--) exp_chars.push_back(int'((16'(r.addr) >> (4 * i)) & 16'hF));
    exp_chars.push_back(19);
    exp_chars.push_back(int'(r.rdata[7:4]));
    exp_chars.push_back(int'(r.rdata[3:0]));
    exp_chars.push_back(20);
    exp_chars.push_back(int'(r.part));
  endtask

  // watch one pass: returns the characters seen and checks on/off times
  task automatic watch_pass(string tag);
    int k = 0;
    while (k < exp_chars.size()) begin
      int on = 0, off = 0;
      logic [6:0] s;
      s = seg;
      while (seg == s && seg != 0) begin on++; @(posedge clk); #1; end
      while (seg == 0) begin off++; @(posedge clk); #1; end
      check(on == DWELL && off == GAP, $sformatf("%s char %0d on %0d off %0d", tag, k, on, off));
      check(s == seg_of(exp_chars[k]), $sformatf("%s char %0d seg %b want %b (code %0d)",
                                                 tag, k, s, seg_of(exp_chars[k]), exp_chars[k]));
      k++;
    end
  endtask

  initial begin
    err_rec_t r1, r2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    #1;
    check(seg == seg_of(21), "dash before any error");
    r1.err_count = 32'h0000_0A3C;
    r1.cyc_count = 50'h2_1234_5678_9ABC;
    r1.addr      = 15'h7E01;
    r1.rdata     = 8'hAB;
    r1.part      = PART_M3;
    rec = r1;
    @(posedge clk);
    rec_valid <= 1;
    @(posedge clk); #1;
    build(r1);
    watch_pass("pass 1");
    // change record in mid-pass: the pass in progress keeps r1
    r2 = r1; r2.err_count = 32'h1234_5678; r2.part = PART_E_RD2; r2.rdata = 8'h2A;
    repeat (DWELL) @(posedge clk);
    rec = r2;
    #1;
    // finish pass 2 (first char already partly seen)
    wait (pass_done);
    #1;
    build(r2);
    watch_pass("pass 3");
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
