// Scrolling error display on one seven-segment digit.
//
// Without a PC, the tester shows the most recent error on a single 7-segment
// LED by stepping through it one character at a time, each field announced by
// a symbol, as the test-bed description outlines. The order, symbols and field
// widths are this design's:
//   n  total error count      8 hex digits
//   c  read/write cycle count 13 hex digits (50 bits)
//   L  address                4 hex digits
//   r  data read              2 hex digits
//   P  test part              1 hex digit (1-3 MATS+ element, 4/5 endurance read)
// 33 characters in all, most significant digit first. Each character is lit
// for DWELL cycles and followed by GAP dark cycles, so that two equal digits in
// a row can be told apart. The record is copied at the start of each pass, so
// one pass never mixes two errors; a pass always runs to its end and the next
// pass shows whatever error is then the latest. Before any error, a steady
// dash is shown.
//
// Defaults assume a 10 MHz clock: 0.5 s per character and 0.1 s dark.
// seg is {g,f,e,d,c,b,a}; SEG_ACTIVE_LOW inverts it for common-anode parts.
// char_code exposes the code being shown (see seg7_decoder) and pass_done
// pulses at the end of each pass.
module led_scroller
  import nvm_tester_pkg::*;
#(
  parameter int unsigned DWELL          = 5_000_000,
  parameter int unsigned GAP            = 1_000_000,
  parameter bit          SEG_ACTIVE_LOW = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rec_valid,
  input  err_rec_t   rec,
  output logic [6:0] seg,
  output logic [4:0] char_code,
  output logic       pass_done
);

  localparam int NSLOT = 33;
  localparam logic [4:0] CH_N = 5'd16, CH_C = 5'd17, CH_L = 5'd18,
                         CH_R = 5'd19, CH_P = 5'd20, CH_DASH = 5'd21,
                         CH_BLANK = 5'd31;

  err_rec_t         snap;
  logic             running;
  logic             dark;
  logic [5:0]       slot;
  logic [31:0]      cnt;
  logic [4:0]       codes [NSLOT];

  // Character of every slot of a pass.
  always_comb begin
    logic [31:0] e;
    logic [51:0] c;
    logic [15:0] a;
    e = snap.err_count;
    c = 52'(snap.cyc_count);
    a = 16'(snap.addr);
    codes[0] = CH_N;
    for (int i = 0; i < 8; i++)  codes[1 + i]  = {1'b0, e[4*(7 - i) +: 4]};
    codes[9] = CH_C;
    for (int i = 0; i < 13; i++) codes[10 + i] = {1'b0, c[4*(12 - i) +: 4]};
    codes[23] = CH_L;
    for (int i = 0; i < 4; i++)  codes[24 + i] = {1'b0, a[4*(3 - i) +: 4]};
    codes[28] = CH_R;
    codes[29] = {1'b0, snap.rdata[7:4]};
    codes[30] = {1'b0, snap.rdata[3:0]};
    codes[31] = CH_P;
    codes[32] = {1'b0, snap.part};
  end

  always_comb begin
    if (!running)  char_code = CH_DASH;
    else if (dark) char_code = CH_BLANK;
    else           char_code = codes[slot];
  end

  logic [6:0] seg_hi;
  seg7_decoder u_dec (.code(char_code), .seg(seg_hi));
  assign seg = SEG_ACTIVE_LOW ? ~seg_hi : seg_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      snap      <= '0;
      running   <= 1'b0;
      dark      <= 1'b0;
      slot      <= '0;
      cnt       <= '0;
      pass_done <= 1'b0;
    end else begin
      pass_done <= 1'b0;
      if (!running) begin
        if (rec_valid) begin
          running <= 1'b1;
          snap    <= rec;
          slot    <= '0;
          dark    <= 1'b0;
          cnt     <= DWELL - 1;
        end
      end else if (cnt != 0) begin
        cnt <= cnt - 1;
      end else if (!dark) begin
        dark <= 1'b1;
        cnt  <= (GAP > 0) ? GAP - 1 : 0;
      end else begin
        dark <= 1'b0;
        cnt  <= DWELL - 1;
        if (slot == 6'(NSLOT - 1)) begin
          slot      <= '0;
          pass_done <= 1'b1;
          if (rec_valid) snap <= rec;
          else           running <= 1'b0;
        end else begin
          slot <= slot + 6'd1;
        end
      end
    end
  end

endmodule
