// Control-switch conditioner.
//
// The tester is set up with a few board switches (run, test select, memory
// select). Mechanical switches bounce and are asynchronous to the clock, so
// the raw levels pass a two-flop synchroniser and then a debouncer: the
// output vector takes the synchronised value only after that value has held
// unchanged for DEBOUNCE consecutive cycles (default 100_000, 10 ms at an
// assumed 10 MHz clock). The switches themselves appear on the test board;
// the conditioning is this design's own.
//
// Timing: a clean change of sw_raw reaches sw 2 + DEBOUNCE cycles later (one
// more for the output register). sw resets to all zeros.
module switch_sync #(
  parameter int unsigned N        = 3,
  parameter int unsigned DEBOUNCE = 100_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] sw_raw,
  output logic [N-1:0] sw
);

  logic [N-1:0] s1, s2, last;
  logic [31:0]  stable_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1         <= '0;
      s2         <= '0;
      last       <= '0;
      stable_cnt <= '0;
      sw         <= '0;
    end else begin
      s1   <= sw_raw;
      s2   <= s1;
      last <= s2;
      if (s2 != last) begin
        stable_cnt <= '0;
      end else if (stable_cnt < DEBOUNCE) begin
        stable_cnt <= stable_cnt + 1;
      end else begin
        sw <= last;
      end
    end
  end

endmodule
