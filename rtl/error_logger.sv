// Error logger.
//
// Counts every completed memory access (each read and each write is one
// read/write cycle) and every read that returned the wrong data. On an error
// it captures, as the test description lists: the total number of errors so
// far, the number of read/write cycles done at that point, the address, the
// incorrect data read and the part of the test the access belonged to. Only
// the most recent error is kept; the displays show that one.
//
// Counting single accesses as "cycles", the counter widths (50-bit cycle
// count, 32-bit error count, the error count saturating) and clearing on the
// start of a run are this design's choices.
//
// Timing: ev_valid/ev arrive from a sequencer. Counters and record update on
// the clock edge that samples ev_valid; rec_new pulses in the following cycle
// together with the new rec. clear (one cycle, e.g. at the start of a run)
// zeroes the counters and forgets the record; it wins over a coincident event.
module error_logger
  import nvm_tester_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             ev_valid,
  input  test_event_t      ev,
  output logic [CYC_W-1:0] cyc_count,
  output logic [ERR_W-1:0] err_count,
  output err_rec_t         rec,
  output logic             rec_valid,
  output logic             rec_new
);

  logic [CYC_W-1:0] cyc_next;
  logic [ERR_W-1:0] err_next;

  always_comb begin
    cyc_next = cyc_count + 1'b1;
    err_next = (&err_count) ? err_count : err_count + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_count <= '0;
      err_count <= '0;
      rec       <= '0;
      rec_valid <= 1'b0;
      rec_new   <= 1'b0;
    end else begin
      rec_new <= 1'b0;
      if (clear) begin
        cyc_count <= '0;
        err_count <= '0;
        rec       <= '0;
        rec_valid <= 1'b0;
      end else if (ev_valid) begin
        cyc_count <= cyc_next;
        if (ev.err) begin
          err_count     <= err_next;
          rec.err_count <= err_next;
          rec.cyc_count <= cyc_next;
          rec.addr      <= ev.addr;
          rec.rdata     <= ev.rdata;
          rec.part      <= ev.part;
          rec_valid     <= 1'b1;
          rec_new       <= 1'b1;
        end
      end
    end
  end

  // Only reads can miscompare.
  a_err_on_read: assert property (@(posedge clk) disable iff (!rst_n)
    ev_valid && ev.err |-> ev.is_read);

endmodule
