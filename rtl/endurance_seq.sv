// Endurance test sequencer.
//
// Repeats the basic endurance loop
//   (W01010101; R; W10101010; R)  loop back
// at one address or a small range of addresses, range_lo..range_hi, for as
// long as run stays high. Running on a single address or a short range, not
// the whole memory, follows the test description (exhausting every address
// would take prohibitively long). Within a range, the four accesses are done
// at one address, then at the next, wrapping from range_hi back to range_lo;
// that order is this design's choice.
//
// Each read is compared with the pattern just written. Reads after the
// 01010101 write are tagged PART_E_RD1, reads after the 10101010 write
// PART_E_RD2.
//
// Interface and timing are those of mats_plus_seq: cmd/cmd_valid/cmd_ready to
// the memory port, rsp_valid/rsp_rdata back, ev_valid/ev one cycle after each
// response. loop_done pulses when the last address of the range has finished
// its four accesses. range_lo/range_hi are sampled when run rises; a range
// with range_hi < range_lo is treated as the single address range_lo.
module endurance_seq
  import nvm_tester_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  addr_t       range_lo,
  input  addr_t       range_hi,
  // memory port
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output mem_cmd_t    cmd,
  input  logic        rsp_valid,
  input  data_t       rsp_rdata,
  // results
  output logic        ev_valid,
  output test_event_t ev,
  output logic        busy,
  output logic        loop_done
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;

  state_t     state;
  logic [1:0] step;    // 0: W01010101, 1: R, 2: W10101010, 3: R
  addr_t      addr, lo_q, hi_q;

  logic  cur_we;
  data_t cur_pat;

  always_comb begin
    cur_we  = !step[0];
    cur_pat = step[1] ? PAT_B : PAT_A;   // data written, and expected on the read after it
  end

  assign cmd_valid = (state == S_ISSUE);
  assign cmd       = '{we: cur_we, addr: addr, wdata: cur_pat};
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      step      <= '0;
      addr      <= '0;
      lo_q      <= '0;
      hi_q      <= '0;
      ev_valid  <= 1'b0;
      ev        <= '0;
      loop_done <= 1'b0;
    end else begin
      ev_valid  <= 1'b0;
      loop_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (run) begin
            state <= S_ISSUE;
            step  <= '0;
            addr  <= range_lo;
            lo_q  <= range_lo;
            hi_q  <= (range_hi < range_lo) ? range_lo : range_hi;
          end
        end
        S_ISSUE: if (cmd_ready) state <= S_WAIT;
        S_WAIT: begin
          if (rsp_valid) begin
            ev_valid   <= 1'b1;
            ev.is_read <= !cur_we;
            ev.err     <= !cur_we && (rsp_rdata != cur_pat);
            ev.addr    <= addr;
            ev.rdata   <= cur_we ? '0 : rsp_rdata;
            ev.part    <= step[1] ? PART_E_RD2 : PART_E_RD1;
            state      <= run ? S_ISSUE : S_IDLE;
            step       <= step + 2'd1;
            if (step == 2'd3) begin
              if (addr == hi_q) begin
                addr      <= lo_q;
                loop_done <= 1'b1;
              end else begin
                addr <= addr + 1'b1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));

endmodule
