// MATS+ reliability test sequencer.
//
// Runs the MATS+ march test over every address from 0 to last_addr:
//   element 1  UP  (W01010101)
//   element 2  UP  (R; W10101010)
//   element 3  DOWN(R; W01010101)
//   then back to element 2, for as long as run stays high.
// Each read is compared with the pattern the previous element left behind
// (01010101 in element 2, 10101010 in element 3). The march itself, the two
// patterns and the loop back to element 2 are the test as described for this
// tester; the handshake and the event record are this design's own.
//
// Interface: one access at a time. cmd is held with cmd_valid until the memory
// port takes it (cmd_valid && cmd_ready); the sequencer then waits for
// rsp_valid, which carries rsp_rdata for a read and simply marks completion of
// a write. One cycle after each response ev_valid pulses with a test_event_t
// describing the access (address, data read, test part, mismatch flag).
// loop_done pulses when element 3 finishes at address 0.
//
// Control: run is a level. A rising run starts at element 1, address 0.
// When run falls the current access is completed and the sequencer idles.
// last_addr is sampled at the start of a run.
module mats_plus_seq
  import nvm_tester_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  addr_t       last_addr,
  // memory port
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output mem_cmd_t    cmd,
  input  logic        rsp_valid,
  input  data_t       rsp_rdata,
  // results
  output logic        ev_valid,
  output test_event_t ev,
  output part_t       part,
  output logic        busy,
  output logic        loop_done
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;

  state_t state;
  part_t  elem;      // PART_M1, PART_M2 or PART_M3
  logic   op_wr;     // in elements 2 and 3: 0 = read step, 1 = write step
  addr_t  addr;
  addr_t  last_q;

  logic  cur_we;
  data_t cur_wdata, cur_exp;

  always_comb begin
    cur_we    = (elem == PART_M1) || op_wr;
    cur_wdata = (elem == PART_M2) ? PAT_B : PAT_A;
    cur_exp   = (elem == PART_M2) ? PAT_A : PAT_B;
  end

  assign cmd_valid = (state == S_ISSUE);
  assign cmd       = '{we: cur_we, addr: addr, wdata: cur_wdata};
  assign part      = elem;
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      elem      <= PART_M1;
      op_wr     <= 1'b0;
      addr      <= '0;
      last_q    <= '0;
      ev_valid  <= 1'b0;
      ev        <= '0;
      loop_done <= 1'b0;
    end else begin
      ev_valid  <= 1'b0;
      loop_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (run) begin
            state  <= S_ISSUE;
            elem   <= PART_M1;
            op_wr  <= 1'b0;
            addr   <= '0;
            last_q <= last_addr;
          end
        end
        S_ISSUE: if (cmd_ready) state <= S_WAIT;
        S_WAIT: begin
          if (rsp_valid) begin
            ev_valid   <= 1'b1;
            ev.is_read <= !cur_we;
            ev.err     <= !cur_we && (rsp_rdata != cur_exp);
            ev.addr    <= addr;
            ev.rdata   <= cur_we ? '0 : rsp_rdata;
            ev.part    <= elem;
            state      <= run ? S_ISSUE : S_IDLE;
            // advance to the next access of the march
            unique case (elem)
              PART_M1: begin
                if (addr == last_q) begin
                  elem <= PART_M2;
                  addr <= '0;
                end else begin
                  addr <= addr + 1'b1;
                end
                op_wr <= 1'b0;
              end
              PART_M2: begin
                if (!op_wr) begin
                  op_wr <= 1'b1;
                end else begin
                  op_wr <= 1'b0;
                  if (addr == last_q) elem <= PART_M3;  // element 3 starts at the top
                  else                addr <= addr + 1'b1;
                end
              end
              default: begin  // PART_M3
                if (!op_wr) begin
                  op_wr <= 1'b1;
                end else begin
                  op_wr <= 1'b0;
                  if (addr == '0) begin
                    elem      <= PART_M2;  // loop back to element 2
                    loop_done <= 1'b1;
                  end else begin
                    addr <= addr - 1'b1;
                  end
                end
              end
            endcase
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A command must stay stable while it waits to be taken.
  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));

endmodule
