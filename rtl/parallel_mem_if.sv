// Parallel memory port.
//
// Drives an asynchronous byte-wide memory with active-low chip enable, output
// enable and write enable, such as the 32K x 8 parallel FRAM and the 256 kb
// parallel EEPROM the tester was built for. Each access has four phases:
//   SETUP    address (and write data) on the bus, CE high     1 cycle
//   ACTIVE   CE low, and OE low (read) or WE low (write)      T_ACT cycles
//   PRECHG   CE high; write data held for hold time           T_PRE cycles
//   WR_WAIT  writes only: internal write time of an EEPROM    T_WR cycles
// The read data is sampled on the clock edge that ends ACTIVE. CE returns high
// after every access, which gives an FRAM its precharge time and makes the
// part latch a new address on the next falling CE.
//
// Only the memories' names come from the test-bed description; the bus
// protocol and all timing parameters are this design's, chosen from the usual
// behaviour of such parts. Defaults assume a 10 MHz clock (100 ns cycle):
// 200 ns active, 100 ns precharge, no write wait (FRAM). For an EEPROM set T_WR
// to its write cycle time, e.g. 100_000 cycles for 10 ms.
//
// Command side: cmd_ready is high in IDLE; a command is taken on
// cmd_valid && cmd_ready. rsp_valid pulses for one cycle when the access is
// finished, with rsp_rdata valid for a read. rsp_valid rises 1 + T_ACT + T_PRE
// (+ T_WR for writes) clock edges after the edge that takes the command. With
// a sequencer that reissues one cycle after a response, accesses start every
// 3 + T_ACT + T_PRE cycles: 6 cycles, 600 ns, at the defaults.
module parallel_mem_if
  import nvm_tester_pkg::*;
#(
  parameter int unsigned T_ACT = 2,
  parameter int unsigned T_PRE = 1,
  parameter int unsigned T_WR  = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cmd_valid,
  output logic     cmd_ready,
  input  mem_cmd_t cmd,
  output logic     rsp_valid,
  output data_t    rsp_rdata,
  // memory pins
  output addr_t    mem_addr,
  output data_t    mem_dq_o,
  output logic     mem_dq_oe,
  input  data_t    mem_dq_i,
  output logic     mem_ce_n,
  output logic     mem_oe_n,
  output logic     mem_we_n
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_ACT, S_PRE, S_WWAIT} state_t;

  state_t      state;
  logic        we_q;
  logic [31:0] cnt;

  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      we_q      <= 1'b0;
      cnt       <= '0;
      mem_addr  <= '0;
      mem_dq_o  <= '0;
      mem_dq_oe <= 1'b0;
      mem_ce_n  <= 1'b1;
      mem_oe_n  <= 1'b1;
      mem_we_n  <= 1'b1;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_valid) begin
            state     <= S_SETUP;
            we_q      <= cmd.we;
            mem_addr  <= cmd.addr;
            mem_dq_o  <= cmd.wdata;
            mem_dq_oe <= cmd.we;
          end
        end
        S_SETUP: begin
          state    <= S_ACT;
          cnt      <= (T_ACT > 0) ? T_ACT - 1 : 0;
          mem_ce_n <= 1'b0;
          mem_oe_n <= we_q;
          mem_we_n <= !we_q;
        end
        S_ACT: begin
          if (cnt == 0) begin
            if (!we_q) rsp_rdata <= mem_dq_i;
            mem_ce_n <= 1'b1;
            mem_oe_n <= 1'b1;
            mem_we_n <= 1'b1;
            state    <= S_PRE;
            cnt      <= (T_PRE > 0) ? T_PRE - 1 : 0;
          end else begin
            cnt <= cnt - 1;
          end
        end
        S_PRE: begin
          if (cnt == 0) begin
            mem_dq_oe <= 1'b0;
            if (we_q && T_WR > 0) begin
              state <= S_WWAIT;
              cnt   <= T_WR - 1;
            end else begin
              state     <= S_IDLE;
              rsp_valid <= 1'b1;
            end
          end else begin
            cnt <= cnt - 1;
          end
        end
        S_WWAIT: begin
          if (cnt == 0) begin
            state     <= S_IDLE;
            rsp_valid <= 1'b1;
          end else begin
            cnt <= cnt - 1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Never read and write at once, and never drive the bus during a read.
  a_no_oe_we: assert property (@(posedge clk) disable iff (!rst_n) !(!mem_oe_n && !mem_we_n));
  a_no_drive_on_read: assert property (@(posedge clk) disable iff (!rst_n) !(!mem_oe_n && mem_dq_oe));

endmodule
