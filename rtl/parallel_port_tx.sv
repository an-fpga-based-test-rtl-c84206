// Parallel-port error reporter.
//
// Sends each new error record to a PC over the parallel port so that a simple
// logging program can show it and save it to a file. A record goes out as a
// 16-byte frame, most significant byte first within each field:
//   byte 0      0xA5 frame marker
//   bytes 1-4   total error count (32 bits)
//   bytes 5-11  read/write cycle count (50 bits, zero-extended to 56)
//   bytes 12-13 address (15 bits, zero-extended)
//   byte 14     data read
//   byte 15     test part (low nibble; see nvm_tester_pkg::part_t)
// That the PC receives the error data over the parallel port follows the
// test-bed description; the frame layout and the handshake are this design's.
//
// Handshake, per byte, four-phase: pp_data is set, one cycle later pp_stb
// rises; the PC answers by raising pp_ack; pp_stb falls; the PC lowers
// pp_ack; then the next byte. pp_ack is synchronised inside (two flops), so
// each edge of it is seen two or three cycles later.
// rec must hold the most recent record from rec_new on (error_logger keeps
// it). A record that arrives while a frame is being sent is remembered by a
// flag only, and whatever rec holds when the current frame ends is sent next:
// several errors during one frame yield one more frame, with the latest.
// busy is high while a frame is in progress; frame_done pulses after its last
// byte is acknowledged.
module parallel_port_tx
  import nvm_tester_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     rec_new,
  input  err_rec_t rec,
  output data_t    pp_data,
  output logic     pp_stb,
  input  logic     pp_ack,
  output logic     busy,
  output logic     frame_done
);

  localparam int NBYTES = 16;

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_STB, S_REL} state_t;

  state_t               state;
  logic [NBYTES*8-1:0]  frame;
  logic [3:0]           idx;
  logic                 pend;
  logic                 ack_s1, ack_s2;

  function automatic logic [NBYTES*8-1:0] pack_frame(err_rec_t r);
    return {8'hA5, r.err_count, {(56 - CYC_W){1'b0}}, r.cyc_count,
            {(16 - ADDR_W){1'b0}}, r.addr, r.rdata, 4'h0, r.part};
  endfunction

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      frame      <= '0;
      idx        <= '0;
      pend       <= 1'b0;
      ack_s1     <= 1'b0;
      ack_s2     <= 1'b0;
      pp_data    <= '0;
      pp_stb     <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      ack_s1     <= pp_ack;
      ack_s2     <= ack_s1;
      frame_done <= 1'b0;
      if (rec_new) pend <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (pend) begin
            frame   <= pack_frame(rec);
            pp_data <= 8'hA5;
            idx     <= '0;
            state   <= S_SETUP;
            if (!rec_new) pend <= 1'b0;
          end
        end
        S_SETUP: begin
          pp_stb <= 1'b1;
          state  <= S_STB;
        end
        S_STB: begin
          if (ack_s2) begin
            pp_stb <= 1'b0;
            state  <= S_REL;
          end
        end
        S_REL: begin
          if (!ack_s2) begin
            if (idx == 4'(NBYTES - 1)) begin
              state      <= S_IDLE;
              frame_done <= 1'b1;
            end else begin
              idx     <= idx + 4'd1;
              pp_data <= frame[(NBYTES - 2 - int'(idx)) * 8 +: 8];
              state   <= S_SETUP;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
