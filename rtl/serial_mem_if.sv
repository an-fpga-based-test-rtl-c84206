// Serial (two-wire) memory port.
//
// Drives a 4 kbit two-wire serial FRAM of the FM24C04 kind: 512 bytes, the
// ninth address bit carried in the device select byte {1010, A2, A1, a8, R/W}.
// The test-bed description names only the part; the bus protocol below is the
// standard two-wire (I2C) one that such parts use, and the transfers chosen
// are the simplest that serve the tester:
//   write: START, select+W, addr[7:0], data, STOP
//   read : START, select+W, addr[7:0], repeated START, select+R, data+NACK, STOP
// A FRAM has no internal write time, so a write completes with its STOP.
//
// Bit timing: every bit (and each START/STOP) takes four quarter periods of
// QDIV clock cycles. SDA changes only while SCL is low; SDA is sampled at the
// end of the second high quarter. With the default QDIV = 25 and a 10 MHz
// clock SCL runs at 100 kHz. A write takes 29 and a read 39 bit times.
// Both lines are open drain: *_oe = 1 pulls the line low, 0 releases it.
// sda_i is synchronised inside. The slave's acknowledge bits are checked;
// a missing one sets the sticky nack_err flag but the transfer still runs to
// its end, so the test carries on and the read data is reported as read.
//
// Command side is that of parallel_mem_if: cmd_ready in IDLE, rsp_valid pulses
// once per finished access, rsp_rdata valid for reads. cmd.addr[8:0] is used.
module serial_mem_if
  import nvm_tester_pkg::*;
#(
  parameter int unsigned QDIV    = 25,
  parameter logic [1:0]  DEV_A21 = 2'b00   // levels on the A2, A1 pins
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cmd_valid,
  output logic     cmd_ready,
  input  mem_cmd_t cmd,
  output logic     rsp_valid,
  output data_t    rsp_rdata,
  output logic     nack_err,
  // bus pins
  output logic     scl_oe,
  output logic     sda_oe,
  input  logic     sda_i
);

  typedef enum logic [1:0] {T_START, T_TX, T_RX, T_STOP} tok_t;

  logic        active;
  logic        we_q;
  logic [8:0]  addr_q;
  data_t       wdata_q;
  logic [2:0]  step;       // index of the token in the transfer
  logic [3:0]  bitn;       // 0..7 data bits, 8 acknowledge
  logic [1:0]  phase;      // quarter of the current bit
  logic [31:0] qcnt;
  data_t       rx_sh;
  logic        scl_r, sda_r;          // line levels driven (1 = released)
  logic        sda_s1, sda_s2;

  tok_t  tok;
  data_t tx_byte;
  logic  last_step;

  // The token list of a transfer.
  always_comb begin
    tok       = T_STOP;
    tx_byte   = '0;
    last_step = 1'b0;
    if (we_q) begin
      unique case (step)
        3'd0: tok = T_START;
        3'd1: begin tok = T_TX; tx_byte = {4'b1010, DEV_A21, addr_q[8], 1'b0}; end
        3'd2: begin tok = T_TX; tx_byte = addr_q[7:0]; end
        3'd3: begin tok = T_TX; tx_byte = wdata_q; end
        default: begin tok = T_STOP; last_step = 1'b1; end
      endcase
    end else begin
      unique case (step)
        3'd0: tok = T_START;
        3'd1: begin tok = T_TX; tx_byte = {4'b1010, DEV_A21, addr_q[8], 1'b0}; end
        3'd2: begin tok = T_TX; tx_byte = addr_q[7:0]; end
        3'd3: tok = T_START;
        3'd4: begin tok = T_TX; tx_byte = {4'b1010, DEV_A21, addr_q[8], 1'b1}; end
        3'd5: tok = T_RX;
        default: begin tok = T_STOP; last_step = 1'b1; end
      endcase
    end
  end

  // Line levels wanted in the current quarter.
  logic scl_d, sda_d;
  always_comb begin
    scl_d = 1'b1;
    sda_d = 1'b1;
    if (active) begin
      unique case (tok)
        T_START: begin
          scl_d = (phase == 2'd0) ? scl_r : (phase != 2'd3);
          sda_d = (phase < 2'd2);
        end
        T_STOP: begin
          scl_d = (phase != 2'd0);
          sda_d = (phase >= 2'd2);
        end
        T_TX: begin
          scl_d = (phase == 2'd1) || (phase == 2'd2);
          sda_d = (bitn == 4'd8) ? 1'b1 : tx_byte[3'd7 - bitn[2:0]];
        end
        default: begin  // T_RX: release for data, NACK (high) on the last byte
          scl_d = (phase == 2'd1) || (phase == 2'd2);
          sda_d = 1'b1;
        end
      endcase
    end
  end

  assign cmd_ready = !active;
  assign scl_oe    = !scl_r;
  assign sda_oe    = !sda_r;

  logic q_end;
  assign q_end = (qcnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      we_q      <= 1'b0;
      addr_q    <= '0;
      wdata_q   <= '0;
      step      <= '0;
      bitn      <= '0;
      phase     <= '0;
      qcnt      <= '0;
      rx_sh     <= '0;
      scl_r     <= 1'b1;
      sda_r     <= 1'b1;
      sda_s1    <= 1'b1;
      sda_s2    <= 1'b1;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      nack_err  <= 1'b0;
    end else begin
      sda_s1    <= sda_i;
      sda_s2    <= sda_s1;
      rsp_valid <= 1'b0;
      scl_r     <= scl_d;
      sda_r     <= sda_d;
      if (!active) begin
        if (cmd_valid) begin
          active  <= 1'b1;
          we_q    <= cmd.we;
          addr_q  <= cmd.addr[8:0];
          wdata_q <= cmd.wdata;
          step    <= '0;
          bitn    <= '0;
          phase   <= '0;
          qcnt    <= QDIV - 1;
        end
      end else if (!q_end) begin
        qcnt <= qcnt - 1;
      end else begin
        qcnt  <= QDIV - 1;
        phase <= phase + 2'd1;
        // sample at the end of the second high quarter
        if (phase == 2'd2 && (tok == T_TX || tok == T_RX)) begin
          if (tok == T_TX && bitn == 4'd8 && sda_s2) nack_err <= 1'b1;
          if (tok == T_RX && bitn < 4'd8) rx_sh <= {rx_sh[6:0], sda_s2};
        end
        if (phase == 2'd3) begin
          if ((tok == T_TX || tok == T_RX) && bitn != 4'd8) begin
            bitn <= bitn + 4'd1;
          end else begin
            bitn <= '0;
            if (last_step) begin
              active    <= 1'b0;
              rsp_valid <= 1'b1;
              rsp_rdata <= rx_sh;
            end else begin
              step <= step + 3'd1;
            end
          end
        end
      end
    end
  end

endmodule
