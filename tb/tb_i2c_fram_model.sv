// Behavioural model of a 4 kbit (512 x 8) two-wire serial FRAM, for
// simulation only.
//
// Responds to the device select byte {1010, A2, A1, a8, R/W}. After a select
// with R/W = 0 the next byte sets the word pointer (low 8 bits; a8 from the
// select byte) and further bytes are written, the pointer incrementing. After
// a select with R/W = 1 it sends the byte at the pointer, MSB first, and goes
// on with the next one while the master acknowledges. START and STOP are
// recognised at any time. The model drives SDA on falling SCL edges only.
// Faults: reads of fault_addr return the word XOR fault_xor while fault_en.
// starts/stops/writes/reads count bus events for the testbenches.
module tb_i2c_fram_model #(
  parameter logic [1:0] A21 = 2'b00
) (
  input  logic       scl,
  input  logic       sda,
  output logic       sda_oe,
  input  logic       fault_en,
  input  logic [8:0] fault_addr,
  input  logic [7:0] fault_xor
);

  typedef enum {IDLE, DEV, WADDR, WDATA, RDATA} st_t;

  logic [7:0] mem [512];
  st_t        st = IDLE;
  int         bitc = 0;
  logic       ack_phase = 1'b0, rd_first = 1'b0, master_nack = 1'b0;
  logic [7:0] sh = '0, rbyte = '0;
  logic [8:0] ptr = '0;
  int         starts = 0, stops = 0, writes = 0, reads = 0;

  initial begin
    sda_oe = 1'b0;
    for (int i = 0; i < 512; i++) mem[i] = 8'h00;
  end

  function automatic logic [7:0] rd_word(logic [8:0] p);
    return mem[p] ^ ((fault_en && p == fault_addr) ? fault_xor : 8'h00);
  endfunction

  always @(negedge sda) if (scl) begin
    st = DEV; bitc = 0; ack_phase = 1'b0; sda_oe = 1'b0; starts++;
  end

  always @(posedge sda) if (scl) begin
    st = IDLE; sda_oe = 1'b0; stops++;
  end

  always @(posedge scl) begin
    if (st != IDLE) begin
      if (ack_phase) begin
        if (st == RDATA) master_nack = sda;
      end else begin
        if (st != RDATA) sh = {sh[6:0], sda};
        bitc++;
      end
    end
  end

  always @(negedge scl) begin
    if (st != IDLE) begin
      if (ack_phase) begin
        ack_phase = 1'b0;
        bitc      = 0;
        sda_oe    = 1'b0;
        if (st == RDATA) begin
          if (!rd_first) begin
            if (master_nack) st = IDLE;
            else ptr = ptr + 1'b1;
          end
          rd_first = 1'b0;
          if (st == RDATA) begin
            rbyte  = rd_word(ptr);
            reads++;
            sda_oe = !rbyte[7];
          end
        end
      end else if (bitc == 8) begin
        ack_phase = 1'b1;
        unique case (st)
          DEV: begin
            if (sh[7:4] == 4'b1010 && sh[3:2] == A21) begin
              ptr[8] = sh[1];
              sda_oe = 1'b1;
              if (sh[0]) begin st = RDATA; rd_first = 1'b1; end
              else       st = WADDR;
            end else begin
              st = IDLE; ack_phase = 1'b0;
            end
          end
          WADDR: begin ptr[7:0] = sh; sda_oe = 1'b1; st = WDATA; end
          WDATA: begin mem[ptr] = sh; ptr = ptr + 1'b1; writes++; sda_oe = 1'b1; end
          default: sda_oe = 1'b0;   // RDATA: master acknowledges
        endcase
      end else if (st == RDATA) begin
        sda_oe = !rbyte[7 - bitc];
      end
    end
  end

endmodule
