// Behavioural model of a byte-wide asynchronous parallel memory (an FRAM or
// EEPROM with active-low CE, OE and WE), for simulation only.
//
// The address is latched on the falling edge of CE, as an FRAM does. A write
// happens when CE and WE are both low and ends (data taken) when either rises.
// While CE and OE are low the latched word drives dq_i; otherwise dq_i floats,
// seen here as 8'hFF. A fault can be injected: reads of fault_addr return the
// stored word XOR fault_xor while fault_en is high. proto_err counts address
// changes while CE is low and writes without the data bus driven.
// WR_BUSY_NS > 0 models an EEPROM's internal write: for that long after a
// write the part is busy and answers reads with its status instead of data,
// as EEPROMs do: bit 7 is the complement of bit 7 of the byte being written,
// bit 6 toggles on every such read, bits 5-0 are the written byte's. Writes
// while busy are ignored. early_acc counts accesses made while busy.
module tb_async_mem_model #(
  parameter int  AW         = 15,
  parameter int  WORDS      = 1 << AW,
  parameter real WR_BUSY_NS = 0.0
) (
  input  logic [AW-1:0] addr,
  input  logic [7:0]    dq_o,
  input  logic          dq_oe,
  output logic [7:0]    dq_i,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic          fault_en,
  input  logic [AW-1:0] fault_addr,
  input  logic [7:0]    fault_xor
);

  logic [7:0]    mem [WORDS];
  logic [AW-1:0] a_lat = '0;
  int            writes = 0, reads = 0, proto_err = 0, early_acc = 0;
  realtime       busy_until = 0;
  logic [7:0]    last_wr = '0;
  logic          wr_active;
  logic          toggle = 1'b0;

  initial for (int i = 0; i < WORDS; i++) mem[i] = 8'h00;

  assign wr_active = !ce_n && !we_n;

  always @(negedge ce_n) a_lat = addr;
  always @(addr) if (!ce_n) proto_err++;
  always @(negedge oe_n) if (!ce_n) begin
    reads++;
    if ($realtime < busy_until) begin
      early_acc++;
      toggle = !toggle;
    end
  end

  always @(negedge wr_active) begin
    if (!dq_oe) proto_err++;
    if ($realtime < busy_until) begin
      early_acc++;
    end else begin
      mem[a_lat] = dq_o;
      last_wr    = dq_o;
      busy_until = $realtime + WR_BUSY_NS;
    end
    writes++;
  end

  always @* begin
    if (!ce_n && !oe_n)
      dq_i = ($realtime < busy_until) ? {~last_wr[7], toggle, last_wr[5:0]}
           : mem[a_lat] ^ ((fault_en && a_lat == fault_addr) ? fault_xor : 8'h00);
    else
      dq_i = 8'hFF;
  end

endmodule
