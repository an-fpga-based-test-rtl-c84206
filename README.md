# FPGA tester for non-volatile memory reliability and endurance

Non-volatile memories such as FRAM and EEPROM wear out. Every write, and in an
FRAM every read, stresses the storage cell, and a part is rated for a fixed
number of cycles (10^10 for a typical FRAM, 10^4 for some EEPROMs). Checking
such a rating takes weeks of nonstop access. This RTL is a small, cheap tester
that runs on one FPGA next to the memory under test. It does that job:

* it runs a **reliability test** (MATS+) over the whole memory, or an
  **endurance test** that hammers one address or a few addresses for as long
  as power stays on;
* it checks every byte read against the pattern that should be there;
* it counts every access and every error, and on each error records where and
  when it happened and what was read;
* it reports each error to a PC over a parallel port, and shows the latest
  one on a single 7-segment digit, so it can also run with no PC.

The design follows the FPGA test-bed described in *An FPGA-Based Test-bed for
Reliability and Endurance Characterization of Non-Volatile Memory*. That
description gives the two test algorithms, the data patterns, what is logged
per error, and the two ways of reporting. It also names the memories tested:
a Ramtron FM24C04 two-wire serial FRAM, a Ramtron FM1808 parallel FRAM and a
256 kb rad-hard parallel EEPROM. Everything below the level of "what the
tester does" is this design's own: the bus protocols, the timing, the frame
format, the display symbols and the control switches. The section
[Where the design is its own](#where-the-design-is-its-own) lists these
choices.

## The two tests

Both tests use the two complementary byte patterns `A = 01010101` (0x55) and
`B = 10101010` (0xAA). Writing them alternately flips every bit of a cell
each time.

### Reliability: MATS+ (`mats_plus_seq`)

MATS+ is a march test. Each *element* walks through the addresses in one
direction and does the same few operations at each address:

| element | direction | at each address | expects on read |
|---|---|---|---|
| 1 | up, 0 → last | write A | – |
| 2 | up, 0 → last | read, then write B | A |
| 3 | down, last → 0 | read, then write A | B |

After element 3 reaches address 0, the test goes back to element 2, not
element 1, and repeats 2 and 3 until it is stopped. Element 3 leaves A
everywhere, and element 2 expects exactly that. So every read has a single
right answer. Element 1 runs once per run, to put the memory in a known state.

MATS+ finds cells stuck at 0 or 1. It also finds address decoder faults,
where two addresses reach the same cell or an address reaches none. The
downward element is what catches those: a write of A at a lower address
overwrites the B that a faulty decoder stored there. This is the reason the
sequencer must really count down in element 3, not just repeat element 2.

One full loop (elements 2 and 3) over N bytes is 4N accesses. A complete first
pass, including element 1, is 5N accesses.

### Endurance (`endurance_seq`)

    write A; read (expect A); write B; read (expect B); repeat

Going through the whole memory this way would take far too long. Instead the
loop runs on the address range `end_lo..end_hi`, which may be a single
address. All four accesses are done at one address, then at the next, and
the range wraps from `end_hi` back to `end_lo`. If `end_hi < end_lo`, the
range is the single address `end_lo`.

### The part number

Each access carries a *part* tag, and the error record keeps it. The tag says
where in the test the failure happened:

| part | meaning |
|---|---|
| 1, 2, 3 | MATS+ element 1, 2 or 3 (only 2 and 3 read) |
| 4 | endurance read after writing A |
| 5 | endurance read after writing B |

## What is recorded on an error (`error_logger`)

Every finished access, read or write, counts as one **read/write cycle**. This
count measures the wear on the memory, in the same units as its endurance
rating. The counter is 50 bits wide (up to 1.1·10^15). A read whose data
differs from the expected pattern is an **error**. The test does not stop
there: it keeps going and keeps counting. For each error the logger captures
a record (`err_rec_t`):

| field | width | content |
|---|---|---|
| `err_count` | 32 | errors so far, this one included (saturates) |
| `cyc_count` | 50 | read/write cycles so far, this one included |
| `addr` | 15 | address of the failing read |
| `rdata` | 8 | the wrong byte that was read |
| `part` | 4 | part of the test, see above |

Only the most recent record is held. `rec_new` pulses once for each error.
Switching the tester on again (a new run) clears the counters and the record.

A worked example from the testbench: N = 16 bytes, and reads of address 5
come back with bit 0 flipped. The error in element 3 of the second loop is
read/write cycle N + 4N + 2N + 2(N−1−5) + 1 = 133. The logged byte is 0xAB,
and the part is 3.

## Memory ports

The sequencers never see pins. They issue one access at a time as a
`mem_cmd_t` (`we`, `addr`, `wdata`) with a valid/ready handshake. The port
answers with a one-cycle `rsp_valid`, which carries the read data for a read.
The sequencer compares the data, tags the access and sends a `test_event_t`
to the logger one cycle later. Both ports below have that interface, so
either sequencer can drive either memory.

### Parallel memory (`parallel_mem_if`)

This port is for byte-wide parts with active-low CE, OE and WE, such as the
32K × 8 FRAM and the 256 kb EEPROM. An access goes through four phases:

    SETUP   1 cycle       address (and write data) on the bus, CE high
    ACTIVE  T_ACT cycles  CE low; OE low for a read, WE low for a write
    PRECHG  T_PRE cycles  CE high, write data still driven (hold time)
    WR_WAIT T_WR cycles   writes only: the EEPROM's internal write time

Read data is sampled on the edge that ends ACTIVE. CE goes high after every
access. An FRAM needs this precharge, and it latches the next address on the
falling CE. The defaults assume a 10 MHz clock: T_ACT = 2 (200 ns),
T_PRE = 1, T_WR = 0. With the sequencer's one-cycle reissue, an access starts
every 3 + T_ACT + T_PRE = 6 cycles. At those settings a full first MATS+ pass
over 32K bytes takes 983,040 cycles, about 0.1 s. For an EEPROM, set T_WR to
its write cycle time (100,000 cycles for 10 ms). The port then waits that
long after every write. It does not poll the part for completion.

The data bus is split into `dq_o`, `dq_oe` and `dq_i`. The tristate pad
belongs outside, at the pins.

### Serial memory (`serial_mem_if`)

This port is for a two-wire (I2C-style) 512 × 8 FRAM such as the FM24C04.
Address bit 8 travels in the device-select byte `1010 A2 A1 a8 R/W`. It uses
two transfers:

    write: START, select+W, addr[7:0], data, STOP               29 bit times
    read : START, select+W, addr[7:0], START, select+R, data+NACK, STOP  39 bit times

Each bit takes four quarter periods of `QDIV` clocks. SDA changes only while
SCL is low, and it is sampled at the end of SCL high. With the default QDIV =
25 at 10 MHz, SCL runs at 100 kHz. Both lines are open drain: `*_oe = 1`
pulls the line low. If the memory fails to acknowledge a byte, the sticky
`nack_err` is set, but the transfer still completes so that the test carries
on. An FRAM has no write delay, so a write is finished at its STOP.

Throughput matters here. The endurance loop averages 34 bit times per access,
so at 100 kHz it does about 2,900 accesses per second. 10^10 cycles then take
about 39 days. At QDIV = 6 (about 420 kHz) the same count takes about 9 days.

## Reporting

### To a PC (`parallel_port_tx`)

Each new error record is sent as a 16-byte frame. Within each field, the most
significant byte comes first:

| bytes | content |
|---|---|
| 0 | 0xA5 frame marker |
| 1–4 | error count |
| 5–11 | read/write cycle count (50 bits, zero-extended) |
| 12–13 | address (zero-extended) |
| 14 | data read |
| 15 | part (low nibble) |

Each byte uses a four-phase handshake:

1. `pp_data` is set.
2. One cycle later, `pp_stb` goes high.
3. The PC raises `pp_ack`.
4. `pp_stb` goes low.
5. The PC drops `pp_ack`.

`pp_ack` is synchronised inside the tester. If more errors arrive while a
frame is being sent, exactly one more frame follows, carrying the latest
record. The errors in between show up only in its error count. At the high
error rates this can lose detail, but the count stays exact.

### On the LED (`led_scroller`, `seg7_decoder`)

One 7-segment digit steps through the latest record, one character at a time.
A symbol that looks like no hex digit introduces each field:

    n  8 hex digits   error count
    c  13 hex digits  read/write cycle count
    L  4 hex digits   address
    r  2 hex digits   data read
    P  1 hex digit    part

That makes 33 characters per pass. Each one is lit for `DWELL` cycles (0.5 s)
and followed by `GAP` dark cycles (0.1 s), so that two equal digits in a row
can be told apart. A pass takes about 20 s. The record is copied at the start
of a pass, so one pass never mixes two errors. Before any error the digit
shows a steady dash. `seg` is `{g,f,e,d,c,b,a}`, active high. Set
`SEG_ACTIVE_LOW` for a common-anode display.

## Operating it (`nvm_tester_top`, `switch_sync`)

The tester has three switches, each synchronised and debounced for 10 ms:

* `sw_test`: 0 = reliability (MATS+), 1 = endurance
* `sw_mem`: 0 = parallel port memory, 1 = serial memory
* `sw_run`: on starts a run, off stops it

Turning `sw_run` on does three things: it latches the test and memory
settings, clears the counters and starts the selected sequencer. Changing
`sw_test` or `sw_mem` during a run has no effect. Turning `sw_run` off lets
the access in flight finish, then the tester idles. A new run can start only
once no access is in flight. MATS+ covers `PAR_WORDS` bytes on the parallel
port and `SER_WORDS` on the serial one. The endurance range comes from
`end_lo`/`end_hi`.

Status outputs: `running`, `test_sel`, `mem_sel`, the live `cyc_count` and
`err_count`, the current MATS+ element `mats_part`, `pp_busy`, `loop_done`
(a pulse at each loop-back point) and `led_char` (the character shown).

## Files

| file | role |
|---|---|
| `rtl/nvm_tester_pkg.sv` | widths, patterns, `part_t`, `mem_cmd_t`, `test_event_t`, `err_rec_t` |
| `rtl/nvm_tester_top.sv` | top level: switches, sequencer and memory selection, reporting |
| `rtl/mats_plus_seq.sv` | MATS+ sequencer and read check |
| `rtl/endurance_seq.sv` | endurance sequencer and read check |
| `rtl/error_logger.sv` | cycle and error counters, latest error record |
| `rtl/parallel_mem_if.sv` | CE/OE/WE parallel memory port |
| `rtl/serial_mem_if.sv` | two-wire serial memory port |
| `rtl/parallel_port_tx.sv` | error frames to the PC |
| `rtl/led_scroller.sv`, `rtl/seg7_decoder.sv` | scrolling one-digit display |
| `rtl/switch_sync.sv` | switch synchroniser and debouncer |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_nvm_tester_top.sv` | end-to-end test at reduced sizes |
| `tb/tb_nvm_tester_full.sv` | end-to-end test with every parameter at its default |
| `tb/tb_workload_serial_fram.sv` | full MATS+ pass and endurance rate on the serial FRAM, defaults |
| `tb/tb_workload_eeprom.sv` | EEPROM write time: `T_WR` set versus left at 0 |
| `tb/tb_async_mem_model.sv`, `tb/tb_i2c_fram_model.sv`, `tb/tb_pc_port_model.sv` | behavioural memories (with fault injection and an optional EEPROM write time) and PC |

## Simulating

All testbenches are self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/nvm_tester_pkg.sv tb/tb_nvm_tester_top.sv --top-module tb_nvm_tester_top
    ./obj_dir/Vtb_nvm_tester_top

Substitute any other `tb_*` name. The testbenches to know:

* **`tb_nvm_tester_top`** drives the whole tester at small sizes. The memories
  are 16 and 8 bytes, the serial bit rate is high, and the debounce and display
  times are short. It uses the behavioural memories with one corrupted address
  each, and performs four runs:
  * MATS+ on the parallel memory
  * endurance on the parallel memory
  * MATS+ on the serial memory
  * endurance on the serial memory

  For each run it checks the error count and the decoded PC frame against
  values worked out by hand. It also counts how often each mechanism
  happened, and fails if any never did: either test, either memory, a change
  of test or memory between runs, the downward element, the loop back to
  element 2, the endurance wrap, errors, frames, and full LED passes.
* **`tb_nvm_tester_full`** uses every parameter at its default. It runs one
  complete MATS+ pass on a 32K × 8 parallel memory with one bad address, then
  checks:
  * the two errors
  * the access count (5 × 32768)
  * the access rate (one every 6 cycles)
  * the frame of the element-3 error

  It takes about a second.
* **`tb_workload_serial_fram`** also uses every default, on the 512 × 8 serial
  FRAM. It runs one full MATS+ pass with one bad address and checks the
  frame. It then measures one endurance loop: 13,608 cycles for four
  accesses, or 2,939 accesses per second at 10 MHz. At that rate 10^10
  cycles take 39 days. It takes about 7 seconds.
* **`tb_workload_eeprom`** runs two testers side by side on EEPROM models with
  a 2 µs write time, scaled down to keep the run short. During that time the
  model ignores writes and answers reads with status bits. With `T_WR = 20`
  (2 µs), no access reaches the busy part, only the injected fault is
  reported, and endurance runs clean to 10,000 read/write cycles (the
  endurance rating of a rad-hard EEPROM). With `T_WR = 0` the tester reaches the
  busy part and logs false errors on a good memory.

The unit testbenches also check timing. They check the parallel port latency
and CE width, and the serial transfer lengths, with no SDA change under high
SCL except START and STOP. They also check the debounce delay and the display
on and off times.

## Where the design is its own

The original description says what the tester does, not how its logic is
built. The following are choices made here:

* **One design for both memories and both reports.** The original builds a
  separate configuration for each memory and each reporting method. Here,
  both memory ports and both reporting paths are always present, and the
  memory is chosen by a switch.
* **What a "cycle" is.** Each read and each write counts as one read/write
  cycle. The logged cycle count could also be read as separate read and write
  counts. This design keeps one count.
* **The part tag on the endurance test.** The original reports the part only
  for the reliability test. Here the endurance reads are tagged 4 and 5 as
  well.
* **Sizes.** The 32K × 8 organisation of the 256 kb parallel parts and the
  512 × 8 serial part follow the usual data for such devices. The original
  states only the part names and "256 kb".
* **Everything at the pins.** The CE/OE/WE timing, the two-wire transfers, the
  100 kHz bit rate, the PC frame and handshake, the display symbols and times,
  the switch set and the 10 MHz clock are all assumptions.
* **EEPROM writes** wait a fixed `T_WR` and do not poll. T_WR defaults to 0,
  which suits FRAM.

## Limits

* The combined design synthesises, flattened, to 752 flip-flops and about 1,160
  four-input lookup tables (yosys, generic mapping). The 10,000-gate FPGA the
  original used has 800 flip-flops and 800 four-input function generators,
  so this combined design does not fit it. Building one memory port and one
  report path, as the original did, would be much smaller. This has not been
  synthesised for that device.
* The PC receives at most one queued frame behind the current one. Some
  intermediate error records can be skipped, but the error count is never
  wrong.
* Serial page-mode transfers and EEPROM page writes are not used. Each access
  is a single byte.
* The PC logging program, the FPGA configuration PROM and the memory chips
  are outside this RTL. Only behavioural stand-ins for the memories and the
  PC handshake exist, in `tb/`.
