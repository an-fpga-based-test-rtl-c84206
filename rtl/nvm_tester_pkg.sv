// Shared types and constants of the non-volatile memory tester.
//
// The tester runs two March-style tests on an 8-bit wide memory: the MATS+
// reliability test and a short write/read endurance loop. Both use the two
// complementary patterns 01010101 and 10101010, as the test description
// prescribes. Everything else in this package (address width, counter widths,
// the numbering of the test parts) is this design's own choice, sized so that
// the largest memory tested (32K x 8) and the longest endurance run discussed
// (10^15 cycles) fit.
package nvm_tester_pkg;

  localparam int DATA_W = 8;   // all memories under test are byte wide
  localparam int ADDR_W = 15;  // 32K x 8 covers the 256 kb parallel parts
  localparam int CYC_W  = 50;  // read/write cycle counter, 2^50 > 10^15
  localparam int ERR_W  = 32;  // total error counter

  localparam logic [DATA_W-1:0] PAT_A = 8'b0101_0101;
  localparam logic [DATA_W-1:0] PAT_B = 8'b1010_1010;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // Which test, selected by a control switch.
  typedef enum logic {
    TEST_RELIABILITY = 1'b0,
    TEST_ENDURANCE   = 1'b1
  } test_t;

  // Which memory port is under test, selected by a control switch.
  typedef enum logic {
    MEM_PARALLEL = 1'b0,
    MEM_SERIAL   = 1'b1
  } mem_sel_t;

  // Part of the test in which an access happened. The numbers 1..3 are the
  // MATS+ march elements; 4 and 5 are the two reads of the endurance loop.
  typedef enum logic [3:0] {
    PART_NONE  = 4'd0,
    PART_M1    = 4'd1,  // UP(W01010101)
    PART_M2    = 4'd2,  // UP(R; W10101010)
    PART_M3    = 4'd3,  // DOWN(R; W01010101)
    PART_E_RD1 = 4'd4,  // endurance read after W01010101
    PART_E_RD2 = 4'd5   // endurance read after W10101010
  } part_t;

  // One memory access, sequencer to memory port.
  typedef struct packed {
    logic  we;
    addr_t addr;
    data_t wdata;
  } mem_cmd_t;

  // One completed access, sequencer to error logger.
  typedef struct packed {
    logic  is_read;
    logic  err;       // read data differed from the expected pattern
    addr_t addr;
    data_t rdata;     // data read (reads only)
    part_t part;
  } test_event_t;

  // What is kept about the most recent error.
  typedef struct packed {
    logic [ERR_W-1:0] err_count;  // total errors, this one included
    logic [CYC_W-1:0] cyc_count;  // read/write cycles done, this one included
    addr_t            addr;
    data_t            rdata;
    part_t            part;
  } err_rec_t;

endpackage
