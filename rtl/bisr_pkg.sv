// bisr_pkg: constants and types shared by the built-in self-repair (BISR)
// analyzer blocks.
//
// The default sizes follow the worked example of the design: 8-bit data
// words, 8-bit word addresses (split here into a 4-bit row and a 4-bit word
// column), an 8-stage pattern generator seeded with 8'b0011_0010, two spare
// rows and two spare columns (the four-bit repair strategies RRCC ... CCRR).
// The row/column split of the address is this design's own choice.
package bisr_pkg;

  localparam int unsigned DATA_W  = 8;   // bits per memory word
  localparam int unsigned ROW_W   = 4;   // row address bits
  localparam int unsigned COL_W   = 4;   // word-column address bits
  localparam int unsigned ADDR_W  = ROW_W + COL_W;
  localparam int unsigned R_SPARE = 2;   // spare rows (r)
  localparam int unsigned C_SPARE = 2;   // spare columns (c)

  localparam logic [DATA_W-1:0] LFSR_SEED = 8'b0011_0010;
  // Feedback taps of the 8-stage LFSR, x^8 + x^6 + x^5 + x^4 + 1
  // (maximal length, period 255).
  localparam logic [DATA_W-1:0] LFSR_TAPS = 8'b1011_1000;

  // One memory access, as issued either by the normal user or by the BIST.
  typedef struct packed {
    logic              we;
    logic              re;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  // Phases of the memory test (names follow the write/read enables of the
  // worked example: write1/read1 is the test, write2/read2 the re-test after
  // repair).
  typedef enum logic [2:0] {
    PH_IDLE,
    PH_WRITE1,
    PH_READ1,
    PH_ANALYSE,
    PH_WRITE2,
    PH_READ2,
    PH_DONE
  } bist_phase_e;

  // States of the final-analysis solver.
  typedef enum logic [2:0] {
    SV_IDLE,
    SV_INIT,
    SV_EVAL,
    SV_RECOVER,
    SV_DONE
  } solver_state_e;

endpackage
