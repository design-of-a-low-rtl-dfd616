// ict_pkg: types and constants shared by the pseudo-random IC tester.
//
// The tester drives a circuit under test (CUT) with up to 32 primary inputs
// and 32 primary outputs plus one scan path of up to 128 cells, runs up to
// four test sets, each with its own LFSR seed, test length and reference
// signature. These limits are the published specification of the tester.
// The host command set carried over the UART is this design's own: the
// original only states which information the PC loads, not how it is coded.
package ict_pkg;

  // Published limits of the tester
  localparam int unsigned PAT_W    = 32;      // CUT input/output pins, LFSR/BR/SA width
  localparam int unsigned MAX_SCAN = 128;     // longest scan path
  localparam int unsigned MAX_SETS = 4;       // test sets
  localparam int unsigned TL_W     = 24;      // test length: up to 2^14 K = 2^24 vectors

  localparam int unsigned CNT_W    = $clog2(PAT_W + 1);     // 0..32
  localparam int unsigned SCAN_W   = $clog2(MAX_SCAN + 1);  // 0..128
  localparam int unsigned SET_W    = $clog2(MAX_SETS);      // set index
  localparam int unsigned NSET_W   = $clog2(MAX_SETS + 1);  // number of sets 0..4
  localparam int unsigned LEN_W    = SCAN_W;                // shift lengths up to 128

  // Contents of the information register (IR), as entered by the host
  typedef struct packed {
    logic [CNT_W-1:0]  num_pi;    // CUT primary inputs
    logic [CNT_W-1:0]  num_po;    // CUT primary outputs
    logic [SCAN_W-1:0] num_sp;    // scan-path length (cells)
    logic [NSET_W-1:0] num_sets;  // number of test sets
    logic              sig_gen;   // 1: store signatures instead of comparing
  } ir_t;

  // Shift lengths derived from the IR, in clock cycles per test vector
  typedef struct packed {
    logic [LEN_W-1:0] pg;   // max(pi, sp): LFSR enable cycles
    logic [LEN_W-1:0] br;   // max(pi, po): buffer register enable cycles
    logic [LEN_W-1:0] sa;   // max(pi, po, sp): signature analyzer enable cycles
  } shift_len_t;

  // Host commands (first byte of every UART message)
  typedef enum logic [7:0] {
    CMD_WR_IR     = 8'h01,  // + pi, po, sp, {sig_gen, num_sets}
    CMD_WR_TL     = 8'h02,  // + set, 3 bytes test length (MSB first)
    CMD_WR_SD     = 8'h03,  // + set, 4 bytes seed (MSB first)
    CMD_WR_SG     = 8'h04,  // + set, 4 bytes reference signature (MSB first)
    CMD_TEST_ON   = 8'h05,  // start the test
    CMD_RD_STATUS = 8'h06,  // reply: 1 status byte
    CMD_RD_SG     = 8'h07   // + set; reply: 4 bytes of RAM_SG (MSB first)
  } cmd_e;

  // Status byte returned by CMD_RD_STATUS
  typedef struct packed {
    logic       busy;      // test running
    logic       done;      // e_test: all sets finished
    logic       any_fail;  // some set's signature mismatched
    logic       sig_gen;   // mode of the last test
    logic [3:0] set_fail;  // per-set mismatch flags
  } status_t;

endpackage
