// ic_tester_top: single-chip pseudo-random IC tester.
//
// The PC loads the test information over a serial line, then starts the
// test; the chip applies LFSR-generated patterns to the circuit under test
// (CUT), compresses its responses into a 32-bit signature per test set and
// compares it with the reference signature the PC supplied. Blocks, as in
// the document's block diagram: micro-UART, controller, information
// register (IR), RAM_TL (test lengths), RAM_SD (seeds), RAM_SG (reference
// signatures), pattern generator (PG, 32-bit LFSR), buffer register (BR)
// and signature analyzer (SA).
//
// Data path: the PG's serial output feeds both the BR (which drives the CUT
// primary inputs) and the CUT's scan-in. The BR captures the CUT primary
// outputs and shifts them out into SA input r0; the scan-out of the CUT
// enters SA input r1. The serial organisation and the wiring of the scan
// path to PG and SA are this design's reading of the block diagram.
//
// CUT interface: cut_pi (BR contents), cut_po (sampled when cut_cnm is high),
// cut_scan_en (shift the scan path one cell per clock), cut_scan_in,
// cut_scan_out, cut_cnm (one clock of normal mode: the CUT's scan cells and
// the BR capture). The CUT runs on clk.
// Status outputs for LEDs: test_busy, test_done (e_test), set_end (one-clock
// e_set pulse when a test set has been compared), set_fail[3:0].
module ic_tester_top
  import ict_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434   // 115200 baud at 50 MHz
) (
  input  logic                clk,
  input  logic                rst_n,
  // host serial line
  input  logic                uart_rxd,
  output logic                uart_txd,
  // circuit under test
  output logic [PAT_W-1:0]    cut_pi,
  input  logic [PAT_W-1:0]    cut_po,
  output logic                cut_scan_en,
  output logic                cut_scan_in,
  input  logic                cut_scan_out,
  output logic                cut_cnm,
  // test status
  output logic                test_busy,
  output logic                test_done,
  output logic                set_end,
  output logic [MAX_SETS-1:0] set_fail
);

  logic [7:0]       rx_data, tx_data;
  logic             rx_valid, tx_valid, tx_ready;
  logic             ir_we;
  ir_t              ir_wdata, ir;
  shift_len_t       len;
  logic             tl_we, sd_we, sg_we;
  logic [SET_W-1:0] tl_addr, sd_addr, sg_addr;
  logic [TL_W-1:0]  tl_wdata, tl_rdata;
  logic [PAT_W-1:0] sd_wdata, sd_rdata, sg_wdata, sg_rdata;
  logic             pg_clr, pg_set_seed, pg_en, pg_sout;
  logic [PAT_W-1:0] pg_seed;
  logic             br_clr, br_shift, br_capture, br_sout;
  logic             sa_clr, sa_en, sa_r0_en, sa_r1_en;
  logic [PAT_W-1:0] sa_sig;

  micro_uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .rxd(uart_rxd), .txd(uart_txd),
    .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready
  );

  controller u_ctrl (
    .clk, .rst_n,
    .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready,
    .ir_we, .ir_wdata, .ir, .len,
    .tl_we, .tl_addr, .tl_wdata, .tl_rdata,
    .sd_we, .sd_addr, .sd_wdata, .sd_rdata,
    .sg_we, .sg_addr, .sg_wdata, .sg_rdata,
    .pg_clr, .pg_set_seed, .pg_seed, .pg_en,
    .br_clr, .br_shift, .br_capture,
    .sa_clr, .sa_en, .sa_r0_en, .sa_r1_en, .sa_sig,
    .cut_scan_en, .cut_cnm,
    .busy(test_busy), .e_set(set_end), .e_test(test_done), .set_fail
  );

  info_reg u_ir (
    .clk, .rst_n, .we(ir_we), .wdata(ir_wdata), .ir, .len
  );

  tester_ram #(.DW(TL_W), .DEPTH(MAX_SETS)) u_ram_tl (
    .clk, .we(tl_we), .addr(tl_addr), .wdata(tl_wdata), .rdata(tl_rdata)
  );

  tester_ram #(.DW(PAT_W), .DEPTH(MAX_SETS)) u_ram_sd (
    .clk, .we(sd_we), .addr(sd_addr), .wdata(sd_wdata), .rdata(sd_rdata)
  );

  tester_ram #(.DW(PAT_W), .DEPTH(MAX_SETS)) u_ram_sg (
    .clk, .we(sg_we), .addr(sg_addr), .wdata(sg_wdata), .rdata(sg_rdata)
  );

  lfsr_pg #(.W(PAT_W)) u_pg (
    .clk, .rst_n, .clr(pg_clr), .set_seed(pg_set_seed), .seed(pg_seed),
    .en(pg_en), .state(), .sout(pg_sout)
  );

  buffer_reg #(.W(PAT_W)) u_br (
    .clk, .rst_n, .clr(br_clr), .shift(br_shift), .sin(pg_sout),
    .len(CNT_W'(len.br)), .capture(br_capture), .num_po(ir.num_po),
    .cut_po, .q(cut_pi), .sout(br_sout)
  );

  sig_analyzer #(.W(PAT_W)) u_sa (
    .clk, .rst_n, .clr(sa_clr), .en(sa_en),
    .r0(br_sout & sa_r0_en), .r1(cut_scan_out & sa_r1_en), .sig(sa_sig)
  );

  assign cut_scan_in = pg_sout;

endmodule
