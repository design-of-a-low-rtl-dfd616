// controller: control unit of the IC tester.
//
// Made of two finite state machines with their counters, as the document
// describes the controller: host_cmd_fsm handles the load/write phase
// (information register and RAM_TL/RAM_SD/RAM_SG filled from the PC, test
// start, status and signature read-back) and test_seq_fsm runs the circuit
// test (seeding, shifting, capturing, signature comparison, set and test
// counting). The controller owns the single port of each RAM: the host
// side uses it while no test runs, the sequencer while one does. This
// split into two machines and the port sharing are this design's choice.
//
// Interface: byte stream to and from the micro-UART, the IR write port,
// one port per RAM, the control pulses of PG, BR, SA and CUT, and the test
// status (busy, e_set, e_test and per-set fail flags).
module controller
  import ict_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // micro-UART byte side
  input  logic [7:0]          rx_data,
  input  logic                rx_valid,
  output logic [7:0]          tx_data,
  output logic                tx_valid,
  input  logic                tx_ready,
  // information register
  output logic                ir_we,
  output ir_t                 ir_wdata,
  input  ir_t                 ir,
  input  shift_len_t          len,
  // RAM_TL
  output logic                tl_we,
  output logic [SET_W-1:0]    tl_addr,
  output logic [TL_W-1:0]     tl_wdata,
  input  logic [TL_W-1:0]     tl_rdata,
  // RAM_SD
  output logic                sd_we,
  output logic [SET_W-1:0]    sd_addr,
  output logic [PAT_W-1:0]    sd_wdata,
  input  logic [PAT_W-1:0]    sd_rdata,
  // RAM_SG
  output logic                sg_we,
  output logic [SET_W-1:0]    sg_addr,
  output logic [PAT_W-1:0]    sg_wdata,
  input  logic [PAT_W-1:0]    sg_rdata,
  // pattern generator
  output logic                pg_clr,
  output logic                pg_set_seed,
  output logic [PAT_W-1:0]    pg_seed,
  output logic                pg_en,
  // buffer register
  output logic                br_clr,
  output logic                br_shift,
  output logic                br_capture,
  // signature analyzer
  output logic                sa_clr,
  output logic                sa_en,
  output logic                sa_r0_en,
  output logic                sa_r1_en,
  input  logic [PAT_W-1:0]    sa_sig,
  // CUT control
  output logic                cut_scan_en,
  output logic                cut_cnm,
  // status
  output logic                busy,
  output logic                e_set,
  output logic                e_test,
  output logic [MAX_SETS-1:0] set_fail
);

  logic             start;
  status_t          status;
  logic [SET_W-1:0] h_addr, s_addr;
  logic [PAT_W-1:0] h_wdata, s_sg_wdata;
  logic             h_tl_we, h_sd_we, h_sg_we, s_sg_we;

  assign status = '{busy: busy, done: e_test, any_fail: |set_fail,
                    sig_gen: ir.sig_gen, set_fail: 4'(set_fail)};

  host_cmd_fsm u_host (
    .clk, .rst_n,
    .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready,
    .ir_we, .ir_wdata,
    .ram_addr(h_addr), .ram_wdata(h_wdata),
    .tl_we(h_tl_we), .sd_we(h_sd_we), .sg_we(h_sg_we), .sg_rdata,
    .start, .busy, .status
  );

  test_seq_fsm u_seq (
    .clk, .rst_n, .start, .ir, .len,
    .ram_addr(s_addr), .tl_rdata, .sd_rdata, .sg_rdata,
    .sg_we(s_sg_we), .sg_wdata(s_sg_wdata),
    .pg_clr, .pg_set_seed, .pg_seed, .pg_en,
    .br_clr, .br_shift, .br_capture,
    .sa_clr, .sa_en, .sa_r0_en, .sa_r1_en, .sa_sig,
    .cut_scan_en, .cut_cnm,
    .busy, .e_set, .done(e_test), .set_fail
  );

  // The host never writes the test lengths or seeds while a test runs.
  a_no_host_write: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(tl_we || sd_we));

  // RAM port sharing: sequencer while busy, host otherwise
  always_comb begin
    tl_addr  = busy ? s_addr : h_addr;
    sd_addr  = busy ? s_addr : h_addr;
    sg_addr  = busy ? s_addr : h_addr;
    tl_wdata = h_wdata[TL_W-1:0];
    sd_wdata = h_wdata;
    sg_wdata = busy ? s_sg_wdata : h_wdata;
    tl_we    = !busy && h_tl_we;
    sd_we    = !busy && h_sd_we;
    sg_we    = busy ? s_sg_we : h_sg_we;
  end

endmodule
