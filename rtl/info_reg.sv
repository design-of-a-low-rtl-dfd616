// info_reg: information register (IR) of the IC tester.
//
// Holds the test information the host enters before a test: the numbers of
// CUT primary inputs (pi), primary outputs (po) and scan cells (sp), the
// number of test sets and the signature mode. When written it also works out
// the three shift lengths the controller needs for every test vector:
//   pg = max(pi, sp)       cycles the LFSR is enabled
//   br = max(pi, po)       cycles the buffer register is enabled
//   sa = max(pi, po, sp)   cycles the signature analyzer is enabled
// These maxima are the ones named in the document's test sequence (and
// shown as "Max" choices in its host program). Out-of-range entries are
// clamped to the published limits (32 pins, 128 scan cells, 1..4 sets) and
// each length to at least one cycle; the clamping is this design's choice.
//
// Interface: we loads wdata. Timing: ir and len are valid one clock after
// we. Reset state: pi = po = 32, sp = 0, one set, compare mode.
module info_reg
  import ict_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  ir_t        wdata,
  output ir_t        ir,
  output shift_len_t len
);

  ir_t        clamped;
  shift_len_t len_nxt;

  function automatic logic [LEN_W-1:0] max2(input logic [LEN_W-1:0] a,
                                            input logic [LEN_W-1:0] b);
    return (a > b) ? a : b;
  endfunction

  always_comb begin
    clamped = wdata;
    if (wdata.num_pi > CNT_W'(PAT_W))      clamped.num_pi   = CNT_W'(PAT_W);
    if (wdata.num_po > CNT_W'(PAT_W))      clamped.num_po   = CNT_W'(PAT_W);
    if (wdata.num_sp > SCAN_W'(MAX_SCAN))  clamped.num_sp   = SCAN_W'(MAX_SCAN);
    if (wdata.num_sets > NSET_W'(MAX_SETS)) clamped.num_sets = NSET_W'(MAX_SETS);
    if (wdata.num_sets == '0)              clamped.num_sets = NSET_W'(1);

    len_nxt.pg = max2(LEN_W'(clamped.num_pi), LEN_W'(clamped.num_sp));
    len_nxt.br = max2(LEN_W'(clamped.num_pi), LEN_W'(clamped.num_po));
    len_nxt.sa = max2(len_nxt.pg, LEN_W'(clamped.num_po));
    if (len_nxt.br == '0) len_nxt.br = LEN_W'(1);
    if (len_nxt.sa == '0) len_nxt.sa = LEN_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir  <= '{num_pi: CNT_W'(PAT_W), num_po: CNT_W'(PAT_W), num_sp: '0,
               num_sets: NSET_W'(1), sig_gen: 1'b0};
      len <= '{pg: LEN_W'(PAT_W), br: LEN_W'(PAT_W), sa: LEN_W'(PAT_W)};
    end else if (we) begin
      ir  <= clamped;
      len <= len_nxt;
    end
  end

endmodule
