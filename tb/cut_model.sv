// cut_model: behavioural circuit under test with one scan path, for the
// tester's end-to-end testbench (not part of the tester).
//
// Combinational outputs po = cut_pkg::outputs(pi, scan cells). While scan_en
// is high the scan path shifts one cell per clock, scan_in entering cell 0
// and scan_out being cell sp-1. While cnm (normal mode) is high the scan
// cells capture cut_pkg::capture(). Sizes n_pi, n_po and sp and the two
// fault switches are inputs so one model serves every configuration.
module cut_model
  import cut_pkg::*;
(
  input  logic        clk,
  input  int          n_pi,
  input  int          n_po,
  input  int          sp,
  input  logic        fault_po,
  input  logic        fault_scan,
  input  logic [31:0] pi,
  output logic [31:0] po,
  input  logic        scan_en,
  input  logic        scan_in,
  output logic        scan_out,
  input  logic        cnm
);
  logic [127:0] chain = '0;

  assign po       = outputs(pi, chain, n_pi, n_po, sp, fault_po);
  assign scan_out = (sp > 0) ? chain[sp-1] : 1'b0;

  always @(posedge clk) begin
    if (scan_en)  chain <= {chain[126:0], scan_in};
    else if (cnm) chain <= capture(pi, chain, n_pi, sp, fault_scan);
  end
endmodule
