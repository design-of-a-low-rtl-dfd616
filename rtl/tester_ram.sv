// tester_ram: storage RAM of the IC tester (RAM_TL, RAM_SD and RAM_SG).
//
// One word per test set: the test length (RAM_TL), the LFSR seed (RAM_SD) or
// the reference signature (RAM_SG). The original tester takes these RAMs
// from the FPGA vendor's library; this is a plain single-port synchronous
// RAM written as an array, which FPGA tools map onto block RAM.
//
// Interface: one port; we writes wdata at addr. Timing: rdata shows the word
// at the address presented one clock earlier (read-before-write on a
// simultaneous write). The contents are not reset.
module tester_ram #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [DW-1:0]            wdata,
  output logic [DW-1:0]            rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
