// lfsr_pg: test pattern generator (PG) of the IC tester.
//
// A W-bit Fibonacci LFSR whose feedback follows the primitive polynomial
// P(X) = 1 + X + X^27 + X^28 + X^32 given for the tester: the new bit is the
// XOR of stages 32, 28, 27 and 1 (bits 31, 27, 26 and 0) and enters bit 0
// while the register shifts towards the MSB. The serial output is bit W-1;
// one pattern bit leaves per enabled clock and feeds the buffer register and
// the scan path. The polynomial and width follow the document; the
// Fibonacci form and the MSB serial output are this design's choice.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   clr       clears the state to zero (start of a test)
//   set_seed  loads seed (priority below clr)
//   en        advances the LFSR by one step
// Timing: state and sout change one clock after the request.
module lfsr_pg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         set_seed,
  input  logic [W-1:0] seed,
  input  logic         en,
  output logic [W-1:0] state,
  output logic         sout
);

  logic fb;

  if (W < 28) begin : g_width_check
    $error("lfsr_pg: the feedback taps need W >= 28");
  end

  // Taps of 1 + X + X^27 + X^28 + X^32 (stage k is bit k-1)
  assign fb = state[W-1] ^ state[27] ^ state[26] ^ state[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state <= '0;
    else if (clr)      state <= '0;
    else if (set_seed) state <= seed;
    else if (en)       state <= {state[W-2:0], fb};
  end

  assign sout = state[W-1];

endmodule
