// sig_analyzer: signature analyzer (SA) of the IC tester.
//
// The SA has the structure of the pattern generator (a W-bit LFSR with the
// feedback polynomial 1 + X + X^27 + X^28 + X^32) plus two serial inputs,
// so that its state follows S(t+1) = T.S(t) + R(t): T is the LFSR's
// transition matrix and R(t) the response bits of the current clock. Input
// r0 (the buffer register's serial output, i.e. the CUT primary outputs) is
// XORed into bit 0 together with the feedback; input r1 (the CUT scan-path
// output) is XORed into bit 1. Which stages take the two inputs is this
// design's choice; the equation, the two inputs and the polynomial follow
// the document. Two inputs in different stages keep an error in one
// stream from cancelling an error in the other in the same clock.
//
// Interface: clr clears to zero, en compresses one pair (r0, r1).
// Timing: sig changes one clock after en.
module sig_analyzer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         r0,
  input  logic         r1,
  output logic [W-1:0] sig
);

  logic         fb;
  logic [W-1:0] nxt;

  if (W < 28) begin : g_width_check
    $error("sig_analyzer: the feedback taps need W >= 28");
  end

  assign fb  = sig[W-1] ^ sig[27] ^ sig[26] ^ sig[0];
  assign nxt = {sig[W-2:1], sig[0] ^ r1, fb ^ r0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= nxt;
  end

endmodule
