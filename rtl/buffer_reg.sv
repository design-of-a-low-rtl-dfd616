// buffer_reg: buffer register (BR) between the pattern generator and the CUT.
//
// A W-bit register that drives the CUT primary inputs and captures the CUT
// primary outputs. The pattern arrives serially from the LFSR: while shift
// is high the register acts as a shift register of `len` stages, bit len-1
// taking sin and every lower bit taking its upper neighbour, so after len
// shifts bits [len-1:0] hold the newest len pattern bits (the newest in bit
// len-1). Bit 0 is the serial output to the signature analyzer, so the same
// shifts send the previously captured response out, LSB first. On capture
// bits below num_po take the CUT outputs and all others are cleared, so that
// unused output pins never reach the signature.
// The width, the load from the PG, the capture of the response and the
// hand-over to the SA follow the document; the serial, variable-length form
// and the masking are this design's reading of it.
//
// Interface: clr (clear to zero), shift, capture (priority clr > capture >
// shift), len = max(pi, po) in 1..W, num_po in 0..W.
// Timing: q changes one clock after the request; sout = q[0].
module buffer_reg #(
  parameter int unsigned W = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   shift,
  input  logic                   sin,
  input  logic [$clog2(W+1)-1:0] len,
  input  logic                   capture,
  input  logic [$clog2(W+1)-1:0] num_po,
  input  logic [W-1:0]           cut_po,
  output logic [W-1:0]           q,
  output logic                   sout
);

  logic [W-1:0] shifted, captured;

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      if (i + 1 == int'(len))    shifted[i] = sin;
      else if (i + 1 < int'(len)) shifted[i] = q[i+1];
      else                        shifted[i] = q[i];
      captured[i] = (i < int'(num_po)) ? cut_po[i] : 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (clr)     q <= '0;
    else if (capture) q <= captured;
    else if (shift)   q <= shifted;
  end

  assign sout = q[0];

endmodule
