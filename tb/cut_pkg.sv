// cut_pkg: logic function of the behavioural circuit under test (CUT) used by
// the tester's end-to-end testbench, shared by the CUT model and by the
// testbench's reference computation.
//
// The CUT is a 16 x 16 multiplier (inputs pi[15:0] and pi[31:16], 32-bit
// product on po) whose product is XORed with the contents of a scan path of
// up to 128 cells. In normal mode the scan cells capture a mix of their own
// rotated contents, the inputs and the product. Only the first n_pi inputs,
// n_po outputs and sp scan cells exist; the rest read as zero. Two faults
// can be switched on: output bit 5 stuck at 0, and scan cell 3 capturing a
// stuck-at-1.
package cut_pkg;

  function automatic logic [31:0] pin_mask(int n);
    return (n >= 32) ? 32'hffff_ffff : ((32'h1 << n) - 1);
  endfunction

  function automatic logic [127:0] scan_mask(int n);
    logic [127:0] m = '0;
    for (int i = 0; i < n && i < 128; i++) m[i] = 1'b1;
    return m;
  endfunction

  function automatic logic [31:0] product(logic [31:0] pi, int n_pi);
    logic [31:0] x = pi & pin_mask(n_pi);
    return 32'(x[15:0]) * 32'(x[31:16]);
  endfunction

  function automatic logic [31:0] outputs(logic [31:0] pi, logic [127:0] chain,
                                          int n_pi, int n_po, int sp, bit fault);
    logic [127:0] c = chain & scan_mask(sp);
    logic [31:0]  p = product(pi, n_pi) ^ c[31:0] ^ c[95:64];
    if (fault) p[5] = 1'b0;
    return p & pin_mask(n_po);
  endfunction

  function automatic logic [127:0] capture(logic [31:0] pi, logic [127:0] chain,
                                           int n_pi, int sp, bit fault);
    logic [127:0] c = chain & scan_mask(sp);
    logic [31:0]  x = pi & pin_mask(n_pi);
    logic [127:0] n = {c[126:0], c[127]} ^ {x, product(pi, n_pi), ~x, x};
    if (fault) n[3] = 1'b1;
    return n & scan_mask(sp);
  endfunction

endpackage
