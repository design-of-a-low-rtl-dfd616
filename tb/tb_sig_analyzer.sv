// tb_sig_analyzer: self-checking testbench of the signature analyzer.
//
// The reference is the state equation S(t+1) = T.S(t) + R(t) evaluated as a
// matrix product over GF(2): row i of T is a 32-bit mask of the state bits
// that feed stage i (the polynomial's taps for stage 0, stage i-1 for the
// others) and R(t) carries r0 in stage 0 and r1 in stage 1. Random response
// streams are compressed and the signature is compared every clock. The
// testbench also checks that a single flipped response bit, in either
// input, always changes the final signature.
module tb_sig_analyzer;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        clr = 1'b0, en = 1'b0, r0 = 1'b0, r1 = 1'b0;
  logic [31:0] sig;
  int          checks = 0, failures = 0;

  sig_analyzer dut (.clk, .rst_n, .clr, .en, .r0, .r1, .sig);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] T [32];

  function automatic logic [31:0] step(logic [31:0] s, logic a, logic b);
    logic [31:0] n;
    for (int i = 0; i < 32; i++) n[i] = ^(T[i] & s);
    n[0] ^= a;
    n[1] ^= b;
    return n;
  endfunction

  // run a stream through the DUT from a cleared state, return the signature
  task automatic run(input bit s0[$], input bit s1[$], output logic [31:0] res);
    logic [31:0] m = '0;
    @(negedge clk); clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    for (int k = 0; k < s0.size(); k++) begin
      en = 1'b1; r0 = s0[k]; r1 = s1[k];
      @(negedge clk);
      m = step(m, s0[k], s1[k]);
      checks++;
      if (sig !== m) begin
        failures++;
        $display("FAIL step %0d: sig=%h expected %h", k, sig, m);
      end
    end
    en = 1'b0;
    res = sig;
  endtask

  initial begin
    bit a[$], b[$];
    logic [31:0] good, bad;
    int pos;
    T[0] = (32'h1 << 31) | (32'h1 << 27) | (32'h1 << 26) | 32'h1;
    for (int i = 1; i < 32; i++) T[i] = 32'h1 << (i - 1);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 40; trial++) begin
      a.delete(); b.delete();
      for (int k = 0; k < 300; k++) begin
        a.push_back(1'($urandom));
        b.push_back(1'($urandom));
      end
      run(a, b, good);
      // hold when en is low
      @(negedge clk); r0 = 1'b1; r1 = 1'b1;
      @(negedge clk);
      checks++;
      if (sig !== good) begin failures++; $display("FAIL hold"); end
      // single-bit error in one of the streams must change the signature
      pos = $urandom_range(0, 299);
      if (trial % 2 == 0) a[pos] = !a[pos];
      else                b[pos] = !b[pos];
      run(a, b, bad);
      checks++;
      if (bad === good) begin
        failures++;
        $display("FAIL error at %0d not detected", pos);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
