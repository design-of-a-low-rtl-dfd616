// tb_lfsr_pg: self-checking testbench of the pattern generator.
//
// The reference is the bit sequence the polynomial 1 + X + X^27 + X^28 + X^32
// defines, kept as a growing list of output bits: with the state read as
// bits b[n] (bit 31) .. b[n+31] (bit 0), the next bit is
// b[n+32] = b[n] ^ b[n+4] ^ b[n+5] ^ b[n+31]. The testbench seeds the LFSR,
// steps it with a random enable and compares the whole state and the serial
// output every clock; it also checks clear, seed priority and hold.
module tb_lfsr_pg;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        clr = 1'b0, set_seed = 1'b0, en = 1'b0;
  logic [31:0] seed = '0;
  logic [31:0] state;
  logic        sout;
  int          checks = 0, failures = 0;

  lfsr_pg dut (.clk, .rst_n, .clr, .set_seed, .seed, .en, .state, .sout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit b[$];

  function automatic logic [31:0] model_state(int n);
    logic [31:0] s;
    for (int k = 0; k < 32; k++) s[31-k] = b[n+k];
    return s;
  endfunction

  task automatic check(string what, logic [31:0] exp);
    checks++;
    if (state !== exp || sout !== exp[31]) begin
      failures++;
      $display("FAIL %s: state=%h expected %h", what, state, exp);
    end
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check("reset", '0);
    for (int trial = 0; trial < 20; trial++) begin
      seed = (trial == 0) ? 32'h1 : $urandom;
      @(negedge clk); set_seed = 1'b1;
      @(negedge clk); set_seed = 1'b0;
      check("seed", seed);
      b.delete();
      for (int k = 0; k < 32; k++) b.push_back(seed[31-k]);
      n = 0;
      for (int step = 0; step < 2000; step++) begin
        en = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (en) begin
          b.push_back(b[n] ^ b[n+4] ^ b[n+5] ^ b[n+31]);
          n++;
        end
        check("step", model_state(n));
      end
      en = 1'b0;
    end
    // clear has priority over seed and enable
    @(negedge clk); clr = 1'b1; set_seed = 1'b1; en = 1'b1; seed = 32'hdead_beef;
    @(negedge clk); clr = 1'b0; set_seed = 1'b0; en = 1'b0;
    check("clear", '0);
    // all-zero state is a fixed point
    @(negedge clk); en = 1'b1;
    @(negedge clk); en = 1'b0;
    check("zero stays zero", '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
