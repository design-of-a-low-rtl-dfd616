// tb_buffer_reg: self-checking testbench of the buffer register.
//
// The reference model keeps the register as an array of bits and applies
// the rules directly: on shift, stage len-1 takes the serial input and each
// stage below len-1 its upper neighbour; on capture, stages below num_po take
// the CUT outputs and the rest are cleared. Random lengths, output counts and
// operations are applied and the parallel output and serial output are
// compared every clock. A directed part checks that a captured response
// leaves through sout LSB first while the new pattern moves in.
module tb_buffer_reg;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        clr = 1'b0, shift = 1'b0, sin = 1'b0, capture = 1'b0;
  logic [5:0]  len = 6'd32, num_po = 6'd32;
  logic [31:0] cut_po = '0;
  logic [31:0] q;
  logic        sout;
  int          checks = 0, failures = 0;

  buffer_reg dut (.clk, .rst_n, .clr, .shift, .sin, .len, .capture, .num_po,
                  .cut_po, .q, .sout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit m[32];

  task automatic compare(string what);
    logic [31:0] e;
    for (int i = 0; i < 32; i++) e[i] = m[i];
    checks++;
    if (q !== e || sout !== e[0]) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, e);
    end
  endtask

  initial begin
    logic [31:0] resp, got;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (m[i]) m[i] = 0;
    @(negedge clk); compare("reset");
    // random operations
    for (int step = 0; step < 20000; step++) begin
      if (step % 100 == 0) begin
        len    = 6'($urandom_range(1, 32));
        num_po = 6'($urandom_range(0, 32));
      end
      clr     = ($urandom_range(0, 199) == 0);
      capture = ($urandom_range(0, 9) == 0);
      shift   = ($urandom_range(0, 2) != 0);
      sin     = 1'($urandom);
      cut_po  = $urandom;
      @(negedge clk);
      if (clr) foreach (m[i]) m[i] = 0;
      else if (capture) for (int i = 0; i < 32; i++) m[i] = (i < num_po) ? cut_po[i] : 0;
      else if (shift) begin
        for (int i = 0; i < 32; i++) begin
          if (i < len - 1) m[i] = m[i+1];
          else if (i == len - 1) m[i] = sin;
        end
      end
      compare("random");
    end
    clr = 0; capture = 0; shift = 0;
    // directed: capture 7 outputs of a 32-input CUT, shift 32 times
    len = 6'd32; num_po = 6'd7; resp = 32'hffff_ff5a;
    cut_po = resp; capture = 1;
    @(negedge clk); capture = 0;
    got = '0;
    for (int k = 0; k < 32; k++) begin
      got[k] = sout;
      sin = k[0];
      shift = 1;
      @(negedge clk);
    end
    shift = 0;
    checks++;
    if (got !== {25'h0, resp[6:0]}) begin
      failures++; $display("FAIL serial response %h", got);
    end
    checks++;
    if (q !== 32'haaaa_aaaa) begin   // bit 31 holds the last bit shifted in
      failures++; $display("FAIL pattern %h", q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
