// tb_tester_ram: self-checking testbench of the storage RAM.
//
// Fills both RAM shapes used by the tester (24-bit test lengths and 32-bit
// seeds/signatures, four words each) with random words, checks the
// one-clock read latency, read-before-write on a simultaneous write, and
// random interleaved reads and writes against an array kept here.
module tb_tester_ram;
  logic        clk = 1'b0;
  logic        we32 = 1'b0, we24 = 1'b0;
  logic [1:0]  addr = '0;
  logic [31:0] wdata = '0;
  logic [31:0] rdata32;
  logic [23:0] rdata24;
  int          checks = 0, failures = 0;

  tester_ram #(.DW(32), .DEPTH(4)) dut32 (.clk, .we(we32), .addr, .wdata, .rdata(rdata32));
  tester_ram #(.DW(24), .DEPTH(4)) dut24 (.clk, .we(we24), .addr, .wdata(wdata[23:0]), .rdata(rdata24));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] m32 [4];
  logic [23:0] m24 [4];

  initial begin
    logic [31:0] exp32;
    logic [23:0] exp24;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      addr = 2'(i); wdata = $urandom; we32 = 1; we24 = 1;
      m32[i] = wdata; m24[i] = wdata[23:0];
    end
    @(negedge clk); we32 = 0; we24 = 0;
    for (int step = 0; step < 5000; step++) begin
      addr  = 2'($urandom);
      wdata = $urandom;
      we32  = ($urandom_range(0, 3) == 0);
      we24  = ($urandom_range(0, 3) == 0);
      exp32 = m32[addr];                  // read-before-write
      exp24 = m24[addr];
      @(negedge clk);
      checks++;
      if (rdata32 !== exp32 || rdata24 !== exp24) begin
        failures++;
        $display("FAIL addr %0d: %h/%h expected %h/%h", addr, rdata32, rdata24, exp32, exp24);
      end
      if (we32) m32[addr] = wdata;
      if (we24) m24[addr] = wdata[23:0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
