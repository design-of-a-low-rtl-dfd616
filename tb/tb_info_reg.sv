// tb_info_reg: self-checking testbench of the information register.
//
// Writes random and boundary test information and compares the stored
// fields and the three derived shift lengths, max(pi, sp), max(pi, po) and
// max(pi, po, sp), with values worked out here, including the clamping to
// 32 pins, 128 scan cells and 1..4 test sets.
module tb_info_reg;
  import ict_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       we = 1'b0;
  ir_t        wdata = '0;
  ir_t        ir;
  shift_len_t len;
  int         checks = 0, failures = 0;

  info_reg dut (.clk, .rst_n, .we, .wdata, .ir, .len);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int imax(int a, int b);
    return a > b ? a : b;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic write_and_check(int pi, int po, int sp, int sets, bit sg);
    int cpi, cpo, csp, csets;
    wdata.num_pi = 6'(pi); wdata.num_po = 6'(po); wdata.num_sp = 8'(sp);
    wdata.num_sets = 3'(sets); wdata.sig_gen = sg;
    @(negedge clk); we = 1'b1;
    @(negedge clk); we = 1'b0;
    wdata = '0;
    @(negedge clk);                      // must hold without we
    cpi = pi > 32 ? 32 : pi;
    cpo = po > 32 ? 32 : po;
    csp = sp > 128 ? 128 : sp;
    csets = sets > 4 ? 4 : (sets == 0 ? 1 : sets);
    expect_eq("pi", ir.num_pi, cpi);
    expect_eq("po", ir.num_po, cpo);
    expect_eq("sp", ir.num_sp, csp);
    expect_eq("sets", ir.num_sets, csets);
    expect_eq("sig_gen", ir.sig_gen, sg);
    expect_eq("len.pg", len.pg, imax(cpi, csp));
    expect_eq("len.br", len.br, imax(1, imax(cpi, cpo)));
    expect_eq("len.sa", len.sa, imax(1, imax(imax(cpi, cpo), csp)));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq("reset pi", ir.num_pi, 32);
    expect_eq("reset sets", ir.num_sets, 1);
    expect_eq("reset len.sa", len.sa, 32);
    write_and_check(32, 32, 0, 4, 0);      // the host program's example entry
    write_and_check(36, 7, 0, 2, 1);       // clamped inputs
    write_and_check(8, 20, 128, 3, 0);
    write_and_check(0, 0, 0, 0, 0);
    write_and_check(5, 3, 200, 7, 1);
    for (int k = 0; k < 300; k++)
      write_and_check($urandom_range(0, 63), $urandom_range(0, 63),
                      $urandom_range(0, 255), $urandom_range(0, 7), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
