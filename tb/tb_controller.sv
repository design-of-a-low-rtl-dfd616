// tb_controller: self-checking testbench of the tester controller.
//
// The testbench plays the micro-UART's byte side, the information register
// and the three RAMs (plain arrays with one clock of read latency) and
// supplies the signature analyzer's output. It loads test information with
// host commands and checks what reaches the IR and RAMs, then starts tests
// and counts, per test vector and per set, the LFSR, buffer-register,
// scan-path and SA enable cycles, the normal-mode (cnm) pulses, the seeds
// loaded, e_set and e_test, and the total number of clocks against
//   1 + sum over sets of (2 + TL*(len_sa + 1) + len_sa + 1).
// The SA output it drives equals the stored reference signature except in
// one chosen set, so that set alone must be flagged. Status and signature
// read-back, signature generation mode and writes ignored during a test are
// also checked.
module tb_controller;
  import ict_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] rx_data = '0, tx_data;
  logic rx_valid = 1'b0, tx_valid, tx_ready = 1'b1;
  logic ir_we; ir_t ir_wdata; ir_t ir; shift_len_t len;
  logic tl_we, sd_we, sg_we;
  logic [1:0] tl_addr, sd_addr, sg_addr;
  logic [23:0] tl_wdata, tl_rdata;
  logic [31:0] sd_wdata, sd_rdata, sg_wdata, sg_rdata;
  logic pg_clr, pg_set_seed, pg_en, br_clr, br_shift, br_capture;
  logic sa_clr, sa_en, sa_r0_en, sa_r1_en, cut_scan_en, cut_cnm;
  logic [31:0] pg_seed, sa_sig;
  logic busy, e_set, e_test;
  logic [3:0] set_fail;
  int checks = 0, failures = 0;

  controller dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- models of IR and RAMs ----
  logic [23:0] tl_m [4];
  logic [31:0] sd_m [4], sg_m [4];
  always_ff @(posedge clk) begin
    if (tl_we) tl_m[tl_addr] <= tl_wdata;
    if (sd_we) sd_m[sd_addr] <= sd_wdata;
    if (sg_we) sg_m[sg_addr] <= sg_wdata;
    tl_rdata <= tl_m[tl_addr];
    sd_rdata <= sd_m[sd_addr];
    sg_rdata <= sg_m[sg_addr];
  end
  function automatic int imax(int a, int b); return a > b ? a : b; endfunction
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir  <= '{num_pi: 6'd32, num_po: 6'd32, num_sp: 8'd0, num_sets: 3'd1, sig_gen: 1'b0};
      len <= '{pg: 8'd32, br: 8'd32, sa: 8'd32};
    end else if (ir_we) begin
      ir     <= ir_wdata;
      len.pg <= 8'(imax(ir_wdata.num_pi, ir_wdata.num_sp));
      len.br <= 8'(imax(ir_wdata.num_pi, ir_wdata.num_po));
      len.sa <= 8'(imax(imax(ir_wdata.num_pi, ir_wdata.num_po), ir_wdata.num_sp));
    end
  end

  // ---- SA output: reference of the current set, corrupted in bad_set ----
  int cur_set = 0, bad_set = -1;
  logic [31:0] sig_base [4];
  assign sa_sig = sig_base[cur_set] ^ ((cur_set == bad_set) ? 32'h0000_0100 : 32'h0);

  // ---- counters of the test sequence ----
  int n_pg, n_br, n_scan, n_sa, n_cnm, n_eset, n_seed, n_cyc, n_clr;
  int v_pg, v_br, v_scan;          // per-vector counts
  int vec_err;
  logic [31:0] seeds_seen [4];
  always @(posedge clk) if (rst_n) begin
    if (busy) n_cyc++;
    if (pg_en) begin n_pg++; v_pg++; end
    if (br_shift) begin n_br++; v_br++; end
    if (cut_scan_en) begin n_scan++; v_scan++; end
    if (sa_en) n_sa++;
    if (pg_clr && br_clr && sa_clr) n_clr++;
    if (pg_set_seed) begin seeds_seen[n_seed % 4] = pg_seed; n_seed++; end
    if (cut_cnm) begin
      n_cnm++;
      if (v_pg != len.pg || v_br != len.br || v_scan != ir.num_sp) vec_err++;
      v_pg = 0; v_br = 0; v_scan = 0;
    end
    if ((sa_r0_en && !br_shift) || (sa_r1_en && !cut_scan_en)) vec_err++;
    if (e_set) begin n_eset++; cur_set = (cur_set + 1) % 4; v_pg = 0; v_br = 0; v_scan = 0; end
  end

  task automatic send(logic [7:0] b);
    @(negedge clk); rx_data = b; rx_valid = 1'b1;
    @(negedge clk); rx_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask
  task automatic wr_ir(int pi, int po, int sp, int sets, bit sg);
    send(CMD_WR_IR); send(8'(pi)); send(8'(po)); send(8'(sp)); send({sg, 4'b0, 3'(sets)});
  endtask
  task automatic wr_ram(cmd_e c, int idx, logic [31:0] v);
    send(c); send(8'(idx));
    if (c != CMD_WR_TL) send(v[31:24]);
    send(v[23:16]); send(v[15:8]); send(v[7:0]);
  endtask
  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask
  logic [7:0] tx_q[$];
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) tx_q.push_back(tx_data);
  task automatic recv(output logic [7:0] b);
    while (tx_q.size() == 0) @(negedge clk);
    b = tx_q.pop_front();
  endtask
  task automatic clear_counts();
    n_pg = 0; n_br = 0; n_scan = 0; n_sa = 0; n_cnm = 0; n_eset = 0; n_seed = 0;
    n_cyc = 0; n_clr = 0; v_pg = 0; v_br = 0; v_scan = 0; vec_err = 0; cur_set = 0;
  endtask

  // run one test and check the counts
  task automatic run_test(int pi, int po, int sp, int sets, bit sg, int tl[4], int bad);
    int sa_len, exp_cyc, tl_sum;
    logic [7:0] st;
    bad_set = bad;
    $display("test pi=%0d po=%0d sp=%0d sets=%0d sig_gen=%0d", pi, po, sp, sets, sg);
    clear_counts();
    send(CMD_TEST_ON);
    // a write during the test must be ignored
    wr_ram(CMD_WR_TL, 0, 24'h00_0001);
    while (busy) @(negedge clk);
    sa_len = imax(imax(pi, po), sp);
    exp_cyc = 0; tl_sum = 0;
    for (int s = 0; s < sets; s++) begin
      exp_cyc += 2 + tl[s] * (sa_len + 1) + sa_len + 1;
      tl_sum  += tl[s];
    end
    expect_eq("busy clocks", n_cyc, exp_cyc);
    expect_eq("cnm pulses", n_cnm, tl_sum);
    expect_eq("LFSR enables", n_pg, (tl_sum + sets) * imax(pi, sp));
    expect_eq("BR enables", n_br, (tl_sum + sets) * imax(pi, po));
    expect_eq("scan shifts", n_scan, (tl_sum + sets) * sp);
    expect_eq("SA enables", n_sa, tl_sum * sa_len);
    expect_eq("per-vector enable errors", vec_err, 0);
    expect_eq("e_set pulses", n_eset, sets);
    expect_eq("clears", n_clr, sets);
    expect_eq("seeds loaded", n_seed, sets);
    for (int s = 0; s < sets; s++) expect_eq("seed value", seeds_seen[s], sd_m[s]);
    expect_eq("e_test", e_test, 1);
    expect_eq("TL[0] unchanged by write during test", tl_m[0], tl[0]);
    for (int s = 0; s < 4; s++)
      expect_eq("set_fail", set_fail[s], (!sg && s == bad && s < sets));
    send(CMD_RD_STATUS);
    recv(st);
    expect_eq("status byte", st,
              {1'b0, 1'b1, (!sg && bad >= 0 && bad < sets), sg,
               4'((!sg && bad >= 0 && bad < sets) ? (1 << bad) : 0)});
  endtask

  initial begin
    int tl[4];
    logic [7:0] b0, b1, b2, b3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // ---- load phase, the host program's example: 32/32/0, four sets ----
    wr_ir(32, 32, 0, 4, 0);
    expect_eq("IR pi", ir.num_pi, 32);
    expect_eq("IR sets", ir.num_sets, 4);
    tl = '{10, 10, 10, 10};
    for (int s = 0; s < 4; s++) begin
      sig_base[s] = $urandom;
      wr_ram(CMD_WR_TL, s, tl[s]);
      wr_ram(CMD_WR_SD, s, 10 * (s + 1));
      wr_ram(CMD_WR_SG, s, sig_base[s]);
    end
    for (int s = 0; s < 4; s++) begin
      expect_eq("RAM_TL", tl_m[s], tl[s]);
      expect_eq("RAM_SD", sd_m[s], 10 * (s + 1));
      expect_eq("RAM_SG", sg_m[s], sig_base[s]);
    end
    run_test(32, 32, 0, 4, 0, tl, 2);
    // ---- scan path longer than the pins, mixed test lengths ----
    wr_ir(12, 5, 40, 3, 0);
    tl = '{3, 7, 1, 0};
    for (int s = 0; s < 3; s++) wr_ram(CMD_WR_TL, s, tl[s]);
    run_test(12, 5, 40, 3, 0, tl, -1);
    // ---- outputs dominate ----
    wr_ir(3, 20, 2, 2, 0);
    run_test(3, 20, 2, 2, 0, tl, 1);
    // ---- signature generation: SA results are written into RAM_SG ----
    for (int s = 0; s < 4; s++) sig_base[s] = $urandom;
    wr_ir(8, 8, 8, 4, 1);
    tl = '{2, 2, 2, 2};
    for (int s = 0; s < 4; s++) wr_ram(CMD_WR_TL, s, tl[s]);
    run_test(8, 8, 8, 4, 1, tl, -1);
    for (int s = 0; s < 4; s++) expect_eq("generated signature", sg_m[s], sig_base[s]);
    // ---- read a signature back ----
    tx_ready = 1'b0;
    send(CMD_RD_SG); send(8'd3);
    repeat (5) @(negedge clk);
    tx_ready = 1'b1;
    recv(b0); recv(b1); recv(b2); recv(b3);
    expect_eq("RD_SG", {b0, b1, b2, b3}, sig_base[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
