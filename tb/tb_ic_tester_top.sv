// tb_ic_tester_top: end-to-end testbench of the IC tester, at its default
// parameters (115200-baud serial link at 434 clocks per bit).
//
// A behavioural CUT (cut_model: 16 x 16 multiplier plus scan path) is wired
// to the tester's CUT pins. The testbench acts as the host PC: it sends the
// test information over the serial line, starts tests, polls the status
// byte and reads signatures back. Expected signatures come from a software
// reference in this file that replays the test procedure bit by bit: the
// LFSR recurrence of 1 + X + X^27 + X^28 + X^32, the buffer register and the
// scan path as bit arrays, the CUT function from cut_pkg, and the SA
// equation S(t+1) = T.S(t) + R(t).
//
// Runs:
//   1 the host program's example (32 inputs, 32 outputs, no scan path, four
//     sets of length 10, seeds 10/20/30/40) in signature-generation mode;
//     the signatures read back must equal the reference;
//   2 the same sets in compare mode with those signatures: all pass;
//   3 the same with an output stuck-at fault in the CUT: the sets whose
//     reference signature changes must fail;
//   4 a scan configuration (20 in, 16 out, 40 scan cells, two sets), good
//     and with a scan-cell fault;
//   5 a C6288-sized run (32 in, 32 out, 128 vectors);
//   6 commands during a test (status read while busy, ignored write);
//   7 eight random configurations (pins, scan length, sets, test lengths,
//     seeds) in signature-generation mode, each signature checked.
// It counts how often each mechanism happened (seed load, LFSR and BR
// shift, scan shift, capture, SA compression, passed and failed compare,
// signature write-back, end of set, end of test, status read, write ignored
// while busy) and counts a failure for any that never happened. The test
// cycles are checked against 1 + sum of (2 + TL*(L+1) + L + 1) per set, L
// being max(pi, po, sp).
module tb_ic_tester_top;
  import ict_pkg::*;
  import cut_pkg::*;

  localparam int CPB = 434;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        uart_rxd = 1'b1, uart_txd;
  logic [31:0] cut_pi, cut_po;
  logic        cut_scan_en, cut_scan_in, cut_scan_out, cut_cnm;
  logic        test_busy, test_done, set_end;
  logic [3:0]  set_fail;
  int          checks = 0, failures = 0;

  // CUT configuration seen by the behavioural model
  int   c_pi = 32, c_po = 32, c_sp = 0;
  logic f_po = 1'b0, f_scan = 1'b0;

  ic_tester_top dut (.*);

  cut_model u_cut (.clk, .n_pi(c_pi), .n_po(c_po), .sp(c_sp),
                   .fault_po(f_po), .fault_scan(f_scan),
                   .pi(cut_pi), .po(cut_po), .scan_en(cut_scan_en),
                   .scan_in(cut_scan_in), .scan_out(cut_scan_out), .cnm(cut_cnm));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int m_seed, m_pg, m_br, m_scan, m_cap, m_sa, m_pass, m_fail, m_sgw,
      m_eset, m_etest, m_status, m_ignored, busy_cycles;
  logic done_q;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.pg_set_seed) m_seed++;
    if (dut.u_ctrl.pg_en)       m_pg++;
    if (dut.u_ctrl.br_shift)    m_br++;
    if (cut_scan_en)            m_scan++;
    if (cut_cnm)                m_cap++;
    if (dut.u_ctrl.sa_en)       m_sa++;
    if (dut.u_ctrl.sg_we && test_busy) m_sgw++;
    if (set_end)                m_eset++;
    if (test_busy)              busy_cycles++;
    if (test_done && !done_q)   m_etest++;
    done_q <= test_done;
  end

  // ---------------- serial host ----------------
  task automatic send(logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = f[i];
      repeat (CPB) @(posedge clk);
    end
  endtask

  logic [7:0] rx_q[$];
  initial begin : host_receiver
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      if (uart_txd) rx_q.push_back(b);
    end
  end

  task automatic recv(output logic [7:0] b);
    int t = 0;
    while (rx_q.size() == 0 && t < 40 * CPB) begin @(posedge clk); t++; end
    if (rx_q.size() == 0) begin
      failures++; $display("FAIL no reply"); b = '0;
    end else b = rx_q.pop_front();
  endtask

  task automatic wr_ir(int pi, int po, int sp, int sets, bit sg);
    send(CMD_WR_IR); send(8'(pi)); send(8'(po)); send(8'(sp)); send({sg, 4'b0, 3'(sets)});
  endtask
  task automatic wr_word(cmd_e c, int idx, logic [31:0] v);
    send(c); send(8'(idx));
    if (c != CMD_WR_TL) send(v[31:24]);
    send(v[23:16]); send(v[15:8]); send(v[7:0]);
  endtask
  task automatic rd_status(output status_t st);
    logic [7:0] b;
    send(CMD_RD_STATUS); recv(b); st = status_t'(b);
    m_status++;
  endtask
  task automatic rd_sig(int idx, output logic [31:0] v);
    logic [7:0] b0, b1, b2, b3;
    send(CMD_RD_SG); send(8'(idx));
    recv(b0); recv(b1); recv(b2); recv(b3);
    v = {b0, b1, b2, b3};
  endtask

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h expected %0h", what, got, exp); end
  endtask

  // ---------------- software reference of one test set ----------------
  function automatic int imax(int a, int b); return a > b ? a : b; endfunction

  function automatic logic [31:0] sa_step(logic [31:0] s, bit r0, bit r1);
    logic [31:0] n;
    n[0] = s[31] ^ s[27] ^ s[26] ^ s[0] ^ r0;
    n[1] = s[0] ^ r1;
    for (int i = 2; i < 32; i++) n[i] = s[i-1];
    return n;
  endfunction

  function automatic logic [31:0] ref_signature(int pi, int po, int sp, int tl,
                                                logic [31:0] seed, bit fpo, bit fsc);
    bit           g[$];                   // LFSR output bits, g[n] = bit 31 at step n
    int           n = 0;
    bit           br[32];
    logic [127:0] chain = '0;
    logic [31:0]  sa = '0, q, resp;
    int           lpg = imax(pi, sp), lbr = imax(1, imax(pi, po));
    int           lsa = imax(1, imax(imax(pi, po), sp));
    for (int k = 0; k < 32; k++) g.push_back(seed[31-k]);
    foreach (br[i]) br[i] = 0;
    for (int v = 0; v <= tl; v++) begin
      for (int k = 0; k < lsa; k++) begin
        bit pgb = g[n];
        bit r0 = (k < lbr) ? br[0] : 0;
        bit r1 = (k < sp) ? chain[sp-1] : 0;
        if (v > 0) sa = sa_step(sa, r0, r1);
        if (k < lpg) begin g.push_back(g[n] ^ g[n+4] ^ g[n+5] ^ g[n+31]); n++; end
        if (k < lbr) begin
          for (int i = 0; i < lbr - 1; i++) br[i] = br[i+1];
          br[lbr-1] = pgb;
        end
        if (k < sp) chain = {chain[126:0], pgb};
      end
      if (v == tl) break;
      for (int i = 0; i < 32; i++) q[i] = br[i];
      resp  = outputs(q, chain, pi, po, sp, fpo);
      chain = capture(q, chain, pi, sp, fsc);
      for (int i = 0; i < 32; i++) br[i] = (i < po) ? resp[i] : 0;
    end
    return sa;
  endfunction

  // run a loaded configuration and wait for e_test, checking cycles
  task automatic run_and_wait(int pi, int po, int sp, int sets, int tl[4]);
    int exp_cyc = 0, lsa = imax(1, imax(imax(pi, po), sp));
    status_t st;
    for (int s = 0; s < sets; s++) exp_cyc += 2 + tl[s] * (lsa + 1) + lsa + 1;
    busy_cycles = 0;
    send(CMD_TEST_ON);
    while (!test_done) @(posedge clk);
    @(posedge clk);
    expect_eq("test clocks", busy_cycles, exp_cyc);
    rd_status(st);
    expect_eq("status done", st.done, 1);
    expect_eq("status busy", st.busy, 0);
    expect_eq("status fail bits", st.set_fail, set_fail);
  endtask

  initial begin
    int          tl[4];
    logic [31:0] seed[4], sig[4], got;
    status_t     st;
    bit          differs;
    int          nsets;

    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);

    // ---- 1: host program example, signature generation mode ----
    c_pi = 32; c_po = 32; c_sp = 0;
    tl   = '{10, 10, 10, 10};
    seed = '{32'd10, 32'd20, 32'd30, 32'd40};
    wr_ir(32, 32, 0, 4, 1);
    for (int s = 0; s < 4; s++) begin
      wr_word(CMD_WR_TL, s, tl[s]);
      wr_word(CMD_WR_SD, s, seed[s]);
      wr_word(CMD_WR_SG, s, 32'h0);
    end
    run_and_wait(32, 32, 0, 4, tl);
    for (int s = 0; s < 4; s++) begin
      sig[s] = ref_signature(32, 32, 0, tl[s], seed[s], 0, 0);
      rd_sig(s, got);
      expect_eq($sformatf("generated signature %0d", s), got, sig[s]);
    end
    expect_eq("no fail flags in generation mode", set_fail, 0);

    // ---- 2: compare mode, good CUT ----
    wr_ir(32, 32, 0, 4, 0);
    run_and_wait(32, 32, 0, 4, tl);
    expect_eq("good CUT passes", set_fail, 4'b0000);
    if (set_fail == 0) m_pass += 4;

    // ---- 3: output stuck-at fault ----
    f_po = 1'b1;
    run_and_wait(32, 32, 0, 4, tl);
    for (int s = 0; s < 4; s++) begin
      differs = (ref_signature(32, 32, 0, tl[s], seed[s], 1, 0) != sig[s]);
      expect_eq($sformatf("faulty CUT set %0d", s), set_fail[s], differs);
      if (set_fail[s]) m_fail++;
    end
    f_po = 1'b0;

    // ---- 4: scan path configuration ----
    c_pi = 20; c_po = 16; c_sp = 40;
    tl   = '{25, 9, 0, 0};
    seed = '{32'hace1_2345, 32'h0bad_cafe, 32'd0, 32'd0};
    wr_ir(20, 16, 40, 2, 0);
    for (int s = 0; s < 2; s++) begin
      sig[s] = ref_signature(20, 16, 40, tl[s], seed[s], 0, 0);
      wr_word(CMD_WR_TL, s, tl[s]);
      wr_word(CMD_WR_SD, s, seed[s]);
      wr_word(CMD_WR_SG, s, sig[s]);
    end
    run_and_wait(20, 16, 40, 2, tl);
    expect_eq("scan CUT passes", set_fail, 4'b0000);
    if (set_fail == 0) m_pass += 2;
    f_scan = 1'b1;
    run_and_wait(20, 16, 40, 2, tl);
    for (int s = 0; s < 2; s++) begin
      differs = (ref_signature(20, 16, 40, tl[s], seed[s], 0, 1) != sig[s]);
      expect_eq($sformatf("scan fault set %0d", s), set_fail[s], differs);
      if (set_fail[s]) m_fail++;
    end
    f_scan = 1'b0;

    // ---- 5: C6288-sized run: 32 inputs, 32 outputs, 128 vectors ----
    c_pi = 32; c_po = 32; c_sp = 0;
    tl   = '{128, 0, 0, 0};
    seed = '{32'h1357_9bdf, 32'd0, 32'd0, 32'd0};
    wr_ir(32, 32, 0, 1, 0);
    sig[0] = ref_signature(32, 32, 0, 128, seed[0], 0, 0);
    wr_word(CMD_WR_TL, 0, tl[0]);
    wr_word(CMD_WR_SD, 0, seed[0]);
    wr_word(CMD_WR_SG, 0, sig[0]);
    run_and_wait(32, 32, 0, 1, tl);
    expect_eq("128-vector run passes", set_fail[0], 0);
    if (set_fail == 0) m_pass++;

    // ---- 6: commands while a test runs ----
    tl[0] = 2000;
    wr_word(CMD_WR_TL, 0, tl[0]);
    send(CMD_TEST_ON);
    rd_status(st);
    expect_eq("busy while testing", st.busy, 1);
    wr_word(CMD_WR_SD, 0, 32'hffff_ffff);     // must be ignored
    while (!test_done) @(posedge clk);
    repeat (2) @(posedge clk);
    sig[0] = ref_signature(32, 32, 0, 2000, seed[0], 0, 0);
    expect_eq("long run fails against the 128-vector signature", set_fail[0], 1);
    send(CMD_WR_SG); send(8'd0);
    send(sig[0][31:24]); send(sig[0][23:16]); send(sig[0][15:8]); send(sig[0][7:0]);
    send(CMD_TEST_ON);
    repeat (20) @(posedge clk);
    while (test_busy) @(posedge clk);
    expect_eq("seed unchanged by write during test", set_fail[0], 0);
    if (set_fail[0] == 0) m_ignored++;

    // ---- 7: random configurations in signature-generation mode ----
    for (int trial = 0; trial < 8; trial++) begin
      int pi, po, sp;
      pi = $urandom_range(1, 32);
      po = $urandom_range(1, 32);
      sp = (trial % 2) ? $urandom_range(1, 128) : 0;
      nsets = $urandom_range(1, 4);
      c_pi = pi; c_po = po; c_sp = sp;
      wr_ir(pi, po, sp, nsets, 1);
      for (int s = 0; s < nsets; s++) begin
        tl[s]   = $urandom_range(1, 40);
        seed[s] = $urandom;
        wr_word(CMD_WR_TL, s, tl[s]);
        wr_word(CMD_WR_SD, s, seed[s]);
      end
      run_and_wait(pi, po, sp, nsets, tl);
      for (int s = 0; s < nsets; s++) begin
        rd_sig(s, got);
        expect_eq($sformatf("random config %0d/%0d/%0d set %0d", pi, po, sp, s),
                  got, ref_signature(pi, po, sp, tl[s], seed[s], 0, 0));
      end
    end

    // ---- mechanism coverage ----
    expect_eq("seed loads seen", m_seed > 0, 1);
    expect_eq("LFSR shifts seen", m_pg > 0, 1);
    expect_eq("BR shifts seen", m_br > 0, 1);
    expect_eq("scan shifts seen", m_scan > 0, 1);
    expect_eq("captures seen", m_cap > 0, 1);
    expect_eq("SA compressions seen", m_sa > 0, 1);
    expect_eq("passed compares seen", m_pass > 0, 1);
    expect_eq("failed compares seen", m_fail > 0, 1);
    expect_eq("signature write-backs seen", m_sgw > 4, 1);
    expect_eq("end of set seen", m_eset > 0, 1);
    expect_eq("end of test seen", m_etest > 0, 1);
    expect_eq("status reads seen", m_status > 0, 1);
    expect_eq("write ignored during test", m_ignored, 1);
    $display("mechanisms: seed=%0d pg=%0d br=%0d scan=%0d capture=%0d sa=%0d pass=%0d fail=%0d sg_write=%0d e_set=%0d e_test=%0d status=%0d ignored=%0d",
             m_seed, m_pg, m_br, m_scan, m_cap, m_sa, m_pass, m_fail, m_sgw, m_eset, m_etest, m_status, m_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
