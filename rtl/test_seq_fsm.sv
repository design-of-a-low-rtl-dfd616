// test_seq_fsm: test sequencer of the tester controller.
//
// Runs the circuit-test phase. After start it clears the pattern generator
// (PG), buffer register (BR) and signature analyzer (SA), then for every
// test set: reads the set's test length, seed and reference signature from
// the RAMs, loads the seed into the LFSR, and repeats for each test vector
//   SHIFT   len.sa = max(pi, po, sp) clocks; in clock k the LFSR is enabled
//           while k < max(pi, sp), the BR while k < max(pi, po) and the scan
//           path while k < sp. The new pattern moves in while the previous
//           response moves out into the SA (not before the first vector).
//   CAPTURE one clock with cnm = 1: the CUT runs in normal mode, the BR
//           captures the primary outputs, the scan cells capture, and the
//           test counter increments.
// When the counter reaches the set's test length, one more SHIFT unloads the
// last response, and COMPARE checks the SA against the reference signature
// (e_set). In signature-generation mode it writes the SA into RAM_SG
// instead. After the last set e_test (done) is raised.
// The order of the steps and the three shift lengths follow the document's
// test sequence; the extra unload shift, the per-set clearing of BR and SA
// and the signature-generation write are this design's choices.
//
// Timing per set: 2 + TL*(len.sa + 1) + len.sa + 1 clocks, where a test
// length of 0 stands for 2^24 vectors. The RAM read latency is one clock.
module test_seq_fsm
  import ict_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  ir_t              ir,
  input  shift_len_t       len,
  // RAMs (address shared by the three)
  output logic [SET_W-1:0] ram_addr,
  input  logic [TL_W-1:0]  tl_rdata,
  input  logic [PAT_W-1:0] sd_rdata,
  input  logic [PAT_W-1:0] sg_rdata,
  output logic             sg_we,
  output logic [PAT_W-1:0] sg_wdata,
  // pattern generator
  output logic             pg_clr,
  output logic             pg_set_seed,
  output logic [PAT_W-1:0] pg_seed,
  output logic             pg_en,
  // buffer register
  output logic             br_clr,
  output logic             br_shift,
  output logic             br_capture,
  // signature analyzer
  output logic             sa_clr,
  output logic             sa_en,
  output logic             sa_r0_en,
  output logic             sa_r1_en,
  input  logic [PAT_W-1:0] sa_sig,
  // CUT control
  output logic             cut_scan_en,
  output logic             cut_cnm,
  // status
  output logic             busy,
  output logic             e_set,
  output logic             done,
  output logic [MAX_SETS-1:0] set_fail
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_SEED, S_SHIFT, S_CAPTURE, S_COMPARE} seq_state_e;

  seq_state_e        state;
  logic [SET_W-1:0]  set_cnt;
  logic [TL_W-1:0]   test_len;
  logic [TL_W-1:0]   test_cnt;
  logic [PAT_W-1:0]  ref_sig;
  logic [LEN_W-1:0]  shift_cnt;
  logic              first_vec;   // no response captured yet
  logic              unload;      // final shift after the last capture

  assign busy     = (state != S_IDLE);
  assign ram_addr = set_cnt;
  assign pg_seed  = sd_rdata;
  assign sg_wdata = sa_sig;

  always_comb begin
    pg_clr      = 1'b0;
    pg_set_seed = 1'b0;
    pg_en       = 1'b0;
    br_clr      = 1'b0;
    br_shift    = 1'b0;
    br_capture  = 1'b0;
    sa_clr      = 1'b0;
    sa_en       = 1'b0;
    sa_r0_en    = 1'b0;
    sa_r1_en    = 1'b0;
    cut_scan_en = 1'b0;
    cut_cnm     = 1'b0;
    sg_we       = 1'b0;
    e_set       = 1'b0;
    unique case (state)
      S_READ: begin
        pg_clr = 1'b1;
        br_clr = 1'b1;
        sa_clr = 1'b1;
      end
      S_SEED: pg_set_seed = 1'b1;
      S_SHIFT: begin
        pg_en       = (shift_cnt < len.pg);
        br_shift    = (shift_cnt < len.br);
        cut_scan_en = (shift_cnt < LEN_W'(ir.num_sp));
        sa_en       = !first_vec;
        sa_r0_en    = br_shift;
        sa_r1_en    = cut_scan_en;
      end
      S_CAPTURE: begin
        br_capture = 1'b1;
        cut_cnm    = 1'b1;
      end
      S_COMPARE: begin
        e_set = 1'b1;
        sg_we = ir.sig_gen;
      end
      default: ;
    endcase
  end

  // The CUT is either shifting or in normal mode, never both, and the BR is
  // either shifting or capturing.
  a_cut_mode: assert property (@(posedge clk) disable iff (!rst_n) !(cut_scan_en && cut_cnm));
  a_br_mode:  assert property (@(posedge clk) disable iff (!rst_n) !(br_shift && br_capture));
  // The SA only takes response bits while it is enabled.
  a_sa_in:    assert property (@(posedge clk) disable iff (!rst_n)
                               (sa_r0_en || sa_r1_en) |-> sa_en || first_vec);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      set_cnt   <= '0;
      test_len  <= '0;
      test_cnt  <= '0;
      ref_sig   <= '0;
      shift_cnt <= '0;
      first_vec <= 1'b1;
      unload    <= 1'b0;
      done      <= 1'b0;
      set_fail  <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            set_cnt  <= '0;
            set_fail <= '0;
            done     <= 1'b0;
            state    <= S_READ;
          end
        end
        S_READ: state <= S_SEED;           // RAM address set_cnt presented
        S_SEED: begin                      // RAM data valid, seed loaded
          test_len  <= tl_rdata;
          ref_sig   <= sg_rdata;
          test_cnt  <= '0;
          shift_cnt <= '0;
          first_vec <= 1'b1;
          unload    <= 1'b0;
          state     <= S_SHIFT;
        end
        S_SHIFT: begin
          if (shift_cnt == len.sa - 1'b1) begin
            shift_cnt <= '0;
            state     <= unload ? S_COMPARE : S_CAPTURE;
          end else begin
            shift_cnt <= shift_cnt + 1'b1;
          end
        end
        S_CAPTURE: begin
          test_cnt  <= test_cnt + 1'b1;
          first_vec <= 1'b0;
          if (test_cnt + 1'b1 == test_len) unload <= 1'b1;
          state <= S_SHIFT;
        end
        S_COMPARE: begin
          if (!ir.sig_gen) set_fail[set_cnt] <= (sa_sig != ref_sig);
          if (NSET_W'(set_cnt) + 1'b1 == ir.num_sets) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            set_cnt <= set_cnt + 1'b1;
            state   <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
