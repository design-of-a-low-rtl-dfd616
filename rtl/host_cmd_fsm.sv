// host_cmd_fsm: host command decoder of the tester controller.
//
// Turns the byte stream from the micro-UART into the load/write phase of the
// tester: it fills the information register and the three RAMs, starts the
// test, and answers status and signature reads. The document lists what the
// PC loads (IR contents, test lengths, seeds, reference signatures) and that
// it starts the test and monitors its status; the byte-level command set
// (see ict_pkg::cmd_e) is this design's own.
//
// Every message is a command byte followed by its argument bytes, MSB first;
// RAM commands carry the set number as their first argument. Writes and
// TEST_ON are ignored while a test runs (the RAMs then belong to the test
// sequencer); RD_SG waits until the test has ended. Replies leave through
// tx_data/tx_valid/tx_ready, MSB first.
//
// Timing: an action takes effect two clocks after the last byte of its
// message; RD_SG reads RAM_SG with one clock of latency before replying.
module host_cmd_fsm
  import ict_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // byte stream
  input  logic [7:0]       rx_data,
  input  logic             rx_valid,
  output logic [7:0]       tx_data,
  output logic             tx_valid,
  input  logic             tx_ready,
  // information register
  output logic             ir_we,
  output ir_t              ir_wdata,
  // RAM access (used only while busy is low)
  output logic [SET_W-1:0] ram_addr,
  output logic [PAT_W-1:0] ram_wdata,
  output logic             tl_we,
  output logic             sd_we,
  output logic             sg_we,
  input  logic [PAT_W-1:0] sg_rdata,
  // test sequencer
  output logic             start,
  input  logic             busy,
  input  status_t          status
);

  typedef enum logic [2:0] {H_IDLE, H_ARGS, H_EXEC, H_RDWAIT, H_SEND} host_state_e;

  host_state_e      state;
  cmd_e             cmd;
  logic [2:0]       args_left;
  logic             first_arg;
  logic [SET_W-1:0] idx;
  logic [31:0]      data;
  logic [31:0]      txbuf;
  logic [2:0]       tx_left;

  function automatic logic [2:0] num_args(input logic [7:0] c);
    case (c)
      CMD_WR_IR: return 3'd4;
      CMD_WR_TL: return 3'd4;
      CMD_WR_SD: return 3'd5;
      CMD_WR_SG: return 3'd5;
      CMD_RD_SG: return 3'd1;
      default:   return 3'd0;
    endcase
  endfunction

  function automatic logic known_cmd(input logic [7:0] c);
    return c inside {CMD_WR_IR, CMD_WR_TL, CMD_WR_SD, CMD_WR_SG,
                     CMD_TEST_ON, CMD_RD_STATUS, CMD_RD_SG};
  endfunction

  // IR message: pi, po, sp, {sig_gen, 4'b0, num_sets}
  always_comb begin
    ir_wdata.num_pi   = CNT_W'(data[31:24]);
    ir_wdata.num_po   = CNT_W'(data[23:16]);
    ir_wdata.num_sp   = SCAN_W'(data[15:8]);
    ir_wdata.num_sets = NSET_W'(data[2:0]);
    ir_wdata.sig_gen  = data[7];
  end

  assign ram_addr  = idx;
  assign ram_wdata = data;
  assign tx_data   = txbuf[31:24];
  assign tx_valid  = (state == H_SEND);

  always_comb begin
    ir_we = 1'b0;
    tl_we = 1'b0;
    sd_we = 1'b0;
    sg_we = 1'b0;
    start = 1'b0;
    if (state == H_EXEC && !busy) begin
      ir_we = (cmd == CMD_WR_IR);
      tl_we = (cmd == CMD_WR_TL);
      sd_we = (cmd == CMD_WR_SD);
      sg_we = (cmd == CMD_WR_SG);
      start = (cmd == CMD_TEST_ON);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= H_IDLE;
      cmd       <= CMD_RD_STATUS;
      args_left <= '0;
      first_arg <= 1'b0;
      idx       <= '0;
      data      <= '0;
      txbuf     <= '0;
      tx_left   <= '0;
    end else begin
      unique case (state)
        H_IDLE: begin
          if (rx_valid && known_cmd(rx_data)) begin
            cmd       <= cmd_e'(rx_data);
            args_left <= num_args(rx_data);
            first_arg <= 1'b1;
            data      <= '0;
            state     <= (num_args(rx_data) == 3'd0) ? H_EXEC : H_ARGS;
          end
        end
        H_ARGS: begin
          if (rx_valid) begin
            first_arg <= 1'b0;
            if (first_arg && cmd != CMD_WR_IR) idx <= rx_data[SET_W-1:0];
            else                               data <= {data[23:0], rx_data};
            args_left <= args_left - 1'b1;
            if (args_left == 3'd1) state <= H_EXEC;
          end
        end
        H_EXEC: begin
          unique case (cmd)
            CMD_RD_STATUS: begin
              txbuf   <= {status, 24'h0};
              tx_left <= 3'd1;
              state   <= H_SEND;
            end
            CMD_RD_SG: if (!busy) state <= H_RDWAIT;   // wait for the test to end
            default:   state <= H_IDLE;
          endcase
        end
        H_RDWAIT: begin
          txbuf   <= sg_rdata;   // address was presented during H_EXEC
          tx_left <= 3'd4;
          state   <= H_SEND;
        end
        H_SEND: begin
          if (tx_ready) begin
            txbuf   <= {txbuf[23:0], 8'h0};
            tx_left <= tx_left - 1'b1;
            if (tx_left == 3'd1) state <= H_IDLE;
          end
        end
        default: state <= H_IDLE;
      endcase
    end
  end

endmodule
