// uart_rx: receiver half of the micro-UART.
//
// Receives 8N1 frames (start bit, 8 data bits LSB first, one stop bit) at
// CLKS_PER_BIT clocks per bit. The line is first passed through a two-flop
// synchronizer; a falling edge starts a frame, the start bit is re-checked
// at its middle, and every data bit is sampled in its middle. A frame whose
// stop bit is low is dropped. The frame format and oversampling are this
// design's choice; the document only names the receiver.
//
// Interface: rxd (idle high); data/valid, valid pulses for one clock when a
// byte is complete, in the middle of the stop bit.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  localparam int unsigned DIV_W = $clog2(CLKS_PER_BIT + 1);

  rx_state_e        state;
  logic [DIV_W-1:0] div;
  logic [2:0]       bit_idx;
  logic [1:0]       sync;
  logic             rxs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end
  assign rxs = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= RX_IDLE;
      div     <= '0;
      bit_idx <= '0;
      data    <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          div <= '0;
          if (!rxs) state <= RX_START;
        end
        RX_START: begin
          if (div == DIV_W'(CLKS_PER_BIT / 2 - 1)) begin
            div     <= '0;
            bit_idx <= '0;
            state   <= rxs ? RX_IDLE : RX_DATA;   // glitch: back to idle
          end else div <= div + 1'b1;
        end
        RX_DATA: begin
          if (div == DIV_W'(CLKS_PER_BIT - 1)) begin
            div  <= '0;
            data <= {rxs, data[7:1]};
            if (bit_idx == 3'd7) state <= RX_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else div <= div + 1'b1;
        end
        RX_STOP: begin
          if (div == DIV_W'(CLKS_PER_BIT - 1)) begin
            div   <= '0;
            valid <= rxs;
            state <= RX_IDLE;
          end else div <= div + 1'b1;
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
