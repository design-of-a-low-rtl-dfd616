// uart_tx: transmitter half of the micro-UART.
//
// Sends 8N1 frames (start bit, 8 data bits LSB first, one stop bit), each bit
// lasting CLKS_PER_BIT clocks. The frame format is this design's choice;
// the document only names the transmitter.
//
// Interface: ready/valid handshake on the byte side: a byte is taken in the
// clock where valid and ready are both high; ready stays low until the stop
// bit has been sent. txd idles high. The start bit begins one clock after
// the byte is taken.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned DIV_W = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]       frame;    // bits still to send, LSB first
  logic [3:0]       nbits;    // bits left in the frame
  logic [DIV_W-1:0] div;

  assign ready = (nbits == '0);

  // A byte offered while the transmitter is busy must be held until taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           valid && !ready |=> valid && $stable(data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '1;
      nbits <= '0;
      div   <= '0;
      txd   <= 1'b1;
    end else if (ready) begin
      if (valid) begin
        frame <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        div   <= '0;
        txd   <= 1'b0;        // start bit
      end
    end else if (div == DIV_W'(CLKS_PER_BIT - 1)) begin
      div   <= '0;
      nbits <= nbits - 1'b1;
      frame <= {1'b1, frame[9:1]};
      txd   <= (nbits == 4'd1) ? 1'b1 : frame[1];
    end else begin
      div <= div + 1'b1;
    end
  end

endmodule
