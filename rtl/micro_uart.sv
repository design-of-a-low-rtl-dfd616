// micro_uart: serial link between the host PC and the IC tester.
//
// A compact UART made of one receiver and one transmitter, as the document
// describes it; both run 8N1 at CLKS_PER_BIT clocks per bit (434: 115200
// baud from a 50 MHz clock). Baud rate, frame format and the byte-side
// handshakes are this design's choices.
//
// Interface: rxd/txd serial lines (idle high). Received bytes appear on
// rx_data with a one-clock rx_valid pulse. Bytes to send are offered on
// tx_data/tx_valid and taken when tx_ready is high.
module micro_uart #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       txd,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready
);

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .data(rx_data), .valid(rx_valid)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .txd
  );

endmodule
