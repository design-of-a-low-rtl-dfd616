// tb_micro_uart: self-checking testbench of the micro-UART.
//
// Receiver: the testbench sends random 8N1 frames on rxd, with the bit time
// of the UART and with bit times 2% off either way, and checks each received
// byte; a frame with a broken stop bit must be dropped. Transmitter: random
// bytes are offered on the byte side; the testbench finds the falling edge
// of each start bit, samples txd in the middle of every bit, checks data and
// stop bit and checks that ready stays low for exactly ten bit times.
module tb_micro_uart;
  localparam int CPB = 434;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       rxd = 1'b1;
  logic       txd;
  logic [7:0] rx_data, tx_data = '0;
  logic       rx_valid, tx_valid = 1'b0, tx_ready;
  int         checks = 0, failures = 0;

  micro_uart dut (.clk, .rst_n, .rxd, .txd, .rx_data, .rx_valid,
                  .tx_data, .tx_valid, .tx_ready);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver side
  logic [7:0] rx_q[$];
  always @(posedge clk) if (rst_n && rx_valid) rx_q.push_back(rx_data);

  task automatic send_frame(logic [7:0] b, int cpb, bit stop);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (cpb) @(posedge clk);
    end
    rxd = 1'b1;
    repeat (cpb) @(posedge clk);
  endtask

  initial begin
    logic [7:0] b, exp_q[$];
    logic [9:0] f;
    int         busy_cycles;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    // ---- receive ----
    for (int k = 0; k < 30; k++) begin
      b = 8'($urandom);
      send_frame(b, (k % 3 == 0) ? CPB : ((k % 3 == 1) ? CPB * 98 / 100 : CPB * 102 / 100), 1'b1);
      exp_q.push_back(b);
    end
    send_frame(8'h55, CPB, 1'b0);          // framing error: dropped
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (rx_q.size() != exp_q.size()) begin
      failures++;
      $display("FAIL received %0d bytes, expected %0d", rx_q.size(), exp_q.size());
    end
    for (int k = 0; k < exp_q.size() && k < rx_q.size(); k++) begin
      checks++;
      if (rx_q[k] !== exp_q[k]) begin
        failures++;
        $display("FAIL rx byte %0d: %h expected %h", k, rx_q[k], exp_q[k]);
      end
    end
    // ---- transmit ----
    for (int k = 0; k < 20; k++) begin
      b = 8'($urandom);
      @(negedge clk);
      while (!tx_ready) @(negedge clk);
      tx_data = b; tx_valid = 1'b1;
      @(negedge clk);
      tx_valid = 1'b0;
      busy_cycles = 0;
      while (txd) @(negedge clk);          // falling edge of the start bit
      repeat (CPB / 2) @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        f[i] = txd;
        if (i < 9) repeat (CPB) @(negedge clk);
      end
      checks++;
      if (f !== {1'b1, b, 1'b0}) begin
        failures++;
        $display("FAIL tx frame %b for byte %h", f, b);
      end
      while (!tx_ready) begin busy_cycles++; @(negedge clk); end
      // ready returns CPB/2 - 1 clocks after the middle of the stop bit
      checks++;
      if (busy_cycles < CPB / 2 - 3 || busy_cycles > CPB / 2 + 1) begin
        failures++;
        $display("FAIL ready after %0d clocks", busy_cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
