// Test of the RS-232 receiver and transmitter at 1200 baud, 8N1.
//
// The transmitter sends random characters; the test checks the waveform on
// txd bit by bit (start bit low, data LSB first, stop bit high, each bit
// 1/1200 s long). The txd line is looped to the receiver, which must deliver
// the same characters with `rdy`, hold them until reset, and report `busy`.
module tb_uart;
  timeunit 1ns; timeprecision 1ps;
  localparam real BIT_NS = 1.0e9 / 1200.0;
  logic clk = 0, rst = 1, rx_rst = 0, start = 0, txd, tx_busy, rdy, rx_busy;
  logic [7:0] data = 0, rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uart_tx u_tx (.clk, .rst, .start, .data, .txd, .busy(tx_busy));
  uart_rx u_rx (.clk, .rst(rst | rx_rst), .rxd(txd), .data(rdata), .rdy, .busy(rx_busy));

  int rx_busy_seen = 0;
  always @(posedge clk) if (!rst && rx_busy) rx_busy_seen++;

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 6; n++) begin
      logic [7:0] c;
      c = 8'($urandom);
      @(negedge clk);
      data = c; start = 1;
      @(negedge clk);
      start = 0;
      checks++; if (!tx_busy) failures++;
      // sample the line in the middle of each bit
      #(BIT_NS / 2);
      checks++; if (txd !== 1'b0) failures++;          // start bit
      for (int i = 0; i < 8; i++) begin
        #(BIT_NS);
        checks++; if (txd !== c[i]) failures++;
      end
      #(BIT_NS);
      checks++; if (txd !== 1'b1) failures++;          // stop bit
      wait (!tx_busy);
      repeat (10) @(posedge clk);
      checks += 2;
      if (!rdy) failures++;
      if (rdata !== c) failures++;
      // acknowledge by resetting the receiver, as the controller does
      @(negedge clk); rx_rst = 1; @(negedge clk); rx_rst = 0;
      checks++; if (rdy) failures++;
      #(BIT_NS);
    end
    checks++; if (rx_busy_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
