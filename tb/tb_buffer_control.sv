// Test of the buffer controller with the real receive and transmit buffers
// (NBITS = 64, 8 characters) and simple models of the RS-232 modules.
//
// The receiver model presents a random character (rdy held until the
// controller resets the receiver) after a random gap and is busy while
// "receiving"; the transmitter model records each started character and
// stays busy for a random time. The receive-buffer bit stream is looped
// straight into the transmit buffer (no delay). Checks: the characters sent
// out equal the ones received, in order; the LEDs match the state at every
// clock (LED0 S0-S5, LED1 S6, LED2 S7-S10, LED3 = either RS-232 module busy);
// every one of the eleven states is visited; tx_start is never raised while
// the transmitter is busy. Two blocks are run.
module tb_buffer_control;
  timeunit 1ns; timeprecision 1ps;
  import modem_pkg::*;
  localparam int NBITS = 64, NCHARS = NBITS / 8;
  logic clk = 0, rst = 1, tick = 0;
  logic rx_rst, rx_rdy = 0, rx_busy = 0, tx_busy = 0, tx_start;
  logic [7:0] rx_data = 0, rb_data, tb_data, tx_data;
  logic rb_wr, rb_wr_done, rb_full, rb_start, rb_done, alert, sbit, sstb;
  logic tb_full, tb_rd_req, tb_char_rdy, tb_rd_ack, tb_empty;
  logic [3:0] led;
  bc_state_t st;
  int checks = 0, failures = 0;
  int seen [11] = '{default: 0};
  logic [7:0] sent [$], got [$];
  always #5 clk = ~clk;

  buffer_control dut (.clk, .rst, .rx_rst, .rx_rdy, .rx_data, .rx_busy, .rb_wr, .rb_data,
    .rb_wr_done, .rb_full, .rb_start, .rb_done, .tb_full, .tb_rd_req, .tb_char_rdy, .tb_data,
    .tb_rd_ack, .tb_empty, .tx_start, .tx_data, .tx_busy, .led, .state_o(st));
  rx_buffer #(.NBITS(NBITS)) u_rb (.clk, .rst, .wr(rb_wr), .wdata(rb_data), .wr_done(rb_wr_done),
    .full(rb_full), .start(rb_start), .bit_tick(tick), .alert, .bit_o(sbit), .bit_stb(sstb), .done(rb_done));
  tx_buffer #(.NBITS(NBITS), .DELAY_BITS(0)) u_tb (.clk, .rst, .alert, .bit_in(sbit), .bit_valid(sstb),
    .full(tb_full), .rd_req(tb_rd_req), .char_rdy(tb_char_rdy), .rdata(tb_data), .rd_ack(tb_rd_ack), .empty(tb_empty));

  // bit clock: one tick every 7 clocks
  int tcnt = 0;
  always @(posedge clk) begin
    tcnt <= (tcnt == 6) ? 0 : tcnt + 1;
    tick <= (tcnt == 6);
  end

  // per-clock checks
  always @(negedge clk) if (!rst) begin
    seen[int'(st)]++;
    checks++;
    if (led[0] != (st <= BC_DISPENSE) || led[1] != (st == BC_LOOPBACK)
        || led[2] != (st >= BC_TX_IDLE) || led[3] != (rx_busy | tx_busy)) failures++;
    if (tx_start && tx_busy) begin checks++; failures++; end
  end

  // RS-232 receiver model
  int to_send = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (to_send > 0 && !rx_rdy && !rx_rst && (st == BC_RX_WAIT)) begin
        rx_busy = 1;
        repeat (int'($urandom_range(5, 30))) @(negedge clk);
        rx_busy = 0;
        rx_data = 8'($urandom); rx_rdy = 1; sent.push_back(rx_data); to_send--;
      end
      if (rx_rst) rx_rdy = 0;
    end
  end

  // RS-232 transmitter model
  initial begin
    forever begin
      @(posedge clk);
      if (tx_start && !tx_busy) begin
        got.push_back(tx_data);
        #1 tx_busy = 1;
        repeat (int'($urandom_range(2, 40))) @(posedge clk);
        #1 tx_busy = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int round = 0; round < 2; round++) begin
      to_send = NCHARS;
      wait (got.size() == NCHARS * (round + 1));
      repeat (50) @(negedge clk);
      checks++; if (st != BC_RX_WAIT) failures++;
    end
    checks++; if (got.size() != sent.size()) failures++;
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      checks++; if (got[i] != sent[i]) failures++;
    end
    for (int s = 0; s < 11; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
