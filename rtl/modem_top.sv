// Top-level I/O wrapper of the 1200 b/s BPSK modem test set-up.
//
// A PC bit-error tester sends a block of 1250 characters (10,000 bits) over
// RS-232 at 1200 baud, 8N1. The receiver (uart_rx) and the buffer controller
// store it in the receive buffer; the block is then sent through the full
// modem loopback (satcom: differential encoder, BPSK modulator, channel,
// Costas loop, early-late gate, differential decoder) into the transmit
// buffer, and the controller returns it character by character through the
// RS-232 transmitter (uart_tx) for the bit-error count.
// Clocking: one 100 MHz clock; clock_gen makes the 2 MHz sample strobe.
// Ports: `rxd`/`txd` are the RS-232 lines (idle high), `led` shows the
// controller's phase (LED0 receiving, LED1 loopback, LED2 returning, LED3
// RS-232 activity), `noise_en` switches in the LFSR noise source, and
// `tx_sample`, `demod`, `rec_clk` are the signals the hardware sent to its
// DAC test ports.
module modem_top #(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned SAMPLE_HZ   = 2_000_000,
  parameter int unsigned BAUD        = 1200,
  parameter int unsigned BIT_HZ      = 1200,
  parameter int unsigned CARRIER_HZ  = 4800,
  parameter int unsigned NBITS       = 10_000,
  parameter int unsigned DELAY_BITS  = 1,
  parameter int unsigned NOISE_SHIFT = 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               rxd,
  output logic               txd,
  output logic [3:0]         led,
  input  logic               noise_en,
  output logic signed [11:0] tx_sample,
  output logic signed [15:0] demod,
  output logic               rec_clk
);
  import modem_pkg::*;

  logic sample_en;
  logic rx_rst, rx_rdy, rx_busy, tx_start, tx_busy;
  logic [7:0] rx_data, tx_data, rb_wdata, tb_rdata;
  logic rb_wr, rb_wr_done, rb_full, rb_start, rb_done;
  logic tb_full, tb_rd_req, tb_char_rdy, tb_rd_ack, tb_empty;
  logic signed [31:0] unused_pll_err;
  bc_state_t unused_state;

  clock_gen #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_clk (.clk, .rst, .sample_en);

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rcvr (
    .clk, .rst(rst | rx_rst), .rxd, .data(rx_data), .rdy(rx_rdy), .busy(rx_busy)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_txmit (
    .clk, .rst, .start(tx_start), .data(tx_data), .txd, .busy(tx_busy)
  );

  buffer_control u_ctrl (
    .clk, .rst,
    .rx_rst, .rx_rdy, .rx_data, .rx_busy,
    .rb_wr, .rb_data(rb_wdata), .rb_wr_done, .rb_full, .rb_start, .rb_done,
    .tb_full, .tb_rd_req, .tb_char_rdy, .tb_data(tb_rdata), .tb_rd_ack, .tb_empty,
    .tx_start, .tx_data, .tx_busy,
    .led, .state_o(unused_state)
  );

  satcom #(.SAMPLE_HZ(SAMPLE_HZ), .BIT_HZ(BIT_HZ), .CARRIER_HZ(CARRIER_HZ), .NBITS(NBITS),
           .DELAY_BITS(DELAY_BITS), .NOISE_SHIFT(NOISE_SHIFT)) u_satcom (
    .clk, .rst, .sample_en, .noise_en,
    .rb_wr, .rb_wdata, .rb_wr_done, .rb_full, .rb_start, .rb_done,
    .tb_full, .tb_rd_req, .tb_char_rdy, .tb_rdata, .tb_rd_ack, .tb_empty,
    .tx_sample, .demod, .rec_clk, .pll_err(unused_pll_err)
  );
endmodule
