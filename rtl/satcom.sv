// Digital communication loopback: the whole modem between the two buffers.
//
// Transmit side: the receive buffer streams its bits at 1200 b/s (bit_clock);
// each bit is differentially encoded and BPSK-modulated onto a 4800 Hz
// carrier sampled at 2 MHz with 12-bit samples. Channel: optionally the
// LFSR noise source, shifted right by NOISE_SHIFT, is added and the sum is
// saturated to 12 bits. Receive side: the Costas loop recovers the carrier
// and demodulates, the early-late gate recovers the bit clock and decides
// each bit, and the differential decoder undoes the encoding (and with it
// any 180-degree inversion of the Costas loop). The decoded bits go to the
// transmit buffer, which starts storing DELAY_BITS bits after the receive
// buffer's `alert`.
// The buffer-side ports are the buffers' own handshakes (see rx_buffer and
// tx_buffer); `tx_sample`, `demod`, `rec_clk` and `pll_err` are test points.
module satcom #(
  parameter int unsigned SAMPLE_HZ   = 2_000_000,
  parameter int unsigned BIT_HZ      = 1200,
  parameter int unsigned CARRIER_HZ  = 4800,
  parameter int unsigned NBITS       = 10_000,
  parameter int unsigned DELAY_BITS  = 1,
  parameter int unsigned NOISE_SHIFT = 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sample_en,
  input  logic               noise_en,
  // receive buffer write side
  input  logic               rb_wr,
  input  logic [7:0]         rb_wdata,
  output logic               rb_wr_done,
  output logic               rb_full,
  input  logic               rb_start,
  output logic               rb_done,
  // transmit buffer read side
  output logic               tb_full,
  input  logic               tb_rd_req,
  output logic               tb_char_rdy,
  output logic [7:0]         tb_rdata,
  input  logic               tb_rd_ack,
  output logic               tb_empty,
  // test points
  output logic signed [11:0] tx_sample,
  output logic signed [15:0] demod,
  output logic               rec_clk,
  output logic signed [31:0] pll_err
);
  logic bit_tick, alert, src_bit, src_stb, enc_bit, enc_stb;
  logic rx_bit, rx_bit_valid, dec_bit, dec_valid, demod_valid;
  logic signed [13:0] g_noise;
  logic signed [14:0] chan_sum;
  logic signed [11:0] r;
  logic signed [11:0] unused_sine;
  logic signed [31:0] unused_adj;

  bit_clock #(.SAMPLE_HZ(SAMPLE_HZ), .BIT_HZ(BIT_HZ)) u_bitclk (
    .clk, .rst, .sample_en, .bit_tick
  );

  rx_buffer #(.NBITS(NBITS)) u_rxbuf (
    .clk, .rst, .wr(rb_wr), .wdata(rb_wdata), .wr_done(rb_wr_done), .full(rb_full),
    .start(rb_start), .bit_tick, .alert, .bit_o(src_bit), .bit_stb(src_stb), .done(rb_done)
  );

  diff_encoder u_denc (.clk, .rst, .bit_en(src_stb), .x(src_bit), .y(enc_bit));

  always_ff @(posedge clk) enc_stb <= !rst && src_stb;

  bpsk_modulator #(.SAMPLE_HZ(SAMPLE_HZ), .CARRIER_HZ(CARRIER_HZ), .OUT_W(12)) u_mod (
    .clk, .rst, .sample_en, .bit_en(enc_stb), .bit_in(enc_bit), .sample_o(tx_sample)
  );

  awgn_lfsr #(.NOISE_W(12)) u_awgn (.clk, .rst, .sample_en, .g_noise);

  // Channel: add scaled noise, saturate to 12 bits.
  always_comb begin
    chan_sum = 15'(tx_sample) + (noise_en ? 15'(g_noise >>> NOISE_SHIFT) : 15'sd0);
    if (chan_sum > 15'sd2047)       r = 12'sd2047;
    else if (chan_sum < -15'sd2048) r = -12'sd2048;
    else                            r = 12'(chan_sum);
  end

  costas_loop #(.SAMPLE_HZ(SAMPLE_HZ), .CENTER_HZ(CARRIER_HZ)) u_costas (
    .clk, .rst, .sample_en, .r, .demod, .demod_valid, .adj_err(unused_adj), .sine(unused_sine)
  );

  early_late_gate #(.SAMPLE_HZ(SAMPLE_HZ), .BIT_HZ(BIT_HZ)) u_elg (
    .clk, .rst, .sample_en, .demod, .bit_o(rx_bit), .bit_valid(rx_bit_valid),
    .clk_out(rec_clk), .pid_err(pll_err)
  );

  diff_decoder u_ddec (.clk, .rst, .bit_en(rx_bit_valid), .x(rx_bit), .y(dec_bit), .y_valid(dec_valid));

  tx_buffer #(.NBITS(NBITS), .DELAY_BITS(DELAY_BITS)) u_txbuf (
    .clk, .rst, .alert, .bit_in(dec_bit), .bit_valid(dec_valid), .full(tb_full),
    .rd_req(tb_rd_req), .char_rdy(tb_char_rdy), .rdata(tb_rdata), .rd_ack(tb_rd_ack), .empty(tb_empty)
  );
endmodule
