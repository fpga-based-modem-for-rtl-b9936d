// Test of the satellite-link chain on its own (NBITS = 48, 6 characters),
// with the buffer handshakes driven directly instead of over RS-232.
//
// A block of random characters is written into the receive buffer, the
// chain idles for 20 ms so the Costas loop and the early-late gate lock on
// the idle pattern, then the block is dispensed through the differential
// encoder, BPSK modulator, noisy channel, Costas loop, early-late gate, NRZ
// decoder and differential decoder into the transmit buffer, and read back.
// Run twice, once with the noise source off and once on. Checks: every
// returned character equals the sent one; the transmit buffer fills and
// empties; the recovered bit clock toggles at close to 1200 Hz; the
// demodulated signal is large (loop locked) during the block; the channel
// noise is really present when switched on.
module tb_satcom;
  timeunit 1ns; timeprecision 1ps;
  localparam int NBITS = 48, NCHARS = NBITS / 8;
  logic clk = 0, rst = 1, sample_en = 0, noise_en = 0;
  logic rb_wr = 0, rb_start = 0, tb_rd_req = 0, tb_rd_ack = 0;
  logic [7:0] rb_wdata = 0, tb_rdata;
  logic rb_wr_done, rb_full, rb_done, tb_full, tb_char_rdy, tb_empty, rec_clk;
  logic signed [11:0] tx_sample;
  logic signed [15:0] demod;
  logic signed [31:0] pll_err;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  satcom #(.NBITS(NBITS)) dut (.clk, .rst, .sample_en, .noise_en, .rb_wr, .rb_wdata, .rb_wr_done,
    .rb_full, .rb_start, .rb_done, .tb_full, .tb_rd_req, .tb_char_rdy, .tb_rdata, .tb_rd_ack,
    .tb_empty, .tx_sample, .demod, .rec_clk, .pll_err);

  int scnt = 0;
  always @(posedge clk) begin
    scnt <= (scnt == 49) ? 0 : scnt + 1;
    sample_en <= (scnt == 49);
  end

  // measurements
  int rec_edges = 0, big_demod = 0, demod_samples = 0, noisy = 0;
  logic rec_prev = 0, measuring = 0;
  always @(posedge clk) if (sample_en) begin
    rec_prev <= rec_clk;
    if (measuring) begin
      if (rec_clk && !rec_prev) rec_edges++;
      demod_samples++;
      if (demod > 16'sd3000 || demod < -16'sd3000) big_demod++;
      if (noise_en && dut.r != tx_sample) noisy++;
    end
  end

  initial begin
    logic [7:0] blk [NCHARS];
    repeat (3) @(posedge clk); rst = 0;
    for (int round = 0; round < 2; round++) begin
      noise_en = (round == 1);
      for (int c = 0; c < NCHARS; c++) begin
        blk[c] = 8'($urandom);
        @(negedge clk); rb_wdata = blk[c]; rb_wr = 1;
        while (!rb_wr_done) @(negedge clk);
        rb_wr = 0; @(negedge clk);
      end
      checks++; if (!rb_full) failures++;
      #20ms;
      rec_edges = 0; big_demod = 0; demod_samples = 0;
      @(negedge clk); rb_start = 1; @(negedge clk); rb_start = 0;
      measuring = 1;
      wait (!tb_full);   // the alert restarts the transmit buffer
      wait (tb_full);
      measuring = 0;
      checks++; if (!rb_done) failures++;
      // about NBITS+1 bit periods at 1200 Hz
      $display("block %0d: %0d recovered clock edges, %0d of %0d demod samples large",
               round, rec_edges, big_demod, demod_samples);
      checks += 2;
      if (rec_edges < NBITS - 1 || rec_edges > NBITS + 3) failures++;
      if (big_demod < demod_samples * 6 / 10) failures++;
      for (int c = 0; c < NCHARS; c++) begin
        checks++; if (tb_empty) failures++;
        @(negedge clk); tb_rd_req = 1;
        while (!tb_char_rdy) @(negedge clk);
        tb_rd_req = 0;
        checks++;
        if (tb_rdata != blk[c]) begin failures++; $display("char %0d sent %h got %h", c, blk[c], tb_rdata); end
        tb_rd_ack = 1; @(negedge clk); tb_rd_ack = 0;
      end
      @(negedge clk);
      checks++; if (!tb_empty) failures++;
    end
    checks++; if (noisy == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #300ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
