// End-to-end test of the modem: plays the PC bit-error tester.
//
// Sends a block of NBITS/8 random characters to the modem over its RS-232
// input at 1200 baud, 8N1, waits for the block to come back on the RS-232
// output, and compares every returned bit with the sent one (bit error rate
// must be 0). The block size is reduced (NBITS = 160, 20 characters) so the
// test runs in seconds; clock, sample rate, baud, bit rate and carrier are
// the defaults. Two blocks are run: the first over a clean channel, the
// second with the noise source switched on. The test also counts how often
// each mechanism happened - every controller state, each LED, the
// receive-buffer alert, the transmit-buffer delay, the noise source, phase
// reversals in the modulator - and counts a failure for any that never did.
module tb_modem_top;
  timeunit 1ns; timeprecision 1ps;
  import modem_pkg::*;

  localparam int NBITS  = 160;
  localparam int NCHARS = NBITS / 8;
  localparam real BIT_NS = 1.0e9 / 1200.0;

  logic clk = 0, rst = 1, rxd = 1, txd, noise_en = 0, rec_clk;
  logic [3:0] led;
  logic signed [11:0] tx_sample;
  logic signed [15:0] demod;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  modem_top #(.NBITS(NBITS)) dut (.clk, .rst, .rxd, .txd, .led, .noise_en, .tx_sample, .demod, .rec_clk);

  // --- mechanism counters -------------------------------------------------
  int state_seen [11] = '{default: 0};
  int led_seen [4] = '{default: 0};
  int alerts = 0, delay_waits = 0, noisy_samples = 0, reversals = 0;
  always @(posedge clk) if (!rst) begin
    state_seen[int'(dut.u_ctrl.state)]++;
    for (int i = 0; i < 4; i++) if (led[i]) led_seen[i]++;
    if (dut.u_satcom.alert) alerts++;
    if (dut.u_satcom.u_txbuf.state == 2'd1 && dut.u_satcom.u_txbuf.bit_valid) delay_waits++;
    if (noise_en && dut.u_satcom.sample_en && dut.u_satcom.g_noise != 0) noisy_samples++;
  end

  // --- RS-232 driver and monitor -----------------------------------------
  task automatic send_char(input logic [7:0] c);
    rxd = 0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin rxd = c[i]; #(BIT_NS); end
    rxd = 1; #(BIT_NS);
  endtask

  logic [7:0] got [$];
  initial begin
    forever begin
      logic [7:0] c;
      @(negedge txd);
      #(BIT_NS / 2);
      if (txd == 0) begin
        for (int i = 0; i < 8; i++) begin #(BIT_NS); c[i] = txd; end
        #(BIT_NS);
        if (txd != 1) begin failures++; $display("framing error on txd"); end
        got.push_back(c);
      end
    end
  end

  task automatic run_block(input bit noisy);
    logic [7:0] sent [NCHARS];
    int bit_errors;
    got.delete();
    noise_en = noisy;
    for (int i = 0; i < NCHARS; i++) sent[i] = 8'($urandom);
    for (int i = 0; i < NCHARS; i++) send_char(sent[i]);
    // the block comes back after the loopback time and the RS-232 time
    while (got.size() < NCHARS) @(posedge clk);
    bit_errors = 0;
    for (int i = 0; i < NCHARS; i++) begin
      checks += 8;
      for (int b = 0; b < 8; b++) if (got[i][b] != sent[i][b]) bit_errors++;
    end
    failures += bit_errors;
    $display("block (noise %0d): %0d characters back, %0d bit errors", noisy, got.size(), bit_errors);
    // wait for the controller to be ready for the next block
    while (dut.u_ctrl.state != BC_RX_WAIT) @(posedge clk);
  endtask

  always @(posedge clk) if (!rst && dut.u_satcom.u_mod.dds_valid &&
                            dut.u_satcom.u_mod.phase[31] != dut.u_satcom.u_mod.half_prev &&
                            dut.u_satcom.u_mod.pending != dut.u_satcom.u_mod.polarity) reversals++;

  initial begin
    repeat (20) @(posedge clk);
    rst = 0;
    #(20 * BIT_NS);
    run_block(0);
    run_block(1);
    for (int s = 0; s < 11; s++) begin
      checks++;
      if (state_seen[s] == 0) begin failures++; $display("controller state %0d never entered", s); end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (led_seen[i] == 0) begin failures++; $display("LED%0d never lit", i); end
    end
    checks += 4;
    if (alerts != 2)        begin failures++; $display("alerts: %0d", alerts); end
    if (delay_waits == 0)   begin failures++; $display("transmit delay never counted"); end
    if (noisy_samples == 0) begin failures++; $display("noise never applied"); end
    if (reversals == 0)     begin failures++; $display("no phase reversal"); end
    $display("mechanisms: alerts=%0d delay_bits=%0d noisy_samples=%0d reversals=%0d",
             alerts, delay_waits, noisy_samples, reversals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000;  // watchdog: 2 s of simulated time
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
