// Self-checking test of the early-late gate bit synchronizer.
//
// Feeds an ideal demodulated baseband (rectangular +-8000 NRZ plus a
// 9600 Hz ripple like the one the Costas arm filters leave) at 1200 b/s with
// a random starting timing offset and a small data-rate error, lets the loop
// lock on a 0101... preamble, then checks that every decided bit equals the
// transmitted bit, allowing for a fixed pipeline delay found from the
// preamble-to-data boundary. Also checks that one bit is decided per bit time.
module tb_early_late_gate;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, sample_en = 0;
  logic signed [15:0] demod;
  logic bit_o, bit_valid, clk_out;
  logic signed [31:0] pid_err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  early_late_gate dut (.clk, .rst, .sample_en, .demod, .bit_o, .bit_valid, .clk_out, .pid_err);

  // 2 MHz strobe
  int div = 0;
  always @(posedge clk) begin
    div <= (div == 49) ? 0 : div + 1;
    sample_en <= (div == 49);
  end

  // Transmitter: bit period 2e6/1200*(1+ppm) samples, as a fractional phase.
  localparam int NPRE = 200, NDATA = 600;
  bit tx_bits [NPRE+NDATA];
  real tpos, period;
  int  tx_idx;
  real t_samples;
  initial begin
    for (int i = 0; i < NPRE; i++) tx_bits[i] = i[0];
    for (int i = NPRE; i < NPRE+NDATA; i++) tx_bits[i] = 1'($urandom);
  end

  always @(posedge clk) if (sample_en) begin
    int idx;
    real rip;
    t_samples = t_samples + 1.0;
    idx = int'($floor((t_samples + tpos) / period));
    if (idx >= NPRE+NDATA) idx = NPRE+NDATA-1;
    tx_idx = idx;
    rip = 2000.0 * $sin(6.283185307179586 * 9600.0 * t_samples / 2.0e6);
    demod <= 16'($rtoi((tx_bits[idx] ? 8000.0 : -8000.0) + rip));
  end

  // Receiver side: collect decided bits and time between them.
  bit rx_bits [$];
  longint last_t = 0;
  longint cyc = 0;
  int gap_bad = 0, gaps = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bit_valid) begin
      rx_bits.push_back(bit_o);
      if (rx_bits.size() > 100) begin
        gaps++;
        // one bit per 1/1200 s = 83333 clocks, within 2 %
        if (cyc - last_t < 81666 || cyc - last_t > 85000) gap_bad++;
      end
      last_t = cyc;
    end
  end

  initial begin
    t_samples = 0.0;
    demod = 0;
    tpos = 300.0 + real'($urandom % 1000);
    period = 2.0e6 / 1200.0 * 1.0002;
    repeat (20) @(posedge clk);
    rst = 0;
    while (t_samples < period * (NPRE + NDATA - 2)) @(posedge clk);
    begin
      // find the alignment: rx_bits[k] == tx_bits[k - d] over the data part
      int best_d, best_err;
      best_err = 1 << 30; best_d = 0;
      for (int d = -3; d <= 3; d++) begin
        int e;
        e = 0;
        for (int k = NPRE + 20; k < NPRE + NDATA - 10; k++)
          if (k - d >= 0 && k < rx_bits.size() && rx_bits[k] != tx_bits[k - d]) e++;
        if (e < best_err) begin best_err = e; best_d = d; end
      end
      $display("alignment %0d, bit errors %0d, received %0d bits", best_d, best_err, rx_bits.size());
      for (int k = NPRE + 20; k < NPRE + NDATA - 10; k++) begin
        checks++;
        if (k >= rx_bits.size() || rx_bits[k] != tx_bits[k - best_d]) failures++;
      end
    end
    checks++;
    if (gap_bad != 0 || gaps < 100) begin
      failures++;
      $display("bit spacing wrong: %0d of %0d", gap_bad, gaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;  // watchdog: 1 s of simulated time
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
