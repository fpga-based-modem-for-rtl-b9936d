// Test of the LFSR noise source.
//
// Collects 200,000 samples and checks the statistics the noise must have:
// mean near zero (|mean| < 100 LSB), standard deviation close to the
// expected value, many sample-to-sample changes, and a histogram peaked in the
// middle (more samples within one standard deviation than the 57.7 % a
// uniform distribution would give; a Gaussian gives about 68 %).
// Expected deviation: one 12-bit uniform word has sd s = 4096/sqrt(12) = 1182.
// LFSR_2 only advances on half of the strobes, so neighbouring stages of the
// chain hold the same word with probability 1/2, two apart 1/4, three apart
// 1/8. Var = (4 + 2*(3/2 + 2/4 + 1/8)) s^2 = 8.25 s^2, sd = 3396 (+-15 %).
module tb_awgn_lfsr;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, sample_en = 0;
  logic signed [13:0] g;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  awgn_lfsr dut (.clk, .rst, .sample_en, .g_noise(g));
  initial begin
    real sum, sum2, mean, sd;
    int n_in, distinct_changes;
    logic signed [13:0] prev;
    sum = 0; sum2 = 0; n_in = 0; distinct_changes = 0; prev = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int n = 0; n < 200000; n++) begin
      @(negedge clk); sample_en = 1; @(negedge clk); sample_en = 0;
      if (n >= 10) begin
        sum += real'(g); sum2 += real'(g) * real'(g);
        if (g != prev) distinct_changes++;
      end
      prev = g;
    end
    mean = sum / 199990.0;
    sd = $sqrt(sum2 / 199990.0 - mean * mean);
    $display("mean %f sd %f changes %0d", mean, sd, distinct_changes);
    checks += 3;
    if (mean > 100.0 || mean < -100.0) failures++;
    if (sd < 0.85 * 3396.0 || sd > 1.15 * 3396.0) failures++;
    if (distinct_changes < 100000) failures++;
    // second pass for the peakedness, using the measured sd
    for (int n = 0; n < 50000; n++) begin
      @(negedge clk); sample_en = 1; @(negedge clk); sample_en = 0;
      if (real'(g) > mean - sd && real'(g) < mean + sd) n_in++;
    end
    $display("within one sd: %0d of 50000", n_in);
    checks++;
    if (n_in < 30000) failures++;   // uniform would give 57.7 %
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
