// Self-checking test of the Costas loop carrier recovery.
//
// The received BPSK signal is synthesised here from real-valued math:
// r = 2047 * m * sin(2 pi f t + theta), with random data m = +-1 at 1200 b/s.
// Two runs: a 60-degree phase offset at 4800 Hz, and a +200 Hz frequency
// offset (5000 Hz). For each run the test checks that
//   - after 5 ms the NCO adjustment (averaged over 1 ms) settles to the increment of the offset
//     frequency (within 20 Hz), i.e. the loop locked within the 5 ms budget;
//   - the sign of the demodulated output in the middle of every bit matches
//     the data (allowing one global inversion, the BPSK ambiguity).
module tb_costas_loop;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, sample_en = 0;
  logic signed [11:0] r = 0;
  logic signed [15:0] demod;
  logic demod_valid;
  logic signed [31:0] adj_err;
  logic signed [11:0] sine;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  costas_loop dut (.clk, .rst, .sample_en, .r, .demod, .demod_valid, .adj_err, .sine);

  int div = 0;
  always @(posedge clk) begin
    div <= (div == 49) ? 0 : div + 1;
    sample_en <= (div == 49);
  end

  real f_rx, theta;
  longint n = 0;
  bit data [2000];
  always @(posedge clk) if (sample_en) begin
    int b;
    b = int'(n * 1200 / 2000000);
    r <= 12'($rtoi((data[b % 2000] ? 2047.0 : -2047.0) *
                   $sin(6.283185307179586 * f_rx * real'(n) / 2.0e6 + theta)));
    n <= n + 1;
  end

  task automatic run(input real f, input real th, input string name);
    int agree, disagree;
    real f_est;
    f_rx = f; theta = th; n = 0;
    for (int i = 0; i < 2000; i++) data[i] = 1'($urandom);
    rst = 1;
    repeat (100) @(posedge clk);
    rst = 0;
    // 5 ms lock budget
    while (n < 10000) @(posedge clk);
    // average the NCO adjustment over the next 1 ms (it carries ripple)
    f_est = 0.0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge sample_en);
      f_est += real'(adj_err);
    end
    f_est = 4800.0 + f_est / 2000.0 * 2.0e6 / 4294967296.0;
    checks++;
    if (f_est < f - 20.0 || f_est > f + 20.0) begin
      failures++;
      $display("%s: NCO at %f Hz after 5 ms, expected %f", name, f_est, f);
    end
    // data check over the next 60 bits, mid-bit samples (FIR delay ~8 us)
    agree = 0; disagree = 0;
    for (int k = 9; k < 69; k++) begin
      while (n < longint'((real'(k) + 0.5) * 2.0e6 / 1200.0)) @(posedge clk);
      @(posedge demod_valid);
      if ((demod > 0) == data[k]) agree++; else disagree++;
    end
    $display("%s: f_est=%f agree=%0d disagree=%0d", name, f_est, agree, disagree);
    checks += 60;
    failures += (agree > disagree) ? disagree : agree;
  endtask

  initial begin
    run(4800.0, 3.141592653589793 / 3.0, "phase step 60 deg");
    run(5000.0, 3.141592653589793 / 3.0, "frequency step +200 Hz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
