// Test of the Costas arm filters.
//
// The reference model holds its own 31-sample delay lines and its own copy of
// the coefficients (Hamming-windowed sinc, 9600 Hz cut-off at 2 MHz, centre
// tap 4095) and computes y = sum(x*h) >>> 24 for each arm. Random 24-bit
// samples are pushed every 50 clocks, as at 2 MHz, and both outputs are
// compared exactly when out_valid pulses. Also checked: the coefficient set
// is symmetric with a 4095 centre, a DC input gives a DC output of the
// expected gain, f0_ena/f1_ena low freeze the filters, and a reset clears them.
module tb_arm_filter;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, v = 0, ena = 0, frst = 1, ov;
  logic signed [23:0] xi = 0, xq = 0;
  logic signed [15:0] yi, yq;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  arm_filter dut (.clk, .in_valid(v), .x_i(xi), .x_q(xq), .f0_ena(ena), .f1_ena(ena),
                  .f0_rst(frst), .f1_rst(frst), .y_i(yi), .y_q(yq), .out_valid(ov));

  int h [31];
  longint li [31], lq [31];

  task automatic push(input int a, input int b, output longint ei, output longint eq);
    for (int n = 30; n > 0; n--) begin li[n] = li[n-1]; lq[n] = lq[n-1]; end
    li[0] = a; lq[0] = b;
    ei = 0; eq = 0;
    for (int n = 0; n < 31; n++) begin ei += li[n] * h[n]; eq += lq[n] * h[n]; end
    ei = ei >>> 24; eq = eq >>> 24;
    @(negedge clk); xi = 24'(a); xq = 24'(b); v = 1;
    @(negedge clk); v = 0;
  endtask

  task automatic wait_out(input longint ei, input longint eq);
    int t;
    t = 0;
    while (!ov && t < 45) begin @(negedge clk); t++; end
    checks += 3;
    if (!ov) failures++;
    if (longint'(yi) != ei) failures++;
    if (longint'(yq) != eq) failures++;
    repeat (47 - t) @(negedge clk);
  endtask

  initial begin
    longint ei, eq, sumh;
    real fc;
    fc = 9600.0 / 2.0e6;
    sumh = 0;
    for (int n = 0; n < 31; n++) begin
      real w, s;
      w = 0.54 - 0.46 * $cos(2.0 * 3.141592653589793 * n / 30.0);
      s = (n == 15) ? 1.0 : $sin(2.0 * 3.141592653589793 * fc * (n - 15)) / (3.141592653589793 * (n - 15)) / (2.0 * fc);
      h[n] = $rtoi(4095.0 * w * s + 0.5);
      sumh += h[n];
      li[n] = 0; lq[n] = 0;
    end
    checks += 2;
    if (h[15] != 4095) failures++;
    for (int n = 0; n < 15; n++) if (h[n] != h[30-n]) begin failures++; break; end
    repeat (3) @(posedge clk); frst = 0; ena = 1;
    // random samples
    for (int k = 0; k < 400; k++) begin
      push(int'($urandom_range(0, 16777215)) - 8388608, int'($urandom_range(0, 16777215)) - 8388608, ei, eq);
      wait_out(ei, eq);
    end
    // DC: after 31 samples of a constant the output is c*sum(h) >>> 24
    for (int k = 0; k < 31; k++) begin push(4_000_000, -4_000_000, ei, eq); wait_out(ei, eq); end
    checks += 2;
    if (longint'(yi) != (64'sd4_000_000 * sumh) >>> 24) failures++;
    if (longint'(yq) != (-64'sd4_000_000 * sumh) >>> 24) failures++;
    // frozen: input strobes ignored, output held
    ena = 0;
    begin
      logic signed [15:0] held;
      held = yi;
      for (int k = 0; k < 10; k++) begin
        @(negedge clk); xi = 24'(k * 1000); v = 1; @(negedge clk); v = 0;
        repeat (48) begin @(negedge clk); checks++; if (ov || yi != held) failures++; end
      end
    end
    // reset clears the delay line and output
    frst = 1; @(negedge clk); frst = 0; ena = 1;
    checks += 2; if (yi != 0 || yq != 0) failures++;
    for (int n = 0; n < 31; n++) begin li[n] = 0; lq[n] = 0; end
    push(1_000_000, 2_000_000, ei, eq); wait_out(ei, eq);
    if (ei == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
