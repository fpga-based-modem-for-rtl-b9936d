// Test of the direct digital synthesizer.
//
// Runs at a 4800 Hz increment for 2 MHz (2^32*4800/2e6) and compares every
// sine and cosine sample with round(2047*sin/cos(2 pi * phase)), computed
// here from the accumulated phase (tolerance 1 LSB plus table quantisation
// of the 12-bit phase, i.e. 4 LSB); checks that the phase advances by the
// increment on each strobe and not without one.
module tb_dds;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, en = 0;
  logic [31:0] inc = 32'd10307922, ph;
  logic signed [11:0] s, c;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  dds dut (.clk, .rst, .en, .phase_inc(inc), .sin_o(s), .cos_o(c), .phase_o(ph));
  initial begin
    logic [31:0] model_ph;
    real a, es, ec;
    model_ph = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk); en = 1; @(negedge clk); en = 0;
      a = 6.283185307179586 * real'(model_ph[31:20]) / 4096.0;
      es = 2047.0 * $sin(a); ec = 2047.0 * $cos(a);
      checks += 3;
      if (ph !== model_ph) failures++;
      if (real'(s) > es + 1.0 || real'(s) < es - 1.0) failures++;
      if (real'(c) > ec + 1.0 || real'(c) < ec - 1.0) failures++;
      model_ph += inc;
      repeat (2) @(negedge clk);
      checks++; if (ph !== model_ph - inc) failures++;   // held without a strobe
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
