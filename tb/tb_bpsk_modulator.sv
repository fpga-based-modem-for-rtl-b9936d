// Test of the BPSK modulator.
//
// Drives random bits at 1200 b/s and rebuilds the expected output here: a
// 4800 Hz sine (2^32*4800/2e6 increment, 12-bit table) whose sign follows the
// bit, switching only at the first sample of a carrier half cycle after the
// bit strobe. Every output sample is compared with that model (1 LSB
// tolerance); the number of phase reversals is also checked against the
// number of bit changes.
module tb_bpsk_modulator;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, sample_en = 0, bit_en = 0, bit_in = 0;
  logic signed [11:0] y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  bpsk_modulator dut (.clk, .rst, .sample_en, .bit_en, .bit_in, .sample_o(y));
  initial begin
    logic [31:0] ph, inc;
    bit pend, pol, half;
    int nchanges, nrev;
    real e;
    inc = 32'd10307922; ph = 0; pend = 1; pol = 1; half = 0; nchanges = 0; nrev = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int n = 0; n < 40000; n++) begin
      @(negedge clk);
      if (n % 1667 == 100) begin
        bit nb;
        nb = 1'($urandom);
        if (nb != pend) nchanges++;
        bit_in = nb; bit_en = 1; pend = nb;
        @(negedge clk); bit_en = 0;
      end
      sample_en = 1; @(negedge clk); sample_en = 0;
      @(negedge clk);   // output registered one clock after the DDS
      if (ph[31] != half) begin
        if (pol != pend) nrev++;
        pol = pend;
      end
      half = ph[31];
      e = 2047.0 * $sin(6.283185307179586 * real'(ph[31:20]) / 4096.0);
      if (!pol) e = -e;
      checks++;
      if (real'(y) > e + 1.0 || real'(y) < e - 1.0) failures++;
      ph += inc;
    end
    checks++;
    if (nrev != nchanges) failures++;
    $display("reversals %0d, bit changes %0d", nrev, nchanges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
