// Test of the NRZ decoder (integrate-and-dump, holder, sign decision).
//
// Each simulated bit is 400 sample strobes of a demodulated level of random
// sign and amplitude 2000..8000 plus uniform noise of up to +-1.5 times the
// amplitude; the dump strobe marks the last sample of the bit. The decoded
// bit must equal the sign of the exact sum of that bit's samples, and
// bit_valid must pulse once per bit, three clocks after the clock that takes the dump strobe.
module tb_nrz_decoder;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, en = 0, dump = 0, b, bv;
  logic signed [15:0] d = 0;
  int checks = 0, failures = 0, ones = 0, nvalid = 0;
  always #5 clk = ~clk;
  nrz_decoder dut (.clk, .rst, .en, .dump, .demod(d), .bit_o(b), .bit_valid(bv));
  always @(posedge clk) if (!rst && bv) nvalid++;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int k = 0; k < 300; k++) begin
      longint s;
      int amp, sgn;
      amp = int'($urandom_range(2000, 8000)); sgn = $urandom_range(0, 1) ? 1 : -1;
      s = 0;
      for (int i = 0; i < 400; i++) begin
        int v;
        v = sgn * amp + (int'($urandom_range(0, 3 * amp)) - 3 * amp / 2);
        if (v > 32767) v = 32767;
        if (v < -32768) v = -32768;
        s += v;
        @(negedge clk); d = 16'(v); en = 1; dump = (i == 399);
        @(negedge clk); en = 0; dump = 0;
        repeat (2) @(negedge clk);
        if (i == 399) begin
          checks += 2;
          if (!bv) failures++;            
          if (b != (s > 0)) failures++;
          if (b) ones++;
        end else if (i < 397) begin
          checks++;
          if (bv) failures++;
        end
        @(negedge clk);
      end
    end
    checks += 2;
    if (nvalid != 300) failures++;
    if (ones < 100 || ones > 200) failures++;
    $display("ones %0d of 300", ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
