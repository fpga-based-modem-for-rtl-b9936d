// Test of the sample-strobe generator: the strobe must be one clock wide and
// come exactly every CLK_HZ/SAMPLE_HZ = 50 clocks (2 MHz from 100 MHz).
module tb_clock_gen;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, sample_en;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  clock_gen dut (.clk, .rst, .sample_en);
  initial begin
    int last, cyc, n;
    last = -1; cyc = 0; n = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    while (n < 100) begin
      @(posedge clk); #1; cyc++;
      if (sample_en) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != 50) failures++;
        end
        last = cyc; n++;
        @(posedge clk); #1; cyc++;
        checks++;
        if (sample_en) failures++;   // one clock wide
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
