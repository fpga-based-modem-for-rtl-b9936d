// Test of the Costas mixers: random signed 12-bit operands, products checked
// against the exact products, one clock of latency, held without a strobe.
module tb_costas_multiply;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, en = 0, valid;
  logic signed [11:0] r, i_lo, q_lo;
  logic signed [23:0] xi, xq;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  costas_multiply dut (.clk, .rst, .en, .r, .i_lo, .q_lo, .x_i(xi), .x_q(xq), .valid);
  initial begin
    int er, ei, eq;
    repeat (3) @(posedge clk); rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      er = int'($urandom_range(0, 4095)) - 2048; ei = int'($urandom_range(0, 4095)) - 2048;
      eq = int'($urandom_range(0, 4095)) - 2048;
      if (n == 0) begin er = -2048; ei = -2048; eq = 2047; end
      r = 12'(er); i_lo = 12'(ei); q_lo = 12'(eq); en = 1;
      @(negedge clk); en = 0;
      checks += 3;
      if (!valid) failures++;
      if (int'(xi) != er * ei) failures++;
      if (int'(xq) != er * eq) failures++;
      r = 0; @(negedge clk);
      checks++; if (int'(xi) != er * ei) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
