// Test of the phase detector: random signed 16-bit arm outputs, the 32-bit
// product checked exactly, one clock of latency.
module tb_phase_detector;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, v = 0, ov;
  logic signed [15:0] a, b;
  logic signed [31:0] e;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  phase_detector dut (.clk, .rst, .in_valid(v), .y_i(a), .y_q(b), .err(e), .out_valid(ov));
  initial begin
    int ea, eb;
    repeat (3) @(posedge clk); rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ea = int'($urandom_range(0, 65535)) - 32768; eb = int'($urandom_range(0, 65535)) - 32768;
      a = 16'(ea); b = 16'(eb); v = 1;
      @(negedge clk); v = 0;
      checks += 2;
      if (!ov) failures++;
      if (longint'(e) != longint'(ea) * longint'(eb)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
