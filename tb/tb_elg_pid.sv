// Test of the early-late gate loop filter against the difference equation
//   y[n] = y[n-1] + (A*x[n] + B*x[n-1]) >>> SHIFT    (A = 2, B = -1, SHIFT = 8)
// with random 29-bit inputs applied on random update strobes; the output
// must not change between strobes. A constant input must make the output
// ramp by (A+B)*x >>> SHIFT per update (integral action).
module tb_elg_pid;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, upd = 0;
  logic signed [28:0] x = 0;
  logic signed [31:0] y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  elg_pid dut (.clk, .rst, .update(upd), .x, .y);
  initial begin
    longint m, xp, xn;
    m = 0; xp = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      xn = (n < 2000) ? longint'(int'($urandom_range(0, 2_000_000)) - 1_000_000) : 64'sd300_000;
      x = 29'(xn);
      upd = 1'($urandom);
      if (n >= 2000) upd = 1;
      if (upd) begin
        m = m + ((2 * xn - xp) >>> 8);
        m = longint'(int'(m));   // 32-bit wrap
        xp = xn;
      end
      @(negedge clk); upd = 0;
      checks++;
      if (longint'(y) != m) failures++;
      if (n == 2500) begin
        longint y0;
        y0 = y;
        @(negedge clk); x = 29'sd300_000; upd = 1; @(negedge clk); upd = 0;
        checks++; if (longint'(y) - y0 != (64'sd300_000 >>> 8)) failures++;
        m = y;
      end
    end
    rst = 1; @(negedge clk); rst = 0;
    checks++; if (y != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
