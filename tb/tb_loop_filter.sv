// Test of the Costas PI loop filter against a model of
//   integ += e >>> 14 ; adj = (e >>> 5) + integ
// with random errors, plus a constant error to show the integral action
// (output keeps growing) and a reset that clears it.
module tb_loop_filter;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, v = 0, ov;
  logic signed [31:0] e, adj;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  loop_filter dut (.clk, .lf_rst(rst), .in_valid(v), .e_in(e), .adj_err(adj), .out_valid(ov));
  initial begin
    longint integ, model, first;
    integ = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      e = (n < 2000) ? 32'(int'($urandom_range(0, 200_000_000)) - 100_000_000) : 32'sd50_000_000;
      v = 1; @(negedge clk); v = 0;
      integ = integ + (longint'(e) >>> 14);
      model = (longint'(e) >>> 5) + integ;
      checks += 2;
      if (!ov) failures++;
      if (longint'(adj) != model) failures++;
      if (n == 2000) first = adj;
    end
    checks++; if (adj <= first) failures++;
    rst = 1; @(negedge clk); rst = 0;
    checks++; if (adj != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
