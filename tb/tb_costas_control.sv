// Test of the Costas loop start-up controller.
//
// After reset the NCO, arm filters and loop filter must be held in reset.
// The first data-valid strobe releases the NCO, the next clock clears and
// enables the arm filters, and after FILL_SAMPLES further strobes (the
// filters are full) the loop filter is released, which closes the loop.
// The sequence is checked at every clock for random strobe spacings, and
// then again after a second reset.
module tb_costas_control;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, dav = 0;
  logic f0e, f1e, f0r, f1r, lfr, ncoe, ncor;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  costas_control #(.FILL_SAMPLES(32)) dut (.clk, .rst, .dav, .lpf_f0_ena(f0e), .lpf_f1_ena(f1e),
    .lpf_f0_rst(f0r), .lpf_f1_rst(f1r), .lf_rst(lfr), .nco_ena(ncoe), .nco_rst(ncor));

  // expected outputs for phase: 0 reset, 1 nco, 2 fill, 3 run
  task automatic expect_phase(input int p);
    checks++;
    if (ncor != (p == 0) || ncoe != (p != 0) || f0r != (p <= 1) || f1r != (p <= 1)
        || f0e != (p >= 2) || f1e != (p >= 2) || lfr != (p != 3)) begin
      failures++;
      $display("phase %0d mismatch at %0t", p, $time);
    end
  endtask

  initial begin
    for (int round = 0; round < 2; round++) begin
      rst = 1; repeat (2) @(negedge clk); rst = 0;
      repeat (int'($urandom_range(1, 20))) begin @(negedge clk); expect_phase(0); end
      dav = 1; @(negedge clk); dav = 0; expect_phase(1);
      @(negedge clk); expect_phase(2);
      for (int s = 0; s < 32; s++) begin
        repeat (int'($urandom_range(1, 49))) begin @(negedge clk); expect_phase(2); end
        dav = 1; @(negedge clk); dav = 0;
        expect_phase(s == 31 ? 3 : 2);
      end
      repeat (200) begin dav = 1'($urandom); @(negedge clk); expect_phase(3); end
      dav = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
