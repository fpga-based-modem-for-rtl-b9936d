// Test of the receive buffer (NBITS = 80, 10 characters).
//
// Characters are written with the wr / wr_done handshake until the buffer
// reports full; further writes must be refused. While idle the bit output
// must be 1 on every bit tick. A start request must give one alert pulse
// and then, on each bit tick, the stored bits LSB first; done must rise after
// the last bit, the output must return to 1s, and the buffer must accept a new
// block. Two blocks of random characters are run, with random tick spacing.
module tb_rx_buffer;
  timeunit 1ns; timeprecision 1ps;
  localparam int NBITS = 80, NCHARS = NBITS / 8;
  logic clk = 0, rst = 1, wr = 0, start = 0, tick = 0;
  logic [7:0] wdata = 0;
  logic wr_done, full, alert, bit_o, bit_stb, done;
  int checks = 0, failures = 0, alerts = 0;
  always #5 clk = ~clk;
  rx_buffer #(.NBITS(NBITS)) dut (.clk, .rst, .wr, .wdata, .wr_done, .full, .start,
    .bit_tick(tick), .alert, .bit_o, .bit_stb, .done);
  always @(posedge clk) if (!rst && alert) alerts++;

  task automatic do_tick(output logic b);
    repeat (int'($urandom_range(0, 5))) @(negedge clk);
    tick = 1; @(negedge clk); tick = 0;
    checks++; if (!bit_stb) failures++;
    b = bit_o;
  endtask

  initial begin
    logic [7:0] blk [NCHARS];
    logic b;
    repeat (3) @(posedge clk); rst = 0;
    for (int round = 0; round < 2; round++) begin
      for (int k = 0; k < 5; k++) begin do_tick(b); checks++; if (b != 1) failures++; end
      for (int c = 0; c < NCHARS; c++) begin
        checks++; if (full) failures++;
        blk[c] = 8'($urandom);
        @(negedge clk); wdata = blk[c]; wr = 1;
        while (!wr_done) @(negedge clk);
        wr = 0; @(negedge clk);
        checks++; if (wr_done) failures++;
      end
      checks++; if (!full) failures++;
      // a write into a full buffer is refused
      @(negedge clk); wdata = 8'hFF; wr = 1; repeat (4) @(negedge clk);
      checks++; if (wr_done) failures++;
      wr = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0; @(negedge clk);
      checks++; if (alerts != round + 1) failures++;
      for (int c = 0; c < NCHARS; c++)
        for (int i = 0; i < 8; i++) begin
          do_tick(b);
          checks++; if (b != blk[c][i]) failures++;
        end
      @(negedge clk);
      checks += 2; if (!done) failures++; if (full) failures++;
    end
    for (int k = 0; k < 5; k++) begin do_tick(b); checks++; if (b != 1) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
