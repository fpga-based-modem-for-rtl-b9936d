// Test of the transmit buffer (NBITS = 80, 10 characters, DELAY_BITS = 1).
//
// Before the alert all incoming bits must be ignored (a full buffer stays
// full until the next alert). After the alert the
// first DELAY_BITS bits are discarded (the loopback latency), the next NBITS
// bits are packed LSB first into characters, and full must rise after the
// last one. Characters are then read with rd_req / char_rdy / rd_ack and
// compared; empty must rise after the last character. Two blocks are run
// with random bits and random strobe spacing.
module tb_tx_buffer;
  timeunit 1ns; timeprecision 1ps;
  localparam int NBITS = 80, NCHARS = NBITS / 8;
  logic clk = 0, rst = 1, alert = 0, bin = 0, bv = 0, rd_req = 0, rd_ack = 0;
  logic full, char_rdy, empty;
  logic [7:0] rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  tx_buffer #(.NBITS(NBITS), .DELAY_BITS(1)) dut (.clk, .rst, .alert, .bit_in(bin), .bit_valid(bv),
    .full, .rd_req, .char_rdy, .rdata, .rd_ack, .empty);

  task automatic send_bit(input logic b);
    repeat (int'($urandom_range(0, 4))) @(negedge clk);
    bin = b; bv = 1; @(negedge clk); bv = 0;
  endtask

  initial begin
    logic [7:0] blk [NCHARS];
    repeat (3) @(posedge clk); rst = 0;
    for (int round = 0; round < 2; round++) begin
      for (int k = 0; k < 20; k++) send_bit(1'($urandom));   // ignored, no alert yet
      checks++; if (full != (round == 1)) failures++;   // still full from block 1
      @(negedge clk); alert = 1; @(negedge clk); alert = 0;
      send_bit(1'($urandom));                                 // the delay bit
      for (int c = 0; c < NCHARS; c++) begin
        blk[c] = 8'($urandom);
        for (int i = 0; i < 8; i++) begin
          checks++; if (full) failures++;
          send_bit(blk[c][i]);
        end
      end
      @(negedge clk);
      checks++; if (!full) failures++;
      for (int k = 0; k < 5; k++) send_bit(1'($urandom));    // extra bits ignored
      for (int c = 0; c < NCHARS; c++) begin
        int t;
        checks++; if (empty) failures++;
        rd_req = 1; t = 0;
        while (!char_rdy && t < 10) begin @(negedge clk); t++; end
        rd_req = 0;
        checks += 2; if (!char_rdy) failures++; if (rdata != blk[c]) failures++;
        repeat (int'($urandom_range(0, 3))) @(negedge clk);
        rd_ack = 1; @(negedge clk); rd_ack = 0;
        checks++; if (char_rdy) failures++;
      end
      @(negedge clk);
      checks++; if (!empty) failures++;
      rd_req = 1; repeat (3) @(negedge clk); rd_req = 0;
      checks++; if (char_rdy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
