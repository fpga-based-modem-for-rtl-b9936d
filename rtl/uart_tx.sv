// RS-232 transmitter, 8N1, LSB first.
//
// A one-clock `start` while idle latches `data` and sends a start bit (low),
// the eight data bits and a stop bit (high), each CLK_HZ / BAUD clocks long.
// `busy` rises the clock after `start` and falls when the stop bit has been
// sent; the buffer controller uses that rise as the handshake. The line idles
// high.
module uart_tx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 1200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       txd,
  output logic       busy
);
  localparam int unsigned BIT_CLKS = CLK_HZ / BAUD;
  localparam int unsigned CW       = $clog2(BIT_CLKS + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    nbit;
  logic [9:0]    frame;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      txd   <= 1'b1;
      cnt   <= '0;
      nbit  <= '0;
      frame <= '1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        busy  <= 1'b1;
        cnt   <= '0;
        nbit  <= '0;
      end
    end else begin
      txd <= frame[0];
      if (cnt == CW'(BIT_CLKS - 1)) begin
        cnt   <= '0;
        frame <= {1'b1, frame[9:1]};
        nbit  <= nbit + 1'b1;
        if (nbit == 4'd9) busy <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
