// RS-232 receiver, 8 data bits, no parity, 1 stop bit (8N1), LSB first.
//
// The line idles high. A falling edge starts a character; the receiver waits
// half a bit to the middle of the start bit, checks it is still low, then
// samples the eight data bits and the stop bit each one bit time
// (CLK_HZ / BAUD clocks) apart. A character with a good stop bit is
// presented on `data` with `rdy` high; `rdy` stays high until the receiver
// is reset, which is how the buffer controller acknowledges it, and no new
// character is taken meanwhile. `busy` is high while a character is coming
// in. The input is synchronised with two flip-flops.
module uart_rx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 1200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       rdy,
  output logic       busy
);
  localparam int unsigned BIT_CLKS = CLK_HZ / BAUD;
  localparam int unsigned CW       = $clog2(BIT_CLKS + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_t;

  rx_state_t  state;
  logic [CW-1:0] cnt;
  logic [2:0]    nbit;
  logic [7:0]    shreg;
  logic          s1, s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= 1'b1;
      s2 <= 1'b1;
    end else begin
      s1 <= rxd;
      s2 <= s1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= RX_IDLE;
      cnt   <= '0;
      nbit  <= '0;
      shreg <= '0;
      data  <= '0;
      rdy   <= 1'b0;
    end else begin
      unique case (state)
        RX_IDLE: if (!s2 && !rdy) begin
          state <= RX_START;
          cnt   <= CW'(BIT_CLKS / 2 - 1);
        end
        RX_START: if (cnt == '0) begin
          if (!s2) begin
            state <= RX_DATA;
            cnt   <= CW'(BIT_CLKS - 1);
            nbit  <= '0;
          end else begin
            state <= RX_IDLE;   // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        RX_DATA: if (cnt == '0) begin
          shreg <= {s2, shreg[7:1]};
          cnt   <= CW'(BIT_CLKS - 1);
          nbit  <= nbit + 1'b1;
          if (nbit == 3'd7) state <= RX_STOP;
        end else cnt <= cnt - 1'b1;
        RX_STOP: if (cnt == '0) begin
          state <= RX_IDLE;
          if (s2) begin
            data <= shreg;
            rdy  <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
        default: state <= RX_IDLE;
      endcase
    end
  end

  assign busy = (state != RX_IDLE);
endmodule
