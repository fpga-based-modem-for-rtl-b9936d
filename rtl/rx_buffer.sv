// 10K-bit receive storage buffer.
//
// Collects NBITS/8 characters (1250 for 10,000 bits) written one at a time
// by the buffer controller, then, on `start`, streams all NBITS bits into the
// loopback at the bit rate, one bit per `bit_tick`, LSB of each character
// first. Write handshake: the controller holds `wr` with `wdata`; the buffer
// stores the character once and raises `wr_done` until `wr` drops. `full` is
// high once all characters are in; while full no character is accepted.
// Dispensing: `start` (level) with `full` gives a one-clock `alert` for the
// transmit buffer and begins the block; the first bit goes out on the next
// `bit_tick`. `bit_o` and a one-clock
// `bit_stb` follow each `bit_tick` by one clock. When the last bit has gone out the buffer is
// empty again and `done` stays high until the next write. Between blocks the
// output idles at 1 (so the differentially encoded line keeps toggling and
// the receiver's loops stay locked) - this idle value is this
// implementation's choice.
module rx_buffer #(
  parameter int unsigned NBITS = 10_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr,
  input  logic [7:0] wdata,
  output logic       wr_done,
  output logic       full,
  input  logic       start,
  input  logic       bit_tick,
  output logic       alert,
  output logic       bit_o,
  output logic       bit_stb,
  output logic       done
);
  localparam int unsigned NCHARS = NBITS / 8;
  localparam int unsigned AW     = $clog2(NCHARS + 1);

  logic [7:0]    mem [NCHARS];
  logic [AW-1:0] wptr, rptr;
  logic [2:0]    bidx;
  logic          sending;
  logic [7:0]    cur;

  assign full = (wptr == AW'(NCHARS));
  assign cur  = mem[rptr[AW-1:0] < AW'(NCHARS) ? rptr : '0];

  always_ff @(posedge clk) begin
    if (wr && !wr_done && !full) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr    <= '0;
      rptr    <= '0;
      bidx    <= '0;
      wr_done <= 1'b0;
      sending <= 1'b0;
      alert   <= 1'b0;
      bit_o   <= 1'b1;
      bit_stb <= 1'b0;
      done    <= 1'b0;
    end else begin
      alert   <= 1'b0;
      bit_stb <= 1'b0;
      if (!wr) wr_done <= 1'b0;
      else if (!wr_done && !full) begin
        wptr    <= wptr + 1'b1;
        wr_done <= 1'b1;
        done    <= 1'b0;
      end
      if (start && full && !sending) begin
        sending <= 1'b1;
        alert   <= 1'b1;
        rptr    <= '0;
        bidx    <= '0;
      end
      if (bit_tick) begin
        bit_stb <= 1'b1;
        if (sending) begin
          bit_o <= cur[bidx];
          bidx  <= bidx + 1'b1;
          if (bidx == 3'd7) begin
            rptr <= rptr + 1'b1;
            if (rptr == AW'(NCHARS - 1)) begin
              sending <= 1'b0;
              wptr    <= '0;
              done    <= 1'b1;
            end
          end
        end else begin
          bit_o <= 1'b1;
        end
      end
    end
  end
endmodule
