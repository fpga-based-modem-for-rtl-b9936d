// Transmit bit-rate strobe.
//
// A 32-bit phase accumulator advanced by 2^32 * BIT_HZ / SAMPLE_HZ on every
// sample strobe (2576980 for 1200 b/s at 2 MHz); each wrap-around gives a
// one-clock `bit_tick`. The average rate is exact to 0.0005 Hz although
// 2 MHz is not a multiple of 1200 Hz.
module bit_clock #(
  parameter int unsigned SAMPLE_HZ = 2_000_000,
  parameter int unsigned BIT_HZ    = 1200
) (
  input  logic clk,
  input  logic rst,
  input  logic sample_en,
  output logic bit_tick
);
  import modem_pkg::*;

  localparam logic [31:0] INC = phase_inc(64'(BIT_HZ), 64'(SAMPLE_HZ));

  logic [31:0] acc;
  logic [32:0] sum;

  assign sum = {1'b0, acc} + {1'b0, INC};

  always_ff @(posedge clk) begin
    if (rst) begin
      acc      <= '0;
      bit_tick <= 1'b0;
    end else begin
      bit_tick <= 1'b0;
      if (sample_en) begin
        acc      <= sum[31:0];
        bit_tick <= sum[32];
      end
    end
  end
endmodule
