// Differential decoder, y[n] = x[n] xor x[n-1].
//
// Inverse of the differential encoder: a feed-forward xor of the received bit
// with the previous received bit, so an inverted input stream decodes to the
// same data. On each `bit_en` strobe the input bit is taken, `y` is updated
// and `y_valid` pulses for one clock (one clock of latency). Reset clears the
// previous-bit register to 0.
module diff_decoder (
  input  logic clk,
  input  logic rst,
  input  logic bit_en,
  input  logic x,
  output logic y,
  output logic y_valid
);
  logic x_prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_prev  <= 1'b0;
      y       <= 1'b0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= bit_en;
      if (bit_en) begin
        y      <= x ^ x_prev;
        x_prev <= x;
      end
    end
  end
endmodule
