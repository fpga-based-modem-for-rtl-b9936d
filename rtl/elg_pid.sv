// Timing-loop controller of the early-late gate.
//
// A first-order recursive filter, updated once per bit on `update`:
//   y[n] = y[n-1] + (A_NUM * x[n] + B_NUM * x[n-1]) / 2^SHIFT
// which is a proportional-integral controller with integral gain
// (A_NUM + B_NUM) / 2^SHIFT and proportional gain -B_NUM / 2^SHIFT. The input
// is the early-minus-late energy difference; the output is a signed
// phase-increment offset for the bit-clock NCO. The recursive form is the
// design's; the default coefficients (2 and -1 over 256, i.e. equal
// proportional and integral gains of 1/256) are this implementation's,
// chosen by simulation so that the loop settles in a few tens of bits with a
// full-scale (about +-8000) demodulated signal. `y` is registered, one clock after `update`.
module elg_pid #(
  parameter int          IN_W  = 29,
  parameter int          A_NUM = 2,
  parameter int          B_NUM = -1,
  parameter int unsigned SHIFT = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   update,
  input  logic signed [IN_W-1:0] x,
  output logic signed [31:0]     y
);
  logic signed [IN_W-1:0] x_prev;
  logic signed [IN_W+8:0] term;

  assign term = ((IN_W+9)'(A_NUM) * (IN_W+9)'(x) + (IN_W+9)'(B_NUM) * (IN_W+9)'(x_prev)) >>> SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_prev <= '0;
      y      <= '0;
    end else if (update) begin
      x_prev <= x;
      y      <= y + 32'(term);
    end
  end
endmodule
