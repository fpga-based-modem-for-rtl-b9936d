// Costas loop arm filters: identical I and Q low-pass FIR filters.
//
// Wraps two 31-tap FIR filters (see fir_lowpass) with 9600 Hz cut-off, one per
// arm, each with its own enable and reset as the Costas controller drives
// them. Inputs are the 24-bit mixer products at 2 MHz; outputs are the 16-bit
// truncated filter results y_I and y_Q, valid TAPS+1 clocks after the input.
// Identical filters keep the two arms matched, which the Costas loop needs.
module arm_filter (
  input  logic               clk,
  input  logic               in_valid,
  input  logic signed [23:0] x_i,
  input  logic signed [23:0] x_q,
  input  logic               f0_ena,
  input  logic               f1_ena,
  input  logic               f0_rst,
  input  logic               f1_rst,
  output logic signed [15:0] y_i,
  output logic signed [15:0] y_q,
  output logic               out_valid
);
  logic v_i, v_q;

  fir_lowpass u_f0 (.clk, .rst(f0_rst), .ena(f0_ena), .in_valid, .x(x_i), .y(y_i), .out_valid(v_i));
  fir_lowpass u_f1 (.clk, .rst(f1_rst), .ena(f1_ena), .in_valid, .x(x_q), .y(y_q), .out_valid(v_q));

  assign out_valid = v_i & v_q;
endmodule
