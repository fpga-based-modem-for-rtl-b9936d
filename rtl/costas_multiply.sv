// Costas loop input mixers: the received sample times the NCO's I and Q.
//
// Two signed 12 x 12 multipliers give full-precision 24-bit products:
// x_I = r * I (in-phase arm) and x_Q = r * Q (quadrature arm). Both products
// are registered on the sample strobe (one clock of latency) and `valid`
// pulses with them. Widths are the design's.
module costas_multiply #(
  parameter int unsigned IN_W = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic signed [IN_W-1:0]   r,
  input  logic signed [IN_W-1:0]   i_lo,
  input  logic signed [IN_W-1:0]   q_lo,
  output logic signed [2*IN_W-1:0] x_i,
  output logic signed [2*IN_W-1:0] x_q,
  output logic                     valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      x_i   <= '0;
      x_q   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        x_i <= r * i_lo;
        x_q <= r * q_lo;
      end
    end
  end
endmodule
