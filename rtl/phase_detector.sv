// Costas loop phase detector: err = y_I * y_Q.
//
// Multiplying the filtered in-phase and quadrature arms removes the data sign
// (m^2 = 1) and leaves an error proportional to sin(2 * phase error). Signed
// 16 x 16 inputs give a 32-bit product, registered on `in_valid` (one clock
// of latency, `out_valid` pulses with it).
module phase_detector (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic signed [15:0] y_i,
  input  logic signed [15:0] y_q,
  output logic signed [31:0] err,
  output logic               out_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      err       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) err <= y_i * y_q;
    end
  end
endmodule
