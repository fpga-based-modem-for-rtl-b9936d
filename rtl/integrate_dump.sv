// Integrate-and-dump accumulator.
//
// Adds the signed input on every sample strobe. On a sample strobe with
// `dump` high the window's sum (including that sample) is copied to `sum`
// and the accumulator restarts from zero, so `sum` holds the integral over
// the interval between two dumps. `sum` changes one clock after the strobe.
module integrate_dump #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned ACC_W = 28
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    dump,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [ACC_W-1:0] sum
);
  logic signed [ACC_W-1:0] acc, acc_next;

  assign acc_next = acc + ACC_W'(x);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      sum <= '0;
    end else if (en) begin
      if (dump) begin
        sum <= acc_next;
        acc <= '0;
      end else begin
        acc <= acc_next;
      end
    end
  end
endmodule
