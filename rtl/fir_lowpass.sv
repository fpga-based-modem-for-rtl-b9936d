// 31-tap low-pass FIR filter with one multiply-accumulate per system clock.
//
// Each `in_valid` pushes a 24-bit signed sample into a 31-word delay line;
// the filter then spends TAPS clocks multiplying the delay line by the
// coefficients and accumulating in 40 bits, and presents
// y = acc >>> OUT_SHIFT (16 bits, the low 24 bits dropped) with a one-clock
// `out_valid` pulse TAPS+1 clocks after `in_valid`. This needs at least
// TAPS+2 system clocks per sample (50 at 100 MHz / 2 MHz).
// The coefficients are a Hamming-windowed sinc with cut-off FC_HZ at FS_HZ,
//   h[n] = (0.54 - 0.46 cos(2 pi n/30)) * sin(2 pi fc (n-15)) / (pi (n-15)),
// scaled so that the centre tap is 4095 (12-bit unsigned integers, symmetric);
// they are computed at start-up. With the default 9600 Hz cut-off their sum
// is about 2^16, so the filter's DC gain after the shift is about 2^-8 of
// its 24-bit input. `ena` low freezes the filter, `rst` clears it.
module fir_lowpass #(
  parameter int unsigned TAPS      = 31,
  parameter int unsigned IN_W      = 24,
  parameter int unsigned OUT_W     = 16,
  parameter int unsigned ACC_W     = 40,
  parameter int unsigned OUT_SHIFT = 24,
  parameter int unsigned FC_HZ     = 9600,
  parameter int unsigned FS_HZ     = 2_000_000
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ena,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y,
  output logic                    out_valid
);
  localparam int unsigned CW = $clog2(TAPS + 1);

  logic [11:0]             coef [TAPS];
  logic signed [IN_W-1:0]  line [TAPS];
  logic signed [ACC_W-1:0] acc;
  logic [CW-1:0]           k;
  logic                    busy;

  initial begin
    for (int n = 0; n < TAPS; n++)
      coef[n] = 12'(modem_pkg::fir_coef(n, TAPS, FC_HZ, FS_HZ));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < TAPS; n++) line[n] <= '0;
      acc       <= '0;
      k         <= '0;
      busy      <= 1'b0;
      y         <= '0;
      out_valid <= 1'b0;
    end else if (ena) begin
      out_valid <= 1'b0;
      if (in_valid) begin
        line[0] <= x;
        for (int n = 1; n < TAPS; n++) line[n] <= line[n-1];
        acc  <= '0;
        k    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        acc <= acc + ACC_W'(line[k] * signed'({1'b0, coef[k]}));
        if (k == CW'(TAPS - 1)) begin
          busy <= 1'b0;
        end
        k <= k + 1'b1;
      end else if (k == CW'(TAPS)) begin
        y         <= OUT_W'(acc >>> OUT_SHIFT);
        out_valid <= 1'b1;
        k         <= '0;
      end
    end else begin
      out_valid <= 1'b0;
    end
  end
endmodule
