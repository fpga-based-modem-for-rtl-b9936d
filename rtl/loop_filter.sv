// Costas loop filter: discrete proportional-integral controller.
//
// On each `in_valid` the 32-bit phase error e is folded in as
//   integ  <= integ + (e >>> KI_SHIFT)
//   adj_err = (e >>> KP_SHIFT) + integ
// so the gains are powers of two and need only shifts and adders. The
// integral term drives the steady-state error for a frequency step to zero.
// `adj_err` is a signed phase-increment offset for the NCO, registered, valid
// one clock after `in_valid`. `lf_rst` clears the integrator.
// The design approximates its gains by shifts; the shift amounts here
// (5 and 14) are this implementation's, chosen for a loop of about 800 Hz
// natural frequency and 0.6 damping with full-scale 12-bit input signals.
module loop_filter #(
  parameter int unsigned KP_SHIFT = 5,
  parameter int unsigned KI_SHIFT = 14
) (
  input  logic               clk,
  input  logic               lf_rst,
  input  logic               in_valid,
  input  logic signed [31:0] e_in,
  output logic signed [31:0] adj_err,
  output logic               out_valid
);
  logic signed [31:0] integ, integ_next;

  assign integ_next = integ + (e_in >>> KI_SHIFT);

  always_ff @(posedge clk) begin
    if (lf_rst) begin
      integ     <= '0;
      adj_err   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        integ   <= integ_next;
        adj_err <= (e_in >>> KP_SHIFT) + integ_next;
      end
    end
  end
endmodule
