// Costas loop numerically controlled oscillator.
//
// A DDS whose phase increment is the centre-frequency increment plus the
// loop filter's signed adjustment: inc = CENTER_INC + adj_err, so with zero
// error it runs at the 4800 Hz carrier (CENTER_INC = 2^32 * 4800 / 2 MHz).
// It returns I = sin and Q = cos as 12-bit signed samples from a 4096-entry
// table, registered one clock after `en`. `nco_ena` gates the phase
// accumulator and `nco_rst` clears it.
module costas_nco #(
  parameter int unsigned SAMPLE_HZ  = 2_000_000,
  parameter int unsigned CENTER_HZ  = 4800
) (
  input  logic               clk,
  input  logic               nco_rst,
  input  logic               nco_ena,
  input  logic               en,
  input  logic signed [31:0] adj_err,
  output logic signed [11:0] i_o,
  output logic signed [11:0] q_o
);
  import modem_pkg::*;

  localparam logic [31:0] CENTER_INC = phase_inc(64'(CENTER_HZ), 64'(SAMPLE_HZ));

  logic [31:0] unused_phase;

  dds #(.ACC_W(32), .LUT_AW(12), .OUT_W(12)) u_dds (
    .clk, .rst(nco_rst), .en(en & nco_ena), .phase_inc(CENTER_INC + unsigned'(adj_err)),
    .sin_o(i_o), .cos_o(q_o), .phase_o(unused_phase)
  );
endmodule
