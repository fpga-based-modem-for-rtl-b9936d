// Costas loop: carrier recovery and coherent demodulation of BPSK.
//
// The received 12-bit sample r is mixed with the NCO's sine (I arm) and
// cosine (Q arm); each 24-bit product is low-pass filtered by a 31-tap FIR
// to remove the double-frequency term, leaving y_I ~ m cos(phi) and
// y_Q ~ m sin(phi) for data m = +-1 and phase error phi. Their product, the
// phase detector output ~ sin(2 phi), drives a PI loop filter whose output
// is added to the NCO's 4800 Hz centre increment. In lock y_I is the
// demodulated baseband data (`demod`, 16 bits, about +-8200 at full-scale
// input); like every Costas loop it may settle with data inverted (180-degree
// ambiguity), which the differential code removes.
// Timing: all blocks run on the 100 MHz clock and step on the 2 MHz
// `sample_en`; a new demod sample appears about 34 clocks after each strobe
// (mixer 1, FIR 32, detector and loop filter 1 each), and the NCO update is
// used at the next strobe. `adj_err` is brought out as a test point.
module costas_loop #(
  parameter int unsigned SAMPLE_HZ = 2_000_000,
  parameter int unsigned CENTER_HZ = 4800,
  parameter int unsigned KP_SHIFT  = 5,
  parameter int unsigned KI_SHIFT  = 14
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sample_en,
  input  logic signed [11:0] r,
  output logic signed [15:0] demod,
  output logic               demod_valid,
  output logic signed [31:0] adj_err,
  output logic signed [11:0] sine
);
  logic lpf_f0_ena, lpf_f1_ena, lpf_f0_rst, lpf_f1_rst, lf_rst, nco_ena, nco_rst;
  logic signed [11:0] i_lo, q_lo;
  logic signed [23:0] x_i, x_q;
  logic signed [15:0] y_i, y_q;
  logic signed [31:0] err;
  logic mult_valid, filt_valid, pd_valid, lf_valid;

  costas_control u_ctrl (
    .clk, .rst, .dav(sample_en),
    .lpf_f0_ena, .lpf_f1_ena, .lpf_f0_rst, .lpf_f1_rst, .lf_rst, .nco_ena, .nco_rst
  );

  costas_multiply u_mult (
    .clk, .rst, .en(sample_en), .r, .i_lo, .q_lo, .x_i, .x_q, .valid(mult_valid)
  );

  arm_filter u_arm (
    .clk, .in_valid(mult_valid), .x_i, .x_q,
    .f0_ena(lpf_f0_ena), .f1_ena(lpf_f1_ena), .f0_rst(lpf_f0_rst), .f1_rst(lpf_f1_rst),
    .y_i, .y_q, .out_valid(filt_valid)
  );

  phase_detector u_pd (
    .clk, .rst, .in_valid(filt_valid), .y_i, .y_q, .err, .out_valid(pd_valid)
  );

  loop_filter #(.KP_SHIFT(KP_SHIFT), .KI_SHIFT(KI_SHIFT)) u_lf (
    .clk, .lf_rst, .in_valid(pd_valid), .e_in(err), .adj_err, .out_valid(lf_valid)
  );

  costas_nco #(.SAMPLE_HZ(SAMPLE_HZ), .CENTER_HZ(CENTER_HZ)) u_nco (
    .clk, .nco_rst, .nco_ena, .en(sample_en), .adj_err, .i_o(i_lo), .q_o(q_lo)
  );

  assign demod       = y_i;
  assign demod_valid = filt_valid;
  assign sine        = i_lo;
endmodule
