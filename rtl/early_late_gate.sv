// Early-late gate bit synchronizer with NRZ decision.
//
// Two integrate-and-dump branches integrate the demodulated baseband over one
// bit period each: the early branch dumps on the rising edge of the recovered
// clock, the late branch on its falling edge (the inverted clock), so their
// windows are half a bit apart. On each rising edge both integrals are
// rectified (absolute value), the late one is subtracted from the early one,
// and the difference drives the PI controller (elg_pid), whose output trims
// the bit-clock NCO (nco_elg). With random data the two energies balance when
// the bit boundaries fall three quarters of a bit after each rising edge,
// i.e. a quarter bit after the falling edge; the loop settles there.
// A delay of DELAY_SAMPLES (3/4 bit) after each rising edge then marks the
// bit boundary for the NRZ decoder, which integrates the demod signal over
// exactly one bit and decides its sign.
// Inputs step on the 2 MHz `sample_en`; `bit_o`/`bit_valid` give one decided
// bit per recovered bit period. `clk_out` (recovered clock) and `pid_err` are
// test points. The 1/4-bit delay is derived from this arrangement by this
// implementation; the arrangement of the blocks is the design's.
module early_late_gate #(
  parameter int unsigned SAMPLE_HZ     = 2_000_000,
  parameter int unsigned BIT_HZ        = 1200,
  parameter int unsigned DELAY_SAMPLES = SAMPLE_HZ / (4 * BIT_HZ),
  parameter int          PID_A_NUM     = 2,
  parameter int          PID_B_NUM     = -1,
  parameter int unsigned PID_SHIFT     = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sample_en,
  input  logic signed [15:0] demod,
  output logic               bit_o,
  output logic               bit_valid,
  output logic               clk_out,
  output logic signed [31:0] pid_err
);
  localparam int unsigned ACC_W = 28;
  localparam int unsigned DW    = $clog2(DELAY_SAMPLES + 2);

  logic                    rise, fall, rise_en, fall_en;
  logic signed [ACC_W-1:0] early_sum, late_sum;
  logic        [ACC_W-1:0] early_abs, late_abs;
  logic signed [ACC_W:0]   summer;
  logic                    update;
  logic [DW-1:0]           dcnt;
  logic                    dcnt_run, nrz_dump;

  // The NCO's edge pulses come one clock after a sample strobe; act on them
  // at the next strobe so that every branch sees whole samples.
  always_ff @(posedge clk) begin
    if (rst) begin
      rise_en <= 1'b0;
      fall_en <= 1'b0;
    end else begin
      if (rise) rise_en <= 1'b1; else if (sample_en) rise_en <= 1'b0;
      if (fall) fall_en <= 1'b1; else if (sample_en) fall_en <= 1'b0;
    end
  end

  integrate_dump #(.IN_W(16), .ACC_W(ACC_W)) u_early (
    .clk, .rst, .en(sample_en), .dump(rise_en), .x(demod), .sum(early_sum)
  );
  integrate_dump #(.IN_W(16), .ACC_W(ACC_W)) u_late (
    .clk, .rst, .en(sample_en), .dump(fall_en), .x(demod), .sum(late_sum)
  );

  // AbsValue blocks and SUMMER, sampled on the rising edge of clk_out.
  assign early_abs = early_sum[ACC_W-1] ? ACC_W'(-early_sum) : ACC_W'(early_sum);
  assign late_abs  = late_sum[ACC_W-1]  ? ACC_W'(-late_sum)  : ACC_W'(late_sum);

  always_ff @(posedge clk) begin
    if (rst) begin
      summer <= '0;
      update <= 1'b0;
    end else begin
      // early_sum is updated by the strobe that carries rise_en; take the
      // difference one clock later.
      update <= sample_en & rise_en;
      if (update) summer <= signed'({1'b0, early_abs}) - signed'({1'b0, late_abs});
    end
  end

  logic pid_update;
  always_ff @(posedge clk) pid_update <= !rst && update;

  elg_pid #(.IN_W(ACC_W+1), .A_NUM(PID_A_NUM), .B_NUM(PID_B_NUM), .SHIFT(PID_SHIFT)) u_pid (
    .clk, .rst, .update(pid_update), .x(summer), .y(pid_err)
  );

  nco_elg #(.SAMPLE_HZ(SAMPLE_HZ), .BIT_HZ(BIT_HZ)) u_nco (
    .clk, .rst, .en(sample_en), .pid_err, .clk_out, .rise, .fall
  );

  // Delay block: a sample counter started by each rising edge.
  always_ff @(posedge clk) begin
    if (rst) begin
      dcnt     <= '0;
      dcnt_run <= 1'b0;
    end else if (sample_en) begin
      if (rise_en) begin
        dcnt     <= '0;
        dcnt_run <= 1'b1;
      end else if (dcnt_run) begin
        dcnt <= dcnt + 1'b1;
        if (dcnt == DW'(DELAY_SAMPLES - 1)) dcnt_run <= 1'b0;
      end
    end
  end
  assign nrz_dump = dcnt_run && (dcnt == DW'(DELAY_SAMPLES - 1));

  nrz_decoder #(.IN_W(16), .ACC_W(ACC_W)) u_nrz (
    .clk, .rst, .en(sample_en), .dump(nrz_dump), .demod, .bit_o, .bit_valid
  );
endmodule
