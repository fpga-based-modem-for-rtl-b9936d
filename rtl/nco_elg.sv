// Bit-clock NCO of the early-late gate, with its bang-bang comparator.
//
// A DDS with a 32-bit phase accumulator runs at the sample rate with
// increment CENTER_INC + pid_err, where CENTER_INC = 2^32 * 1200 / 2 MHz
// = 2576980 is the quiescent 1200 Hz bit rate; a positive controller output
// speeds the clock up. Its 8-bit sine output goes to an on-off comparator that
// gives 1 for a positive input, 0 for a negative one and keeps its state at
// zero: that square wave is the recovered clock `clk_out` (a signal, not a
// clock net). `rise` and `fall` pulse for one clock at its edges, aligned
// with the sample strobe that produced them.
module nco_elg #(
  parameter int unsigned SAMPLE_HZ = 2_000_000,
  parameter int unsigned BIT_HZ    = 1200
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic signed [31:0] pid_err,
  output logic               clk_out,
  output logic               rise,
  output logic               fall
);
  import modem_pkg::*;

  localparam logic [31:0] CENTER_INC = phase_inc(64'(BIT_HZ), 64'(SAMPLE_HZ));

  logic signed [7:0] sine, unused_cos;
  logic [31:0]       unused_phase;
  logic              valid, bang;

  dds #(.ACC_W(32), .LUT_AW(8), .OUT_W(8)) u_dds (
    .clk, .rst, .en, .phase_inc(CENTER_INC + unsigned'(pid_err)),
    .sin_o(sine), .cos_o(unused_cos), .phase_o(unused_phase)
  );

  // Bang-bang controller: sign of the sine, holding at zero.
  always_comb begin
    if (sine > 0)      bang = 1'b1;
    else if (sine < 0) bang = 1'b0;
    else               bang = clk_out;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid   <= 1'b0;
      clk_out <= 1'b0;
      rise    <= 1'b0;
      fall    <= 1'b0;
    end else begin
      valid <= en;
      rise  <= 1'b0;
      fall  <= 1'b0;
      if (valid) begin
        clk_out <= bang;
        rise    <= bang & ~clk_out;
        fall    <= ~bang & clk_out;
      end
    end
  end
endmodule
