// BPSK modulator: a 4800 Hz carrier whose polarity follows the data bit.
//
// A DDS makes the carrier at the sample rate (phase increment
// 2^32 * 4800 / 2 MHz, 12-bit samples). A data 1 sends +sin, a data 0 sends
// -sin (0 and 180 degrees). A new bit is latched on `bit_en`, but the output
// polarity only switches when the carrier phase passes 0 or 180 degrees, so
// every phase reversal happens at a carrier zero crossing; since the sample
// rate is not a multiple of the carrier, this is at most half a carrier
// period (about 1/8 bit) after the bit strobe. `sample_o` is registered and
// updated one clock after each `sample_en`.
module bpsk_modulator #(
  parameter int unsigned SAMPLE_HZ  = 2_000_000,
  parameter int unsigned CARRIER_HZ = 4800,
  parameter int unsigned OUT_W      = 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    sample_en,
  input  logic                    bit_en,
  input  logic                    bit_in,
  output logic signed [OUT_W-1:0] sample_o
);
  import modem_pkg::*;

  localparam logic [31:0] CARRIER_INC = phase_inc(64'(CARRIER_HZ), 64'(SAMPLE_HZ));

  logic signed [OUT_W-1:0] carrier, unused_cos;
  logic [31:0]             phase;
  logic                    pending, polarity, half_prev, dds_valid;

  dds #(.ACC_W(32), .LUT_AW(12), .OUT_W(OUT_W)) u_carrier (
    .clk, .rst, .en(sample_en), .phase_inc(CARRIER_INC),
    .sin_o(carrier), .cos_o(unused_cos), .phase_o(phase)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pending   <= 1'b1;
      polarity  <= 1'b1;
      half_prev <= 1'b0;
      dds_valid <= 1'b0;
      sample_o  <= '0;
    end else begin
      if (bit_en) pending <= bit_in;
      dds_valid <= sample_en;
      if (dds_valid) begin
        half_prev <= phase[31];
        // The DDS output just read belongs to `phase`; switch polarity on the
        // first sample of a new half cycle.
        if (phase[31] != half_prev) begin
          polarity <= pending;
          sample_o <= pending ? carrier : -carrier;
        end else begin
          sample_o <= polarity ? carrier : -carrier;
        end
      end
    end
  end
endmodule
