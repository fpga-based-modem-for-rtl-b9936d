// Direct digital synthesizer: phase accumulator plus sine/cosine table.
//
// On every `en` strobe the ACC_W-bit phase accumulator advances by
// `phase_inc`, so the output frequency is f = phase_inc * f_en / 2^ACC_W
// (the frequency resolution is f_en / 2^ACC_W). The top LUT_AW bits of the
// phase address a full-cycle sine table of OUT_W-bit signed samples with
// peak 2^(OUT_W-1)-1; the cosine reads the same table a quarter cycle ahead.
// `sin_o`, `cos_o` and `phase_o` (the phase that addressed the table) are
// registered and change one clock after the strobe. The table is computed at
// start-up, not read from a file. The defaults (32-bit phase, 12-bit phase
// into the table, 12-bit outputs) are the sizes the modem was specified with.
module dds #(
  parameter int unsigned ACC_W  = 32,
  parameter int unsigned LUT_AW = 12,
  parameter int unsigned OUT_W  = 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic [ACC_W-1:0]        phase_inc,
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o,
  output logic [ACC_W-1:0]        phase_o
);
  import modem_pkg::*;

  logic signed [OUT_W-1:0] table_q [2**LUT_AW];

  initial begin
    for (int i = 0; i < 2**LUT_AW; i++)
      table_q[i] = OUT_W'(sine_entry(i, LUT_AW, OUT_W));
  end

  logic [ACC_W-1:0]  acc;
  logic [LUT_AW-1:0] addr;

  assign addr = acc[ACC_W-1 -: LUT_AW];

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      sin_o   <= '0;
      cos_o   <= '0;
      phase_o <= '0;
    end else if (en) begin
      acc     <= acc + phase_inc;
      sin_o   <= table_q[addr];
      cos_o   <= table_q[addr + LUT_AW'(2**(LUT_AW-2))];
      phase_o <= acc;
    end
  end
endmodule
