// Sample-rate strobe generator.
//
// Divides the 100 MHz system clock down to the 2 MHz DSP sample rate. Rather
// than making a second clock, it emits a strobe `sample_en` that is high for
// one system clock every DIV clocks; all DSP registers are clocked by the
// system clock and advance only on that strobe. The first strobe comes DIV
// clocks after reset is released. The 2 MHz rate is the design's; using a
// clock enable instead of a divided clock is this implementation's choice.
module clock_gen #(
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned SAMPLE_HZ = 2_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic sample_en
);
  localparam int unsigned DIV = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned CW  = $clog2(DIV + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      sample_en <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt       <= '0;
      sample_en <= 1'b1;
    end else begin
      cnt       <= cnt + 1'b1;
      sample_en <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("clock_gen: CLK_HZ must be at least twice SAMPLE_HZ");
endmodule
