// Costas loop start-up controller.
//
// After reset it holds every Costas block in reset, waits for the first
// `dav` (data available, the sample strobe), then enables the blocks in
// order: first the NCO, then both arm filters, and, once FILL_SAMPLES samples
// have filled the filters' delay lines, it releases the loop filter. From
// then on the loop runs until `rst`, which resets all blocks synchronously.
// The enabling order and the fill wait are this implementation's reading of
// "enable all blocks in sequence after initialisation".
module costas_control #(
  parameter int unsigned FILL_SAMPLES = 32
) (
  input  logic clk,
  input  logic rst,
  input  logic dav,
  output logic lpf_f0_ena,
  output logic lpf_f1_ena,
  output logic lpf_f0_rst,
  output logic lpf_f1_rst,
  output logic lf_rst,
  output logic nco_ena,
  output logic nco_rst
);
  typedef enum logic [1:0] {CC_RESET, CC_NCO, CC_FILL, CC_RUN} cc_state_t;

  cc_state_t                         state;
  logic [$clog2(FILL_SAMPLES+1)-1:0] fill;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= CC_RESET;
      fill  <= '0;
    end else begin
      unique case (state)
        CC_RESET: if (dav) state <= CC_NCO;
        CC_NCO:   state <= CC_FILL;
        CC_FILL:  if (dav) begin
                    if (fill == ($bits(fill))'(FILL_SAMPLES - 1)) state <= CC_RUN;
                    fill <= fill + 1'b1;
                  end
        CC_RUN:   ;
        default:  state <= CC_RESET;
      endcase
    end
  end

  always_comb begin
    nco_rst    = (state == CC_RESET);
    nco_ena    = (state != CC_RESET);
    lpf_f0_rst = (state == CC_RESET) || (state == CC_NCO);
    lpf_f1_rst = lpf_f0_rst;
    lpf_f0_ena = (state == CC_FILL) || (state == CC_RUN);
    lpf_f1_ena = lpf_f0_ena;
    lf_rst     = (state != CC_RUN);
  end
endmodule
