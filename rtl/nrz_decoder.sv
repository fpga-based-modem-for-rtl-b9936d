// NRZ decision: integrate-and-dump over one bit, then a hard decision.
//
// The demodulated signal is integrated between two `dump` strobes, which the
// early-late gate places on the bit boundaries. The holder keeps the last
// bit's integral; its sign (the bang-bang decision) is mapped to the NRZ
// bit: positive -> 1, otherwise 0. `bit_o` and a
// one-clock `bit_valid` follow each dump by three clocks.
module nrz_decoder #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned ACC_W = 28
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic                   dump,
  input  logic signed [IN_W-1:0] demod,
  output logic                   bit_o,
  output logic                   bit_valid
);
  logic signed [ACC_W-1:0] sum, held;
  logic                    dump_d1, dump_d2;

  integrate_dump #(.IN_W(IN_W), .ACC_W(ACC_W)) u_int (
    .clk, .rst, .en, .dump, .x(demod), .sum
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dump_d1   <= 1'b0;
      dump_d2   <= 1'b0;
      held      <= '0;
      bit_o     <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      dump_d1   <= en & dump;
      dump_d2   <= dump_d1;
      bit_valid <= dump_d2;
      if (dump_d1) held <= sum;             // holder
      if (dump_d2) bit_o <= (held > 0);    // bang-bang sign, mapped to the bit
    end
  end
endmodule
