// Differential encoder, y[n] = x[n] xor y[n-1].
//
// A 1 at the input flips the transmitted bit, a 0 repeats it, so the data
// is carried by transitions and survives the 180-degree phase ambiguity of
// the Costas loop. One new bit is taken on every `bit_en` strobe; `y` is the
// registered encoded bit and changes one clock after the strobe. Reset clears
// the memory to 0 (the reset value is this implementation's choice).
module diff_encoder (
  input  logic clk,
  input  logic rst,
  input  logic bit_en,
  input  logic x,
  output logic y
);
  always_ff @(posedge clk) begin
    if (rst)         y <= 1'b0;
    else if (bit_en) y <= x ^ y;
  end
endmodule
