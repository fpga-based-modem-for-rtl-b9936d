// Pseudo-Gaussian noise source built from two linear feedback shift registers.
//
// LFSR_1 (16 bits, taps 16,14,13,11) steps on every sample strobe; its low
// bit is a random enable, so LFSR_2 is clocked irregularly. LFSR_2 (31 bits,
// taps 31,28) advances NOISE_W bit positions per enabled step, so each step
// yields a fresh NOISE_W-bit uniform word. That word enters a four-stage
// shift chain (temp1..temp4) moved on every sample strobe, and the noise
// output is the sum of the four stages: by the central limit theorem the sum
// of four uniform words is close to Gaussian with zero mean. Register widths,
// polynomials and seeds are this implementation's choices; the structure
// (random enable, second LFSR, four summed registers) is the design's.
// `g_noise` is registered and changes one clock after `sample_en`.
module awgn_lfsr #(
  parameter int unsigned NOISE_W = 12
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      sample_en,
  output logic signed [NOISE_W+1:0] g_noise
);
  logic [15:0] lfsr1;
  logic [30:0] lfsr2, lfsr2_next;
  logic signed [NOISE_W-1:0] temp [4];

  always_comb begin
    lfsr2_next = lfsr2;
    for (int i = 0; i < NOISE_W; i++)
      lfsr2_next = {lfsr2_next[29:0], lfsr2_next[30] ^ lfsr2_next[27]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr1   <= 16'hACE1;
      lfsr2   <= 31'h1234_5678;
      g_noise <= '0;
      for (int i = 0; i < 4; i++) temp[i] <= '0;
    end else if (sample_en) begin
      lfsr1 <= {lfsr1[14:0], lfsr1[15] ^ lfsr1[13] ^ lfsr1[12] ^ lfsr1[10]};
      if (lfsr1[0]) lfsr2 <= lfsr2_next;
      temp[0] <= signed'(lfsr2[NOISE_W-1:0]);
      for (int i = 1; i < 4; i++) temp[i] <= temp[i-1];
      g_noise <= (NOISE_W+2)'(temp[0]) + (NOISE_W+2)'(temp[1])
               + (NOISE_W+2)'(temp[2]) + (NOISE_W+2)'(temp[3]);
    end
  end
endmodule
