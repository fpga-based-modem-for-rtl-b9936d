// Test of the differential encoder and decoder.
//
// Encodes a random bit stream and checks each encoded bit against
// y[n] = x[n] xor y[n-1] computed here; decodes it again, both straight and
// inverted (a 180-degree carrier ambiguity), and checks that the decoder
// gives back the original bits in both cases after the first bit.
module tb_diff_codec;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, en = 0, x = 0, y, d, dv, di, div_;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  diff_encoder u_enc (.clk, .rst, .bit_en(en), .x, .y);
  diff_decoder u_dec (.clk, .rst, .bit_en(en), .x(y), .y(d), .y_valid(dv));
  diff_decoder u_inv (.clk, .rst, .bit_en(en), .x(~y), .y(di), .y_valid(div_));

  initial begin
    bit model_y, xs [200];
    model_y = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      xs[n] = 1'($urandom);
      x = xs[n];
      en = 1; @(posedge clk); #1; en = 0;
      model_y = xs[n] ^ model_y;
      checks++;
      if (y !== model_y) failures++;
      @(posedge clk); #1;   // decoder sees the new y on the next strobe
      en = 0;
    end
    // second pass: decode the encoded stream
    rst = 1; @(posedge clk); #1; rst = 0;
    model_y = 0;
    for (int n = 0; n < 200; n++) begin
      x = xs[n];
      en = 1; @(posedge clk); #1; en = 0;   // encoder takes x, decoders take old y
      checks++;
      if (!dv) failures++;                  // valid pulses with the new bit
      @(posedge clk); #1;
      if (n >= 2) begin
        checks += 2;
        if (d !== xs[n-1]) failures++;
        if (di !== xs[n-1]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
