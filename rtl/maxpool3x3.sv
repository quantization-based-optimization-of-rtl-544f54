// maxpool3x3: maximum of a 3 x 3 window of 2-bit activation codes.
//
// The activation levels 0, v2, v1, v1+v2 rise with the code whenever
// v1 >= v2 >= 0, so the largest code is the code of the largest value and
// pooling can run on codes after quantization instead of on 32-bit values.
// Pooling after quantization (and the 3 x 3 window) is this design's choice.
// Purely combinational.
module maxpool3x3
  import lq_pkg::*;
(
  input  code_t win[9],
  output code_t max_code
);

  always_comb begin
    max_code = win[0];
    for (int k = 1; k < 9; k++)
      if (win[k] > max_code) max_code = win[k];
  end

endmodule
