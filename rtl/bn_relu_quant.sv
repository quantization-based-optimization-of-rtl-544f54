// bn_relu_quant: turns one accumulated convolution result into a 2-bit
// LQ-Nets activation code.
//
// Steps, all combinational:
//   z    = acc + bias                      (per output channel bias)
//   y    = z * scale + shift               (batch norm at inference:
//                                           scale = gamma/sigma,
//                                           shift = beta - mu*scale,
//                                           folded by the host)
//   r    = max(y, 0)                       (ReLU)
//   code = the level nearest to r among
//          00 -> 0, 01 -> v2, 10 -> v1, 11 -> v1+v2
// where (v1, v2) is the learned activation basis. Because activations are
// non-negative, a 0 bit means "no contribution" rather than "-basis". Ties
// go to the lower code. All values are Q16.16; the multiplication is
// truncated to 32 bits (lq_pkg::fix_mul). Folding bias and batch norm into
// one multiply-add and the tie rule are this design's choices.
module bn_relu_quant
  import lq_pkg::*;
(
  input  fix_t  acc,
  input  fix_t  bias,
  input  fix_t  scale,
  input  fix_t  shift,
  input  fix_t  v1,
  input  fix_t  v2,
  output fix_t  relu,
  output logic  clamped,
  output code_t code
);

  fix_t y;
  logic signed [FIX_W+1:0] lvl [4];
  logic signed [FIX_W+1:0] dst[4];
  logic signed [FIX_W+1:0] best;

  always_comb begin
    y       = fix_mul(acc + bias, scale) + shift;
    clamped = y[FIX_W-1];
    relu    = clamped ? '0 : y;
    lvl[0]  = '0;
    lvl[1]  = (FIX_W+2)'(v2);
    lvl[2]  = (FIX_W+2)'(v1);
    lvl[3]  = (FIX_W+2)'(v1) + (FIX_W+2)'(v2);
    code    = 2'd0;
    best    = '0;
    for (int k = 0; k < 4; k++) begin
      dst[k] = (FIX_W+2)'(relu) - lvl[k];
      if (dst[k] < 0) dst[k] = -dst[k];
    end
    best = dst[0];
    for (int k = 1; k < 4; k++) begin
      if (dst[k] < best) begin
        best = dst[k];
        code = code_t'(k);
      end
    end
  end

endmodule
