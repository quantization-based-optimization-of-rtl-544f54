// Shared types and constants of the two-board quantized AlexNet pipeline.
//
// Numbers: every real-valued quantity (image pixels and layer-1 weights,
// table entries, bias, batch-norm scale and shift, quantizer basis) is a
// 32-bit signed fixed-point value with 16 fraction bits (Q16.16). The
// original system keeps these values in 32-bit IEEE floating point; the
// fixed-point format is this design's choice, it keeps the 32-bit word size
// the host interface carries.
//
// Activation and weight codes of the quantized layer are 2-bit LQ-Nets
// codes. Host parameter transfers are tagged with a 4-bit target id.
package lq_pkg;

  localparam int FIX_W    = 32;
  localparam int FIX_FRAC = 16;

  typedef logic signed [FIX_W-1:0] fix_t;
  typedef logic [1:0]              code_t;
  typedef logic [3:0]              nib_t;

  // Target of a host transfer, the top nibble of its header word.
  typedef enum logic [3:0] {
    TGT_IMG    = 4'd0,   // layer-1 input image, one word per pixel
    TGT_W      = 4'd1,   // layer-1 weights, one word each
    TGT_BIAS   = 4'd2,   // per output channel bias
    TGT_SCALE  = 4'd3,   // per output channel batch-norm scale gamma/sigma
    TGT_SHIFT  = 4'd4,   // per output channel batch-norm shift beta-mu*scale
    TGT_QBASIS = 4'd5,   // output activation basis: word 0 = v1, word 1 = v2
    TGT_LUT    = 4'd6,   // layer-2 product table, 16 words
    TGT_WCODE  = 4'd7,   // layer-2 weights: nibbles, two 2-bit codes each
    TGT_START  = 4'd15   // start one inference run (no payload)
  } tgt_e;

  // Q16.16 product, truncated back to 32 bits.
  function automatic fix_t fix_mul(fix_t a, fix_t b);
    logic signed [2*FIX_W-1:0] p;
    p = a * b;
    return fix_t'(p >>> FIX_FRAC);
  endfunction

endpackage
