// End-to-end testbench of fic_alexnet_top at reduced size: a 2 x 15 x 15
// image, three 3 x 3 stride-2 first-layer kernels (7 x 7 maps pooled to
// 3 x 3), three 5 x 5 second-layer kernels with padding 2. The checks are
// described in fic_top_body.svh.
module tb_fic_alexnet_top;
  localparam int L1_IMG = 15, L1_K = 3, L1_STRIDE = 2, L1_IC = 2, L1_OC = 3;
  localparam int L2_K = 5, L2_PAD = 2, L2_OC = 3;
  localparam int WD_CYCLES = 200000;

  `include "fic_top_body.svh"

  fic_alexnet_top #(
    .L1_IMG(L1_IMG), .L1_K(L1_K), .L1_STRIDE(L1_STRIDE), .L1_IC(L1_IC), .L1_OC(L1_OC),
    .L2_K(L2_K), .L2_PAD(L2_PAD), .L2_OC(L2_OC)
  ) dut (.*);
endmodule
