// Full-size end-to-end testbench of fic_alexnet_top with every parameter at
// its default: one 3 x 227 x 227 image through conv1 (96 x 11 x 11,
// stride 4, pool to 27 x 27) and conv2 (256 x 5 x 5, padding 2), checked
// code by code. The checks are described in fic_top_body.svh. About 21
// million clock cycles.
module tb_fic_alexnet_full;
  localparam int L1_IMG = 227, L1_K = 11, L1_STRIDE = 4, L1_IC = 3, L1_OC = 96;
  localparam int L2_K = 5, L2_PAD = 2, L2_OC = 256;
  localparam int WD_CYCLES = 40000000;

  `include "fic_top_body.svh"

  fic_alexnet_top dut (.*);
endmodule
