// fic_alexnet_top: the first two layers of a 2-bit quantized AlexNet split
// over two FPGA boards, one layer per board.
//
// Board 1 (layer1_core) runs conv1 on the full-precision image and emits
// pooled 2-bit activation codes. Board 2 (layer2_core) buffers those codes,
// runs conv2 with a product look-up table instead of multipliers, and
// returns 2-bit codes merged into nibbles. Each board is loaded by its own
// host over a 4-bit port. All parameters stay in on-chip memory.
//
// The boards are joined by the cluster's circuit-switched serial network,
// which is not part of this RTL: board 1's link output (l1_link_*) and
// board 2's link input (l2_link_*) are brought out as ports, to be joined
// by that network (or simply wired together). Both are valid/ready streams
// of 2-bit codes in channel-major, row-major order.
module fic_alexnet_top
  import lq_pkg::*;
#(
  parameter int L1_IMG    = 227,
  parameter int L1_K      = 11,
  parameter int L1_STRIDE = 4,
  parameter int L1_IC     = 3,
  parameter int L1_OC     = 96,
  parameter int L2_K      = 5,
  parameter int L2_PAD    = 2,
  parameter int L2_OC     = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  // host of board 1
  input  nib_t  h1_nib,
  input  logic  h1_valid,
  // host of board 2
  input  nib_t  h2_nib,
  input  logic  h2_valid,
  // board 1 -> network
  output code_t l1_link_code,
  output logic  l1_link_valid,
  input  logic  l1_link_ready,
  // network -> board 2
  input  code_t l2_link_code,
  input  logic  l2_link_valid,
  output logic  l2_link_ready,
  // board 2 results to its host
  output nib_t  out_nib,
  output logic  out_valid,
  input  logic  out_ready,
  // status
  output logic  l1_busy,
  output logic  l1_done,
  output logic  l2_busy,
  output logic  l2_done
);

  // layer 2 input size = pooled layer 1 output size
  localparam int L1_OH = (L1_IMG - L1_K) / L1_STRIDE + 1;
  localparam int L2_IMG = (L1_OH - 3) / 2 + 1;

  layer1_core #(
    .IMG(L1_IMG), .K(L1_K), .STRIDE(L1_STRIDE), .IC(L1_IC), .OC(L1_OC)
  ) u_l1 (
    .clk, .rst_n,
    .host_nib   (h1_nib),
    .host_valid (h1_valid),
    .link_code  (l1_link_code),
    .link_valid (l1_link_valid),
    .link_ready (l1_link_ready),
    .busy       (l1_busy),
    .done       (l1_done)
  );

  layer2_core #(
    .IMG(L2_IMG), .K(L2_K), .PAD(L2_PAD), .IC(L1_OC), .OC(L2_OC)
  ) u_l2 (
    .clk, .rst_n,
    .host_nib   (h2_nib),
    .host_valid (h2_valid),
    .link_code  (l2_link_code),
    .link_valid (l2_link_valid),
    .link_ready (l2_link_ready),
    .out_nib, .out_valid, .out_ready,
    .busy       (l2_busy),
    .done       (l2_done)
  );

endmodule
