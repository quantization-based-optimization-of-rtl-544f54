// lq_lut: the product table that replaces multiplication in the quantized
// convolution.
//
// With 2-bit LQ-Nets codes there are only 16 (activation code, weight code)
// pairs, so every product the layer can form is computed once by the host
// and stored here. Entry {a,w} holds value(a) * value(w), where an
// activation code (a1,a0) stands for a1*v1 + a0*v2 (activations are
// non-negative after ReLU, so a 0 bit contributes nothing) and a weight code
// (c1,c0) stands for (c1 ? +c : -c) + (c0 ? +d : -d) with the weight basis
// (c, d). Index = {activation code, weight code}.
//
// One write port (synchronous, from the host loader) and NRD combinational
// read ports, so a whole convolution window is looked up in one cycle. The
// table resets to zeros.
module lq_lut
  import lq_pkg::*;
#(
  parameter int NRD = 25
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [3:0] widx,
  input  fix_t       wdata,
  input  logic [3:0] ridx [NRD],
  output fix_t       rdata[NRD]
);

  fix_t table_q [16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) table_q[i] <= '0;
    end else if (we) begin
      table_q[widx] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) rdata[p] = table_q[ridx[p]];
  end

endmodule
