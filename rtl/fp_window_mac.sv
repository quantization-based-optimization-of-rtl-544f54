// fp_window_mac: one K x K window of the full-precision first-layer
// convolution per cycle.
//
// The first layer works on the unquantized image and weights, so each of
// the N = K*K positions needs a real multiplication. The N exact 64-bit
// products of Q16.16 operands are summed exactly, then the sum is shifted
// back to Q16.16 and truncated to 32 bits. in_tag rides along.
//
// Timing: fully pipelined, one window per cycle, latency 1 cycle.
module fp_window_mac
  import lq_pkg::*;
#(
  parameter int N     = 121,
  parameter int TAG_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  fix_t             pix[N],
  input  fix_t             wgt[N],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output fix_t             out_sum
);

  logic signed [2*FIX_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int p = 0; p < N; p++) acc = acc + pix[p] * wgt[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_sum   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        out_sum <= fix_t'(acc >>> FIX_FRAC);
      end
    end
  end

endmodule
