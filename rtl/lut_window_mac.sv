// lut_window_mac: one K x K window of the quantized convolution per cycle.
//
// For each of the N = K*K window positions the 2-bit activation code and the
// 2-bit weight code are concatenated into a 4-bit index into the product
// table (lq_lut); the N looked-up products are summed by an adder tree and
// registered. There is no multiplier. in_tag is carried alongside so the
// caller can tell which output pixel a sum belongs to.
//
// Timing: fully pipelined, one window per cycle, latency 1 cycle
// (out_valid / out_sum / out_tag follow in_valid by one clock). The table is
// written through lut_we / lut_widx / lut_wdata. The sum is the exact 32-bit
// wrap-around sum of the table entries.
module lut_window_mac
  import lq_pkg::*;
#(
  parameter int N     = 25,
  parameter int TAG_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lut_we,
  input  logic [3:0]       lut_widx,
  input  fix_t             lut_wdata,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  code_t            act[N],
  input  code_t            wgt[N],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output fix_t             out_sum
);

  logic [3:0] idx [N];
  fix_t       prod[N];
  fix_t       sum;

  always_comb begin
    for (int p = 0; p < N; p++) idx[p] = {act[p], wgt[p]};
  end

  lq_lut #(.NRD(N)) u_lut (
    .clk, .rst_n,
    .we    (lut_we),
    .widx  (lut_widx),
    .wdata (lut_wdata),
    .ridx  (idx),
    .rdata (prod)
  );

  always_comb begin
    sum = '0;
    for (int p = 0; p < N; p++) sum = sum + prod[p];
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
        out_sum <= sum;
      end
    end
  end

endmodule
