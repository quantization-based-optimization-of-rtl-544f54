// Testbench for fp_window_mac: random Q16.16 pixel and weight windows (11 x 11)
// one per cycle with bubbles; each result must be the exact product sum
// shifted back to Q16.16, one cycle after its window, with its tag.
module tb_fp_window_mac;
  import lq_pkg::*;
  localparam int N = 121;
  localparam int TAG_W = 8;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [TAG_W-1:0] in_tag = '0, out_tag;
  fix_t pix[N], wgt[N];
  logic out_valid;
  fix_t out_sum;
  logic signed [63:0] big;
  fix_t exp_sum;
  logic exp_valid;
  logic [TAG_W-1:0] exp_tag;
  int checks = 0, failures = 0;

  fp_window_mac #(.N(N), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N; p++) begin pix[p] = '0; wgt[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_tag = TAG_W'(n);
      big = 0;
      for (int p = 0; p < N; p++) begin
        pix[p] = fix_t'($urandom_range(0, 131072)) - 65536;   // [-1, 1]
        wgt[p] = fix_t'($urandom_range(0, 32768)) - 16384;    // [-0.25, 0.25]
        big += 64'(pix[p]) * 64'(wgt[p]);
      end
      exp_sum = fix_t'(big >>> 16);
      exp_valid = in_valid;
      exp_tag = in_tag;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== exp_valid) begin failures++; $display("FAIL valid at %0d", n); end
      if (exp_valid) begin
        checks++;
        if (out_sum !== exp_sum || out_tag !== exp_tag) begin
          failures++;
          $display("FAIL window %0d sum %h exp %h", n, out_sum, exp_sum);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
