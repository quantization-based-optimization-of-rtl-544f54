// Testbench for lut_window_mac: a random product table is written, then a
// stream of random 5 x 5 code windows is pushed one per cycle with random
// bubbles. Each sum must equal the sum of the table entries picked by
// {activation, weight}, arrive exactly one cycle after its window, and keep
// its tag.
module tb_lut_window_mac;
  import lq_pkg::*;
  localparam int N = 25;
  localparam int TAG_W = 8;

  logic clk = 0, rst_n = 0, lut_we = 0, in_valid = 0;
  logic [3:0] lut_widx = '0;
  fix_t lut_wdata = '0;
  logic [TAG_W-1:0] in_tag = '0, out_tag;
  code_t act[N], wgt[N];
  logic out_valid;
  fix_t out_sum;
  fix_t tbl[16];
  fix_t exp_sum;
  logic [TAG_W-1:0] exp_tag;
  logic exp_valid;
  int checks = 0, failures = 0;

  lut_window_mac #(.N(N), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N; p++) begin act[p] = '0; wgt[p] = '0; end
    exp_valid = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      tbl[i] = fix_t'($urandom_range(0, 200000)) - 100000;
      lut_we = 1; lut_widx = 4'(i); lut_wdata = tbl[i];
      @(negedge clk);
    end
    lut_we = 0;
    for (int n = 0; n < 500; n++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_tag = TAG_W'(n);
      exp_sum = 0;
      for (int p = 0; p < N; p++) begin
        act[p] = code_t'($urandom_range(0, 3));
        wgt[p] = code_t'($urandom_range(0, 3));
        exp_sum += tbl[{act[p], wgt[p]}];
      end
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
