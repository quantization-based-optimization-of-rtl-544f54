// Testbench for maxpool3x3: random and hand-made 3 x 3 code windows, the
// result must be the largest code, wherever it sits in the window.
module tb_maxpool3x3;
  import lq_pkg::*;

  code_t win[9];
  code_t max_code;
  int checks = 0, failures = 0;

  maxpool3x3 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_t m;
    // a single non-zero code at every position
    for (int pos = 0; pos < 9; pos++) begin
      for (int k = 0; k < 9; k++) win[k] = 2'd0;
      win[pos] = 2'd2;
      #1;
      checks++;
      if (max_code !== 2'd2) begin failures++; $display("FAIL position %0d", pos); end
    end
    for (int n = 0; n < 2000; n++) begin
      m = 0;
      for (int k = 0; k < 9; k++) begin
        win[k] = code_t'($urandom_range(0, 2 + (n % 2)));
        if (win[k] > m) m = win[k];
      end
      #1;
      checks++;
      if (max_code !== m) begin failures++; $display("FAIL got %0d exp %0d", max_code, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
