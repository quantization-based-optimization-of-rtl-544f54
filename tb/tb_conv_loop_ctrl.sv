// Testbench for conv_loop_ctrl: after a start pulse the controller must issue
// every (ic, oy, ox) triple exactly once, in ic / oy / ox order, on
// consecutive cycles (IC*OH*OW cycles in all), flag first and last
// correctly, then pulse done and go idle. Two passes are run.
module tb_conv_loop_ctrl;
  localparam int IC = 3, OH = 4, OW = 5;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, valid, first, last, done;
  logic [$clog2(IC+1)-1:0] ic;
  logic [$clog2(OH+1)-1:0] oy;
  logic [$clog2(OW+1)-1:0] ox;
  int checks = 0, failures = 0;

  conv_loop_ctrl #(.IC(IC), .OH(OH), .OW(OW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      check(!valid && !busy, "idle before start");
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int c = 0; c < IC; c++)
        for (int y = 0; y < OH; y++)
          for (int x = 0; x < OW; x++) begin
            check(valid, "valid every cycle");
            check(int'(ic) == c && int'(oy) == y && int'(ox) == x, "order");
            check(first == (c == 0), "first");
            check(last == (c == IC-1 && y == OH-1 && x == OW-1), "last");
            check(!done, "no early done");
            @(negedge clk);
          end
      check(done && !valid, "done after the last triple");
      @(negedge clk);
      check(!done && !busy, "done is one pulse");
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
