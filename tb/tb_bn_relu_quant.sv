// Testbench for bn_relu_quant: random accumulators and per-channel
// parameters; the reference computes acc+bias, the batch-norm multiply-add,
// ReLU, and picks the nearest of the four activation levels by brute force
// on 64-bit integers. A few hand-picked values cover each code and the ReLU
// clamp.
module tb_bn_relu_quant;
  import lq_pkg::*;

  fix_t acc, bias, scale, shift, v1, v2, relu;
  logic clamped;
  code_t code;
  int checks = 0, failures = 0;
  int seen[4];
  int nclamp = 0;

  bn_relu_quant dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    longint y, r, best, d;
    code_t ec;
    y = longint'(fix_t'((longint'(acc + bias) * longint'(scale)) >>> 16)) + longint'(shift);
    y = longint'(fix_t'(y));
    r = (y < 0) ? 0 : y;
    ec = 0; best = r;
    for (int k = 1; k < 4; k++) begin
      longint lv;
      lv = (k[1] ? longint'(v1) : 0) + (k[0] ? longint'(v2) : 0);
      d = r - lv; if (d < 0) d = -d;
      if (d < best) begin best = d; ec = code_t'(k); end
    end
    #1;
    checks++;
    if (code !== ec || relu !== fix_t'(r) || clamped !== (y < 0)) begin
      failures++;
      $display("FAIL acc=%0d y=%0d code %0d exp %0d", acc, y, code, ec);
    end
    seen[ec]++;
    if (y < 0) nclamp++;
  endtask

  initial begin
    v1 = 32'sd32768; v2 = 32'sd16384; bias = 0; scale = 32'sd65536; shift = 0;
    // exact levels and midpoints (ties go to the lower code)
    foreach (seen[k]) seen[k] = 0;
    acc = 0;           run_one();
    acc = 16384;       run_one();
    acc = 32768;       run_one();
    acc = 49152;       run_one();
    acc = 8192;        run_one();
    acc = -5;          run_one();
    acc = 1000000;     run_one();
    for (int n = 0; n < 3000; n++) begin
      v1    = fix_t'($urandom_range(20000, 80000));
      v2    = fix_t'($urandom_range(1000, 19999));
      acc   = fix_t'($urandom_range(0, 400000)) - 200000;
      bias  = fix_t'($urandom_range(0, 40000)) - 20000;
      scale = fix_t'($urandom_range(0, 160000)) - 40000;
      shift = fix_t'($urandom_range(0, 100000)) - 30000;
      run_one();
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL code %0d never produced", k); end
    end
    checks++;
    if (nclamp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
