// Testbench for layer1_core at reduced size (2 x 13 x 13 image, four 3 x 3
// kernels at stride 2, 6 x 6 maps pooled to 2 x 2). Parameters and image are
// loaded over the 4-bit host port, a start command is sent, and the pooled
// code stream is taken with random backpressure and compared with a
// reference conv / BN / ReLU / quantizer / pool computed here. The number of
// windows must equal OC*IC*OH*OW (one per cycle), and a second run on a new
// image must work too.
module tb_layer1_core;
  import lq_pkg::*;
  `include "lq_ref.svh"

  localparam int IMG = 13, K = 3, S = 2, IC = 2, OC = 4;
  localparam int OH = (IMG - K) / S + 1;
  localparam int PH = (OH - 3) / 2 + 1;
  localparam int NOUT = OC * PH * PH;

  logic clk = 0, rst_n = 0, host_valid = 0, link_ready = 0;
  nib_t host_nib = '0;
  code_t link_code;
  logic link_valid, busy, done;
  int checks = 0, failures = 0, seen = 0, stalls = 0, wins = 0;
  int img[IC*IMG*IMG], w[OC*IC*K*K], b[OC], sc[OC], sh[OC], q[2];
  int ref_o[NOUT];

  layer1_core #(.IMG(IMG), .K(K), .STRIDE(S), .IC(IC), .OC(OC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) link_ready = ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n) begin
    if (dut.c_valid) wins++;
    if (link_valid && !link_ready) stalls++;
    if (link_valid && link_ready) begin
      checks++;
      if (seen >= NOUT || int'(link_code) != ref_o[seen]) begin
        failures++;
        $display("FAIL code %0d: %0d exp %0d", seen, link_code, ref_o[seen]);
      end
      seen++;
    end
  end

  task automatic send(nib_t n);
    host_nib = n; host_valid = 1'b1;
    @(negedge clk);
    host_valid = 1'b0;
  endtask
  task automatic word(int v);
    for (int i = 7; i >= 0; i--) send(nib_t'(v >> (4*i)));
  endtask

  task automatic make_ref();
    int plane[OH*OH];
    for (int oc = 0; oc < OC; oc++) begin
      for (int oy = 0; oy < OH; oy++)
        for (int ox = 0; ox < OH; ox++) begin
          int acc;
          acc = 0;
          for (int ic = 0; ic < IC; ic++) begin
            longint big;
            big = 0;
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++)
                big += longint'(img[(ic*IMG + oy*S + ky)*IMG + ox*S + kx])
                     * longint'(w[((oc*IC + ic)*K + ky)*K + kx]);
            acc += int'(big >>> 16);
          end
          plane[oy*OH + ox] = ref_quant(acc, b[oc], sc[oc], sh[oc], q[0], q[1]);
        end
      for (int py = 0; py < PH; py++)
        for (int px = 0; px < PH; px++) begin
          int m;
          m = 0;
          for (int dy = 0; dy < 3; dy++)
            for (int dx = 0; dx < 3; dx++)
              if (plane[(2*py + dy)*OH + 2*px + dx] > m) m = plane[(2*py + dy)*OH + 2*px + dx];
          ref_o[(oc*PH + py)*PH + px] = m;
        end
    end
  endtask

  task automatic run(bit reload_all);
    int t0;
    foreach (img[i]) img[i] = int'($urandom_range(0, 131072)) - 65536;
    word({TGT_IMG, 28'(IC*IMG*IMG)}); foreach (img[i]) word(img[i]);
    if (reload_all) begin
      foreach (w[i]) w[i] = int'($urandom_range(0, 80000)) - 40000;
      foreach (b[i]) begin
        b[i] = int'($urandom_range(0, 16384)) - 8192;
        sc[i] = int'($urandom_range(32768, 98304));
        sh[i] = int'($urandom_range(0, 40000)) - 13107;
      end
      q[0] = 32768; q[1] = 16384;
      word({TGT_W, 28'(OC*IC*K*K)}); foreach (w[i]) word(w[i]);
      word({TGT_BIAS, 28'(OC)});  foreach (b[i]) word(b[i]);
      word({TGT_SCALE, 28'(OC)}); foreach (sc[i]) word(sc[i]);
      word({TGT_SHIFT, 28'(OC)}); foreach (sh[i]) word(sh[i]);
      word({TGT_QBASIS, 28'd2});  word(q[0]); word(q[1]);
    end
    make_ref();
    seen = 0; wins = 0;
    word({TGT_START, 28'd0});
    wait (done);
    repeat (10) @(negedge clk);
    checks++;
    if (seen != NOUT) begin failures++; $display("FAIL %0d codes", seen); end
    checks++;
    if (wins != OC*IC*OH*OH) begin failures++; $display("FAIL %0d windows", wins); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(1'b1);
    run(1'b0);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no backpressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
