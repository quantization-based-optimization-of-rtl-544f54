// Testbench for layer2_core at reduced size (3 x 4 x 4 input codes, two
// 5 x 5 kernels, padding 2, 4 x 4 output). The product table, merged weight
// nibbles, bias, BN and basis are loaded over the host port; input codes are
// fed on the link port with random gaps; merged output nibbles are taken
// with random backpressure and compared with a reference computed here. The
// layer must not start before both the start command and the last input
// code, must issue one window per cycle, and must accept a second image.
module tb_layer2_core;
  import lq_pkg::*;
  `include "lq_ref.svh"

  localparam int IMG = 4, K = 5, PAD = 2, IC = 3, OC = 2;
  localparam int OH = IMG + 2*PAD - K + 1;
  localparam int NOUT = OC * OH * OH;
  localparam int NNIB = (NOUT + 1) / 2;
  localparam int NW = OC * IC * K * K;

  logic clk = 0, rst_n = 0, host_valid = 0, link_valid = 0, out_ready = 0;
  nib_t host_nib = '0, out_nib;
  code_t link_code = '0;
  logic link_ready, out_valid, busy, done;
  int checks = 0, failures = 0, seen = 0, stalls = 0, wins = 0, pads = 0;
  int act[IC*IMG*IMG], w[NW], b[OC], sc[OC], sh[OC], q[2], lut[16], ref_o[NOUT];

  layer2_core #(.IMG(IMG), .K(K), .PAD(PAD), .IC(IC), .OC(OC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n) begin
    if (dut.c_valid) wins++;
    if (dut.c_valid && dut.win_pad != '0) pads++;
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      int e;
      e = (ref_o[2*seen] << 2) | ((2*seen + 1 < NOUT) ? ref_o[2*seen + 1] : 0);
      checks++;
      if (seen >= NNIB || int'(out_nib) != e) begin
        failures++;
        $display("FAIL nibble %0d: %h exp %h", seen, out_nib, e);
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
    for (int oc = 0; oc < OC; oc++)
      for (int oy = 0; oy < OH; oy++)
        for (int ox = 0; ox < OH; ox++) begin
          int acc;
          acc = 0;
          for (int ic = 0; ic < IC; ic++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++) begin
                int iy, ix, a;
                iy = oy + ky - PAD; ix = ox + kx - PAD;
                a = (iy < 0 || iy >= IMG || ix < 0 || ix >= IMG) ? 0 : act[(ic*IMG + iy)*IMG + ix];
                acc += lut[a*4 + w[((oc*IC + ic)*K + ky)*K + kx]];
              end
          ref_o[(oc*OH + oy)*OH + ox] = ref_quant(acc, b[oc], sc[oc], sh[oc], q[0], q[1]);
        end
  endtask

  task automatic feed_acts();
    foreach (act[i]) begin
      logic acc;
      link_code = code_t'(act[i]);
      link_valid = 1'b1;
      do begin
        #1 acc = link_ready;               // ready only changes on clock edges
        @(negedge clk);
      end while (!acc);
      link_valid = 1'b0;
      repeat ($urandom_range(0, 1)) @(negedge clk);
    end
  endtask

  task automatic run(bit reload_all);
    foreach (act[i]) act[i] = int'($urandom_range(0, 3));
    if (reload_all) begin
      int c, d;
      c = 10000; d = 4000;
      q[0] = 32768; q[1] = 16384;
      for (int a = 0; a < 4; a++)
        for (int ww = 0; ww < 4; ww++)
          lut[a*4 + ww] = ref_fixmul(ref_aval(a, 45000, 20000), ref_wval(ww, c, d));
      foreach (w[i]) w[i] = int'($urandom_range(0, 3));
      foreach (b[i]) begin
        b[i] = int'($urandom_range(0, 8192)) - 4096;
        sc[i] = int'($urandom_range(32768, 98304));
        sh[i] = int'($urandom_range(0, 40000)) - 10000;
      end
      word({TGT_LUT, 28'd16}); foreach (lut[i]) word(lut[i]);
      word({TGT_WCODE, 28'((NW + 1) / 2)});
      for (int i = 0; i < (NW + 1) / 2; i++)
        send(nib_t'({w[2*i][1:0], (2*i + 1 < NW) ? w[2*i + 1][1:0] : 2'b00}));
      word({TGT_BIAS, 28'(OC)});  foreach (b[i]) word(b[i]);
      word({TGT_SCALE, 28'(OC)}); foreach (sc[i]) word(sc[i]);
      word({TGT_SHIFT, 28'(OC)}); foreach (sh[i]) word(sh[i]);
      word({TGT_QBASIS, 28'd2});  word(q[0]); word(q[1]);
    end
    make_ref();
    seen = 0; wins = 0;
    word({TGT_START, 28'd0});
    repeat (5) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL started without input"); end
    feed_acts();
    wait (done);
    repeat (10) @(negedge clk);
    checks++;
    if (seen != NNIB) begin failures++; $display("FAIL %0d nibbles", seen); end
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
    if (stalls == 0 || pads == 0) begin failures++; $display("FAIL stalls %0d pads %0d", stalls, pads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
