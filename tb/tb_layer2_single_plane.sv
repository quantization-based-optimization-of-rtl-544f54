// Single-plane workload for layer2_core: one 27 x 27 map of 2-bit codes
// convolved with one 5 x 5 kernel by table look-up, zero padding 2 (a
// 31 x 31 padded image), 27 x 27 outputs. Besides checking every output
// code against the reference, it checks the rate: the 729 windows must be
// issued on 729 consecutive cycles, so the whole convolution of the plane
// takes 729 cycles plus 2 of pipeline fill, and the 729 outputs follow at
// one per cycle when the host does not stall. Two images are run.
module tb_layer2_single_plane;
  import lq_pkg::*;
  `include "lq_ref.svh"

  localparam int IMG = 27, K = 5, PAD = 2, IC = 1, OC = 1;
  localparam int OH = IMG + 2*PAD - K + 1;
  localparam int NOUT = OC * OH * OH;
  localparam int NNIB = (NOUT + 1) / 2;
  localparam int NW = OC * IC * K * K;

  logic clk = 0, rst_n = 0, host_valid = 0, link_valid = 0, out_ready = 0;
  nib_t host_nib = '0, out_nib;
  code_t link_code = '0;
  logic link_ready, out_valid, busy, done;
  int checks = 0, failures = 0, seen = 0, stalls = 0, wins = 0, pads = 0;
  longint cyc = 0, first_win = -1, last_win = -1;
  int act[IC*IMG*IMG], w[NW], b[OC], sc[OC], sh[OC], q[2], lut[16], ref_o[NOUT];

  layer2_core #(.IMG(IMG), .K(K), .PAD(PAD), .IC(IC), .OC(OC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 7) != 0);

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.c_valid) begin
      wins++;
      if (first_win < 0) first_win = cyc;
      last_win = cyc;
    end
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
      c = 3000; d = 1000;
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
    begin
      int hist[4];
      foreach (hist[k]) hist[k] = 0;
      foreach (ref_o[i]) hist[ref_o[i]]++;
      $display("expected code histogram %0d %0d %0d %0d", hist[0], hist[1], hist[2], hist[3]);
      checks++;
      if (hist[0] == NOUT) begin failures++; $display("FAIL all-zero output, test too weak"); end
    end
    seen = 0; wins = 0; first_win = -1; last_win = -1;
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
    checks++;
    if (last_win - first_win + 1 != longint'(OC*IC*OH*OH)) begin
      failures++; $display("FAIL windows spread over %0d cycles", last_win - first_win + 1);
    end
    $display("conv pass: %0d windows in %0d cycles", wins, last_win - first_win + 1);
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
