// Body of the system testbenches of fic_alexnet_top. The including module
// defines the localparams L1_IMG, L1_K, L1_STRIDE, L1_IC, L1_OC, L2_K,
// L2_PAD, L2_OC and WD_CYCLES, then instantiates the top as "dut" on the
// signals declared here.
//
// Flow: both hosts load their board in parallel over the 4-bit ports
// (random image and weights, per-channel bias and batch norm, activation
// bases, the product table computed from the bases), then send start.
// Board 1's code stream runs through the behavioural network model into
// board 2; board 2's merged nibbles are collected with random host
// backpressure. Every link code and every output nibble is compared with a
// reference computed here. The number of convolution windows issued by each
// board is checked against one window per cycle, and each mechanism of the
// design (link and output stalls, zero padding, ReLU clamping, nibble-mode
// weight loading, every output code, pooling) must have happened.

import lq_pkg::*;
`include "lq_ref.svh"

localparam int L1_OH  = (L1_IMG - L1_K) / L1_STRIDE + 1;
localparam int L2_IMG = (L1_OH - 3) / 2 + 1;
localparam int L2_IC  = L1_OC;
localparam int L2_OH  = L2_IMG + 2*L2_PAD - L2_K + 1;
localparam int N_IMG  = L1_IC * L1_IMG * L1_IMG;
localparam int N_W1   = L1_OC * L1_IC * L1_K * L1_K;
localparam int N_ACT  = L2_IC * L2_IMG * L2_IMG;
localparam int N_W2   = L2_OC * L2_IC * L2_K * L2_K;
localparam int N_OUT  = L2_OC * L2_OH * L2_OH;
localparam int N_NIB  = (N_OUT + 1) / 2;

logic  clk = 0, rst_n = 0;
nib_t  h1_nib = '0, h2_nib = '0;
logic  h1_valid = 0, h2_valid = 0;
code_t l1_link_code, l2_link_code;
logic  l1_link_valid, l1_link_ready, l2_link_valid, l2_link_ready;
nib_t  out_nib;
logic  out_valid, out_ready = 0;
logic  l1_busy, l1_done, l2_busy, l2_done;

int checks = 0, failures = 0;
longint cycles = 0;

// stimulus and reference
int img[], w1[], w2[], act_ref[], out_ref[];
int b1[], s1[], t1[], b2[], s2[], t2[];
int q1[2], q2[2], lut[16];
int wc, wd;

// mechanism counters
longint n_link_stall = 0, n_out_stall = 0, n_pad = 0, n_clamp = 0;
longint n_nibw = 0, n_pool_move = 0, n_l1_win = 0, n_l2_win = 0;
longint n_code[4];
int     l1_seen = 0, nib_seen = 0, l1_bad = 0, out_bad = 0;

always #5 clk = ~clk;

stdm_link_model #(.DEPTH(4), .LATENCY(3), .SLOTS(4), .OWN(1)) u_net (
  .clk, .rst_n,
  .in_code   (l1_link_code),
  .in_valid  (l1_link_valid),
  .in_ready  (l1_link_ready),
  .out_code  (l2_link_code),
  .out_valid (l2_link_valid),
  .out_ready (l2_link_ready)
);

initial begin
  repeat (WD_CYCLES) @(posedge clk);
  failures++;
  $display("watchdog: l1 codes %0d/%0d, nibbles %0d/%0d", l1_seen, N_ACT, nib_seen, N_NIB);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

// monitors
always @(posedge clk) if (rst_n) begin
  cycles++;
  if (l1_link_valid && !l1_link_ready) n_link_stall++;
  if (out_valid && !out_ready) n_out_stall++;
  if (dut.u_l1.c_valid) n_l1_win++;
  if (dut.u_l2.c_valid) n_l2_win++;
  if (dut.u_l2.c_valid && (dut.u_l2.win_pad != '0)) n_pad++;
  if (dut.u_l2.p_valid && dut.u_l2.p_ready && dut.u_l2.q_clamped) n_clamp++;
  if (dut.u_l2.wr_en && dut.u_l2.wr_nib) n_nibw++;
  if (dut.u_l1.pool_adv && dut.u_l1.pmax != dut.u_l1.pwin[0]) n_pool_move++;
  if (l1_link_valid && l1_link_ready) begin
    if (l1_seen < N_ACT && int'(l1_link_code) != act_ref[l1_seen]) begin
      l1_bad++;
      if (l1_bad <= 5) $display("FAIL link code %0d: %0d exp %0d", l1_seen, l1_link_code, act_ref[l1_seen]);
    end
    l1_seen++;
  end
  if (out_valid && out_ready) begin
    int e;
    e = (out_ref[2*nib_seen] << 2)
      | ((2*nib_seen + 1 < N_OUT) ? out_ref[2*nib_seen + 1] : 0);
    if (nib_seen >= N_NIB || int'(out_nib) != e) begin
      out_bad++;
      if (out_bad <= 5) $display("FAIL nibble %0d: %h exp %h", nib_seen, out_nib, e);
    end
    n_code[out_nib[3:2]]++;
    if (2*nib_seen + 1 < N_OUT) n_code[out_nib[1:0]]++;
    nib_seen++;
  end
end

task automatic h1_send(nib_t n);
  h1_nib = n; h1_valid = 1'b1;
  @(negedge clk);
  h1_valid = 1'b0;
endtask
task automatic h1_word(int w);
  for (int i = 7; i >= 0; i--) h1_send(nib_t'(w >> (4*i)));
endtask
task automatic h2_send(nib_t n);
  h2_nib = n; h2_valid = 1'b1;
  @(negedge clk);
  h2_valid = 1'b0;
endtask
task automatic h2_word(int w);
  for (int i = 7; i >= 0; i--) h2_send(nib_t'(w >> (4*i)));
endtask

function automatic int rnd(int lo, int hi);
  return lo + int'($urandom_range(0, hi - lo));
endfunction

task automatic make_data();
  int wmax1, plane[];
  img = new[N_IMG]; w1 = new[N_W1]; w2 = new[N_W2];
  act_ref = new[N_ACT]; out_ref = new[N_OUT];
  b1 = new[L1_OC]; s1 = new[L1_OC]; t1 = new[L1_OC];
  b2 = new[L2_OC]; s2 = new[L2_OC]; t2 = new[L2_OC];
  // layer 1: pixels in [-1, 1], weights scaled so a window sum is about +-1
  wmax1 = int'(3.0 * 65536.0 / $sqrt(real'(L1_IC * L1_K * L1_K)));
  foreach (img[i]) img[i] = rnd(-65536, 65536);
  foreach (w1[i])  w1[i]  = rnd(-wmax1, wmax1);
  foreach (b1[i]) begin
    b1[i] = rnd(-8192, 8192); s1[i] = rnd(32768, 98304); t1[i] = rnd(-13107, 26214);
  end
  q1[0] = 32768; q1[1] = 16384;           // activation levels 0, .25, .5, .75
  // layer 2: weight basis c > d, scaled by the window size
  wc = int'(2.0 * 65536.0 / $sqrt(real'(L2_IC * L2_K * L2_K)));
  wd = wc / 3;
  foreach (w2[i]) w2[i] = rnd(0, 3);
  for (int a = 0; a < 4; a++)
    for (int w = 0; w < 4; w++)
      lut[a*4 + w] = ref_fixmul(ref_aval(a, q1[0], q1[1]), ref_wval(w, wc, wd));
  foreach (b2[i]) begin
    b2[i] = rnd(-8192, 8192); s2[i] = rnd(32768, 98304); t2[i] = rnd(-6554, 19661);
  end
  q2[0] = 26214; q2[1] = 13107;

  // reference layer 1: conv, quantize, 3x3 stride-2 max pool
  plane = new[L1_OH * L1_OH];
  for (int oc = 0; oc < L1_OC; oc++) begin
    for (int oy = 0; oy < L1_OH; oy++)
      for (int ox = 0; ox < L1_OH; ox++) begin
        int acc;
        acc = 0;
        for (int ic = 0; ic < L1_IC; ic++) begin
          longint big;
          big = 0;
          for (int ky = 0; ky < L1_K; ky++)
            for (int kx = 0; kx < L1_K; kx++)
              big += longint'(img[(ic*L1_IMG + oy*L1_STRIDE + ky)*L1_IMG + ox*L1_STRIDE + kx])
                   * longint'(w1[((oc*L1_IC + ic)*L1_K + ky)*L1_K + kx]);
          acc = acc + int'(big >>> 16);
        end
        plane[oy*L1_OH + ox] = ref_quant(acc, b1[oc], s1[oc], t1[oc], q1[0], q1[1]);
      end
    for (int py = 0; py < L2_IMG; py++)
      for (int px = 0; px < L2_IMG; px++) begin
        int m;
        m = 0;
        for (int dy = 0; dy < 3; dy++)
          for (int dx = 0; dx < 3; dx++)
            if (plane[(2*py + dy)*L1_OH + 2*px + dx] > m) m = plane[(2*py + dy)*L1_OH + 2*px + dx];
        act_ref[(oc*L2_IMG + py)*L2_IMG + px] = m;
      end
  end

  // reference layer 2: table-based conv with zero padding, quantize
  for (int oc = 0; oc < L2_OC; oc++)
    for (int oy = 0; oy < L2_OH; oy++)
      for (int ox = 0; ox < L2_OH; ox++) begin
        int acc;
        acc = 0;
        for (int ic = 0; ic < L2_IC; ic++)
          for (int ky = 0; ky < L2_K; ky++)
            for (int kx = 0; kx < L2_K; kx++) begin
              int iy, ix, a;
              iy = oy + ky - L2_PAD;
              ix = ox + kx - L2_PAD;
              a = (iy < 0 || iy >= L2_IMG || ix < 0 || ix >= L2_IMG) ? 0
                : act_ref[(ic*L2_IMG + iy)*L2_IMG + ix];
              acc += lut[a*4 + w2[((oc*L2_IC + ic)*L2_K + ky)*L2_K + kx]];
            end
        out_ref[(oc*L2_OH + oy)*L2_OH + ox] = ref_quant(acc, b2[oc], s2[oc], t2[oc], q2[0], q2[1]);
      end
endtask

task automatic load_board1();
  h1_word({TGT_IMG, 28'(N_IMG)});    foreach (img[i]) h1_word(img[i]);
  h1_word({TGT_W, 28'(N_W1)});       foreach (w1[i])  h1_word(w1[i]);
  h1_word({TGT_BIAS, 28'(L1_OC)});   foreach (b1[i])  h1_word(b1[i]);
  h1_word({TGT_SCALE, 28'(L1_OC)});  foreach (s1[i])  h1_word(s1[i]);
  h1_word({TGT_SHIFT, 28'(L1_OC)});  foreach (t1[i])  h1_word(t1[i]);
  h1_word({TGT_QBASIS, 28'd2});      h1_word(q1[0]); h1_word(q1[1]);
  h1_word({TGT_START, 28'd0});
endtask

task automatic load_board2();
  h2_word({TGT_LUT, 28'd16});        foreach (lut[i]) h2_word(lut[i]);
  h2_word({TGT_WCODE, 28'((N_W2 + 1) / 2)});
  for (int i = 0; i < (N_W2 + 1) / 2; i++)
    h2_send(nib_t'({w2[2*i][1:0], (2*i + 1 < N_W2) ? w2[2*i + 1][1:0] : 2'b00}));
  h2_word({TGT_BIAS, 28'(L2_OC)});   foreach (b2[i])  h2_word(b2[i]);
  h2_word({TGT_SCALE, 28'(L2_OC)});  foreach (s2[i])  h2_word(s2[i]);
  h2_word({TGT_SHIFT, 28'(L2_OC)});  foreach (t2[i])  h2_word(t2[i]);
  h2_word({TGT_QBASIS, 28'd2});      h2_word(q2[0]); h2_word(q2[1]);
  h2_word({TGT_START, 28'd0});
endtask

task automatic expect_happened(longint n, string what);
  checks++;
  $display("  %-28s %0d", what, n);
  if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
endtask

initial begin
  foreach (n_code[k]) n_code[k] = 0;
  make_data();
  repeat (3) @(negedge clk);
  rst_n = 1'b1;
  @(negedge clk);
  fork
    load_board1();
    load_board2();
  join
  wait (l2_done);
  while (nib_seen < N_NIB) @(posedge clk);
  repeat (20) @(posedge clk);

  checks++;
  if (l1_seen != N_ACT || l1_bad != 0) begin
    failures++; $display("FAIL link: %0d codes, %0d wrong", l1_seen, l1_bad);
  end
  checks++;
  if (nib_seen != N_NIB || out_bad != 0) begin
    failures++; $display("FAIL output: %0d nibbles, %0d wrong", nib_seen, out_bad);
  end
  checks += N_ACT + N_NIB;
  // one window per cycle: exactly one issue slot per (oc, ic, oy, ox)
  checks++;
  if (n_l1_win != longint'(L1_OC) * L1_IC * L1_OH * L1_OH) begin
    failures++; $display("FAIL layer-1 windows %0d", n_l1_win);
  end
  checks++;
  if (n_l2_win != longint'(L2_OC) * L2_IC * L2_OH * L2_OH) begin
    failures++; $display("FAIL layer-2 windows %0d", n_l2_win);
  end
  $display("mechanisms:");
  expect_happened(n_link_stall, "link backpressure");
  expect_happened(n_out_stall, "host output backpressure");
  expect_happened(n_pad, "padded windows");
  expect_happened(n_clamp, "ReLU clamps (layer 2)");
  expect_happened(n_nibw, "nibble-mode weight writes");
  expect_happened(n_pool_move, "pool max off window corner");
  for (int k = 0; k < 4; k++) expect_happened(n_code[k], $sformatf("output code %0d", k));
  $display("cycles %0d", cycles);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
