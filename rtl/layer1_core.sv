// layer1_core: the first convolution layer, as placed on the first board.
//
// What it computes, for every output channel oc (AlexNet conv1 by default:
// 3 x 227 x 227 image, 96 kernels of 11 x 11, stride 4, 55 x 55 output):
//   acc[oy][ox] = sum over ic, ky, kx of img[ic][oy*S+ky][ox*S+kx] * w[oc][ic][ky][kx]
//   code        = 2-bit LQ-Nets quantization of ReLU(BN(acc + bias[oc]))
//   out         = 3 x 3, stride 2 max pooling of the code plane (27 x 27)
// The first layer keeps full-precision image and weights (only its output
// activations are quantized), so the window engine multiplies.
//
// All parameters live in on-chip memory; nothing is read from DRAM. The host
// fills the memories over its 4-bit port (param_loader: image, weights, bias,
// BN scale and shift, the two activation basis values) and then sends the
// start command. The layer then runs output channel by output channel:
//   CONV  IC*OH*OW cycles, one K x K window per cycle (conv_loop_ctrl +
//         fp_window_mac), partial sums of each input channel added into the
//         OH x OW accumulator plane
//   POST  OH*OW cycles, accumulator -> bias/BN/ReLU/quantizer -> code plane
//   POOL  PH*PW pooled codes streamed out on link_* (valid/ready), one per
//         cycle while the link accepts; a stalled link holds the layer.
// done pulses when the last channel's last code is placed on the link.
// Codes leave channel by channel, row-major inside a channel, which is the
// order the next layer stores them in.
//
// The Q16.16 fixed-point arithmetic (instead of 32-bit floating point), the
// header-based host protocol, the loop order and pooling on codes are this
// design's choices.
module layer1_core
  import lq_pkg::*;
#(
  parameter int IMG    = 227,
  parameter int K      = 11,
  parameter int STRIDE = 4,
  parameter int IC     = 3,
  parameter int OC     = 96
) (
  input  logic  clk,
  input  logic  rst_n,
  // host 4-bit port
  input  nib_t  host_nib,
  input  logic  host_valid,
  // pooled activation codes to the board-to-board link
  output code_t link_code,
  output logic  link_valid,
  input  logic  link_ready,
  // status
  output logic  busy,
  output logic  done
);

  localparam int OH   = (IMG - K) / STRIDE + 1;
  localparam int PH   = (OH - 3) / 2 + 1;
  localparam int NPIX = OH * OH;
  localparam int NWIN = K * K;
  localparam int IMGW = IC * IMG * IMG;
  localparam int WW   = OC * IC * K * K;
  localparam int IDXW = $clog2(NPIX + 1);
  localparam int TAGW = IDXW + 1;

  // ---------------------------------------------------------------- memories
  fix_t  img_mem  [IMGW];
  fix_t  w_mem    [WW];
  fix_t  bias_mem [OC];
  fix_t  scale_mem[OC];
  fix_t  shift_mem[OC];
  fix_t  qb       [2];
  fix_t  acc_mem  [NPIX];
  code_t plane    [NPIX];

  // ------------------------------------------------------------ host loading
  logic        wr_en, wr_nib, host_start;
  tgt_e        wr_tgt;
  logic [27:0] wr_addr;
  logic [31:0] wr_data;

  param_loader #(.ADDR_W(28)) u_loader (
    .clk, .rst_n,
    .nib       (host_nib),
    .nib_valid (host_valid),
    .wr_en, .wr_tgt, .wr_addr, .wr_data, .wr_nib,
    .start     (host_start)
  );

  always_ff @(posedge clk) begin
    if (wr_en && !wr_nib) begin
      unique case (wr_tgt)
        TGT_IMG:    if (wr_addr < 28'(IMGW)) img_mem[int'(wr_addr)]   <= wr_data;
        TGT_W:      if (wr_addr < 28'(WW))   w_mem[int'(wr_addr)]     <= wr_data;
        TGT_BIAS:   if (wr_addr < 28'(OC))   bias_mem[int'(wr_addr)]  <= wr_data;
        TGT_SCALE:  if (wr_addr < 28'(OC))   scale_mem[int'(wr_addr)] <= wr_data;
        TGT_SHIFT:  if (wr_addr < 28'(OC))   shift_mem[int'(wr_addr)] <= wr_data;
        TGT_QBASIS: if (wr_addr < 28'd2)     qb[wr_addr[0]]     <= wr_data;
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------- sequencing
  typedef enum logic [2:0] {S_IDLE, S_LAUNCH, S_CONV, S_POST, S_POOL} state_e;
  state_e state;

  logic [$clog2(OC+1)-1:0] oc;
  logic [IDXW-1:0]         pidx;
  logic [$clog2(PH+1)-1:0] py, px;

  logic                      c_busy, c_valid, c_first, c_last, c_done;
  logic [$clog2(IC+1)-1:0]   c_ic;
  logic [$clog2(OH+1)-1:0]   c_oy, c_ox;

  conv_loop_ctrl #(.IC(IC), .OH(OH), .OW(OH)) u_ctrl (
    .clk, .rst_n,
    .start (state == S_LAUNCH),
    .busy  (c_busy),
    .valid (c_valid),
    .ic    (c_ic),
    .oy    (c_oy),
    .ox    (c_ox),
    .first (c_first),
    .last  (c_last),
    .done  (c_done)
  );

  // ---------------------------------------------------------- window engine
  fix_t            win_pix[NWIN];
  fix_t            win_w  [NWIN];
  logic [TAGW-1:0] in_tag, out_tag;
  logic            m_valid;
  fix_t            m_sum;

  always_comb begin
    for (int ky = 0; ky < K; ky++) begin
      for (int kx = 0; kx < K; kx++) begin
        win_pix[ky*K+kx] = img_mem[(int'(c_ic)*IMG + int'(c_oy)*STRIDE + ky)*IMG
                                   + int'(c_ox)*STRIDE + kx];
        win_w[ky*K+kx]   = w_mem[((int'(oc)*IC + int'(c_ic))*K + ky)*K + kx];
      end
    end
    in_tag = {c_first, IDXW'(int'(c_oy)*OH + int'(c_ox))};
  end

  fp_window_mac #(.N(NWIN), .TAG_W(TAGW)) u_mac (
    .clk, .rst_n,
    .in_valid  (c_valid),
    .in_tag,
    .pix       (win_pix),
    .wgt       (win_w),
    .out_valid (m_valid),
    .out_tag,
    .out_sum   (m_sum)
  );

  // accumulate: the first input channel loads, the others add
  always_ff @(posedge clk) begin
    if (m_valid) begin
      if (out_tag[TAGW-1]) acc_mem[out_tag[IDXW-1:0]] <= m_sum;
      else                 acc_mem[out_tag[IDXW-1:0]] <= acc_mem[out_tag[IDXW-1:0]] + m_sum;
    end
  end

  // ------------------------------------------------ bias / BN / ReLU / quant
  fix_t  q_relu;
  logic  q_clamped;
  code_t q_code;

  bn_relu_quant u_bnq (
    .acc     (acc_mem[pidx]),
    .bias    (bias_mem[int'(oc)]),
    .scale   (scale_mem[int'(oc)]),
    .shift   (shift_mem[int'(oc)]),
    .v1      (qb[0]),
    .v2      (qb[1]),
    .relu    (q_relu),
    .clamped (q_clamped),
    .code    (q_code)
  );

  always_ff @(posedge clk) begin
    if (state == S_POST) plane[pidx] <= q_code;
  end

  // ------------------------------------------------------------- max pooling
  code_t pwin[9];
  code_t pmax;

  always_comb begin
    for (int dy = 0; dy < 3; dy++)
      for (int dx = 0; dx < 3; dx++)
        pwin[dy*3+dx] = plane[(int'(py)*2 + dy)*OH + int'(px)*2 + dx];
  end

  maxpool3x3 u_pool (.win(pwin), .max_code(pmax));

  wire pool_adv = (state == S_POOL) && (!link_valid || link_ready);

  // ------------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      oc         <= '0;
      pidx       <= '0;
      py         <= '0;
      px         <= '0;
      link_code  <= '0;
      link_valid <= 1'b0;
      busy       <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (link_valid && link_ready) link_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (host_start) begin
          oc    <= '0;
          busy  <= 1'b1;
          state <= S_LAUNCH;
        end
        S_LAUNCH: state <= S_CONV;
        S_CONV: if (c_done) begin
          pidx  <= '0;
          state <= S_POST;
        end
        S_POST: begin
          if (pidx == IDXW'(NPIX - 1)) begin
            py    <= '0;
            px    <= '0;
            state <= S_POOL;
          end else begin
            pidx <= pidx + 1'b1;
          end
        end
        S_POOL: if (pool_adv) begin
          link_code  <= pmax;
          link_valid <= 1'b1;
          if (int'(px) == PH - 1) begin
            px <= '0;
            if (int'(py) == PH - 1) begin
              if (int'(oc) == OC - 1) begin
                busy  <= 1'b0;
                done  <= 1'b1;
                state <= S_IDLE;
              end else begin
                oc    <= oc + 1'b1;
                state <= S_LAUNCH;
              end
            end else begin
              py <= py + 1'b1;
            end
          end else begin
            px <= px + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the accumulator plane is only read back after the pass that fills it
  // the loop controller finishes right after its last triple
  property p_ctrl_done;
    @(posedge clk) disable iff (!rst_n) c_last |=> c_done && !c_busy;
  endproperty
  assert property (p_ctrl_done);

  property p_no_conv_outside;
    @(posedge clk) disable iff (!rst_n) c_valid |-> (state == S_CONV);
  endproperty
  assert property (p_no_conv_outside);

  property p_link_hold;
    @(posedge clk) disable iff (!rst_n)
      link_valid && !link_ready |=> link_valid && $stable(link_code);
  endproperty
  assert property (p_link_hold);

endmodule
