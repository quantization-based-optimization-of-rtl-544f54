// layer2_core: the second convolution layer, as placed on the second board.
//
// Both weights and input activations of this layer are 2-bit LQ-Nets codes,
// so every product in the convolution is one of 16 values. The host
// computes those 16 products once from the two learned bases and writes
// them into a table; the window engine then looks products up instead of
// multiplying (lut_window_mac / lq_lut). By default it is AlexNet conv2:
// 96 x 27 x 27 input codes, 256 kernels of 5 x 5, zero padding 2,
// stride 1, 27 x 27 output.
//
// Data paths:
//   link_*   input activation codes from the previous board (valid/ready),
//            channel by channel, row-major; stored in the activation buffer.
//            Accepted only while idle and until the buffer is full.
//   host_*   4-bit host port (param_loader): 32-bit words for the product
//            table, bias, BN scale and shift, and the output activation
//            basis; weights as nibbles that each merge two 2-bit codes
//            (first code in bits 3:2); a start command arms one run.
//   out_*    2-bit output codes merged two per nibble (code_packer) for the
//            host, valid/ready.
// A run starts when it is armed and the activation buffer is full. Per
// output channel: CONV takes IC*OH*OW cycles, one 5 x 5 window per cycle,
// with positions outside the image read as code 00 (value 0, the zero
// padding); POST streams OH*OW codes through bias/BN/ReLU/quantizer into
// the packer, one per cycle unless the host port stalls. After the last
// channel done pulses and the buffer is emptied for the next image.
//
// Q16.16 arithmetic instead of floating point, the host protocol, padding
// by address check and the loop order are this design's choices.
module layer2_core
  import lq_pkg::*;
#(
  parameter int IMG = 27,
  parameter int K   = 5,
  parameter int PAD = 2,
  parameter int IC  = 96,
  parameter int OC  = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  // host 4-bit port
  input  nib_t  host_nib,
  input  logic  host_valid,
  // input activation codes from the link
  input  code_t link_code,
  input  logic  link_valid,
  output logic  link_ready,
  // merged output codes to the host
  output nib_t  out_nib,
  output logic  out_valid,
  input  logic  out_ready,
  // status
  output logic  busy,
  output logic  done
);

  localparam int OH   = IMG + 2*PAD - K + 1;
  localparam int NPIX = OH * OH;
  localparam int NWIN = K * K;
  localparam int ACTW = IC * IMG * IMG;
  localparam int WW   = OC * IC * K * K;
  localparam int IDXW = $clog2(NPIX + 1);
  localparam int TAGW = IDXW + 1;

  // ---------------------------------------------------------------- memories
  code_t act_mem  [ACTW];
  code_t w_mem    [WW];
  fix_t  bias_mem [OC];
  fix_t  scale_mem[OC];
  fix_t  shift_mem[OC];
  fix_t  qb       [2];
  fix_t  acc_mem  [NPIX];

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
    if (wr_en) begin
      unique case (wr_tgt)
        TGT_WCODE: begin
          if (2*wr_addr < 28'(WW))     w_mem[2*int'(wr_addr)]     <= wr_data[3:2];
          if (2*wr_addr + 1 < 28'(WW)) w_mem[2*int'(wr_addr) + 1] <= wr_data[1:0];
        end
        TGT_BIAS:   if (wr_addr < 28'(OC)) bias_mem[int'(wr_addr)]  <= wr_data;
        TGT_SCALE:  if (wr_addr < 28'(OC)) scale_mem[int'(wr_addr)] <= wr_data;
        TGT_SHIFT:  if (wr_addr < 28'(OC)) shift_mem[int'(wr_addr)] <= wr_data;
        TGT_QBASIS: if (wr_addr < 28'd2)   qb[wr_addr[0]]     <= wr_data;
        default: ;
      endcase
    end
  end

  wire lut_we = wr_en && wr_tgt == TGT_LUT && wr_addr < 28'd16;

  // ------------------------------------------------------ activation buffer
  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_CONV, S_POST} state_e;
  state_e state;

  logic [$clog2(ACTW+1)-1:0] act_cnt;
  logic                      armed;

  assign link_ready = (state == S_IDLE) && (act_cnt != ($clog2(ACTW+1))'(ACTW));

  // ------------------------------------------------------------- sequencing
  logic [$clog2(OC+1)-1:0] oc;
  logic [IDXW-1:0]         pidx;

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
  code_t           win_a[NWIN];
  code_t           win_w[NWIN];
  logic [NWIN-1:0] win_pad;
  logic [TAGW-1:0] in_tag, out_tag;
  logic            m_valid;
  fix_t            m_sum;

  always_comb begin
    for (int ky = 0; ky < K; ky++) begin
      for (int kx = 0; kx < K; kx++) begin
        int iy, ix;
        iy = int'(c_oy) + ky - PAD;
        ix = int'(c_ox) + kx - PAD;
        win_pad[ky*K+kx] = (iy < 0) || (iy >= IMG) || (ix < 0) || (ix >= IMG);
        win_a[ky*K+kx]   = win_pad[ky*K+kx] ? 2'b00
                         : act_mem[(int'(c_ic)*IMG + iy)*IMG + ix];
        win_w[ky*K+kx]   = w_mem[((int'(oc)*IC + int'(c_ic))*K + ky)*K + kx];
      end
    end
    in_tag = {c_first, IDXW'(int'(c_oy)*OH + int'(c_ox))};
  end

  lut_window_mac #(.N(NWIN), .TAG_W(TAGW)) u_mac (
    .clk, .rst_n,
    .lut_we,
    .lut_widx  (wr_addr[3:0]),
    .lut_wdata (wr_data),
    .in_valid  (c_valid),
    .in_tag,
    .act       (win_a),
    .wgt       (win_w),
    .out_valid (m_valid),
    .out_tag,
    .out_sum   (m_sum)
  );

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

  // ------------------------------------------------------------ output merge
  logic p_valid, p_ready, p_last;

  assign p_valid = (state == S_POST);
  assign p_last  = (int'(oc) == OC - 1) && (pidx == IDXW'(NPIX - 1));

  code_packer u_pack (
    .clk, .rst_n,
    .in_code   (q_code),
    .in_last   (p_last),
    .in_valid  (p_valid),
    .in_ready  (p_ready),
    .out_nib,
    .out_valid,
    .out_ready
  );

  // ------------------------------------------------------------------- FSM
  always_ff @(posedge clk) begin
    if (link_valid && link_ready) act_mem[act_cnt] <= link_code;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      oc      <= '0;
      pidx    <= '0;
      act_cnt <= '0;
      armed   <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (host_start) armed <= 1'b1;
      if (link_valid && link_ready) act_cnt <= act_cnt + 1'b1;
      unique case (state)
        S_IDLE: if (armed && act_cnt == ($clog2(ACTW+1))'(ACTW)) begin
          armed <= 1'b0;
          oc    <= '0;
          busy  <= 1'b1;
          state <= S_LAUNCH;
        end
        S_LAUNCH: state <= S_CONV;
        S_CONV: if (c_done) begin
          pidx  <= '0;
          state <= S_POST;
        end
        S_POST: if (p_ready) begin
          if (pidx == IDXW'(NPIX - 1)) begin
            if (int'(oc) == OC - 1) begin
              busy    <= 1'b0;
              done    <= 1'b1;
              act_cnt <= '0;
              state   <= S_IDLE;
            end else begin
              oc    <= oc + 1'b1;
              state <= S_LAUNCH;
            end
          end else begin
            pidx <= pidx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the loop controller finishes right after its last triple
  property p_ctrl_done;
    @(posedge clk) disable iff (!rst_n) c_last |=> c_done && !c_busy;
  endproperty
  assert property (p_ctrl_done);

  property p_no_conv_outside;
    @(posedge clk) disable iff (!rst_n) c_valid |-> (state == S_CONV);
  endproperty
  assert property (p_no_conv_outside);

  property p_out_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_nib);
  endproperty
  assert property (p_out_hold);

endmodule
