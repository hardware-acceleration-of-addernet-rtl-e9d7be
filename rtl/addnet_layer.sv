// addnet_layer: compute engine for one layer of the AdderNet ResNet20.
//
// In SAD mode (OP_SAD) the engine evaluates the adder2d layer
//   Y[oh,ow,oc] = - sum_{kh,kw,ci} | X[oh*S+kh-P, ow*S+kw-P, ci] - W[oc,kh,kw,ci] |
// where zero-padded input positions still contribute |0 - W| (the layer unfolds
// a zero-padded input). In MAC mode (OP_MAC) it evaluates an ordinary
// convolution, sum X*W, used for the first 3x3 convolution and for the final
// 1x1 classifier. Every accumulator then goes through batch normalization and
// requantization (bn_quant), an optional residual addition and an optional
// ReLU (add_relu), and is written to the next layer's feature-map buffer.
//
// Parallelism: each cycle the engine processes one kernel tap (kh,kw) for
// CI_PAR input channels, for two neighbouring output pixels and two
// neighbouring output channels. In SAD mode the four differences of every
// input channel come from one packed Quad-INT12 SIMD subtractor
// (quad_int12_sub); their absolute values are summed over the CI_PAR channels
// and accumulated. One output group of 2x2 values therefore takes
// K*K*ceil(CIN/CI_PAR) cycles, and a frame takes
//   HO * ceil(WO/2) * ceil(COUT/2) * K*K*ceil(CIN/CI_PAR)
// cycles plus DRAIN_CYC+1 cycles to empty the pipeline and hand the frame on.
// The pairing of two pixels with two channels follows the DSP packing of the
// design; CI_PAR, the loop order and the frame-level handshake are this
// design's own choices.
//
// Interfaces (all feature maps are stored (h, w, c) with c fastest):
//   in_*   read side of the input fmap_pingpong; a frame starts when in_full,
//          out_free and (if RESIDUAL) res_full are all high. The start waits
//          (stall = 1) while the input is ready but an output or residual bank
//          is not.
//   res_*  read side of the skip-connection buffer, same shape as the output.
//   out_*  write side of the output buffer(s); out_commit and in_release (and
//          res_release) pulse together when the frame is complete.
//   cfg    configuration bus: weights, BN coefficients and the BN pre-scaling
//          shift of layer LAYER_ID, loaded while the engine is idle.
// Pipeline: address/read (S1), two SIMD stages (S2,S3), lane sums (S4),
// accumulate (S5), normalize (S6), write.
module addnet_layer
  import addnet_pkg::*;
#(
  parameter int  LAYER_ID = 1,
  parameter op_e OP       = OP_SAD,
  parameter int  CIN      = 16,
  parameter int  COUT     = 16,
  parameter int  H        = 32,
  parameter int  W        = 32,
  parameter int  K        = 3,
  parameter int  STRIDE   = 1,
  parameter int  PAD      = 1,
  parameter bit  RELU     = 1'b1,
  parameter bit  RESIDUAL = 1'b0,
  parameter int  CI_PAR   = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cfg_t  cfg,
  // input feature map
  input  logic  in_full,
  output logic  in_release,
  output addr_t in_rd_addr [2*CI_PAR],
  input  act_t  in_rd_data [2*CI_PAR],
  // skip connection
  input  logic  res_full,
  output logic  res_release,
  output addr_t res_rd_addr [4],
  input  act_t  res_rd_data [4],
  // output feature map
  input  logic  out_free,
  output logic  out_commit,
  output logic  out_we   [4],
  output addr_t out_addr [4],
  output act_t  out_data [4],
  // status
  output logic  busy,
  output logic  stall
);

  localparam int HO     = (H + 2*PAD - K) / STRIDE + 1;
  localparam int WO     = (W + 2*PAD - K) / STRIDE + 1;
  localparam int WOP    = (WO + 1) / 2;
  localparam int COP    = (COUT + 1) / 2;
  localparam int CIG    = (CIN + CI_PAR - 1) / CI_PAR;
  localparam int WDEPTH = COUT * K * K * CIN;
  localparam int DRAIN_CYC = 7;

  // ---------------- parameters of the layer ----------------
  act_t                    wmem [WDEPTH];
  logic signed [BNA_W-1:0] bna  [COUT];
  logic signed [BNB_W-1:0] bnb  [COUT];
  logic [3:0]              bscale;

  always_ff @(posedge clk) begin
    if (cfg.valid && int'(cfg.layer) == LAYER_ID) begin
      case (cfg.sel)
        CFG_WEIGHT: if (int'(cfg.addr) < WDEPTH) wmem[cfg.addr] <= act_t'(cfg.data[ACT_W-1:0]);
        CFG_BN_A:   if (int'(cfg.addr) < COUT)   bna[cfg.addr]  <= cfg.data[BNA_W-1:0];
        CFG_BN_B:   if (int'(cfg.addr) < COUT)   bnb[cfg.addr]  <= cfg.data[BNB_W-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bscale <= '0;
    else if (cfg.valid && int'(cfg.layer) == LAYER_ID && cfg.sel == CFG_BSCALE)
      bscale <= cfg.data[3:0];
  end

  // ---------------- control ----------------
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;
  state_e state;
  logic [15:0] oh, owp, ocp, kh, kw, cg;
  logic [3:0]  drain_cnt;
  logic        start, issue, last_issue;

  assign start = (state == S_IDLE) && in_full && out_free && (!RESIDUAL || res_full);
  assign stall = (state == S_IDLE) && in_full && !start;
  assign busy  = (state != S_IDLE);
  assign issue = (state == S_RUN);
  assign last_issue = issue && int'(cg) == CIG-1 && int'(kw) == K-1 && int'(kh) == K-1 &&
                      int'(ocp) == COP-1 && int'(owp) == WOP-1 && int'(oh) == HO-1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      {oh, owp, ocp, kh, kw, cg} <= '0;
      drain_cnt <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          {oh, owp, ocp, kh, kw, cg} <= '0;
        end
        S_RUN: begin
          if (last_issue) begin
            state     <= S_DRAIN;
            drain_cnt <= '0;
          end
          if (int'(cg) != CIG-1) cg <= cg + 1'b1;
          else begin
            cg <= '0;
            if (int'(kw) != K-1) kw <= kw + 1'b1;
            else begin
              kw <= '0;
              if (int'(kh) != K-1) kh <= kh + 1'b1;
              else begin
                kh <= '0;
                if (int'(ocp) != COP-1) ocp <= ocp + 1'b1;
                else begin
                  ocp <= '0;
                  if (int'(owp) != WOP-1) owp <= owp + 1'b1;
                  else begin
                    owp <= '0;
                    oh  <= oh + 1'b1;
                  end
                end
              end
            end
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (int'(drain_cnt) == DRAIN_CYC-1) state <= S_DONE;
        end
        default: state <= S_IDLE;  // S_DONE: hand the frame on
      endcase
    end
  end

  assign out_commit  = (state == S_DONE);
  assign in_release  = (state == S_DONE);
  assign res_release = (state == S_DONE) && RESIDUAL;

  // ---------------- S0: addresses ----------------
  logic inb  [2];
  logic chv  [CI_PAR];
  logic ocv  [2];
  logic [31:0] waddr [2][CI_PAR];

  always_comb begin
    int ih, iw, ci;
    ih = int'(oh) * STRIDE + int'(kh) - PAD;
    for (int p = 0; p < 2; p++) begin
      iw = (2*int'(owp) + p) * STRIDE + int'(kw) - PAD;
      inb[p] = ih >= 0 && ih < H && iw >= 0 && iw < W && (2*int'(owp) + p) < WO;
      for (int j = 0; j < CI_PAR; j++) begin
        ci = int'(cg) * CI_PAR + j;
        in_rd_addr[p*CI_PAR + j] = (inb[p] && ci < CIN) ? addr_t'((ih*W + iw)*CIN + ci) : '0;
      end
    end
    for (int j = 0; j < CI_PAR; j++) chv[j] = (int'(cg) * CI_PAR + j) < CIN;
    for (int c = 0; c < 2; c++) begin
      ocv[c] = (2*int'(ocp) + c) < COUT;
      for (int j = 0; j < CI_PAR; j++)
        waddr[c][j] = 32'((((2*int'(ocp) + c)*K + int'(kh))*K + int'(kw))*CIN + int'(cg)*CI_PAR + j);
    end
  end

  // Tags that travel with the data: output position and accumulate control.
  typedef struct packed {
    logic        v;
    logic        first;
    logic        last;
    logic [15:0] oh, owp, ocp;
  } tag_t;

  tag_t t1, t2, t3, t4, t5;

  // ---------------- S1: operand registers ----------------
  act_t x1 [2][CI_PAR];
  act_t w1 [2][CI_PAR];

  always_ff @(posedge clk) begin
    for (int j = 0; j < CI_PAR; j++) begin
      for (int p = 0; p < 2; p++)
        x1[p][j] <= (inb[p] && chv[j]) ? in_rd_data[p*CI_PAR + j] : '0;
      for (int c = 0; c < 2; c++)
        w1[c][j] <= (ocv[c] && chv[j] && int'(waddr[c][j]) < WDEPTH) ? wmem[waddr[c][j]] : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= '0; t2 <= '0; t3 <= '0; t4 <= '0;
    end else begin
      t1.v     <= issue;
      t1.first <= (cg == '0) && (kw == '0) && (kh == '0);
      t1.last  <= int'(cg) == CIG-1 && int'(kw) == K-1 && int'(kh) == K-1;
      t1.oh    <= oh;
      t1.owp   <= owp;
      t1.ocp   <= ocp;
      t2 <= t1;
      t3 <= t2;
      t4 <= t3;
    end
  end

  // ---------------- S2,S3: differences or products ----------------
  // term[l][j] for lane l = 2*c + p (output channel c, pixel p).
  logic signed [16:0] term3 [4][CI_PAR];

  for (genvar j = 0; j < CI_PAR; j++) begin : g_lane
    if (OP == OP_SAD) begin : g_sad
      logic signed [11:0] d [4];
      logic [3:0] co_unused;
      quad_int12_sub u_pe (
        .clk, .x0(x1[0][j]), .x1(x1[1][j]), .w0(w1[0][j]), .w1(w1[1][j]),
        .d, .carry_out(co_unused)
      );
      // quad_int12_sub lanes: 0:x0-w0 1:x1-w0 2:x0-w1 3:x1-w1 = lane 2*c+p
      always_comb for (int l = 0; l < 4; l++) term3[l][j] = 17'(d[l]);
    end else begin : g_mac
      logic signed [16:0] m2 [4];
      logic signed [16:0] m3 [4];
      always_ff @(posedge clk) begin
        for (int c = 0; c < 2; c++)
          for (int p = 0; p < 2; p++)
            m2[2*c + p] <= 17'(x1[p][j]) * 17'(w1[c][j]);
        m3 <= m2;
      end
      always_comb for (int l = 0; l < 4; l++) term3[l][j] = m3[l];
    end
  end

  // ---------------- S4: sum over the CI_PAR channels ----------------
  acc_t part4 [4];
  always_ff @(posedge clk) begin
    for (int l = 0; l < 4; l++) begin
      acc_t s;
      s = '0;
      for (int j = 0; j < CI_PAR; j++) begin
        if (OP == OP_SAD) s = s + acc_t'((term3[l][j] < 0) ? 17'(-term3[l][j]) : term3[l][j]);
        else              s = s + acc_t'(term3[l][j]);
      end
      part4[l] <= s;
    end
  end

  // ---------------- S5: accumulate ----------------
  acc_t acc  [4];
  acc_t res5 [4];
  always_ff @(posedge clk) begin
    for (int l = 0; l < 4; l++) begin
      acc_t a;
      a = t4.first ? part4[l] : acc[l] + part4[l];
      if (t4.v) acc[l] <= a;
      if (t4.v && t4.last) res5[l] <= (OP == OP_SAD) ? -a : a;
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t5 <= '0;
    else begin
      t5   <= t4;
      t5.v <= t4.v && t4.last;
    end
  end

  // ---------------- S6: normalize, residual, ReLU, write ----------------
  act_t bn5 [4];
  act_t bn6 [4];
  tag_t t6;
  for (genvar l = 0; l < 4; l++) begin : g_bn
    localparam int C = l / 2;
    int oc5;
    assign oc5 = 2*int'(t5.ocp) + C;
    bn_quant u_bn (
      .x(res5[l]), .bscale,
      .a(oc5 < COUT ? bna[oc5] : '0),
      .b(oc5 < COUT ? bnb[oc5] : '0),
      .y(bn5[l])
    );
  end
  always_ff @(posedge clk) bn6 <= bn5;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t6 <= '0;
    else        t6 <= t5;
  end

  for (genvar l = 0; l < 4; l++) begin : g_out
    localparam int C = l / 2;
    localparam int P = l % 2;
    int oc, ow;
    assign oc = 2*int'(t6.ocp) + C;
    assign ow = 2*int'(t6.owp) + P;
    assign out_we[l]      = t6.v && oc < COUT && ow < WO;
    assign out_addr[l]    = addr_t'((int'(t6.oh)*WO + ow)*COUT + oc);
    assign res_rd_addr[l] = out_addr[l];
    add_relu u_ar (
      .bn(bn6[l]), .res(res_rd_data[l]), .use_res(RESIDUAL), .use_relu(RELU), .y(out_data[l])
    );
  end

endmodule
