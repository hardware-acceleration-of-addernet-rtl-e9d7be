// addnet_top: quantized AdderNet ResNet20 inference accelerator.
//
// The network replaces the multiply-accumulate of every inner convolution by
// a sum of absolute differences (adder2d), keeps batch normalization after
// each layer, and works on 8-bit integer activations and weights:
//   conv0   3x3 convolution (MAC), BN, ReLU                  IMG x IMG x BASE
//   3 x basic block, BASE channels                           IMG x IMG
//   3 x basic block, 2*BASE channels (first one stride 2)    IMG/2 x IMG/2
//   3 x basic block, 4*BASE channels (first one stride 2)    IMG/4 x IMG/4
//   global average pool                                      4*BASE values
//   fc      1x1 convolution (MAC) to NCLASS scores, BN
// Each layer has its own engine (addnet_layer); engines hand whole frames to
// each other through double-buffered feature-map stores (fmap_pingpong), so
// successive layers work on successive frames concurrently, and a layer
// stalls when its output store still holds two unread frames.
//
// Host interface:
//   cfg      configuration bus; loads each layer's weights, BN coefficients
//            and BN pre-scaling shift (layer ids: conv0 0, block b 1+2b and
//            2+2b, downsample paths 19 and 20, fc 21). Load while idle.
//   img_*    write side of the input image store (IMG*IMG*IN_CH bytes, laid
//            out (h, w, c) with c fastest). Write the pixels while img_free,
//            then pulse img_commit.
//   res_*    the NCLASS signed 8-bit scores of the oldest finished frame,
//            valid while res_valid; pulse res_ack to take them.
//   layer_busy / layer_stall  per engine, indexed by layer id; bit 22 is the
//            average pool.
// The default parameters are the CIFAR-10 ResNet20 of the design (32x32x3
// input, 16/32/64 channels, 10 classes). CI_PAR, the number of input
// channels each engine handles per cycle, is this design's choice.
module addnet_top
  import addnet_pkg::*;
#(
  parameter int IMG    = 32,
  parameter int IN_CH  = 3,
  parameter int BASE   = 16,
  parameter int NCLASS = 10,
  parameter int CI_PAR = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cfg_t  cfg,
  output logic  img_free,
  input  logic  img_commit,
  input  logic  img_we,
  input  addr_t img_addr,
  input  act_t  img_data,
  output logic  res_valid,
  output act_t  res_scores [NCLASS],
  input  logic  res_ack,
  output logic [NUM_LAYERS:0] layer_busy,
  output logic [NUM_LAYERS:0] layer_stall
);

  localparam int NRD = 2 * CI_PAR;
  localparam int HL  = IMG / 4;      // resolution of the last stage
  localparam int CL  = 4 * BASE;     // channels of the last stage

  // ---------------- input image store ----------------
  logic  i_full, i_rel;
  addr_t i_raddr [NRD];
  act_t  i_rdata [NRD];
  logic  img_we_a   [1];
  addr_t img_addr_a [1];
  act_t  img_data_a [1];
  assign img_we_a[0]   = img_we;
  assign img_addr_a[0] = img_addr;
  assign img_data_a[0] = img_data;

  fmap_pingpong #(.DEPTH(IMG*IMG*IN_CH), .NWR(1), .NRD(NRD)) u_img (
    .clk, .rst_n, .wr_free(img_free), .wr_commit(img_commit),
    .wr_en(img_we_a), .wr_addr(img_addr_a), .wr_data(img_data_a),
    .rd_full(i_full), .rd_release(i_rel), .rd_addr(i_raddr), .rd_data(i_rdata));

  // ---------------- stage chain ----------------
  // link k is the write port into block k (k = 0..8) or, for k = 9, into the
  // average-pool store.
  logic  ch_free   [10];
  logic  ch_commit [10];
  logic  ch_we     [10][4];
  addr_t ch_addr   [10][4];
  act_t  ch_data   [10][4];
  act_t  zero_res  [4];
  addr_t c0_res_addr [4];
  logic  c0_res_rel;

  always_comb for (int i = 0; i < 4; i++) zero_res[i] = '0;

  addnet_layer #(
    .LAYER_ID(LID_CONV0), .OP(OP_MAC), .CIN(IN_CH), .COUT(BASE), .H(IMG), .W(IMG),
    .K(3), .STRIDE(1), .PAD(1), .RELU(1'b1), .RESIDUAL(1'b0), .CI_PAR(CI_PAR)
  ) u_conv0 (
    .clk, .rst_n, .cfg,
    .in_full(i_full), .in_release(i_rel), .in_rd_addr(i_raddr), .in_rd_data(i_rdata),
    .res_full(1'b1), .res_release(c0_res_rel), .res_rd_addr(c0_res_addr), .res_rd_data(zero_res),
    .out_free(ch_free[0]), .out_commit(ch_commit[0]),
    .out_we(ch_we[0]), .out_addr(ch_addr[0]), .out_data(ch_data[0]),
    .busy(layer_busy[LID_CONV0]), .stall(layer_stall[LID_CONV0]));

  logic [2:0] blk_busy  [NUM_BLOCKS];
  logic [2:0] blk_stall [NUM_BLOCKS];

  for (genvar b = 0; b < NUM_BLOCKS; b++) begin : g_blk
    addnet_basic_block #(
      .CIN(blk_cin(b, BASE)), .COUT(blk_cout(b, BASE)), .H(blk_hin(b, IMG)),
      .STRIDE(blk_stride(b)), .LID1(1 + 2*b), .LID2(2 + 2*b), .LID_DS(blk_ds_lid(b)),
      .CI_PAR(CI_PAR)
    ) u_blk (
      .clk, .rst_n, .cfg,
      .in_free(ch_free[b]), .in_commit(ch_commit[b]),
      .in_we(ch_we[b]), .in_addr(ch_addr[b]), .in_data(ch_data[b]),
      .out_free(ch_free[b+1]), .out_commit(ch_commit[b+1]),
      .out_we(ch_we[b+1]), .out_addr(ch_addr[b+1]), .out_data(ch_data[b+1]),
      .busy(blk_busy[b]), .stall(blk_stall[b]));

    assign layer_busy[1 + 2*b]  = blk_busy[b][0];
    assign layer_busy[2 + 2*b]  = blk_busy[b][1];
    assign layer_stall[1 + 2*b] = blk_stall[b][0];
    assign layer_stall[2 + 2*b] = blk_stall[b][1];
  end

  assign layer_busy[LID_DS0]      = blk_busy[3][2];
  assign layer_busy[LID_DS0 + 1]  = blk_busy[6][2];
  assign layer_stall[LID_DS0]     = blk_stall[3][2];
  assign layer_stall[LID_DS0 + 1] = blk_stall[6][2];

  // ---------------- global average pool ----------------
  logic  p_full, p_rel;
  addr_t p_raddr [1];
  act_t  p_rdata [1];
  logic  f_free, f_commit, f_full, f_rel;
  logic  f_we    [1];
  addr_t f_waddr [1];
  act_t  f_wdata [1];
  addr_t f_raddr [NRD];
  act_t  f_rdata [NRD];

  fmap_pingpong #(.DEPTH(HL*HL*CL), .NWR(4), .NRD(1)) u_buf_pool (
    .clk, .rst_n, .wr_free(ch_free[9]), .wr_commit(ch_commit[9]),
    .wr_en(ch_we[9]), .wr_addr(ch_addr[9]), .wr_data(ch_data[9]),
    .rd_full(p_full), .rd_release(p_rel), .rd_addr(p_raddr), .rd_data(p_rdata));

  global_avgpool #(.C(CL), .HW(HL*HL)) u_pool (
    .clk, .rst_n,
    .in_full(p_full), .in_release(p_rel), .in_rd_addr(p_raddr), .in_rd_data(p_rdata),
    .out_free(f_free), .out_commit(f_commit), .out_we(f_we), .out_addr(f_waddr), .out_data(f_wdata),
    .busy(layer_busy[NUM_LAYERS]), .stall(layer_stall[NUM_LAYERS]));

  fmap_pingpong #(.DEPTH(CL), .NWR(1), .NRD(NRD)) u_buf_fc (
    .clk, .rst_n, .wr_free(f_free), .wr_commit(f_commit),
    .wr_en(f_we), .wr_addr(f_waddr), .wr_data(f_wdata),
    .rd_full(f_full), .rd_release(f_rel), .rd_addr(f_raddr), .rd_data(f_rdata));

  // ---------------- classifier ----------------
  logic  o_free, o_commit;
  logic  o_we    [4];
  addr_t o_waddr [4];
  act_t  o_wdata [4];
  addr_t fc_res_addr [4];
  logic  fc_res_rel;
  addr_t o_raddr [NCLASS];

  addnet_layer #(
    .LAYER_ID(LID_FC), .OP(OP_MAC), .CIN(CL), .COUT(NCLASS), .H(1), .W(1),
    .K(1), .STRIDE(1), .PAD(0), .RELU(1'b0), .RESIDUAL(1'b0), .CI_PAR(CI_PAR)
  ) u_fc (
    .clk, .rst_n, .cfg,
    .in_full(f_full), .in_release(f_rel), .in_rd_addr(f_raddr), .in_rd_data(f_rdata),
    .res_full(1'b1), .res_release(fc_res_rel), .res_rd_addr(fc_res_addr), .res_rd_data(zero_res),
    .out_free(o_free), .out_commit(o_commit), .out_we(o_we), .out_addr(o_waddr), .out_data(o_wdata),
    .busy(layer_busy[LID_FC]), .stall(layer_stall[LID_FC]));

  always_comb for (int i = 0; i < NCLASS; i++) o_raddr[i] = addr_t'(i);

  fmap_pingpong #(.DEPTH(NCLASS), .NWR(4), .NRD(NCLASS)) u_buf_out (
    .clk, .rst_n, .wr_free(o_free), .wr_commit(o_commit),
    .wr_en(o_we), .wr_addr(o_waddr), .wr_data(o_wdata),
    .rd_full(res_valid), .rd_release(res_ack), .rd_addr(o_raddr), .rd_data(res_scores));

endmodule
