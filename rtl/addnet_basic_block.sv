// addnet_basic_block: one residual basic block of the AdderNet ResNet20.
//
//   y = ReLU( BN2(adder2d_3x3(ReLU(BN1(adder2d_3x3,stride S (x))))) + r )
//   r = x                                  when the shape is unchanged
//   r = BN_ds(adder2d_1x1,stride S (x))    when the block changes stride or
//                                          channel count (downsample path)
// Every sum enters the addition already requantized to 8 bits.
//
// Structure: the block owns the double-buffered stores it reads from. The
// previous stage writes each frame into two of them at once: buf_a, read by
// the first adder layer, and buf_r, the copy the skip connection uses. The
// first layer writes buf_m, read by the second layer, which adds the skip
// value as it writes its outputs. With a downsample path, a third engine
// (1x1 adder2d, no ReLU) reads buf_r and writes buf_d, which the second layer
// then uses as its skip input. Because the stores are double buffered, the
// engines of one block work on consecutive frames at the same time.
//
// Interface: in_* is the write side of buf_a and buf_r together (in_free is
// high when both can take a frame); out_* is the second layer's write port to
// the next stage. busy/stall report each engine: [0] first layer, [1] second
// layer, [2] downsample (0 when absent). Layer identifiers on the cfg bus are
// LID1, LID2 and LID_DS. The block structure follows the network; the buffer
// arrangement is this design's choice. CI_PAR must be at least 2.
module addnet_basic_block
  import addnet_pkg::*;
#(
  parameter int CIN    = 16,
  parameter int COUT   = 16,
  parameter int H      = 32,
  parameter int STRIDE = 1,
  parameter int LID1   = 1,
  parameter int LID2   = 2,
  parameter int LID_DS = LID_DS0,
  parameter int CI_PAR = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cfg_t  cfg,
  output logic  in_free,
  input  logic  in_commit,
  input  logic  in_we   [4],
  input  addr_t in_addr [4],
  input  act_t  in_data [4],
  input  logic  out_free,
  output logic  out_commit,
  output logic  out_we   [4],
  output addr_t out_addr [4],
  output act_t  out_data [4],
  output logic [2:0] busy,
  output logic [2:0] stall
);

  localparam bit DS = (STRIDE != 1) || (CIN != COUT);
  localparam int HO = (H - 1) / STRIDE + 1;
  localparam int NRD = 2 * CI_PAR;

  // ---- buf_a: block input for the first layer ----
  logic  a_free, a_full, a_rel;
  addr_t a_raddr [NRD];
  act_t  a_rdata [NRD];
  // ---- buf_r: block input copy for the skip connection ----
  logic  r_free, r_full, r_rel;
  addr_t r_raddr [NRD];
  act_t  r_rdata [NRD];

  assign in_free = a_free && r_free;

  fmap_pingpong #(.DEPTH(H*H*CIN), .NWR(4), .NRD(NRD)) u_buf_a (
    .clk, .rst_n, .wr_free(a_free), .wr_commit(in_commit),
    .wr_en(in_we), .wr_addr(in_addr), .wr_data(in_data),
    .rd_full(a_full), .rd_release(a_rel), .rd_addr(a_raddr), .rd_data(a_rdata));

  fmap_pingpong #(.DEPTH(H*H*CIN), .NWR(4), .NRD(NRD)) u_buf_r (
    .clk, .rst_n, .wr_free(r_free), .wr_commit(in_commit),
    .wr_en(in_we), .wr_addr(in_addr), .wr_data(in_data),
    .rd_full(r_full), .rd_release(r_rel), .rd_addr(r_raddr), .rd_data(r_rdata));

  // ---- first adder layer -> buf_m ----
  logic  m_free, m_full, m_rel, m_commit;
  logic  m_we [4];
  addr_t m_waddr [4];
  act_t  m_wdata [4];
  addr_t m_raddr [NRD];
  act_t  m_rdata [NRD];
  addr_t l1_res_addr [4];
  act_t  zero_res [4];
  logic  l1_res_rel;

  always_comb for (int i = 0; i < 4; i++) zero_res[i] = '0;

  addnet_layer #(
    .LAYER_ID(LID1), .OP(OP_SAD), .CIN(CIN), .COUT(COUT), .H(H), .W(H),
    .K(3), .STRIDE(STRIDE), .PAD(1), .RELU(1'b1), .RESIDUAL(1'b0), .CI_PAR(CI_PAR)
  ) u_l1 (
    .clk, .rst_n, .cfg,
    .in_full(a_full), .in_release(a_rel), .in_rd_addr(a_raddr), .in_rd_data(a_rdata),
    .res_full(1'b1), .res_release(l1_res_rel), .res_rd_addr(l1_res_addr), .res_rd_data(zero_res),
    .out_free(m_free), .out_commit(m_commit), .out_we(m_we), .out_addr(m_waddr), .out_data(m_wdata),
    .busy(busy[0]), .stall(stall[0]));

  fmap_pingpong #(.DEPTH(HO*HO*COUT), .NWR(4), .NRD(NRD)) u_buf_m (
    .clk, .rst_n, .wr_free(m_free), .wr_commit(m_commit),
    .wr_en(m_we), .wr_addr(m_waddr), .wr_data(m_wdata),
    .rd_full(m_full), .rd_release(m_rel), .rd_addr(m_raddr), .rd_data(m_rdata));

  // ---- skip path ----
  logic  s_full, s_rel;
  addr_t s_raddr [4];
  act_t  s_rdata [4];

  if (DS) begin : g_ds
    logic  d_free, d_commit;
    logic  d_we [4];
    addr_t d_waddr [4];
    act_t  d_wdata [4];
    addr_t ds_res_addr [4];
    logic  ds_res_rel;

    addnet_layer #(
      .LAYER_ID(LID_DS), .OP(OP_SAD), .CIN(CIN), .COUT(COUT), .H(H), .W(H),
      .K(1), .STRIDE(STRIDE), .PAD(0), .RELU(1'b0), .RESIDUAL(1'b0), .CI_PAR(CI_PAR)
    ) u_ds (
      .clk, .rst_n, .cfg,
      .in_full(r_full), .in_release(r_rel), .in_rd_addr(r_raddr), .in_rd_data(r_rdata),
      .res_full(1'b1), .res_release(ds_res_rel), .res_rd_addr(ds_res_addr), .res_rd_data(zero_res),
      .out_free(d_free), .out_commit(d_commit), .out_we(d_we), .out_addr(d_waddr), .out_data(d_wdata),
      .busy(busy[2]), .stall(stall[2]));

    fmap_pingpong #(.DEPTH(HO*HO*COUT), .NWR(4), .NRD(4)) u_buf_d (
      .clk, .rst_n, .wr_free(d_free), .wr_commit(d_commit),
      .wr_en(d_we), .wr_addr(d_waddr), .wr_data(d_wdata),
      .rd_full(s_full), .rd_release(s_rel), .rd_addr(s_raddr), .rd_data(s_rdata));
  end else begin : g_id
    // identity skip: the second layer reads buf_r directly
    assign s_full = r_full;
    assign r_rel  = s_rel;
    always_comb begin
      for (int i = 0; i < NRD; i++) r_raddr[i] = (i < 4) ? s_raddr[i % 4] : '0;
      for (int i = 0; i < 4; i++)   s_rdata[i] = r_rdata[i];
    end
    assign busy[2]  = 1'b0;
    assign stall[2] = 1'b0;
  end

  // ---- second adder layer with residual add ----
  addnet_layer #(
    .LAYER_ID(LID2), .OP(OP_SAD), .CIN(COUT), .COUT(COUT), .H(HO), .W(HO),
    .K(3), .STRIDE(1), .PAD(1), .RELU(1'b1), .RESIDUAL(1'b1), .CI_PAR(CI_PAR)
  ) u_l2 (
    .clk, .rst_n, .cfg,
    .in_full(m_full), .in_release(m_rel), .in_rd_addr(m_raddr), .in_rd_data(m_rdata),
    .res_full(s_full), .res_release(s_rel), .res_rd_addr(s_raddr), .res_rd_data(s_rdata),
    .out_free, .out_commit, .out_we, .out_addr, .out_data,
    .busy(busy[1]), .stall(stall[1]));

endmodule
