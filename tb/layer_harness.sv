// layer_harness: test environment for one addnet_layer configuration, used
// by tb_addnet_layer. It owns the input, skip and output feature-map stores
// around the engine, configures the engine over the cfg bus, pushes frames,
// and compares every output activation with the reference model. It reports
// its counts on its ports and raises done at the end.
//
// Phase 1: NF1 frames, each with freshly drawn weights, BN coefficients and
// (on odd frames) a BN pre-scaling shift; the busy time of each frame is
// checked against HO*ceil(WO/2)*ceil(COUT/2)*K*K*ceil(CIN/CI_PAR) + 8.
// Phase 2: three frames with one configuration committed back to back while
// the output side is read late, so the engine must wait for a free output
// bank (stall) and the stores must keep the frames in order.
`timescale 1ns/1ps
module layer_harness
  import addnet_pkg::*;
  import addnet_ref_pkg::*;
#(
  parameter op_e OP = OP_SAD,
  parameter int CIN = 6, parameter int COUT = 5, parameter int H = 5,
  parameter int K = 3, parameter int S = 1, parameter int P = 1,
  parameter bit RELU = 1, parameter bit RES = 1, parameter int CI_PAR = 4,
  parameter int LID = 3
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   stalls,
  output logic done
);
  localparam int HO = (H + 2*P - K) / S + 1;
  localparam int NI = H*H*CIN, NO = HO*HO*COUT, NW = COUT*K*K*CIN;
  localparam int NRD = 2*CI_PAR;

  logic rst_n = 0;
  cfg_t cfg;
  logic  in_full, in_release, res_full, res_release, out_free, out_commit, busy, stall;
  addr_t in_rd_addr [NRD];
  act_t  in_rd_data [NRD];
  addr_t res_rd_addr [4];
  act_t  res_rd_data [4];
  logic  out_we [4];
  addr_t out_addr [4];
  act_t  out_data [4];
  // tb-side ports of the stores
  logic  i_free, i_commit, r_free, r_commit, o_full, o_rel;
  logic  i_we [1], r_we [1];
  addr_t i_addr [1], r_addr [1], o_raddr [1];
  act_t  i_data [1], r_data [1], o_rdata [1];

  fmap_pingpong #(.DEPTH(NI), .NWR(1), .NRD(NRD)) u_in (
    .clk, .rst_n, .wr_free(i_free), .wr_commit(i_commit), .wr_en(i_we), .wr_addr(i_addr), .wr_data(i_data),
    .rd_full(in_full), .rd_release(in_release), .rd_addr(in_rd_addr), .rd_data(in_rd_data));
  fmap_pingpong #(.DEPTH(NO), .NWR(1), .NRD(4)) u_res (
    .clk, .rst_n, .wr_free(r_free), .wr_commit(r_commit), .wr_en(r_we), .wr_addr(r_addr), .wr_data(r_data),
    .rd_full(res_full), .rd_release(res_release), .rd_addr(res_rd_addr), .rd_data(res_rd_data));
  fmap_pingpong #(.DEPTH(NO), .NWR(4), .NRD(1)) u_out (
    .clk, .rst_n, .wr_free(out_free), .wr_commit(out_commit), .wr_en(out_we), .wr_addr(out_addr), .wr_data(out_data),
    .rd_full(o_full), .rd_release(o_rel), .rd_addr(o_raddr), .rd_data(o_rdata));

  addnet_layer #(.LAYER_ID(LID), .OP(OP), .CIN(CIN), .COUT(COUT), .H(H), .W(H), .K(K), .STRIDE(S),
                 .PAD(P), .RELU(RELU), .RESIDUAL(RES), .CI_PAR(CI_PAR)) dut (.*);

  int busy_cnt;
  always @(posedge clk) begin
    if (busy) busy_cnt++;
    if (stall) stalls++;
  end

  task automatic cfg_write(input cfg_sel_e sel, input int addr, input longint data, input int lid = LID);
    @(negedge clk);
    cfg.valid = 1; cfg.layer = LID_W'(lid); cfg.sel = sel; cfg.addr = addr_t'(addr); cfg.data = 32'(data);
    @(negedge clk);
    cfg.valid = 0;
  endtask

  task automatic push(input iarr_t x, input iarr_t r);
    @(negedge clk);
    while (!i_free || (RES && !r_free)) @(negedge clk);
    for (int i = 0; i < NI; i++) begin
      i_we[0] = 1; i_addr[0] = addr_t'(i); i_data[0] = act_t'(x[i]);
      @(negedge clk);
    end
    i_we[0] = 0;
    for (int i = 0; i < (RES ? NO : 0); i++) begin
      r_we[0] = 1; r_addr[0] = addr_t'(i); r_data[0] = act_t'(RES ? r[i] : 0);
      @(negedge clk);
    end
    r_we[0] = 0;
    i_commit = 1; r_commit = RES;
    @(negedge clk);
    i_commit = 0; r_commit = 0;
  endtask

  task automatic pull_check(input iarr_t e, input int f);
    @(negedge clk);
    while (!o_full) @(negedge clk);
    for (int i = 0; i < NO; i++) begin
      o_raddr[0] = addr_t'(i);
      #1;
      checks++;
      if (int'(o_rdata[0]) != e[i]) begin
        failures++;
        if (failures < 8) $display("layer %0d frame %0d idx %0d: got %0d exp %0d", LID, f, i, o_rdata[0], e[i]);
      end
      @(negedge clk);
    end
    o_rel = 1;
    @(negedge clk);
    o_rel = 0;
  endtask

  iarr_t wt, a, x, r, e;
  larr_t b, acc;
  iarr_t xq [3], eq [3];
  int bs;

  task automatic configure(input int f);
    wt = rand_arr(NW, -120, 120);
    bs = (f % 2 == 1) ? 2 + f % 3 : 0;
    for (int i = 0; i < NW; i++) cfg_write(CFG_WEIGHT, i, wt[i]);
    cfg_write(CFG_BSCALE, 0, bs);
    // a write to another layer must be ignored
    cfg_write(CFG_BSCALE, 0, 7, LID + 1);
  endtask

  task automatic make_frame(output iarr_t xo, output iarr_t ro, output iarr_t eo, input bit calib);
    xo  = rand_arr(NI, (OP == OP_MAC) ? -128 : 0, 127);
    ro  = rand_arr(NO, -128, 127);
    acc = layer_acc(OP == OP_MAC, xo, H, H, CIN, wt, COUT, K, S, P);
    if (calib) begin
      calibrate(acc, COUT, bs, 100, a, b);
      for (int c = 0; c < COUT; c++) begin
        cfg_write(CFG_BN_A, c, a[c]);
        cfg_write(CFG_BN_B, c, b[c]);
      end
    end
    eo = layer_out(acc, COUT, bs, a, b, ro, RES, RELU);
  endtask

  initial begin
    int exp_cyc;
    checks = 0; failures = 0; stalls = 0; done = 0; busy_cnt = 0;
    cfg = '0; i_commit = 0; r_commit = 0; o_rel = 0;
    i_we[0] = 0; r_we[0] = 0; i_addr[0] = '0; r_addr[0] = '0; i_data[0] = '0; r_data[0] = '0; o_raddr[0] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    exp_cyc = HO * ((HO + 1) / 2) * ((COUT + 1) / 2) * K * K * ((CIN + CI_PAR - 1) / CI_PAR) + 8;
    // phase 1
    for (int f = 0; f < 3; f++) begin
      configure(f);
      make_frame(x, r, e, 1);
      busy_cnt = 0;
      push(x, r);
      pull_check(e, f);
      checks++;
      if (busy_cnt != exp_cyc) begin
        failures++;
        $display("layer %0d frame %0d: %0d busy cycles, expected %0d", LID, f, busy_cnt, exp_cyc);
      end
    end
    // phase 2: back-to-back frames, late consumer
    for (int f = 0; f < 3; f++) make_frame(xq[f], r, eq[f], 0);
    for (int f = 0; f < 3; f++) begin
      make_frame(x, r, e, 0);      // draw a skip input for frame f
      x = xq[f];
      acc = layer_acc(OP == OP_MAC, x, H, H, CIN, wt, COUT, K, S, P);
      eq[f] = layer_out(acc, COUT, bs, a, b, r, RES, RELU);
      push(x, r);
    end
    repeat (4 * exp_cyc) @(negedge clk);
    for (int f = 0; f < 3; f++) pull_check(eq[f], 10 + f);
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("layer %0d: the engine never waited for an output bank", LID);
    end
    done = 1;
  end
endmodule
