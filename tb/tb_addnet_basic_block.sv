// tb_addnet_basic_block: two basic blocks in a chain, as in the network:
//   block X: 4 -> 8 channels, stride 2 on 6x6 (downsample skip path)
//   block Y: 8 -> 8 channels, stride 1 on 3x3 (identity skip)
// Frames are written into block X's input stores; block Y's outputs are
// collected from a final store and compared with the reference model of the
// two blocks. Four frames are pushed back to back, so the engines of both
// blocks work on different frames at the same time (counted as overlap) and
// the input side has to wait for free banks.
`timescale 1ns/1ps
module tb_addnet_basic_block;
  import addnet_pkg::*;
  import addnet_ref_pkg::*;

  localparam int CI = 4, CO = 8, H = 6, HO = 3, NF = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic  in_free, in_commit, mid_free, mid_commit, out_free, out_commit, o_full, o_rel;
  logic  in_we [4], mid_we [4], out_we [4];
  addr_t in_addr [4], mid_addr [4], out_addr [4], o_raddr [1];
  act_t  in_data [4], mid_data [4], out_data [4], o_rdata [1];
  logic [2:0] busy_x, busy_y, stall_x, stall_y;
  int checks = 0, failures = 0, overlap = 0, in_wait = 0, ds_busy = 0;

  addnet_basic_block #(.CIN(CI), .COUT(CO), .H(H), .STRIDE(2), .LID1(7), .LID2(8), .LID_DS(19), .CI_PAR(2)) u_x (
    .clk, .rst_n, .cfg, .in_free, .in_commit, .in_we, .in_addr, .in_data,
    .out_free(mid_free), .out_commit(mid_commit), .out_we(mid_we), .out_addr(mid_addr), .out_data(mid_data),
    .busy(busy_x), .stall(stall_x));
  addnet_basic_block #(.CIN(CO), .COUT(CO), .H(HO), .STRIDE(1), .LID1(9), .LID2(10), .LID_DS(31), .CI_PAR(2)) u_y (
    .clk, .rst_n, .cfg, .in_free(mid_free), .in_commit(mid_commit), .in_we(mid_we), .in_addr(mid_addr), .in_data(mid_data),
    .out_free, .out_commit, .out_we, .out_addr, .out_data, .busy(busy_y), .stall(stall_y));
  fmap_pingpong #(.DEPTH(HO*HO*CO), .NWR(4), .NRD(1)) u_out (
    .clk, .rst_n, .wr_free(out_free), .wr_commit(out_commit), .wr_en(out_we), .wr_addr(out_addr), .wr_data(out_data),
    .rd_full(o_full), .rd_release(o_rel), .rd_addr(o_raddr), .rd_data(o_rdata));

  always @(posedge clk) begin
    if ((|busy_x) && (|busy_y)) overlap++;
    if (busy_x[2]) ds_busy++;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input int lid, input cfg_sel_e sel, input int addr, input longint data);
    @(negedge clk);
    cfg.valid = 1; cfg.layer = LID_W'(lid); cfg.sel = sel; cfg.addr = addr_t'(addr); cfg.data = 32'(data);
    @(negedge clk);
    cfg.valid = 0;
  endtask

  // layer descriptions: lid, cin, cout, h, k, s, p
  int L [5][7] = '{'{7, CI, CO, H, 3, 2, 1}, '{19, CI, CO, H, 1, 2, 0}, '{8, CO, CO, HO, 3, 1, 1},
                   '{9, CO, CO, HO, 3, 1, 1}, '{10, CO, CO, HO, 3, 1, 1}};
  iarr_t wts [5], as [5];
  larr_t bs_ [5];
  int    bsh [5] = '{0, 0, 3, 0, 2};

  // reference of both blocks; calibrates BN coefficients when calib is set
  function automatic iarr_t run_ref(input iarr_t x, input bit calib);
    iarr_t t1, d, y1, t3, y2;
    larr_t acc;
    acc = layer_acc(0, x, H, H, CI, wts[0], CO, 3, 2, 1);
    if (calib) calibrate(acc, CO, bsh[0], 100, as[0], bs_[0]);
    t1 = layer_out(acc, CO, bsh[0], as[0], bs_[0], t1, 0, 1);
    acc = layer_acc(0, x, H, H, CI, wts[1], CO, 1, 2, 0);
    if (calib) calibrate(acc, CO, bsh[1], 100, as[1], bs_[1]);
    d = layer_out(acc, CO, bsh[1], as[1], bs_[1], d, 0, 0);
    acc = layer_acc(0, t1, HO, HO, CO, wts[2], CO, 3, 1, 1);
    if (calib) calibrate(acc, CO, bsh[2], 100, as[2], bs_[2]);
    y1 = layer_out(acc, CO, bsh[2], as[2], bs_[2], d, 1, 1);
    acc = layer_acc(0, y1, HO, HO, CO, wts[3], CO, 3, 1, 1);
    if (calib) calibrate(acc, CO, bsh[3], 100, as[3], bs_[3]);
    t3 = layer_out(acc, CO, bsh[3], as[3], bs_[3], t3, 0, 1);
    acc = layer_acc(0, t3, HO, HO, CO, wts[4], CO, 3, 1, 1);
    if (calib) calibrate(acc, CO, bsh[4], 100, as[4], bs_[4]);
    y2 = layer_out(acc, CO, bsh[4], as[4], bs_[4], y1, 1, 1);
    return y2;
  endfunction

  initial begin
    iarr_t x [NF], e [NF];
    cfg = '0; in_commit = 0; o_rel = 0; o_raddr[0] = '0;
    for (int i = 0; i < 4; i++) begin in_we[i] = 0; in_addr[i] = '0; in_data[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 5; l++) wts[l] = rand_arr(L[l][2] * L[l][4] * L[l][4] * L[l][1], -100, 100);
    for (int f = 0; f < NF; f++) x[f] = rand_arr(H*H*CI, 0, 127);
    e[0] = run_ref(x[0], 1);
    for (int f = 1; f < NF; f++) e[f] = run_ref(x[f], 0);
    for (int l = 0; l < 5; l++) begin
      for (int i = 0; i < wts[l].size(); i++) cfg_write(L[l][0], CFG_WEIGHT, i, wts[l][i]);
      for (int c = 0; c < CO; c++) begin
        cfg_write(L[l][0], CFG_BN_A, c, as[l][c]);
        cfg_write(L[l][0], CFG_BN_B, c, bs_[l][c]);
      end
      cfg_write(L[l][0], CFG_BSCALE, 0, bsh[l]);
    end
    fork
      for (int f = 0; f < NF; f++) begin
        @(negedge clk);
        while (!in_free) begin in_wait++; @(negedge clk); end
        for (int i = 0; i < H*H*CI; i += 4) begin
          for (int j = 0; j < 4; j++) begin
            in_we[j] = 1; in_addr[j] = addr_t'(i + j); in_data[j] = act_t'(x[f][i + j]);
          end
          @(negedge clk);
        end
        for (int j = 0; j < 4; j++) in_we[j] = 0;
        in_commit = 1;
        @(negedge clk);
        in_commit = 0;
      end
      for (int f = 0; f < NF; f++) begin
        @(negedge clk);
        while (!o_full) @(negedge clk);
        for (int i = 0; i < HO*HO*CO; i++) begin
          o_raddr[0] = addr_t'(i);
          #1;
          checks++;
          if (int'(o_rdata[0]) != e[f][i]) begin
            failures++;
            if (failures < 10) $display("frame %0d idx %0d: got %0d exp %0d", f, i, o_rdata[0], e[f][i]);
          end
          @(negedge clk);
        end
        o_rel = 1;
        @(negedge clk);
        o_rel = 0;
      end
    join
    checks += 3;
    if (overlap == 0) failures++;
    if (in_wait == 0) failures++;
    if (ds_busy == 0) failures++;
    $display("overlap cycles=%0d input waits=%0d downsample busy=%0d", overlap, in_wait, ds_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
