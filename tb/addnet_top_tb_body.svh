// Shared body of the end-to-end testbenches of addnet_top. The including
// module declares IMG, IN_CH, BASE, NCLASS, CI_PAR and NF, the clock clk, the
// reset rst_n, the DUT port signals, and the DUT itself.
//
// Flow: draw random weights for all 22 layers and NF random images; run the
// reference network on frame 0 to pick BN coefficients (and, for three
// layers, a BN pre-scaling shift); configure the DUT over the cfg bus; push
// all frames back to back while taking the results late; compare the NCLASS
// scores of every frame. It also checks every engine's busy time against its
// per-frame cycle formula and counts the mechanisms of the design: back
// pressure stalls, engines working concurrently, both downsample paths and
// the pre-scaled BN form.

  import addnet_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_stall = 0, n_overlap = 0, n_ds0 = 0, n_ds1 = 0;
  int busy_cnt [NUM_LAYERS + 1];

  // layer table: op(1=MAC), cin, cout, h, k, s, p, relu
  int LT [NUM_LAYERS][8];
  iarr_t wts [NUM_LAYERS], bna [NUM_LAYERS];
  larr_t bnb [NUM_LAYERS];
  int    bsh [NUM_LAYERS];

  function automatic void build_table();
    for (int l = 0; l < NUM_LAYERS; l++) LT[l] = '{0, 0, 0, 0, 3, 1, 1, 1};
    LT[0] = '{1, IN_CH, BASE, IMG, 3, 1, 1, 1};
    for (int b = 0; b < 9; b++) begin
      int st, co, ci, hi, s;
      st = b / 3;
      co = BASE * (1 << st);
      s  = (b == 3 || b == 6) ? 2 : 1;
      ci = (s == 2) ? co / 2 : co;
      hi = (IMG >> st) * s;
      LT[1 + 2*b] = '{0, ci, co, hi, 3, s, 1, 1};
      LT[2 + 2*b] = '{0, co, co, hi / s, 3, 1, 1, 1};
      if (s == 2) LT[b == 3 ? 19 : 20] = '{0, ci, co, hi, 1, 2, 0, 0};
    end
    LT[21] = '{1, 4*BASE, NCLASS, 1, 1, 1, 0, 0};
  endfunction

  function automatic int ho_of(input int l);
    return (LT[l][3] + 2*LT[l][6] - LT[l][4]) / LT[l][5] + 1;
  endfunction

  function automatic iarr_t run_layer(input int l, input iarr_t x, input iarr_t res, input bit use_res,
                                      input bit calib);
    larr_t acc;
    acc = layer_acc(LT[l][0] == 1, x, LT[l][3], LT[l][3], LT[l][1], wts[l], LT[l][2],
                    LT[l][4], LT[l][5], LT[l][6]);
    if (calib) begin
      if (bsh[l] != 0) begin
        longint mx = 1;
        foreach (acc[i]) if ((acc[i] < 0 ? -acc[i] : acc[i]) > mx) mx = (acc[i] < 0) ? -acc[i] : acc[i];
        bsh[l] = 1;
        while ((mx >> bsh[l]) > 100 && bsh[l] < 15) bsh[l]++;
      end
      calibrate(acc, LT[l][2], bsh[l], 100, bna[l], bnb[l]);
    end
    return layer_out(acc, LT[l][2], bsh[l], bna[l], bnb[l], res, use_res, LT[l][7] == 1);
  endfunction

  function automatic iarr_t run_net(input iarr_t img, input bit calib);
    iarr_t x, t, r, y;
    x = run_layer(0, img, x, 0, calib);
    for (int b = 0; b < 9; b++) begin
      t = run_layer(1 + 2*b, x, t, 0, calib);
      if (b == 3 || b == 6) r = run_layer(b == 3 ? 19 : 20, x, r, 0, calib);
      else                  r = x;
      y = run_layer(2 + 2*b, t, r, 1, calib);
      x = y;
    end
    x = avgpool_ref(x, 4*BASE, (IMG / 4) * (IMG / 4));
    return run_layer(21, x, t, 0, calib);
  endfunction

  always @(posedge clk) if (rst_n) begin
    int nb;
    nb = 0;
    for (int l = 0; l <= NUM_LAYERS; l++) begin
      if (layer_busy[l]) begin busy_cnt[l]++; nb++; end
    end
    if (|layer_stall) n_stall++;
    if (nb >= 2) n_overlap++;
    if (layer_busy[19]) n_ds0++;
    if (layer_busy[20]) n_ds1++;
  end

  initial begin
    iarr_t img [NF], exp_s [NF];
    int n_scaled, tcfg;
    cfg = '0; img_commit = 0; img_we = 0; img_addr = '0; img_data = '0; res_ack = 0;
    foreach (busy_cnt[l]) busy_cnt[l] = 0;
    build_table();
    for (int l = 0; l < NUM_LAYERS; l++) begin
      wts[l] = rand_arr(LT[l][2] * LT[l][4] * LT[l][4] * LT[l][1], -100, 100);
      bsh[l] = (l == 2 || l == 9 || l == 20) ? 1 : 0;
    end
    for (int f = 0; f < NF; f++) img[f] = rand_arr(IMG*IMG*IN_CH, -128, 127);
    exp_s[0] = run_net(img[0], 1);
    for (int f = 1; f < NF; f++) exp_s[f] = run_net(img[f], 0);
    n_scaled = 0;
    foreach (bsh[l]) if (bsh[l] != 0) n_scaled++;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // configuration: one write per cycle
    tcfg = 0;
    for (int l = 0; l < NUM_LAYERS; l++) begin
      for (int i = 0; i < wts[l].size(); i++) begin
        cfg.valid = 1; cfg.layer = LID_W'(l); cfg.sel = CFG_WEIGHT; cfg.addr = addr_t'(i); cfg.data = 32'(wts[l][i]);
        @(negedge clk);
      end
      for (int c = 0; c < LT[l][2]; c++) begin
        cfg.valid = 1; cfg.layer = LID_W'(l); cfg.sel = CFG_BN_A; cfg.addr = addr_t'(c); cfg.data = 32'(bna[l][c]);
        @(negedge clk);
        cfg.sel = CFG_BN_B; cfg.data = 32'(bnb[l][c]);
        @(negedge clk);
      end
      cfg.valid = 1; cfg.layer = LID_W'(l); cfg.sel = CFG_BSCALE; cfg.addr = '0; cfg.data = 32'(bsh[l]);
      @(negedge clk);
    end
    cfg.valid = 0;
    fork
      for (int f = 0; f < NF; f++) begin
        @(negedge clk);
        while (!img_free) @(negedge clk);
        for (int i = 0; i < IMG*IMG*IN_CH; i++) begin
          img_we = 1; img_addr = addr_t'(i); img_data = act_t'(img[f][i]);
          @(negedge clk);
        end
        img_we = 0;
        img_commit = 1;
        @(negedge clk);
        img_commit = 0;
      end
      for (int f = 0; f < NF; f++) begin
        @(negedge clk);
        while (!res_valid) @(negedge clk);
        if (f == 0) begin
          // take the first result late, until the pipeline has filled up
          // behind it and some engine had to wait for a free output bank
          int waited = 0;
          while (n_stall == 0 && waited < 4000000) begin waited++; @(negedge clk); end
        end
        for (int c = 0; c < NCLASS; c++) begin
          checks++;
          if (int'(res_scores[c]) != exp_s[f][c]) begin
            failures++;
            if (failures < 12) $display("frame %0d class %0d: got %0d exp %0d", f, c, res_scores[c], exp_s[f][c]);
          end
        end
        $write("frame %0d scores:", f);
        for (int c = 0; c < NCLASS; c++) $write(" %0d", res_scores[c]);
        $display("  (failures so far %0d)", failures);
        res_ack = 1;
        @(negedge clk);
        res_ack = 0;
      end
    join
    repeat (20) @(negedge clk);
    // per-engine frame time
    for (int l = 0; l <= NUM_LAYERS; l++) begin
      int e;
      if (l == NUM_LAYERS) e = 4*BASE * (IMG/4) * (IMG/4) + 1;
      else e = ho_of(l) * ((ho_of(l) + 1) / 2) * ((LT[l][2] + 1) / 2) * LT[l][4] * LT[l][4] *
               ((LT[l][1] + CI_PAR - 1) / CI_PAR) + 8;
      checks++;
      if (busy_cnt[l] != NF * e) begin
        failures++;
        $display("engine %0d busy %0d cycles, expected %0d", l, busy_cnt[l], NF * e);
      end
    end
    checks += 4;
    if (n_stall == 0)   begin failures++; $display("no back-pressure stall happened"); end
    if (n_overlap == 0) begin failures++; $display("no two engines were ever busy together"); end
    if (n_ds0 == 0 || n_ds1 == 0) begin failures++; $display("a downsample path never ran"); end
    if (n_scaled == 0)  begin failures++; $display("no layer used pre-scaled BN"); end
    $display("mechanisms: stall cycles=%0d overlap cycles=%0d ds0 cycles=%0d ds1 cycles=%0d scaled-BN layers=%0d",
             n_stall, n_overlap, n_ds0, n_ds1, n_scaled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
