// tb_global_avgpool: feeds frames of C=8 channels x HW=16 pixels through a
// small feature-map store into the pooling unit and compares each pooled
// channel with the rounded mean computed by the reference model. Negative,
// positive and tie (x.5) means are exercised. The frame time, C*HW+1 cycles
// of busy, is checked too.
`timescale 1ns/1ps
module tb_global_avgpool;
  import addnet_pkg::*;
  import addnet_ref_pkg::*;

  localparam int C = 8, HW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_full, in_release, out_free, out_commit, busy, stall;
  addr_t in_rd_addr [1];
  act_t  in_rd_data [1];
  logic  out_we [1];
  addr_t out_addr [1];
  act_t  out_data [1];
  logic  i_commit;
  logic  i_we [1];
  addr_t i_addr [1];
  act_t  i_data [1];
  int got [C];
  logic got_v [C];
  int checks = 0, failures = 0;

  fmap_pingpong #(.DEPTH(C*HW), .NWR(1), .NRD(1)) u_in (
    .clk, .rst_n, .wr_free(), .wr_commit(i_commit), .wr_en(i_we), .wr_addr(i_addr), .wr_data(i_data),
    .rd_full(in_full), .rd_release(in_release), .rd_addr(in_rd_addr), .rd_data(in_rd_data));

  global_avgpool #(.C(C), .HW(HW)) dut (.*);

  always_ff @(posedge clk)
    if (out_we[0] && int'(out_addr[0]) < C) begin
      got[out_addr[0]]   <= int'(out_data[0]);
      got_v[out_addr[0]] <= 1'b1;
    end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addnet_ref_pkg::iarr_t x, e;
    int nb;
    i_commit = 0; i_we[0] = 0; i_addr[0] = '0; i_data[0] = '0; out_free = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      x = rand_arr(C*HW, (f % 2) ? -128 : 0, 127);
      if (f == 5) foreach (x[i]) x[i] = ((i / C) % 2) ? 3 : -128 + (i % C) * 30;
      e = avgpool_ref(x, C, HW);
      for (int i = 0; i < C*HW; i++) begin
        @(negedge clk);
        i_we[0] = 1; i_addr[0] = addr_t'(i); i_data[0] = act_t'(x[i]);
      end
      @(negedge clk);
      i_we[0] = 0; i_commit = 1;
      foreach (got_v[c]) got_v[c] = 0;
      @(negedge clk);
      i_commit = 0;
      nb = 0;
      while (!out_commit) begin
        @(negedge clk);
        if (busy) nb++;
      end
      @(negedge clk);
      checks++;
      if (nb != C*HW + 1) begin
        failures++;
        $display("frame time %0d, expected %0d", nb, C*HW + 1);
      end
      for (int c = 0; c < C; c++) begin
        checks++;
        if (!got_v[c] || got[c] != e[c]) begin
          failures++;
          if (failures < 10) $display("frame %0d ch %0d: got %0d exp %0d", f, c, got[c], e[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
