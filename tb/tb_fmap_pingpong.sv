// tb_fmap_pingpong: a producer writes numbered frames through two write
// ports and commits them; a slower consumer reads every word through two read
// ports, compares it with the frame it expects, and releases the bank. The
// test checks the data, the frame order, that at most two frames are ever
// held, that the producer sees wr_free low while both banks are full (a stall)
// and that the consumer sees rd_full low while both are empty.
`timescale 1ns/1ps
module tb_fmap_pingpong;
  import addnet_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  wr_free, wr_commit, rd_full, rd_release;
  logic  wr_en [2];
  addr_t wr_addr [2];
  act_t  wr_data [2];
  addr_t rd_addr [2];
  act_t  rd_data [2];
  int checks = 0, failures = 0;
  int stalls = 0, empties = 0, held = 0;

  fmap_pingpong #(.DEPTH(DEPTH), .NWR(2), .NRD(2)) dut (.*);

  function automatic act_t pat(input int f, input int a);
    return act_t'((f * 37 + a * 11 + (a >> 3)) & 8'hff);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NF = 12;

  // producer
  initial begin
    wr_commit = 0; wr_en = '{0, 0}; wr_addr = '{0, 0}; wr_data = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      @(negedge clk);
      while (!wr_free) begin stalls++; @(negedge clk); end
      for (int a = 0; a < DEPTH; a += 2) begin
        wr_en = '{1, 1};
        wr_addr = '{addr_t'(a), addr_t'(a + 1)};
        wr_data = '{pat(f, a), pat(f, a + 1)};
        @(negedge clk);
      end
      wr_en = '{0, 0};
      wr_commit = 1;
      @(negedge clk);
      wr_commit = 0;
      held++;
      checks++;
      if (held > 2) failures++;
    end
  end

  // consumer
  initial begin
    rd_release = 0; rd_addr = '{0, 0};
    @(posedge rst_n);
    for (int f = 0; f < NF; f++) begin
      @(negedge clk);
      while (!rd_full) begin empties++; @(negedge clk); end
      if (f < 4) repeat (300) @(negedge clk);   // slow at first: producer must stall
      for (int a = 0; a < DEPTH; a += 2) begin
        rd_addr = '{addr_t'(a), addr_t'(DEPTH - 1 - a)};
        #1;
        checks += 2;
        if (rd_data[0] != pat(f, a) || rd_data[1] != pat(f, DEPTH - 1 - a)) begin
          failures++;
          if (failures < 10) $display("frame %0d addr %0d: got %0d exp %0d", f, a, rd_data[0], pat(f, a));
        end
        @(negedge clk);
      end
      rd_release = 1;
      held--;
      @(negedge clk);
      rd_release = 0;
    end
    checks++;
    if (stalls == 0 || empties == 0) failures++;
    $display("producer stall cycles=%0d consumer empty cycles=%0d", stalls, empties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
