// tb_bn_quant: checks batch normalization and requantization against the
// real-arithmetic reference: plain form (bscale = 0) and pre-scaled form
// (bscale 1..8, convergent rounding), with random and boundary accumulators,
// negative and positive scales, and outputs that saturate at both ends.
`timescale 1ns/1ps
module tb_bn_quant;
  import addnet_pkg::*;
  import addnet_ref_pkg::*;

  acc_t x;
  logic [3:0] bscale;
  logic signed [BNA_W-1:0] a;
  logic signed [BNB_W-1:0] b;
  act_t y;
  int checks = 0, failures = 0;
  int n_sat = 0, n_tie = 0;

  bn_quant dut (.x, .bscale, .a, .b, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int bs, e;
      bs = (i < 10000) ? 0 : (i % 8) + 1;
      bscale = 4'(bs);
      case (i % 5)
        0: x = acc_t'(int'($urandom_range(0, 60000)) - 60000);
        1: x = acc_t'(int'($urandom_range(0, 400)) - 200);
        2: x = acc_t'((int'($urandom_range(0, 300)) - 150) << bs) + ((bs > 0) ? acc_t'(1 << (bs - 1)) : '0);
        default: x = acc_t'(int'($urandom_range(0, 8000)) - 4000);
      endcase
      a = BNA_W'(int'($urandom_range(0, 262143)) - 131072);
      if (i % 3 == 0) a = BNA_W'(int'($urandom_range(0, 2000)) - 1000);
      b = BNB_W'($urandom);
      if (i % 2 == 0) b = BNB_W'(int'($urandom_range(0, 20000000)) - 10000000);
      #1;
      e = bn_ref(longint'(x), bs, longint'(a), longint'(b));
      if (e == 127 || e == -128) n_sat++;
      if (i % 5 == 2 && bs > 0) n_tie++;
      checks++;
      if (int'(y) != e) begin
        failures++;
        if (failures < 10) $display("x=%0d bs=%0d a=%0d b=%0d: got %0d exp %0d", x, bs, a, b, y, e);
      end
    end
    if (n_sat == 0 || n_tie == 0) failures++;
    $display("saturated=%0d ties=%0d", n_sat, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
