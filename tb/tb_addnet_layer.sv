// tb_addnet_layer: runs the layer engine in three configurations, each in
// its own layer_harness:
//   A  SAD 3x3, stride 1, pad 1, 6->5 channels on 5x5 (channel count not a
//      multiple of CI_PAR, odd output width and channel count), BN, residual
//      add and ReLU: the second layer of a basic block;
//   B  SAD 1x1, stride 2, no pad, 4->8 channels on 6x6, no ReLU: the
//      downsample path;
//   C  MAC 3x3, stride 2, pad 1, 3->4 channels on 6x6, ReLU: the first
//      convolution (with a stride, to cover strided MAC addressing).
// Outputs, frame times and output-bank stalls are checked by the harnesses.
`timescale 1ns/1ps
module tb_addnet_layer;
  import addnet_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int ck [3], fl [3], st [3];
  logic dn [3];

  layer_harness #(.OP(OP_SAD), .CIN(6), .COUT(5), .H(5), .K(3), .S(1), .P(1), .RELU(1), .RES(1), .CI_PAR(4), .LID(3))
    h_a (.clk, .checks(ck[0]), .failures(fl[0]), .stalls(st[0]), .done(dn[0]));
  layer_harness #(.OP(OP_SAD), .CIN(4), .COUT(8), .H(6), .K(1), .S(2), .P(0), .RELU(0), .RES(0), .CI_PAR(2), .LID(19))
    h_b (.clk, .checks(ck[1]), .failures(fl[1]), .stalls(st[1]), .done(dn[1]));
  layer_harness #(.OP(OP_MAC), .CIN(3), .COUT(4), .H(6), .K(3), .S(2), .P(1), .RELU(1), .RES(0), .CI_PAR(4), .LID(0))
    h_c (.clk, .checks(ck[2]), .failures(fl[2]), .stalls(st[2]), .done(dn[2]));

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: done flags %0b%0b%0b", dn[0], dn[1], dn[2]);
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1] + ck[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end

  initial begin
    // The harnesses clear their done flags at time 0; look only after that.
    @(posedge clk);
    wait (dn[0] && dn[1] && dn[2]);
    $display("stall cycles: %0d %0d %0d", st[0], st[1], st[2]);
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1] + ck[2], fl[0] + fl[1] + fl[2]);
    $finish;
  end
endmodule
