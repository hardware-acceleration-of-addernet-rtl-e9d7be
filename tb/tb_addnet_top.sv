// tb_addnet_top: end-to-end test of the AdderNet ResNet20 accelerator
// at reduced size (8x8 image, 4/8/16 channels, two input channels per cycle).
// Random weights and images; the expected class scores come from an
// independent integer model of the network (addnet_ref_pkg). See
// addnet_top_tb_body.svh for the flow and for what is counted.
`timescale 1ns/1ps
module tb_addnet_top;
  import addnet_pkg::*;

  localparam int IMG = 8, IN_CH = 3, BASE = 4, NCLASS = 10, CI_PAR = 2, NF = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t  cfg;
  logic  img_free, img_commit, img_we, res_valid, res_ack;
  addr_t img_addr;
  act_t  img_data;
  act_t  res_scores [NCLASS];
  logic [NUM_LAYERS:0] layer_busy, layer_stall;

  addnet_top #(.IMG(IMG), .IN_CH(IN_CH), .BASE(BASE), .NCLASS(NCLASS), .CI_PAR(CI_PAR)) dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

`include "addnet_top_tb_body.svh"

endmodule
