// tb_add_relu: exhaustive check of the residual add / ReLU / saturation over
// all 8-bit operand pairs and all four mode combinations.
`timescale 1ns/1ps
module tb_add_relu;
  import addnet_pkg::*;
  import addnet_ref_pkg::*;

  act_t bn, res, y;
  logic use_res, use_relu;
  int checks = 0, failures = 0;

  add_relu dut (.bn, .res, .use_res, .use_relu, .y);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int i = -128; i < 128; i++)
        for (int j = -128; j < 128; j += 3) begin
          int e;
          use_res = m[0]; use_relu = m[1];
          bn = act_t'(i); res = act_t'(j);
          #1;
          e = add_relu_ref(i, j, m[0], m[1]);
          checks++;
          if (int'(y) != e) begin
            failures++;
            if (failures < 10) $display("bn=%0d res=%0d mode=%0d got %0d exp %0d", i, j, m, y, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
