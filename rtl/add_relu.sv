// add_relu: residual addition and ReLU on one 8-bit activation.
//
//   s = bn + (use_res ? res : 0)
//   y = sat8( use_relu ? max(0, s) : s )
// Both operands are already 8-bit quantized (the skip connection and the
// normalized branch are requantized before the addition), so the sum needs
// 9 bits; it is saturated back to the signed 8-bit activation range that the
// next layer's input quantizer expects, so a ReLU output lies in 0..127.
// The element-wise add and the ReLU follow the design; the saturation to a
// signed 8-bit result is this design's choice. Purely combinational.
module add_relu
  import addnet_pkg::*;
(
  input  act_t bn,
  input  act_t res,
  input  logic use_res,
  input  logic use_relu,
  output act_t y
);

  logic signed [8:0] s;

  always_comb begin
    s = 9'(bn) + (use_res ? 9'(res) : 9'sd0);
    if (use_relu && s < 9'sd0) s = 9'sd0;
    y = sat_act(48'(s));
  end

endmodule
