// addnet_pkg: types, widths and network-shape helpers shared by the AdderNet
// ResNet20 accelerator.
//
// Activations and weights are 8-bit signed integers, following the 8-bit
// fixed-point quantization of the network. Accumulators, batch-normalization
// coefficient widths, the configuration bus and the address width are this
// design's own choices; they are sized for the largest ResNet20 layer
// (3x3 kernel, 64 input channels: |x-w| <= 255, 576 terms, under 2^18).
package addnet_pkg;

  localparam int ACT_W    = 8;    // activation / weight width
  localparam int ACC_W    = 24;   // SAD / MAC accumulator width
  localparam int BNA_W    = 18;   // BN per-channel multiplier width (signed)
  localparam int BNB_W    = 32;   // BN per-channel offset width (signed)
  localparam int BN_SHIFT = 16;   // BN fixed-point fraction bits
  localparam int ADDR_W   = 16;   // feature-map and weight address width
  localparam int LID_W    = 5;    // layer identifier width on the config bus

  typedef logic signed [ACT_W-1:0]  act_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic        [ADDR_W-1:0] addr_t;

  // Arithmetic of a layer: sum of absolute differences (adder2d) or
  // multiply-accumulate (the first convolution and the final classifier).
  typedef enum logic {OP_SAD = 1'b0, OP_MAC = 1'b1} op_e;

  // What a configuration write targets inside the addressed layer.
  typedef enum logic [1:0] {
    CFG_WEIGHT = 2'd0,  // addr = ((oc*K+kh)*K+kw)*CIN+ci, data[7:0]
    CFG_BN_A   = 2'd1,  // addr = channel, data[BNA_W-1:0]
    CFG_BN_B   = 2'd2,  // addr = channel, data[BNB_W-1:0]
    CFG_BSCALE = 2'd3   // data[3:0] = pre-scaling shift (0: plain BN)
  } cfg_sel_e;

  typedef struct packed {
    logic             valid;
    logic [LID_W-1:0] layer;
    cfg_sel_e         sel;
    addr_t            addr;
    logic [31:0]      data;
  } cfg_t;

  // Layer identifiers of ResNet20: conv0 = 0, basic block b uses 1+2b and
  // 2+2b, the two downsample paths use 19 and 20, the classifier uses 21.
  localparam int LID_CONV0 = 0;
  localparam int LID_DS0   = 19;
  localparam int LID_FC    = 21;
  localparam int NUM_LAYERS = 22;
  localparam int NUM_BLOCKS = 9;

  // Shape of basic block b (0..8) for a network whose first stage has
  // BASE channels at IMG x IMG resolution.
  function automatic int blk_stage(input int b);
    return b / 3;
  endfunction
  function automatic int blk_cout(input int b, input int base);
    return base << blk_stage(b);
  endfunction
  function automatic int blk_cin(input int b, input int base);
    return (b % 3 == 0 && b != 0) ? (base << (blk_stage(b) - 1)) : blk_cout(b, base);
  endfunction
  function automatic int blk_stride(input int b);
    return (b % 3 == 0 && b != 0) ? 2 : 1;
  endfunction
  function automatic int blk_hin(input int b, input int img);
    return (b < 3) ? img : (b == 3) ? img : (b < 6) ? img / 2 : (b == 6) ? img / 2 : img / 4;
  endfunction
  function automatic int blk_ds_lid(input int b);
    return (b == 3) ? LID_DS0 : (b == 6) ? LID_DS0 + 1 : 31;
  endfunction

  // Saturate a wide signed value to the activation range.
  function automatic act_t sat_act(input logic signed [47:0] v);
    act_t r;
    if (v > 48'sd127)       r = act_t'(8'sd127);
    else if (v < -48'sd128) r = act_t'(-8'sd128);
    else                    r = act_t'(v[ACT_W-1:0]);
    return r;
  endfunction

endpackage
