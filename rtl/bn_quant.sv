// bn_quant: batch normalization of one accumulator value, requantized to an
// 8-bit activation.
//
// The layer's per-channel normalization y = gamma*(x-mean)/sqrt(var+eps)+beta
// is folded offline into one multiplier A and one offset B per channel, held
// as fixed-point numbers with BN_SHIFT fraction bits:
//   y = sat8( round_half_up( (x' * A + B) / 2^BN_SHIFT ) )
// Two forms are supported, selected per layer by bscale:
//   bscale == 0  plain form: x' = x.
//   bscale >  0  pre-scaled form for layers whose input scale factor exceeds
//                one: x is first reduced to an 8-bit integer,
//                q = sat8(round_to_even(x / 2^bscale)), and x' = q * 2^bscale.
// The pre-scaled step (convergent rounding, saturation to 8 bits, scaling back)
// follows the design's scaled batch normalization. The accelerator this is
// taken from evaluates the normalization in 32-bit floating point; this block
// uses fixed point instead, which is this design's choice.
//
// Purely combinational; the caller registers the result.
module bn_quant
  import addnet_pkg::*;
(
  input  acc_t                    x,
  input  logic        [3:0]       bscale,
  input  logic signed [BNA_W-1:0] a,
  input  logic signed [BNB_W-1:0] b,
  output act_t                    y
);

  logic signed [47:0] xs;      // x after optional pre-scaling
  logic signed [47:0] q, rem, half;
  logic signed [47:0] prod, sum, rnd;

  always_comb begin
    xs   = 48'(x);
    q    = '0;
    rem  = '0;
    half = '0;
    if (bscale != 4'd0) begin
      q    = xs >>> bscale;                       // floor division
      rem  = xs - (q <<< bscale);                 // 0 .. 2^bscale-1
      half = 48'sd1 <<< (bscale - 4'd1);
      if (rem > half || (rem == half && q[0])) q = q + 48'sd1;
      xs = 48'(sat_act(q)) <<< bscale;
    end
    prod = xs * 48'(a);
    sum  = prod + 48'(b);
    rnd  = (sum + (48'sd1 <<< (BN_SHIFT - 1))) >>> BN_SHIFT;
    y    = sat_act(rnd);
  end

endmodule
