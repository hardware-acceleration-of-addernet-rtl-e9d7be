// quad_int12_sub: packed SIMD subtractor modelled on a DSP48E2 slice in
// FOUR12 SIMD mode, the DSP-packing scheme of the accelerator's SAD datapath.
//
// Two activations (x0, x1: neighbouring output pixels) and two weights
// (w0, w1: neighbouring output channels) are sign-extended to 12 bits and
// packed into the 48-bit A:B and C operands:
//   A:B = { x1, x0, x1, x0 }     C = { w1, w1, w0, w0 }
// The 48-bit ALU subtracts C from A:B with its carry chain cut at every 12-bit
// boundary, giving four independent differences in one slice:
//   d[0] = x0-w0, d[1] = x1-w0, d[2] = x0-w1, d[3] = x1-w1.
// Each lane also returns its own carry-out (1 = no borrow), as the DSP48E2
// does in SIMD mode. Since the operands are 8-bit, only the low part of each
// 12-bit lane is ever significant and no lane can overflow.
//
// Timing: two register stages, like a DSP48E2 with its input registers
// (AREG/BREG/CREG) and output register (PREG) enabled; results appear two
// clock cycles after the operands. No reset: the slice is pure datapath.
// The 2x2 pairing of activations and weights follows the packing the design
// describes; the lane order and the register stages are this design's choice.
module quad_int12_sub
  import addnet_pkg::*;
(
  input  logic                     clk,
  input  act_t                     x0,
  input  act_t                     x1,
  input  act_t                     w0,
  input  act_t                     w1,
  output logic signed [11:0]       d [4],
  output logic        [3:0]        carry_out
);

  logic [47:0] ab_q, c_q;   // input registers
  logic [47:0] p_q;         // output register
  logic [3:0]  co_q;

  function automatic logic [11:0] sx12(input act_t v);
    return {{(12-ACT_W){v[ACT_W-1]}}, v};
  endfunction

  always_ff @(posedge clk) begin
    ab_q <= {sx12(x1), sx12(x0), sx12(x1), sx12(x0)};
    c_q  <= {sx12(w1), sx12(w1), sx12(w0), sx12(w0)};
  end

  // SIMD ALU: each 12-bit lane computes AB - C = AB + ~C + 1 on its own.
  logic [47:0] p_d;
  logic [3:0]  co_d;
  always_comb begin
    for (int l = 0; l < 4; l++) begin
      logic [12:0] s;
      s = {1'b0, ab_q[12*l +: 12]} + {1'b0, ~c_q[12*l +: 12]} + 13'd1;
      p_d[12*l +: 12] = s[11:0];
      co_d[l]         = s[12];
    end
  end

  always_ff @(posedge clk) begin
    p_q  <= p_d;
    co_q <= co_d;
  end

  always_comb begin
    for (int l = 0; l < 4; l++) d[l] = signed'(p_q[12*l +: 12]);
    carry_out = co_q;
  end

endmodule
