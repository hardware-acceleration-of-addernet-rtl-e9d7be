// tb_quad_int12_sub: checks the packed Quad-INT12 SIMD subtractor against
// plain integer subtraction. Random and extreme operands are applied every
// cycle; each result is compared two cycles later (the slice latency), lane by
// lane, together with each lane's carry-out (1 when the unsigned 12-bit
// minuend is not below the subtrahend). Extreme values make the lower lanes
// borrow, which would corrupt a neighbouring lane if the carry chain were not
// cut at the lane boundaries.
`timescale 1ns/1ps
module tb_quad_int12_sub;
  import addnet_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  act_t x0, x1, w0, w1;
  logic signed [11:0] d [4];
  logic [3:0] co;
  int checks = 0, failures = 0;

  quad_int12_sub dut (.clk, .x0, .x1, .w0, .w1, .d, .carry_out(co));

  int hx0 [$], hx1 [$], hw0 [$], hw1 [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit co_ref(input int a, input int c);
    return (a & 12'hfff) >= (c & 12'hfff);
  endfunction

  initial begin
    int n = 0;
    x0 = 0; x1 = 0; w0 = 0; w1 = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i % 4 == 0) begin
        x0 = act_t'(i[0] ? -128 : 127); x1 = act_t'(i[1] ? 127 : -128);
        w0 = act_t'(i[2] ? -128 : 127); w1 = act_t'(i[3] ? 127 : -128);
      end else begin
        x0 = act_t'($urandom); x1 = act_t'($urandom); w0 = act_t'($urandom); w1 = act_t'($urandom);
      end
      hx0.push_back(int'(x0)); hx1.push_back(int'(x1)); hw0.push_back(int'(w0)); hw1.push_back(int'(w1));
      if (hx0.size() > 2) begin
        int a0, a1, c0, c1;
        int exp_d [4];
        bit exp_c [4];
        a0 = hx0.pop_front(); a1 = hx1.pop_front(); c0 = hw0.pop_front(); c1 = hw1.pop_front();
        exp_d = '{a0 - c0, a1 - c0, a0 - c1, a1 - c1};
        exp_c = '{co_ref(a0, c0), co_ref(a1, c0), co_ref(a0, c1), co_ref(a1, c1)};
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (int'(d[l]) != exp_d[l] || co[l] != exp_c[l]) begin
            failures++;
            if (failures < 10) $display("lane %0d: got %0d/%0b exp %0d/%0b", l, d[l], co[l], exp_d[l], exp_c[l]);
          end
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
