// global_avgpool: global average pooling of the last feature map (the
// network's adaptive average pool to 1x1), producing one activation per
// channel for the classifier.
//
// The input frame (HW pixels x C channels, stored pixel-major with channels
// fastest) is read one activation per cycle, channel by channel:
//   out[c] = round( sum_p in[p*C + c] / HW ),  halves rounded away from zero.
// A frame takes C*HW cycles plus one cycle to hand it on. The frame handshake
// is the same as addnet_layer's: start when in_full and out_free, pulse
// in_release and out_commit at the end. Integer rounding of the mean is this
// design's choice; the pooling itself follows the network.
module global_avgpool
  import addnet_pkg::*;
#(
  parameter int C  = 64,
  parameter int HW = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_full,
  output logic  in_release,
  output addr_t in_rd_addr [1],
  input  act_t  in_rd_data [1],
  input  logic  out_free,
  output logic  out_commit,
  output logic  out_we   [1],
  output addr_t out_addr [1],
  output act_t  out_data [1],
  output logic  busy,
  output logic  stall
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;
  logic [15:0] c, p;
  logic signed [31:0] sum;
  logic signed [31:0] total, mag, avg;

  assign busy  = (state != S_IDLE);
  assign stall = (state == S_IDLE) && in_full && !out_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c <= '0; p <= '0; sum <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_full && out_free) begin
          state <= S_RUN;
          c <= '0; p <= '0; sum <= '0;
        end
        S_RUN: begin
          if (int'(p) == HW-1) begin
            p   <= '0;
            sum <= '0;
            if (int'(c) == C-1) state <= S_DONE;
            else                c <= c + 1'b1;
          end else begin
            p   <= p + 1'b1;
            sum <= total;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign in_rd_addr[0] = addr_t'(int'(p) * C + int'(c));

  always_comb begin
    total = sum + 32'(in_rd_data[0]);
    mag   = (total < 0) ? -total : total;
    avg   = (mag + 32'(HW / 2)) / 32'(HW);
    if (total < 0) avg = -avg;
  end

  assign out_we[0]   = (state == S_RUN) && int'(p) == HW-1;
  assign out_addr[0] = addr_t'(c);
  assign out_data[0] = sat_act(48'(avg));
  assign out_commit  = (state == S_DONE);
  assign in_release  = (state == S_DONE);

endmodule
