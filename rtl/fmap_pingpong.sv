// fmap_pingpong: double-buffered feature-map store that carries one frame's
// activations from a producing layer to a consuming layer.
//
// Two banks of DEPTH 8-bit activations. The producer fills the write bank
// through NWR write ports and then pulses wr_commit, which marks that bank
// full and moves the producer to the other bank. The consumer reads the read
// bank through NRD asynchronous read ports while rd_full is high and pulses
// rd_release when it is done, which frees that bank and moves the consumer on.
// A producer may therefore write frame n+1 while the consumer still works on
// frame n: this is what lets consecutive layers run concurrently on
// consecutive frames, the frame-level counterpart of the streams that link
// the layers of the accelerator. When both banks hold unread frames, wr_free
// is low and the producer stalls.
//
// Handshake rules (checked by assertions): wr_commit only while wr_free,
// rd_release only while rd_full. Writes while wr_free is low are ignored.
// Reset empties both banks. Read ports are combinational (distributed-RAM
// style); the banking scheme and port counts are this design's choice.
module fmap_pingpong
  import addnet_pkg::*;
#(
  parameter int DEPTH = 16384,
  parameter int NWR   = 4,
  parameter int NRD   = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // producer side
  output logic  wr_free,
  input  logic  wr_commit,
  input  logic  wr_en   [NWR],
  input  addr_t wr_addr [NWR],
  input  act_t  wr_data [NWR],
  // consumer side
  output logic  rd_full,
  input  logic  rd_release,
  input  addr_t rd_addr [NRD],
  output act_t  rd_data [NRD]
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  act_t mem0 [DEPTH];
  act_t mem1 [DEPTH];
  logic full0, full1;
  logic wb, rb;      // bank currently owned by the producer / consumer

  assign wr_free = wb ? !full1 : !full0;
  assign rd_full = rb ? full1 : full0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full0 <= 1'b0;
      full1 <= 1'b0;
      wb    <= 1'b0;
      rb    <= 1'b0;
    end else begin
      if (wr_commit && wr_free) begin
        if (wb) full1 <= 1'b1; else full0 <= 1'b1;
        wb <= !wb;
      end
      if (rd_release && rd_full) begin
        if (rb) full1 <= 1'b0; else full0 <= 1'b0;
        rb <= !rb;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NWR; i++) begin
      if (wr_en[i] && wr_free && int'(wr_addr[i]) < DEPTH) begin
        if (wb) mem1[wr_addr[i][AW-1:0]] <= wr_data[i];
        else    mem0[wr_addr[i][AW-1:0]] <= wr_data[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NRD; i++) begin
      if (int'(rd_addr[i]) < DEPTH) rd_data[i] = rb ? mem1[rd_addr[i][AW-1:0]] : mem0[rd_addr[i][AW-1:0]];
      else                          rd_data[i] = '0;
    end
  end

  a_commit_free: assert property (@(posedge clk) disable iff (!rst_n) wr_commit |-> wr_free)
    else $error("fmap_pingpong: commit into a full bank");
  a_release_full: assert property (@(posedge clk) disable iff (!rst_n) rd_release |-> rd_full)
    else $error("fmap_pingpong: release of an empty bank");

endmodule
