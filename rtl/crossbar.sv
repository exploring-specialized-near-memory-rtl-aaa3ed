// crossbar: N_SRC x N_DST packet crossbar of the logic layer.
//
// Each source presents a packet of type T with the index of the output it
// wants (src_dst). Every output has its own round-robin arbiter over the
// sources that want it; the winner's packet is driven on the output in the
// same cycle and the source sees src_ready when the output accepts it
// (dst_ready). A packet therefore crosses in zero cycles of latency and one
// packet per output per cycle can pass; sources that lose arbitration hold
// their packet (valid/ready rule) until granted. The structure and the
// arbitration policy are this design's choice; the architecture only states
// that vaults, links and controllers meet in a crossbar.
module crossbar #(
  parameter type         T     = logic [7:0],
  parameter int unsigned N_SRC = 4,
  parameter int unsigned N_DST = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [N_SRC-1:0]                               src_valid,
  output logic [N_SRC-1:0]                               src_ready,
  input  logic [N_SRC-1:0][$clog2(N_DST > 1 ? N_DST : 2)-1:0] src_dst,
  input  T     [N_SRC-1:0]                               src_data,
  output logic [N_DST-1:0]                               dst_valid,
  input  logic [N_DST-1:0]                               dst_ready,
  output T     [N_DST-1:0]                               dst_data
);
  localparam int unsigned SW = $clog2(N_SRC > 1 ? N_SRC : 2);
  logic [N_DST-1:0][N_SRC-1:0] want, gnt;
  logic [N_DST-1:0][SW-1:0]    gidx;

  always_comb begin
    for (int d = 0; d < N_DST; d++)
      for (int s = 0; s < N_SRC; s++)
        want[d][s] = src_valid[s] && (int'(src_dst[s]) == d);
  end

  for (genvar d = 0; d < N_DST; d++) begin : g_out
    rr_arbiter #(.N(N_SRC)) u_arb (
      .clk, .rst_n,
      .req(want[d]), .advance(dst_ready[d]),
      .gnt(gnt[d]), .gnt_idx(gidx[d])
    );
    assign dst_valid[d] = |want[d];
    assign dst_data[d]  = src_data[gidx[d]];
  end

  always_comb begin
    src_ready = '0;
    for (int d = 0; d < N_DST; d++)
      for (int s = 0; s < N_SRC; s++)
        if (gnt[d][s] && dst_ready[d]) src_ready[s] = 1'b1;
  end
endmodule
