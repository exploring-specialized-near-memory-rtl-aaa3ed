// bitonic_sorter: Batcher bitonic sorting network, first phase of the
// sorting accelerator.
//
// N keys of W bits enter in parallel and leave in ascending unsigned order.
// The network has log2(N)*(log2(N)+1)/2 compare-exchange stages (21 for the
// default 64 keys); each stage holds N/2 comparators and is followed by a
// pipeline register, so a new set can enter every cycle and each set leaves
// LATENCY = 21 cycles after it entered, with out_valid marking it. The
// 64-key, 64-bit size is the architecture's; the register after every stage
// is this design's choice. N must be a power of two.
module bitonic_sorter #(
  parameter int unsigned N = 64,
  parameter int unsigned W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0][W-1:0] in_keys,
  output logic                out_valid,
  output logic [N-1:0][W-1:0] out_keys
);
  localparam int unsigned LOGN    = $clog2(N);
  localparam int unsigned LATENCY = LOGN * (LOGN + 1) / 2;

  logic [N-1:0][W-1:0] data [LATENCY+1];
  logic [LATENCY:0]    vld;

  assign data[0] = in_keys;
  assign vld[0]  = in_valid;

  for (genvar p = 1; p <= LOGN; p++) begin : g_merge
    for (genvar q = p - 1; q >= 0; q--) begin : g_step
      localparam int unsigned S = p * (p - 1) / 2 + (p - 1 - q); // stage index
      localparam int unsigned K = 1 << p;                       // bitonic block size
      localparam int unsigned J = 1 << q;                       // compare distance
      logic [N-1:0][W-1:0] nxt;
      always_comb begin
        nxt = data[S];
        for (int unsigned i = 0; i < N; i++) begin
          if ((i & J) == 0) begin
            logic up, gt;
            up = ((i & K) == 0);
            gt = data[S][i] > data[S][i + J];
            if (gt == up) begin
              nxt[i]     = data[S][i + J];
              nxt[i + J] = data[S][i];
            end
          end
        end
      end
      always_ff @(posedge clk) data[S+1] <= nxt;
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) vld[S+1] <= 1'b0;
        else        vld[S+1] <= vld[S];
    end
  end

  assign out_keys  = data[LATENCY];
  assign out_valid = vld[LATENCY];
endmodule
