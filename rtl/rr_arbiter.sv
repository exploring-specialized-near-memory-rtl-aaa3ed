// rr_arbiter: round-robin arbiter over N requesters.
//
// The grant is one-hot and combinational from `req`. The search starts one
// position after the last requester that was granted and whose grant was
// used (`advance` high in that cycle), so every persistent requester is
// served within N grants. Reset makes requester 0 the first in line.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic [$clog2(N > 1 ? N : 2)-1:0] gnt_idx
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] last_q;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned i;
      i = (int'(last_q) + k) % N;
      if (req[i] && gnt == '0) begin
        gnt[i]  = 1'b1;
        gnt_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     last_q <= IW'(N - 1);
    else if (advance && gnt != '0)  last_q <= gnt_idx;
  end
endmodule
