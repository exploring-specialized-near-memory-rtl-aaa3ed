// buffer_fifo: the input and output buffers of an accelerator tile.
//
// A synchronous first-in first-out queue of DEPTH entries of any packed type
// T with valid/ready handshakes on both sides. A word is pushed when
// in_valid && in_ready and popped when out_valid && out_ready; both may
// happen in the same cycle. The head is presented directly from the storage
// array (no extra latency), so a word pushed in cycle t can leave in t+1.
// The depth is this design's choice.
module buffer_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  localparam int unsigned AW = $clog2(DEPTH > 1 ? DEPTH : 2);
  T              mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [AW:0]   cnt_q;
  logic          push, pop;

  assign in_ready  = (cnt_q < (AW+1)'(DEPTH));
  assign out_valid = (cnt_q != '0);
  assign out_data  = mem[rd_q];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= (wr_q == AW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      if (pop)  rd_q <= (rd_q == AW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= (AW+1)'(DEPTH));
endmodule
