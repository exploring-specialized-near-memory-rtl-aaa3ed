// memcopy_unit: memory copy accelerator of one vault.
//
// Copies `size` bytes from `src` to `dst` in 64-byte blocks. Block reads are
// issued in address order with up to MAX_OUT blocks in flight (issued but not
// yet written back). Replies may return in any order; each reply carries its
// block address, from which the write address is computed as
// dst + (reply address - src). Replies wait in a MAX_OUT-deep buffer until
// the single request port is free; writes take priority over new reads, so
// the buffer can never overflow. The copy is done when every block's write
// has been acknowledged; the result reports the byte count in r0.
//
// Command OP_MEMCPY: a0 = src, a1 = dst, a2 = size in bytes; all multiples of
// 64. Block-size transfers and computing the write offset from the reply
// address follow the architecture; MAX_OUT is this design's choice.
module memcopy_unit
  import nmp_pkg::*;
#(
  parameter int unsigned MAX_OUT = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cmd_valid,
  output logic     cmd_ready,
  input  cmd_t     cmd,
  output logic     req_valid,
  input  logic     req_ready,
  output mem_req_t req,
  input  logic     rsp_valid,
  input  mem_rsp_t rsp,
  output logic     res_valid,
  input  logic     res_ready,
  output result_t  res
);
  typedef struct packed { addr_t addr; block_t data; } pend_t;
  typedef enum logic [1:0] { S_IDLE, S_RUN, S_DONE } state_e;

  state_e      st_q;
  cmd_t        cmd_q;
  addr_t       src_q, dst_q;
  logic [31:0] nblk_q, rd_iss_q, wr_iss_q, wr_ack_q;

  logic  pb_in_valid, pb_in_ready, pb_out_valid, pb_out_ready;
  pend_t pb_in, pb_out;
  logic  do_write, do_read;

  buffer_fifo #(.T(pend_t), .DEPTH(MAX_OUT)) u_pend (
    .clk, .rst_n,
    .in_valid(pb_in_valid), .in_ready(pb_in_ready), .in_data(pb_in),
    .out_valid(pb_out_valid), .out_ready(pb_out_ready), .out_data(pb_out)
  );

  assign pb_in_valid = rsp_valid && !rsp.we && st_q == S_RUN;
  assign pb_in       = '{addr: rsp.addr, data: rsp.rdata};

  always_comb begin
    do_write = (st_q == S_RUN) && pb_out_valid;
    do_read  = (st_q == S_RUN) && !pb_out_valid && rd_iss_q < nblk_q &&
               (rd_iss_q - wr_iss_q) < 32'(MAX_OUT);
    req_valid = do_write || do_read;
    req       = '0;
    req.tag   = {2'(ACC_COPY), 6'd0};
    if (do_write) begin
      req.we    = 1'b1;
      req.addr  = dst_q + (pb_out.addr - src_q);
      req.wdata = pb_out.data;
    end else begin
      req.addr  = src_q + (rd_iss_q << 6);
    end
    pb_out_ready = do_write && req_ready;
  end

  assign cmd_ready = (st_q == S_IDLE);
  assign res_valid = (st_q == S_DONE);
  always_comb begin
    res      = '0;
    res.acc  = ACC_COPY;
    res.ctrl = cmd_q.ctrl;
    res.ok   = 1'b1;
    res.r0   = 64'(nblk_q) << 6;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; cmd_q <= '0; src_q <= '0; dst_q <= '0;
      nblk_q <= '0; rd_iss_q <= '0; wr_iss_q <= '0; wr_ack_q <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (cmd_valid) begin
          cmd_q    <= cmd;
          src_q    <= addr_t'(cmd.a0);
          dst_q    <= addr_t'(cmd.a1);
          nblk_q   <= cmd.a2[37:6];
          rd_iss_q <= '0;
          wr_iss_q <= '0;
          wr_ack_q <= '0;
          st_q     <= S_RUN;
        end
        S_RUN: begin
          if (req_valid && req_ready) begin
            if (do_write) wr_iss_q <= wr_iss_q + 1;
            else          rd_iss_q <= rd_iss_q + 1;
          end
          if (rsp_valid && rsp.we) wr_ack_q <= wr_ack_q + 1;
          if (wr_ack_q == nblk_q) st_q <= S_DONE;
        end
        S_DONE: if (res_ready) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  reply_fits: assert property (@(posedge clk) disable iff (!rst_n) pb_in_valid |-> pb_in_ready);
endmodule
