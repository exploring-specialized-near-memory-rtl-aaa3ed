// mem_port_model: behavioural model of one DRAM vault port (testbench only,
// not synthesizable).
//
// Accepts block requests with valid/ready, performs them on the shared
// storage of tb_mem_pkg at acceptance, and returns a reply (read data or
// write acknowledge, with the request's address, src and tag) LATENCY cycles
// later. Up to QDEPTH requests are held. With SHUFFLE set, any reply whose
// latency has elapsed may be returned next and each latency gets a random
// extra of up to LATENCY-1 cycles, so replies come out of order.
// STALL is the percentage of cycles in which the port refuses requests.
// With VAULT >= 0, a request whose address does not map to this vault under
// the current scheme is counted in tb_mem_pkg::n_wrong_vault.
module mem_port_model
  import nmp_pkg::*;
#(
  parameter int VAULT    = -1,
  parameter int LATENCY  = 8,
  parameter int QDEPTH   = 16,
  parameter bit SHUFFLE  = 1'b0,
  parameter int STALL    = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     scheme_b,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  input  logic     rsp_ready,
  output mem_rsp_t rsp
);
  typedef struct { mem_rsp_t r; longint t; } ent_t;
  ent_t   q[$];
  longint cyc;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q.delete();
      cyc       = 0;
      req_ready <= 1'b0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
    end else begin
      logic     cur_v;
      mem_rsp_t cur;
      cyc++;
      cur_v = rsp_valid;
      cur   = rsp;
      if (cur_v && rsp_ready) cur_v = 1'b0;
      if (req_valid && req_ready) begin
        ent_t e;
        e.r.we   = req.we;
        e.r.addr = req.addr;
        e.r.src  = req.src;
        e.r.tag  = req.tag;
        if (req.we) begin
          tb_mem_pkg::wr_block(req.addr, req.wdata);
          tb_mem_pkg::n_writes++;
          e.r.rdata = '0;
        end else begin
          e.r.rdata = tb_mem_pkg::rd_block(req.addr);
          tb_mem_pkg::n_reads++;
        end
        if (VAULT >= 0 && int'(vault_of(req.addr, scheme_b)) != VAULT)
          tb_mem_pkg::n_wrong_vault++;
        e.t = cyc + LATENCY + (SHUFFLE ? longint'($urandom % LATENCY) : 0);
        q.push_back(e);
      end
      if (!cur_v && q.size() != 0) begin
        int pick, nready, k;
        pick = -1;
        nready = 0;
        foreach (q[i]) if (q[i].t <= cyc) nready++;
        if (nready != 0) begin
          k = SHUFFLE ? int'($urandom % nready) : 0;
          foreach (q[i]) if (q[i].t <= cyc) begin
            if (k == 0 && pick < 0) pick = i;
            k--;
          end
          cur   = q[pick].r;
          cur_v = 1'b1;
          q.delete(pick);
        end
      end
      rsp_valid <= cur_v;
      rsp       <= cur;
      req_ready <= (q.size() < QDEPTH) && (int'($urandom % 100) >= STALL);
    end
  end
endmodule
