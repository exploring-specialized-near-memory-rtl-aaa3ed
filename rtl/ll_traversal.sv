// ll_traversal: hash-table lookup accelerator (linked-list traversal module).
//
// Searches open-chained hash tables: a bucket holds a pointer to a linked
// list of nodes. The heart of the unit is a small content-addressable table
// of N_ENT outstanding lookups. Each entry keeps the key searched for, the
// address of its outstanding memory read and its lookup state: READ_PTR
// (reading the bucket's head pointer) or FETCH_KEY (reading a node). Entries
// issue their reads through a round-robin arbiter, so many lookups are in
// flight at once and replies may return in any order. When a read reply
// arrives the table is searched by the reply's block address and every
// entry waiting on that block advances:
//   READ_PTR : head = 0 -> not found; else read the head node.
//   FETCH_KEY: key matches -> found, value; next = 0 -> not found;
//              else read the next node.
// Finished entries return their result (ok = found, r0 = key, r1 = value)
// and are freed when it is taken.
//
// Command OP_HASH: a0 = key, a1 = physical address of the bucket (computed by
// the hash unit), a3 = offset added to every pointer read from the table to
// turn the table's virtual addresses into physical ones (the table lives in
// a contiguously mapped region, so no TLB is needed).
// Data layout: a bucket entry is one 64-bit word; a node is a 64-byte aligned
// block with the key in word 0, the value in word 1, the next pointer in word
// 2; pointer 0 ends a list.
//
// The CAM of outstanding lookups, its contents and states, the search on
// every reply and the offset translation follow the architecture; the data
// layout, table size and arbitration are this design's choices.
module ll_traversal
  import nmp_pkg::*;
#(
  parameter int unsigned N_ENT = 16
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
  localparam int unsigned EW = $clog2(N_ENT);

  typedef enum logic [1:0] { E_READ_PTR, E_FETCH_KEY, E_DONE } ent_state_e;
  typedef struct packed {
    logic        valid;
    logic        issued;
    ent_state_e  st;
    logic [63:0] key;
    addr_t       addr;
    addr_t       offset;
    logic        ctrl;
    logic        found;
    logic [63:0] value;
  } entry_t;

  entry_t ent_q [N_ENT];

  logic [N_ENT-1:0] free_v, want_v, done_v, iss_gnt, res_gnt;
  logic [EW-1:0]    alloc_idx, iss_idx, res_idx;
  logic             have_free;

  always_comb begin
    have_free = 1'b0;
    alloc_idx = '0;
    for (int i = N_ENT - 1; i >= 0; i--) begin
      free_v[i] = !ent_q[i].valid;
      want_v[i] = ent_q[i].valid && !ent_q[i].issued && ent_q[i].st != E_DONE;
      done_v[i] = ent_q[i].valid && ent_q[i].st == E_DONE;
      if (free_v[i]) begin have_free = 1'b1; alloc_idx = EW'(i); end
    end
  end

  rr_arbiter #(.N(N_ENT)) u_iss (
    .clk, .rst_n, .req(want_v), .advance(req_ready), .gnt(iss_gnt), .gnt_idx(iss_idx)
  );
  rr_arbiter #(.N(N_ENT)) u_res (
    .clk, .rst_n, .req(done_v), .advance(res_ready), .gnt(res_gnt), .gnt_idx(res_idx)
  );

  assign cmd_ready = have_free;
  assign req_valid = |want_v;
  always_comb begin
    req      = '0;
    req.addr = {ent_q[iss_idx].addr[ADDR_W-1:6], 6'd0};
    req.tag  = {2'(ACC_HASH), 6'(iss_idx)};
  end
  assign res_valid = |done_v;
  always_comb begin
    res       = '0;
    res.acc   = ACC_HASH;
    res.ctrl  = ent_q[res_idx].ctrl;
    res.ok    = ent_q[res_idx].found;
    res.r0    = ent_q[res_idx].key;
    res.r1    = ent_q[res_idx].value;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ENT; i++) ent_q[i] <= '0;
    end else begin
      for (int i = 0; i < N_ENT; i++) begin
        // CAM search: reply for the block this entry waits on
        if (rsp_valid && !rsp.we && ent_q[i].valid && ent_q[i].issued &&
            ent_q[i].st != E_DONE && ent_q[i].addr[ADDR_W-1:6] == rsp.addr[ADDR_W-1:6]) begin
          logic [63:0] w, k, v, nx;
          w  = rsp.rdata[64 * ent_q[i].addr[5:3] +: 64];
          k  = rsp.rdata[63:0];
          v  = rsp.rdata[127:64];
          nx = rsp.rdata[191:128];
          ent_q[i].issued <= 1'b0;
          if (ent_q[i].st == E_READ_PTR) begin
            if (w == 64'd0) begin
              ent_q[i].st    <= E_DONE;
              ent_q[i].found <= 1'b0;
            end else begin
              ent_q[i].st   <= E_FETCH_KEY;
              ent_q[i].addr <= addr_t'(w) + ent_q[i].offset;
            end
          end else if (k == ent_q[i].key) begin
            ent_q[i].st    <= E_DONE;
            ent_q[i].found <= 1'b1;
            ent_q[i].value <= v;
          end else if (nx == 64'd0) begin
            ent_q[i].st    <= E_DONE;
            ent_q[i].found <= 1'b0;
          end else begin
            ent_q[i].addr <= addr_t'(nx) + ent_q[i].offset;
          end
        end
        if (req_valid && req_ready && iss_gnt[i]) ent_q[i].issued <= 1'b1;
        if (res_valid && res_ready && res_gnt[i]) ent_q[i].valid  <= 1'b0;
        if (cmd_valid && have_free && alloc_idx == EW'(i)) begin
          ent_q[i].valid  <= 1'b1;
          ent_q[i].issued <= 1'b0;
          ent_q[i].st     <= E_READ_PTR;
          ent_q[i].key    <= cmd.a0;
          ent_q[i].addr   <= addr_t'(cmd.a1);
          ent_q[i].offset <= addr_t'(cmd.a3);
          ent_q[i].ctrl   <= cmd.ctrl;
          ent_q[i].found  <= 1'b0;
          ent_q[i].value  <= '0;
        end
      end
    end
  end
endmodule
