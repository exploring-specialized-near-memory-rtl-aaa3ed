// acc_tile: the accelerator tile on the logic layer under one vault.
//
// Holds the four accelerators (sorting, string matching, hash-table lookup,
// memory copy) with the buffers and address generation around them.
//
// Commands from the accelerator controllers are steered to the accelerator
// that executes their opcode; results of the four accelerators are merged
// round-robin and stamped with the tile's vault number.
// Requests of the four accelerators are merged round-robin (the accelerator
// number goes into tag bits 7:6, the tile's port number into src) into the
// output buffer. Address generation decodes the vault of each request with
// the current mapping scheme: requests for the own vault go straight to the
// local vault controller (the TSV path), all others to the crossbar with the
// target vault as destination.
// Replies from the local controller and from the crossbar are merged into the
// input buffer and handed to the accelerator named by tag bits 7:6. Every
// accelerator accepts replies at any time, so the input buffer always drains.
//
// Timing: a request spends at least one cycle in the output buffer, a reply
// at least one cycle in the input buffer. Grouping all four accelerators in
// one tile per vault and the buffer depths are this design's choices; the
// buffers, address generation and local/crossbar paths follow the
// architecture's tile organisation.
module acc_tile
  import nmp_pkg::*;
#(
  parameter int unsigned VAULT  = 0,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               scheme_b,
  // commands and results
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  cmd_t               cmd,
  output logic               res_valid,
  input  logic               res_ready,
  output result_t            res,
  // local vault controller
  output logic               loc_req_valid,
  input  logic               loc_req_ready,
  output mem_req_t           loc_req,
  input  logic               loc_rsp_valid,
  output logic               loc_rsp_ready,
  input  mem_rsp_t           loc_rsp,
  // crossbar
  output logic               xb_req_valid,
  input  logic               xb_req_ready,
  output logic [VAULT_W-1:0] xb_req_dst,
  output mem_req_t           xb_req,
  input  logic               xb_rsp_valid,
  output logic               xb_rsp_ready,
  input  mem_rsp_t           xb_rsp
);
  localparam int unsigned NA = 4;

  logic [NA-1:0] a_cmd_valid, a_cmd_ready, a_req_valid, a_req_ready, a_rsp_valid;
  logic [NA-1:0] a_res_valid, a_res_ready;
  mem_req_t      a_req [NA];
  result_t       a_res [NA];
  mem_rsp_t      in_head;
  acc_id_e       cmd_acc;

  // ---------------- command steering
  always_comb begin
    unique case (cmd.op)
      OP_MEMCPY:                            cmd_acc = ACC_COPY;
      OP_SORT:                              cmd_acc = ACC_SORT;
      OP_HASH:                              cmd_acc = ACC_HASH;
      default:                              cmd_acc = ACC_STR;
    endcase
    a_cmd_valid = '0;
    a_cmd_valid[cmd_acc] = cmd_valid;
    cmd_ready = a_cmd_ready[cmd_acc];
  end

  // ---------------- accelerators
  sort_unit u_sort (
    .clk, .rst_n,
    .cmd_valid(a_cmd_valid[ACC_SORT]), .cmd_ready(a_cmd_ready[ACC_SORT]), .cmd,
    .req_valid(a_req_valid[ACC_SORT]), .req_ready(a_req_ready[ACC_SORT]), .req(a_req[ACC_SORT]),
    .rsp_valid(a_rsp_valid[ACC_SORT]), .rsp(in_head),
    .res_valid(a_res_valid[ACC_SORT]), .res_ready(a_res_ready[ACC_SORT]), .res(a_res[ACC_SORT])
  );
  strmatch_unit u_str (
    .clk, .rst_n,
    .cmd_valid(a_cmd_valid[ACC_STR]), .cmd_ready(a_cmd_ready[ACC_STR]), .cmd,
    .req_valid(a_req_valid[ACC_STR]), .req_ready(a_req_ready[ACC_STR]), .req(a_req[ACC_STR]),
    .rsp_valid(a_rsp_valid[ACC_STR]), .rsp(in_head),
    .res_valid(a_res_valid[ACC_STR]), .res_ready(a_res_ready[ACC_STR]), .res(a_res[ACC_STR])
  );
  ll_traversal u_hash (
    .clk, .rst_n,
    .cmd_valid(a_cmd_valid[ACC_HASH]), .cmd_ready(a_cmd_ready[ACC_HASH]), .cmd,
    .req_valid(a_req_valid[ACC_HASH]), .req_ready(a_req_ready[ACC_HASH]), .req(a_req[ACC_HASH]),
    .rsp_valid(a_rsp_valid[ACC_HASH]), .rsp(in_head),
    .res_valid(a_res_valid[ACC_HASH]), .res_ready(a_res_ready[ACC_HASH]), .res(a_res[ACC_HASH])
  );
  memcopy_unit u_copy (
    .clk, .rst_n,
    .cmd_valid(a_cmd_valid[ACC_COPY]), .cmd_ready(a_cmd_ready[ACC_COPY]), .cmd,
    .req_valid(a_req_valid[ACC_COPY]), .req_ready(a_req_ready[ACC_COPY]), .req(a_req[ACC_COPY]),
    .rsp_valid(a_rsp_valid[ACC_COPY]), .rsp(in_head),
    .res_valid(a_res_valid[ACC_COPY]), .res_ready(a_res_ready[ACC_COPY]), .res(a_res[ACC_COPY])
  );

  // ---------------- request merge -> output buffer -> address generation
  logic [NA-1:0] rq_gnt;
  logic [1:0]    rq_idx;
  logic          ob_in_ready, ob_out_valid, ob_out_ready;
  mem_req_t      ob_in, ob_out;
  logic [VAULT_W-1:0] ob_vault;
  logic          ob_local;

  rr_arbiter #(.N(NA)) u_rq_arb (
    .clk, .rst_n, .req(a_req_valid), .advance(ob_in_ready), .gnt(rq_gnt), .gnt_idx(rq_idx)
  );
  always_comb begin
    ob_in          = a_req[rq_idx];
    ob_in.src      = SRC_W'(VAULT);
    ob_in.tag[7:6] = rq_idx;
    a_req_ready    = rq_gnt & {NA{ob_in_ready}};
  end

  buffer_fifo #(.T(mem_req_t), .DEPTH(BUF_DEPTH)) u_out_buf (
    .clk, .rst_n,
    .in_valid(|a_req_valid), .in_ready(ob_in_ready), .in_data(ob_in),
    .out_valid(ob_out_valid), .out_ready(ob_out_ready), .out_data(ob_out)
  );

  vault_addr_map #(.MY_VAULT(VAULT)) u_agen (
    .addr(ob_out.addr), .scheme_b, .vault(ob_vault), .local_hit(ob_local)
  );

  always_comb begin
    loc_req_valid = ob_out_valid && ob_local;
    loc_req       = ob_out;
    xb_req_valid  = ob_out_valid && !ob_local;
    xb_req        = ob_out;
    xb_req_dst    = ob_vault;
    ob_out_ready  = ob_local ? loc_req_ready : xb_req_ready;
  end

  // ---------------- reply merge -> input buffer -> accelerator
  logic [1:0] rp_gnt;
  logic       rp_idx;
  logic       ib_in_ready, ib_out_valid;
  mem_rsp_t   ib_in;

  rr_arbiter #(.N(2)) u_rp_arb (
    .clk, .rst_n, .req({xb_rsp_valid, loc_rsp_valid}), .advance(ib_in_ready),
    .gnt(rp_gnt), .gnt_idx(rp_idx)
  );
  assign ib_in         = rp_idx ? xb_rsp : loc_rsp;
  assign loc_rsp_ready = rp_gnt[0] && ib_in_ready;
  assign xb_rsp_ready  = rp_gnt[1] && ib_in_ready;

  buffer_fifo #(.T(mem_rsp_t), .DEPTH(BUF_DEPTH)) u_in_buf (
    .clk, .rst_n,
    .in_valid(loc_rsp_valid || xb_rsp_valid), .in_ready(ib_in_ready), .in_data(ib_in),
    .out_valid(ib_out_valid), .out_ready(1'b1), .out_data(in_head)
  );

  always_comb begin
    a_rsp_valid = '0;
    a_rsp_valid[in_head.tag[7:6]] = ib_out_valid;
  end

  // ---------------- result merge
  logic [NA-1:0] rs_gnt;
  logic [1:0]    rs_idx;
  rr_arbiter #(.N(NA)) u_rs_arb (
    .clk, .rst_n, .req(a_res_valid), .advance(res_ready), .gnt(rs_gnt), .gnt_idx(rs_idx)
  );
  always_comb begin
    res_valid   = |a_res_valid;
    res         = a_res[rs_idx];
    res.vault   = VAULT_W'(VAULT);
    a_res_ready = rs_gnt & {NA{res_ready}};
  end
endmodule
