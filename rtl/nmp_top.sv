// nmp_top: logic layer of a 3D-stacked memory with near-memory accelerators.
//
// Under each of the 16 DRAM vaults sits a vault controller and an accelerator
// tile (sorting, string matching, hash-table lookup and memory copy). A
// crossbar joins the vaults with the 4 SerDes link ports to the processor:
// its request half has 20 inputs (16 tiles, 4 links) and 16 outputs (vault
// controllers), its response half the reverse. Two accelerator controllers
// take commands from the processor and reach every tile through a small
// command crossbar; results come back through a result crossbar.
//
// Outside this module: the DRAM stacks (one request/response port per vault,
// reached through the TSVs) and the SerDes PHYs (one packet port per link;
// the link index is written into a request's src field here and the vault is
// decoded from its address). `scheme_b` is the address-mapping mode register:
// 0 = vault-interleaved (Scheme A), 1 = 4 KB page per vault (Scheme B).
// All handshakes are valid/ready; a DRAM port must accept or hold its reply
// until dram_rsp_ready.
//
// Vault and link counts and the crossbar between vaults, links and
// controllers follow the architecture; the separate command/result crossbars
// are this design's choice.
module nmp_top
  import nmp_pkg::*;
#(
  parameter int unsigned NV = N_VAULTS,
  parameter int unsigned NL = N_LINKS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 scheme_b,
  // processor command ports, one per accelerator controller
  input  logic     [N_CTRL-1:0] host_cmd_valid,
  output logic     [N_CTRL-1:0] host_cmd_ready,
  input  cmd_t     [N_CTRL-1:0] host_cmd,
  output logic     [N_CTRL-1:0] host_res_valid,
  input  logic     [N_CTRL-1:0] host_res_ready,
  output result_t  [N_CTRL-1:0] host_res,
  // SerDes link packet ports
  input  logic     [NL-1:0]     link_req_valid,
  output logic     [NL-1:0]     link_req_ready,
  input  mem_req_t [NL-1:0]     link_req,
  output logic     [NL-1:0]     link_rsp_valid,
  input  logic     [NL-1:0]     link_rsp_ready,
  output mem_rsp_t [NL-1:0]     link_rsp,
  // DRAM vault ports
  output logic     [NV-1:0]     dram_req_valid,
  input  logic     [NV-1:0]     dram_req_ready,
  output mem_req_t [NV-1:0]     dram_req,
  input  logic     [NV-1:0]     dram_rsp_valid,
  output logic     [NV-1:0]     dram_rsp_ready,
  input  mem_rsp_t [NV-1:0]     dram_rsp
);
  localparam int unsigned NP = NV + NL;
  localparam int unsigned DW = $clog2(NV);
  localparam int unsigned PW = $clog2(NP);

  // request crossbar: tiles and links -> vault controllers
  logic     [NP-1:0]         rq_src_valid, rq_src_ready;
  logic     [NP-1:0][DW-1:0] rq_src_dst;
  mem_req_t [NP-1:0]         rq_src_data;
  logic     [NV-1:0]         rq_dst_valid, rq_dst_ready;
  mem_req_t [NV-1:0]         rq_dst_data;
  // response crossbar: vault controllers -> tiles and links
  logic     [NV-1:0]         rp_src_valid, rp_src_ready;
  logic     [NV-1:0][PW-1:0] rp_src_dst;
  mem_rsp_t [NV-1:0]         rp_src_data;
  logic     [NP-1:0]         rp_dst_valid, rp_dst_ready;
  mem_rsp_t [NP-1:0]         rp_dst_data;
  // command and result crossbars
  logic     [N_CTRL-1:0]         cm_src_valid, cm_src_ready;
  logic     [N_CTRL-1:0][DW-1:0] cm_src_dst;
  cmd_t     [N_CTRL-1:0]         cm_src_data;
  logic     [NV-1:0]             cm_dst_valid, cm_dst_ready;
  cmd_t     [NV-1:0]             cm_dst_data;
  logic     [NV-1:0]             rs_src_valid, rs_src_ready;
  logic     [NV-1:0][0:0]        rs_src_dst;
  result_t  [NV-1:0]             rs_src_data;
  logic     [N_CTRL-1:0]         rs_dst_valid, rs_dst_ready;
  result_t  [N_CTRL-1:0]         rs_dst_data;

  crossbar #(.T(mem_req_t), .N_SRC(NP), .N_DST(NV)) u_req_xbar (
    .clk, .rst_n,
    .src_valid(rq_src_valid), .src_ready(rq_src_ready), .src_dst(rq_src_dst), .src_data(rq_src_data),
    .dst_valid(rq_dst_valid), .dst_ready(rq_dst_ready), .dst_data(rq_dst_data)
  );
  crossbar #(.T(mem_rsp_t), .N_SRC(NV), .N_DST(NP)) u_rsp_xbar (
    .clk, .rst_n,
    .src_valid(rp_src_valid), .src_ready(rp_src_ready), .src_dst(rp_src_dst), .src_data(rp_src_data),
    .dst_valid(rp_dst_valid), .dst_ready(rp_dst_ready), .dst_data(rp_dst_data)
  );
  crossbar #(.T(cmd_t), .N_SRC(N_CTRL), .N_DST(NV)) u_cmd_xbar (
    .clk, .rst_n,
    .src_valid(cm_src_valid), .src_ready(cm_src_ready), .src_dst(cm_src_dst), .src_data(cm_src_data),
    .dst_valid(cm_dst_valid), .dst_ready(cm_dst_ready), .dst_data(cm_dst_data)
  );
  crossbar #(.T(result_t), .N_SRC(NV), .N_DST(N_CTRL)) u_res_xbar (
    .clk, .rst_n,
    .src_valid(rs_src_valid), .src_ready(rs_src_ready), .src_dst(rs_src_dst), .src_data(rs_src_data),
    .dst_valid(rs_dst_valid), .dst_ready(rs_dst_ready), .dst_data(rs_dst_data)
  );

  // ---------------- vaults: tile + controller
  for (genvar v = 0; v < NV; v++) begin : g_vault
    logic     loc_req_valid, loc_req_ready, loc_rsp_valid, loc_rsp_ready;
    mem_req_t loc_req;
    mem_rsp_t loc_rsp;
    logic [VAULT_W-1:0] xb_dst;
    logic [SRC_W-1:0]   rsp_dst;

    acc_tile #(.VAULT(v)) u_tile (
      .clk, .rst_n, .scheme_b,
      .cmd_valid(cm_dst_valid[v]), .cmd_ready(cm_dst_ready[v]), .cmd(cm_dst_data[v]),
      .res_valid(rs_src_valid[v]), .res_ready(rs_src_ready[v]), .res(rs_src_data[v]),
      .loc_req_valid, .loc_req_ready, .loc_req,
      .loc_rsp_valid, .loc_rsp_ready, .loc_rsp,
      .xb_req_valid(rq_src_valid[v]), .xb_req_ready(rq_src_ready[v]),
      .xb_req_dst(xb_dst), .xb_req(rq_src_data[v]),
      .xb_rsp_valid(rp_dst_valid[v]), .xb_rsp_ready(rp_dst_ready[v]), .xb_rsp(rp_dst_data[v])
    );
    assign rq_src_dst[v] = DW'(xb_dst);
    assign rs_src_dst[v] = rs_src_data[v].ctrl;

    vault_ctrl #(.VAULT(v)) u_mc (
      .clk, .rst_n,
      .loc_req_valid, .loc_req_ready, .loc_req,
      .loc_rsp_valid, .loc_rsp_ready, .loc_rsp,
      .xb_req_valid(rq_dst_valid[v]), .xb_req_ready(rq_dst_ready[v]), .xb_req(rq_dst_data[v]),
      .xb_rsp_valid(rp_src_valid[v]), .xb_rsp_ready(rp_src_ready[v]),
      .xb_rsp_dst(rsp_dst), .xb_rsp(rp_src_data[v]),
      .dram_req_valid(dram_req_valid[v]), .dram_req_ready(dram_req_ready[v]), .dram_req(dram_req[v]),
      .dram_rsp_valid(dram_rsp_valid[v]), .dram_rsp_ready(dram_rsp_ready[v]), .dram_rsp(dram_rsp[v])
    );
    assign rp_src_dst[v] = PW'(rsp_dst);
  end

  // ---------------- SerDes link ports
  for (genvar l = 0; l < NL; l++) begin : g_link
    always_comb begin
      rq_src_valid[NV+l]  = link_req_valid[l];
      rq_src_data[NV+l]   = link_req[l];
      rq_src_data[NV+l].src = SRC_W'(NV + l);
      rq_src_dst[NV+l]    = DW'(vault_of(link_req[l].addr, scheme_b));
      link_req_ready[l]   = rq_src_ready[NV+l];
      link_rsp_valid[l]   = rp_dst_valid[NV+l];
      link_rsp[l]         = rp_dst_data[NV+l];
      rp_dst_ready[NV+l]  = link_rsp_ready[l];
    end
  end

  // ---------------- accelerator controllers
  for (genvar c = 0; c < N_CTRL; c++) begin : g_ctrl
    logic [VAULT_W-1:0] dst;
    acc_controller #(.ID(c)) u_ctrl (
      .clk, .rst_n, .scheme_b,
      .host_cmd_valid(host_cmd_valid[c]), .host_cmd_ready(host_cmd_ready[c]), .host_cmd(host_cmd[c]),
      .host_res_valid(host_res_valid[c]), .host_res_ready(host_res_ready[c]), .host_res(host_res[c]),
      .out_cmd_valid(cm_src_valid[c]), .out_cmd_ready(cm_src_ready[c]),
      .out_cmd_dst(dst), .out_cmd(cm_src_data[c]),
      .in_res_valid(rs_dst_valid[c]), .in_res_ready(rs_dst_ready[c]), .in_res(rs_dst_data[c])
    );
    assign cm_src_dst[c] = DW'(dst);
  end
endmodule
