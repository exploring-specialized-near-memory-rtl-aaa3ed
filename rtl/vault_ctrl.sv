// vault_ctrl: front end of one vault's memory controller.
//
// Merges the two request streams a vault serves, the co-located accelerator
// tile (local path) and the crossbar (the processor's SerDes links and the
// tiles of other vaults), onto the vault's DRAM port with a round-robin
// arbiter. Replies from the DRAM are returned by their src field: src equal
// to this vault's number goes back to the local tile, anything else to the
// crossbar with src as its destination port. DRAM scheduling and timing
// belong to the DRAM side of the port and are not modelled here.
// Combinational pass-through with valid/ready on every side; the two-source
// arbitration is the architecture's, the round-robin policy this design's.
module vault_ctrl
  import nmp_pkg::*;
#(
  parameter int unsigned VAULT = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             loc_req_valid,
  output logic             loc_req_ready,
  input  mem_req_t         loc_req,
  output logic             loc_rsp_valid,
  input  logic             loc_rsp_ready,
  output mem_rsp_t         loc_rsp,
  input  logic             xb_req_valid,
  output logic             xb_req_ready,
  input  mem_req_t         xb_req,
  output logic             xb_rsp_valid,
  input  logic             xb_rsp_ready,
  output logic [SRC_W-1:0] xb_rsp_dst,
  output mem_rsp_t         xb_rsp,
  output logic             dram_req_valid,
  input  logic             dram_req_ready,
  output mem_req_t         dram_req,
  input  logic             dram_rsp_valid,
  output logic             dram_rsp_ready,
  input  mem_rsp_t         dram_rsp
);
  logic [1:0] gnt;
  logic       idx;
  logic       to_local;

  rr_arbiter #(.N(2)) u_arb (
    .clk, .rst_n, .req({xb_req_valid, loc_req_valid}), .advance(dram_req_ready),
    .gnt, .gnt_idx(idx)
  );

  always_comb begin
    dram_req_valid = loc_req_valid || xb_req_valid;
    dram_req       = idx ? xb_req : loc_req;
    loc_req_ready  = gnt[0] && dram_req_ready;
    xb_req_ready   = gnt[1] && dram_req_ready;

    to_local       = (dram_rsp.src == SRC_W'(VAULT));
    loc_rsp_valid  = dram_rsp_valid && to_local;
    loc_rsp        = dram_rsp;
    xb_rsp_valid   = dram_rsp_valid && !to_local;
    xb_rsp         = dram_rsp;
    xb_rsp_dst     = dram_rsp.src;
    dram_rsp_ready = to_local ? loc_rsp_ready : xb_rsp_ready;
  end
endmodule
