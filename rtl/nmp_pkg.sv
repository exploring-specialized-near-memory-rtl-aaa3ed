// nmp_pkg: shared types and constants of the near-memory processing logic
// layer.
//
// The logic layer sits under a 3D-stacked DRAM of 16 vaults. Every memory
// transfer moves one 64-byte block (512 bits); requests carry the byte address
// of the block, a source port number used to route the response back, and a
// tag chosen by the requester. Writes are acknowledged by a response with
// `we` set so that an accelerator can tell when its data has landed.
//
// The 16 vaults, 64-byte blocks, 64-bit keys and the 4 GB (32-bit) address
// space follow the architecture this RTL implements. Packet layouts, tag
// format and the command encoding are this design's own choices.
package nmp_pkg;

  localparam int unsigned N_VAULTS    = 16;
  localparam int unsigned VAULT_W     = 4;
  localparam int unsigned N_LINKS     = 4;               // SerDes link ports
  localparam int unsigned N_PORTS     = N_VAULTS + N_LINKS;
  localparam int unsigned SRC_W       = 5;               // 0..15 tiles, 16..19 links
  localparam int unsigned ADDR_W      = 32;              // 4 GB device
  localparam int unsigned BLOCK_BYTES = 64;
  localparam int unsigned DATA_W      = BLOCK_BYTES * 8; // 512
  localparam int unsigned KEY_W       = 64;
  localparam int unsigned KEYS_PER_BLOCK = DATA_W / KEY_W; // 8
  localparam int unsigned TAG_W       = 8;               // [7:6] accelerator, [5:0] local
  localparam int unsigned N_CTRL      = 2;               // accelerator controllers

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] block_t;

  typedef struct packed {
    logic             we;
    addr_t            addr;
    block_t           wdata;
    logic [SRC_W-1:0] src;
    logic [TAG_W-1:0] tag;
  } mem_req_t;

  typedef struct packed {
    logic             we;     // 1: write acknowledge, rdata meaningless
    addr_t            addr;
    block_t           rdata;
    logic [SRC_W-1:0] src;
    logic [TAG_W-1:0] tag;
  } mem_rsp_t;

  // Accelerator identifiers, also the top two tag bits of a tile's requests.
  typedef enum logic [1:0] {
    ACC_SORT = 2'd0,
    ACC_STR  = 2'd1,
    ACC_HASH = 2'd2,
    ACC_COPY = 2'd3
  } acc_id_e;

  typedef enum logic [2:0] {
    OP_MEMCPY   = 3'd0, // a0 src, a1 dst, a2 bytes
    OP_SORT     = 3'd1, // a0 array, a1 scratch, a2 number of keys
    OP_STRMATCH = 3'd2, // a0 text, a1 bytes
    OP_SM_ROW   = 3'd3, // a0 state, a1 first char (multiple of 8), a2 8 packed next states
    OP_SM_MATCH = 3'd4, // a0 state, a1 match vector of that state
    OP_HASH     = 3'd5  // a0 key, a1 bucket array base / bucket address, a2 log2 buckets, a3 VA->PA offset
  } op_e;

  typedef struct packed {
    op_e              op;
    logic [VAULT_W-1:0] vault;  // target tile (table writes; others decoded)
    logic             ctrl;     // issuing accelerator controller
    logic [63:0]      a0;
    logic [63:0]      a1;
    logic [63:0]      a2;
    logic [63:0]      a3;
  } cmd_t;

  typedef struct packed {
    acc_id_e          acc;
    logic [VAULT_W-1:0] vault;
    logic             ctrl;
    logic             ok;       // lookup found / operation completed
    logic [63:0]      r0;
    logic [63:0]      r1;
  } result_t;

  // Vault index of a physical address. Scheme A interleaves 64-byte blocks
  // over the vaults (address bits 9:6); Scheme B keeps each 4 KB page in one
  // vault (address bits 15:12).
  function automatic logic [VAULT_W-1:0] vault_of(addr_t a, logic scheme_b);
    return scheme_b ? a[15:12] : a[9:6];
  endfunction

endpackage
