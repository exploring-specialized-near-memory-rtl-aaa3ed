// sort_unit: sorting accelerator of one vault.
//
// Sorts an array of 64-bit unsigned keys in memory, in two phases.
// Phase 1 reads the array 64 keys (8 blocks) at a time, passes each set
// through the bitonic network and writes it back in place, leaving sorted
// runs of 64 keys. Phase 2 merges pairs of runs with the merge unit into
// runs twice as long, alternating between the array and a scratch area of
// the same size, until one run remains. The result reports where the sorted
// array ended up (r0: array or scratch address) and the key count (r1).
//
// Command: a0 = array address, a1 = scratch address, a2 = number of keys,
// which must be a non-zero multiple of 64; addresses 64-byte aligned.
// Memory: one block request is outstanding at a time; the unit waits for
// the read data or the write acknowledge before issuing the next. Merging
// runs at one key per cycle between memory operations. Keys sit in a block
// little-endian: key i of a block is bits 64*i+63 : 64*i.
//
// The two phases, the 64-key bitonic network and the merge units are the
// architecture's. The ping-pong scratch area stands in for its in-place
// merge logic, which is not specified; the single outstanding request is
// this design's simplification.
module sort_unit
  import nmp_pkg::*;
#(
  parameter int unsigned N = 64   // keys per sorting-network set
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
  localparam int unsigned BPS = N / KEYS_PER_BLOCK;   // blocks per network set

  typedef enum logic [3:0] {
    S_IDLE, S_P1_RD, S_P1_SORT, S_P1_WAIT, S_P1_WR, S_P2_PASS, S_P2_PAIR,
    S_P2_MERGE, S_REQ, S_RSP, S_DONE
  } state_e;
  typedef enum logic [2:0] { MK_P1RD, MK_P1WR, MK_RDA, MK_RDB, MK_WRO } mem_kind_e;

  state_e    st_q;
  mem_kind_e mk_q;
  cmd_t      cmd_q;
  addr_t     src_q, dst_q;
  logic [31:0] n_q, chunk_q, run_q, pair_q;
  logic [$clog2(BPS > 1 ? BPS : 2):0] blk_q;
  logic [N-1:0][KEY_W-1:0] set_q;
  addr_t     maddr_q;
  logic      mwe_q;
  block_t    mdata_q;

  // merge state (key indices relative to the array start)
  logic [31:0] a_ptr_q, a_end_q, b_ptr_q, b_end_q, o_ptr_q;
  block_t      bufa_q, bufb_q, bufo_q;
  logic [3:0]  a_cnt_q, b_cnt_q, o_cnt_q;

  logic                sorter_in_valid, sorter_out_valid;
  logic [N-1:0][KEY_W-1:0] sorter_out;

  bitonic_sorter #(.N(N), .W(KEY_W)) u_net (
    .clk, .rst_n,
    .in_valid(sorter_in_valid), .in_keys(set_q),
    .out_valid(sorter_out_valid), .out_keys(sorter_out)
  );

  logic m_a_ready, m_b_ready, m_out_valid, m_all_done;
  logic [KEY_W-1:0] m_out;
  merge_unit #(.W(KEY_W)) u_merge (
    .a_valid(a_cnt_q != 0), .a_done(a_cnt_q == 0 && a_ptr_q >= a_end_q), .a_data(bufa_q[KEY_W-1:0]),
    .a_ready(m_a_ready),
    .b_valid(b_cnt_q != 0), .b_done(b_cnt_q == 0 && b_ptr_q >= b_end_q), .b_data(bufb_q[KEY_W-1:0]),
    .b_ready(m_b_ready),
    .out_valid(m_out_valid), .out_data(m_out),
    .out_ready(st_q == S_P2_MERGE && o_cnt_q < 4'(KEYS_PER_BLOCK)),
    .all_done(m_all_done)
  );

  function automatic logic [31:0] min32(logic [31:0] x, logic [31:0] y);
    return (x < y) ? x : y;
  endfunction

  assign cmd_ready       = (st_q == S_IDLE);
  assign sorter_in_valid = (st_q == S_P1_SORT);
  assign req_valid       = (st_q == S_REQ);
  always_comb begin
    req       = '0;
    req.we    = mwe_q;
    req.addr  = maddr_q;
    req.wdata = mdata_q;
    req.tag   = {2'(ACC_SORT), 6'd0};
  end
  assign res_valid = (st_q == S_DONE);
  always_comb begin
    res     = '0;
    res.acc = ACC_SORT;
    res.ctrl = cmd_q.ctrl;
    res.ok  = 1'b1;
    res.r0  = 64'(src_q);
    res.r1  = 64'(n_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
      mk_q <= MK_P1RD;
      cmd_q <= '0;
      src_q <= '0; dst_q <= '0;
      n_q <= '0; chunk_q <= '0; run_q <= '0; pair_q <= '0; blk_q <= '0;
      set_q <= '0; maddr_q <= '0; mwe_q <= 1'b0; mdata_q <= '0;
      a_ptr_q <= '0; a_end_q <= '0; b_ptr_q <= '0; b_end_q <= '0; o_ptr_q <= '0;
      bufa_q <= '0; bufb_q <= '0; bufo_q <= '0;
      a_cnt_q <= '0; b_cnt_q <= '0; o_cnt_q <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (cmd_valid) begin
          cmd_q   <= cmd;
          src_q   <= addr_t'(cmd.a0);
          dst_q   <= addr_t'(cmd.a1);
          n_q     <= cmd.a2[31:0];
          chunk_q <= '0;
          blk_q   <= '0;
          st_q    <= S_P1_RD;
        end
        // ---------------- phase 1: sorting network over 64-key sets
        S_P1_RD: begin
          if (blk_q == ($bits(blk_q))'(BPS)) st_q <= S_P1_SORT;
          else begin
            maddr_q <= src_q + (chunk_q << 3) + 32'(blk_q) * BLOCK_BYTES;
            mwe_q   <= 1'b0;
            mk_q    <= MK_P1RD;
            st_q    <= S_REQ;
          end
        end
        S_P1_SORT: st_q <= S_P1_WAIT;
        S_P1_WAIT: if (sorter_out_valid) begin
          set_q <= sorter_out;
          blk_q <= '0;
          st_q  <= S_P1_WR;
        end
        S_P1_WR: begin
          if (blk_q == ($bits(blk_q))'(BPS)) begin
            blk_q <= '0;
            if (chunk_q + N >= n_q) begin
              run_q <= 32'(N);
              st_q  <= S_P2_PASS;
            end else begin
              chunk_q <= chunk_q + N;
              st_q    <= S_P1_RD;
            end
          end else begin
            maddr_q <= src_q + (chunk_q << 3) + 32'(blk_q) * BLOCK_BYTES;
            mdata_q <= set_q[32'(blk_q) * KEYS_PER_BLOCK +: KEYS_PER_BLOCK];
            mwe_q   <= 1'b1;
            mk_q    <= MK_P1WR;
            st_q    <= S_REQ;
          end
        end
        // ---------------- phase 2: pairwise merging of runs
        S_P2_PASS: begin
          if (run_q >= n_q) st_q <= S_DONE;
          else begin
            pair_q <= '0;
            st_q   <= S_P2_PAIR;
          end
        end
        S_P2_PAIR: begin
          if (pair_q >= n_q) begin
            src_q <= dst_q;
            dst_q <= src_q;
            run_q <= run_q << 1;
            st_q  <= S_P2_PASS;
          end else begin
            a_ptr_q <= pair_q;
            a_end_q <= min32(pair_q + run_q, n_q);
            b_ptr_q <= min32(pair_q + run_q, n_q);
            b_end_q <= min32(pair_q + (run_q << 1), n_q);
            o_ptr_q <= pair_q;
            a_cnt_q <= '0; b_cnt_q <= '0; o_cnt_q <= '0;
            st_q    <= S_P2_MERGE;
          end
        end
        S_P2_MERGE: begin
          if (o_cnt_q == 4'(KEYS_PER_BLOCK)) begin
            maddr_q <= dst_q + (o_ptr_q << 3);
            mdata_q <= bufo_q;
            mwe_q   <= 1'b1;
            mk_q    <= MK_WRO;
            st_q    <= S_REQ;
          end else if (a_cnt_q == 0 && a_ptr_q < a_end_q) begin
            maddr_q <= src_q + (a_ptr_q << 3);
            mwe_q   <= 1'b0;
            mk_q    <= MK_RDA;
            st_q    <= S_REQ;
          end else if (b_cnt_q == 0 && b_ptr_q < b_end_q) begin
            maddr_q <= src_q + (b_ptr_q << 3);
            mwe_q   <= 1'b0;
            mk_q    <= MK_RDB;
            st_q    <= S_REQ;
          end else if (m_all_done) begin
            pair_q <= pair_q + (run_q << 1);
            st_q   <= S_P2_PAIR;
          end else if (m_out_valid) begin
            bufo_q  <= {m_out, bufo_q[DATA_W-1:KEY_W]};
            o_cnt_q <= o_cnt_q + 1'b1;
            if (m_a_ready) begin
              bufa_q  <= bufa_q >> KEY_W;
              a_cnt_q <= a_cnt_q - 1'b1;
            end
            if (m_b_ready) begin
              bufb_q  <= bufb_q >> KEY_W;
              b_cnt_q <= b_cnt_q - 1'b1;
            end
          end
        end
        // ---------------- one memory operation
        S_REQ: if (req_ready) st_q <= S_RSP;
        S_RSP: if (rsp_valid) begin
          unique case (mk_q)
            MK_P1RD: begin
              set_q[32'(blk_q) * KEYS_PER_BLOCK +: KEYS_PER_BLOCK] <= rsp.rdata;
              blk_q <= blk_q + 1'b1;
              st_q  <= S_P1_RD;
            end
            MK_P1WR: begin
              blk_q <= blk_q + 1'b1;
              st_q  <= S_P1_WR;
            end
            MK_RDA: begin
              bufa_q  <= rsp.rdata;
              a_cnt_q <= 4'(KEYS_PER_BLOCK);
              a_ptr_q <= a_ptr_q + KEYS_PER_BLOCK;
              st_q    <= S_P2_MERGE;
            end
            MK_RDB: begin
              bufb_q  <= rsp.rdata;
              b_cnt_q <= 4'(KEYS_PER_BLOCK);
              b_ptr_q <= b_ptr_q + KEYS_PER_BLOCK;
              st_q    <= S_P2_MERGE;
            end
            default: begin // MK_WRO
              o_cnt_q <= '0;
              o_ptr_q <= o_ptr_q + KEYS_PER_BLOCK;
              st_q    <= S_P2_MERGE;
            end
          endcase
        end
        S_DONE: if (res_ready) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
