// strmatch_unit: Aho-Corasick string matching accelerator of one vault.
//
// The host compiles its query strings into a deterministic Aho-Corasick
// automaton and writes it into two on-chip SRAM tiles: a next-state table of
// STATES x 256 entries indexed by {state, character}, and a match table
// holding, for each state, a vector of the patterns (up to N_PAT) that end
// when the automaton enters that state. State 0 is the root.
//
// A search reads the text block by block (64-byte blocks) into a pair of
// block buffers: while one block is consumed the next is prefetched. Each
// cycle one character goes through the next-state table (a registered read
// whose address is the current state and the character), so a 64-byte block
// takes 64 cycles. One cycle later the match table is read for the new state
// and every set bit counts as one match ending at that character.
// The result gives the number of matches (r0), the byte offset in the text of
// the last character that completed a match (r1) and ok = at least one match.
//
// Commands: OP_SM_ROW writes 8 next-state entries (a0 = state, a1 = first
// character, a multiple of 8, a2 = 8 next states packed 8 bits apart, lowest
// first), taking 8 cycles and returning no result; OP_SM_MATCH writes the
// match vector a1 of state a0; OP_STRMATCH searches a1 bytes (multiple of
// 64) starting at a0.
//
// One character per cycle, 64 cycles per block, tables in SRAM written by the
// host before the search, and block buffering follow the architecture. The
// full 256-way next-state table (rather than the bit-split tiles of the
// engine the architecture cites), the table sizes and the result format are
// this design's choices.
module strmatch_unit
  import nmp_pkg::*;
#(
  parameter int unsigned STATES = 256,
  parameter int unsigned N_PAT  = 16
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
  localparam int unsigned SW = $clog2(STATES);

  typedef enum logic [1:0] { S_IDLE, S_ROW, S_RUN, S_DONE } state_e;
  state_e st_q;
  cmd_t   cmd_q;

  logic [SW-1:0]    next_tab  [STATES * 256];
  logic [N_PAT-1:0] match_tab [STATES];

  // table write port
  logic               tw_en;
  logic [SW+7:0]      tw_addr;
  logic [SW-1:0]      tw_data;
  logic [2:0]         row_k_q;

  // search state
  logic [SW-1:0] cur_state_q;
  block_t        buf_q [2];
  logic [1:0]    bufv_q;
  logic          cur_q, fill_q, pend_q;
  logic [5:0]    ci_q;
  addr_t         base_q;
  logic [31:0]   nblk_q, blk_iss_q, pos_q, len_q;
  logic          p1_v_q, p2_v_q;
  logic [31:0]   p1_pos_q, p2_pos_q;
  logic [N_PAT-1:0] p2_mv_q;
  logic [31:0]   count_q, last_q;
  logic [7:0]    ch;
  logic          consume;

  assign cmd_ready = (st_q == S_IDLE);
  assign ch        = buf_q[cur_q][8 * ci_q +: 8];
  assign consume   = (st_q == S_RUN) && bufv_q[cur_q];

  always_comb begin
    tw_en   = (st_q == S_ROW);
    tw_addr = {cmd_q.a0[SW-1:0], cmd_q.a1[7:3], row_k_q};
    tw_data = cmd_q.a2[8 * row_k_q +: SW];
  end

  always_ff @(posedge clk) begin
    if (tw_en) next_tab[tw_addr] <= tw_data;
    if (st_q == S_IDLE && cmd_valid && cmd.op == OP_SM_MATCH)
      match_tab[cmd.a0[SW-1:0]] <= cmd.a1[N_PAT-1:0];
  end

  // block fetch: one read outstanding, into the buffer that is free next
  assign req_valid = (st_q == S_RUN) && !pend_q && (blk_iss_q < nblk_q) && !bufv_q[fill_q];
  always_comb begin
    req      = '0;
    req.addr = base_q + (blk_iss_q << 6);
    req.tag  = {2'(ACC_STR), 6'd0};
  end

  assign res_valid = (st_q == S_DONE);
  always_comb begin
    res      = '0;
    res.acc  = ACC_STR;
    res.ctrl = cmd_q.ctrl;
    res.ok   = (count_q != 0);
    res.r0   = 64'(count_q);
    res.r1   = 64'(last_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; cmd_q <= '0; row_k_q <= '0;
      cur_state_q <= '0; bufv_q <= '0; cur_q <= 1'b0; fill_q <= 1'b0; pend_q <= 1'b0;
      ci_q <= '0; base_q <= '0; nblk_q <= '0; blk_iss_q <= '0; pos_q <= '0; len_q <= '0;
      p1_v_q <= 1'b0; p2_v_q <= 1'b0; p1_pos_q <= '0; p2_pos_q <= '0; p2_mv_q <= '0;
      count_q <= '0; last_q <= '0;
      buf_q[0] <= '0; buf_q[1] <= '0;
    end else begin
      // pipeline stage 2: match table read for the state just entered
      p2_v_q   <= p1_v_q;
      p2_pos_q <= p1_pos_q;
      p2_mv_q  <= match_tab[cur_state_q];
      // pipeline stage 3: count
      if (p2_v_q && p2_mv_q != '0) begin
        count_q <= count_q + 32'($countones(p2_mv_q));
        last_q  <= p2_pos_q;
      end
      p1_v_q <= 1'b0;

      unique case (st_q)
        S_IDLE: if (cmd_valid) begin
          cmd_q <= cmd;
          unique case (cmd.op)
            OP_SM_ROW: begin row_k_q <= '0; st_q <= S_ROW; end
            OP_STRMATCH: begin
              base_q      <= addr_t'(cmd.a0);
              len_q       <= cmd.a1[31:0];
              nblk_q      <= cmd.a1[31:0] >> 6;
              blk_iss_q   <= '0;
              pos_q       <= '0;
              ci_q        <= '0;
              cur_q       <= 1'b0;
              fill_q      <= 1'b0;
              bufv_q      <= '0;
              cur_state_q <= '0;
              count_q     <= '0;
              last_q      <= '0;
              st_q        <= S_RUN;
            end
            default: ; // OP_SM_MATCH: written above, no result
          endcase
        end
        S_ROW: begin
          row_k_q <= row_k_q + 1'b1;
          if (row_k_q == 3'd7) st_q <= S_IDLE;
        end
        S_RUN: begin
          if (req_valid && req_ready) begin
            pend_q    <= 1'b1;
            blk_iss_q <= blk_iss_q + 1;
          end
          if (rsp_valid && !rsp.we) begin
            buf_q[fill_q]  <= rsp.rdata;
            bufv_q[fill_q] <= 1'b1;
            fill_q         <= !fill_q;
            pend_q         <= 1'b0;
          end
          if (consume) begin
            cur_state_q <= next_tab[{cur_state_q, ch}];
            p1_v_q      <= 1'b1;
            p1_pos_q    <= pos_q;
            pos_q       <= pos_q + 1;
            ci_q        <= ci_q + 1'b1;
            if (ci_q == 6'd63) begin
              bufv_q[cur_q] <= 1'b0;
              cur_q         <= !cur_q;
            end
          end
          if (pos_q == len_q && !p1_v_q && !p2_v_q) st_q <= S_DONE;
        end
        S_DONE: if (res_ready) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
