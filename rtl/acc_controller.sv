// acc_controller: accelerator controller on the processor side of the
// logic layer.
//
// Accepts commands from the processor and schedules each one on the
// accelerator tile of the vault that holds its data, so that the accelerator
// works on its local vault whenever possible:
//   OP_MEMCPY, OP_SORT, OP_STRMATCH: vault of the first address (a0) under
//                                    the current mapping scheme;
//   OP_HASH: the hash unit turns (key a0, bucket array base a1, log2 of the
//            bucket count a2) into the bucket address, which replaces a1; the
//            lookup goes to the vault holding that bucket;
//   OP_SM_ROW, OP_SM_MATCH: the vault named in the command (table loads).
// The controller stamps its own number into the command so results find
// their way back, and returns results to the processor in arrival order.
// A two-entry buffer on each side registers the path, so a command leaves
// one cycle after it was accepted at the earliest. Commands from the
// processor, scheduling by data location and the hash unit at the memory
// interface follow the architecture; the encoding is this design's.
module acc_controller
  import nmp_pkg::*;
#(
  parameter int unsigned ID = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               scheme_b,
  input  logic               host_cmd_valid,
  output logic               host_cmd_ready,
  input  cmd_t               host_cmd,
  output logic               host_res_valid,
  input  logic               host_res_ready,
  output result_t            host_res,
  output logic               out_cmd_valid,
  input  logic               out_cmd_ready,
  output logic [VAULT_W-1:0] out_cmd_dst,
  output cmd_t               out_cmd,
  input  logic               in_res_valid,
  output logic               in_res_ready,
  input  result_t            in_res
);
  addr_t bucket;
  cmd_t  sched;
  logic [31:0] unused_index;

  hash_unit u_hash (
    .key(host_cmd.a0), .table_base(addr_t'(host_cmd.a1)), .log2_buckets(host_cmd.a2[5:0]),
    .index(unused_index), .bucket_addr(bucket)
  );

  always_comb begin
    sched      = host_cmd;
    sched.ctrl = 1'(ID);
    unique case (host_cmd.op)
      OP_HASH: begin
        sched.a1    = 64'(bucket);
        sched.vault = vault_of(bucket, scheme_b);
      end
      OP_SM_ROW, OP_SM_MATCH: sched.vault = host_cmd.vault;
      default: sched.vault = vault_of(addr_t'(host_cmd.a0), scheme_b);
    endcase
  end

  buffer_fifo #(.T(cmd_t), .DEPTH(2)) u_cmd_buf (
    .clk, .rst_n,
    .in_valid(host_cmd_valid), .in_ready(host_cmd_ready), .in_data(sched),
    .out_valid(out_cmd_valid), .out_ready(out_cmd_ready), .out_data(out_cmd)
  );
  assign out_cmd_dst = out_cmd.vault;

  buffer_fifo #(.T(result_t), .DEPTH(2)) u_res_buf (
    .clk, .rst_n,
    .in_valid(in_res_valid), .in_ready(in_res_ready), .in_data(in_res),
    .out_valid(host_res_valid), .out_ready(host_res_ready), .out_data(host_res)
  );
endmodule
