// tb_memcopy_unit: self-checking test of the memory copy accelerator.
//
// Fills a source area with random blocks, copies it with replies returned
// out of order by the memory model (SHUFFLE) and with random back-pressure,
// and checks every destination block, that the bytes around the destination
// are untouched, the reported byte count, and that the number of reads in
// flight never exceeds MAX_OUT. A second copy of a single block and a
// zero-length copy check the edge cases.
module tb_memcopy_unit;
  import nmp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, req_valid, req_ready, rsp_valid, res_valid, res_ready;
  cmd_t cmd; mem_req_t req; mem_rsp_t rsp; result_t res;
  int checks = 0, failures = 0;
  int inflight = 0, max_inflight = 0, out_of_order = 0;
  addr_t last_rsp_addr;

  memcopy_unit dut (.*);
  mem_port_model #(.LATENCY(10), .QDEPTH(32), .SHUFFLE(1'b1), .STALL(15)) u_mem (
    .clk, .rst_n, .scheme_b(1'b1), .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready(1'b1), .rsp
  );

  always @(posedge clk) begin
    if (req_valid && req_ready && !req.we) inflight++;
    if (req_valid && req_ready && req.we) inflight--;
    if (inflight > max_inflight) max_inflight = inflight;
    if (rsp_valid && !rsp.we) begin
      if (rsp.addr < last_rsp_addr) out_of_order++;
      last_rsp_addr = rsp.addr;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic copy(addr_t src, addr_t dst, int bytes);
    block_t guard = {16{32'hDEAD_BEEF}};
    for (int i = 0; i < bytes; i += 64) begin
      block_t b;
      for (int w = 0; w < 16; w++) b[32*w +: 32] = $urandom;
      tb_mem_pkg::wr_block(src + i, b);
    end
    tb_mem_pkg::wr_block(dst - 64, guard);
    tb_mem_pkg::wr_block(dst + bytes, guard);
    @(negedge clk);
    cmd = '0; cmd.op = OP_MEMCPY; cmd.a0 = 64'(src); cmd.a1 = 64'(dst); cmd.a2 = 64'(bytes);
    cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
    #1;
    while (!res_valid) begin @(negedge clk); #1; end
    check(res.r0 == 64'(bytes) && res.acc == ACC_COPY, $sformatf("byte count %0d", res.r0));
    for (int i = 0; i < bytes; i += 64)
      check(tb_mem_pkg::rd_block(dst + i) == tb_mem_pkg::rd_block(src + i),
            $sformatf("block at offset %0d", i));
    check(tb_mem_pkg::rd_block(dst - 64) == guard && tb_mem_pkg::rd_block(dst + bytes) == guard,
          "guard blocks");
    @(negedge clk);
  endtask

  initial begin
    cmd_valid = 0; cmd = '0; res_ready = 1; last_rsp_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    copy(32'h0001_0000, 32'h0008_0040, 64 * 200);
    copy(32'h0003_0000, 32'h0009_0000, 64);
    copy(32'h0004_0000, 32'h000A_0000, 0);
    check(max_inflight <= 16 && max_inflight > 4, $sformatf("reads in flight peaked at %0d", max_inflight));
    check(out_of_order > 0, "replies were reordered");
    $display("peak reads in flight %0d, reordered replies %0d", max_inflight, out_of_order);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
