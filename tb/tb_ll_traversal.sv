// tb_ll_traversal: self-checking test of the hash-table lookup unit.
//
// Builds an open-chained hash table in the memory model: 64 buckets holding
// virtual head pointers, nodes of {key, value, next} placed at virtual
// addresses that the unit must shift by a fixed VA->PA offset. Chains are
// several nodes long. Lookups of present keys, absent keys and the same key
// twice in a row are sent back to back, so many are outstanding in the CAM
// at once while the memory returns replies out of order. Every result is
// matched by key against the table the testbench built.
module tb_ll_traversal;
  import nmp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, req_valid, req_ready, rsp_valid, res_valid, res_ready;
  cmd_t cmd; mem_req_t req; mem_rsp_t rsp; result_t res;
  int checks = 0, failures = 0;

  ll_traversal dut (.*);
  mem_port_model #(.LATENCY(12), .QDEPTH(32), .SHUFFLE(1'b1)) u_mem (
    .clk, .rst_n, .scheme_b(1'b1), .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready(1'b1), .rsp
  );

  localparam addr_t TABLE  = 32'h0001_0000;
  localparam addr_t VBASE  = 32'h0020_0000;
  localparam addr_t OFFSET = 32'h0100_0000;
  localparam int    LOG2B  = 6;

  logic [63:0] value_of[logic [63:0]];   // reference contents
  logic [63:0] keys[$];
  int expected_results = 0, got_results = 0, max_busy = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic addr_t bucket_of(logic [63:0] key);
    logic [127:0] p = 128'(key) * 128'(64'h9E3779B97F4A7C15);
    return TABLE + 32'(p[63:64-LOG2B]) * 8;
  endfunction

  // insert at the head of the chain
  task automatic insert(logic [63:0] key, logic [63:0] val, int n);
    addr_t va = VBASE + 64 * n;
    addr_t b  = bucket_of(key);
    logic [63:0] head = tb_mem_pkg::rd64(b);
    tb_mem_pkg::wr64(va + OFFSET,      key);
    tb_mem_pkg::wr64(va + OFFSET + 8,  val);
    tb_mem_pkg::wr64(va + OFFSET + 16, head);
    tb_mem_pkg::wr64(b, 64'(va));
    value_of[key] = val;
  endtask

  // results are collected by a separate process
  always @(negedge clk) begin
    #1;
    if (res_valid) begin
      got_results++;
      if (value_of.exists(res.r0))
        check(res.ok && res.r1 == value_of[res.r0], $sformatf("key %h: ok=%b value %h", res.r0, res.ok, res.r1));
      else
        check(!res.ok, $sformatf("absent key %h reported found", res.r0));
    end
  end
  // lookups in the unit = accepted commands - returned results
  int busy = 0;
  always @(posedge clk) begin
    if (cmd_valid && cmd_ready) busy++;
    if (res_valid && res_ready) busy--;
    if (busy > max_busy) max_busy = busy;
  end

  task automatic lookup(logic [63:0] key);
    @(negedge clk);
    cmd = '0; cmd.op = OP_HASH; cmd.a0 = key; cmd.a1 = 64'(bucket_of(key)); cmd.a3 = 64'(OFFSET);
    cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 cmd_valid = 0;
    expected_results++;
  endtask

  initial begin
    cmd_valid = 0; cmd = '0; res_ready = 1;
    for (int b = 0; b < (1 << LOG2B); b++) tb_mem_pkg::wr64(TABLE + 8 * b, 64'd0);
    for (int n = 0; n < 300; n++) begin
      logic [63:0] k;
      k = {$urandom, $urandom};
      keys.push_back(k);
      insert(k, {$urandom, $urandom}, n);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 120; i++) begin
      lookup(keys[$urandom % keys.size()]);
      if (i % 5 == 0) lookup({$urandom, $urandom});        // absent
      if (i % 17 == 0) begin lookup(keys[i]); lookup(keys[i]); end // same key twice
    end
    lookup(keys[0]);   // the first inserted key sits at the end of its chain
    repeat (2000) @(posedge clk);
    check(got_results == expected_results, $sformatf("%0d results for %0d lookups", got_results, expected_results));
    check(max_busy >= 8, $sformatf("peak outstanding lookups %0d", max_busy));
    $display("lookups %0d, peak outstanding %0d", expected_results, max_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
