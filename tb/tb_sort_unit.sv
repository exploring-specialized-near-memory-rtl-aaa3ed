// tb_sort_unit: self-checking test of the sorting accelerator.
//
// Loads arrays of random 64-bit keys (with deliberate duplicates) into the
// memory model, runs sorts of 64 keys (network only), 192 keys (uneven final
// merge) and 512 keys (three merge passes), and compares the array at the
// reported result address with a reference sorted by the testbench. Also
// checks that the result lands in the array or in the scratch area as the
// pass count dictates.
module tb_sort_unit;
  import nmp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, req_valid, req_ready, rsp_valid, res_valid, res_ready;
  cmd_t cmd; mem_req_t req; mem_rsp_t rsp; result_t res;
  int checks = 0, failures = 0;

  sort_unit dut (.*);
  mem_port_model #(.LATENCY(6), .STALL(20)) u_mem (
    .clk, .rst_n, .scheme_b(1'b1), .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready(1'b1), .rsp
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_sort(int n, addr_t base, addr_t scratch);
    logic [63:0] ref_q[$];
    int passes, r;
    addr_t exp_addr;
    for (int i = 0; i < n; i++) begin
      logic [63:0] k = {$urandom, $urandom};
      if (i % 7 == 3) k = ref_q[i-1];          // duplicates
      if (i % 11 == 5) k = {32'd0, 32'(i % 3)}; // small values
      ref_q.push_back(k);
      tb_mem_pkg::wr64(base + 8 * i, k);
    end
    ref_q.sort();
    // drive and sample at the falling edge; a handshake completes at the
    // rising edge that follows a falling edge where valid && ready
    @(negedge clk);
    cmd = '0; cmd.op = OP_SORT; cmd.a0 = 64'(base); cmd.a1 = 64'(scratch); cmd.a2 = 64'(n);
    cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
    #1;
    while (!res_valid) begin @(negedge clk); #1; end
    passes = 0; r = 64;
    while (r < n) begin passes++; r *= 2; end
    exp_addr = (passes % 2 == 0) ? base : scratch;
    check(res.r0 == 64'(exp_addr), $sformatf("n=%0d result address %h expected %h", n, res.r0, exp_addr));
    check(res.r1 == 64'(n) && res.acc == ACC_SORT, "result fields");
    for (int i = 0; i < n; i++)
      check(tb_mem_pkg::rd64(exp_addr + 8 * i) == ref_q[i],
            $sformatf("n=%0d key %0d = %h expected %h", n, i, tb_mem_pkg::rd64(exp_addr + 8 * i), ref_q[i]));
  endtask

  initial begin
    cmd_valid = 0; cmd = '0; res_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_sort(64,  32'h0000_1000, 32'h0004_0000);
    run_sort(192, 32'h0001_0000, 32'h0005_0000);
    run_sort(512, 32'h0002_0000, 32'h0006_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
