// tb_vault_ctrl: the vault controller front end between a local stream, a
// crossbar stream and a DRAM port model.
//
// Both request streams send random reads and writes (src = the vault's own
// number for local requests, other port numbers for crossbar requests).
// Checks that every request reaches the DRAM, that each reply returns on the
// right side (local for src = VAULT, crossbar with destination = src),
// that written data reads back, and that both sources are served when both
// are busy.
module tb_vault_ctrl;
  import nmp_pkg::*;
  localparam int V = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic loc_req_valid, loc_req_ready, loc_rsp_valid, loc_rsp_ready;
  logic xb_req_valid, xb_req_ready, xb_rsp_valid, xb_rsp_ready;
  logic dram_req_valid, dram_req_ready, dram_rsp_valid, dram_rsp_ready;
  mem_req_t loc_req, xb_req, dram_req;
  mem_rsp_t loc_rsp, xb_rsp, dram_rsp;
  logic [SRC_W-1:0] xb_rsp_dst;
  int n_loc_sent = 0, n_xb_sent = 0, n_loc_back = 0, n_xb_back = 0;
  bit loc_taken = 0, xb_taken = 0;

  vault_ctrl #(.VAULT(V)) dut (.*);
  mem_port_model #(.VAULT(V), .LATENCY(4), .STALL(10)) u_dram (
    .clk, .rst_n, .scheme_b(1'b1), .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
    .rsp_valid(dram_rsp_valid), .rsp_ready(dram_rsp_ready), .rsp(dram_rsp)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // each request reads or writes a block of vault V (Scheme B): page V
  function automatic mem_req_t make(int n, logic [SRC_W-1:0] src);
    mem_req_t r;
    r = '0;
    r.we    = n[0];
    r.addr  = 32'(V) << 12 | 32'(((n >> 1) % 64) << 6) | 32'(n % 4) << 16;
    r.wdata = {16{32'(n)}};
    r.src   = src;
    r.tag   = 8'(n);
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (loc_req_valid && loc_req_ready) begin loc_taken = 1; n_loc_sent++; end
    if (xb_req_valid && xb_req_ready) begin xb_taken = 1; n_xb_sent++; end
    if (loc_rsp_valid && loc_rsp_ready) begin
      n_loc_back++;
      check(loc_rsp.src == SRC_W'(V), "local reply with foreign src");
    end
    if (xb_rsp_valid && xb_rsp_ready) begin
      n_xb_back++;
      check(xb_rsp.src != SRC_W'(V) && xb_rsp_dst == xb_rsp.src, "crossbar reply routing");
      if (!xb_rsp.we)
        check(xb_rsp.rdata == tb_mem_pkg::rd_block(xb_rsp.addr), "read data");
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (!loc_req_valid || loc_taken) begin
      loc_req_valid = (n_loc_sent < 300) && ($urandom % 3 != 0);
      loc_req = make(2 * n_loc_sent, SRC_W'(V));
      loc_taken = 0;
    end
    if (!xb_req_valid || xb_taken) begin
      xb_req_valid = (n_xb_sent < 300) && ($urandom % 3 != 0);
      xb_req = make(2 * n_xb_sent + 1 + ($urandom % 2), SRC_W'(($urandom % 2) ? 17 : 2));
      xb_taken = 0;
    end
    loc_rsp_ready = ($urandom % 4 != 0);
    xb_rsp_ready  = ($urandom % 4 != 0);
  end

  initial begin
    loc_req_valid = 0; xb_req_valid = 0; loc_req = '0; xb_req = '0;
    loc_rsp_ready = 1; xb_rsp_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    check(n_loc_sent == 300 && n_xb_sent == 300, $sformatf("sent %0d local, %0d crossbar", n_loc_sent, n_xb_sent));
    check(n_loc_back == 300 && n_xb_back == 300, $sformatf("replies %0d local, %0d crossbar", n_loc_back, n_xb_back));
    check(tb_mem_pkg::n_wrong_vault == 0, "requests outside the vault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
