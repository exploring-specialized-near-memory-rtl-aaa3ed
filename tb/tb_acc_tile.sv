// tb_acc_tile: one accelerator tile (vault 3, page-per-vault mapping) with a
// local DRAM model and a crossbar-side memory model.
//
// Starts a memory copy from the local vault to a remote one, a sort in the
// local vault, a string search for "ab" and hash lookups whose list nodes
// live in remote vaults, all running at the same time. Checks every result
// (accelerator, vault stamp, values), the copied and sorted data, that
// each request left on the path its address demands (local vault model
// counts foreign addresses; crossbar requests carry the decoded vault) and
// that both paths and all four accelerators were used.
module tb_acc_tile;
  import nmp_pkg::*;
  localparam int V = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid, cmd_ready, res_valid, res_ready;
  cmd_t cmd; result_t res;
  logic loc_req_valid, loc_req_ready, loc_rsp_valid, loc_rsp_ready;
  logic xb_req_valid, xb_req_ready, xb_rsp_valid, xb_rsp_ready;
  mem_req_t loc_req, xb_req; mem_rsp_t loc_rsp, xb_rsp;
  logic [VAULT_W-1:0] xb_req_dst;
  logic scheme_b = 1'b1;
  int n_loc = 0, n_xb = 0, n_res[4];
  logic [63:0] keys[$];
  logic [63:0] hval[logic [63:0]];

  acc_tile #(.VAULT(V)) dut (.*);
  mem_port_model #(.VAULT(V), .LATENCY(5)) u_loc (
    .clk, .rst_n, .scheme_b, .req_valid(loc_req_valid), .req_ready(loc_req_ready), .req(loc_req),
    .rsp_valid(loc_rsp_valid), .rsp_ready(loc_rsp_ready), .rsp(loc_rsp)
  );
  mem_port_model #(.LATENCY(12), .SHUFFLE(1'b1), .QDEPTH(32)) u_rem (
    .clk, .rst_n, .scheme_b, .req_valid(xb_req_valid), .req_ready(xb_req_ready), .req(xb_req),
    .rsp_valid(xb_rsp_valid), .rsp_ready(xb_rsp_ready), .rsp(xb_rsp)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (loc_req_valid && loc_req_ready) n_loc++;
    if (xb_req_valid && xb_req_ready) begin
      n_xb++;
      check(xb_req_dst == xb_req.addr[15:12] && xb_req_dst != 4'(V) && xb_req.src == SRC_W'(V),
            "crossbar request routing");
    end
  end

  task automatic send(cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
  endtask

  localparam addr_t CP_SRC = 32'h0000_3000, CP_DST = 32'h0005_7000;
  localparam addr_t SO_ARR = 32'h0001_3000, SO_TMP = 32'h0002_3000;
  localparam addr_t TX     = 32'h0003_3000;
  localparam addr_t HT     = 32'h0004_3000;
  int exp_ab = 0;

  always @(negedge clk) begin
    #1;
    if (rst_n && res_valid) begin
      n_res[res.acc]++;
      check(res.vault == 4'(V), "vault stamp");
      case (res.acc)
        ACC_COPY: check(res.r0 == 4096, "copy size");
        ACC_SORT: check(res.r0 == 64'(SO_TMP), "sort result address");
        ACC_STR:  check(res.r0 == 64'(exp_ab), $sformatf("matches %0d expected %0d", res.r0, exp_ab));
        default:  check(res.ok == hval.exists(res.r0) && (!res.ok || res.r1 == hval[res.r0]), "lookup");
      endcase
    end
  end

  initial begin
    logic [63:0] sorted[$];
    cmd_t c;
    cmd_valid = 0; cmd = '0; res_ready = 1;
    foreach (n_res[i]) n_res[i] = 0;
    // copy source
    for (int i = 0; i < 64; i++) begin
      block_t b;
      for (int w = 0; w < 16; w++) b[32*w +: 32] = $urandom;
      tb_mem_pkg::wr_block(CP_SRC + 64 * i, b);
    end
    // 512 keys to sort
    for (int i = 0; i < 512; i++) begin
      logic [63:0] k;
      k = {$urandom, $urandom};
      keys.push_back(k);
      tb_mem_pkg::wr64(SO_ARR + 8 * i, k);
    end
    sorted = keys; sorted.sort();
    // text for "ab"
    for (int i = 0; i < 256; i++) begin
      logic [7:0] ch;
      ch = 8'("abc" >> (8 * ($urandom % 3)));
      tb_mem_pkg::wr8(TX + i, ch);
      if (i > 0 && ch == "b" && tb_mem_pkg::rd8(TX + i - 1) == "a") exp_ab++;
    end
    // hash: bucket 0 of a one-bucket table at HT; a chain of 4 nodes in vaults 8..11
    tb_mem_pkg::wr64(HT, 64'h0000_8000);
    for (int n = 0; n < 4; n++) begin
      addr_t a;
      a = 32'h0000_8000 + 32'h1000 * n;
      tb_mem_pkg::wr64(a, 64'(100 + n));
      tb_mem_pkg::wr64(a + 8, 64'(1000 + n));
      tb_mem_pkg::wr64(a + 16, (n == 3) ? 64'd0 : 64'(a + 32'h1000));
      hval[64'(100 + n)] = 64'(1000 + n);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // string table: root, "a", "ab"
    for (int s = 0; s < 3; s++) begin
      c = '0; c.op = OP_SM_MATCH; c.a0 = 64'(s); c.a1 = (s == 2) ? 64'd1 : 64'd0;
      send(c);
      for (int g = 0; g < 256; g += 8) begin
        c = '0; c.op = OP_SM_ROW; c.a0 = 64'(s); c.a1 = 64'(g);
        for (int k = 0; k < 8; k++) c.a2[8*k +: 8] = (g + k == "a") ? 8'd1 : (g + k == "b" && s == 1) ? 8'd2 : 8'd0;
        send(c);
      end
    end
    c = '0; c.op = OP_MEMCPY;   c.a0 = 64'(CP_SRC); c.a1 = 64'(CP_DST); c.a2 = 4096; send(c);
    c = '0; c.op = OP_SORT;     c.a0 = 64'(SO_ARR); c.a1 = 64'(SO_TMP); c.a2 = 512;  send(c);
    c = '0; c.op = OP_STRMATCH; c.a0 = 64'(TX);     c.a1 = 256;                     send(c);
    for (int k = 99; k <= 104; k++) begin
      c = '0; c.op = OP_HASH; c.a0 = 64'(k); c.a1 = 64'(HT); send(c);
    end
    while (n_res[ACC_SORT] == 0 || n_res[ACC_COPY] == 0 || n_res[ACC_STR] == 0 || n_res[ACC_HASH] < 6)
      @(posedge clk);
    for (int i = 0; i < 64; i++)
      check(tb_mem_pkg::rd_block(CP_DST + 64 * i) == tb_mem_pkg::rd_block(CP_SRC + 64 * i), "copied block");
    for (int i = 0; i < 512; i++) check(tb_mem_pkg::rd64(SO_TMP + 8 * i) == sorted[i], "sorted key");
    check(n_loc > 100 && n_xb > 64, $sformatf("local %0d, crossbar %0d requests", n_loc, n_xb));
    check(tb_mem_pkg::n_wrong_vault == 0, "foreign address on the local path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
