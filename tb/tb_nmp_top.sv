// tb_nmp_top: end-to-end test of the whole logic layer at its default size
// (16 vaults, 4 SerDes link ports, 2 accelerator controllers, 64-key sorting
// networks), with a behavioural DRAM model on each vault port.
//
// Page-per-vault mapping (Scheme B) first:
//   - the host writes a 4 KB page through the four links and reads it back;
//   - controller 0 copies that page from vault 2 to vault 9 (remote writes);
//   - controller 1 sorts 1024 keys held in vault 5;
//   - controller 0 searches 1 KB of text in vault 7 for three patterns;
//   - controller 1 looks up 40 keys in a hash table whose nodes are spread
//     over all vaults (lookups run in whichever vault holds the bucket).
// Then the mapping mode switches to the interleaved Scheme A and an 8 KB copy
// runs, spread over all vaults. Copies are read back through the links.
// The DRAM model stores data by address, so switching the mapping does not
// move data; each vault model checks that it only sees addresses that map to
// it under the current scheme.
// Counted mechanisms (each must occur): local-path requests, crossbar
// requests from tiles, link traffic, crossbar contention (a request waiting
// for its output), DRAM back-pressure, out-of-order replies at a tile,
// results on both controllers, both mapping schemes, all four accelerators.
module tb_nmp_top;
  import nmp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic scheme_b;
  logic     [N_CTRL-1:0] host_cmd_valid, host_cmd_ready, host_res_valid, host_res_ready;
  cmd_t     [N_CTRL-1:0] host_cmd;
  result_t  [N_CTRL-1:0] host_res;
  logic     [N_LINKS-1:0] link_req_valid, link_req_ready, link_rsp_valid, link_rsp_ready;
  mem_req_t [N_LINKS-1:0] link_req;
  mem_rsp_t [N_LINKS-1:0] link_rsp;
  logic     [N_VAULTS-1:0] dram_req_valid, dram_req_ready, dram_rsp_valid, dram_rsp_ready;
  mem_req_t [N_VAULTS-1:0] dram_req;
  mem_rsp_t [N_VAULTS-1:0] dram_rsp;

  nmp_top dut (.*);

  for (genvar v = 0; v < N_VAULTS; v++) begin : g_dram
    mem_port_model #(.VAULT(v), .LATENCY(8), .QDEPTH(16), .SHUFFLE(1), .STALL(10)) u_dram (
      .clk, .rst_n, .scheme_b,
      .req_valid(dram_req_valid[v]), .req_ready(dram_req_ready[v]), .req(dram_req[v]),
      .rsp_valid(dram_rsp_valid[v]), .rsp_ready(dram_rsp_ready[v]), .rsp(dram_rsp[v])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters
  int n_local, n_remote, n_link, n_contention, n_backpressure, n_ooo, n_res_ctrl[2], n_acc[4];
  int n_scheme[2];
  addr_t last_copy_rsp[N_VAULTS];
  always @(posedge clk) if (rst_n) begin
    for (int v = 0; v < N_VAULTS; v++) begin
      if (dram_req_valid[v] && dram_req_ready[v] && dram_req[v].src == SRC_W'(v)) n_local++;
      if (dut.rq_src_valid[v] && dut.rq_src_ready[v]) n_remote++;
      if (dut.rq_src_valid[v] && !dut.rq_src_ready[v]) n_contention++;
      if (dram_req_valid[v] && !dram_req_ready[v]) n_backpressure++;
    end
    for (int l = 0; l < N_LINKS; l++) if (link_req_valid[l] && link_req_ready[l]) n_link++;
    if (dut.g_vault[2].u_tile.u_copy.rsp_valid && !dut.g_vault[2].u_tile.u_copy.rsp.we) begin
      if (dut.g_vault[2].u_tile.u_copy.rsp.addr < last_copy_rsp[2]) n_ooo++;
      last_copy_rsp[2] = dut.g_vault[2].u_tile.u_copy.rsp.addr;
    end
    n_scheme[scheme_b]++;
  end

  // ---------------- host command / result ports
  result_t res_q[2][4][$];   // per controller and accelerator
  always @(negedge clk) begin
    #1;
    for (int c = 0; c < 2; c++)
      if (rst_n && host_res_valid[c] && host_res_ready[c]) begin
        res_q[c][host_res[c].acc].push_back(host_res[c]);
        n_res_ctrl[c]++;
        n_acc[host_res[c].acc]++;
      end
  end

  // several threads share a controller: send_busy serialises them
  bit send_busy[2];
  task automatic send(int c, cmd_t cm);
    @(negedge clk);
    while (send_busy[c]) @(negedge clk);
    send_busy[c] = 1;
    host_cmd[c] = cm; host_cmd_valid[c] = 1;
    #1;
    while (!host_cmd_ready[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    host_cmd_valid[c] = 0;
    send_busy[c] = 0;
  endtask

  task automatic wait_result(int c, acc_id_e a, output result_t r);
    while (res_q[c][a].size() == 0) @(posedge clk);
    r = res_q[c][a].pop_front();
  endtask

  // ---------------- link traffic: one request per link at a time
  task automatic link_access(int l, logic we, addr_t a, block_t d, output block_t q);
    @(negedge clk);
    link_req[l] = '0;
    link_req[l].we = we; link_req[l].addr = a; link_req[l].wdata = d; link_req[l].tag = 8'(l);
    link_req_valid[l] = 1;
    #1;
    while (!link_req_ready[l]) begin @(negedge clk); #1; end
    @(negedge clk);
    link_req_valid[l] = 0;
    #1;
    while (!link_rsp_valid[l]) begin @(negedge clk); #1; end
    check(link_rsp[l].addr == a && link_rsp[l].we == we,
          $sformatf("link %0d reply addr %h we %0d, expected %h %0d", l, link_rsp[l].addr, link_rsp[l].we, a, we));
    q = link_rsp[l].rdata;
  endtask

  task automatic link_write_page(addr_t base, int blocks, int seed);
    int left;
    left = N_LINKS;
    for (int l = 0; l < N_LINKS; l++) begin
      automatic int ll = l;
      fork
        begin
          for (int b = ll; b < blocks; b += N_LINKS) begin
            block_t d, q;
            for (int w = 0; w < 16; w++) d[32*w +: 32] = 32'(seed * 7919 + b * 131 + w);
            link_access(ll, 1'b1, base + 64 * b, d, q);
          end
          left--;
        end
      join_none
    end
    while (left > 0) @(posedge clk);
  endtask

  task automatic link_check_copy(addr_t src, addr_t dst, int blocks);
    int left;
    left = N_LINKS;
    for (int l = 0; l < N_LINKS; l++) begin
      automatic int ll = l;
      fork
        begin
          for (int b = ll; b < blocks; b += N_LINKS) begin
            block_t q;
            link_access(ll, 1'b0, dst + 64 * b, '0, q);
            check(q == tb_mem_pkg::rd_block(src + 64 * b), $sformatf("copy block %0d read via link", b));
          end
          left--;
        end
      join_none
    end
    while (left > 0) @(posedge clk);
  endtask

  // ---------------- workloads
  localparam addr_t CP_SRC = 32'h0000_2000, CP_DST = 32'h0003_9000;
  localparam addr_t SO_ARR = 32'h0001_5000, SO_TMP = 32'h0002_5000;  // 1024 keys = 2 pages
  localparam addr_t TX     = 32'h0004_7000;
  localparam addr_t HT     = 32'h0005_0000;
  localparam int    HLOG2  = 6;
  logic [63:0] hval[logic [63:0]];
  logic [63:0] hkeys[$];

  task automatic run_sort();
    logic [63:0] ref_q[$];
    cmd_t c; result_t r;
    // keys in two pages of vault 5: 0x15000 and 0x35000 would not be
    // contiguous, so the array spans 0x15000..0x16fff (vaults 5 and 6)
    for (int i = 0; i < 1024; i++) begin
      logic [63:0] k;
      k = {$urandom, $urandom};
      ref_q.push_back(k);
      tb_mem_pkg::wr64(SO_ARR + 8 * i, k);
    end
    ref_q.sort();
    c = '0; c.op = OP_SORT; c.a0 = 64'(SO_ARR); c.a1 = 64'(SO_TMP); c.a2 = 1024;
    send(1, c);
    wait_result(1, ACC_SORT, r);
    check(r.acc == ACC_SORT && r.vault == 4'd5, "sort ran in vault 5");
    for (int i = 0; i < 1024; i++) check(tb_mem_pkg::rd64(addr_t'(r.r0) + 8 * i) == ref_q[i], "sorted key");
  endtask

  task automatic run_strmatch();
    string pats[3] = '{"data", "at", "near"};
    string alpha = "dantre ";
    string pref[$]; int pid[string];
    int exp_cnt; cmd_t c; result_t r;
    exp_cnt = 0;
    pref.push_back(""); pid[""] = 0;
    foreach (pats[p]) for (int l = 1; l <= pats[p].len(); l++) begin
      string x;
      x = pats[p].substr(0, l - 1);
      if (!pid.exists(x)) begin pid[x] = pref.size(); pref.push_back(x); end
    end
    foreach (pref[s]) begin
      logic [15:0] mv;
      mv = '0;
      foreach (pats[p]) if (pref[s].len() >= pats[p].len() &&
          pref[s].substr(pref[s].len() - pats[p].len(), pref[s].len() - 1) == pats[p]) mv[p] = 1;
      c = '0; c.op = OP_SM_MATCH; c.vault = 4'd7; c.a0 = 64'(s); c.a1 = 64'(mv);
      send(0, c);
      for (int g = 0; g < 256; g += 8) begin
        c = '0; c.op = OP_SM_ROW; c.vault = 4'd7; c.a0 = 64'(s); c.a1 = 64'(g);
        for (int k = 0; k < 8; k++) begin
          string t; int ns;
          t = {pref[s], string'(byte'(g + k))};
          ns = 0;
          for (int l = t.len(); l > 0; l--) if (ns == 0 && pid.exists(t.substr(t.len() - l, t.len() - 1)))
            ns = pid[t.substr(t.len() - l, t.len() - 1)];
          c.a2[8*k +: 8] = 8'(ns);
        end
        send(0, c);
      end
    end
    for (int i = 0; i < 1024; i++) begin
      tb_mem_pkg::wr8(TX + i, alpha[$urandom % alpha.len()]);
      foreach (pats[p]) begin
        bit m; int pl;
        pl = pats[p].len();
        m = (i + 1 >= pl);
        for (int k = 0; k < pl && m; k++) if (tb_mem_pkg::rd8(TX + i - pl + 1 + k) != pats[p][k]) m = 0;
        if (m) exp_cnt++;
      end
    end
    c = '0; c.op = OP_STRMATCH; c.a0 = 64'(TX); c.a1 = 1024;
    send(0, c);
    wait_result(0, ACC_STR, r);
    check(r.acc == ACC_STR && r.vault == 4'd7, "string search ran in vault 7");
    check(r.r0 == 64'(exp_cnt), $sformatf("string matches %0d expected %0d", r.r0, exp_cnt));
  endtask

  task automatic run_hash();
    cmd_t c; result_t r;
    int nfound;
    for (int b = 0; b < (1 << HLOG2); b++) tb_mem_pkg::wr64(HT + 8 * b, 64'd0);
    for (int n = 0; n < 200; n++) begin
      logic [63:0] k; logic [127:0] p; addr_t b, node;
      k = {$urandom, $urandom};
      p = 128'(k) * 128'(64'h9E3779B97F4A7C15);
      b = HT + 32'(p[63:64-HLOG2]) * 8;
      node = 32'h0060_0000 + 32'h1_0000 * n + 32'h1000 * ($urandom % 16) + 32'h40 * (n % 64); // unique, any vault
      tb_mem_pkg::wr64(node, k);
      tb_mem_pkg::wr64(node + 8, ~k);
      tb_mem_pkg::wr64(node + 16, tb_mem_pkg::rd64(b));
      tb_mem_pkg::wr64(b, 64'(node));
      hval[k] = ~k;
      hkeys.push_back(k);
    end
    for (int i = 0; i < 40; i++) begin
      c = '0; c.op = OP_HASH; c.a2 = HLOG2; c.a1 = 64'(HT);
      c.a0 = (i % 4 == 3) ? {$urandom, $urandom} : hkeys[$urandom % hkeys.size()];
      send(1, c);
    end
    nfound = 0;
    for (int i = 0; i < 40; i++) begin
      wait_result(1, ACC_HASH, r);
      check(r.acc == ACC_HASH, "lookup result");
      check(r.ok == hval.exists(r.r0) && (!r.ok || r.r1 == hval[r.r0]), "lookup value");
      check(r.vault == 4'(HT[15:12]), "lookup ran in the bucket's vault");
      nfound += r.ok;
    end
    check(nfound >= 20, $sformatf("lookups found %0d keys", nfound));
  endtask

  task automatic run_copy(int c, addr_t src, addr_t dst, int bytes, logic [3:0] exp_vault);
    cmd_t cm; result_t r;
    cm = '0; cm.op = OP_MEMCPY; cm.a0 = 64'(src); cm.a1 = 64'(dst); cm.a2 = 64'(bytes);
    send(c, cm);
    wait_result(c, ACC_COPY, r);
    check(r.acc == ACC_COPY && r.r0 == 64'(bytes) && r.vault == exp_vault, "copy result");
  endtask

  initial begin
    block_t q;
    scheme_b = 1'b1;
    host_cmd_valid = '0; host_cmd = '0; host_res_ready = '1;
    link_req_valid = '0; link_req = '0; link_rsp_ready = '1;
    n_local = 0; n_remote = 0; n_link = 0; n_contention = 0; n_backpressure = 0; n_ooo = 0;
    n_res_ctrl = '{0, 0}; n_acc = '{0, 0, 0, 0}; n_scheme = '{0, 0};
    foreach (last_copy_rsp[v]) last_copy_rsp[v] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // host fills the copy source through the links, checks one block back
    link_write_page(CP_SRC, 64, 1);
    link_access(0, 1'b0, CP_SRC + 64 * 5, '0, q);
    check(q == tb_mem_pkg::rd_block(CP_SRC + 64 * 5), "link read-back");

    fork
      begin run_copy(0, CP_SRC, CP_DST, 4096, 4'd2); run_strmatch(); end
      run_sort();
      run_hash();
    join
    link_check_copy(CP_SRC, CP_DST, 64);

    // switch to the vault-interleaved mapping and copy 8 KB
    repeat (5) @(posedge clk);
    @(negedge clk) scheme_b = 1'b0;
    link_write_page(32'h0008_0000, 128, 2);
    run_copy(1, 32'h0008_0000, 32'h0009_0000, 8192, 4'd0);
    link_check_copy(32'h0008_0000, 32'h0009_0000, 128);

    check(tb_mem_pkg::n_wrong_vault == 0, $sformatf("%0d requests reached a vault not owning their address", tb_mem_pkg::n_wrong_vault));
    $display("local %0d, tile crossbar %0d, link %0d, contention %0d, DRAM back-pressure %0d, out-of-order %0d",
             n_local, n_remote, n_link, n_contention, n_backpressure, n_ooo);
    $display("results ctrl0 %0d ctrl1 %0d; sort %0d str %0d hash %0d copy %0d; cycles scheme A %0d B %0d",
             n_res_ctrl[0], n_res_ctrl[1], n_acc[0], n_acc[1], n_acc[2], n_acc[3], n_scheme[0], n_scheme[1]);
    check(n_local > 0, "local path used");
    check(n_remote > 0, "tile crossbar path used");
    check(n_link > 0, "link path used");
    check(n_contention > 0, "crossbar contention");
    check(n_backpressure > 0, "DRAM back-pressure");
    check(n_ooo > 0, "out-of-order replies");
    check(n_res_ctrl[0] > 0 && n_res_ctrl[1] > 0, "both controllers");
    check(n_scheme[0] > 0 && n_scheme[1] > 0, "both mapping schemes");
    foreach (n_acc[a]) check(n_acc[a] > 0, $sformatf("accelerator %0d used", a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // progress report
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc % 2000 == 0)
      $display("cycle %0d: results %0d/%0d, local %0d, crossbar %0d, link %0d", cyc,
               n_res_ctrl[0], n_res_ctrl[1], n_local, n_remote, n_link);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
