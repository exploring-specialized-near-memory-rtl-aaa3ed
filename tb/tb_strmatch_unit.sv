// tb_strmatch_unit: self-checking test of the string matching accelerator.
//
// The testbench compiles a small set of overlapping patterns into an
// Aho-Corasick automaton itself (states are the distinct pattern prefixes;
// the next state is the longest suffix of prefix+character that is again a
// prefix; a state matches every pattern that is a suffix of its prefix),
// loads it with table-write commands, and searches random texts over a small
// alphabet. The match count and last match position are compared with a
// brute-force scan of the text. The search time is checked against the rate
// of one character per cycle (64 cycles per 64-byte block).
module tb_strmatch_unit;
  import nmp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, req_valid, req_ready, rsp_valid, res_valid, res_ready;
  cmd_t cmd; mem_req_t req; mem_rsp_t rsp; result_t res;
  int checks = 0, failures = 0;

  strmatch_unit dut (.*);
  mem_port_model #(.LATENCY(6)) u_mem (
    .clk, .rst_n, .scheme_b(1'b1), .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready(1'b1), .rsp
  );

  string pats[$] = '{"he", "she", "his", "hers", "abab", "b", "xyzzy", "aaa", "ab"};
  string pref[$];
  int    pref_id[string];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
  endtask

  function automatic int next_state(int s, byte c);
    string t;
    t = {pref[s], string'(c)};
    for (int l = t.len(); l > 0; l--) begin
      string sfx = t.substr(t.len() - l, t.len() - 1);
      if (pref_id.exists(sfx)) return pref_id[sfx];
    end
    return 0;
  endfunction

  task automatic build_and_load();
    pref.push_back(""); pref_id[""] = 0;
    foreach (pats[p])
      for (int l = 1; l <= pats[p].len(); l++) begin
        string x = pats[p].substr(0, l - 1);
        if (!pref_id.exists(x)) begin pref_id[x] = pref.size(); pref.push_back(x); end
      end
    foreach (pref[s]) begin
      cmd_t c;
      logic [15:0] mv = '0;
      foreach (pats[p])
        if (pref[s].len() >= pats[p].len() &&
            pref[s].substr(pref[s].len() - pats[p].len(), pref[s].len() - 1) == pats[p]) mv[p] = 1'b1;
      c = '0; c.op = OP_SM_MATCH; c.a0 = 64'(s); c.a1 = 64'(mv);
      send(c);
      for (int g = 0; g < 256; g += 8) begin
        c = '0; c.op = OP_SM_ROW; c.a0 = 64'(s); c.a1 = 64'(g);
        for (int k = 0; k < 8; k++) c.a2[8*k +: 8] = 8'(next_state(s, byte'(g + k)));
        send(c);
      end
    end
  endtask

  task automatic search(addr_t base, int len);
    string alpha = "abehisrxyz";
    byte   text[];
    int    exp_cnt = 0, exp_last = 0, t0, t1, cyc;
    text = new[len];
    for (int i = 0; i < len; i++) begin
      text[i] = (i % 97 == 50) ? byte'($urandom) : alpha[$urandom % alpha.len()];
      tb_mem_pkg::wr8(base + i, text[i]);
    end
    for (int i = 0; i < len; i++)
      foreach (pats[p]) begin
        int pl = pats[p].len();
        bit m = (i + 1 >= pl);
        for (int k = 0; k < pl && m; k++) if (text[i - pl + 1 + k] != pats[p][k]) m = 0;
        if (m) begin exp_cnt++; exp_last = i; end
      end
    begin
      cmd_t c;
      c = '0; c.op = OP_STRMATCH; c.a0 = 64'(base); c.a1 = 64'(len);
      t0 = cyc_count;
      send(c);
    end
    #1;
    while (!res_valid) begin @(negedge clk); #1; end
    t1 = cyc_count;
    cyc = t1 - t0;
    check(res.r0 == 64'(exp_cnt), $sformatf("len=%0d count %0d expected %0d", len, res.r0, exp_cnt));
    check(res.r1 == 64'(exp_last), $sformatf("len=%0d last %0d expected %0d", len, res.r1, exp_last));
    check(res.ok == (exp_cnt != 0) && res.acc == ACC_STR, "ok flag");
    // one character per cycle plus a fixed start-up and drain time
    check(cyc >= len && cyc <= len + 30, $sformatf("len=%0d took %0d cycles", len, cyc));
    $display("search of %0d bytes: %0d matches, %0d cycles", len, exp_cnt, cyc);
    @(negedge clk);
  endtask

  int cyc_count = 0;
  always @(posedge clk) cyc_count++;

  initial begin
    cmd_valid = 0; cmd = '0; res_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_and_load();
    search(32'h0000_4000, 256);
    search(32'h0001_0000, 1024);
    search(32'h0002_0000, 64);
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
