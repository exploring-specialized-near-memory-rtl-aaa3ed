// tb_bitonic_sorter: streams random 64-key sets into the sorting network,
// one per cycle with occasional gaps, and checks that each set leaves
// exactly 21 cycles later (log2(64)*(log2(64)+1)/2 stages), in order, sorted
// ascending, and as a permutation of what went in (compared with a
// reference sort of the same keys).
module tb_bitonic_sorter;
  localparam int N = 64, W = 64, LAT = 21;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, n_sent = 0, n_got = 0;
  logic in_valid, out_valid;
  logic [N-1:0][W-1:0] in_keys, out_keys;
  logic [N-1:0][W-1:0] exp_q[$];
  int t_q[$];

  bitonic_sorter #(.N(N), .W(W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      logic [N-1:0][W-1:0] e;
      int t;
      n_got++;
      e = exp_q.pop_front();
      t = t_q.pop_front();
      check(cyc - t == LAT, $sformatf("latency %0d", cyc - t));
      for (int i = 0; i < N; i++) check(out_keys[i] == e[i], $sformatf("set %0d key %0d", n_got, i));
    end
  end

  initial begin
    in_valid = 0; in_keys = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      logic [W-1:0] q[$];
      logic [N-1:0][W-1:0] e;
      @(negedge clk);
      q.delete();
      for (int i = 0; i < N; i++) begin
        logic [W-1:0] k;
        k = (s % 4 == 0) ? W'($urandom % 8) : {$urandom, $urandom};
        if (s == 1) k = W'(N - i);                  // reversed input
        in_keys[i] = k;
        q.push_back(k);
      end
      q.sort();
      foreach (q[i]) e[i] = q[i];
      in_valid = (s % 7 != 6);
      if (in_valid) begin exp_q.push_back(e); t_q.push_back(cyc); n_sent++; end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    check(n_got == n_sent && n_sent > 40, $sformatf("%0d sets out of %0d", n_got, n_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
