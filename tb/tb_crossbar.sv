// tb_crossbar: random traffic through a 5-source, 3-output crossbar.
//
// Every source sends numbered packets to random outputs, holding each until
// it is accepted; outputs accept with random ready. Checks that each packet
// arrives at the output it asked for, in its source's order, that every
// accepted packet is the one delivered in that cycle, and that every source
// gets a fair share (round robin: no source starves).
module tb_crossbar;
  localparam int NS = 5, ND = 3;
  typedef logic [15:0] pkt_t;   // {src[3:0], dst[1:0], seq[9:0]}
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NS-1:0] src_valid, src_ready;
  logic [NS-1:0][1:0] src_dst;
  pkt_t [NS-1:0] src_data;
  logic [ND-1:0] dst_valid, dst_ready;
  pkt_t [ND-1:0] dst_data;
  int sent[NS], recv_seq[NS][ND], recv_cnt[NS];
  bit taken[NS];

  crossbar #(.T(pkt_t), .N_SRC(NS), .N_DST(ND)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < NS; s++)
      if (!src_valid[s] || taken[s]) begin
        // previous packet accepted (or none): make a new one
        if (taken[s]) sent[s]++;
        taken[s] = 0;
        src_valid[s] = ($urandom % 5) != 0;
        src_dst[s]   = 2'($urandom % ND);
        src_data[s]  = {4'(s), src_dst[s], 10'(sent[s])};
      end
    for (int d = 0; d < ND; d++) dst_ready[d] = ($urandom % 4) != 0;
    #1;
  end

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < ND; d++)
      if (dst_valid[d] && dst_ready[d]) begin
        int s, q;
        s = dst_data[d][15:12];
        q = dst_data[d][9:0];
        check(dst_data[d][11:10] == 2'(d), "packet at the wrong output");
        check(q >= recv_seq[s][d], $sformatf("src %0d out of order", s));
        recv_seq[s][d] = q + 1;
        recv_cnt[s]++;
      end
    for (int s = 0; s < NS; s++)
      if (src_valid[s] && src_ready[s]) begin
        taken[s] = 1;
        check(dst_valid[src_dst[s]] && dst_ready[src_dst[s]] && dst_data[src_dst[s]] == src_data[s],
              "accepted packet not delivered");
      end
  end

  initial begin
    src_valid = '0; src_dst = '0; src_data = '0; dst_ready = '0;
    foreach (sent[s]) begin sent[s] = 0; taken[s] = 0; recv_cnt[s] = 0; foreach (recv_seq[s][d]) recv_seq[s][d] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    for (int s = 0; s < NS; s++)
      check(recv_cnt[s] > 300, $sformatf("source %0d got %0d packets through", s, recv_cnt[s]));
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
