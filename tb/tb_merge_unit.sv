// tb_merge_unit: merges random ascending runs of random lengths (including
// empty ones) through the merge unit with random stalls on both inputs and
// the output, and compares the merged stream with a reference sort.
module tb_merge_unit;
  int checks = 0, failures = 0;
  logic a_valid, a_done, a_ready, b_valid, b_done, b_ready, out_valid, out_ready, all_done;
  logic [63:0] a_data, b_data, out_data;

  merge_unit #(.W(64)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic [63:0] qa[$], qb[$], qr[$], got[$];
      int na, nb, steps;
      qa.delete(); qb.delete(); got.delete();
      na = $urandom % 20; nb = (t % 10 == 0) ? 0 : $urandom % 20;
      for (int i = 0; i < na; i++) qa.push_back(64'($urandom % 50));
      for (int i = 0; i < nb; i++) qb.push_back(64'($urandom % 50));
      qa.sort(); qb.sort();
      qr = {qa, qb}; qr.sort();
      steps = 0;
      while (steps < 1000) begin
        a_valid = qa.size() != 0 && ($urandom % 4 != 0);
        a_done  = qa.size() == 0;
        a_data  = a_valid ? qa[0] : 64'hFFFF;
        b_valid = qb.size() != 0 && ($urandom % 4 != 0);
        b_done  = qb.size() == 0;
        b_data  = b_valid ? qb[0] : 64'hFFFF;
        out_ready = ($urandom % 4 != 0);
        #1;
        if (all_done) break;
        if (out_valid && out_ready) got.push_back(out_data);
        check(!(a_ready && b_ready), "one input per cycle");
        if (a_ready) void'(qa.pop_front());
        if (b_ready) void'(qb.pop_front());
        steps++;
      end
      check(got.size() == qr.size(), $sformatf("test %0d: %0d keys out, %0d expected", t, got.size(), qr.size()));
      foreach (qr[i]) if (i < got.size()) check(got[i] == qr[i], $sformatf("test %0d key %0d", t, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
