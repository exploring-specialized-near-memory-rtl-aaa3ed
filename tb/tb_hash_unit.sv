// tb_hash_unit: checks bucket addresses against a 128-bit reference product
// (top log2_buckets bits of the low 64 bits of key * 0x9E3779B97F4A7C15),
// for table sizes of 1 to 2^21 buckets, and that the addresses stay inside
// the bucket array.
module tb_hash_unit;
  import nmp_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] key; addr_t table_base, bucket_addr; logic [5:0] log2_buckets; logic [31:0] index;

  hash_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [127:0] p;
      int unsigned lb;
      longint unsigned exp_idx;
      key = {$urandom, $urandom};
      lb = (i < 100) ? 0 : 1 + $urandom % 21;
      log2_buckets = 6'(lb);
      table_base = 32'h0100_0000;
      #1;
      p = 128'(key) * 128'(64'h9E3779B97F4A7C15);
      exp_idx = (lb == 0) ? 0 : (p[63:0] >> (64 - lb));
      check(64'(index) == exp_idx, $sformatf("key %h lb %0d index %0d expected %0d", key, lb, index, exp_idx));
      check(bucket_addr == table_base + 32'(exp_idx * 8), "bucket address");
      check(bucket_addr < table_base + (32'd8 << lb), "inside the table");
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
