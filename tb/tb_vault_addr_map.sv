// tb_vault_addr_map: checks the vault decoder under both mapping schemes.
//
// Scheme A must spread consecutive 64-byte blocks over consecutive vaults
// and Scheme B must keep a whole 4 KB page in one vault with consecutive
// pages in consecutive vaults. The expected vault is computed by division and
// modulo on the address, not by bit slicing, and local_hit is checked
// against the instance's own vault number.
module tb_vault_addr_map;
  import nmp_pkg::*;
  int checks = 0, failures = 0;
  addr_t addr; logic scheme_b; logic [3:0] vault; logic local_hit;

  vault_addr_map #(.MY_VAULT(5)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int unsigned a, exp_v;
      a = (i < 1000) ? $urandom : i * 16;
      for (int s = 0; s < 2; s++) begin
        addr = a; scheme_b = s[0];
        #1;
        exp_v = s ? (a / 4096) % 16 : (a / 64) % 16;
        check(vault == 4'(exp_v), $sformatf("addr %h scheme %0d vault %0d expected %0d", a, s, vault, exp_v));
        check(local_hit == (exp_v == 5), "local_hit");
      end
    end
    // the two arrays of the mapping example: 16-byte cells, Scheme B keeps
    // the first array in one vault, Scheme A spreads it
    addr = 32'h0; scheme_b = 1; #1; check(vault == 0, "B: 0x0");
    addr = 32'h50; #1; check(vault == 0, "B: 0x50 same vault as 0x0");
    addr = 32'h1000; #1; check(vault == 1, "B: next page next vault");
    addr = 32'h40; scheme_b = 0; #1; check(vault == 1, "A: 0x40 next vault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
