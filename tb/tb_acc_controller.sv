// tb_acc_controller: command scheduling and result return of an accelerator
// controller.
//
// Sends random commands of every opcode under both mapping schemes with
// random back-pressure on the tile side and checks, per command, the vault
// it is sent to (vault of a0 for data commands, vault of the hashed bucket
// for lookups, the named vault for table writes), the bucket address written
// into a lookup (computed here from a 128-bit reference product), that the
// controller number is stamped in, and that results pass back in order.
module tb_acc_controller;
  import nmp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic scheme_b;
  logic host_cmd_valid, host_cmd_ready, host_res_valid, host_res_ready;
  logic out_cmd_valid, out_cmd_ready, in_res_valid, in_res_ready;
  cmd_t host_cmd, out_cmd; result_t host_res, in_res;
  logic [VAULT_W-1:0] out_cmd_dst;
  cmd_t exp_q[$]; logic [3:0] expv_q[$];
  result_t res_q[$];
  int n_cmd = 0, n_res = 0, n_out = 0, n_back = 0;
  bit cmd_taken = 0, res_taken = 0;

  acc_controller #(.ID(1)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void expect_cmd(cmd_t c);
    cmd_t e;
    logic [127:0] p;
    logic [3:0] v;
    e = c; e.ctrl = 1'b1;
    case (c.op)
      OP_HASH: begin
        p = 128'(c.a0) * 128'(64'h9E3779B97F4A7C15);
        e.a1 = 64'(32'(c.a1) + 32'(c.a2[5:0] == 0 ? 0 : (p[63:0] >> (64 - c.a2[5:0]))) * 8);
        v = scheme_b ? e.a1[15:12] : e.a1[9:6];
      end
      OP_SM_ROW, OP_SM_MATCH: v = c.vault;
      default: v = scheme_b ? c.a0[15:12] : c.a0[9:6];
    endcase
    e.vault = v;
    exp_q.push_back(e); expv_q.push_back(v);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (host_cmd_valid && host_cmd_ready) begin cmd_taken = 1; n_cmd++; expect_cmd(host_cmd); end
    if (out_cmd_valid && out_cmd_ready) begin
      cmd_t e; logic [3:0] v;
      e = exp_q.pop_front(); v = expv_q.pop_front();
      n_out++;
      check(out_cmd == e, $sformatf("command %0d (op %0d) differs", n_out, out_cmd.op));
      check(out_cmd_dst == v, $sformatf("command %0d to vault %0d expected %0d", n_out, out_cmd_dst, v));
    end
    if (in_res_valid && in_res_ready) begin res_taken = 1; n_res++; res_q.push_back(in_res); end
    if (host_res_valid && host_res_ready) begin
      n_back++;
      check(host_res == res_q.pop_front(), "result order");
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (!host_cmd_valid || cmd_taken) begin
      cmd_t c;
      c = '0;
      c.op = op_e'($urandom % 6);
      c.vault = 4'($urandom);
      c.a0 = {$urandom, $urandom}; c.a1 = 64'($urandom); c.a2 = 64'($urandom % 22); c.a3 = 64'($urandom);
      host_cmd = c;
      host_cmd_valid = (n_cmd < 500) && ($urandom % 4 != 0);
      cmd_taken = 0;
    end
    if (!in_res_valid || res_taken) begin
      in_res = result_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      in_res_valid = (n_res < 200) && ($urandom % 3 == 0);
      res_taken = 0;
    end
    out_cmd_ready  = ($urandom % 3 != 0);
    host_res_ready = ($urandom % 3 != 0);
    if (n_cmd == 250) scheme_b = 1'b0;
  end

  initial begin
    scheme_b = 1; host_cmd_valid = 0; host_cmd = '0; in_res_valid = 0; in_res = '0;
    out_cmd_ready = 1; host_res_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    check(n_out == 500 && n_back == 200, $sformatf("%0d commands out, %0d results back", n_out, n_back));
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
