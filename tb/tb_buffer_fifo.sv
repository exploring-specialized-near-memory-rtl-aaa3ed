// tb_buffer_fifo: random push/pop test of the tile buffer FIFO.
//
// Pushes a counting sequence with random valid and pops with random ready,
// checking order, that ready drops exactly when DEPTH words are held, and
// that nothing is lost or duplicated.
module tb_buffer_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  int n_in = 0, n_out = 0, held = 0, full_seen = 0;

  buffer_fifo #(.T(logic [15:0]), .DEPTH(4)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    in_valid  = ($urandom % 3) != 0;
    in_data   = 16'(n_in);
    out_ready = ($urandom % 3) == 0 || n_in > 2000;
    #1;
    check(in_ready == (held < 4), $sformatf("in_ready=%b with %0d held", in_ready, held));
    check(out_valid == (held > 0), "out_valid");
    if (out_valid) check(out_data == 16'(n_out), $sformatf("got %0d expected %0d", out_data, n_out));
    if (held == 4) full_seen++;
  end
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin n_in++; held++; end
    if (out_valid && out_ready) begin n_out++; held--; end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    check(full_seen > 0, "buffer was filled");
    check(n_out > 600, "traffic passed");
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
