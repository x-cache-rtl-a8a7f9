// tb_xc_fifo: random push/pop against a queue model; checks order, count,
// full/empty flags and that data appears one cycle after the push.
module tb_xc_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0, cycle = 0;
  byte unsigned q [$];
  xc_fifo #(.T(logic [7:0]), .DEPTH(4)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (++cycle > 20000) begin
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(!out_valid && in_ready && count == 0, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      in_valid = $urandom_range(1); in_data = 8'($urandom); out_ready = $urandom_range(1);
      #1;
      check(count == q.size(), "count");
      check(out_valid == (q.size() != 0), "out_valid");
      check(in_ready == (q.size() != 4), "in_ready");
      if (out_valid) check(out_data == q[0], "order");
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
