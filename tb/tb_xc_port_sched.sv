// tb_xc_port_sched: random requests on every port; checks at most one grant
// per port, grants only to requesters, a grant whenever someone asks, and
// round-robin fairness (a lane that keeps asking waits fewer than NREQ
// cycles).
module tb_xc_port_sched;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] req [6], grant [6];
  int wait_cnt [6][4];
  int checks = 0, failures = 0, cycle = 0;
  xc_port_sched #(.NREQ(4), .NPORTS(6)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (++cycle > 20000) begin
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int p = 0; p < 6; p++) begin req[p] = 0; for (int l = 0; l < 4; l++) wait_cnt[p][l] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 3000; r++) begin
      // a lane keeps its request until granted, as an executor does
      for (int p = 0; p < 6; p++)
        for (int l = 0; l < 4; l++)
          if (!req[p][l]) req[p][l] = ($urandom_range(2) == 0);
      #1;
      for (int p = 0; p < 6; p++) begin
        check($onehot0(grant[p]), "one grant per port");
        check((grant[p] & ~req[p]) == 0, "grant without request");
        check((req[p] == 0) || (grant[p] != 0), "work conserving");
        for (int l = 0; l < 4; l++)
          if (req[p][l] && !grant[p][l]) begin
            wait_cnt[p][l]++;
            check(wait_cnt[p][l] < 4, "starvation");
          end else wait_cnt[p][l] = 0;
      end
      @(negedge clk);
      for (int p = 0; p < 6; p++) req[p] = req[p] & ~grant[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
