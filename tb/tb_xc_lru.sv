// tb_xc_lru: random touches against a rank model per set; every set must
// hold a permutation of ranks, the touched way rank 0.
module tb_xc_lru;
  import xcache_pkg::*;
  localparam int SETS = 8, WAYS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic touch_en; logic [SET_W-1:0] touch_set, rd_set; logic [WAY_W-1:0] touch_way;
  logic [WAYS-1:0][WAY_W-1:0] rd_rank;
  int rank [SETS][WAYS];
  int checks = 0, failures = 0, cycle = 0;
  xc_lru #(.SETS(SETS), .WAYS(WAYS)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (++cycle > 20000) begin
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    touch_en = 0; touch_set = 0; touch_way = 0; rd_set = 0;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) rank[s][w] = w;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 2000; r++) begin
      touch_en = $urandom_range(1); touch_set = SET_W'($urandom_range(SETS-1)); touch_way = WAY_W'($urandom_range(WAYS-1));
      @(negedge clk);
      if (touch_en) begin
        int old;
        old = rank[touch_set][touch_way];
        for (int w = 0; w < WAYS; w++) if (rank[touch_set][w] < old) rank[touch_set][w]++;
        rank[touch_set][touch_way] = 0;
      end
      touch_en = 0;
      rd_set = SET_W'($urandom_range(SETS-1));
      #1;
      for (int w = 0; w < WAYS; w++) check(int'(rd_rank[w]) == rank[rd_set][w], $sformatf("set %0d way %0d rank", rd_set, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
