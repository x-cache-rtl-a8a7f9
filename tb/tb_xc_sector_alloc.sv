// tb_xc_sector_alloc: random allocations and frees against a bitmap model;
// checks that a granted run is first-fit and free, that a refusal means no
// run fits, and the free count.
module tb_xc_sector_alloc;
  import xcache_pkg::*;
  localparam int N = 32, MR = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  len_t alloc_len, free_a_len, free_b_len; logic alloc_ok, alloc_take, free_a_en, free_b_en;
  sec_t alloc_start, free_a_start, free_b_start;
  logic [$clog2(N+1)-1:0] free_count;
  bit free_m [N];
  int runs_s [$], runs_l [$];
  int checks = 0, failures = 0, cycle = 0;
  xc_sector_alloc #(.NSECTORS(N), .MAX_RUN(MR)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int first_fit(int len);
    for (int s = 0; s + len <= N; s++) begin
      bit ok = 1;
      for (int k = 0; k < len; k++) if (!free_m[s+k]) ok = 0;
      if (ok) return s;
    end
    return -1;
  endfunction
  always @(posedge clk) if (++cycle > 20000) begin
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    alloc_len = 1; alloc_take = 0; free_a_en = 0; free_b_en = 0;
    free_a_start = 0; free_b_start = 0; free_a_len = 0; free_b_len = 0;
    for (int s = 0; s < N; s++) free_m[s] = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 3000; r++) begin
      int ff, cnt, ia, ib;
      alloc_len = len_t'($urandom_range(1, MR));
      ff = first_fit(alloc_len);
      #1;
      cnt = 0; for (int s = 0; s < N; s++) cnt += free_m[s];
      check(free_count == cnt, "free count");
      check(alloc_ok == (ff >= 0), "alloc_ok");
      if (alloc_ok) check(int'(alloc_start) == ff, "first fit");
      alloc_take = alloc_ok && ($urandom_range(3) != 0);
      ia = -1; ib = -1;
      if (runs_s.size() > 0 && $urandom_range(2) == 0) begin
        ia = $urandom_range(runs_s.size() - 1);
        free_a_en = 1; free_a_start = sec_t'(runs_s[ia]); free_a_len = len_t'(runs_l[ia]);
      end
      if (runs_s.size() > 1 && $urandom_range(3) == 0) begin
        ib = $urandom_range(runs_s.size() - 1);
        if (ib != ia) begin free_b_en = 1; free_b_start = sec_t'(runs_s[ib]); free_b_len = len_t'(runs_l[ib]); end
        else ib = -1;
      end
      @(negedge clk);
      if (alloc_take) begin
        for (int k = 0; k < alloc_len; k++) free_m[ff+k] = 0;
      end
      if (free_a_en) for (int k = 0; k < free_a_len; k++) free_m[free_a_start+k] = 1;
      if (free_b_en) for (int k = 0; k < free_b_len; k++) free_m[free_b_start+k] = 1;
      if (ia > ib) begin runs_s.delete(ia); runs_l.delete(ia); if (ib >= 0) begin runs_s.delete(ib); runs_l.delete(ib); end end
      else begin if (ib >= 0) begin runs_s.delete(ib); runs_l.delete(ib); end if (ia >= 0) begin runs_s.delete(ia); runs_l.delete(ia); end end
      if (alloc_take) begin runs_s.push_back(ff); runs_l.push_back(alloc_len); end
      alloc_take = 0; free_a_en = 0; free_b_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
