// tb_xc_meta_tag: random allocM / deallocM / update / state commands and
// hit touches on a 4-set, 2-way array, against a model of the entries and
// their LRU ranks. Checks both lookup ports, the allocation decision (invalid
// way first, else the least recently used resident entry, never a busy one)
// and the eviction report.
module tb_xc_meta_tag;
  import xcache_pkg::*;
  localparam int SETS = 4, WAYS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  key_t lk_key [2]; logic lk_hit [2], lk_match [2]; logic [SET_W-1:0] lk_set [2]; logic [WAY_W-1:0] lk_way [2];
  meta_entry_t lk_entry [2];
  logic touch_en; logic [SET_W-1:0] touch_set; logic [WAY_W-1:0] touch_way;
  mt_cmd_t cmd; key_t alloc_key; logic alloc_ok, evict_en; logic [SET_W-1:0] alloc_set; logic [WAY_W-1:0] alloc_way;
  sec_t evict_start; len_t evict_len;
  bit mv [SETS][WAYS]; key_t mk [SETS][WAYS]; state_t ms [SETS][WAYS]; sec_t mds [SETS][WAYS]; len_t mdl [SETS][WAYS];
  int rank [SETS][WAYS];
  int checks = 0, failures = 0, cycle = 0, n_evict = 0, n_refuse = 0;
  xc_meta_tag #(.SETS(SETS), .WAYS(WAYS)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (++cycle > 20000) begin
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic bit present(key_t k);
    for (int w = 0; w < WAYS; w++) if (mv[k % SETS][w] && mk[k % SETS][w] == k) return 1;
    return 0;
  endfunction
  function automatic void touch(int s, int w);
    for (int v = 0; v < WAYS; v++) if (rank[s][v] < rank[s][w]) rank[s][v]++;
    rank[s][w] = 0;
  endfunction
  initial begin
    cmd = '0; alloc_key = 0; touch_en = 0; touch_set = 0; touch_way = 0; lk_key[0] = 0; lk_key[1] = 0;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin mv[s][w] = 0; rank[s][w] = w; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 3000; r++) begin
      int op, s, w, exp_way, best;
      bit exp_ok, exp_ev;
      cmd = '0; touch_en = 0;
      do alloc_key = key_t'($urandom_range(31)); while (present(alloc_key));
      s = alloc_key % SETS;
      // expected allocation
      exp_ok = 0; exp_way = 0; exp_ev = 0; best = -1;
      for (int v = 0; v < WAYS; v++) if (!mv[s][v] && !exp_ok) begin exp_ok = 1; exp_way = v; end
      if (!exp_ok) for (int v = 0; v < WAYS; v++)
        if (ms[s][v] == STATE_END && rank[s][v] > best) begin exp_ok = 1; exp_way = v; best = rank[s][v]; exp_ev = 1; end
      op = $urandom_range(4);
      cmd.set = SET_W'($urandom_range(SETS-1)); cmd.way = WAY_W'($urandom_range(WAYS-1));
      cmd.state = state_t'($urandom_range(1) ? STATE_END : 2 + $urandom_range(3));
      cmd.dstart = sec_t'($urandom); cmd.dlen = len_t'($urandom_range(8));
      cmd.key = alloc_key;
      unique case (op)
        0: cmd.op = MT_ALLOC;
        1: cmd.op = mv[cmd.set][cmd.way] ? MT_STATE : MT_NONE;
        2: cmd.op = mv[cmd.set][cmd.way] ? MT_UPDATE : MT_NONE;
        3: cmd.op = (mv[cmd.set][cmd.way] && $urandom_range(3) == 0) ? MT_DEALLOC : MT_NONE;
        default: begin
          cmd.op = MT_NONE;
          touch_en = 1; touch_set = SET_W'($urandom_range(SETS-1)); touch_way = WAY_W'($urandom_range(WAYS-1));
        end
      endcase
      lk_key[0] = key_t'($urandom_range(31)); lk_key[1] = key_t'($urandom_range(31));
      #1;
      check(alloc_ok == exp_ok, "alloc_ok");
      if (exp_ok) check(int'(alloc_way) == exp_way, $sformatf("victim way %0d expected %0d", alloc_way, exp_way));
      check(int'(alloc_set) == s, "alloc set");
      if (cmd.op == MT_ALLOC) begin
        check(evict_en == exp_ev, "evict_en");
        if (exp_ev) begin
          n_evict++;
          check(evict_start == mds[s][exp_way] && evict_len == mdl[s][exp_way], "evicted pointers");
        end
        if (!exp_ok) n_refuse++;
      end
      for (int p = 0; p < 2; p++) begin
        int ls; bit m; int mw;
        ls = lk_key[p] % SETS; m = 0; mw = 0;
        for (int v = 0; v < WAYS; v++) if (mv[ls][v] && mk[ls][v] == lk_key[p] && !m) begin m = 1; mw = v; end
        check(lk_match[p] == m, "lookup match");
        check(int'(lk_set[p]) == ls, "lookup set");
        if (m) begin
          check(int'(lk_way[p]) == mw, "lookup way");
          check(lk_hit[p] == (ms[ls][mw] == STATE_END), "lookup hit");
          check(lk_entry[p].dstart == mds[ls][mw] && lk_entry[p].dlen == mdl[ls][mw] && lk_entry[p].state == ms[ls][mw], "lookup entry");
        end
      end
      @(negedge clk);
      unique case (cmd.op)
        MT_ALLOC: if (exp_ok) begin
          mv[s][exp_way] = 1; mk[s][exp_way] = alloc_key; ms[s][exp_way] = cmd.state;
          mds[s][exp_way] = 0; mdl[s][exp_way] = 0; touch(s, exp_way);
        end
        MT_STATE:   ms[cmd.set][cmd.way] = cmd.state;
        MT_UPDATE:  begin mds[cmd.set][cmd.way] = cmd.dstart; mdl[cmd.set][cmd.way] = cmd.dlen; end
        MT_DEALLOC: mv[cmd.set][cmd.way] = 0;
        default: if (touch_en) touch(touch_set, touch_way);
      endcase
    end
    check(n_evict > 0 && n_refuse > 0, "both eviction and refusal exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
