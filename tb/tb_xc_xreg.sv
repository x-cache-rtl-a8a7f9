// tb_xc_xreg: random walker life cycles on 8 X-registers with 2 write-back
// lanes, against a model. Checks the active-meta compare, the free-row
// choice, the active count, the stored context, the waiting-load count and
// the replay request issued when a walker with waiting loads finishes.
module tb_xc_xreg;
  import xcache_pkg::*;
  localparam int NA = 8, NWB = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  key_t cam_key [2]; logic cam_hit [2]; wid_t cam_wid [2];
  logic row_valid [NA], row_running [NA]; logic [PEND_W-1:0] row_pend [NA]; walker_ctx_t row_ctx [NA];
  logic free_ok; wid_t free_wid; logic [3:0] active_count;
  logic alloc_en, run_en, pend_en; wid_t alloc_wid, run_wid, pend_wid; walker_ctx_t alloc_ctx;
  logic [PEND_W-1:0] alloc_pend, pend_amt;
  logic wb_en [NWB], wb_release [NWB]; wid_t wb_wid [NWB]; walker_ctx_t wb_ctx [NWB];
  logic replay_valid; replay_t replay;
  bit mv [NA], mr [NA]; int mp [NA]; walker_ctx_t mc [NA];
  int checks = 0, failures = 0, cycle = 0, n_replay = 0;
  xc_xreg #(.NACTIVE(NA), .NWB(NWB)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (++cycle > 20000) begin
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic walker_ctx_t rnd_ctx(key_t k);
    walker_ctx_t c;
    c = '0; c.key = k; c.state = state_t'($urandom);
    for (int i = 0; i < NREGS; i++) c.r[i] = $urandom;
    return c;
  endfunction
  initial begin
    alloc_en = 0; run_en = 0; pend_en = 0; alloc_wid = 0; run_wid = 0; pend_wid = 0; alloc_ctx = '0;
    alloc_pend = 0; pend_amt = 0; cam_key[0] = 0; cam_key[1] = 0;
    for (int l = 0; l < NWB; l++) begin wb_en[l] = 0; wb_release[l] = 0; wb_wid[l] = 0; wb_ctx[l] = '0; end
    for (int i = 0; i < NA; i++) begin mv[i] = 0; mr[i] = 0; mp[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 4000; r++) begin
      int ef, cnt, rel_lane, exp_cnt; bit used [NA]; key_t exp_key;
      for (int i = 0; i < NA; i++) used[i] = 0;
      // model free row, count
      ef = -1; cnt = 0;
      for (int i = NA - 1; i >= 0; i--) if (!mv[i]) ef = i;
      for (int i = 0; i < NA; i++) cnt += mv[i];
      // write-backs from running walkers; at most one release
      rel_lane = -1;
      for (int l = 0; l < NWB; l++) begin
        int w;
        wb_en[l] = 0; wb_release[l] = 0;
        w = $urandom_range(NA - 1);
        if (mv[w] && mr[w] && !used[w] && $urandom_range(1)) begin
          used[w] = 1; wb_en[l] = 1; wb_wid[l] = wid_t'(w);
          wb_ctx[l] = rnd_ctx(mc[w].key);
          if (rel_lane < 0 && $urandom_range(2) == 0) begin wb_release[l] = 1; rel_lane = l; end
        end
      end
      // dispatch of a dormant walker
      run_en = 0;
      begin int w; w = $urandom_range(NA - 1);
        if (mv[w] && !mr[w] && !used[w] && $urandom_range(1)) begin run_en = 1; run_wid = wid_t'(w); used[w] = 1; end end
      // waiting loads join a walker
      pend_en = 0;
      begin int w; w = $urandom_range(NA - 1);
        if (mv[w] && $urandom_range(1) && mp[w] < 8) begin pend_en = 1; pend_wid = wid_t'(w); pend_amt = PEND_W'($urandom_range(1, 2)); end end
      // new walker
      alloc_en = 0;
      if (ef >= 0 && $urandom_range(1)) begin
        alloc_en = 1; alloc_wid = wid_t'(ef); alloc_pend = PEND_W'($urandom_range(1));
        alloc_ctx = rnd_ctx(key_t'(1000 + r));
      end
      cam_key[0] = mv[$urandom_range(NA-1)] ? mc[$urandom_range(NA-1)].key : key_t'($urandom_range(5));
      cam_key[1] = mc[$urandom_range(NA-1)].key;
      #1;
      check(free_ok == (ef >= 0), "free_ok");
      if (ef >= 0) check(int'(free_wid) == ef, "free row");
      check(int'(active_count) == cnt, "active count");
      for (int p = 0; p < 2; p++) begin
        bit h; int hw; h = 0; hw = 0;
        for (int i = 0; i < NA; i++) if (mv[i] && mc[i].key == cam_key[p] && !h) begin h = 1; hw = i; end
        check(cam_hit[p] == h, "cam hit");
        if (h) check(int'(cam_wid[p]) == hw, "cam wid");
      end
      for (int i = 0; i < NA; i++) begin
        check(row_valid[i] == mv[i], "row valid");
        if (mv[i]) begin
          check(row_running[i] == mr[i], "row running");
          check(int'(row_pend[i]) == mp[i], "row pend");
          check(row_ctx[i] == mc[i], "row ctx");
        end
      end
      exp_cnt = 0;
      if (rel_lane >= 0) begin
        int w; w = wb_wid[rel_lane];
        exp_cnt = mp[w] + ((pend_en && pend_wid == w) ? pend_amt : 0);
        exp_key = mc[w].key;
      end
      check(replay_valid == (exp_cnt != 0), "replay valid");
      if (exp_cnt != 0) begin
        n_replay++;
        check(replay.key == exp_key && int'(replay.cnt) == exp_cnt, "replay payload");
      end
      @(negedge clk);
      if (pend_en) mp[pend_wid] += pend_amt;
      if (run_en) mr[run_wid] = 1;
      for (int l = 0; l < NWB; l++) if (wb_en[l]) begin
        mr[wb_wid[l]] = 0; mc[wb_wid[l]] = wb_ctx[l];
        if (wb_release[l]) begin mv[wb_wid[l]] = 0; mp[wb_wid[l]] = 0; end
      end
      if (alloc_en) begin mv[alloc_wid] = 1; mr[alloc_wid] = 1; mp[alloc_wid] = alloc_pend; mc[alloc_wid] = alloc_ctx; end
    end
    check(n_replay > 0, "replay exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
