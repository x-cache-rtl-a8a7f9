// tb_xc_frontend: directed cases for the event loop, with the meta-tag,
// X-register, trigger and routine-table answers driven by the test. Checks,
// case by case: a load hit goes to the hit path and touches LRU; a load on
// an active key joins the walker; a miss starts a walker on the lowest idle
// lane; X-registers full holds the load; source priority (replay, DRAM,
// internal event, meta request); a DRAM response wakes its walker with the
// block as message; messages without a routine or walker are dropped; a
// replay serves each waiting load through the hit path; a store carries the
// resident entry into the new walker.
module tb_xc_frontend;
  import xcache_pkg::*;
  localparam int NEXE = 4, NA = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rp_valid, rp_pop, ie_valid, ie_pop, dr_valid, dr_pop, mr_valid, mr_pop;
  replay_t rp; int_event_t ie; dram_resp_t dr; meta_req_t mr;
  key_t lk_key [2]; logic lk_hit [2], lk_match [2]; logic [SET_W-1:0] lk_set [2]; logic [WAY_W-1:0] lk_way [2];
  meta_entry_t lk_entry [2];
  logic touch_en; logic [SET_W-1:0] touch_set; logic [WAY_W-1:0] touch_way;
  logic cam_hit [2]; wid_t cam_wid [2];
  logic row_valid [NA], row_running [NA]; logic [PEND_W-1:0] row_pend [NA]; walker_ctx_t row_ctx [NA];
  logic free_ok; wid_t free_wid;
  logic alloc_en, run_en, pend_en; wid_t alloc_wid, run_wid, pend_wid; walker_ctx_t alloc_ctx;
  logic [PEND_W-1:0] alloc_pend, pend_amt;
  src_e trig_src_a, trig_src_b; logic trig_hit_a, trig_hit_b; event_t trig_ev_a, trig_ev_b;
  state_t rt_state; event_t rt_event; logic rt_valid; upc_t rt_pc;
  logic job_valid, job_ready; hit_job_t job;
  logic [NEXE-1:0] lane_idle, disp_valid; dispatch_t disp;
  logic st_hit, st_miss, st_merged, st_replay, st_xreg_full, st_dropped;
  int checks = 0, failures = 0, cycle = 0;
  xc_frontend #(.NEXE(NEXE), .NACTIVE(NA)) dut (.*);
  // trigger table: event = {source, hit}; routine table: pc = 16*state + event
  assign trig_ev_a = event_t'({trig_src_a, trig_hit_a});
  assign trig_ev_b = event_t'({trig_src_b, trig_hit_b});
  assign rt_pc     = upc_t'({rt_state, rt_event});
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (++cycle > 20000) begin
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic clear();
    rp_valid = 0; ie_valid = 0; dr_valid = 0; mr_valid = 0; rp = '0; ie = '0; dr = '0; mr = '0;
    for (int p = 0; p < 2; p++) begin
      lk_hit[p] = 0; lk_match[p] = 0; lk_set[p] = 0; lk_way[p] = 0; lk_entry[p] = '0; cam_hit[p] = 0; cam_wid[p] = 0;
    end
    for (int i = 0; i < NA; i++) begin row_valid[i] = 0; row_running[i] = 0; row_pend[i] = 0; row_ctx[i] = '0; end
    free_ok = 1; free_wid = 6; rt_valid = 1; job_ready = 1; lane_idle = 4'b1100;
  endtask
  initial begin
    clear();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      key_t k; k = key_t'($urandom);
      // 1. load hit
      @(negedge clk); clear();
      mr_valid = 1; mr.kind = REQ_LOAD; mr.key = k;
      lk_hit[1] = 1; lk_match[1] = 1; lk_set[1] = 2; lk_way[1] = 3; lk_entry[1].dstart = 40; lk_entry[1].dlen = 2;
      #1;
      check(lk_key[1] == k, "lookup key");
      check(job_valid && job.key == k && job.start == 40 && job.len == 2, "hit job");
      check(touch_en && touch_set == 2 && touch_way == 3, "hit touch");
      check(mr_pop && st_hit && disp_valid == 0 && !alloc_en, "hit only");
      // 1b. hit path full: wait
      job_ready = 0; #1;
      check(!mr_pop && !job_valid, "hit waits for the hit path");
      // 2. join an active walker
      @(negedge clk); clear();
      mr_valid = 1; mr.kind = REQ_LOAD; mr.key = k; cam_hit[1] = 1; cam_wid[1] = 3; row_valid[3] = 1; row_pend[3] = 2;
      #1;
      check(pend_en && pend_wid == 3 && pend_amt == 1 && mr_pop && st_merged && disp_valid == 0, "join");
      // 3. miss starts a walker on the lowest idle lane
      @(negedge clk); clear();
      mr_valid = 1; mr.kind = REQ_LOAD; mr.key = k; lane_idle = 4'b1010;
      #1;
      check(alloc_en && alloc_wid == 6 && alloc_pend == 1 && alloc_ctx.key == k && alloc_ctx.state == STATE_DEFAULT, "walker allocated");
      check(trig_src_a == SRC_LOAD && !trig_hit_a, "trigger lookup");
      check(disp_valid == 4'b0010 && disp.wid == 6 && disp.pc == upc_t'({STATE_DEFAULT, trig_ev_a}), "dispatch");
      check(mr_pop && st_miss, "miss popped");
      // 4. X-registers full
      free_ok = 0; #1;
      check(!mr_pop && disp_valid == 0 && st_xreg_full, "X-registers full");
      // 4b. no idle lane
      free_ok = 1; lane_idle = 0; #1;
      check(!mr_pop && disp_valid == 0, "no lane");
      // 5. DRAM response wakes its walker and beats the meta request
      @(negedge clk); clear();
      mr_valid = 1; mr.kind = REQ_LOAD; mr.key = k;
      dr_valid = 1; dr.wid = 2; dr.data[1] = 32'hfeed; row_valid[2] = 1; row_ctx[2].state = 4; row_ctx[2].key = k + 1;
      #1;
      check(dr_pop && !mr_pop, "DRAM before meta request");
      check(trig_src_b == SRC_DRAM && rt_state == 4, "walker state indexes the routine table");
      check(run_en && run_wid == 2 && disp.wid == 2 && disp.ctx.key == k + 1 && disp.msg[1] == 32'hfeed, "wake");
      check(disp.pc == upc_t'({4'd4, trig_ev_b}), "routine pc");
      // 5b. walker still running: the DRAM response waits, the request goes
      row_running[2] = 1; #1;
      check(!dr_pop && mr_pop, "running walker not re-dispatched");
      // 6. stray DRAM response
      @(negedge clk); clear();
      dr_valid = 1; dr.wid = 5;
      #1;
      check(dr_pop && st_dropped && disp_valid == 0, "stray response dropped");
      // 7. no routine for a miss
      @(negedge clk); clear();
      mr_valid = 1; mr.kind = REQ_LOAD; mr.key = k; rt_valid = 0;
      #1;
      check(mr_pop && st_dropped && !alloc_en && disp_valid == 0, "no routine: dropped");
      // 8. internal event ranks below DRAM, above meta request
      @(negedge clk); clear();
      ie_valid = 1; ie.wid = 1; ie.ev = 9; ie.hit = 1; row_valid[1] = 1; row_ctx[1].state = 2;
      mr_valid = 1; mr.kind = REQ_LOAD; mr.key = k;
      #1;
      check(ie_pop && !mr_pop && disp.ev == 9 && disp.hit && rt_state == 2, "internal event");
      dr_valid = 1; dr.wid = 1; #1;
      check(dr_pop && !ie_pop, "DRAM before internal event");
      // 9. replay of two waiting loads, ahead of everything
      @(negedge clk); clear();
      rp_valid = 1; rp.key = k; rp.cnt = 2; lk_hit[0] = 1; lk_match[0] = 1; lk_entry[0].dstart = 7; lk_entry[0].dlen = 1;
      dr_valid = 1; dr.wid = 1; row_valid[1] = 1;
      #1;
      check(lk_key[0] == k && job_valid && job.start == 7 && !rp_pop && st_replay && !dr_pop, "replay first load");
      @(negedge clk); #1;
      check(job_valid && rp_pop && st_replay, "replay second load");
      @(negedge clk); rp_valid = 0; #1;
      check(dr_pop, "DRAM after replay");
      // 10. store on a resident key carries the entry
      @(negedge clk); clear();
      mr_valid = 1; mr.kind = REQ_STORE; mr.key = k; mr.data[0] = 55;
      lk_hit[1] = 1; lk_match[1] = 1; lk_set[1] = 1; lk_way[1] = 2; lk_entry[1].state = STATE_END;
      lk_entry[1].dstart = 12; lk_entry[1].dlen = 1;
      #1;
      check(alloc_en && alloc_pend == 0 && alloc_ctx.has_meta && alloc_ctx.set == 1 && alloc_ctx.way == 2, "store ctx meta");
      check(alloc_ctx.has_data && alloc_ctx.dstart == 12 && alloc_ctx.state == STATE_END, "store ctx data");
      check(trig_src_a == SRC_STORE && trig_hit_a && disp.msg[0] == 55 && disp.hit, "store trigger");
      // 10b. store while a walker is active waits
      cam_hit[1] = 1; #1;
      check(!mr_pop && !alloc_en, "store waits for the active walker");
      // 11. preload of a resident key is dropped quietly
      @(negedge clk); clear();
      mr_valid = 1; mr.kind = REQ_PRELOAD; mr.key = k; lk_hit[1] = 1;
      #1;
      check(mr_pop && !alloc_en && !job_valid, "preload hit dropped");
      lk_hit[1] = 0; #1;
      check(alloc_en && alloc_pend == 0 && trig_src_a == SRC_PRELOAD, "preload miss walks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
