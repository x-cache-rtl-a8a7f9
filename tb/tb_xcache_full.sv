// tb_xcache_full: X-Cache at its default size (4 lanes, 32 walkers, 512
// sets x 8 ways, 4096 sectors) running the hash-index walker.
//
// Same walker, hash table, reference model and checks as tb_xcache, but the
// cache is big enough that nothing is evicted and allocation never fails;
// what is required here is correct answers, the 3-cycle hit latency, and
// that hits, misses, merged loads, replays, port conflicts and dropped
// messages all occur at full size.
module tb_xcache_full;
  import xcache_pkg::*;

  localparam int NB      = 8;        // buckets
  localparam int TBASE   = 'h1000;   // bucket root table, 16 bytes per root
  localparam int NBASE   = 'h8000;   // nodes, 16 bytes each
  localparam int NKEYS   = 40;
  localparam int NLOADS  = 300;

  // walker states and events
  localparam int S_DEF = 0, S_END = 1, S_AGEN = 2, S_WAIT = 3, S_ROOT = 4, S_MATCH = 5;
  localparam int E_MISS = 0, E_PTR = 1, E_DRAM = 2, E_CHECK = 3, E_SHIT = 4, E_SMISS = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic meta_req_valid, meta_req_ready, meta_resp_valid, meta_resp_ready;
  meta_req_t meta_req; meta_resp_t meta_resp;
  logic dram_req_valid, dram_req_ready, dram_resp_valid, dram_resp_ready;
  dram_req_t dram_req; dram_resp_t dram_resp, dresp_dut, fake_resp;
  logic dresp_v_model, dresp_r_model, fake_valid;
  logic cfg_we; cfg_target_e cfg_target; logic [15:0] cfg_addr; logic [63:0] cfg_wdata;
  logic [5:0] active;
  xc_stats_t stats;
  int n_dram;

  xcache dut (
    .clk, .rst_n,
    .meta_req_valid, .meta_req_ready, .meta_req,
    .meta_resp_valid, .meta_resp_ready, .meta_resp,
    .dram_req_valid, .dram_req_ready, .dram_req,
    .dram_resp_valid, .dram_resp_ready, .dram_resp,
    .cfg_we, .cfg_target, .cfg_addr, .cfg_wdata,
    .active_walkers(active), .stats);

  xc_dram_model #(.LATENCY(12), .WORDS(65536)) u_dram (
    .clk, .rst_n,
    .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
    .resp_valid(dresp_v_model), .resp_ready(dresp_r_model), .resp(dresp_dut),
    .n_requests(n_dram));

  // A stray DRAM response (for a walker that does not exist) can be injected.
  assign dram_resp_valid = fake_valid ? 1'b1 : dresp_v_model;
  assign dram_resp       = fake_valid ? fake_resp : dresp_dut;
  assign dresp_r_model   = fake_valid ? 1'b0 : dram_resp_ready;

  int checks = 0, failures = 0;
  int rid_of [int];          // reference: key -> rid (0 when absent)
  int keys [NKEYS];
  int outstanding [int];     // key -> loads not yet answered
  int n_out = 0;
  int max_hops = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------- programming
  task automatic cfg(cfg_target_e t, int a, longint d);
    @(negedge clk);
    cfg_we = 1; cfg_target = t; cfg_addr = 16'(a); cfg_wdata = 64'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask
  task automatic ucode(int a, action_t act); cfg(CFG_UCODE, a, longint'(act)); endtask
  task automatic route(int s, int e, int pc); cfg(CFG_RTABLE, (s << 4) | e, (1 << 8) | pc); endtask

  task automatic program_walker();
    // triggers: {source, hit} -> event
    cfg(CFG_TRIGGER, {SRC_LOAD, 1'b0}, E_MISS);
    cfg(CFG_TRIGGER, {SRC_PRELOAD, 1'b0}, E_MISS);
    cfg(CFG_TRIGGER, {SRC_STORE, 1'b1}, E_SHIT);
    cfg(CFG_TRIGGER, {SRC_STORE, 1'b0}, E_SMISS);
    cfg(CFG_TRIGGER, {SRC_DRAM, 1'b0}, E_DRAM);
    cfg(CFG_CTRL, 0, TBASE);
    cfg(CFG_CTRL, 1, NB - 1);
    // MISS: allocate data and tag, remember the key, go hash it.
    ucode(0,  mk_act(OP_ALLOCD, 0, 0, 0, 1));
    ucode(1,  mk_act(OP_ALLOCM));
    ucode(2,  mk_act(OP_ALLOCR, 0));
    ucode(3,  mk_act(OP_ENQ, 0, 0, 0, E_PTR));
    ucode(4,  mk_act(OP_STATE, 0, 0, 0, S_AGEN));
    // AGEN: idx = (key ^ key>>4) & mask; fetch the bucket root.
    ucode(5,  mk_act(OP_SRL, 3, 0, 0, 4));
    ucode(6,  mk_act(OP_XOR, 3, 3, 0));
    ucode(7,  mk_act(OP_AND, 3, 3, 9));
    ucode(8,  mk_act(OP_SHL, 3, 3, 0, 4));
    ucode(9,  mk_act(OP_ADD, 1, 8, 3));
    ucode(10, mk_act(OP_ENQ, 0, 1, 0, 'h8000));
    ucode(11, mk_act(OP_STATE, 0, 0, 0, S_ROOT));
    // ROOT: first node pointer; empty bucket -> not found.
    ucode(12, mk_act(OP_PEEK, 1, 0, 0, 0));
    ucode(13, mk_act(OP_BNZ, 0, 1, 0, 16));
    ucode(14, mk_act(OP_BEQ, 0, 7, 7, 26));
    ucode(15, mk_act(OP_NOP));
    ucode(16, mk_act(OP_ENQ, 0, 1, 0, 'h8000));
    ucode(17, mk_act(OP_STATE, 0, 0, 0, S_WAIT));
    // PEEK: extract key, rid and next of the node; check next.
    ucode(18, mk_act(OP_PEEK, 2, 0, 0, 0));
    ucode(19, mk_act(OP_PEEK, 3, 0, 0, 1));
    ucode(20, mk_act(OP_PEEK, 4, 0, 0, 2));
    ucode(21, mk_act(OP_ENQ, 0, 0, 0, E_CHECK));
    ucode(22, mk_act(OP_STATE, 0, 0, 0, S_MATCH));
    // CHECK: match -> cache {rid, next}; else follow next or give up.
    ucode(23, mk_act(OP_BEQ, 0, 2, 0, 28));
    ucode(24, mk_act(OP_ADD, 1, 4, 7));
    ucode(25, mk_act(OP_BNZ, 0, 1, 0, 16));
    ucode(26, mk_act(OP_AND, 3, 7, 7));
    ucode(27, mk_act(OP_AND, 4, 7, 7));
    ucode(28, mk_act(OP_WRITE, 0, 7, 3, 'h8000));
    ucode(29, mk_act(OP_WRITE, 0, 7, 4, 'h8001));
    ucode(30, mk_act(OP_UPDATE));
    ucode(31, mk_act(OP_STATE, 0, 0, 0, S_END));
    // STORE on a resident key: rid += payload.
    ucode(40, mk_act(OP_READ, 5, 7, 0, 0));
    ucode(41, mk_act(OP_PEEK, 6, 0, 0, 0));
    ucode(42, mk_act(OP_ADD, 5, 5, 6));
    ucode(43, mk_act(OP_WRITE, 0, 7, 5, 'h8000));
    ucode(44, mk_act(OP_STATE, 0, 0, 0, S_END));
    // STORE on an absent key: insert the payload.
    ucode(48, mk_act(OP_ALLOCD, 0, 0, 0, 1));
    ucode(49, mk_act(OP_ALLOCM));
    ucode(50, mk_act(OP_WRITE, 0, 7, 0, 0));
    ucode(51, mk_act(OP_UPDATE));
    ucode(52, mk_act(OP_STATE, 0, 0, 0, S_END));
    route(S_DEF,   E_MISS,  0);
    route(S_AGEN,  E_PTR,   5);
    route(S_ROOT,  E_DRAM,  12);
    route(S_WAIT,  E_DRAM,  18);
    route(S_MATCH, E_CHECK, 23);
    route(S_END,   E_SHIT,  40);
    route(S_DEF,   E_SMISS, 48);
  endtask

  // ---------------------------------------------------------- hash table
  function automatic int hidx(int k);
    return ((k >>> 4) ^ k) & (NB - 1);
  endfunction

  task automatic build_table();
    int head [NB];
    int hops [NB];
    for (int b = 0; b < NB; b++) begin head[b] = 0; hops[b] = 0; end
    for (int i = 0; i < NKEYS; i++) begin
      int k, a, b;
      do k = 1 + int'($urandom_range(4000)); while (rid_of.exists(k));
      keys[i] = k;
      rid_of[k] = k * 3 + 7;
      a = NBASE + 16 * i;
      b = hidx(k);
      u_dram.mem[a/4]     = k;
      u_dram.mem[a/4 + 1] = rid_of[k];
      u_dram.mem[a/4 + 2] = head[b];     // push in front of the chain
      u_dram.mem[a/4 + 3] = 0;
      head[b] = a;
      hops[b]++;
      if (hops[b] > max_hops) max_hops = hops[b];
    end
    for (int b = 0; b < NB; b++) begin
      u_dram.mem[(TBASE + 16*b)/4] = head[b];
      for (int w = 1; w < 4; w++) u_dram.mem[(TBASE + 16*b)/4 + w] = 0;
    end
  endtask

  function automatic int ref_rid(int k);
    return rid_of.exists(k) ? rid_of[k] : 0;
  endfunction

  // ----------------------------------------------------------- responses
  int n_resp = 0;
  always @(posedge clk) if (rst_n && meta_resp_valid && meta_resp_ready) begin
    int k;
    k = int'(meta_resp.key);
    n_resp++;
    check(outstanding.exists(k) && outstanding[k] > 0, $sformatf("unexpected response key %0d", k));
    if (outstanding.exists(k) && outstanding[k] > 0) outstanding[k]--;
    check(int'(meta_resp.data[0]) == ref_rid(k),
          $sformatf("key %0d rid %0d expected %0d", k, meta_resp.data[0], ref_rid(k)));
    check(meta_resp.last, "single-sector element must be last");
  end

  // the datapath is not always ready for a response
  bit drain = 0;
  always @(negedge clk) meta_resp_ready <= drain || ($urandom_range(5) != 0);

  task automatic send(req_kind_e kind, int k, int payload = 0);
    meta_req.kind = kind;
    meta_req.key  = key_t'(k);
    meta_req.data = '0;
    meta_req.data[0] = word_t'(payload);
    meta_req_valid = 1;
    @(posedge clk);
    while (!meta_req_ready) @(posedge clk);
    @(negedge clk);
    meta_req_valid = 0;
    if (kind == REQ_LOAD) begin
      if (!outstanding.exists(k)) outstanding[k] = 0;
      outstanding[k]++;
      n_out++;
    end
  endtask

  task automatic quiesce();
    int idle_cycles = 0;
    while (idle_cycles < 40) begin
      @(negedge clk);
      if (active == 0 && !meta_resp_valid) idle_cycles++; else idle_cycles = 0;
    end
  endtask

  int probe_key = -1, lat_seen = -1, t_req = 0;
  always @(posedge clk) begin
    if (meta_req_valid && meta_req_ready && int'(meta_req.key) == probe_key) t_req = cycle;
    if (meta_resp_valid && meta_resp_ready && int'(meta_resp.key) == probe_key && lat_seen < 0)
      lat_seen = cycle - t_req;
  end

  // -------------------------------------------------------------- watchdog
  int cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (cycle > 200000) begin
      failures++;
      $display("FAIL: watchdog resp=%0d out=%0d active=%0d mreq_ready=%0d hits=%0d misses=%0d routines=%0d alloc_stalls=%0d port_stalls=%0d xfull=%0d dram=%0d",
               n_resp, n_out, active, meta_req_ready, stats.hits, stats.misses, stats.routines, stats.alloc_stalls, stats.port_stalls, stats.xreg_full, n_dram);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    meta_req_valid = 0; meta_req = '0;
    cfg_we = 0; cfg_target = CFG_CTRL; cfg_addr = 0; cfg_wdata = 0;
    fake_valid = 0; fake_resp = '0;
    build_table();
    repeat (3) @(negedge clk);
    rst_n = 1;
    program_walker();

    // Phase 1: a burst of loads, about one in eight to absent keys, with
    // back-to-back repeats so that loads join active walkers.
    for (int i = 0; i < NLOADS; i++) begin
      int k;
      if ($urandom_range(7) == 0) k = 5000 + int'($urandom_range(50));
      else k = keys[$urandom_range(NKEYS - 1)];
      send(REQ_LOAD, k);
      if ($urandom_range(3) == 0) send(REQ_LOAD, k);
      repeat ($urandom_range(2)) @(negedge clk);
    end
    drain = 1;
    quiesce();
    check(n_resp == n_out, $sformatf("answered %0d of %0d loads", n_resp, n_out));

    // Phase 2: load-to-use latency of a hit on an idle cache. Both ends
    // are sampled on clock edges: request accepted at edge t, response
    // valid at edge t + 3.
    begin
      int k;
      k = keys[0];
      send(REQ_LOAD, k);
      quiesce();
      probe_key = k;
      lat_seen  = -1;
      send(REQ_LOAD, k);
      quiesce();
      check(lat_seen == 3, $sformatf("load-to-use latency %0d, expected 3", lat_seen));
      probe_key = -1;
    end

    // Phase 3: preloads, then stores merging into resident entries and
    // inserting absent ones.
    for (int i = 0; i < 6; i++) send(REQ_PRELOAD, keys[i]);
    quiesce();
    for (int i = 0; i < 4; i++) begin
      int k;
      k = keys[i];
      send(REQ_LOAD, k);          // make sure it is resident
      quiesce();
      send(REQ_STORE, k, 100 + i);
      quiesce();
      rid_of[k] = rid_of[k] + 100 + i;
      send(REQ_LOAD, k);
      quiesce();
    end
    begin
      send(REQ_STORE, 7777, 4242);
      quiesce();
      rid_of[7777] = 4242;
      send(REQ_LOAD, 7777);
      quiesce();
    end

    // Phase 4: a stray DRAM response for a walker that does not exist.
    @(negedge clk);
    fake_resp.wid = 3; fake_valid = 1;
    @(posedge clk); while (!dram_resp_ready) @(posedge clk);
    @(negedge clk); fake_valid = 0;
    quiesce();

    check(n_resp == n_out, $sformatf("answered %0d of %0d loads", n_resp, n_out));
    $display("hits=%0d misses=%0d merged=%0d replays=%0d routines=%0d port_stalls=%0d alloc_stalls=%0d xreg_full=%0d evictions=%0d dropped=%0d dram=%0d max_chain=%0d",
             stats.hits, stats.misses, stats.merged, stats.replays, stats.routines, stats.port_stalls,
             stats.alloc_stalls, stats.xreg_full, stats.evictions, stats.dropped, n_dram, max_hops);
    check(stats.hits > 0,         "no meta hit");
    check(stats.misses > 0,       "no miss walk");
    check(stats.merged > 0,       "no load joined an active walker");
    check(stats.replays > 0,      "no replay");
    check(stats.port_stalls > 0,  "no port conflict");
    check(stats.dropped == 1,     "stray DRAM response not dropped exactly once");
    check(max_hops > 1,           "no multi-node chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
