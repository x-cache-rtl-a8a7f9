// xcache: X-Cache, a domain-specific cache with meta-tags and programmable
// coroutine walkers.
//
// The accelerator datapath issues meta loads, preloads and stores that name
// an element by its own metadata (a hash key, a row id, a node id). A load
// whose key is resident is answered from the data RAM in 3 cycles through a
// dedicated hit path, with no address generation at all. A miss starts a
// walker: a coroutine made of short microcoded routines, one per
// [state, event] transition, that computes DRAM addresses, issues fills,
// inspects the returned blocks, allocates meta-tag entries and data sectors
// and finally marks the element resident. Between routines a walker is
// dormant in an X-register, so up to NACTIVE walks (and their DRAM fills)
// proceed in parallel while NEXE executor lanes run the routines that are
// ready. Waiting loads are answered by a replay through the hit path once
// their walker ends.
//
// Structure: input queues -> front end (trigger table, meta-tag lookup,
// active-meta check, routine table) -> executor lanes (microcode RAM, port
// scheduler) -> meta-tags, sector allocator, data RAM, DRAM and internal
// event queues. Everything the walker does is programmed through the cfg_*
// port: trigger table, routine table, microcode and control registers
// C0..C7 (e.g. base addresses of the DSA's data structures).
//
// Interfaces (all valid/ready, one message per cycle):
//   meta_req  -> {kind, key, data}          from the datapath
//   meta_resp <- {key, data[WLEN], last}    one sector per beat
//   dram_req  <- {addr, wid}                one sector (WLEN words) per request
//   dram_resp -> {wid, data[WLEN]}          in any order across walkers
//
// Programming rule: a walker has at most one DRAM request or internal event
// outstanding; it issues the next one from the routine the previous one
// triggers. The internal event queue holds NACTIVE entries, so under this
// rule it never fills, and a walker that is running never has a response
// waiting at the head of the DRAM response queue for long. A routine that
// issues several DRAM reads at once can deadlock the response queue: its
// own response blocks the head while it waits for room to send the next
// request.
// Default parameters are the sparse-GEMM (SpArch) geometry of the
// evaluation: 4 executors, 32 active walkers, 8 ways, 512 sets, 4 words per
// sector. The data RAM size (one sector per meta-tag entry on average), the
// queue depths and the microcode and table sizes are this design's choices.
module xcache
  import xcache_pkg::*;
#(
  parameter int unsigned NEXE        = 4,
  parameter int unsigned NACTIVE     = 32,
  parameter int unsigned WAYS        = 8,
  parameter int unsigned SETS        = 512,
  parameter int unsigned NSECTORS    = 4096,
  parameter int unsigned MAX_RUN     = 8,
  parameter int unsigned UCODE_DEPTH = 256,
  parameter int unsigned NSTATES     = 16,
  parameter int unsigned NEVENTS     = 16,
  parameter int unsigned QDEPTH      = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // datapath
  input  logic        meta_req_valid,
  output logic        meta_req_ready,
  input  meta_req_t   meta_req,
  output logic        meta_resp_valid,
  input  logic        meta_resp_ready,
  output meta_resp_t  meta_resp,
  // DRAM
  output logic        dram_req_valid,
  input  logic        dram_req_ready,
  output dram_req_t   dram_req,
  input  logic        dram_resp_valid,
  output logic        dram_resp_ready,
  input  dram_resp_t  dram_resp,
  // configuration
  input  logic        cfg_we,
  input  cfg_target_e cfg_target,
  input  logic [15:0] cfg_addr,
  input  logic [63:0] cfg_wdata,
  // status
  output logic [$clog2(NACTIVE+1)-1:0] active_walkers,
  output xc_stats_t   stats
);
  // ------------------------------------------------------------- queues
  logic       mr_valid, mr_pop;       meta_req_t  mr;
  logic       dr_valid, dr_pop;       dram_resp_t dr;
  logic       ie_valid, ie_pop;       int_event_t ie;
  logic       rp_valid, rp_pop;       replay_t    rp;
  logic       evq_push, evq_ready;    int_event_t evq_in;
  logic       dq_push,  dq_ready;     dram_req_t  dq_in;
  logic       rq_push,  rq_ready;     replay_t    rq_in;

  xc_fifo #(.T(meta_req_t), .DEPTH(QDEPTH)) u_mreq_q (
    .clk, .rst_n, .in_valid(meta_req_valid), .in_ready(meta_req_ready), .in_data(meta_req),
    .out_valid(mr_valid), .out_ready(mr_pop), .out_data(mr), .count());
  xc_fifo #(.T(dram_resp_t), .DEPTH(QDEPTH)) u_dresp_q (
    .clk, .rst_n, .in_valid(dram_resp_valid), .in_ready(dram_resp_ready), .in_data(dram_resp),
    .out_valid(dr_valid), .out_ready(dr_pop), .out_data(dr), .count());
  xc_fifo #(.T(dram_req_t), .DEPTH(QDEPTH)) u_dreq_q (
    .clk, .rst_n, .in_valid(dq_push), .in_ready(dq_ready), .in_data(dq_in),
    .out_valid(dram_req_valid), .out_ready(dram_req_ready), .out_data(dram_req), .count());
  xc_fifo #(.T(int_event_t), .DEPTH(NACTIVE)) u_ev_q (
    .clk, .rst_n, .in_valid(evq_push), .in_ready(evq_ready), .in_data(evq_in),
    .out_valid(ie_valid), .out_ready(ie_pop), .out_data(ie), .count());
  xc_fifo #(.T(replay_t), .DEPTH(QDEPTH)) u_replay_q (
    .clk, .rst_n, .in_valid(rq_push), .in_ready(rq_ready), .in_data(rq_in),
    .out_valid(rp_valid), .out_ready(rp_pop), .out_data(rp), .count());

  // ----------------------------------------------------- programmable state
  word_t ctrl_q [NCTRL];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCTRL; i++) ctrl_q[i] <= '0;
    end else if (cfg_we && cfg_target == CFG_CTRL) begin
      ctrl_q[cfg_addr[2:0]] <= cfg_wdata[WORD_W-1:0];
    end
  end

  src_e   trig_src_a, trig_src_b;
  logic   trig_hit_a, trig_hit_b;
  event_t trig_ev_a,  trig_ev_b;

  xc_trigger_table u_trig (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_target == CFG_TRIGGER), .cfg_addr(cfg_addr[2:0]),
    .cfg_event(cfg_wdata[EVENT_W-1:0]),
    .src_a(trig_src_a), .hit_a(trig_hit_a), .ev_a(trig_ev_a),
    .src_b(trig_src_b), .hit_b(trig_hit_b), .ev_b(trig_ev_b));

  state_t rt_state; event_t rt_event; logic rt_valid; upc_t rt_pc;

  xc_routine_table #(.NSTATES(NSTATES), .NEVENTS(NEVENTS)) u_rtable (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_target == CFG_RTABLE),
    .cfg_state(cfg_addr[EVENT_W +: STATE_W]), .cfg_event(cfg_addr[EVENT_W-1:0]),
    .cfg_valid(cfg_wdata[UPC_W]), .cfg_pc(cfg_wdata[UPC_W-1:0]),
    .rd_state(rt_state), .rd_event(rt_event), .rd_valid(rt_valid), .rd_pc(rt_pc));

  upc_t    lane_pc  [NEXE];
  action_t lane_act [NEXE];

  xc_ucode_ram #(.DEPTH(UCODE_DEPTH), .NRD(NEXE)) u_ucode (
    .clk, .cfg_we(cfg_we && cfg_target == CFG_UCODE),
    .cfg_addr(cfg_addr[UPC_W-1:0]), .cfg_action(cfg_wdata[ACTION_W-1:0]),
    .rd_pc(lane_pc), .rd_act(lane_act));

  // ---------------------------------------------------------- meta-tags
  key_t             lk_key [2];
  logic             lk_hit [2], lk_match [2];
  logic [SET_W-1:0] lk_set [2];
  logic [WAY_W-1:0] lk_way [2];
  meta_entry_t      lk_entry [2];
  logic             touch_en;
  logic [SET_W-1:0] touch_set;
  logic [WAY_W-1:0] touch_way;
  mt_cmd_t          mt_cmd;
  key_t             mt_key;
  logic             mt_alloc_ok, mt_evict_en;
  logic [SET_W-1:0] mt_alloc_set;
  logic [WAY_W-1:0] mt_alloc_way;
  sec_t             mt_evict_start;
  len_t             mt_evict_len;

  xc_meta_tag #(.SETS(SETS), .WAYS(WAYS)) u_meta (
    .clk, .rst_n,
    .lk_key, .lk_hit, .lk_match, .lk_set, .lk_way, .lk_entry,
    .touch_en, .touch_set, .touch_way,
    .cmd(mt_cmd), .alloc_key(mt_key), .alloc_ok(mt_alloc_ok), .alloc_set(mt_alloc_set), .alloc_way(mt_alloc_way),
    .evict_en(mt_evict_en), .evict_start(mt_evict_start), .evict_len(mt_evict_len));

  // ------------------------------------------------- sectors and data RAM
  len_t sa_len;   logic sa_take, sa_ok;   sec_t sa_start;
  logic sa_free_en; sec_t sa_free_start; len_t sa_free_len;
  wire  evict_free = mt_evict_en && (mt_evict_len != '0);

  xc_sector_alloc #(.NSECTORS(NSECTORS), .MAX_RUN(MAX_RUN)) u_salloc (
    .clk, .rst_n,
    .alloc_len(sa_len), .alloc_ok(sa_ok), .alloc_start(sa_start), .alloc_take(sa_take),
    .free_a_en(sa_free_en), .free_a_start(sa_free_start), .free_a_len(sa_free_len),
    .free_b_en(evict_free), .free_b_start(mt_evict_start), .free_b_len(mt_evict_len),
    .free_count());

  logic dwr_en; sec_t dwr_sector; logic [WLEN-1:0] dwr_be; block_t dwr_data;
  logic hrd_en; sec_t hrd_sector; block_t hrd_data;
  logic drd_en; sec_t drd_sector; block_t drd_data;

  xc_data_ram #(.NSECTORS(NSECTORS)) u_data (
    .clk,
    .wr_en(dwr_en), .wr_sector(dwr_sector), .wr_be(dwr_be), .wr_data(dwr_data),
    .rda_en(hrd_en), .rda_sector(hrd_sector), .rda_data(hrd_data),
    .rdb_en(drd_en), .rdb_sector(drd_sector), .rdb_data(drd_data));

  logic job_valid, job_ready; hit_job_t job;

  xc_hit_path u_hit (
    .clk, .rst_n,
    .job_valid, .job_ready, .job,
    .rd_en(hrd_en), .rd_sector(hrd_sector), .rd_data(hrd_data),
    .resp_valid(meta_resp_valid), .resp_ready(meta_resp_ready), .resp(meta_resp));

  // -------------------------------------------------------- X-registers
  logic              cam_hit [2];
  wid_t              cam_wid [2];
  logic              row_valid [NACTIVE], row_running [NACTIVE];
  logic [PEND_W-1:0] row_pend [NACTIVE];
  walker_ctx_t       row_ctx [NACTIVE];
  logic              free_ok;  wid_t free_wid;
  logic              alloc_en, run_en, pend_en;
  wid_t              alloc_wid, run_wid, pend_wid;
  walker_ctx_t       alloc_ctx;
  logic [PEND_W-1:0] alloc_pend, pend_amt;
  logic              wb_en [NEXE], wb_release [NEXE];
  wid_t              wb_wid [NEXE];
  walker_ctx_t       wb_ctx [NEXE];

  xc_xreg #(.NACTIVE(NACTIVE), .NWB(NEXE)) u_xreg (
    .clk, .rst_n,
    .cam_key(lk_key), .cam_hit, .cam_wid,
    .row_valid, .row_running, .row_pend, .row_ctx,
    .free_ok, .free_wid, .active_count(active_walkers),
    .alloc_en, .alloc_wid, .alloc_ctx, .alloc_pend,
    .run_en, .run_wid, .pend_en, .pend_wid, .pend_amt,
    .wb_en, .wb_wid, .wb_ctx, .wb_release,
    .replay_valid(rq_push), .replay(rq_in));

  // ----------------------------------------------------------- front end
  logic [NEXE-1:0] lane_idle, disp_valid;
  dispatch_t disp;
  logic st_hit, st_miss, st_merged, st_replay, st_xreg_full, st_dropped;

  xc_frontend #(.NEXE(NEXE), .NACTIVE(NACTIVE)) u_fe (
    .clk, .rst_n,
    .rp_valid, .rp, .rp_pop, .ie_valid, .ie, .ie_pop,
    .dr_valid, .dr, .dr_pop, .mr_valid, .mr, .mr_pop,
    .lk_key, .lk_hit, .lk_match, .lk_set, .lk_way, .lk_entry,
    .touch_en, .touch_set, .touch_way,
    .cam_hit, .cam_wid, .row_valid, .row_running, .row_pend, .row_ctx,
    .free_ok, .free_wid,
    .alloc_en, .alloc_wid, .alloc_ctx, .alloc_pend,
    .run_en, .run_wid, .pend_en, .pend_wid, .pend_amt,
    .trig_src_a, .trig_hit_a, .trig_ev_a, .trig_src_b, .trig_hit_b, .trig_ev_b,
    .rt_state, .rt_event, .rt_valid, .rt_pc,
    .job_valid, .job_ready, .job,
    .lane_idle, .disp_valid, .disp,
    .st_hit, .st_miss, .st_merged, .st_replay, .st_xreg_full, .st_dropped);

  // ------------------------------------------------------ executor lanes
  logic [NPORTS-1:0] lreq [NEXE], lgnt [NEXE];
  logic [NEXE-1:0]   preq [NPORTS], pgnt [NPORTS];
  mt_cmd_t    l_mt_cmd [NEXE];
  key_t       l_mt_key [NEXE];
  len_t       l_sa_len [NEXE], l_free_len [NEXE];
  logic       l_sa_take [NEXE], l_free_en [NEXE];
  sec_t       l_free_start [NEXE], l_dwr_sector [NEXE], l_drd_sector [NEXE];
  dram_req_t  l_dram_req [NEXE];
  int_event_t l_int_ev [NEXE];
  logic [WLEN-1:0] l_dwr_be [NEXE];
  block_t     l_dwr_data [NEXE];
  logic [NEXE-1:0] l_stall_port, l_stall_alloc;

  for (genvar l = 0; l < NEXE; l++) begin : g_lane
    xc_executor u_exe (
      .clk, .rst_n,
      .disp_valid(disp_valid[l]), .disp, .idle(lane_idle[l]),
      .pc(lane_pc[l]), .act(lane_act[l]), .ctrl(ctrl_q),
      .port_req(lreq[l]), .port_gnt(lgnt[l]),
      .mt_cmd(l_mt_cmd[l]), .mt_key(l_mt_key[l]), .mt_alloc_ok, .mt_alloc_set, .mt_alloc_way,
      .replay_ready(rq_ready),
      .sa_len(l_sa_len[l]), .sa_take(l_sa_take[l]), .sa_ok, .sa_start,
      .sa_free_en(l_free_en[l]), .sa_free_start(l_free_start[l]), .sa_free_len(l_free_len[l]),
      .dram_req(l_dram_req[l]), .dramq_ready(dq_ready),
      .int_ev(l_int_ev[l]), .evq_ready,
      .dwr_sector(l_dwr_sector[l]), .dwr_be(l_dwr_be[l]), .dwr_data(l_dwr_data[l]),
      .drd_sector(l_drd_sector[l]), .drd_data,
      .wb_en(wb_en[l]), .wb_wid(wb_wid[l]), .wb_ctx(wb_ctx[l]), .wb_release(wb_release[l]),
      .stall_port(l_stall_port[l]), .stall_alloc(l_stall_alloc[l]));

    for (genvar p = 0; p < NPORTS; p++) begin : g_port
      assign preq[p][l] = lreq[l][p];
      assign lgnt[l][p] = pgnt[p][l];
    end
  end

  xc_port_sched #(.NREQ(NEXE), .NPORTS(NPORTS)) u_sched (
    .clk, .rst_n, .req(preq), .grant(pgnt));

  // Route the granted lane's payload to each shared port.
  always_comb begin
    mt_cmd = '0;  mt_cmd.op = MT_NONE;
    mt_key = '0;
    sa_len = '0;  sa_take = 1'b0;
    sa_free_en = 1'b0; sa_free_start = '0; sa_free_len = '0;
    dq_push = 1'b0; dq_in = '0;
    evq_push = 1'b0; evq_in = '0;
    dwr_en = 1'b0; dwr_sector = '0; dwr_be = '0; dwr_data = '0;
    drd_en = 1'b0; drd_sector = '0;
    for (int l = 0; l < NEXE; l++) begin
      if (pgnt[P_META][l]) begin mt_cmd = l_mt_cmd[l]; mt_key = l_mt_key[l]; end
      if (pgnt[P_ALLOC][l]) begin
        sa_len        = l_sa_len[l];
        sa_take       = l_sa_take[l];
        sa_free_en    = l_free_en[l];
        sa_free_start = l_free_start[l];
        sa_free_len   = l_free_len[l];
      end
      if (pgnt[P_DRAMQ][l]) begin dq_push  = dq_ready;  dq_in  = l_dram_req[l]; end
      if (pgnt[P_EVQ][l])   begin evq_push = evq_ready; evq_in = l_int_ev[l];   end
      if (pgnt[P_DWR][l]) begin
        dwr_en = 1'b1; dwr_sector = l_dwr_sector[l]; dwr_be = l_dwr_be[l]; dwr_data = l_dwr_data[l];
      end
      if (pgnt[P_DRD][l]) begin drd_en = 1'b1; drd_sector = l_drd_sector[l]; end
    end
  end

  // ---------------------------------------------------------- statistics
  function automatic logic [31:0] popc(logic [NEXE-1:0] v);
    logic [31:0] n;
    n = '0;
    for (int i = 0; i < NEXE; i++) n = n + v[i];
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
    end else begin
      stats.hits         <= stats.hits     + st_hit;
      stats.misses       <= stats.misses   + st_miss;
      stats.merged       <= stats.merged   + st_merged;
      stats.replays      <= stats.replays  + st_replay;
      stats.routines     <= stats.routines + (disp_valid != '0);
      stats.port_stalls  <= stats.port_stalls  + popc(l_stall_port);
      stats.alloc_stalls <= stats.alloc_stalls + popc(l_stall_alloc);
      stats.xreg_full    <= stats.xreg_full + st_xreg_full;
      stats.evictions    <= stats.evictions + (mt_cmd.op == MT_ALLOC && mt_evict_en);
      stats.dropped      <= stats.dropped   + st_dropped;
    end
  end
endmodule
